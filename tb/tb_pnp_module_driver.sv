// tb_pnp_module_driver: plays the host side of the link, bit by bit, at
// the 5 MHz bit rate against the module-side protocol logic (ID 9). It
// checks the attention line, the ID answer to both request forms, that
// the module stays silent until the host has accepted it, that a local
// write is then sent as 0xCC + {offset, data}, that a host 0xCC packet
// updates the module register (but never location 0), and that
// unplugging clears the module.
`timescale 1ns/1ps
module tb_pnp_module_driver;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;

  logic        host_clk, host_data, mod_data, att_pull;
  logic        loc_we;
  logic [3:0]  loc_addr;
  logic [31:0] loc_wdata;
  logic [31:0] regs [16];

  pnp_module_driver #(.MODULE_ID(32'h9)) dut (
    .clk, .rst_n, .host_clk, .host_data, .mod_data, .att_pull,
    .loc_we, .loc_addr, .loc_wdata, .regs);

  // one 36-bit packet each way; host drives while the clock is low and
  // samples the module on the rising edge (bit period 200 ns)
  task automatic xfer(input logic [35:0] tx, output logic [35:0] rx);
    for (int i = 0; i < 36; i++) begin
      host_data = tx[i];
      #100 host_clk = 1'b1;
      rx[i] = mod_data;
      #100 host_clk = 1'b0;
    end
  endtask

  logic [35:0] rx;

  initial begin
    rst_n = 1'b0; host_clk = 0; host_data = 0; loc_we = 0; loc_addr = 0; loc_wdata = 0;
    #200;
    check(!att_pull, "ATT released while unplugged");
    rst_n = 1'b1;
    #100;
    check(att_pull, "ATT pulled low when plugged");

    xfer(PKT_ID_REQ, rx);      check(rx == 36'h0, "silent during packet 0");
    xfer(36'h0, rx);           check(rx == 36'h9, "ID 9 in packet 1");
    xfer(PKT_ID_REQ_ALT, rx);  check(rx == 36'h0, "header slot 0x00 before acceptance");
    xfer(36'h0, rx);           check(rx == 36'h9, "ID again after the alternate request");

    // local write before the host has accepted: held back
    @(negedge clk); loc_we = 1; loc_addr = 4'd4; loc_wdata = 32'h1234;
    @(negedge clk); loc_we = 0;
    xfer(PKT_HDR_NONE, rx);    check(rx == 36'h0, "first header slot stays 0x00");
    xfer(36'h0, rx);           check(rx == 36'h0, "no data yet");
    xfer(PKT_HDR_VALID, rx);   check(rx == 36'h0CC, "module announces data");
    xfer(36'h3_0000_ABCD, rx); check(rx == 36'h4_0000_1234, "module sends {4, 0x1234}");
    #100;
    check(regs[3] == 32'hABCD, "host data stored at offset 3");
    check(regs[4] == 32'h1234, "local data kept");
    xfer(PKT_HDR_VALID, rx);   check(rx == 36'h0, "nothing more to send");
    xfer(36'h0_FFFF_FFFF, rx);
    #100;
    check(regs[0] == 32'h0, "location 0 not written by the host");
    xfer(PKT_HDR_NONE, rx);
    xfer(36'h5_0000_0055, rx);
    #100;
    check(regs[5] == 32'h0, "data without 0xCC ignored");

    rst_n = 1'b0;
    #100;
    check(regs[3] == 32'h0 && !att_pull, "unplug clears the module");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
