// tb_pnp_led_module: plays the host side of the link against the LED test
// module with its default ID 2. The module must answer the request with
// ID 2, show a pattern sent to offset 2 on the LEDs (the reference test
// writes 0x6B), ignore data for other offsets and never announce data of
// its own.
`timescale 1ns/1ps
module tb_pnp_led_module;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;
  logic       host_clk, host_data, mod_data, att_pull;
  logic [9:0] ledg;

  pnp_led_module dut (.clk, .rst_n, .host_clk, .host_data, .mod_data, .att_pull, .ledg);

  task automatic xfer(input logic [35:0] tx, output logic [35:0] rx);
    for (int i = 0; i < 36; i++) begin
      host_data = tx[i];
      #100 host_clk = 1'b1;
      rx[i] = mod_data;
      #100 host_clk = 1'b0;
    end
  endtask

  logic [35:0] rx;
  int n_cc = 0;

  initial begin
    rst_n = 1'b0; host_clk = 0; host_data = 0;
    #200 rst_n = 1'b1;
    #100 check(att_pull, "plugged module pulls ATT");
    check(ledg == 10'h0, "LEDs off at power-up");
    xfer(PKT_ID_REQ, rx);
    xfer(36'h0, rx);           check(rx == 36'h2, "answers ID 2");
    xfer(PKT_HDR_VALID, rx);   if (rx == 36'h0CC) n_cc++;
    xfer(36'h0_0000_0002, rx); // ID echo at offset 0
    xfer(PKT_HDR_VALID, rx);   if (rx == 36'h0CC) n_cc++;
    xfer(36'h2_0000_006B, rx);
    #100 check(ledg == 10'h06B, "LEDs show 0x6B");
    xfer(PKT_HDR_VALID, rx);   if (rx == 36'h0CC) n_cc++;
    xfer(36'h1_0000_03FF, rx);
    #100 check(ledg == 10'h06B, "other offsets do not change the LEDs");
    xfer(PKT_HDR_VALID, rx);   if (rx == 36'h0CC) n_cc++;
    xfer(36'h2_FFFF_F3A5, rx);
    #100 check(ledg == 10'h3A5, "low ten bits drive the LEDs");
    check(n_cc == 0, "module never announces data");
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
