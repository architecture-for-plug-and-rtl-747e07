// tb_pnp_de0_system: end-to-end test of the reference system at its
// default sizes (three registers, three host connectors, 50 MHz system
// clock, 5 MHz bit clock).
//
// The testbench plays the processor (Avalon-MM master), the cables and
// pull-ups of the board and the modules:
//   HC0  a module of type 1 (pnp_module_driver, ID 1)
//   HC1  a second module of type 1, plugged a little later
//   HC2  first a dead module that pulls ATT low but never answers, then
//        the system's own LED test module (ID 2)
// Steps:
//   A  register 0 gets ID 1 and 0x10C00 at offset 1; both type-1 modules
//      and the dead module are plugged. HC0 must connect, send 0xCC,
//      the ID echo {0,1}, 0xCC, {1,0x10C00}. HC1 and HC2 must stay
//      pending and keep sending the alternate request 0x8000000AA.
//   B  module 0 writes offset 5 on its side; the processor must read it
//      from register 0. The dead module is unplugged: HC2's clock stops.
//   C  module 0 is unplugged; HC1 retries, gets register 0 and receives a
//      new processor write.
//   D  module 1 is unplugged; register 0 is reprogrammed with ID 2 and
//      0x6B at offset 2 (byte address 8) and the LED module is cabled to
//      HC2: the LEDs must show 0x6B.
// Mechanisms counted: identification, rejection/retry, acceptance,
// host-to-module sync, module-to-host sync, unplug, clock pause while the
// switch decides; each must occur. The bit clock period (200 ns) and the
// packet length are checked at the pins.
`timescale 1ns/1ps
module tb_pnp_de0_system;
  import pnp_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz

  logic        reset_n;
  logic [5:0]  address;
  logic        chipselect, read, write;
  logic [31:0] writedata, readdata;
  logic [2:0]  hc_att_n, hc_data_in, hc_data_out, hc_clk, conn_pending;
  logic        mod_rst_n, mod_data_out, mod_att_pull;
  logic [9:0]  ledg;

  // board wiring
  logic       plug0, plug1, plug_dead, plug_led;
  logic       m0_data, m0_att, m1_data, m1_att;
  logic       m0_we;
  logic [3:0] m0_addr;
  logic [31:0] m0_wdata;
  logic [31:0] m0_regs [16];
  logic [31:0] m1_regs [16];

  assign hc_att_n[0]   = !(plug0 && m0_att);
  assign hc_data_in[0] = plug0 ? m0_data : 1'b0;
  assign hc_att_n[1]   = !(plug1 && m1_att);
  assign hc_data_in[1] = plug1 ? m1_data : 1'b0;
  assign hc_att_n[2]   = !(plug_dead || (plug_led && mod_att_pull));
  assign hc_data_in[2] = plug_led ? mod_data_out : 1'b0;
  assign mod_rst_n     = plug_led;

  pnp_de0_system dut (
    .clk50(clk), .reset_n,
    .avs_mms1_address(address), .avs_mms1_chipselect(chipselect),
    .avs_mms1_read(read), .avs_mms1_write(write),
    .avs_mms1_writedata(writedata), .avs_mms1_readdata(readdata),
    .hc_att_n, .hc_data_in, .hc_data_out, .hc_clk, .conn_pending,
    .mod_rst_n, .mod_clk(plug_led ? hc_clk[2] : 1'b0),
    .mod_data_in(plug_led ? hc_data_out[2] : 1'b0),
    .mod_data_out, .mod_att_pull, .ledg
  );

  pnp_module_driver #(.MODULE_ID(32'h1)) mod0 (
    .clk, .rst_n(plug0), .host_clk(hc_clk[0]), .host_data(hc_data_out[0]),
    .mod_data(m0_data), .att_pull(m0_att),
    .loc_we(m0_we), .loc_addr(m0_addr), .loc_wdata(m0_wdata), .regs(m0_regs)
  );
  pnp_module_driver #(.MODULE_ID(32'h1)) mod1 (
    .clk, .rst_n(plug1), .host_clk(hc_clk[1]), .host_data(hc_data_out[1]),
    .mod_data(m1_data), .att_pull(m1_att),
    .loc_we(1'b0), .loc_addr(4'd0), .loc_wdata(32'd0), .regs(m1_regs)
  );

  pnp_tb_link_monitor mon_out0 (.sclk(hc_clk[0]), .data(hc_data_out[0]), .clear(hc_att_n[0]));
  pnp_tb_link_monitor mon_in0  (.sclk(hc_clk[0]), .data(hc_data_in[0]),  .clear(hc_att_n[0]));
  pnp_tb_link_monitor mon_out1 (.sclk(hc_clk[1]), .data(hc_data_out[1]), .clear(hc_att_n[1]));
  pnp_tb_link_monitor mon_out2 (.sclk(hc_clk[2]), .data(hc_data_out[2]), .clear(hc_att_n[2]));

  // Avalon-MM master
  task automatic av_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; chipselect = 1'b1; write = 1'b1;
    @(negedge clk);
    chipselect = 1'b0; write = 1'b0;
  endtask

  task automatic av_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; chipselect = 1'b1; read = 1'b1;
    @(negedge clk);
    chipselect = 1'b0; read = 1'b0;
    d = readdata;    // fixed read latency of one cycle
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk);
  endtask

  // mechanism counters
  int n_accept = 0, n_unplug = 0;
  logic [2:0] pend_q;
  always @(posedge clk) begin
    pend_q <= conn_pending;
    for (int h = 0; h < 3; h++)
      if (reset_n && pend_q[h] && !conn_pending[h]) n_accept++;
  end
  always @(posedge hc_att_n[0] or posedge hc_att_n[1] or posedge hc_att_n[2])
    if (reset_n) n_unplug++;

  // a pause of the bit clock: more than one bit period (10 cycles)
  // without an edge while a module is attached
  int quiet [3] = '{0, 0, 0};
  logic [2:0] clk_q;
  always @(posedge clk) begin
    clk_q <= hc_clk;
    for (int h = 0; h < 3; h++)
      if (hc_att_n[h] || (hc_clk[h] != clk_q[h])) quiet[h] <= 0;
      else quiet[h] <= quiet[h] + 1;
  end
  int n_gap = 0;
  always @(posedge clk)
    for (int h = 0; h < 3; h++)
      if (!hc_att_n[h] && quiet[h] == 11) n_gap++;

  logic [31:0] rd;
  int          t0, t_conn, mark1, mark2;

  initial begin
    reset_n = 1'b0; address = '0; chipselect = 1'b0; read = 1'b0; write = 1'b0;
    writedata = '0;
    plug0 = 1'b0; plug1 = 1'b0; plug_dead = 1'b0; plug_led = 1'b0;
    m0_we = 1'b0; m0_addr = '0; m0_wdata = '0;
    wait_cycles(5);
    reset_n = 1'b1;
    wait_cycles(5);
    check(conn_pending == 3'b111, "all connectors pending after reset");
    check(hc_clk == 3'b000, "no bit clock without modules");

    // ---- A: simulation cases 0, 1 and 2 ----
    av_write(6'h00, 32'h1);        // register 0, ID field
    av_write(6'h01, 32'h10C00);    // register 0, offset 1
    av_read(6'h00, rd);  check(rd == 32'h1, "read back ID field");
    av_read(6'h01, rd);  check(rd == 32'h10C00, "read back offset 1");
    av_read(6'h31, rd);  check(rd == 32'h0, "unmapped register reads zero");

    plug0 = 1'b1; plug_dead = 1'b1;
    t0 = $time;
    wait_cycles(30);
    plug1 = 1'b1;
    fork
      begin wait (!conn_pending[0]); t_conn = $time; end
      begin wait_cycles(4000); end
    join_any
    disable fork;
    check(!conn_pending[0], "HC0 accepted its module");
    // two packets of 36 bits at 200 ns, plus synchronisers and switch scan
    check(t_conn - t0 < 2 * 36 * 200 + 1200, "HC0 connection latency");
    check(t_conn - t0 >= 2 * 36 * 200, "HC0 connects only after packets 0 and 1");

    wait_cycles(8 * 36 * 10);
    check(mon_out0.pkts.size() >= 6, "HC0 packet count");
    if (mon_out0.pkts.size() >= 6) begin
      check(mon_out0.pkts[0] == 36'h0_0000_00AA, "HC0 packet 0 is the ID request 0xAA");
      check(mon_in0.pkts[1]  == 36'h0_0000_0001, "module answers ID 1");
      check(mon_out0.pkts[2] == 36'h0_0000_00CC, "HC0 header 0xCC");
      check(mon_out0.pkts[3] == 36'h0_0000_0001, "HC0 echoes the ID at offset 0");
      check(mon_out0.pkts[4] == 36'h0_0000_00CC, "HC0 second header 0xCC");
      check(mon_out0.pkts[5] == 36'h1_0001_0C00, "HC0 sends 0x10C00 at offset 1");
      if (mon_out0.pkts.size() >= 7)
        check(mon_out0.pkts[6] == 36'h0, "HC0 idle header 0x00 once in sync");
    end
    check(mod0.regs[1] == 32'h10C00, "module 0 register 1 synchronised");
    check(conn_pending[1] && conn_pending[2], "HC1 and HC2 stay pending");
    check(mon_out1.count(36'h8_0000_00AA) >= 2, "HC1 repeats the alternate request");
    check(mon_out2.count(36'h8_0000_00AA) >= 2, "HC2 repeats the alternate request");
    check(mon_out2.pkts.size() > 0 && mon_out2.pkts[0] == 36'h0_0000_00AA,
          "HC2 first request is 0xAA");
    check(mon_out0.min_period == 200.0 && mon_out0.max_period == 200.0,
          "bit clock period is 200 ns (5 MHz)");

    // ---- B: module-to-host sync, unplug of the dead module ----
    @(negedge clk);
    m0_we = 1'b1; m0_addr = 4'd5; m0_wdata = 32'hCAFE_0005;
    @(negedge clk);
    m0_we = 1'b0;
    wait_cycles(5 * 36 * 10);
    av_read(6'h05, rd); check(rd == 32'hCAFE_0005, "module write reaches register 0 offset 5");
    check(mon_in0.count(36'h5_CAFE_0005) == 1, "module sent {5, 0xCAFE0005} once");
    av_read(6'h01, rd); check(rd == 32'h10C00, "offset 1 unchanged");

    plug_dead = 1'b0;
    wait_cycles(10);
    mark1 = mon_out2.pkts.size();
    wait_cycles(3 * 36 * 10);
    check(hc_clk[2] == 1'b0 && mon_out2.pkts.size() == mark1, "HC2 stops at once when unplugged");
    check(conn_pending[2], "HC2 pending after unplug");

    // ---- C: HC1 takes over register 0 ----
    plug0 = 1'b0;
    fork
      begin wait (!conn_pending[1]); end
      begin wait_cycles(3000); end
    join_any
    disable fork;
    check(!conn_pending[1], "HC1 gets register 0 after module 0 leaves");
    check(conn_pending[0], "HC0 pending again after unplug");
    av_write(6'h03, 32'h0000_BEEF);
    wait_cycles(5 * 36 * 10);
    check(mod1.regs[3] == 32'h0000_BEEF, "module 1 receives the new write");

    // ---- D: hardware test with the LED module ----
    plug1 = 1'b0;
    wait_cycles(20);
    av_write(6'h00, 32'h2);        // program register 0 for the LED module
    av_write(6'h02, 32'h6B);       // byte address 8: the LED pattern
    mark2 = n_accept;
    plug_led = 1'b1;
    fork
      begin wait (ledg == 10'h06B); end
      begin wait_cycles(4000); end
    join_any
    disable fork;
    check(ledg == 10'h06B, "LED module shows 0x6B");
    check(!conn_pending[2] && n_accept == mark2 + 1, "LED module accepted on HC2");

    // mechanisms
    check(mon_out0.count(36'h0_0000_00AA) >= 1, "identification happened");
    check(mon_out1.count(36'h8_0000_00AA) >= 1, "rejection and retry happened");
    check(n_accept >= 3, "acceptance happened");
    check(mon_out0.count(36'h0_0000_00CC) >= 2, "host-to-module sync happened");
    check(mon_in0.count(36'h0_0000_00CC) >= 1, "module-to-host sync happened");
    check(n_unplug >= 3, "unplug happened");
    check(n_gap >= 1, "clock pause while the switch decides happened");
    $display("mechanisms: accept=%0d unplug=%0d gaps=%0d alt_req_hc1=%0d",
             n_accept, n_unplug, n_gap, mon_out1.count(36'h8_0000_00AA));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
