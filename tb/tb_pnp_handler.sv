// tb_pnp_handler: the modules handler at its default sizes with two
// modules (module-side protocol logic, IDs 3 and 4) and one empty
// connector. Register 1 is programmed for type 3 and register 2 for type
// 4; the type-4 module is plugged into connector 0 and the type-3 module
// into connector 2, so the switch must cross the wiring. Checks: the
// Avalon map (word address r*16 + l, one-cycle read latency), that each
// module lands on the register of its type, that processor writes reach
// the right module and module writes the right register, and that the
// untouched connector stays idle and pending.
`timescale 1ns/1ps
module tb_pnp_handler;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;

  logic [5:0]  address;
  logic        chipselect, read, write;
  logic [31:0] writedata, readdata;
  logic [2:0]  att_n, ser_data_in, ser_data_out, ser_clk, conn_pending;

  pnp_handler dut (
    .csi_clockreset_clk(clk), .csi_clockreset_reset_n(rst_n),
    .avs_mms1_address(address), .avs_mms1_chipselect(chipselect),
    .avs_mms1_read(read), .avs_mms1_write(write),
    .avs_mms1_writedata(writedata), .avs_mms1_readdata(readdata),
    .att_n, .ser_data_in, .ser_data_out, .ser_clk, .conn_pending);

  logic        plug_a, plug_b;   // a: type 4 on HC0, b: type 3 on HC2
  logic        a_data, a_att, b_data, b_att;
  logic        b_we;
  logic [3:0]  b_addr;
  logic [31:0] b_wdata;
  logic [31:0] a_regs [16];
  logic [31:0] b_regs [16];

  assign att_n[0]       = !(plug_a && a_att);
  assign ser_data_in[0] = a_data;
  assign att_n[1]       = 1'b1;
  assign ser_data_in[1] = 1'b0;
  assign att_n[2]       = !(plug_b && b_att);
  assign ser_data_in[2] = b_data;

  pnp_module_driver #(.MODULE_ID(32'h4)) mod_a (
    .clk, .rst_n(plug_a), .host_clk(ser_clk[0]), .host_data(ser_data_out[0]),
    .mod_data(a_data), .att_pull(a_att),
    .loc_we(1'b0), .loc_addr(4'd0), .loc_wdata(32'd0), .regs(a_regs));
  pnp_module_driver #(.MODULE_ID(32'h3)) mod_b (
    .clk, .rst_n(plug_b), .host_clk(ser_clk[2]), .host_data(ser_data_out[2]),
    .mod_data(b_data), .att_pull(b_att),
    .loc_we(b_we), .loc_addr(b_addr), .loc_wdata(b_wdata), .regs(b_regs));

  task automatic av_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    address = a; writedata = d; chipselect = 1'b1; write = 1'b1;
    @(negedge clk);
    chipselect = 1'b0; write = 1'b0;
  endtask

  task automatic av_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; chipselect = 1'b1; read = 1'b1;
    @(posedge clk); #1;
    d = readdata;                 // latched at this edge: latency one cycle
    @(negedge clk);
    chipselect = 1'b0; read = 1'b0;
  endtask

  logic [31:0] rd;
  int          hc1_edges = 0;
  always @(posedge ser_clk[1]) hc1_edges++;

  initial begin
    rst_n = 1'b0; address = 0; chipselect = 0; read = 0; write = 0; writedata = 0;
    plug_a = 0; plug_b = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Avalon map: every location of every register
    for (int r = 0; r < 3; r++)
      for (int l = 1; l < 16; l++) av_write(6'(r * 16 + l), 32'(r * 256 + l));
    av_write(6'h10, 32'h3);       // register 1: type 3
    av_write(6'h20, 32'h4);       // register 2: type 4
    for (int r = 0; r < 3; r++)
      for (int l = 1; l < 16; l++) begin
        av_read(6'(r * 16 + l), rd);
        check(rd == 32'(r * 256 + l), "Avalon write/read map");
      end
    av_read(6'h10, rd); check(rd == 32'h3, "ID field of register 1");

    plug_a = 1'b1; plug_b = 1'b1;
    fork
      begin wait (!conn_pending[0] && !conn_pending[2]); end
      begin repeat (3000) @(posedge clk); end
    join_any
    disable fork;
    check(!conn_pending[0] && !conn_pending[2], "both modules accepted");
    check(conn_pending[1] && hc1_edges == 0, "empty connector stays idle");

    // all 16 flags of each register are set, so each module gets its
    // register's contents: 16 header/data pairs
    repeat (17 * 2 * 36 * 10 + 200) @(posedge clk);
    begin
      bit ok_a = 1, ok_b = 1;
      for (int l = 1; l < 16; l++) begin
        if (a_regs[l] != 32'(2 * 256 + l)) ok_a = 0;
        if (b_regs[l] != 32'(1 * 256 + l)) ok_b = 0;
      end
      check(ok_a, "type-4 module holds register 2");
      check(ok_b, "type-3 module holds register 1");
    end

    av_write(6'h2A, 32'hA5A5_0001);
    @(negedge clk); b_we = 1; b_addr = 4'd6; b_wdata = 32'h0B0B_0006;
    @(negedge clk); b_we = 0;
    repeat (6 * 36 * 10) @(posedge clk);
    check(a_regs[10] == 32'hA5A5_0001, "processor write reaches module on HC0");
    av_read(6'h16, rd); check(rd == 32'h0B0B_0006, "module write reaches register 1");
    av_read(6'h06, rd); check(rd == 32'h6, "register 0 untouched");
    av_read(6'h26, rd); check(rd == 32'(2 * 256 + 6), "register 2 untouched");

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
