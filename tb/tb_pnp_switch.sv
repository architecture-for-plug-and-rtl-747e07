// tb_pnp_switch: directed test of the switch with three host connectors
// and three registers. Checks the scan timing (CONN_Rk is reached k+2
// clock edges after req rises, a failed scan signals rejected N_REG+1
// edges after req), that a held register is skipped, that a same-cycle
// tie goes to the lower host connector, that ID 0 never matches, that
// dropping req frees the register, and that the crossbar routes both
// bundles between exactly the connected pair and zeros elsewhere.
`timescale 1ns/1ps
module tb_pnp_switch;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;

  logic        req      [3];
  logic [31:0] req_id   [3];
  logic        accepted [3];
  logic        rejected [3];
  hc2reg_t     hc_in    [3];
  reg2hc_t     hc_out   [3];
  reg2hc_t     reg_in   [3];
  hc2reg_t     reg_out  [3];

  pnp_switch dut (.clk, .rst_n, .req, .req_id, .accepted, .rejected,
                  .hc_in, .hc_out, .reg_in, .reg_out);

  // raise req for connector h and count edges until accepted or rejected
  task automatic request(int h, logic [31:0] id, output int edges, output bit acc);
    @(negedge clk);
    req[h] = 1'b1; req_id[h] = id;
    edges = 0;
    acc = 0;
    do begin
      @(posedge clk); #1;
      edges++;
    end while (!accepted[h] && !rejected[h] && edges < 20);
    acc = accepted[h];
    if (!acc) begin
      @(negedge clk);
      req[h] = 1'b0;
      repeat (2) @(posedge clk);
    end
  endtask

  task automatic release_hc(int h);
    @(negedge clk);
    req[h] = 1'b0;
    @(posedge clk); #1;
    check(!accepted[h], "released after req drops");
  endtask

  // crossbar check: connector h is connected to register r (r < 0: none)
  task automatic check_route(int h, int r);
    #1;
    if (r < 0) check(hc_out[h] == '0, "unconnected connector sees zeros");
    else begin
      check(hc_out[h] == reg_in[r], "register bundle routed to connector");
      check(reg_out[r] == hc_in[h], "connector bundle routed to register");
    end
  endtask

  int e, e2;
  bit a, a2;
  int n_tie = 0;

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < 3; i++) begin
      req[i] = 0; req_id[i] = 0; hc_in[i] = '0; reg_in[i] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      hc_in[i]  = hc2reg_t'({$urandom, $urandom, $urandom});
      reg_in[i] = reg2hc_t'({$urandom, $urandom, $urandom});
    end
    reg_in[0].id = 32'h1; reg_in[1].id = 32'h2; reg_in[2].id = 32'h1;

    // match on register 1
    request(0, 32'h2, e, a);
    check(a && e == 3, "HC0 reaches CONN_R1 after 3 edges");
    check_route(0, 1);
    check(reg_out[0] == '0 && reg_out[2] == '0, "other registers see zeros");
    check_route(1, -1);

    // register 1 held: HC1 with the same ID is rejected after a full scan
    request(1, 32'h2, e, a);
    check(!a && e == 4, "HC1 rejected after scanning three registers");
    check(accepted[0], "HC0 keeps its connection");

    // unknown ID
    request(1, 32'h7, e, a);
    check(!a && e == 4, "unknown ID rejected");

    // ID 0 never matches, even an unprogrammed register
    reg_in[2].id = 32'h0;
    request(2, 32'h0, e, a);
    check(!a, "ID 0 never connects");
    reg_in[2].id = 32'h1;

    // tie: HC1 and HC2 ask for type 1 in the same cycle
    @(negedge clk);
    req[1] = 1'b1; req_id[1] = 32'h1;
    req[2] = 1'b1; req_id[2] = 32'h1;
    repeat (2) @(posedge clk); #1;
    check(accepted[1] && !accepted[2], "tie goes to the lower connector (R0)");
    if (accepted[1] && !accepted[2]) n_tie++;
    repeat (2) @(posedge clk); #1;
    check(accepted[2], "loser continues and takes R2");
    check_route(1, 0);
    check_route(2, 2);
    // bundles change: routing is combinational
    hc_in[2].wdata = 32'h1234_5678;
    reg_in[0].upd_data = 32'h9ABC_DEF0;
    check_route(2, 2);
    check_route(1, 0);

    // release and reuse
    release_hc(0);
    check_route(0, -1);
    check(reg_out[1] == '0, "freed register sees zeros");
    request(0, 32'h2, e2, a2);
    check(a2 && e2 == 3, "freed register can be taken again");
    release_hc(1);
    release_hc(2);
    release_hc(0);
    check(n_tie == 1, "tie case happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
