// tb_pnp_clk_div: checks the bit clock generator at its default ratio
// (50 MHz / 10 = 5 MHz). Over many periods it checks that sclk repeats
// every DIV cycles with DIV/2 high cycles, that rise_tick and fall_tick
// each pulse once per period, and that they mark exactly the cycles in
// which sclk goes high and low.
`timescale 1ns/1ps
module tb_pnp_clk_div;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;
  logic sclk, rise_tick, fall_tick;

  pnp_clk_div dut (.clk, .rst_n, .sclk, .rise_tick, .fall_tick);

  int cyc, last_rise, high_cnt, nrise, nfall;
  logic sclk_q;

  initial begin
    rst_n = 1'b0; last_rise = -1; high_cnt = 0; nrise = 0; nfall = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sclk_q = sclk;
    for (cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk); #1;
      check(rise_tick == (sclk && !sclk_q), "rise_tick marks the rising cycle");
      check(fall_tick == (!sclk && sclk_q), "fall_tick marks the falling cycle");
      check(!(rise_tick && fall_tick), "ticks never together");
      if (rise_tick) begin
        nrise++;
        if (last_rise >= 0) check(cyc - last_rise == 10, "period of 10 system cycles");
        last_rise = cyc;
      end
      if (fall_tick) begin
        nfall++;
        if (nrise > 0) check(high_cnt == 5, "high for 5 cycles");
        high_cnt = 0;
      end
      if (sclk) high_cnt++;
      sclk_q = sclk;
    end
    check(nrise == 40 && nfall == 40, "one rise and one fall per period");
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
