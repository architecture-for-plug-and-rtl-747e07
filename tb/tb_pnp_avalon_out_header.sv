// tb_pnp_avalon_out_header: checks that the output header returns the
// addressed register's word one cycle after a read, holds it between
// reads, and returns zero for a register that does not exist.
`timescale 1ns/1ps
module tb_pnp_avalon_out_header;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;
  logic [31:0] rdata [3];
  logic [1:0]  rd_sel;
  logic        rd_en;
  logic [31:0] avs_readdata, expected;

  pnp_avalon_out_header dut (.clk, .rst_n, .rdata, .rd_sel, .rd_en, .avs_readdata);

  initial begin
    rst_n = 1'b0; rd_sel = 0; rd_en = 0;
    for (int r = 0; r < 3; r++) rdata[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(avs_readdata == 0, "zero after reset");
    expected = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) rdata[r] = $urandom;
      rd_sel = 2'($urandom_range(0, 3));
      rd_en  = $urandom_range(0, 1);
      if (rd_en) expected = (rd_sel < 3) ? rdata[rd_sel] : 32'h0;
      @(posedge clk); #1;
      check(avs_readdata == expected, "read data one cycle after the read");
    end
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
