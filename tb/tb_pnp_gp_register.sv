// tb_pnp_gp_register: random test of one general purpose register against
// a reference model kept in the testbench. Each cycle it may issue a CPU
// write, a module-side write and an acknowledge, all at random addresses
// (collisions included), and checks the CPU read port, the ID field, the
// lowest-updated-location offer (upd, upd_addr, upd_data) against the
// model. The model's rules: CPU writes set the location's flag and win
// over a module write to the same location; module writes never touch
// location 0 or any flag; an ack clears a flag unless the CPU writes that
// location in the same cycle.
`timescale 1ns/1ps
module tb_pnp_gp_register;
  import pnp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 1'b0, rst_n;
  always #10 clk = ~clk;

  logic        cpu_we;
  logic [3:0]  cpu_addr, cpu_raddr;
  logic [31:0] cpu_wdata, cpu_rdata;
  hc2reg_t     hc_in;
  reg2hc_t     hc_out;

  pnp_gp_register dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata,
                       .cpu_raddr, .cpu_rdata, .hc_in, .hc_out);

  logic [31:0] m_mem [16];
  logic [15:0] m_upd;
  int          lowest;

  initial begin
    rst_n = 1'b0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_raddr = 0; hc_in = '0;
    for (int i = 0; i < 16; i++) m_mem[i] = '0;
    m_upd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cpu_we        = ($urandom_range(0, 3) == 0);
      cpu_addr      = 4'($urandom_range(0, 15));
      cpu_wdata     = $urandom;
      hc_in.we      = ($urandom_range(0, 3) == 0);
      hc_in.waddr   = ($urandom_range(0, 1)) ? cpu_addr : 4'($urandom_range(0, 15));
      hc_in.wdata   = $urandom;
      hc_in.ack     = ($urandom_range(0, 2) == 0);
      hc_in.ack_addr = ($urandom_range(0, 1)) ? hc_out.upd_addr : 4'($urandom_range(0, 15));
      cpu_raddr     = 4'($urandom_range(0, 15));
      #1;
      // combinational outputs against the model
      check(cpu_rdata == m_mem[cpu_raddr], "CPU read data");
      check(hc_out.id == m_mem[0], "ID field");
      check(hc_out.upd == (m_upd != 0), "update pending flag");
      lowest = 0;
      for (int i = 15; i >= 0; i--) if (m_upd[i]) lowest = i;
      if (m_upd != 0) begin
        check(hc_out.upd_addr == 4'(lowest), "lowest updated location offered");
        check(hc_out.upd_data == m_mem[lowest], "offered data");
      end
      // model update for the coming edge
      if (hc_in.ack && !(cpu_we && cpu_addr == hc_in.ack_addr)) m_upd[hc_in.ack_addr] = 1'b0;
      if (hc_in.we && hc_in.waddr != 0 && !(cpu_we && cpu_addr == hc_in.waddr))
        m_mem[hc_in.waddr] = hc_in.wdata;
      if (cpu_we) begin
        m_mem[cpu_addr] = cpu_wdata;
        m_upd[cpu_addr] = 1'b1;
      end
    end
    @(negedge clk);
    cpu_we = 0; hc_in = '0;
    #1;
    for (int i = 0; i < 16; i++) begin
      cpu_raddr = 4'(i);
      #1 check(cpu_rdata == m_mem[i], "final contents");
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
