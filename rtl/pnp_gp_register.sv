// pnp_gp_register: one general purpose register set of the modules handler.
//
// Sixteen 32-bit locations. Location 0 is the ID field: the CPU writes the
// ID of a module type there to make this register serve that type of
// module. Every CPU write raises the "updated" flag of the written
// location; the flag stays high until the host connector that is wired to
// this register pulses ack for that location, meaning the value has been
// sent to the module. Writes coming from the module side (through the
// switch) change the location without raising its flag, so a value the
// module sent is not echoed back to it; they never change the ID field.
//
// Interface: a CPU port (cpu_we/cpu_addr/cpu_wdata, cpu_raddr/cpu_rdata with
// combinational read) and a host connector port carried by the
// pnp_pkg::hc2reg_t / reg2hc_t bundles. Towards the host connector the
// register presents its ID field and, while any flag is set, the lowest
// updated location and its contents (upd, upd_addr, upd_data). Writes take effect at the next
// clock edge. When the CPU and the module write the same location in the
// same cycle the CPU wins. If a CPU write and an ack hit the same location
// in one cycle the flag stays set, so the new value is still sent.
// The location count, width, ID field and flag handshake follow the
// design's description; the collision rules and reset-to-zero are this
// implementation's choices.
module pnp_gp_register
  import pnp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // CPU side
  input  logic              cpu_we,
  input  logic [OFS_W-1:0]  cpu_addr,
  input  logic [DATA_W-1:0] cpu_wdata,
  input  logic [OFS_W-1:0]  cpu_raddr,
  output logic [DATA_W-1:0] cpu_rdata,
  // host connector side (through the switch)
  input  hc2reg_t           hc_in,
  output reg2hc_t           hc_out
);
  logic [DATA_W-1:0] mem [N_LOC];
  logic [N_LOC-1:0]  upd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_LOC; i++) mem[i] <= '0;
    end else begin
      if (hc_in.we && hc_in.waddr != '0 && !(cpu_we && cpu_addr == hc_in.waddr))
        mem[hc_in.waddr] <= hc_in.wdata;
      if (cpu_we)
        mem[cpu_addr] <= cpu_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd <= '0;
    end else begin
      for (int i = 0; i < N_LOC; i++) begin
        if (cpu_we && cpu_addr == OFS_W'(i))             upd[i] <= 1'b1;
        else if (hc_in.ack && hc_in.ack_addr == OFS_W'(i)) upd[i] <= 1'b0;
      end
    end
  end

  assign cpu_rdata    = mem[cpu_raddr];
  assign hc_out.id    = mem[0];
  always_comb begin
    hc_out.upd_addr = '0;
    for (int i = N_LOC - 1; i >= 0; i--)
      if (upd[i]) hc_out.upd_addr = OFS_W'(i);
  end
  assign hc_out.upd      = |upd;
  assign hc_out.upd_data = mem[hc_out.upd_addr];
endmodule
