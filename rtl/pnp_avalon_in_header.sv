// pnp_avalon_in_header: input header between the Avalon-MM bus and the
// general purpose registers.
//
// Decodes the word address of the handler's Avalon-MM slave. Address bits
// [OFS_W-1:0] select one of the sixteen locations of a register and the
// bits above select the register, so register r, location l sits at word
// address r*16 + l (byte address 4*(r*16 + l) from the processor).
// The block is combinational. A write with chipselect raises reg_we for
// exactly one register in the same cycle; the register stores it at the
// next clock edge. A read presents the location offset on rd_ofs (shared
// by all registers) and the register number and strobe to the output
// header, which captures the data and returns it one cycle later. Addresses of registers that do not
// exist are ignored on write and read as zero.
//
// The existence of an input header and the CPU-visible map (ID field at
// offset 0, locations at 32-bit steps) follow the design; the address
// layout, the one-cycle read latency and the handling of unused addresses
// are this implementation's choices.
module pnp_avalon_in_header
  import pnp_pkg::*;
#(
  parameter int unsigned N_REG  = 3,
  parameter int unsigned ADDR_W = 6
) (
  // Avalon-MM slave (request side)
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_chipselect,
  input  logic              avs_write,
  input  logic              avs_read,
  input  logic [DATA_W-1:0] avs_writedata,
  // to the registers
  output logic [N_REG-1:0]  reg_we,
  output logic [OFS_W-1:0]  wr_ofs,
  output logic [DATA_W-1:0] wr_data,
  output logic [OFS_W-1:0]  rd_ofs,
  // to the output header
  output logic [ADDR_W-OFS_W-1:0] rd_reg,
  output logic              rd_valid
);
  localparam int unsigned SW = ADDR_W - OFS_W;

  logic [SW-1:0] sel;
  assign sel     = avs_address[ADDR_W-1:OFS_W];
  assign wr_ofs  = avs_address[OFS_W-1:0];
  assign rd_ofs  = avs_address[OFS_W-1:0];
  assign wr_data = avs_writedata;

  always_comb begin
    reg_we = '0;
    for (int r = 0; r < N_REG; r++)
      if (avs_chipselect && avs_write && sel == SW'(r)) reg_we[r] = 1'b1;
  end

  assign rd_reg   = sel;
  assign rd_valid = avs_chipselect && avs_read;

  initial assert (N_REG <= (1 << SW)) else $error("ADDR_W too small for N_REG registers");
endmodule
