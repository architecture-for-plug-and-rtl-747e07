// pnp_avalon_out_header: output header returning register contents to the
// Avalon-MM bus.
//
// Each register presents the location addressed by the current read
// offset on rdata[r]. In the cycle of a read the output header captures the
// location of the addressed register; avs_readdata then holds it from the
// next cycle on (fixed read latency of one cycle) until the next read.
// Reads of registers that do not exist return zero. The block's existence
// follows the design; its latency and register select timing are this
// implementation's choices, matched to pnp_avalon_in_header.
module pnp_avalon_out_header
  import pnp_pkg::*;
#(
  parameter int unsigned N_REG = 3,
  parameter int unsigned SEL_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] rdata [N_REG],   // one word per register, same offset
  input  logic [SEL_W-1:0]  rd_sel,          // register addressed by this read
  input  logic              rd_en,           // a read is requested this cycle
  output logic [DATA_W-1:0] avs_readdata
);
  logic [DATA_W-1:0] sel_data;

  always_comb begin
    sel_data = '0;
    for (int r = 0; r < N_REG; r++)
      if (rd_sel == SEL_W'(r)) sel_data = rdata[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     avs_readdata <= '0;
    else if (rd_en) avs_readdata <= sel_data;
  end
endmodule
