// pnp_handler: the Plug-and-Play modules handler, an Avalon-MM peripheral
// that lets modules be plugged into any of N_HC host connectors at run
// time and reach the processor through N_REG general purpose registers.
//
// The processor programs a register by writing a module ID into its
// location 0 and then simply reads and writes that register's locations.
// When a module is plugged into a host connector, that connector reads
// the module's ID, the switch looks for a register programmed with that
// ID that no other connector holds, and wires the two together; from then
// on every location written by the processor is sent to the module, and
// every location the module sends is written into the register.
//
// Structure: input and output headers for the Avalon-MM slave, a clock
// divider producing the serial bit clock (50 MHz / 10 = 5 MHz), the
// registers, the switch and the host connectors. Word address r*16 + l
// reaches location l of register r; reads return data one cycle after the
// read (fixed latency 1, no wait states); writes take one cycle.
//
// The partition, the counts (three registers of sixteen 32-bit locations,
// three host connectors), the 5 MHz bit clock and the signal names of the
// Avalon and clock/reset interfaces follow the design. The address layout
// and read latency are this implementation's choices.
module pnp_handler
  import pnp_pkg::*;
#(
  parameter int unsigned N_HC    = 3,
  parameter int unsigned N_REG   = 3,
  parameter int unsigned CLK_DIV = 10,
  parameter int unsigned ADDR_W  = OFS_W + ((N_REG > 1) ? $clog2(N_REG) : 1)
) (
  input  logic              csi_clockreset_clk,
  input  logic              csi_clockreset_reset_n,
  // Avalon-MM slave
  input  logic [ADDR_W-1:0] avs_mms1_address,
  input  logic              avs_mms1_chipselect,
  input  logic              avs_mms1_read,
  input  logic              avs_mms1_write,
  input  logic [DATA_W-1:0] avs_mms1_writedata,
  output logic [DATA_W-1:0] avs_mms1_readdata,
  // host connector pins
  input  logic [N_HC-1:0]   att_n,
  input  logic [N_HC-1:0]   ser_data_in,
  output logic [N_HC-1:0]   ser_data_out,
  output logic [N_HC-1:0]   ser_clk,
  output logic [N_HC-1:0]   conn_pending
);
  localparam int unsigned SEL_W = ADDR_W - OFS_W;

  logic clk, rst_n;
  assign clk   = csi_clockreset_clk;
  assign rst_n = csi_clockreset_reset_n;

  // clock divider
  logic sclk, rise_tick, fall_tick;
  pnp_clk_div #(.DIV(CLK_DIV)) u_clk_div (.clk, .rst_n, .sclk, .rise_tick, .fall_tick);

  // headers
  logic [N_REG-1:0]  reg_we;
  logic [OFS_W-1:0]  wr_ofs, rd_ofs;
  logic [DATA_W-1:0] wr_data;
  logic [SEL_W-1:0]  rd_reg;
  logic              rd_valid;
  logic [DATA_W-1:0] cpu_rdata [N_REG];

  pnp_avalon_in_header #(.N_REG(N_REG), .ADDR_W(ADDR_W)) u_in_header (
    .avs_address(avs_mms1_address), .avs_chipselect(avs_mms1_chipselect),
    .avs_write(avs_mms1_write), .avs_read(avs_mms1_read),
    .avs_writedata(avs_mms1_writedata),
    .reg_we, .wr_ofs, .wr_data, .rd_ofs, .rd_reg, .rd_valid
  );

  pnp_avalon_out_header #(.N_REG(N_REG), .SEL_W(SEL_W)) u_out_header (
    .clk, .rst_n, .rdata(cpu_rdata), .rd_sel(rd_reg), .rd_en(rd_valid),
    .avs_readdata(avs_mms1_readdata)
  );

  // registers
  reg2hc_t reg_side_out [N_REG];
  hc2reg_t reg_side_in  [N_REG];

  for (genvar r = 0; r < N_REG; r++) begin : g_reg
    pnp_gp_register u_reg (
      .clk, .rst_n,
      .cpu_we(reg_we[r]), .cpu_addr(wr_ofs), .cpu_wdata(wr_data),
      .cpu_raddr(rd_ofs), .cpu_rdata(cpu_rdata[r]),
      .hc_in(reg_side_in[r]), .hc_out(reg_side_out[r])
    );
  end

  // switch
  logic              req      [N_HC];
  logic [DATA_W-1:0] req_id   [N_HC];
  logic              accepted [N_HC];
  logic              rejected [N_HC];
  hc2reg_t           hc_side_out [N_HC];
  reg2hc_t           hc_side_in  [N_HC];

  pnp_switch #(.N_HC(N_HC), .N_REG(N_REG)) u_switch (
    .clk, .rst_n, .req, .req_id, .accepted, .rejected,
    .hc_in(hc_side_out), .hc_out(hc_side_in),
    .reg_in(reg_side_out), .reg_out(reg_side_in)
  );

  // host connectors
  for (genvar h = 0; h < N_HC; h++) begin : g_hc
    pnp_host_connector u_hc (
      .clk, .rst_n, .rise_tick, .fall_tick,
      .att_n(att_n[h]), .ser_data_in(ser_data_in[h]),
      .ser_data_out(ser_data_out[h]), .ser_clk(ser_clk[h]),
      .conn_pending(conn_pending[h]),
      .conn_req(req[h]), .conn_id(req_id[h]),
      .accepted(accepted[h]), .rejected(rejected[h]),
      .reg_in(hc_side_in[h]), .reg_out(hc_side_out[h])
    );
  end

  // The free-running divided clock itself is not used: the host
  // connectors build their gated bit clocks from the tick enables.
  logic unused_sclk;
  assign unused_sclk = sclk;
endmodule
