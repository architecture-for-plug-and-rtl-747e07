// pnp_de0_system: the reference test system on one FPGA, without the
// processor.
//
// Holds the modules handler (pnp_handler) and one LED test module
// (pnp_led_module) side by side, as on the reference board: the handler's
// three host connectors go to one pin header and the LED test module to
// another, and the two are joined outside the chip by cables, so any host
// connector can be wired to the module. The processor and its bus fabric
// are outside this block; the handler's Avalon-MM slave is brought out as
// ports. The LED module's open-drain ATT pin is modelled by mod_att_pull
// (1 = pull low); the board-level pull-up turns it into the att_n input of
// whichever host connector it is cabled to. mod_rst_n is the LED module's
// plug state (low = unplugged). Both parts run from the 50 MHz clock.
module pnp_de0_system
  import pnp_pkg::*;
(
  input  logic        clk50,
  input  logic        reset_n,
  // Avalon-MM slave of the handler (from the processor's bus fabric)
  input  logic [5:0]  avs_mms1_address,
  input  logic        avs_mms1_chipselect,
  input  logic        avs_mms1_read,
  input  logic        avs_mms1_write,
  input  logic [31:0] avs_mms1_writedata,
  output logic [31:0] avs_mms1_readdata,
  // pin header 0: host connectors
  input  logic [2:0]  hc_att_n,
  input  logic [2:0]  hc_data_in,
  output logic [2:0]  hc_data_out,
  output logic [2:0]  hc_clk,
  output logic [2:0]  conn_pending,
  // pin header 1: LED test module
  input  logic        mod_rst_n,
  input  logic        mod_clk,
  input  logic        mod_data_in,
  output logic        mod_data_out,
  output logic        mod_att_pull,
  output logic [9:0]  ledg
);
  pnp_handler u_handler (
    .csi_clockreset_clk(clk50), .csi_clockreset_reset_n(reset_n),
    .avs_mms1_address, .avs_mms1_chipselect, .avs_mms1_read, .avs_mms1_write,
    .avs_mms1_writedata, .avs_mms1_readdata,
    .att_n(hc_att_n), .ser_data_in(hc_data_in), .ser_data_out(hc_data_out),
    .ser_clk(hc_clk), .conn_pending
  );

  pnp_led_module u_led_module (
    .clk(clk50), .rst_n(mod_rst_n),
    .host_clk(mod_clk), .host_data(mod_data_in),
    .mod_data(mod_data_out), .att_pull(mod_att_pull), .ledg
  );
endmodule
