// pnp_led_module: the LED test module used to exercise the modules handler.
//
// A plug-and-play module whose device is a row of green LEDs. It contains
// the module-side protocol logic (pnp_module_driver) with its sixteen
// registers and shows the low LED_W bits of location LED_OFS on ledg. The
// module has no inputs of its own, so it never sends data to the host: it
// only answers identification requests with MODULE_ID and takes in the
// values the host sends.
//
// Defaults: MODULE_ID = 2 and LED_OFS = 2 match the test program of the
// reference setup, which programs register 0 with ID 0x2 and writes the
// LED pattern to byte address 8 of that register, that is 32-bit location
// 2. LED_W = 10 is the number of green LEDs on the reference board. Timing
// is that of pnp_module_driver; ledg changes one clk cycle after the data
// packet carrying the new value has ended.
module pnp_led_module
  import pnp_pkg::*;
#(
  parameter logic [DATA_W-1:0] MODULE_ID = 32'h2,
  parameter int unsigned       LED_OFS   = 2,
  parameter int unsigned       LED_W     = 10
) (
  input  logic             clk,
  input  logic             rst_n,     // low while unplugged
  input  logic             host_clk,
  input  logic             host_data,
  output logic             mod_data,
  output logic             att_pull,
  output logic [LED_W-1:0] ledg
);
  logic [DATA_W-1:0] regs [N_LOC];

  pnp_module_driver #(.MODULE_ID(MODULE_ID)) u_drv (
    .clk, .rst_n, .host_clk, .host_data, .mod_data, .att_pull,
    .loc_we(1'b0), .loc_addr('0), .loc_wdata('0), .regs
  );

  assign ledg = regs[LED_OFS][LED_W-1:0];

  initial assert (LED_OFS > 0 && LED_OFS < N_LOC && LED_W <= DATA_W)
    else $error("LED_OFS must be 1..15 and LED_W <= 32");
endmodule
