// pnp_clk_div: serial bit clock generator.
//
// Divides the system clock (50 MHz on the reference board) by DIV to obtain
// the serial bit clock of the host connectors (5 MHz for DIV = 10, the
// ratio the design uses). Instead of a second clock domain it produces
// one-cycle enables in the system clock domain: rise_tick in the cycle in
// which the bit clock goes high and fall_tick in the cycle in which it goes
// low. sclk is the divided clock itself, high for the second half of each
// period. The divide ratio follows the 50 MHz to 5 MHz reduction of the
// design; the enable-style outputs are this implementation's choice.
module pnp_clk_div #(
  parameter int unsigned DIV = 10   // even, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic sclk,
  output logic rise_tick,
  output logic fall_tick
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sclk <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
      if (cnt == CW'(DIV/2 - 1)) sclk <= 1'b1;
      if (cnt == CW'(DIV - 1))   sclk <= 1'b0;
    end
  end

  // Enables coincide with the cycle in which sclk takes its new value.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise_tick <= 1'b0;
      fall_tick <= 1'b0;
    end else begin
      rise_tick <= (cnt == CW'(DIV/2 - 1));
      fall_tick <= (cnt == CW'(DIV - 1));
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("DIV must be even and >= 2");
endmodule
