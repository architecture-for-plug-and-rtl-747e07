// pnp_module_driver: module side of the plug-and-play serial protocol, the
// logic a module's driver chip must contain.
//
// Holds the module's sixteen 32-bit registers and keeps them in step with
// the general purpose register of the modules handler it is wired to. While
// out of reset (plugged in) it pulls the attention line low (att_pull = 1
// means "drive ATT low"; the line is open drain with a pull-up on the host
// side). It frames the stream by counting rising edges of host_clk from
// reset: every 36 edges end a packet.
//
//  * An identification request (0xAA or 0x8000000AA) in any slot is
//    answered by the module ID in the next packet.
//  * After that the stream is header / data pairs. A 0xCC header from the
//    host is followed by {offset, data}, which is written to the local
//    register at that offset (offset 0, the ID field, is not stored).
//  * A local write (loc_we) marks a location as updated. Once the link has
//    carried one header slot that was not an identification request (so the
//    host has accepted the module), the module sends the lowest updated
//    location as 0xCC followed by {offset, data}.
//
// Timing: host_clk and host_data are sampled by the module's own clock clk
// through two-flop synchronisers, so clk must be several times faster than
// host_clk (at least 8x; the reference setup runs both sides from one
// 50 MHz clock and a 5 MHz bit clock). The module samples host_data and
// then, three clk cycles after each rising edge of host_clk, moves
// mod_data to its next bit; the host samples mod_data on the following
// rising edge, almost a full bit period later. The first bit of each
// packet is put out after the last rising edge of the packet before. Register contents appear on regs
// one cycle after the packet that carried them.
//
// The packet format, the ID response and the header codes follow the
// protocol description; the framing by edge counting, the open-drain
// modelling and the rule for when the module starts sending are this
// implementation's choices.
module pnp_module_driver
  import pnp_pkg::*;
#(
  parameter logic [DATA_W-1:0] MODULE_ID = 32'h2
) (
  input  logic              clk,
  input  logic              rst_n,       // low while unplugged
  // connector pins
  input  logic              host_clk,
  input  logic              host_data,   // host's DATA out
  output logic              mod_data,    // to host's DATA in
  output logic              att_pull,    // 1 = pull ATT low
  // device side
  input  logic              loc_we,
  input  logic [OFS_W-1:0]  loc_addr,
  input  logic [DATA_W-1:0] loc_wdata,
  output logic [DATA_W-1:0] regs [N_LOC]
);
  typedef enum logic [1:0] {M_IDLE, M_RESP, M_HDR, M_DATA} m_phase_t;

  localparam logic [BITC_W-1:0] LAST_BIT = BITC_W'(PKT_W - 1);

  logic [2:0]        clk_sync;
  logic [1:0]        dat_sync;
  logic              rise;
  m_phase_t          phase;
  logic [BITC_W-1:0] bitcnt;
  logic [PKT_W-1:0]  tx_sh, data_pkt, rx_full;
  logic [PKT_W-2:0]  rx_sh;   // the 35 most recent bits
  logic              host_valid, linked;
  logic [N_LOC-1:0]  upd;
  logic              have_upd;
  logic [OFS_W-1:0]  upd_sel;

  assign rise    = clk_sync[1] & ~clk_sync[2];
  assign rx_full = {dat_sync[1], rx_sh};

  always_comb begin
    have_upd = |upd;
    upd_sel  = '0;
    for (int i = N_LOC - 1; i >= 0; i--)
      if (upd[i]) upd_sel = OFS_W'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync   <= '0;
      dat_sync   <= '0;
      phase      <= M_IDLE;
      bitcnt     <= '0;
      rx_sh      <= '0;
      tx_sh      <= '0;
      data_pkt   <= '0;
      host_valid <= 1'b0;
      linked     <= 1'b0;
      upd        <= '0;
      for (int i = 0; i < N_LOC; i++) regs[i] <= '0;
      att_pull   <= 1'b0;
    end else begin
      att_pull <= 1'b1;
      clk_sync <= {clk_sync[1:0], host_clk};
      dat_sync <= {dat_sync[0], host_data};

      if (rise) begin
        rx_sh <= rx_full[PKT_W-1:1];
        if (bitcnt != LAST_BIT) begin
          bitcnt <= bitcnt + 1'b1;
          tx_sh  <= tx_sh >> 1;
        end else begin
          bitcnt <= '0;
          if (is_id_request(rx_full)) begin
            phase  <= M_RESP;
            linked <= 1'b0;
            tx_sh  <= {{OFS_W{1'b0}}, MODULE_ID};
          end else begin
            unique case (phase)
              M_IDLE: tx_sh <= '0;
              M_RESP: begin          // host filler of packet 1 received
                phase <= M_HDR;
                tx_sh <= PKT_HDR_NONE;
              end
              M_HDR: begin
                linked     <= 1'b1;
                host_valid <= (rx_full == PKT_HDR_VALID);
                phase      <= M_DATA;
                tx_sh      <= data_pkt;
              end
              default: begin         // M_DATA
                if (host_valid && rx_full[PKT_W-1:DATA_W] != '0)
                  regs[rx_full[PKT_W-1:DATA_W]] <= rx_full[DATA_W-1:0];
                host_valid <= 1'b0;
                phase      <= M_HDR;
                if (linked && have_upd) begin
                  tx_sh        <= PKT_HDR_VALID;
                  data_pkt     <= make_data_pkt(upd_sel, regs[upd_sel]);
                  upd[upd_sel] <= 1'b0;
                end else begin
                  tx_sh    <= PKT_HDR_NONE;
                  data_pkt <= '0;
                end
              end
            endcase
          end
        end
      end

      // local device writes (after the protocol's update clearing, so a
      // write in the same cycle keeps its flag)
      if (loc_we && loc_addr != '0) begin
        regs[loc_addr] <= loc_wdata;
        upd[loc_addr]  <= 1'b1;
      end
    end
  end

  assign mod_data = tx_sh[0];
endmodule
