// pnp_host_connector: one host connector of the modules handler.
//
// Detects a module, identifies it, asks the switch for a register and then
// keeps that register and the module's own registers in step over a
// serial link. The link has a clock (ser_clk, driven by this block), one
// data line in each direction and the active-low attention line att_n that
// a plugged-in module pulls low. Data moves in 36-bit packets, least
// significant bit first, both directions at once:
//
//   packet 0  host -> 0xAA identification request (0x8000000AA on retries)
//   packet 1  module -> its ID in bits [31:0]          (host sends zeros)
//   --- the host pauses ser_clk and asks the switch for a register ---
//   rejected: back to packet 0 with the alternate request 0x8000000AA
//   accepted: packets 2 and 3 repeat until the module is unplugged
//   packet 2  each side: 0xCC if its next packet holds data, else 0x00
//   packet 3  each side: {offset[3:0], data[31:0]} or zeros
//
// Timing. All logic runs on the system clock; rise_tick and fall_tick
// from pnp_clk_div mark the edges of the bit clock. ser_clk only toggles
// while a transfer is running, so the module can frame packets by counting
// rising edges from the moment it is plugged in. ser_data_out changes on
// falling edges; ser_data_in is sampled (after a two-flop synchroniser) on
// rising edges. A bit counter and the state register, which doubles as
// the packet counter (packet 0, 1, 2, 3), track the stream. Clearing att_n (module unplugged) stops ser_clk, drops the
// connection and returns to DETACHED at once.
//
// Synchronisation is event driven: when the connected register offers an
// updated location (the lowest one with its flag set), it is latched,
// acknowledged to the register and sent as 0xCC followed by the data
// packet. A 0xCC header from the module makes the host write the packet
// that follows into the register at the offset it carries.
//
// conn_pending is high from reset until the switch accepts the connection,
// and again after the module is unplugged.
//
// Follows the design: packet length, bit order, the four packet kinds and
// their codes, the retry with the alternate request, the ATT detection and
// the pending flag. This implementation's own choices: clock pausing while
// the switch decides, the edge on which each side drives and samples, and
// zeros as the host's filler during packet 1.
module pnp_host_connector
  import pnp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rise_tick,
  input  logic              fall_tick,
  // host connector pins
  input  logic              att_n,
  input  logic              ser_data_in,
  output logic              ser_data_out,
  output logic              ser_clk,
  output logic              conn_pending,
  // switch side
  output logic              conn_req,
  output logic [DATA_W-1:0] conn_id,
  input  logic              accepted,
  input  logic              rejected,
  input  reg2hc_t           reg_in,
  output hc2reg_t           reg_out
);
  typedef enum logic [2:0] {
    HC_DETACHED,  // no module
    HC_START,     // waiting for a falling edge to start a packet stream
    HC_ID_REQ,    // packet 0
    HC_ID_RESP,   // packet 1
    HC_WAIT_SW,   // clock paused, switch is scanning
    HC_HDR,       // packet 2
    HC_DATA       // packet 3
  } hc_state_t;

  localparam logic [BITC_W-1:0] LAST_BIT = BITC_W'(PKT_W - 1);

  hc_state_t         state, start_state;
  logic              running;
  logic [BITC_W-1:0] bitcnt;
  logic [PKT_W-1:0]  tx_sh, tx_next, data_pkt;
  logic [PKT_W-2:0]  rx_sh;   // the 35 most recent bits
  logic              load_pend, peer_valid, connected;
  logic [1:0]        att_sync, din_sync;

  // lowest location with its updated flag set, as offered by the register
  logic             have_upd;
  logic [OFS_W-1:0] upd_sel;
  assign have_upd = reg_in.upd;
  assign upd_sel  = reg_in.upd_addr;

  logic             att_s, din_s;
  logic [PKT_W-1:0] rx_full;
  assign att_s   = att_sync[1];
  assign din_s   = din_sync[1];
  assign rx_full = {din_s, rx_sh};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      att_sync <= 2'b11;
      din_sync <= 2'b00;
    end else begin
      att_sync <= {att_sync[0], att_n};
      din_sync <= {din_sync[0], ser_data_in};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= HC_DETACHED;
      start_state <= HC_ID_REQ;
      running     <= 1'b0;
      bitcnt      <= '0;
      tx_sh       <= '0;
      tx_next     <= '0;
      rx_sh       <= '0;
      data_pkt    <= '0;
      load_pend   <= 1'b0;
      peer_valid  <= 1'b0;
      connected   <= 1'b0;
      conn_req    <= 1'b0;
      conn_id     <= '0;
      ser_clk     <= 1'b0;
      reg_out.ack      <= 1'b0;
      reg_out.ack_addr <= '0;
      reg_out.we       <= 1'b0;
      reg_out.waddr    <= '0;
      reg_out.wdata    <= '0;
    end else begin
      reg_out.ack <= 1'b0;
      reg_out.we  <= 1'b0;

      // bit clock pin: rises only while a stream runs
      if (rise_tick)      ser_clk <= running;
      else if (fall_tick) ser_clk <= 1'b0;

      if (att_s) begin
        // module absent or unplugged: stop everything
        state     <= HC_DETACHED;
        running   <= 1'b0;
        load_pend <= 1'b0;
        connected <= 1'b0;
        conn_req  <= 1'b0;
        tx_sh     <= '0;
        bitcnt    <= '0;
      end else begin
        unique case (state)
          HC_DETACHED: begin
            tx_next     <= PKT_ID_REQ;
            start_state <= HC_ID_REQ;
            state       <= HC_START;
          end
          HC_START: if (fall_tick) begin
            tx_sh   <= tx_next;
            bitcnt  <= '0;
            running <= 1'b1;
            state   <= start_state;
          end
          HC_WAIT_SW: begin
            if (accepted) begin
              connected   <= 1'b1;
              start_state <= HC_HDR;
              state       <= HC_START;
              if (have_upd) begin
                tx_next          <= PKT_HDR_VALID;
                data_pkt         <= make_data_pkt(upd_sel, reg_in.upd_data);
                reg_out.ack      <= 1'b1;
                reg_out.ack_addr <= upd_sel;
              end else begin
                tx_next  <= PKT_HDR_NONE;
                data_pkt <= '0;
              end
            end else if (rejected) begin
              conn_req    <= 1'b0;
              tx_next     <= PKT_ID_REQ_ALT;
              start_state <= HC_ID_REQ;
              state       <= HC_START;
            end
          end
          default: begin
            // a packet is running: HC_ID_REQ, HC_ID_RESP, HC_HDR, HC_DATA
            if (fall_tick) begin
              if (load_pend) begin
                tx_sh     <= tx_next;
                load_pend <= 1'b0;
              end else begin
                tx_sh <= tx_sh >> 1;
              end
            end
            if (rise_tick) begin
              rx_sh <= rx_full[PKT_W-1:1];
              if (bitcnt != LAST_BIT) begin
                bitcnt <= bitcnt + 1'b1;
              end else begin
                bitcnt <= '0;
                unique case (state)
                  HC_ID_REQ: begin
                    state     <= HC_ID_RESP;
                    tx_next   <= '0;
                    load_pend <= 1'b1;
                  end
                  HC_ID_RESP: begin
                    conn_id  <= rx_full[DATA_W-1:0];
                    conn_req <= 1'b1;
                    running  <= 1'b0;   // pause the clock while the switch scans
                    state    <= HC_WAIT_SW;
                  end
                  HC_HDR: begin
                    peer_valid <= (rx_full == PKT_HDR_VALID);
                    tx_next    <= data_pkt;
                    load_pend  <= 1'b1;
                    state      <= HC_DATA;
                  end
                  default: begin // HC_DATA
                    if (peer_valid) begin
                      reg_out.we    <= 1'b1;
                      reg_out.waddr <= rx_full[PKT_W-1:DATA_W];
                      reg_out.wdata <= rx_full[DATA_W-1:0];
                    end
                    peer_valid <= 1'b0;
                    load_pend  <= 1'b1;
                    state      <= HC_HDR;
                    if (have_upd) begin
                      tx_next          <= PKT_HDR_VALID;
                      data_pkt         <= make_data_pkt(upd_sel, reg_in.upd_data);
                      reg_out.ack      <= 1'b1;
                      reg_out.ack_addr <= upd_sel;
                    end else begin
                      tx_next  <= PKT_HDR_NONE;
                      data_pkt <= '0;
                    end
                  end
                endcase
              end
            end
          end
        endcase
      end
    end
  end

  assign ser_data_out  = tx_sh[0];
  assign conn_pending  = !connected;

  // The switch answers only while a request is up.
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    state == HC_WAIT_SW && accepted |-> conn_req);
endmodule
