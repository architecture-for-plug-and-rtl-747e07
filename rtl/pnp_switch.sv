// pnp_switch: connects host connectors to general purpose registers.
//
// One state machine per host connector. Each waits in IDLE until its host
// connector raises req together with the ID of the module it found, then
// visits CHECK_R0, CHECK_R1, ... CHECK_R(N_REG-1), one state per cycle. In
// CHECK_Rk it compares the module ID with the ID field of register k and
// checks that no other host connector holds register k. On success it
// enters CONN_Rk and stays there, wiring the host connector to register k,
// for as long as req stays high; accepted is high in CONN_Rk. If no
// register matches, the machine returns to IDLE and pulses rejected for one
// cycle. Dropping req in any CHECK or CONN state also returns to IDLE,
// which frees the register.
//
// The wiring is a crossbar of the pnp_pkg bundles: a host connector that
// is not connected sees an all-zero register bundle, and a register that
// is not connected sees an all-zero host connector bundle.
//
// State names and the IDLE -> CHECK -> CONN structure follow the design's
// switch state machine. Choices of this implementation: the state is an
// enum phase plus a register index, so that N_REG can change; an ID of 0
// never matches; when two machines check the same free register in the
// same cycle the lower-numbered host connector gets it; the rejected pulse
// tells the host connector that the scan has ended.
module pnp_switch
  import pnp_pkg::*;
#(
  parameter int unsigned N_HC  = 3,
  parameter int unsigned N_REG = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // host connector side
  input  logic              req      [N_HC],
  input  logic [DATA_W-1:0] req_id   [N_HC],
  output logic              accepted [N_HC],
  output logic              rejected [N_HC],
  input  hc2reg_t           hc_in    [N_HC],
  output reg2hc_t           hc_out   [N_HC],
  // register side
  input  reg2hc_t           reg_in   [N_REG],
  output hc2reg_t           reg_out  [N_REG]
);
  localparam int unsigned RW = (N_REG > 1) ? $clog2(N_REG) : 1;

  typedef enum logic [1:0] {SW_IDLE, SW_CHECK, SW_CONN} sw_phase_t;
  typedef struct packed {
    sw_phase_t     phase;
    logic [RW-1:0] idx;   // register being checked or held
  } sw_state_t;

  sw_state_t st   [N_HC];
  sw_state_t st_d [N_HC];
  logic      rej_d [N_HC];

  logic [N_REG-1:0] held;                 // register k is in some CONN_Rk
  logic [N_REG-1:0] claim [N_HC];         // machine i may take register k now
  logic [N_REG-1:0] conn  [N_HC];         // machine i is in CONN_Rk

  always_comb begin
    held = '0;
    for (int i = 0; i < N_HC; i++) begin
      conn[i] = '0;
      if (st[i].phase == SW_CONN) begin
        conn[i][st[i].idx] = 1'b1;
        held[st[i].idx]    = 1'b1;
      end
    end
    for (int i = 0; i < N_HC; i++) begin
      claim[i] = '0;
      if (st[i].phase == SW_CHECK && req[i] && req_id[i] != ID_NONE &&
          reg_in[st[i].idx].id == req_id[i] && !held[st[i].idx])
        claim[i][st[i].idx] = 1'b1;
    end
    // fixed priority: a lower host connector index wins a same-cycle tie
    for (int i = 1; i < N_HC; i++)
      for (int j = 0; j < i; j++)
        claim[i] = claim[i] & ~claim[j];
  end

  always_comb begin
    for (int i = 0; i < N_HC; i++) begin
      st_d[i]  = st[i];
      rej_d[i] = 1'b0;
      unique case (st[i].phase)
        SW_IDLE: if (req[i]) st_d[i] = '{SW_CHECK, '0};
        SW_CHECK: begin
          if (!req[i])                 st_d[i] = '{SW_IDLE, '0};
          else if (|claim[i])          st_d[i].phase = SW_CONN;
          else if (st[i].idx == RW'(N_REG - 1)) begin
            st_d[i]  = '{SW_IDLE, '0};
            rej_d[i] = 1'b1;
          end else                     st_d[i].idx = st[i].idx + 1'b1;
        end
        SW_CONN: if (!req[i]) st_d[i] = '{SW_IDLE, '0};
        default: st_d[i] = '{SW_IDLE, '0};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_HC; i++) begin
        st[i]       <= '{SW_IDLE, '0};
        rejected[i] <= 1'b0;
      end
    end else begin
      for (int i = 0; i < N_HC; i++) begin
        st[i]       <= st_d[i];
        rejected[i] <= rej_d[i];
      end
    end
  end

  // crossbar
  always_comb begin
    for (int i = 0; i < N_HC; i++) begin
      accepted[i] = (st[i].phase == SW_CONN);
      hc_out[i]   = '0;
      for (int k = 0; k < N_REG; k++)
        if (conn[i][k]) hc_out[i] = hc_out[i] | reg_in[k];
    end
    for (int k = 0; k < N_REG; k++) begin
      reg_out[k] = '0;
      for (int i = 0; i < N_HC; i++)
        if (conn[i][k]) reg_out[k] = reg_out[k] | hc_in[i];
    end
  end

  // A register is never wired to two host connectors.
  for (genvar k = 0; k < N_REG; k++) begin : g_chk
    logic [N_HC-1:0] users;
    always_comb for (int i = 0; i < N_HC; i++) users[i] = conn[i][k];
    a_one_user: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(users));
  end
endmodule
