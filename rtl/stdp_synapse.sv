// stdp_synapse: one plastic synapse with online CORDIC STDP.
//
// The synapse watches the spike histories of its pre-synaptic and
// post-synaptic neurons (spike_history, bit j = fired j sampling periods
// ago). When the middle bit pre_hist[CENTER] is set, a pre-synaptic spike
// lies exactly CENTER periods in the past, so the post-synaptic register
// holds CENTER periods of its "future" (bits CENTER-1..0) and CENTER+1
// periods of its "past" (bits DEPTH-1..CENTER). The nearest future post
// spike at bit j gives dt = CENTER - j > 0 (potentiation), the nearest past
// or simultaneous one gives dt <= 0 (depression). For each of the two that
// exists the unit scales |dt| by 1/tau with a shift-and-add constant
// multiply, evaluates e^(-|dt|/tau) on its exp_cordic core and applies
//   w <- w + A_PLUS  * e^(-dt/tau)    (dt > 0)
//   w <- w - A_MINUS * e^( dt/tau)    (dt <= 0)
// clipping w to [W_MIN, W_MAX] after each change. The window, the middle
// bit trigger, the exponential rule and its constants follow the published
// design (tau = 20 periods, A+ = 2, A- = 4, initial weight 96, upper bound
// 192). Pairing each pre spike with only the nearest post spike on each side
// and applying potentiation before depression are this design's choices.
//
// Timing: `go` is the sampling tick delayed by one clock (the histories have
// just shifted). An update takes at most 2*(N_EXP+2) clocks; `busy` is high
// meanwhile and `w` changes at most twice per tick.
module stdp_synapse
  import snn_pkg::*;
#(
  parameter int  DEPTH   = 41,
  parameter int  CENTER  = 20,
  parameter int  N_EXP   = 8,
  parameter real TAU     = 20.0,   // learning window, in sampling periods
  parameter real A_PLUS  = 2.0,
  parameter real A_MINUS = 4.0,
  parameter real W_INIT  = 96.0,
  parameter real W_MIN   = 0.0,
  parameter real W_MAX   = 192.0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic [DEPTH-1:0] pre_hist,
  input  logic [DEPTH-1:0] post_hist,
  output fix_t             w,
  output logic             busy,
  output logic             pot_o,   // one-cycle pulse: potentiation applied
  output logic             dep_o    // one-cycle pulse: depression applied
);
  localparam int unsigned C_INV_TAU = coeff(1.0 / TAU);
  localparam int unsigned C_AP      = coeff(A_PLUS);
  localparam int unsigned C_AM      = coeff(A_MINUS);
  localparam fix_t        WMIN_FIX  = fix(W_MIN);
  localparam fix_t        WMAX_FIX  = fix(W_MAX);
  localparam int          DTW       = $clog2(DEPTH + 1);

  typedef enum logic [2:0] {S_IDLE, S_POT_START, S_POT_WAIT,
                            S_DEP_START, S_DEP_WAIT} state_t;
  state_t state;

  // Nearest post spike on each side of the centre (priority encoders).
  logic           has_pot, has_dep;
  logic [DTW-1:0] dt_pot, dt_dep;   // |dt| in sampling periods
  always_comb begin
    has_pot = 1'b0;
    dt_pot  = '0;
    for (int j = 0; j < CENTER; j++)
      if (post_hist[j]) begin
        has_pot = 1'b1;
        dt_pot  = DTW'(CENTER - j);   // highest j wins: the nearest
      end
    has_dep = 1'b0;
    dt_dep  = '0;
    for (int j = DEPTH - 1; j >= CENTER; j--)
      if (post_hist[j]) begin
        has_dep = 1'b1;
        dt_dep  = DTW'(j - CENTER);   // lowest j wins: the nearest
      end
  end

  logic           dep_pending;
  logic [DTW-1:0] dt_pot_q, dt_dep_q;
  logic [DTW-1:0] dt_sel;
  logic           e_start, e_busy, e_done;
  logic [F:0]     e_x, e_y;
  fix_t           x_scaled, dw, w_sum;

  always_comb begin
    x_scaled = cmul(fix_t'(dt_sel) <<< F, C_INV_TAU);   // |dt| / tau
    e_x      = x_scaled[F:0];
    dw       = (state == S_POT_WAIT) ? cmul(fix_t'(e_y), C_AP)
                                     : -cmul(fix_t'(e_y), C_AM);
    w_sum    = w + dw;
  end

  exp_cordic #(.N_EXP(N_EXP)) u_exp (
    .clk, .rst_n,
    .start(e_start),
    .x(e_x),
    .y(e_y),
    .busy(e_busy),
    .done(e_done)
  );

  assign e_start = (state == S_POT_START) || (state == S_DEP_START);
  assign dt_sel  = (state == S_POT_START) ? dt_pot_q : dt_dep_q;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      w           <= fix(W_INIT);
      dep_pending <= 1'b0;
      dt_pot_q    <= '0;
      dt_dep_q    <= '0;
      pot_o       <= 1'b0;
      dep_o       <= 1'b0;
    end else begin
      pot_o <= 1'b0;
      dep_o <= 1'b0;
      unique case (state)
        S_IDLE:
          if (go && pre_hist[CENTER] && (has_pot || has_dep)) begin
            dt_pot_q    <= dt_pot;
            dt_dep_q    <= dt_dep;
            dep_pending <= has_dep;
            state       <= has_pot ? S_POT_START : S_DEP_START;
          end
        S_POT_START: state <= S_POT_WAIT;
        S_DEP_START: state <= S_DEP_WAIT;
        S_POT_WAIT:
          if (e_done) begin
            w     <= (w_sum > WMAX_FIX) ? WMAX_FIX : w_sum;
            pot_o <= 1'b1;
            state <= dep_pending ? S_DEP_START : S_IDLE;
          end
        S_DEP_WAIT:
          if (e_done) begin
            w           <= (w_sum < WMIN_FIX) ? WMIN_FIX : w_sum;
            dep_o       <= 1'b1;
            dep_pending <= 1'b0;
            state       <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new tick must not arrive while an update is still running.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> !busy);
  a_exp_inside_update: assert property (@(posedge clk) disable iff (!rst_n)
    e_busy |-> busy);
  a_arg_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    x_scaled[W-1:F+1] == '0);
  a_w_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (w >= WMIN_FIX) && (w <= WMAX_FIX));
  initial assert (CENTER > 0 && CENTER < DEPTH)
    else $error("stdp_synapse: CENTER must lie inside the history");
endmodule
