// izh_neuron: CORDIC Izhikevich neuron, one forward-Euler step per `start`.
//
// The neuron integrates the Izhikevich model
//   dv/dt = 0.04 v^2 + 5 v + 140 - u + I,   du/dt = a (b v - u)
// with the reset "if v > 30 mV then v <- c, u <- u + d". A step runs in two
// phases. Phase A is the cordic_square unit, which forms v^2 with shifts and
// adds in K+N clocks. Phase B is one clock of combinational shift-and-add
// arithmetic: every multiplication by a constant (0.04, 5, a, b) is a sum of
// shifted copies of the operand, and the time step dt = 2^-DT_SHIFT ms is an
// arithmetic right shift. The new v is compared with the 30 mV peak and the
// reset multiplexers load c and u+d when it is exceeded. The new u uses the
// old v (explicit Euler). All values are Q16.14 (snn_pkg).
// The equations, the CORDIC square and the word length follow the published
// design; dt, the start/done handshake, the initial state (v = c, u = b*c)
// and latching I at `start` are this design's choices. The defaults a, b, c,
// d are the standard tonic-spiking set.
//
// Interface: pulse `start` for one clock while `busy` is low; `i_in` is
// sampled then. `done` pulses K+N+1 clocks after `start`, together with
// `spike` when the neuron fired in this step; `v` and `u` then hold the new
// state until the next step.
module izh_neuron
  import snn_pkg::*;
#(
  parameter int  K        = 6,      // CORDIC integer iterations
  parameter int  N        = 6,      // CORDIC fraction iterations (IzhCOR6)
  parameter int  DT_SHIFT = 3,      // dt = 2^-DT_SHIFT ms
  parameter real A        = 0.02,
  parameter real B        = 0.2,
  parameter real C        = -65.0,
  parameter real D        = 6.0,
  parameter real V_PEAK   = 30.0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t i_in,
  output fix_t v,
  output fix_t u,
  output logic spike,
  output logic busy,
  output logic done
);
  localparam fix_t        C_FIX    = fix(C);
  localparam fix_t        D_FIX    = fix(D);
  localparam fix_t        PEAK_FIX = fix(V_PEAK);
  localparam fix_t        K140     = fix(140.0);
  localparam fix_t        U_INIT   = fix(B * C);
  localparam int unsigned C_004    = coeff(0.04);
  localparam int unsigned C_5      = coeff(5.0);
  localparam int unsigned C_A      = coeff(A);
  localparam int unsigned C_B      = coeff(B);

  fix_t i_q, sq;
  logic sq_busy, sq_done;

  cordic_square #(.K(K), .N(N)) u_sq (
    .clk, .rst_n,
    .start(start && !busy),
    .v,
    .sq,
    .busy(sq_busy),
    .done(sq_done)
  );

  // Phase B: Euler update (Eq. 10, 11) and reset (Eq. 3).
  fix_t dv, du, v_next, u_next;
  logic fire;
  always_comb begin
    dv     = cmul(sq, C_004) + cmul(v, C_5) + K140 - u + i_q;
    du     = cmul(cmul(v, C_B) - u, C_A);
    v_next = v + (dv >>> DT_SHIFT);
    u_next = u + (du >>> DT_SHIFT);
    fire   = (v_next > PEAK_FIX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v     <= C_FIX;
      u     <= U_INIT;
      i_q   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      spike <= 1'b0;
    end else begin
      done  <= 1'b0;
      spike <= 1'b0;
      if (start && !busy) begin
        i_q  <= i_in;
        busy <= 1'b1;
      end else if (busy && sq_done) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        spike <= fire;
        v     <= fire ? C_FIX : v_next;
        u     <= fire ? u_next + D_FIX : u_next;
      end
    end
  end

  // The square unit only runs inside a neuron step.
  a_sq_inside_step: assert property (@(posedge clk) disable iff (!rst_n)
    sq_busy |-> busy);
endmodule
