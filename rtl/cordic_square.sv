// cordic_square: square of the membrane potential with a linear-mode CORDIC.
//
// The unit computes z = v * v using only shifts and additions. On `start`
// the operand is loaded twice: into the residual register x and, as the
// multiplicand, into vq; z is cleared. Iteration i (i = -K .. N-1, one per
// clock) looks at the sign of x: if x >= 0 it subtracts 2^-i from x and adds
// v*2^-i to z, otherwise it does the opposite. x is thus driven towards zero
// and z collects v times the value that was removed from x, i.e. v*v.
// K sets the operand range (|v| < 2^(K+1), K = 6 covers the -100..30 mV
// swing of the neuron) and N the number of fraction iterations, i.e. the
// precision: N = 6, 8, 10, 12 give the IzhCOR6/8/10/12 neuron variants.
// The iteration order, the sign test on x and K = 6 follow the published
// algorithm; register widths (two guard bits above Q16.14) and the
// saturation of the result are this design's choice.
//
// Timing: `start` is a one-cycle pulse while idle; `done` pulses exactly
// K+N cycles later, with `sq` valid from then until the next start.
module cordic_square
  import snn_pkg::*;
#(
  parameter int K = 6,   // integer iterations: i starts at -K
  parameter int N = 6    // fraction iterations: i ends at N-1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fix_t v,
  output fix_t sq,
  output logic busy,
  output logic done
);
  localparam int WI = W + 4;           // internal width with guard bits
  typedef logic signed [WI-1:0] wide_t;

  wide_t x, z, vq;
  int    i;                            // current iteration index, -K..N-1

  wide_t step_x, step_v;
  always_comb begin
    // 2^-i in Q.F and v*2^-i, both by shifting only.
    step_x = wide_t'(1) <<< (F - i);
    if (i < 0) step_v = vq <<< (-i);
    else       step_v = vq >>> i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x    <= '0;
      z    <= '0;
      vq   <= '0;
      i    <= 0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x    <= WI'(v);
        vq   <= WI'(v);
        z    <= '0;
        i    <= -K;
        busy <= 1'b1;
      end else if (busy) begin
        if (!x[WI-1]) begin
          x <= x - step_x;
          z <= z + step_v;
        end else begin
          x <= x + step_x;
          z <= z - step_v;
        end
        if (i == N - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1;
        end
      end
    end
  end

  // The square is never negative; clip at the largest Q16.14 value.
  always_comb begin
    if (z > WI'(2**(W-1) - 1)) sq = {1'b0, {(W-1){1'b1}}};
    else if (z < 0)            sq = '0;
    else                       sq = fix_t'(z);
  end

  initial begin
    assert (N <= F) else $error("cordic_square: N must not exceed F");
    assert (K >= 0) else $error("cordic_square: K must be non-negative");
  end
endmodule
