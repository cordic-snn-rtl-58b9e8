// exp_cordic: iterative shift-and-add exponential y = e^-x for 0 <= x < 2.
//
// The STDP rule needs e^(-|dt|/tau) with |dt|/tau in [0, 1]. The argument is
// split into its integer bit and its fraction. The result register starts at
// 1, or at e^-1 when the integer bit is set. Iteration i (i = 1 .. N_EXP, one
// per clock) compares the remaining fraction z with 2^-i; when z >= 2^-i it
// subtracts 2^-i from z and multiplies the result by the constant e^(-2^-i).
// Each of these constant products is a fixed sum of shifted copies of the
// result (snn_pkg::cmul), so the unit has no multiplier; the counter selects
// which product is loaded. After N_EXP iterations the error is below
// 2^-N_EXP in the exponent. The digit-by-digit scheme, the restriction of
// the argument range and N_EXP = 8 follow the published design; the
// integer-bit handling, the 14-bit fraction of input and output (the neuron's
// fraction width) and the handshake are this design's choices.
//
// Interface: `x` is unsigned with F fraction bits and one integer bit; pulse
// `start` for one clock while idle. `done` pulses N_EXP clocks later, with
// `y` (unsigned, F fraction bits, value 1.0 = 2^F) valid until the next start.
module exp_cordic
  import snn_pkg::*;
#(
  parameter int N_EXP = 8   // number of fraction iterations
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [F:0]   x,
  output logic [F:0]   y,
  output logic         busy,
  output logic         done
);
  // Constants e^(-2^-i) with F fraction bits, computed at elaboration.
  function automatic int unsigned exp_neg_coeff(input int i);
    return coeff($exp(-1.0 / real'(1 << i)));
  endfunction

  localparam fix_t E_M1 = fix($exp(-1.0));

  logic [F-1:0] z;
  fix_t         acc;
  int           i;

  // One constant product per iteration index, selected by the counter.
  fix_t prod [1:N_EXP];
  for (genvar g = 1; g <= N_EXP; g++) begin : g_const
    localparam int unsigned CG = exp_neg_coeff(g);
    assign prod[g] = cmul(acc, CG);
  end

  fix_t         prod_sel;
  logic [F-1:0] pow2;
  always_comb begin
    prod_sel = acc;
    for (int k = 1; k <= N_EXP; k++)
      if (i == k) prod_sel = prod[k];
    pow2 = (i >= 1 && i <= F) ? (F)'(1) << (F - i) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z    <= '0;
      acc  <= '0;
      i    <= 0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        z    <= x[F-1:0];
        acc  <= x[F] ? E_M1 : fix(1.0);
        i    <= 1;
        busy <= 1'b1;
      end else if (busy) begin
        if (pow2 != 0 && z >= pow2) begin
          z   <= z - pow2;
          acc <= prod_sel;
        end
        if (i == N_EXP) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1;
        end
      end
    end
  end

  assign y = acc[F:0];

  initial assert (N_EXP >= 1 && N_EXP <= F)
    else $error("exp_cordic: N_EXP must be in 1..F");
endmodule
