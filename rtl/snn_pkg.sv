// snn_pkg: shared number format and helpers for the CORDIC spiking network.
//
// All neuron state (membrane potential v, recovery u, input current I) and the
// synaptic weights are signed two's-complement fixed-point words with 16
// integer bits and 14 fraction bits (Q16.14, 30 bits), the word length chosen
// for the neuron datapath. Multiplication by a constant is never done with a
// multiplier: cmul() adds one arithmetically shifted copy of the operand per
// set bit of the constant (the constant is first rounded to 20 fraction
// bits), which synthesises to a small adder tree. fix() converts a real
// number to the fixed-point format at elaboration time.
package snn_pkg;

  localparam int W = 30;  // total word length
  localparam int F = 14;  // fraction bits
  localparam int CF = 20; // fraction bits of a constant coefficient

  typedef logic signed [W-1:0] fix_t;

  // Real -> Q16.14, rounded to nearest (elaboration-time use only).
  function automatic fix_t fix(input real r);
    real s;
    s = r * real'(1 << F);
    return fix_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  // Constant coefficient as a non-negative integer with CF fraction bits
  // (0 <= r < 2^(32-CF)).
  function automatic int unsigned coeff(input real r);
    return int'($rtoi(r * real'(1 << CF) + 0.5));
  endfunction

  // x * (c / 2^CF) using only shifts and adds: one term per set bit of c.
  // The sum is kept CF bits wider than x and truncated once at the end.
  function automatic fix_t cmul(input fix_t x, input int unsigned c);
    logic signed [W+32-1:0] acc;
    logic signed [W+32-1:0] xe;
    acc = '0;
    xe  = {{32{x[W-1]}}, x};
    for (int k = 0; k < 32; k++)
      if (c[k]) acc = acc + (xe <<< k);
    return fix_t'(acc >>> CF);
  endfunction

endpackage
