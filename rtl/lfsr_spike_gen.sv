// lfsr_spike_gen: semi-random input stimulus from a linear-feedback shift
// register.
//
// A 32-bit Galois LFSR (polynomial x^32 + x^22 + x^2 + x + 1) is advanced
// by 16 steps at every sampling tick, so that consecutive draws use fresh
// bits. The top 16 bits of the new state are compared with a threshold
// RATE_HZ * SAMPLE_US * 1e-6 * 2^16; a draw below it is an input event,
// which happens with the target mean rate (7 Hz at 1 ms periods). An event
// raises `stim` for the following sampling period, during which the input
// neuron receives a stimulus current strong enough to make it fire once.
// The use of an LFSR to create random input spikes at a 7 Hz mean rate is
// the published scheme; the polynomial, the 16-step advance and the
// threshold comparison are this design's choices. Each instance needs its
// own non-zero SEED.
//
// Interface: `tick` is the one-cycle sampling enable; `event_o` pulses in
// the cycle after a tick that drew an event, and `stim` is a level that
// holds from then until the next tick.
module lfsr_spike_gen #(
  parameter logic [31:0] SEED      = 32'hACE1_1234,
  parameter real         RATE_HZ   = 7.0,
  parameter int          SAMPLE_US = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick,
  output logic event_o,
  output logic stim
);
  localparam logic [31:0] POLY   = 32'h8020_0003;
  localparam int          THRESH =
    $rtoi(RATE_HZ * real'(SAMPLE_US) * 1.0e-6 * 65536.0 + 0.5);

  logic [31:0] state, next_state;

  // 16 Galois steps, unrolled into an XOR network.
  always_comb begin
    next_state = state;
    for (int s = 0; s < 16; s++)
      next_state = next_state[0] ? ((next_state >> 1) ^ POLY) : (next_state >> 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= SEED;
      event_o <= 1'b0;
      stim    <= 1'b0;
    end else begin
      event_o <= 1'b0;
      if (tick) begin
        state   <= next_state;
        event_o <= (32'(next_state[31:16]) < 32'(THRESH));
        stim    <= (32'(next_state[31:16]) < 32'(THRESH));
      end
    end
  end

  initial assert (SEED != 0) else $error("lfsr_spike_gen: SEED must be non-zero");
endmodule
