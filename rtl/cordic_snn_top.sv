// cordic_snn_top: two-layer spiking network with online CORDIC STDP.
//
// N_IN input neurons and one output neuron, all CORDIC Izhikevich neurons
// (izh_neuron, IzhCOR8 by default), advance in lock step under
// snn_sequencer: one Euler step of dt = 2^-DT_SHIFT ms per round, and a
// sampling tick every 2^DT_SHIFT steps (1 ms). Each input neuron is driven
// by its own LFSR generator (lfsr_spike_gen): an event makes it receive
// I_STIM for one sampling period, which fires it, giving random input spike
// trains of about RATE_HZ. The output neuron's current is the sum of the
// weights of the input neurons that fired in the previous step,
// I_o = sum_i w(i) f(i). Every neuron's spikes are recorded in a DEPTH-bit
// spike_history; each synapse has an stdp_synapse unit that, one clock after
// a sampling tick, updates its weight from the pre- and post-synaptic
// histories with the exponential STDP rule on its own exp_cordic core. The
// output neuron's membrane potential is streamed to a host over a 9600 bit/s
// UART as four bytes per sample (v_streamer, uart_tx).
// Topology (20 inputs, 1 output), the 41-bit histories, the STDP constants
// and the initial weight follow the published design; dt, I_STIM, the
// neuron parameters (tonic spiking) and the scheduling are this design's
// choices. All neurons share one parameter set.
//
// Interface: hold `run` high to let the network evolve. `weights`,
// `pre_spike`, `post_spike` and the STDP event pulses are observation ports;
// `uart_txd` is the serial line (idle high). The input neurons' v and u and
// a few status outputs of the submodules stay on named internal wires for
// probing; they are not used by the logic.
module cordic_snn_top
  import snn_pkg::*;
#(
  parameter int  N_IN      = 20,
  parameter int  DEPTH     = 41,
  parameter int  CENTER    = 20,
  parameter int  K         = 6,
  parameter int  N_COR     = 8,
  parameter int  DT_SHIFT  = 3,
  parameter int  N_EXP     = 8,
  parameter real TAU       = 20.0,
  parameter real A_PLUS    = 2.0,
  parameter real A_MINUS   = 4.0,
  parameter real W_INIT    = 96.0,
  parameter real W_MIN     = 0.0,
  parameter real W_MAX     = 192.0,
  parameter real RATE_HZ   = 7.0,
  parameter int  SAMPLE_US = 1000,
  parameter real I_STIM    = 40.0,
  parameter int  CLK_HZ    = 50_000_000,
  parameter int  BAUD      = 9600
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output logic            uart_txd,
  output logic [N_IN-1:0] pre_spike,     // input-layer spikes (step pulses)
  output logic            post_spike,    // output-neuron spike (step pulse)
  output fix_t            weights [N_IN],
  output fix_t            v_out,         // output-neuron membrane potential
  output logic            sample_tick,
  output logic [31:0]     sample_cnt,
  output logic [N_IN-1:0] stim,          // LFSR stimulus levels
  output logic [N_IN-1:0] stdp_pot,      // potentiation applied (pulses)
  output logic [N_IN-1:0] stdp_dep       // depression applied (pulses)
);
  localparam fix_t I_STIM_FIX = fix(I_STIM);

  function automatic logic [31:0] seed_of(input int i);
    return 32'hACE1_1234 ^ (32'(i + 1) * 32'h9E37_79B9);
  endfunction

  // ---------------------------------------------------------------- timing
  logic step_start, go;
  logic [N_IN-1:0] in_done;
  logic out_done;

  snn_sequencer #(.STEPS_PER_SAMPLE(1 << DT_SHIFT)) u_seq (
    .clk, .rst_n, .run,
    .step_done(out_done),
    .step_start,
    .sample_tick,
    .sample_cnt
  );

  always_ff @(posedge clk) begin
    if (!rst_n) go <= 1'b0;
    else        go <= sample_tick;
  end

  // ----------------------------------------------------------- input layer
  logic [N_IN-1:0] fired_q;
  logic [N_IN-1:0] stdp_busy;   // STDP update running, per synapse     // f(i): input i fired in the previous step
  logic [DEPTH-1:0] pre_hist [N_IN];
  logic [DEPTH-1:0] post_hist;

  for (genvar g = 0; g < N_IN; g++) begin : g_in
    fix_t v_i, u_i;            // state of input neuron g (observation only)
    logic busy_i, ev_i;

    lfsr_spike_gen #(.SEED(seed_of(g)), .RATE_HZ(RATE_HZ),
                     .SAMPLE_US(SAMPLE_US)) u_gen (
      .clk, .rst_n,
      .tick(sample_tick),
      .event_o(ev_i),
      .stim(stim[g])
    );

    izh_neuron #(.K(K), .N(N_COR), .DT_SHIFT(DT_SHIFT)) u_neuron (
      .clk, .rst_n,
      .start(step_start),
      .i_in(stim[g] ? I_STIM_FIX : '0),
      .v(v_i), .u(u_i),
      .spike(pre_spike[g]),
      .busy(busy_i),
      .done(in_done[g])
    );

    spike_history #(.DEPTH(DEPTH)) u_hist (
      .clk, .rst_n,
      .spike(pre_spike[g]),
      .shift_en(sample_tick),
      .hist(pre_hist[g])
    );

    stdp_synapse #(.DEPTH(DEPTH), .CENTER(CENTER), .N_EXP(N_EXP), .TAU(TAU),
                   .A_PLUS(A_PLUS), .A_MINUS(A_MINUS), .W_INIT(W_INIT),
                   .W_MIN(W_MIN), .W_MAX(W_MAX)) u_syn (
      .clk, .rst_n, .go,
      .pre_hist(pre_hist[g]),
      .post_hist,
      .w(weights[g]),
      .busy(stdp_busy[g]),
      .pot_o(stdp_pot[g]),
      .dep_o(stdp_dep[g])
    );

    always_ff @(posedge clk) begin
      if (!rst_n)            fired_q[g] <= 1'b0;
      else if (in_done[g])   fired_q[g] <= pre_spike[g];
    end
  end

  // ------------------------------------------------- synaptic summation
  fix_t i_out;
  always_comb begin
    i_out = '0;
    for (int i = 0; i < N_IN; i++)
      if (fired_q[i]) i_out = i_out + weights[i];
  end

  // ----------------------------------------------------------- output neuron
  fix_t u_out;
  logic out_busy;

  izh_neuron #(.K(K), .N(N_COR), .DT_SHIFT(DT_SHIFT)) u_out_neuron (
    .clk, .rst_n,
    .start(step_start),
    .i_in(i_out),
    .v(v_out), .u(u_out),
    .spike(post_spike),
    .busy(out_busy),
    .done(out_done)
  );

  spike_history #(.DEPTH(DEPTH)) u_post_hist (
    .clk, .rst_n,
    .spike(post_spike),
    .shift_en(sample_tick),
    .hist(post_hist)
  );

  // --------------------------------------------------------- UART monitor
  logic [7:0] tx_data;
  logic tx_valid, tx_ready, str_busy, str_sent;

  v_streamer u_stream (
    .clk, .rst_n,
    .capture(out_done),
    .v(v_out),
    .tx_data, .tx_valid, .tx_ready,
    .busy(str_busy),
    .sent(str_sent)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n,
    .data(tx_data),
    .valid(tx_valid),
    .ready(tx_ready),
    .tx(uart_txd)
  );

  // All neurons share one latency, so they finish their steps together.
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
    in_done == {N_IN{out_done}});
  // Every synapse finishes its update before the next sampling period.
  a_stdp_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    sample_tick |-> stdp_busy == '0);
  a_out_step: assert property (@(posedge clk) disable iff (!rst_n)
    step_start |-> !out_busy);
endmodule
