// snn_sequencer: time base of the network.
//
// All neurons advance in lock step. While `run` is high the sequencer
// pulses `step_start` once, waits for `step_done` from the neurons (they all
// have the same latency) and pulses `step_start` again in the next clock.
// A step counter divides the neuron steps into sampling periods of
// STEPS_PER_SAMPLE steps (1 ms of model time with dt = 1/8 ms): in the clock
// where the last step of a period completes, `sample_tick` is high for one
// cycle. That tick is the enable of the spike-history shift registers, the
// input generators and the STDP units. The published design uses a counter
// as the sampling enable of the shift registers; the back-to-back step
// scheduling and the handshake are this design's choices.
//
// Interface: `sample_tick` is combinational from `step_done`. `sample_cnt`
// counts sampling periods since reset (model time in periods).
module snn_sequencer #(
  parameter int STEPS_PER_SAMPLE = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        step_done,
  output logic        step_start,
  output logic        sample_tick,
  output logic [31:0] sample_cnt
);
  localparam int CW = (STEPS_PER_SAMPLE > 1) ? $clog2(STEPS_PER_SAMPLE) : 1;

  logic          in_step;     // a step has been started and is not done
  logic [CW-1:0] step_cnt;

  assign sample_tick = step_done && (32'(step_cnt) == STEPS_PER_SAMPLE - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_step    <= 1'b0;
      step_start <= 1'b0;
      step_cnt   <= '0;
      sample_cnt <= '0;
    end else begin
      step_start <= 1'b0;
      if (step_done) begin
        // the next step starts in the following clock
        in_step    <= run;
        step_start <= run;
        if (sample_tick) begin
          step_cnt   <= '0;
          sample_cnt <= sample_cnt + 1;
        end else begin
          step_cnt <= step_cnt + 1'b1;
        end
      end else if (!in_step && !step_start && run) begin
        step_start <= 1'b1;
        in_step    <= 1'b1;
      end
    end
  end

  a_done_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    step_done |-> in_step);
endmodule
