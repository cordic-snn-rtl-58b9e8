// tb_snn_sequencer: checks the step and sampling-period scheduling.
//
// A model neuron answers every `step_start` with `step_done` a random 3..20
// clocks later. Checked: a new step starts exactly one clock after each
// done, never while a step is open; `sample_tick` comes with the done of
// every 8th step and only then; `sample_cnt` counts the ticks; dropping
// `run` stops new steps.
`timescale 1ns/1ps
module tb_snn_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic run = 0, step_done = 0;
  logic step_start, sample_tick;
  logic [31:0] sample_cnt;

  snn_sequencer #(.STEPS_PER_SAMPLE(8)) dut (.clk, .rst_n, .run, .step_done,
                                             .step_start, .sample_tick, .sample_cnt);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int steps = 0, ticks = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int s = 0; s < 200; s++) begin
      int w, lat;
      w = 0;
      while (!step_start && w < 10) begin @(negedge clk); w++; end
      check(step_start, "step started");
      check(s == 0 || w == 0, $sformatf("gap before step %0d: %0d", s, w));
      lat = $urandom_range(3, 20);
      repeat (lat) begin
        @(negedge clk);
        check(!step_start, "no start inside a step");
      end
      step_done = 1;
      #1;
      steps++;
      check(sample_tick == (steps % 8 == 0), $sformatf("tick at step %0d", steps));
      if (sample_tick) ticks++;
      @(negedge clk);
      step_done = 0;
      check(sample_cnt == 32'(ticks), "sample count");
    end
    run = 0;
    repeat (30) begin
      @(negedge clk);
      check(!step_start, "no step without run");
    end
    check(ticks == 25, "25 sampling periods in 200 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
