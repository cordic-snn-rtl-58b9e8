// tb_lfsr_spike_gen: checks the random input generator's rate and timing.
//
// 60000 sampling ticks (one minute of model time at 1 ms periods) are
// applied with random gaps. The event count must match the 7 Hz mean rate
// within four standard deviations, `stim` must equal the last tick's event
// and hold between ticks, nothing may change without a tick, and two
// instances with different seeds must produce different event trains.
`timescale 1ns/1ps
module tb_lfsr_spike_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic tick = 0;
  logic ev_a, st_a, ev_b, st_b;

  lfsr_spike_gen #(.SEED(32'h1234_5678)) dut_a (.clk, .rst_n, .tick,
                                                .event_o(ev_a), .stim(st_a));
  lfsr_spike_gen #(.SEED(32'h0BAD_F00D)) dut_b (.clk, .rst_n, .tick,
                                                .event_o(ev_b), .stim(st_b));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int TICKS = 60000;

  initial begin
    int n_a = 0, n_b = 0, n_both = 0, bad_hold = 0, bad_quiet = 0;
    real mean, sd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < TICKS; t++) begin
      logic st_now;
      tick = 1;
      @(negedge clk);
      tick = 0;
      if (ev_a) n_a++;
      if (ev_b) n_b++;
      if (ev_a && ev_b) n_both++;
      if (st_a != ev_a) bad_hold++;
      st_now = st_a;
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        if (st_a != st_now) bad_hold++;
        if (ev_a || ev_b) bad_quiet++;
      end
    end
    mean = 7.0e-3 * real'(TICKS);
    sd   = $sqrt(mean);
    $display("events: A %0d, B %0d, coincident %0d (expected %f +- %f)",
             n_a, n_b, n_both, mean, sd);
    check(real'(n_a) > mean - 4.0 * sd && real'(n_a) < mean + 4.0 * sd, "rate of A");
    check(real'(n_b) > mean - 4.0 * sd && real'(n_b) < mean + 4.0 * sd, "rate of B");
    check(n_both < n_a / 4, "different seeds give different trains");
    check(bad_hold == 0, "stim holds the tick's event");
    check(bad_quiet == 0, "no event without a tick");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
