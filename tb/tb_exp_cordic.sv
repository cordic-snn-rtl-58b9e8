// tb_exp_cordic: checks the shift-and-add exponential against $exp.
//
// Sweeps the argument over 0 .. 1 (every 7th code plus the end points and
// the values |dt|/tau used by the STDP rule) and a few values above 1. The
// result must match e^-x within 2^-N_EXP relative error plus rounding, and
// `done` must come exactly N_EXP clocks after `start`.
`timescale 1ns/1ps
module tb_exp_cordic;
  import snn_pkg::*;

  localparam int N_EXP = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  logic       start = 0;
  logic [F:0] x, y;
  logic       busy, done;

  exp_cordic #(.N_EXP(N_EXP)) dut (.clk, .rst_n, .start, .x, .y, .busy, .done);

  task automatic run_one(input int code);
    int  e;
    real xr, want, got, err;
    x = (F+1)'(code);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    e = 0;
    while (!done && e < 100) begin
      @(negedge clk);
      e++;
    end
    // e counts clock edges after the one that took start
    checks++;
    if (e != N_EXP) begin
      failures++;
      $display("FAIL latency %0d, want %0d", e, N_EXP);
    end
    xr   = real'(code) / real'(1 << F);
    want = $exp(-xr);
    got  = real'(y) / real'(1 << F);
    err  = (got - want) / want;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > (2.0 ** (-N_EXP)) + 0.001) begin
      failures++;
      $display("FAIL x=%f: got %f want %f", xr, got, want);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c <= (1 << F); c += 7) run_one(c);
    run_one(1 << F);
    for (int d = 1; d <= 20; d++) run_one(int'(real'(d) / 20.0 * real'(1 << F)));
    run_one((1 << F) + 5000);
    run_one((2 << F) - 1);
    $display("max relative error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
