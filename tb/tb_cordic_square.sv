// tb_cordic_square: checks the CORDIC squarer against real arithmetic.
//
// Two instances are tested, N = 6 (the default) and N = 12. For random and
// corner operands in -110..60 the result must equal v*v within the bound of
// the algorithm, |v| * 2^-(N-1) plus truncation slack, and `done` must come
// exactly K+N clocks after `start`.
`timescale 1ns/1ps
module tb_cordic_square;
  import snn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start6 = 0, start12 = 0;
  fix_t v;
  fix_t sq6, sq12;
  logic busy6, busy12, done6, done12;

  cordic_square #(.K(6), .N(6))  dut6  (.clk, .rst_n, .start(start6),  .v,
                                        .sq(sq6),  .busy(busy6),  .done(done6));
  cordic_square #(.K(6), .N(12)) dut12 (.clk, .rst_n, .start(start12), .v,
                                        .sq(sq12), .busy(busy12), .done(done12));

  task automatic run_one(input real vr, input int n);
    int   cycles;
    real  got, want, tol;
    v = fix(vr);
    @(negedge clk);
    if (n == 6) start6 = 1; else start12 = 1;
    @(negedge clk);
    start6 = 0; start12 = 0;
    cycles = 0;   // clock edges since the one that took start
    while (!(n == 6 ? done6 : done12)) begin
      @(negedge clk);
      cycles++;
      if (cycles > 100) break;
    end
    checks++;
    if (cycles != 6 + n) begin
      failures++;
      $display("FAIL latency n=%0d: %0d cycles, want %0d", n, cycles, 6 + n);
    end
    got  = real'(n == 6 ? sq6 : sq12) / real'(1 << F);
    want = (real'(v) / real'(1 << F)) ** 2;
    tol  = ((vr < 0 ? -vr : vr) + 1.0) * (2.0 ** (-(n - 1))) + 0.01;
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++;
      $display("FAIL n=%0d v=%f: got %f want %f (tol %f)", n, vr, got, want, tol);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(-110.0, 6);  run_one(-110.0, 12);
    run_one(-65.0, 6);   run_one(-65.0, 12);
    run_one(0.0, 6);     run_one(0.0, 12);
    run_one(30.0, 6);    run_one(30.0, 12);
    run_one(59.9, 6);    run_one(59.9, 12);
    for (int t = 0; t < 300; t++) begin
      real r;
      r = -110.0 + 170.0 * real'($urandom_range(0, 100000)) / 100000.0;
      run_one(r, 6);
      run_one(r, 12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
