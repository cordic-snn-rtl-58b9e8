// tb_stdp_synapse: checks one STDP synapse against the exponential rule.
//
// The pre- and post-synaptic histories are driven directly. For directed
// cases (post spike after, before, at the same time as the pre spike, both
// sides, spikes outside the window, no pre spike at the centre) and for 400
// random histories the new weight must equal
//   clip(clip(w + 2 e^(-dt+/20)) - 4 e^(-|dt-|/20))
// within 0.02, using the nearest post spike on each side. Runs of pure
// potentiation and depression drive the weight into the 192 and 0 bounds.
// Every update must finish within 2*(N_EXP+2) clocks and report itself on
// pot_o / dep_o.
`timescale 1ns/1ps
module tb_stdp_synapse;
  import snn_pkg::*;

  localparam int DEPTH = 41, CENTER = 20, N_EXP = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pot = 0, n_dep = 0, n_hi = 0, n_lo = 0;

  logic go = 0;
  logic [DEPTH-1:0] pre_hist = '0, post_hist = '0;
  fix_t w;
  logic busy, pot_o, dep_o;

  stdp_synapse #(.DEPTH(DEPTH), .CENTER(CENTER), .N_EXP(N_EXP)) dut (
    .clk, .rst_n, .go, .pre_hist, .post_hist, .w, .busy, .pot_o, .dep_o);

  function automatic real r(input fix_t x);
    return real'(x) / real'(1 << F);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Apply one tick with the given histories and compare with the rule.
  task automatic tick(input logic [DEPTH-1:0] pre, input logic [DEPTH-1:0] post);
    real w0, want, got;
    int  jp, jd, cyc;
    bit  saw_pot, saw_dep;
    pre_hist = pre; post_hist = post;
    w0 = r(w);
    want = w0;
    jp = -1; jd = -1;
    for (int j = 0; j < CENTER; j++) if (post[j]) jp = j;
    for (int j = DEPTH - 1; j >= CENTER; j--) if (post[j]) jd = j;
    if (pre[CENTER]) begin
      if (jp >= 0) begin
        want = want + 2.0 * $exp(-real'(CENTER - jp) / 20.0);
        if (want > 192.0) want = 192.0;
      end
      if (jd >= 0) begin
        want = want - 4.0 * $exp(-real'(jd - CENTER) / 20.0);
        if (want < 0.0) want = 0.0;
      end
    end
    @(negedge clk);
    go = 1;
    @(negedge clk);
    go = 0;
    saw_pot = 0; saw_dep = 0;
    cyc = 0;
    while ((busy || cyc == 0) && cyc < 100) begin
      if (pot_o) saw_pot = 1;
      if (dep_o) saw_dep = 1;
      @(negedge clk);
      cyc++;
    end
    if (pot_o) saw_pot = 1;
    if (dep_o) saw_dep = 1;
    got = r(w);
    check(cyc <= 2 * (N_EXP + 2), $sformatf("update took %0d cycles", cyc));
    check(got - want < 0.02 && want - got < 0.02,
          $sformatf("w %f -> %f, want %f (pre %b post %h)", w0, got, want, pre[CENTER], post));
    check(saw_pot == (pre[CENTER] && jp >= 0), "pot_o pulse");
    check(saw_dep == (pre[CENTER] && jd >= 0), "dep_o pulse");
    if (saw_pot) n_pot++;
    if (saw_dep) n_dep++;
    if (got == 192.0) n_hi++;
    if (got == 0.0) n_lo++;
  endtask

  localparam logic [DEPTH-1:0] PRE = 41'(1) << CENTER;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(r(w) == 96.0, "initial weight 96");
    tick(PRE, 41'(1) << 15);                        // dt = +5
    tick(PRE, 41'(1) << 25);                        // dt = -5
    tick(PRE, 41'(1) << 20);                        // dt = 0: depression
    tick(PRE, (41'(1) << 18) | (41'(1) << 3) | (41'(1) << 30) | (41'(1) << 40));
    tick(PRE, 41'(1) << 0);                         // dt = +20
    tick(PRE, 41'(1) << 40);                        // dt = -20
    tick(41'(1) << 19, 41'(1) << 15);               // no pre at centre
    tick(PRE, '0);                                  // no post spike
    for (int k = 0; k < 60; k++) tick(PRE, 41'(1) << 19);   // to W_MAX
    check(r(w) == 192.0, "weight saturates at 192");
    for (int k = 0; k < 60; k++) tick(PRE, 41'(1) << 21);   // to W_MIN
    check(r(w) == 0.0, "weight saturates at 0");
    for (int k = 0; k < 400; k++) begin
      logic [DEPTH-1:0] pre, post;
      pre  = {$urandom, $urandom} & {$urandom, $urandom};
      post = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      if ($urandom_range(0, 3) != 0) pre[CENTER] = 1'b1;
      tick(pre, post);
    end
    $display("potentiations %0d, depressions %0d, at max %0d, at min %0d",
             n_pot, n_dep, n_hi, n_lo);
    check(n_pot > 0 && n_dep > 0 && n_hi > 0 && n_lo > 0, "all mechanisms seen");
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
