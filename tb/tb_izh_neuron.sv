// tb_izh_neuron: checks the CORDIC Izhikevich neuron against a real-valued
// Euler model of the same equations and time step.
//
// Two neurons (IzhCOR6 and IzhCOR12, tonic-spiking parameters) receive the
// same current: a constant current I = 14 for 300 ms, the classic tonic
// spiking test. The reference model uses exact products. Checked: the step
// latency (K+N+1 clocks), the first spike time and the inter-spike interval
// (the ERRT measure) within one or two time steps, the number of spikes, the reset
// value c after every spike, u + d on the reset step, and v following the reference within
// 1.5 mV up to the first spike (the shift-and-add constants are rounded to
// 14 fraction bits, so a small drift is expected).
`timescale 1ns/1ps
module tb_izh_neuron;
  import snn_pkg::*;

  localparam int  DT_SHIFT = 3;
  localparam real DT = 1.0 / real'(1 << DT_SHIFT);
  localparam int  STEPS = 300 * (1 << DT_SHIFT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic start = 0;
  fix_t i_in;
  fix_t v6, u6, v12, u12;
  logic sp6, sp12, b6, b12, d6, d12;

  izh_neuron #(.N(6),  .DT_SHIFT(DT_SHIFT)) n6  (.clk, .rst_n, .start, .i_in,
      .v(v6),  .u(u6),  .spike(sp6),  .busy(b6),  .done(d6));
  izh_neuron #(.N(12), .DT_SHIFT(DT_SHIFT)) n12 (.clk, .rst_n, .start, .i_in,
      .v(v12), .u(u12), .spike(sp12), .busy(b12), .done(d12));

  function automatic real r(input fix_t x);
    return real'(x) / real'(1 << F);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  real rv, ru, rv_n, ru_n;
  int  ref_sp[$], sp6_t[$], sp12_t[$];
  real max_dev_v;

  initial begin
    int lat6, lat12;
    bit got6, got12;
    rv = -65.0; ru = 0.2 * -65.0;
    max_dev_v = 0.0;
    i_in = fix(14.0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(r(v6) == -65.0 && r(v12) == -65.0, "reset state v");
    for (int s = 0; s < STEPS; s++) begin
      fix_t u6_old;
      u6_old = u6;
      start = 1;
      @(negedge clk);
      start = 0;
      lat6 = 0; lat12 = 0;
      got6 = 0; got12 = 0;
      for (int e = 1; e <= 100 && !got12; e++) begin
        @(negedge clk);
        if (d6 && !got6) begin
          lat6 = e; got6 = 1;
          if (sp6) begin
            sp6_t.push_back(s);
            check(r(v6) == -65.0, "N=6 reset of v to c");
            check(r(u6) - r(u6_old) > 5.0, "N=6 u raised by d");
          end
        end
        if (d12) begin
          lat12 = e; got12 = 1;
        end
      end
      if (s == 0) begin
        check(lat6 == 6 + 6 + 1, $sformatf("latency N=6: %0d", lat6));
        check(lat12 == 6 + 12 + 1, $sformatf("latency N=12: %0d", lat12));
      end
      if (sp12) begin
        sp12_t.push_back(s);
        check(r(v12) == -65.0, "N=12 reset of v to c");
      end
      // reference model
      rv_n = rv + DT * (0.04 * rv * rv + 5.0 * rv + 140.0 - ru + 14.0);
      ru_n = ru + DT * (0.02 * (0.2 * rv - ru));
      if (rv_n > 30.0) begin
        rv_n = -65.0;
        ru_n = ru_n + 6.0;
        ref_sp.push_back(s);
      end
      rv = rv_n; ru = ru_n;
      if (s < 16) begin
        real dv;
        dv = r(v12) - rv;
        if (dv < 0) dv = -dv;
        if (dv > max_dev_v) max_dev_v = dv;
      end
      @(negedge clk);
    end
    $display("reference spikes %0d, IzhCOR6 %0d, IzhCOR12 %0d",
             ref_sp.size(), sp6_t.size(), sp12_t.size());
    check(ref_sp.size() >= 3, "reference model spikes");
    check(sp6_t.size() >= ref_sp.size() - 1 && sp6_t.size() <= ref_sp.size() + 1,
          "IzhCOR6 spike count");
    check(sp12_t.size() >= ref_sp.size() - 1 && sp12_t.size() <= ref_sp.size() + 1,
          "IzhCOR12 spike count");
    check(max_dev_v < 1.5, $sformatf("IzhCOR12 v trace deviation %f", max_dev_v));
    if (ref_sp.size() >= 3 && sp6_t.size() >= 3 && sp12_t.size() >= 3) begin
      real dto, dt6, dt12, e6, e12;
      dto  = real'(ref_sp[2] - ref_sp[1]);
      dt6  = real'(sp6_t[2] - sp6_t[1]);
      dt12 = real'(sp12_t[2] - sp12_t[1]);
      e6   = 100.0 * (dt6 - dto) / dto;   if (e6 < 0) e6 = -e6;
      e12  = 100.0 * (dt12 - dto) / dto;  if (e12 < 0) e12 = -e12;
      $display("ERRT IzhCOR6 %f %%, IzhCOR12 %f %%; first spike ref %0d, 6: %0d, 12: %0d",
               e6, e12, ref_sp[0], sp6_t[0], sp12_t[0]);
      check(dt6 - dto <= 2.0 && dto - dt6 <= 2.0, "IzhCOR6 inter-spike interval");
      check(dt12 - dto <= 1.0 && dto - dt12 <= 1.0, "IzhCOR12 inter-spike interval");
      check(sp12_t[0] - ref_sp[0] <= 4 && ref_sp[0] - sp12_t[0] <= 4, "IzhCOR12 first spike time");
      check(sp6_t[0] - ref_sp[0] <= 16 && ref_sp[0] - sp6_t[0] <= 16, "IzhCOR6 first spike time");
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
