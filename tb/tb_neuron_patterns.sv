// tb_neuron_patterns: accuracy of the CORDIC neuron variants on the two
// firing patterns used for the error tables: tonic spiking
// (a, b, c, d = 0.02, 0.2, -65, 6; I = 14) and regular (intrinsic) bursting
// (0.02, 0.2, -55, 4; I = 10). For each pattern the IzhCOR6, IzhCOR8,
// IzhCOR10 and IzhCOR12 neurons run for 400 ms next to a real-valued Euler
// model with the same time step. Reported per variant: ERRT, the relative
// error of the interval between the 2nd and 3rd spike, and NRMSD, the RMS
// difference of v over the first 40 ms divided by the reference's v range.
// Checked: the number of spikes within one of the reference, ERRT below
// 3 % and NRMSD below 3 %.
`timescale 1ns/1ps
module tb_neuron_patterns;
  import snn_pkg::*;

  localparam int DT_SHIFT = 3;
  localparam real DT = 1.0 / real'(1 << DT_SHIFT);
  localparam int STEPS = 400 * (1 << DT_SHIFT);
  localparam int NRMS_STEPS = 40 * (1 << DT_SHIFT);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic start = 0;
  int   step_no = 0;
  bit   finished = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam int NV = 4;
  localparam int NS [NV] = '{6, 8, 10, 12};

  for (genvar p = 0; p < 2; p++) begin : g_pat
    localparam real PA = 0.02, PB = 0.2;
    localparam real PC = (p == 0) ? -65.0 : -55.0;
    localparam real PD = (p == 0) ? 6.0 : 4.0;
    localparam real PI = (p == 0) ? 14.0 : 10.0;
    for (genvar k = 0; k < NV; k++) begin : g_var
      fix_t v, u;
      logic spike, busy, done;
      izh_neuron #(.N(NS[k]), .DT_SHIFT(DT_SHIFT), .A(PA), .B(PB), .C(PC), .D(PD)) dut (
        .clk, .rst_n, .start, .i_in(fix(PI)), .v, .u, .spike, .busy, .done);

      real rv = PC, ru = PB * PC, sq_err = 0.0, vmin = 1.0e9, vmax = -1.0e9;
      int  ref_t[$], dut_t[$];
      int  s = 0;
      always @(posedge clk) if (rst_n && done) begin
        real rv_n, ru_n, d;
        rv_n = rv + DT * (0.04 * rv * rv + 5.0 * rv + 140.0 - ru + PI);
        ru_n = ru + DT * (PA * (PB * rv - ru));
        if (rv_n > 30.0) begin
          rv_n = PC; ru_n = ru_n + PD; ref_t.push_back(s);
        end
        rv = rv_n; ru = ru_n;
        if (spike) dut_t.push_back(s);
        if (s < NRMS_STEPS) begin
          d = real'(v) / real'(1 << F) - rv;
          sq_err += d * d;
          if (rv < vmin) vmin = rv;
          if (rv > vmax) vmax = rv;
        end
        s++;
      end

      initial begin
        wait (finished);
        begin
          real errt, nrmsd;
          nrmsd = 100.0 * $sqrt(sq_err / real'(NRMS_STEPS)) / (vmax - vmin);
          errt  = 100.0;
          if (ref_t.size() >= 3 && dut_t.size() >= 3)
            errt = 100.0 * (real'(dut_t[2] - dut_t[1]) - real'(ref_t[2] - ref_t[1]))
                   / real'(ref_t[2] - ref_t[1]);
          if (errt < 0) errt = -errt;
          $display("%s IzhCOR%0d: spikes %0d (reference %0d), ERRT %0.3f %%, NRMSD %0.3f %%",
                   p == 0 ? "tonic spiking   " : "regular bursting", NS[k],
                   dut_t.size(), ref_t.size(), errt, nrmsd);
          check(dut_t.size() + 1 >= ref_t.size() && dut_t.size() <= ref_t.size() + 1,
                $sformatf("pattern %0d IzhCOR%0d spike count", p, NS[k]));
          check(errt < 3.0, $sformatf("pattern %0d IzhCOR%0d ERRT", p, NS[k]));
          check(nrmsd < 3.0, $sformatf("pattern %0d IzhCOR%0d NRMSD", p, NS[k]));
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (step_no = 0; step_no < STEPS; step_no++) begin
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (22) @(negedge clk);   // longest step: K + 12 + 1 = 19 clocks
    end
    finished = 1;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (STEPS * 30 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
