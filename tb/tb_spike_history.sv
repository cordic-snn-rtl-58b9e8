// tb_spike_history: checks the spike-timing shift register against a queue
// model. Random spike pulses arrive between random shift enables, sometimes
// in the shift cycle itself; after each shift every bit j must say whether
// the neuron fired in the period that ended j shifts ago.
`timescale 1ns/1ps
module tb_spike_history;
  localparam int DEPTH = 41;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic spike = 0, shift_en = 0;
  logic [DEPTH-1:0] hist;

  spike_history #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .spike, .shift_en, .hist);

  bit period_fired;
  bit model [$];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (hist != '0) begin failures++; $display("FAIL reset"); end
    for (int p = 0; p < 300; p++) begin
      int len;
      len = $urandom_range(1, 6);
      period_fired = 0;
      for (int c = 0; c < len; c++) begin
        spike    = ($urandom_range(0, 9) == 0);
        shift_en = (c == len - 1);
        if (spike) period_fired = 1;
        @(negedge clk);
      end
      spike = 0; shift_en = 0;
      model.push_front(period_fired);
      if (model.size() > DEPTH) void'(model.pop_back());
      for (int j = 0; j < DEPTH; j++) begin
        bit want;
        want = (j < model.size()) ? model[j] : 1'b0;
        checks++;
        if (hist[j] !== want) begin
          failures++;
          $display("FAIL period %0d bit %0d: got %b want %b", p, j, hist[j], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
