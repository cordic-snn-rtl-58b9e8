// tb_snn_full_size: the learning network at its default parameters (20
// inputs, 41-period histories, IzhCOR8 neurons, tau = 20 ms, A+ = 2, A- = 4,
// weights 96 in [0, 192], 7 Hz inputs, 50 MHz clock, 9600 bit/s UART) runs
// for 120 s of model time, the competitive Hebbian learning experiment.
// As in tb_cordic_snn_top, every weight update is compared with the
// exponential STDP rule computed from the observed spikes, and the UART
// words are decoded and compared with the captured membrane potential.
// At the end the weight distribution must have split: at least 40 % of the
// weights within 10 % of a bound and at most half of them in the middle
// third of the range.
`timescale 1ns/1ps
module tb_snn_full_size;
  import snn_pkg::*;

  localparam int N_IN = 20, DEPTH = 41, CENTER = 20;
  localparam int SAMPLES = 120000;                 // 120 s of model time
  localparam int CLK_HZ = 50_000_000, BAUD = 9600, DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam real W_LO = 0.0, W_HI = 192.0;

  logic clk = 0, rst_n = 0, run = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic            uart_txd;
  logic [N_IN-1:0] pre_spike, stim, stdp_pot, stdp_dep;
  logic            post_spike, sample_tick;
  fix_t            weights [N_IN];
  fix_t            v_out;
  logic [31:0]     sample_cnt;

  cordic_snn_top dut (
    .clk, .rst_n, .run, .uart_txd, .pre_spike, .post_spike, .weights, .v_out,
    .sample_tick, .sample_cnt, .stim, .stdp_pot, .stdp_dep);

  function automatic real r(input fix_t x);
    return real'(x) / real'(1 << F);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_event = 0, n_pre = 0, n_post = 0, n_pot = 0, n_dep = 0;
  int n_at_max = 0, n_at_min = 0, n_words = 0;

  logic [N_IN-1:0] stim_d = '0;
  always @(posedge clk) if (rst_n) begin
    stim_d <= stim;
    n_event += $countones(stim & ~stim_d);
    n_pre   += $countones(pre_spike);
    n_post  += int'(post_spike);
    n_pot   += $countones(stdp_pot);
    n_dep   += $countones(stdp_dep);
  end

  // ------------------------------------------------ STDP reference
  logic [DEPTH-1:0] m_pre [N_IN];
  logic [DEPTH-1:0] m_post;
  logic [N_IN-1:0]  per_pre;
  logic             per_post;
  real              want [N_IN];
  bit               have_want = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      per_pre = '0; per_post = 0; m_post = '0;
      for (int i = 0; i < N_IN; i++) m_pre[i] = '0;
    end else begin
      per_pre  = per_pre | pre_spike;
      per_post = per_post | post_spike;
      if (sample_tick) begin
        // weights must now equal the prediction made at the previous tick
        if (have_want)
          for (int i = 0; i < N_IN; i++)
            check(r(weights[i]) - want[i] < 0.02 && want[i] - r(weights[i]) < 0.02,
                  $sformatf("period %0d synapse %0d: w %f want %f",
                            sample_cnt, i, r(weights[i]), want[i]));
        for (int i = 0; i < N_IN; i++) begin
          if (r(weights[i]) == W_HI) n_at_max++;
          if (r(weights[i]) == W_LO) n_at_min++;
        end
        m_post = {m_post[DEPTH-2:0], per_post};
        for (int i = 0; i < N_IN; i++) begin
          int jp, jd;
          real w;
          m_pre[i] = {m_pre[i][DEPTH-2:0], per_pre[i]};
          w = r(weights[i]);
          if (m_pre[i][CENTER]) begin
            jp = -1; jd = -1;
            for (int j = 0; j < CENTER; j++) if (m_post[j]) jp = j;
            for (int j = DEPTH - 1; j >= CENTER; j--) if (m_post[j]) jd = j;
            if (jp >= 0) begin
              w = w + 2.0 * $exp(-real'(CENTER - jp) / 20.0);
              if (w > W_HI) w = W_HI;
            end
            if (jd >= 0) begin
              w = w - 4.0 * $exp(-real'(jd - CENTER) / 20.0);
              if (w < W_LO) w = W_LO;
            end
          end
          want[i] = w;
        end
        have_want = 1;
        per_pre = '0; per_post = 0;
      end
    end
  end

  // ------------------------------------------------ UART receiver model
  logic [31:0] cap_q [$];
  always @(posedge clk)
    if (rst_n && dut.u_stream.capture && !dut.u_stream.busy)
      cap_q.push_back(32'(v_out));

  initial begin
    logic [31:0] word;
    int nb = 0;
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      check(uart_txd == 1'b0, "UART start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (DIV) @(posedge clk);
      check(uart_txd == 1'b1, "UART stop bit");
      word[8*nb +: 8] = b;
      nb++;
      if (nb == 4) begin
        nb = 0;
        n_words++;
        check(cap_q.size() > 0 && word == cap_q[0],
              $sformatf("UART word %h, captured %h", word, cap_q.size() > 0 ? cap_q[0] : 0));
        if (cap_q.size() > 0) void'(cap_q.pop_front());
      end
    end
  end

  // ------------------------------------------------ main sequence
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N_IN; i++) check(r(weights[i]) == 96.0, "initial weight 96");
    run = 1;
    while (sample_cnt < 32'(SAMPLES)) @(negedge clk);
    run = 0;
    repeat (20 * 10 * DIV) @(negedge clk);
    $display("periods %0d: input events %0d, input spikes %0d, output spikes %0d",
             sample_cnt, n_event, n_pre, n_post);
    $display("potentiations %0d, depressions %0d, weight-periods at max %0d, at min %0d, UART words %0d",
             n_pot, n_dep, n_at_max, n_at_min, n_words);
    begin
      string s = "final weights:";
      for (int i = 0; i < N_IN; i++) s = {s, $sformatf(" %0.1f", r(weights[i]))};
      $display("%s", s);
    end
    check(n_event > 0, "input events happened");
    check(10 * n_pre >= 9 * n_event, "input events fire their neurons");
    check(n_post > 0, "output neuron fired");
    check(n_pot > 0, "potentiation happened");
    check(n_dep > 0, "depression happened");
    check(n_at_max + n_at_min > 0, "a weight reached a bound");
    check(n_words > 0, "UART words received");
    begin
      int n_edge = 0, n_mid = 0;
      for (int i = 0; i < N_IN; i++) begin
        if (r(weights[i]) <= 0.1 * W_HI || r(weights[i]) >= 0.9 * W_HI) n_edge++;
        if (r(weights[i]) > W_HI / 3.0 && r(weights[i]) < 2.0 * W_HI / 3.0) n_mid++;
      end
      $display("weights near a bound %0d, in the middle third %0d", n_edge, n_mid);
      check(5 * n_edge >= 2 * N_IN, "weights pushed to the bounds");
      check(2 * n_mid <= N_IN, "middle of the range emptied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SAMPLES * 200 + 3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
