// tb_uart_tx: checks the serial transmitter by decoding its line.
//
// The clock is set to ten times the bit rate so that a bit lasts ten clocks.
// Random bytes are offered back to back with random idle gaps. A receiver
// model samples the line in the middle of each bit and checks the start bit,
// the eight data bits (LSB first) and the stop bit; the transmitter must
// accept a byte only when ready, stay busy for exactly 10 bit times and
// idle high.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CLK_HZ = 96000, BAUD = 9600, DIV = CLK_HZ / BAUD;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] data;
  logic valid = 0, ready, tx;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [7:0] sent_q [$];

  // Receiver model.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      if (!rst_n) continue;
      repeat (DIV / 2) @(posedge clk);
      check(tx == 1'b0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(posedge clk);
        b[k] = tx;
      end
      repeat (DIV) @(posedge clk);
      check(tx == 1'b1, "stop bit");
      check(sent_q.size() > 0, "frame without a byte");
      if (sent_q.size() > 0) begin
        logic [7:0] want;
        want = sent_q.pop_front();
        check(b == want, $sformatf("byte %h, want %h", b, want));
      end
    end
  end

  initial begin
    int nbytes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tx == 1'b1 && ready, "idle line high and ready");
    for (int n = 0; n < 40; n++) begin
      int busy_cycles;
      data  = 8'($urandom);
      valid = 1;
      while (!ready) @(negedge clk);
      sent_q.push_back(data);
      @(negedge clk);
      valid = 0;
      busy_cycles = 0;   // edges after the one that took the byte
      while (!ready) begin
        @(negedge clk);
        busy_cycles++;
      end
      check(busy_cycles == 10 * DIV, $sformatf("frame length %0d", busy_cycles));
      nbytes++;
      if ($urandom_range(0, 1)) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    repeat (2 * DIV) @(negedge clk);
    check(sent_q.size() == 0, "all bytes received");
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
