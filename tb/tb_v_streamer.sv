// tb_v_streamer: checks that membrane-potential words leave as four bytes.
//
// A model transmitter accepts bytes with random delays. Random Q16.14
// values (negative ones included) are offered with `capture`, also while
// the streamer is busy. Each accepted word must come out as its 32-bit
// sign extension, least significant byte first, with `sent` on the last
// byte; captures during a transfer must be ignored.
`timescale 1ns/1ps
module tb_v_streamer;
  import snn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic capture = 0;
  fix_t v;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready = 0, busy, sent;

  v_streamer dut (.clk, .rst_n, .capture, .v, .tx_data, .tx_valid, .tx_ready,
                  .busy, .sent);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!tx_valid, "idle after reset");
    for (int n = 0; n < 60; n++) begin
      logic [31:0] want;
      fix_t        vw;
      vw = fix_t'($urandom);
      v = vw;
      capture = 1;
      @(negedge clk);
      v = fix_t'($urandom);          // later captures must be ignored
      want = 32'(vw);
      for (int b = 0; b < 4; b++) begin
        repeat ($urandom_range(0, 5)) @(negedge clk);
        check(tx_valid, "byte offered");
        check(tx_data == want[8*b +: 8],
              $sformatf("word %0d byte %0d: %h want %h", n, b, tx_data, want[8*b +: 8]));
        tx_ready = 1;
        #1;
        @(negedge clk);
        tx_ready = 0;
        check(sent == (b == 3), "sent on the last byte");
        capture = (b < 3) ? 1'b1 : 1'b0;
      end
      check(!busy && !tx_valid, "idle after four bytes");
    end
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
