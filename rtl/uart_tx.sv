// uart_tx: asynchronous serial transmitter, 8 data bits, no parity, 1 stop.
//
// A counter divides the system clock down to the bit rate: every
// CLK_HZ/BAUD clocks the shift register moves to the next bit. A frame is
// one start bit (0), the eight data bits least significant first and one
// stop bit (1); the line idles high. The frame format and the 9600 bit/s
// rate follow the published design; the 50 MHz default clock and the
// valid/ready handshake are this design's choices.
//
// Interface: the byte on `data` is taken in the clock where `valid` and
// `ready` are both high; `ready` is low until the stop bit has been sent,
// so a frame occupies 10*CLK_HZ/BAUD clocks.
module uart_tx #(
  parameter int CLK_HZ = 50_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);
  localparam int DIV = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int DW  = $clog2(DIV + 1);

  logic [9:0]    frame;     // bits still to send, LSB first
  logic [3:0]    nbits;     // bits remaining in the frame
  logic [DW-1:0] div_cnt;

  assign ready = (nbits == 0);
  assign tx    = ready ? 1'b1 : frame[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame   <= '1;
      nbits   <= '0;
      div_cnt <= '0;
    end else if (ready) begin
      if (valid) begin
        frame   <= {1'b1, data, 1'b0};
        nbits   <= 4'd10;
        div_cnt <= DW'(DIV - 1);
      end
    end else if (div_cnt == 0) begin
      frame   <= {1'b1, frame[9:1]};
      nbits   <= nbits - 1'b1;
      div_cnt <= DW'(DIV - 1);
    end else begin
      div_cnt <= div_cnt - 1'b1;
    end
  end

  initial assert (DIV >= 2) else $error("uart_tx: CLK_HZ/BAUD too small");
endmodule
