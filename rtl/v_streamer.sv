// v_streamer: sends a neuron's membrane potential over the UART as bytes.
//
// When idle, a `capture` pulse latches the 30-bit Q16.14 word `v`,
// sign-extended to 32 bits. A byte counter then hands the four bytes to the
// UART transmitter one after the other, least significant byte first, using
// its valid/ready handshake; captures arriving meanwhile are ignored, so the
// host receives a down-sampled trace. Splitting the word into four bytes
// with a counter follows the published design; the byte order, the sign
// extension and dropping samples while busy are this design's choices.
//
// Interface: `capture` may be high at any time; `busy` is high from the
// clock after an accepted capture until the fourth byte has been accepted
// by the transmitter. `sent` pulses once per word, with the last byte.
module v_streamer
  import snn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture,
  input  fix_t       v,
  output logic [7:0] tx_data,
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic       busy,
  output logic       sent
);
  logic [31:0] word;
  logic [1:0]  byte_idx;

  assign tx_valid = busy;
  assign tx_data  = word[8*byte_idx +: 8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word     <= '0;
      byte_idx <= '0;
      busy     <= 1'b0;
      sent     <= 1'b0;
    end else begin
      sent <= 1'b0;
      if (!busy) begin
        if (capture) begin
          word     <= 32'(v);
          byte_idx <= '0;
          busy     <= 1'b1;
        end
      end else if (tx_ready) begin
        byte_idx <= byte_idx + 1'b1;
        if (byte_idx == 2'd3) begin
          busy <= 1'b0;
          sent <= 1'b1;
        end
      end
    end
  end
endmodule
