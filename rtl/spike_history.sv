// spike_history: shift register holding the recent spike train of one neuron.
//
// Time is divided into sampling periods. During a period any `spike` pulse
// sets a pending flag. On `shift_en` (one clock at the end of each period)
// the register shifts one place towards the MSB and its LSB takes 1 if the
// neuron fired during the period (including a spike in the shift cycle
// itself) or 0 if it was silent; the flag is then cleared. Bit j of `hist`
// therefore tells whether the neuron fired j periods ago. The 41-bit length
// and the shift-left/LSB-update behaviour follow the published design; the
// pending flag that collects spikes between shifts is this design's choice.
//
// Interface: `hist` is registered and changes only on the clock edge where
// `shift_en` is high. Reset clears the history.
module spike_history #(
  parameter int DEPTH = 41
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             spike,
  input  logic             shift_en,
  output logic [DEPTH-1:0] hist
);
  logic pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist    <= '0;
      pending <= 1'b0;
    end else if (shift_en) begin
      hist    <= {hist[DEPTH-2:0], pending | spike};
      pending <= 1'b0;
    end else if (spike) begin
      pending <= 1'b1;
    end
  end
endmodule
