// signal_combiner: adds the noise to the DTMF tone.
//
// Both 8-bit inputs are signed; their sum is sign-extended to the 16-bit
// detector sample width and registered (one clock of latency). The adder is
// the summing node of the reference block diagram; the signed interpretation
// and the register are this design's choices.
module signal_combiner
  import dtmf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] tone,
  input  logic signed [7:0] noise,
  output sample_t           signal
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) signal <= '0;
    else        signal <= X_W'(tone) + X_W'(noise);
  end
endmodule
