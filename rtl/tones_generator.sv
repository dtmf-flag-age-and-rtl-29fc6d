// tones_generator: sums the two DDS tones into the DTMF signal.
//
// tone = tone1 + tone2 while a key is pressed (tone_en), zero otherwise.
// The sum is registered: one clock of latency. With each tone at most +-63
// the sum fits the AMP_W = 8 bit output without overflow. The silence gating
// is this design's choice.
module tones_generator #(
  parameter int AMP_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    tone_en,
  input  logic signed [AMP_W-1:0] tone1,
  input  logic signed [AMP_W-1:0] tone2,
  output logic signed [AMP_W-1:0] tone
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       tone <= '0;
    else if (tone_en) tone <= tone1 + tone2;
    else              tone <= '0;
  end
endmodule
