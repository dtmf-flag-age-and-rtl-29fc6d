// awgn_gen: additive white Gaussian noise source.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) advances
// on every sample strobe. Four 6-bit fields of its state are added; the sum
// of four uniform variables is close to Gaussian (Irwin-Hall), with mean 126
// and standard deviation about 37. The mean is removed and the result is
// shifted right arithmetically by 'shift' to set the noise level, giving a
// zero-mean 8-bit sample in -126..126. noise_en = 0 forces zero.
// Timing: noise changes one clock after the strobe. Only the presence of a
// Gaussian noise source is given by the reference design; the generator
// itself is this design's simplest choice.
module awgn_gen #(
  parameter logic [31:0] SEED = 32'h1234_5678   // must be non-zero
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              noise_en,
  input  logic [2:0]        shift,
  output logic signed [7:0] noise
);
  logic [31:0] state, next_state;
  logic [7:0]  sum;
  logic signed [7:0] centred;

  always_comb begin
    next_state = state ^ (state << 13);
    next_state = next_state ^ (next_state >> 17);
    next_state = next_state ^ (next_state << 5);
    sum = 8'(next_state[5:0]) + 8'(next_state[13:8]) + 8'(next_state[21:16]) + 8'(next_state[29:24]);
    centred = $signed(sum - 8'd126);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEED;
      noise <= '0;
    end else if (en) begin
      state <= next_state;
      noise <= noise_en ? (centred >>> shift) : 8'sd0;
    end
  end
endmodule
