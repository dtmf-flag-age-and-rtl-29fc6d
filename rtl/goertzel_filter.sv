// goertzel_filter: one Goertzel bin with its own multipliers.
//
// Second-order recursion per sample:
//   s[n] = x[n] + c*s[n-1] - s[n-2],   c = 2*cos(2*pi*f/FS) in Q2.14
// and after the last sample of a block the bin energy
//   |y|^2 = s1^2 + s2^2 - c*s1*s2
// (s1 = s[N-1], s2 = s[N-2]), which is the squared magnitude of the
// filter output y = s1 - W*s2 and so needs no complex arithmetic. The
// product c*s1 is truncated to an integer (arithmetic shift by 14) both in
// the recursion and in the energy. Rounding can make the energy of an empty
// bin a few units negative; it is clamped to zero.
// Timing: on a strobe the state updates; if that strobe carried 'last', the
// next clock writes mag, pulses mag_valid for one clock and clears the state
// for the next block. Strobes must be at least two clocks apart.
// The structure (two delays, feedback gains c and -1, output gain W) is the
// published one; the fixed-point formats and the energy form are this
// design's. There is no overflow check: 32-bit state is ample for inputs of
// +-255 over a few hundred samples.
module goertzel_filter
  import dtmf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  input  logic    last,
  input  sample_t x,
  input  coef_t   coef,
  output mag_t    mag,
  output logic    mag_valid
);
  acc_t s1, s2, fb, s0;
  logic pending;
  logic signed [ACC_W+COEF_W-1:0] prod;
  logic signed [2*ACC_W-1:0]      energy;

  always_comb begin
    prod   = coef * s1;
    fb     = acc_t'(prod >>> COEF_FRAC);
    s0     = acc_t'(x) + fb - s2;
    energy = s1 * s1 + s2 * s2 - fb * s2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      pending   <= 1'b0;
      mag       <= '0;
      mag_valid <= 1'b0;
    end else begin
      mag_valid <= 1'b0;
      if (pending) begin
        mag       <= energy[2*ACC_W-1] ? '0 : mag_t'(energy);
        mag_valid <= 1'b1;
        s1        <= '0;
        s2        <= '0;
        pending   <= 1'b0;
      end else if (sample_en) begin
        s1      <= s0;
        s2      <= s1;
        pending <= last;
      end
    end
  end

  a_strobe_spacing: assert property (@(posedge clk) disable iff (!rst_n) pending |-> !sample_en)
    else $error("goertzel_filter: sample strobe during energy evaluation");
endmodule
