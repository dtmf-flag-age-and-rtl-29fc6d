// goertzel_control: block sequencer of the Goertzel detector.
//
// Counts sample strobes modulo N. 'cnt' is the index of the sample that the
// next strobe delivers (0..N-1) and 'last' is high while cnt = N-1, so a
// filter that sees sample_en && last takes the final sample of a block and
// then evaluates its energy. Reset (active low) starts a new block.
// The control unit is named in the reference design; the block length
// N = 205 (at 8 kHz) and the 12-bit counter width are this design's choices.
module goertzel_control
  import dtmf_pkg::*;
#(
  parameter int N = 205
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_en,
  output logic [CNT_W-1:0] cnt,
  output logic             last
);
  assign last = (cnt == CNT_W'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cnt <= '0;
    else if (sample_en) cnt <= last ? '0 : cnt + 1'b1;
  end

  if (N < 2 || N >= 2 ** CNT_W) begin : g_bad_n
    $error("goertzel_control: N must lie in 2..%0d", 2 ** CNT_W - 1);
  end
endmodule
