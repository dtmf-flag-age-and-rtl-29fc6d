// cos_lut: cosine carrier table of the DDS.
//
// 2^ADDR_W entries holding round(AMPLITUDE * cos(2*pi*i / 2^ADDR_W)) as
// AMP_W-bit two's complement numbers; the table is computed at elaboration
// and maps to a ROM. The address is the top ADDR_W bits of the phase.
// Output is registered: one clock from addr to cos_out. Depth, amplitude and
// the registered read are this design's choices; the 8-bit sample width
// matches the generator output of the reference design.
module cos_lut #(
  parameter int ADDR_W    = 8,
  parameter int AMP_W     = 8,
  parameter int AMPLITUDE = 63
) (
  input  logic                    clk,
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [AMP_W-1:0] cos_out
);
  localparam int DEPTH = 2 ** ADDR_W;
  typedef logic signed [AMP_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = AMP_W'($rtoi($floor(real'(AMPLITUDE) * $cos(2.0 * dtmf_pkg::PI * real'(i) / real'(DEPTH)) + 0.5)));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) cos_out <= TABLE[addr];
endmodule
