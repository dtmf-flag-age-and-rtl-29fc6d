// goertzel_bank: frequency detection block without resource sharing.
//
// Eight goertzel_filter instances run side by side, one per DTMF tone
// (bins 0..3: 697, 770, 852, 941 Hz; bins 4..7: 1209, 1336, 1477, 1633 Hz),
// each with its own multipliers, all driven by one goertzel_control that
// frames blocks of N samples. Every filter takes each sample on the strobe;
// one clock after the block's last sample all eight energies appear on mag
// together with a one-clock mag_valid pulse. Strobes must be at least two
// clocks apart. The eight parallel filters and the common control follow the
// published block diagram; N and the number formats are this design's.
module goertzel_bank
  import dtmf_pkg::*;
#(
  parameter int N = 205
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sample_en,
  input  sample_t          x,
  output logic [CNT_W-1:0] cnt,
  output mag_vec_t         mag,
  output logic             mag_valid
);
  logic             last;
  logic [NBINS-1:0] valid;

  goertzel_control #(.N(N)) u_ctrl (.clk, .rst_n, .sample_en, .cnt, .last);

  for (genvar b = 0; b < NBINS; b++) begin : g_bin
    goertzel_filter u_filt (
      .clk, .rst_n, .sample_en, .last, .x,
      .coef(goertzel_coef(b)), .mag(mag[b]), .mag_valid(valid[b]));
  end

  assign mag_valid = &valid;   // all filters finish together
endmodule
