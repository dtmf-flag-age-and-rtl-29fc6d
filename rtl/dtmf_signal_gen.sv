// dtmf_signal_gen: DTMF test signal generator.
//
// Frequency word selector -> two-channel DDS core -> tones generator. A key
// code selects a row and a column tone; on every sample strobe both phases
// advance and the generator outputs the sum of the two cosines, or zero while
// no key is pressed. Timing: signal_out holds the new sample three clocks
// after the strobe (phase register, table register, sum register) and stays
// constant until three clocks after the next strobe. The chain of blocks
// follows the published generator diagram; widths and the tone amplitude are
// this design's.
module dtmf_signal_gen
  import dtmf_pkg::*;
#(
  parameter int AMP_W     = 8,
  parameter int AMPLITUDE = 63
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,          // sample strobe
  input  key_t                    key,
  input  logic                    key_valid,
  output logic signed [AMP_W-1:0] signal_out
);
  phase_t inc_low, inc_high;
  logic signed [AMP_W-1:0] tone1, tone2;

  freq_word_selector u_fws (.key, .inc_low, .inc_high);

  dds_core #(.PHASE_W(PHASE_W), .AMP_W(AMP_W), .AMPLITUDE(AMPLITUDE)) u_dds (
    .clk, .rst_n, .en, .inc_low, .inc_high, .tone1, .tone2);

  tones_generator #(.AMP_W(AMP_W)) u_tones (
    .clk, .rst_n, .tone_en(key_valid), .tone1, .tone2, .tone(signal_out));
endmodule
