// freq_word_selector: picks the two DDS tuning words for a key.
//
// The key code is split into its keypad row and column; the row selects one
// of the four low-group tones and the column one of the four high-group
// tones. The outputs are the phase increments round(f * 2^PHASE_W / FS_HZ)
// from dtmf_pkg. Purely combinational. The row/column split follows the
// standard keypad grid; the 4-bit key coding is this design's choice
// (see dtmf_pkg).
module freq_word_selector
  import dtmf_pkg::*;
(
  input  key_t   key,
  output phase_t inc_low,    // row tone (697..941 Hz)
  output phase_t inc_high    // column tone (1209..1633 Hz)
);
  rc_t rc;

  always_comb begin
    rc = key_to_rc(key);
    unique case (rc.row)
      2'd0: inc_low = phase_inc(0);
      2'd1: inc_low = phase_inc(1);
      2'd2: inc_low = phase_inc(2);
      default: inc_low = phase_inc(3);
    endcase
    unique case (rc.col)
      2'd0: inc_high = phase_inc(4);
      2'd1: inc_high = phase_inc(5);
      2'd2: inc_high = phase_inc(6);
      default: inc_high = phase_inc(7);
    endcase
  end
endmodule
