// freq_to_digit_lut: maps the two strongest bins to a key code.
//
// A valid DTMF pair is one row bin (0..3) and one column bin (4..7), in
// either order. The pair is looked up in the keypad grid (dtmf_pkg::
// rc_to_key) and registered on idx_valid. digit and digit_valid hold until
// the next decision; digit_stb pulses for one clock with each decision. Two
// bins of the same group give digit_valid = 0 and leave digit unchanged.
// Timing: one clock after idx_valid. The lookup follows the published
// keypad grid; the rejection rule is this design's.
module freq_to_digit_lut
  import dtmf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  bin_t idx_max,
  input  bin_t idx_2nd,
  input  logic idx_valid,
  output key_t digit,
  output logic digit_valid,
  output logic digit_stb
);
  rc_t  rc;
  logic pair_ok;

  always_comb begin
    pair_ok = idx_max[2] ^ idx_2nd[2];
    rc.row  = idx_max[2] ? idx_2nd[1:0] : idx_max[1:0];
    rc.col  = idx_max[2] ? idx_max[1:0] : idx_2nd[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      digit       <= '0;
      digit_valid <= 1'b0;
      digit_stb   <= 1'b0;
    end else begin
      digit_stb <= idx_valid;
      if (idx_valid) begin
        digit_valid <= pair_ok;
        if (pair_ok) digit <= rc_to_key(rc);
      end
    end
  end
endmodule
