// dtmf_pkg: constants and types shared by the DTMF generator and detector.
//
// The eight DTMF frequencies (four row tones, four column tones) are the
// standard keypad grid. The sample rate, the DDS phase width and the fixed
// point formats are this design's own choices: 8 kHz sampling, a 16-bit phase
// accumulator, Q2.14 Goertzel coefficients and 32-bit filter state.
// Tuning words and coefficients are computed at elaboration from the
// frequency list:
//   phase increment  = round(f * 2^PHASE_W / FS_HZ)
//   Goertzel coef    = round(2*cos(2*pi*f/FS_HZ) * 2^COEF_FRAC)
// Bins 0..3 are the row tones (697, 770, 852, 941 Hz), bins 4..7 the column
// tones (1209, 1336, 1477, 1633 Hz).
package dtmf_pkg;

  localparam int    FS_HZ     = 8000;   // sample rate
  localparam int    PHASE_W   = 16;     // DDS phase accumulator width
  localparam int    NBINS     = 8;      // Goertzel bins (4 rows + 4 columns)
  localparam int    X_W       = 16;     // detector input sample width
  localparam int    COEF_W    = 16;     // Goertzel coefficient width
  localparam int    COEF_FRAC = 14;     // fractional bits of the coefficient
  localparam int    ACC_W     = 32;     // Goertzel state width
  localparam int    MAG_W     = 64;     // bin energy width
  localparam int    CNT_W     = 12;     // sample counter width
  localparam real   PI        = 3.14159265358979323846;

  typedef logic [3:0]                 key_t;    // keypad code, see key_to_rc
  typedef logic [2:0]                 bin_t;    // bin index 0..7
  typedef logic [PHASE_W-1:0]         phase_t;
  typedef logic signed [X_W-1:0]      sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic [MAG_W-1:0]           mag_t;
  typedef mag_t                       mag_vec_t [NBINS];

  // Row / column position of a key on the 4x4 pad.
  typedef struct packed {
    logic [1:0] row;   // 0: 697 Hz ... 3: 941 Hz
    logic [1:0] col;   // 0: 1209 Hz ... 3: 1633 Hz
  } rc_t;

  // Tone frequencies in Hz, indexed by bin.
  function automatic int bin_freq(input int b);
    case (b)
      0: return 697;   1: return 770;   2: return 852;   3: return 941;
      4: return 1209;  5: return 1336;  6: return 1477;  default: return 1633;
    endcase
  endfunction

  function automatic phase_t phase_inc(input int b);
    return phase_t'($rtoi(real'(bin_freq(b)) * real'(2 ** PHASE_W) / real'(FS_HZ) + 0.5));
  endfunction

  function automatic coef_t goertzel_coef(input int b);
    return coef_t'($rtoi(2.0 * $cos(2.0 * PI * real'(bin_freq(b)) / real'(FS_HZ))
                         * real'(2 ** COEF_FRAC) + 0.5));
  endfunction

  // Key codes: '0'..'9' -> 0..9, 'A'..'D' -> 10..13, '*' -> 14, '#' -> 15.
  // Pad layout (row by row): 1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D.
  function automatic rc_t key_to_rc(input key_t k);
    case (k)
      4'h1: return '{row: 2'd0, col: 2'd0};
      4'h2: return '{row: 2'd0, col: 2'd1};
      4'h3: return '{row: 2'd0, col: 2'd2};
      4'hA: return '{row: 2'd0, col: 2'd3};
      4'h4: return '{row: 2'd1, col: 2'd0};
      4'h5: return '{row: 2'd1, col: 2'd1};
      4'h6: return '{row: 2'd1, col: 2'd2};
      4'hB: return '{row: 2'd1, col: 2'd3};
      4'h7: return '{row: 2'd2, col: 2'd0};
      4'h8: return '{row: 2'd2, col: 2'd1};
      4'h9: return '{row: 2'd2, col: 2'd2};
      4'hC: return '{row: 2'd2, col: 2'd3};
      4'hE: return '{row: 2'd3, col: 2'd0};
      4'h0: return '{row: 2'd3, col: 2'd1};
      4'hF: return '{row: 2'd3, col: 2'd2};
      default: return '{row: 2'd3, col: 2'd3};  // 4'hD
    endcase
  endfunction

  function automatic key_t rc_to_key(input rc_t rc);
    case ({rc.row, rc.col})
      4'b00_00: return 4'h1;  4'b00_01: return 4'h2;  4'b00_10: return 4'h3;  4'b00_11: return 4'hA;
      4'b01_00: return 4'h4;  4'b01_01: return 4'h5;  4'b01_10: return 4'h6;  4'b01_11: return 4'hB;
      4'b10_00: return 4'h7;  4'b10_01: return 4'h8;  4'b10_10: return 4'h9;  4'b10_11: return 4'hC;
      4'b11_00: return 4'hE;  4'b11_01: return 4'h0;  4'b11_10: return 4'hF;  default:  return 4'hD;
    endcase
  endfunction

endpackage
