// dtmf_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: tone frequencies, keypad layout, DDS
// tuning words, cosine table, xorshift noise and a Goertzel model in plain
// integer arithmetic. Values are computed here from their formulas, not taken
// from the design's package.
package dtmf_ref_pkg;

  localparam real FS = 8000.0;
  localparam real M_PI = 3.14159265358979323846;
  localparam int ROW_HZ [4] = '{697, 770, 852, 941};
  localparam int COL_HZ [4] = '{1209, 1336, 1477, 1633};
  // Keypad, row by row; key code of each position.
  localparam int PAD_CODE [4][4] = '{'{1, 2, 3, 10}, '{4, 5, 6, 11}, '{7, 8, 9, 12}, '{14, 0, 15, 13}};

  function automatic int key_row(input int code);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) if (PAD_CODE[r][c] == code) return r;
    return -1;
  endfunction

  function automatic int key_col(input int code);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) if (PAD_CODE[r][c] == code) return c;
    return -1;
  endfunction

  // Frequency of bin b: 0..3 rows, 4..7 columns.
  function automatic int bin_hz(input int b);
    return (b < 4) ? ROW_HZ[b] : COL_HZ[b-4];
  endfunction

  function automatic int ref_inc(input int hz);
    return int'($floor(real'(hz) * 65536.0 / FS + 0.5));
  endfunction

  function automatic int ref_coef(input int hz);
    return int'($floor(2.0 * $cos(2.0 * M_PI * real'(hz) / FS) * 16384.0 + 0.5));
  endfunction

  function automatic int ref_cos(input int addr);
    return int'($floor(63.0 * $cos(2.0 * M_PI * real'(addr) / 256.0) + 0.5));
  endfunction

  function automatic int unsigned xorshift(input int unsigned s);
    s = s ^ (s << 13);
    s = s ^ (s >> 17);
    s = s ^ (s << 5);
    return s;
  endfunction

  // Noise sample from an xorshift state (already advanced) and shift.
  function automatic int ref_noise(input int unsigned s, input int shift);
    int v;
    v = int'(s & 63) + int'((s >> 8) & 63) + int'((s >> 16) & 63) + int'((s >> 24) & 63) - 126;
    return v >>> shift;
  endfunction

  // Goertzel energy of a block of samples, integer arithmetic with the
  // product c*s1 floored to an integer (arithmetic shift by 14).
  function automatic longint ref_energy(input int coef, input int xs[$]);
    longint s1 = 0, s2 = 0, s0, fb, e;
    foreach (xs[i]) begin
      fb = (longint'(coef) * s1) >>> 14;
      s0 = longint'(xs[i]) + fb - s2;
      s2 = s1;
      s1 = s0;
    end
    fb = (longint'(coef) * s1) >>> 14;
    e = s1 * s1 + s2 * s2 - fb * s2;
    return (e < 0) ? 0 : e;
  endfunction

endpackage
