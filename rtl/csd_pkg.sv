// csd_pkg: types and constants shared by the programmable CSD FIR filter.
//
// A CSD coefficient digit is held as a 5-bit code (csd_code_t): bit 4 asks for negation,
// bits 3:0 give how far the tap input is shifted right (0..14). Shift value 4'hF means the
// digit is zero, whatever the sign bit. This is the encoding of the filter's coefficient
// table; the field order inside the struct is the same (sign in the MSB).
// The sizes (10-bit samples, 18 taps, three digits per tap, four guard bits) are those of the
// video luminance filter the design was made for. The helper functions size the 4:2
// compressor tree at elaboration time.
package csd_pkg;

  // Sample width N of the luminance filter.
  localparam int unsigned DATA_W      = 10;
  // Number of taps M.
  localparam int unsigned TAPS        = 18;
  // Nonzero CSD digits (partial products) per tap.
  localparam int unsigned PP_PER_TAP  = 3;
  // Guard bits below the sample LSB: the internal word is N+GUARD bits wide.
  localparam int unsigned GUARD       = 4;
  // Width of one CSD code.
  localparam int unsigned CODE_W      = 5;
  // Shift field value that encodes a zero digit.
  localparam logic [3:0]  SHIFT_ZERO  = 4'hF;

  typedef struct packed {
    logic       neg;    // 1: negate the shifted sample
    logic [3:0] shift;  // right shift 0..14, 15 = digit is zero
  } csd_code_t;

  // Code of a zero digit (reset value of every coefficient register).
  localparam csd_code_t CODE_ZERO = '{neg: 1'b0, shift: SHIFT_ZERO};

  // Rows left after one level of 4:2 compression: every group of four rows becomes two,
  // three leftover rows go through one more compressor (fourth input zero), one or two
  // leftover rows pass to the next level unchanged.
  function automatic int unsigned tree_next_rows(int unsigned rows);
    int unsigned rest;
    rest = rows % 4;
    return 2 * (rows / 4) + ((rest == 3) ? 2 : rest);
  endfunction

  // Rows present at the input of compression level `level` (level 0 = the partial products).
  function automatic int unsigned tree_rows_at(int unsigned n_in, int unsigned level);
    int unsigned r;
    r = n_in;
    for (int unsigned l = 0; l < level; l++) r = tree_next_rows(r);
    return r;
  endfunction

  // Number of compression levels needed to bring n_in rows down to two.
  function automatic int unsigned tree_levels(int unsigned n_in);
    int unsigned r;
    int unsigned l;
    r = n_in;
    l = 0;
    while (r > 2) begin
      r = tree_next_rows(r);
      l++;
    end
    return l;
  endfunction

endpackage
