// csd_model_pkg: reference arithmetic for the CSD filter testbenches.
//
// The functions work on plain integers, independently of the RTL: a digit's value is
// floor(x / 2^shift) by integer division (not by a shift operator), negated for a set sign
// bit, zero for shift 15. wrap() reduces a value to a W-bit two's complement number, as the
// datapath's modulo 2^W arithmetic does.
package csd_model_pkg;

  // floor(a / 2^s) for any sign of a.
  function automatic longint floor_div_pow2(longint a, int s);
    longint d, q;
    d = longint'(1) << s;
    q = a / d;
    if ((a % d != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // Value of one CSD digit (5-bit code) applied to the integer x.
  function automatic longint digit_value(longint x, logic [4:0] code);
    longint v;
    if (code[3:0] == 4'hF) return 0;
    v = floor_div_pow2(x, int'(code[3:0]));
    return code[4] ? -v : v;
  endfunction

  // Reduce a to W-bit two's complement.
  function automatic longint wrap(longint a, int w);
    longint m, r;
    m = longint'(1) << w;
    r = a % m;
    if (r < 0) r = r + m;
    if (r >= (m >> 1)) r = r - m;
    return r;
  endfunction

  // Signed value of a W-bit word given as unsigned bits.
  function automatic longint to_signed(longint bits, int w);
    return wrap(bits, w);
  endfunction

  // A random code: mostly nonzero digits, sometimes the zero code 01111 or 11111.
  function automatic logic [4:0] rand_code();
    logic [4:0] c;
    c = 5'($urandom);
    return c;
  endfunction

endpackage
