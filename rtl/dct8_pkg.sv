// dct8_pkg: constants shared by the 8-point DCT datapath.
//
// The transform computed is the unnormalised DCT-II
//   X_k = sum_{n=0..7} x_n * cos(pi*(2n+1)*k/16),
// with the seven distinct cosine constants c_k = cos(k*pi/16), k = 1..7,
// held as unsigned fixed-point integers with COEF_FRAC fractional bits:
//   coef(k, frac) = round(cos(k*pi/16) * 2^frac).
// All seven are positive, so no sign bit is stored. The constant format and
// the default widths are choices of this design; the transform, the
// constants and which multiplier bank uses which constant follow the
// architecture it implements.
package dct8_pkg;

  // Default widths (design choices).
  localparam int unsigned DATA_W_DEF    = 8;   // signed input sample width
  localparam int unsigned COEF_FRAC_DEF = 12;  // fractional bits of c_k


  localparam real PI = 3.14159265358979323846;

  // round(cos(k*pi/16) * 2^frac), for 0 < k < 8 (always positive).
  function automatic longint unsigned coef(input int unsigned k, input int unsigned frac);
    real v;
    v = $cos(PI * real'(k) / 16.0) * (2.0 ** frac);
    return longint'($floor(v + 0.5));
  endfunction

  // Width of an output coefficient: |X_k| < 8 * 2^(DATA_W-1) * 2^COEF_FRAC
  // for every k, so DATA_W + 3 integer bits plus a sign bit suffice.
  function automatic int unsigned out_w(input int unsigned data_w, input int unsigned frac);
    return data_w + frac + 4;
  endfunction

endpackage
