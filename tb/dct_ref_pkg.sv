// dct_ref_pkg: reference model for the 8-point DCT testbenches.
//
// Computes the transform straight from its definition,
//   X_k = sum_{n=0..7} x_n cos(pi(2n+1)k/16),
// without the butterfly or the constant sharing of the design. Two forms:
//   ref_dct_q : exact integer result when every cosine is replaced by
//               sign(cos) * round(|cos| * 2^frac), the same quantisation the
//               hardware applies to its seven constants; bit-exact target.
//   ref_dct_r : real-valued result, to bound the quantisation error.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic longint qcos(input int m, input int frac);
    real c;
    longint mag;
    c   = $cos(PI * real'(m) / 16.0);
    mag = longint'($floor((c < 0.0 ? -c : c) * (2.0 ** frac) + 0.5));
    return (c < 0.0) ? -mag : mag;
  endfunction

  function automatic longint ref_dct_q(input int k, input int x [8], input int frac);
    longint acc;
    acc = 0;
    for (int n = 0; n < 8; n++) acc += longint'(x[n]) * qcos((2*n+1)*k, frac);
    return acc;
  endfunction

  function automatic real ref_dct_r(input int k, input int x [8]);
    real acc;
    acc = 0.0;
    for (int n = 0; n < 8; n++) acc += real'(x[n]) * $cos(PI * real'((2*n+1)*k) / 16.0);
    return acc;
  endfunction

endpackage
