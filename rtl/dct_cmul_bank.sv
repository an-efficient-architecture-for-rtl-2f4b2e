// dct_cmul_bank: a bank of LANES multipliers sharing one cosine constant.
//
// Every lane multiplies its signed operand a[i] by the same constant
// c_K = round(cos(K*pi/16) * 2^COEF_FRAC) and returns the exact product, so
// p[i] carries COEF_FRAC fractional bits. The architecture groups its 21
// multiplications into seven such banks, M1..M7, one per constant: banks
// for c1, c3, c5, c7 have four lanes, those for c2 and c6 two, and the one
// for c4 a single lane. Because the constant is fixed, each lane is a
// constant multiplier that synthesis reduces to shifts and adds; the
// fixed-point format of the constant is this design's choice.
//
// Purely combinational. p[i] = a[i] * c_K, width IN_W + COEF_FRAC + 1.
module dct_cmul_bank #(
  parameter int unsigned LANES     = 4,
  parameter int unsigned K         = 1,   // constant is cos(K*pi/16), 1 <= K <= 7
  parameter int unsigned IN_W      = dct8_pkg::DATA_W_DEF + 1,
  parameter int unsigned COEF_FRAC = dct8_pkg::COEF_FRAC_DEF
) (
  input  logic signed [IN_W-1:0]           a [LANES],
  output logic signed [IN_W+COEF_FRAC:0]   p [LANES]
);

  localparam int unsigned PW = IN_W + COEF_FRAC + 1;
  // c_K < 1.0, so it fits in COEF_FRAC bits; one zero bit on top makes it
  // a non-negative signed value.
  localparam logic signed [COEF_FRAC:0] C =
    (COEF_FRAC+1)'(dct8_pkg::coef(K, COEF_FRAC));

  initial assert (K >= 1 && K <= 7) else $error("dct_cmul_bank: K must be 1..7");

  always_comb begin
    for (int i = 0; i < LANES; i++)
      p[i] = PW'(a[i]) * PW'(C);
  end

endmodule
