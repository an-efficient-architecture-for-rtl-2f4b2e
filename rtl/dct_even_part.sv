// dct_even_part: even-indexed outputs X0, X2, X4, X6 of the 8-point DCT.
//
// From the butterfly sums A, B, C, D (s[0..3]) it forms
//   X0 = A + B + C + D                       (three adders, no multiplier)
//   X2 = (A - D) c2 + (B - C) c6
//   X4 = (A - B - C + D) c4
//   X6 = (C - B) c2 + (A - D) c6
// with c_k = cos(k*pi/16). The four products with c2 and c6 come from two
// two-lane banks (M2 and M6) and the one product with c4 from a one-lane
// bank (M4), so the even half needs five multipliers; this structure
// follows the architecture. The X6 operands are taken from the DCT
// definition: (C - B) and (A - D). The difference A - D feeds both M2 and M6
// and is written once here.
//
// All outputs have COEF_FRAC fractional bits (X0 is shifted left to match;
// a format choice of this design) and width DATA_W + COEF_FRAC + 4.
// Purely combinational.
module dct_even_part #(
  parameter int unsigned DATA_W    = dct8_pkg::DATA_W_DEF,
  parameter int unsigned COEF_FRAC = dct8_pkg::COEF_FRAC_DEF,
  localparam int unsigned OW       = DATA_W + COEF_FRAC + 4
) (
  input  logic signed [DATA_W:0] s [4],   // A, B, C, D
  output logic signed [OW-1:0]   y0,
  output logic signed [OW-1:0]   y2,
  output logic signed [OW-1:0]   y4,
  output logic signed [OW-1:0]   y6
);

  localparam int unsigned W2 = DATA_W + 2;  // one subtraction of sums
  localparam int unsigned W4 = DATA_W + 3;  // A - B - C + D

  logic signed [W2-1:0]          a_m_d, b_m_c, c_m_b;
  logic signed [W4-1:0]          m4_in;
  logic signed [W2-1:0]          m2_a [2], m6_a [2];
  logic signed [W4-1:0]          m4_a [1];
  logic signed [W2+COEF_FRAC:0]  m2_p [2], m6_p [2];
  logic signed [W4+COEF_FRAC:0]  m4_p [1];
  logic signed [OW-1:0]          sum_all;

  always_comb begin
    a_m_d   = W2'(s[0]) - W2'(s[3]);
    b_m_c   = W2'(s[1]) - W2'(s[2]);
    c_m_b   = W2'(s[2]) - W2'(s[1]);
    // M4 operand, in the order A - B, - C, + D.
    m4_in   = W4'(s[0]) - W4'(s[1]) - W4'(s[2]) + W4'(s[3]);
    m2_a[0] = a_m_d;   // -> X2
    m2_a[1] = c_m_b;   // -> X6
    m6_a[0] = b_m_c;   // -> X2
    m6_a[1] = a_m_d;   // -> X6
    m4_a[0] = m4_in;   // -> X4
  end

  dct_cmul_bank #(.LANES(2), .K(2), .IN_W(W2), .COEF_FRAC(COEF_FRAC)) u_m2 (.a(m2_a), .p(m2_p));
  dct_cmul_bank #(.LANES(1), .K(4), .IN_W(W4), .COEF_FRAC(COEF_FRAC)) u_m4 (.a(m4_a), .p(m4_p));
  dct_cmul_bank #(.LANES(2), .K(6), .IN_W(W2), .COEF_FRAC(COEF_FRAC)) u_m6 (.a(m6_a), .p(m6_p));

  always_comb begin
    sum_all = OW'(s[0]) + OW'(s[1]) + OW'(s[2]) + OW'(s[3]);
    y0 = sum_all <<< COEF_FRAC;
    y2 = OW'(m2_p[0]) + OW'(m6_p[0]);
    y4 = OW'(m4_p[0]);
    y6 = OW'(m2_p[1]) + OW'(m6_p[1]);
  end

endmodule
