// dct_odd_part: odd-indexed outputs X1, X3, X5, X7 of the 8-point DCT.
//
// From the butterfly differences A', B', C', D' (d[0..3]) it forms
//   X1 = A'c1 + B'c3 + C'c5 + D'c7
//   X3 = A'c3 - C'c1 - D'c5 - B'c7
//   X5 = A'c5 - B'c1 + D'c3 + C'c7
//   X7 = A'c7 - D'c1 + C'c3 - B'c5
// with c_k = cos(k*pi/16). The sixteen products come from four four-lane
// banks M1, M3, M5, M7, one per constant; lane i of every bank feeds output
// X(2i+1). The operand order inside each bank and the signs of the
// combiners follow the architecture: three subtractions for X3, one for X5,
// two for X7, all others additions.
//
// Outputs have COEF_FRAC fractional bits and width DATA_W + COEF_FRAC + 4.
// Purely combinational.
module dct_odd_part #(
  parameter int unsigned DATA_W    = dct8_pkg::DATA_W_DEF,
  parameter int unsigned COEF_FRAC = dct8_pkg::COEF_FRAC_DEF,
  localparam int unsigned OW       = DATA_W + COEF_FRAC + 4
) (
  input  logic signed [DATA_W:0] d [4],   // A', B', C', D'
  output logic signed [OW-1:0]   y1,
  output logic signed [OW-1:0]   y3,
  output logic signed [OW-1:0]   y5,
  output logic signed [OW-1:0]   y7
);

  localparam int unsigned IW = DATA_W + 1;

  logic signed [IW-1:0]          m1_a [4], m3_a [4], m5_a [4], m7_a [4];
  logic signed [IW+COEF_FRAC:0]  m1_p [4], m3_p [4], m5_p [4], m7_p [4];

  // Operand of lane i (i.e. for output X(2i+1)) in each bank.
  always_comb begin
    m1_a = '{d[0], d[2], d[1], d[3]};  // A' C' B' D'
    m3_a = '{d[1], d[0], d[3], d[2]};  // B' A' D' C'
    m5_a = '{d[2], d[3], d[0], d[1]};  // C' D' A' B'
    m7_a = '{d[3], d[1], d[2], d[0]};  // D' B' C' A'
  end

  dct_cmul_bank #(.LANES(4), .K(1), .IN_W(IW), .COEF_FRAC(COEF_FRAC)) u_m1 (.a(m1_a), .p(m1_p));
  dct_cmul_bank #(.LANES(4), .K(3), .IN_W(IW), .COEF_FRAC(COEF_FRAC)) u_m3 (.a(m3_a), .p(m3_p));
  dct_cmul_bank #(.LANES(4), .K(5), .IN_W(IW), .COEF_FRAC(COEF_FRAC)) u_m5 (.a(m5_a), .p(m5_p));
  dct_cmul_bank #(.LANES(4), .K(7), .IN_W(IW), .COEF_FRAC(COEF_FRAC)) u_m7 (.a(m7_a), .p(m7_p));

  always_comb begin
    y1 = OW'(m1_p[0]) + OW'(m3_p[0]) + OW'(m5_p[0]) + OW'(m7_p[0]);
    y3 = OW'(m3_p[1]) - OW'(m1_p[1]) - OW'(m5_p[1]) - OW'(m7_p[1]);
    y5 = OW'(m5_p[2]) - OW'(m1_p[2]) + OW'(m3_p[2]) + OW'(m7_p[2]);
    y7 = OW'(m7_p[3]) - OW'(m1_p[3]) + OW'(m3_p[3]) - OW'(m5_p[3]);
  end

endmodule
