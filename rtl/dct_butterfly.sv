// dct_butterfly: first stage of the 8-point DCT.
//
// Folds the eight samples about the middle of the block with four adders
// and four subtractors:
//   s[0]=A=x0+x7  s[1]=B=x1+x6  s[2]=C=x2+x5  s[3]=D=x3+x4
//   d[0]=A'=x0-x7 d[1]=B'=x1-x6 d[2]=C'=x2-x5 d[3]=D'=x3-x4
// The sums feed the even outputs X0, X2, X4, X6 and the differences the odd
// outputs X1, X3, X5, X7, as in the architecture. Outputs are one bit wider
// than the inputs so nothing overflows (a width choice of this design).
//
// Purely combinational: no clock, no latency.
module dct_butterfly #(
  parameter int unsigned DATA_W = dct8_pkg::DATA_W_DEF
) (
  input  logic signed [DATA_W-1:0] x [8],
  output logic signed [DATA_W:0]   s [4],
  output logic signed [DATA_W:0]   d [4]
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i] = (DATA_W+1)'(x[i]) + (DATA_W+1)'(x[7-i]);
      d[i] = (DATA_W+1)'(x[i]) - (DATA_W+1)'(x[7-i]);
    end
  end

endmodule
