// dct8_top: 8-point discrete cosine transform with 21 constant multipliers.
//
// Computes, for every frame of eight signed samples x0..x7, the
// unnormalised DCT-II X_k = sum_n x_n cos(pi(2n+1)k/16), k = 0..7.
// Samples arrive serially and shift through an eight-register chain; once a
// frame is complete a butterfly folds it into sums A..D and differences
// A'..D'. The even half (X0, X2, X4, X6) uses the sums and five
// multipliers (banks M2, M4, M6); the odd half (X1, X3, X5, X7) uses the
// differences and sixteen multipliers (banks M1, M3, M5, M7, each holding
// one constant cos(k*pi/16) shared by its four lanes). This organisation
// follows the architecture. The output register, the handshakes and the
// fixed-point formats are this design's choices.
//
// Interface and timing:
//   in_valid/in_data  one sample per clock at most; gaps allowed.
//   out_valid, X      one clock after the eighth sample of a frame is
//                     accepted, X[k] holds X_k for one cycle (held until the
//                     next frame) and out_valid pulses high.
//   ser_*             the same coefficients, one per clock in order
//                     X0..X7, starting the cycle after out_valid.
// X values have COEF_FRAC fractional bits: X_k ~= X[k] / 2^COEF_FRAC.
// One frame is accepted every eight samples, so with continuous input the
// throughput is one transform per eight clocks, and the serial output
// keeps pace.
module dct8_top #(
  parameter int unsigned DATA_W    = dct8_pkg::DATA_W_DEF,
  parameter int unsigned COEF_FRAC = dct8_pkg::COEF_FRAC_DEF,
  localparam int unsigned OW       = DATA_W + COEF_FRAC + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OW-1:0]     X [8],
  output logic                     ser_valid,
  output logic signed [OW-1:0]     ser_data,
  output logic [2:0]               ser_index
);

  logic signed [DATA_W-1:0] x [8];
  logic                     frame_valid;
  logic signed [DATA_W:0]   s [4];
  logic signed [DATA_W:0]   d [4];
  logic signed [OW-1:0]     y [8];

  dct_input_sreg #(.DATA_W(DATA_W)) u_in (
    .clk, .rst_n, .in_valid, .in_data, .x, .frame_valid
  );

  dct_butterfly #(.DATA_W(DATA_W)) u_bfly (.x, .s, .d);

  dct_even_part #(.DATA_W(DATA_W), .COEF_FRAC(COEF_FRAC)) u_even (
    .s, .y0(y[0]), .y2(y[2]), .y4(y[4]), .y6(y[6])
  );

  dct_odd_part #(.DATA_W(DATA_W), .COEF_FRAC(COEF_FRAC)) u_odd (
    .d, .y1(y[1]), .y3(y[3]), .y5(y[5]), .y7(y[7])
  );

  // Output register: captures the coefficients of a completed frame.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) X[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= frame_valid;
      if (frame_valid) X <= y;
    end
  end

  dct_out_serializer #(.W(OW)) u_ser (
    .clk, .rst_n, .load(out_valid), .y(X),
    .out_valid(ser_valid), .out_data(ser_data), .out_index(ser_index)
  );

endmodule
