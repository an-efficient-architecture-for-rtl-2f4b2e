// dct_out_serializer: puts the eight DCT coefficients out in order.
//
// The datapath produces X0..X7 of a frame at the same time; this block
// captures them and emits them one per clock, X0 first and X7 last. The
// architecture only states that delays are needed to obtain the outputs in
// order; this load-and-step buffer is the simplest circuit doing that and is
// this design's choice.
//
// Interface: when load is high, y is captured and X0 appears on out_data
// (with out_valid high and out_index 0) in the next cycle; X(k) follows k
// cycles later. out_valid stays high for eight cycles. A load during those
// cycles restarts the sequence with the new words. rst_n is an asynchronous
// active-low reset.
module dct_out_serializer #(
  parameter int unsigned W = dct8_pkg::out_w(dct8_pkg::DATA_W_DEF, dct8_pkg::COEF_FRAC_DEF)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] y [8],
  output logic                out_valid,
  output logic signed [W-1:0] out_data,
  output logic [2:0]          out_index
);

  logic signed [W-1:0] buf_q [8];
  logic [2:0]          idx;
  logic                busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) buf_q[i] <= '0;
      idx  <= '0;
      busy <= 1'b0;
    end else if (load) begin
      buf_q <= y;
      idx   <= '0;
      busy  <= 1'b1;
    end else if (busy) begin
      idx <= idx + 3'd1;
      if (idx == 3'd7) busy <= 1'b0;
    end
  end

  always_comb begin
    out_valid = busy;
    out_data  = buf_q[idx];
    out_index = idx;
  end

endmodule
