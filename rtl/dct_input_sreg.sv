// dct_input_sreg: serial-in, parallel-out input register chain of the
// 8-point DCT.
//
// Each accepted sample enters register x[7] and the chain shifts
// x[7] -> x[6] -> ... -> x[1] -> x[0], so after eight accepted samples the
// first of them sits in x[0] and the last in x[7]; all eight are then
// presented at once to the butterfly. This order of the chain follows the
// architecture. A 3-bit frame counter, the in_valid qualifier and the
// frame_valid pulse are this design's additions: they mark the cycle in
// which x holds eight samples not yet transformed.
//
// Interface: in_valid/in_data accept one sample per clock; a cycle with
// in_valid low holds the chain and the counter. frame_valid is high for
// exactly the one cycle after the clock edge that stored the eighth sample
// of a frame, and x is then that frame (x[n] = n-th sample). Frames are
// back to back: the ninth sample starts the next frame. rst_n is an
// asynchronous active-low reset clearing the chain and the counter.
module dct_input_sreg #(
  parameter int unsigned DATA_W = dct8_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic signed [DATA_W-1:0] x [8],
  output logic                     frame_valid
);

  logic [2:0] cnt;  // samples of the current frame already stored

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) x[i] <= '0;
      cnt         <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= in_valid && (cnt == 3'd7);
      if (in_valid) begin
        for (int i = 0; i < 7; i++) x[i] <= x[i+1];
        x[7] <= in_data;
        cnt  <= cnt + 3'd1;
      end
    end
  end

endmodule
