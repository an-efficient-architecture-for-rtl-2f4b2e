// tb_dct_input_sreg: self-checking test of the serial input register chain.
// Feeds random samples with random gaps in in_valid. A model kept here
// records the samples of each frame in arrival order; frame_valid must rise
// exactly one cycle after the eighth sample of each frame is accepted, and
// never otherwise, and x[n] must then hold the n-th sample of the frame.
module tb_dct_input_sreg;
  localparam int DATA_W = 8;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic signed [DATA_W-1:0] x [8];
  logic frame_valid;
  int checks = 0, failures = 0, frames = 0, gaps = 0;

  dct_input_sreg #(.DATA_W(DATA_W)) dut (.clk, .rst_n, .in_valid, .in_data, .x, .frame_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frame [8];
    int cnt;
    bit exp_fv;
    cnt = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (frame_valid) begin failures++; $display("FAIL frame_valid during reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) < 7);
      in_data  = DATA_W'($urandom);
      if (!in_valid) gaps++;
      @(posedge clk);
      exp_fv = 1'b0;
      if (in_valid) begin
        frame[cnt] = int'(in_data);
        cnt++;
        if (cnt == 8) begin exp_fv = 1'b1; cnt = 0; end
      end
      #1;
      checks++;
      if (frame_valid !== exp_fv) begin
        failures++; $display("FAIL cycle %0d frame_valid=%0b exp %0b", cyc, frame_valid, exp_fv);
      end
      if (exp_fv) begin
        frames++;
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (int'(x[n]) != frame[n]) begin
            failures++; $display("FAIL frame %0d x[%0d]=%0d exp %0d", frames, n, x[n], frame[n]);
          end
        end
      end
    end
    checks++;
    if (frames < 100 || gaps == 0) begin failures++; $display("FAIL too few frames/gaps"); end
    $display("frames=%0d gaps=%0d", frames, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
