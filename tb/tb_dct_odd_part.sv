// tb_dct_odd_part: self-checking test of the odd-indexed DCT outputs.
// Random and extreme sample frames x0..x7 are folded here into the
// butterfly differences (x[i] - x[7-i]) and fed to the block; each output is
// compared bit-exactly with the DCT computed directly from its definition
// using the same rounded cosines, and against the real-valued DCT within
// the error that 12-bit constants allow.
module tb_dct_odd_part;
  import dct_ref_pkg::*;
  localparam int DATA_W = 8;
  localparam int FRAC   = 12;
  localparam int OW     = DATA_W + FRAC + 4;

  logic signed [DATA_W:0] d [4];
  logic signed [OW-1:0]   y [4];
  int checks = 0, failures = 0;

  dct_odd_part #(.DATA_W(DATA_W), .COEF_FRAC(FRAC)) dut (
    .d, .y1(y[0]), .y3(y[1]), .y5(y[2]), .y7(y[3])
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int xi [8]);
    int k;
    for (int i = 0; i < 4; i++) d[i] = (DATA_W+1)'(xi[i] - xi[7-i]);
    #1;
    for (int j = 0; j < 4; j++) begin
      longint exp_q;
      real    err;
      k = 2*j + 1;
      exp_q = ref_dct_q(k, xi, FRAC);
      checks++;
      if (longint'(y[j]) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL X%0d = %0d exp %0d", k, y[j], exp_q);
      end
      err = real'(y[j]) / (2.0 ** FRAC) - ref_dct_r(k, xi);
      checks++;
      if (err > 0.2 || err < -0.2) begin
        failures++; $display("FAIL X%0d off real DCT by %f", k, err);
      end
    end
  endtask

  initial begin
    int xi [8];
    // extremes and single impulses
    for (int i = 0; i < 8; i++) xi[i] = 127;
    run_frame(xi);
    for (int i = 0; i < 8; i++) xi[i] = -128;
    run_frame(xi);
    for (int i = 0; i < 8; i++) xi[i] = (i % 2 != 0) ? -128 : 127;
    run_frame(xi);
    for (int i = 0; i < 8; i++) xi[i] = (i < 4) ? 127 : -128;
    run_frame(xi);
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < 8; i++) xi[i] = (i == p) ? 100 : 0;
      run_frame(xi);
    end
    repeat (2000) begin
      for (int i = 0; i < 8; i++) xi[i] = int'($signed(DATA_W'($urandom)));
      run_frame(xi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
