// tb_dct_butterfly: self-checking test of the butterfly stage.
// Drives random and extreme sample vectors and compares the four sums and
// four differences with x[i] +/- x[7-i] computed here in integer arithmetic.
module tb_dct_butterfly;
  localparam int DATA_W = 8;
  logic signed [DATA_W-1:0] x [8];
  logic signed [DATA_W:0]   s [4];
  logic signed [DATA_W:0]   d [4];
  int checks = 0, failures = 0;

  dct_butterfly #(.DATA_W(DATA_W)) dut (.x, .s, .d);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_vec();
    int xi [8];
    for (int i = 0; i < 8; i++) xi[i] = int'(x[i]);
    #1;
    for (int i = 0; i < 4; i++) begin
      checks += 2;
      if (int'(s[i]) != xi[i] + xi[7-i]) begin
        failures++; $display("FAIL s[%0d]=%0d exp %0d", i, s[i], xi[i] + xi[7-i]);
      end
      if (int'(d[i]) != xi[i] - xi[7-i]) begin
        failures++; $display("FAIL d[%0d]=%0d exp %0d", i, d[i], xi[i] - xi[7-i]);
      end
    end
  endtask

  initial begin
    // extremes: all max, all min, alternating max/min
    for (int i = 0; i < 8; i++) x[i] = 8'sd127;
    check_vec();
    for (int i = 0; i < 8; i++) x[i] = -8'sd128;
    check_vec();
    for (int i = 0; i < 8; i++) x[i] = (i < 4) ? 8'sd127 : -8'sd128;
    check_vec();
    for (int i = 0; i < 8; i++) x[i] = (i < 4) ? -8'sd128 : 8'sd127;
    check_vec();
    repeat (500) begin
      for (int i = 0; i < 8; i++) x[i] = DATA_W'($urandom);
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
