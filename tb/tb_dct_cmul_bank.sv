// tb_dct_cmul_bank: self-checking test of the constant multiplier bank.
// Instantiates one four-lane bank for every constant cos(K*pi/16), K=1..7,
// and sweeps every 9-bit signed operand through each lane (lanes get
// different operands), comparing with a * round(cos(K*pi/16)*2^12)
// computed here with real arithmetic. Also checks that the constants are
// within half an LSB of the true cosines.
module tb_dct_cmul_bank;
  import dct_ref_pkg::*;
  localparam int IN_W = 9;
  localparam int FRAC = 12;
  localparam int PW   = IN_W + FRAC + 1;

  logic signed [IN_W-1:0] a [4];
  logic signed [PW-1:0]   p [7][4];
  int checks = 0, failures = 0;

  for (genvar k = 1; k <= 7; k++) begin : g_bank
    dct_cmul_bank #(.LANES(4), .K(k), .IN_W(IN_W), .COEF_FRAC(FRAC)) dut (.a(a), .p(p[k-1]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (IN_W-1)); v < (1 << (IN_W-1)); v++) begin
      for (int l = 0; l < 4; l++) a[l] = IN_W'(v + 37*l);
      #1;
      for (int k = 1; k <= 7; k++) begin
        for (int l = 0; l < 4; l++) begin
          longint exp_p;
          exp_p = longint'(a[l]) * qcos(k, FRAC);
          checks++;
          if (longint'(p[k-1][l]) != exp_p) begin
            failures++;
            if (failures < 10) $display("FAIL K=%0d lane %0d a=%0d p=%0d exp %0d", k, l, a[l], p[k-1][l], exp_p);
          end
        end
      end
    end
    // The constant itself: product with 1 is the constant, close to cos.
    for (int l = 0; l < 4; l++) a[l] = 1;
    #1;
    for (int k = 1; k <= 7; k++) begin
      real err;
      err = real'(p[k-1][0]) / (2.0 ** FRAC) - $cos(PI * real'(k) / 16.0);
      checks++;
      if (err > 0.5 / (2.0 ** FRAC) || err < -0.5 / (2.0 ** FRAC)) begin
        failures++; $display("FAIL constant K=%0d error %f", k, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
