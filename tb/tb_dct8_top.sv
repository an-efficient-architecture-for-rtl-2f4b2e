// tb_dct8_top: end-to-end test of the 8-point DCT at its default sizes.
//
// Streams 400 frames of samples into the top, some at one sample per clock
// (frames back to back), some with random gaps in in_valid, and some at full
// scale (all +127, all -128, alternating signs, step). Every frame is
// transformed here directly from the DCT definition. Checked:
//  * out_valid pulses exactly one clock after the eighth sample of each
//    frame is accepted, and at no other time;
//  * X[0..7] then equal the definition computed with the same rounded
//    cosines (bit-exact) and are within 0.2 of the real-valued DCT;
//  * the serial port gives X0..X7 in order on the eight clocks after
//    out_valid, and ser_valid is low otherwise.
// Each mechanism (input gap, back-to-back frames, full-scale frame, a
// complete in-order serial sequence) is counted and must occur.
module tb_dct8_top;
  import dct_ref_pkg::*;
  localparam int DATA_W = dct8_pkg::DATA_W_DEF;
  localparam int FRAC   = dct8_pkg::COEF_FRAC_DEF;
  localparam int OW     = DATA_W + FRAC + 4;
  localparam int NFRAMES = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid, ser_valid;
  logic signed [OW-1:0] X [8];
  logic signed [OW-1:0] ser_data;
  logic [2:0] ser_index;

  int checks = 0, failures = 0;
  int n_gaps = 0, n_back_to_back = 0, n_full_scale = 0, n_serial_seq = 0, n_frames_out = 0;

  dct8_top dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .X, .ser_valid, .ser_data, .ser_index);

  always #5 clk = ~clk;

  initial begin
    repeat (NFRAMES * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int     cycle;       // cycle at which the check applies
    int     k;           // coefficient index
    longint value;       // expected value
  } exp_t;

  typedef struct {
    int cycle;
    int x [8];
  } frame_t;

  frame_t par_q [$];
  exp_t   ser_q [$];

  function automatic int gen_sample(input int f, input int n);
    case (f % 10)
      3: return 127;
      4: return -128;
      5: return (n % 2 != 0) ? -128 : 127;
      6: return (n < 4) ? 127 : -128;
      default: return int'($signed(DATA_W'($urandom)));
    endcase
  endfunction

  initial begin
    int cyc, f, n, fill, last_done, ser_run;
    int cur [8];
    bit gappy;
    cyc = 0; f = 0; n = 0; last_done = -100; ser_run = 0;
    gappy = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (f < NFRAMES || par_q.size() != 0 || ser_q.size() != 0) begin
      // drive
      @(negedge clk);
      if (n == 0) gappy = ($urandom_range(0, 2) == 0);
      if (f < NFRAMES && !(gappy && $urandom_range(0, 3) == 0)) begin
        in_valid = 1'b1;
        cur[n]   = gen_sample(f, n);
        in_data  = DATA_W'(cur[n]);
      end else begin
        in_valid = 1'b0;
        in_data  = DATA_W'($urandom);
        if (f < NFRAMES) n_gaps++;
      end
      @(posedge clk);
      cyc++;
      if (in_valid) begin
        n++;
        if (n == 8) begin
          frame_t fr;
          fr.cycle = cyc + 1;
          fr.x = cur;
          par_q.push_back(fr);
          for (int k = 0; k < 8; k++)
            ser_q.push_back('{cycle: cyc + 2 + k, k: k, value: ref_dct_q(k, cur, FRAC)});
          if (cyc - last_done == 8) n_back_to_back++;
          if (f % 10 >= 3 && f % 10 <= 6) n_full_scale++;
          last_done = cyc;
          n = 0;
          f++;
        end
      end
      #1;
      // parallel output
      checks++;
      if (par_q.size() != 0 && par_q[0].cycle == cyc) begin
        frame_t fr;
        fr = par_q.pop_front();
        n_frames_out++;
        if (!out_valid) begin failures++; $display("FAIL cycle %0d: out_valid missing", cyc); end
        for (int k = 0; k < 8; k++) begin
          longint e;
          real err;
          e = ref_dct_q(k, fr.x, FRAC);
          checks++;
          if (longint'(X[k]) != e) begin
            failures++;
            if (failures < 20) $display("FAIL cycle %0d: X%0d = %0d exp %0d", cyc, k, X[k], e);
          end
          err = real'(X[k]) / (2.0 ** FRAC) - ref_dct_r(k, fr.x);
          checks++;
          if (err > 0.2 || err < -0.2) begin failures++; $display("FAIL X%0d off by %f", k, err); end
        end
      end else if (out_valid) begin
        failures++; $display("FAIL cycle %0d: unexpected out_valid", cyc);
      end
      // serial output
      checks++;
      if (ser_q.size() != 0 && ser_q[0].cycle == cyc) begin
        exp_t e;
        e = ser_q.pop_front();
        if (!ser_valid || int'(ser_index) != e.k || longint'(ser_data) != e.value) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d: serial valid=%0b idx=%0d data=%0d exp X%0d=%0d",
                                      cyc, ser_valid, ser_index, ser_data, e.k, e.value);
          ser_run = 0;
        end else begin
          ser_run = (e.k == ser_run) ? ser_run + 1 : 0;
          if (ser_run == 8) begin n_serial_seq++; ser_run = 0; end
        end
      end else if (ser_valid) begin
        failures++; $display("FAIL cycle %0d: unexpected ser_valid", cyc);
      end
    end
    checks++;
    if (n_frames_out != NFRAMES) begin failures++; $display("FAIL %0d frames out", n_frames_out); end
    checks++;
    if (n_gaps == 0) begin failures++; $display("FAIL no input gap exercised"); end
    checks++;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back frames"); end
    checks++;
    if (n_full_scale == 0) begin failures++; $display("FAIL no full-scale frame"); end
    checks++;
    if (n_serial_seq == 0) begin failures++; $display("FAIL no complete serial sequence"); end
    $display("frames=%0d gaps=%0d back_to_back=%0d full_scale=%0d serial_sequences=%0d",
             n_frames_out, n_gaps, n_back_to_back, n_full_scale, n_serial_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
