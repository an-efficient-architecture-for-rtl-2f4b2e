// tb_dct_out_serializer: self-checking test of the in-order output buffer.
// Loads random groups of eight words and checks that word k appears on
// out_data with out_index k exactly k+1 cycles after the load, that
// out_valid is high for those eight cycles only, and that a load in the
// middle of a sequence restarts it with the new words.
module tb_dct_out_serializer;
  localparam int W = 24;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic signed [W-1:0] y [8];
  logic out_valid;
  logic signed [W-1:0] out_data;
  logic [2:0] out_index;
  int checks = 0, failures = 0;

  dct_out_serializer #(.W(W)) dut (.clk, .rst_n, .load, .y, .out_valid, .out_data, .out_index);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called at a falling edge: presents a new group with load high for one
  // cycle, checks the first 'steps' words that follow, and returns at the
  // falling edge where the last of them was checked (so a following call
  // loads back to back). Then checks 'idle' cycles of out_valid low.
  task automatic run(input int steps, input int idle);
    logic signed [W-1:0] words [8];
    for (int k = 0; k < 8; k++) begin words[k] = W'($urandom); y[k] = words[k]; end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int k = 0; k < 8; k++) y[k] = '0;   // must have been captured
    for (int k = 0; k < steps; k++) begin
      checks++;
      if (!out_valid || out_index != 3'(k) || out_data != words[k]) begin
        failures++;
        $display("FAIL step %0d valid=%0b idx=%0d data=%0h exp %0h", k, out_valid, out_index, out_data, words[k]);
      end
      if (k < steps - 1) @(negedge clk);
    end
    repeat (idle) begin
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid high after eight words"); end
    end
  endtask

  initial begin
    for (int k = 0; k < 8; k++) y[k] = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid in reset"); end
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid before any load"); end
    run(8, 4);            // isolated group, then idle
    repeat (20) run(8, 0); // back-to-back groups: load on the 8th word's cycle
    run(3, 0);            // interrupted after three words ...
    run(8, 3);            // ... by a new group, which must start from X0
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
