// Self-checking testbench of the decimator: a numbered sample stream with
// random gaps and run-time factor changes (1, 2, 3, 5, 8 and 0); the packed
// outputs must be exactly the samples a sample-by-sample model keeps: every
// M-th, restarting at the first sample after each factor change.
module tb_decimator;
  localparam int unsigned DATA_W = 16, BLOCK = 8, MAX_M = 8;
  localparam int unsigned MW = 4, CW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [MW-1:0] factor;
  logic [CW-1:0] count;
  logic signed [DATA_W-1:0] x_in [BLOCK], y_out [BLOCK];
  logic signed [DATA_W-1:0] kept [$];
  int checks = 0, failures = 0, changes = 0, sample_no = 0, phase = 0, m_prev = 1;

  decimator #(.DATA_W(DATA_W), .BLOCK(BLOCK), .MAX_M(MAX_M)) dut (
    .clk, .rst_n, .factor, .in_valid, .x_in, .out_valid, .count, .y_out);

  always #5 clk = ~clk;

  initial begin
    int mlist [6] = '{1, 2, 3, 5, 8, 0};
    factor = 1;
    for (int i = 0; i < BLOCK; i++) x_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic v;
      int m;
      if (t % 40 == 0) factor = MW'(mlist[(t / 40) % 6]);
      m = (factor == 0) ? 1 : int'(factor);
      if (m != m_prev) begin phase = 0; changes++; end
      m_prev = m;
      v = ($urandom % 4) != 0;
      in_valid = v;
      for (int i = 0; i < BLOCK; i++) x_in[i] = DATA_W'(sample_no + i);
      if (v) begin
        for (int i = 0; i < BLOCK; i++) begin
          if (phase == 0) kept.push_back(x_in[i]);
          phase = (phase == m - 1) ? 0 : phase + 1;
        end
        sample_no += BLOCK;
      end
      @(negedge clk);
      checks++;
      if (out_valid != (count != 0)) failures++;
      if (!v && out_valid) failures++;
      for (int i = 0; i < int'(count); i++) begin
        checks++;
        if (kept.size() == 0) begin failures++; break; end
        if (y_out[i] !== kept[0]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d lane %0d got %0d want %0d", t, i, y_out[i], kept[0]);
        end
        void'(kept.pop_front());
      end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (kept.size() != 0) begin failures++; $display("FAIL %0d kept samples never output", kept.size()); end
    checks++;
    if (changes < 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
