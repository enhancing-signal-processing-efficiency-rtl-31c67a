// Self-checking testbench of the reference delay: a counting-plus-random
// stream with gaps; each output lane must be the input DELAY samples
// earlier (zero before the start), PIPE clocks after its block entered.
module tb_ref_delay;
  localparam int unsigned DATA_W = 16, BLOCK = 4, DELAY = 6, PIPE = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] s_in [BLOCK], d_out [BLOCK];
  logic signed [DATA_W-1:0] stream [$];
  logic signed [DATA_W-1:0] exp_q [$];
  int exp_t [$];
  int checks = 0, failures = 0, cyc = 0;

  ref_delay #(.DATA_W(DATA_W), .BLOCK(BLOCK), .DELAY(DELAY), .PIPE(PIPE)) dut (
    .clk, .rst_n, .in_valid, .s_in, .out_valid, .d_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    for (int i = 0; i < BLOCK; i++) s_in[i] = '0;
    for (int i = 0; i < DELAY; i++) stream.push_back('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic v;
      v = ($urandom % 3) != 0;
      in_valid = v;
      for (int i = 0; i < BLOCK; i++) s_in[i] = DATA_W'($urandom);
      if (v) begin
        for (int i = 0; i < BLOCK; i++) stream.push_back(s_in[i]);
        for (int i = 0; i < BLOCK; i++) exp_q.push_back(stream[stream.size() - BLOCK - DELAY + i]);
        exp_t.push_back(cyc + PIPE);
      end
      @(negedge clk);
      if (out_valid) begin
        logic signed [DATA_W-1:0] e2 [BLOCK];
        int tt;
        checks++;
        if (exp_q.size() == 0) failures++;
        else begin
          for (int i = 0; i < BLOCK; i++) e2[i] = exp_q.pop_front();
          tt = exp_t.pop_front();
          if (tt != cyc) begin failures++; $display("FAIL latency %0d want %0d", cyc, tt); end
          for (int i = 0; i < BLOCK; i++) begin
            checks++;
            if (d_out[i] !== e2[i]) begin
              failures++;
              if (failures < 5) $display("FAIL lane %0d d=%0d want %0d", i, d_out[i], e2[i]);
            end
          end
        end
      end
    end
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
