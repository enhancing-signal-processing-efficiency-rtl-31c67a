// Self-checking testbench of the block DA-LUT FIR filter: random
// coefficients, random sample blocks with random gaps and occasional
// full-scale samples; every output lane is compared with the direct
// convolution of the stream, and each output must appear exactly two
// clocks after its input block. A coefficient change mid-stream checks that
// the new set applies to blocks entering one clock after the change.
module tb_da_fir_block;
  localparam int unsigned DATA_W = 16, COEF_W = 16, TAPS = 16, BLOCK = 4, GRP = 4;
  localparam int unsigned DEPTH = TAPS + BLOCK - 1, ACC_W = DATA_W + COEF_W + 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [DATA_W-1:0] x_in [BLOCK], y_win [DEPTH];
  logic signed [ACC_W-1:0]  y [BLOCK];
  logic signed [DATA_W-1:0] hist [$];          // newest first
  longint exp_q [$];
  int     exp_t [$];
  int checks = 0, failures = 0, cyc = 0;

  da_fir_block #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .BLOCK(BLOCK), .GRP(GRP)) dut (
    .clk, .rst_n, .coef, .in_valid, .x_in, .out_valid, .y, .y_win);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic new_coefs();
    for (int k = 0; k < TAPS; k++) coef[k] = COEF_W'($urandom);
  endtask

  initial begin
    new_coefs();
    for (int i = 0; i < DEPTH; i++) hist.push_front('0);
    for (int i = 0; i < BLOCK; i++) x_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);  // tables take one clock to load
    for (int t = 0; t < 304; t++) begin
      logic v;
      longint e [BLOCK];
      v = ($urandom % 5) != 0;
      if (t == 150) begin new_coefs(); v = 0; end  // change, then one idle clock
      if (t >= 300) v = 0;                         // drain the pipeline
      in_valid = v;
      for (int i = 0; i < BLOCK; i++) begin
        x_in[i] = DATA_W'($urandom);
        if ($urandom % 16 == 0) x_in[i] = -16'sd32768;
      end
      if (v) begin
        for (int i = 0; i < BLOCK; i++) hist.push_front(x_in[i]);
        for (int p = 0; p < BLOCK; p++) begin
          e[p] = 0;
          for (int k = 0; k < TAPS; k++)
            e[p] += longint'(coef[k]) * longint'(hist[BLOCK-1-p+k]);
        end
        for (int p = 0; p < BLOCK; p++) exp_q.push_back(e[p]);
        exp_t.push_back(cyc + 2);
      end
      @(negedge clk);
      if (out_valid) begin
        if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
        else begin
          longint e2 [BLOCK];
          int     tt;
          for (int p = 0; p < BLOCK; p++) e2[p] = exp_q.pop_front();
          tt = exp_t.pop_front();
          checks++;
          if (cyc != tt) begin failures++; $display("FAIL latency: out at %0d want %0d", cyc, tt); end
          for (int p = 0; p < BLOCK; p++) begin
            checks++;
            if (longint'(y[p]) != e2[p]) begin
              failures++;
              if (failures < 6) $display("FAIL t=%0d lane %0d y=%0d want %0d", t, p, y[p], e2[p]);
            end
          end
        end
      end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
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
