// Self-checking testbench of the block delay line: random blocks with
// random gaps; after each clock the window must hold the latest DEPTH
// samples of the stream newest first (zeros before the first), and
// out_valid must follow in_valid by one clock.
module tb_tap_delay_line;
  localparam int unsigned DATA_W = 16, BLOCK = 4, DEPTH = 11;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] x_in [BLOCK], win [DEPTH];
  logic signed [DATA_W-1:0] hist [$];
  int checks = 0, failures = 0;

  tap_delay_line #(.DATA_W(DATA_W), .BLOCK(BLOCK), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .win);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) hist.push_front('0);
    for (int i = 0; i < BLOCK; i++) x_in[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic v;
      v = ($urandom % 4) != 0;
      in_valid = v;
      for (int i = 0; i < BLOCK; i++) x_in[i] = DATA_W'($urandom);
      @(negedge clk);
      if (v) for (int i = 0; i < BLOCK; i++) hist.push_front(x_in[i]);
      checks++;
      if (out_valid !== v) failures++;
      for (int j = 0; j < DEPTH; j++) begin
        checks++;
        if (win[j] !== hist[j]) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d win[%0d]=%0d want %0d", t, j, win[j], hist[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
