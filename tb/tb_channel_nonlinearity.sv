// Self-checking testbench of the channel nonlinearity: random filter sums
// (scaled back by the coefficient fraction), random clip levels and noise,
// compared with the saturate-limit-add-saturate rule computed in integers.
// Counts how often the limiter and the output saturation acted.
module tb_channel_nonlinearity;
  localparam int unsigned DATA_W = 16, IN_W = 38, SHIFT = 15, BLOCK = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [IN_W-1:0]   y [BLOCK];
  logic signed [DATA_W-1:0] noise [BLOCK], r [BLOCK];
  logic        [DATA_W-2:0] clip_level;
  int checks = 0, failures = 0, clipped = 0, saturated = 0;

  channel_nonlinearity #(.DATA_W(DATA_W), .IN_W(IN_W), .SHIFT(SHIFT), .BLOCK(BLOCK)) dut (
    .clk, .rst_n, .in_valid, .y, .noise, .clip_level, .out_valid, .r);

  always #5 clk = ~clk;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    int want [BLOCK];
    for (int i = 0; i < BLOCK; i++) begin y[i] = '0; noise[i] = '0; end
    clip_level = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      in_valid = 1;
      clip_level = (t % 3 == 0) ? 15'h7fff : 15'($urandom % 32768);
      for (int i = 0; i < BLOCK; i++) begin
        longint s;
        int v, c;
        y[i] = IN_W'(signed'(36'({$urandom, $urandom})));
        if ($urandom % 2) y[i] = y[i] >>> 14;
        noise[i] = DATA_W'(signed'(14'($urandom)));
        s = longint'(y[i]) >>> SHIFT;
        v = sat16(s);
        c = int'(clip_level);
        if (v > c)  begin v = c;  clipped++; end
        if (v < -c) begin v = -c; clipped++; end
        if ((v + int'(noise[i])) != sat16(v + int'(noise[i]))) saturated++;
        want[i] = sat16(v + int'(noise[i]));
      end
      @(negedge clk);
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < BLOCK; i++) begin
        checks++;
        if (int'(r[i]) != want[i]) begin
          failures++;
          if (failures < 5) $display("FAIL r=%0d want %0d", r[i], want[i]);
        end
      end
    end
    checks++;
    if (clipped == 0 || saturated == 0) begin
      failures++; $display("FAIL limiter %0d / saturation %0d never exercised", clipped, saturated);
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
