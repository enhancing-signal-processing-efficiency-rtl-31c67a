// Self-checking testbench of the DA multiplier array: random coefficients
// (tables built here from their definition) and random samples, extremes
// included; the sum of the partial products must equal the direct
// convolution sum_k h[k] x[k].
module tb_da_multiplier_array;
  localparam int unsigned DATA_W = 16, COEF_W = 16, TAPS = 8, GRP = 4, G = TAPS / GRP;
  localparam int unsigned LUT_W = COEF_W + 2, PP_W = LUT_W + DATA_W, NPP = G * DATA_W;
  logic signed [DATA_W-1:0] x   [TAPS];
  logic signed [LUT_W-1:0]  lut [G][2**GRP];
  logic signed [PP_W-1:0]   pp  [NPP];
  logic signed [COEF_W-1:0] h   [TAPS];
  int checks = 0, failures = 0;

  da_multiplier_array #(.DATA_W(DATA_W), .COEF_W(COEF_W), .TAPS(TAPS), .GRP(GRP)) dut (.x, .lut, .pp);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      longint want, got;
      for (int k = 0; k < TAPS; k++) begin
        h[k] = COEF_W'($urandom);
        x[k] = DATA_W'($urandom);
        if (t == 0) begin h[k] = -16'sd32768; x[k] = -16'sd32768; end
        if (t == 1) begin h[k] = 16'sd32767;  x[k] = -16'sd32768; end
      end
      for (int g = 0; g < G; g++) for (int a = 0; a < 2**GRP; a++) begin
        int s; s = 0;
        for (int j = 0; j < GRP; j++) if ((a >> j) & 1) s += int'(h[g*GRP+j]);
        lut[g][a] = LUT_W'(s);
      end
      #1;
      want = 0; got = 0;
      for (int k = 0; k < TAPS; k++) want += longint'(h[k]) * longint'(x[k]);
      for (int i = 0; i < NPP; i++) got += longint'(pp[i]);
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d sum=%0d want %0d", t, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
