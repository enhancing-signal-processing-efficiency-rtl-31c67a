// Self-checking testbench of the DA look-up table bank: after each clock
// every entry of every group must equal the sum of the coefficients its
// address bits select, computed here independently; reset clears the bank.
module tb_da_lut_bank;
  localparam int unsigned COEF_W = 16, TAPS = 12, GRP = 4, G = TAPS / GRP;
  localparam int unsigned LUT_W = COEF_W + 2;
  logic clk = 0, rst_n = 0;
  logic signed [COEF_W-1:0] coef [TAPS];
  logic signed [LUT_W-1:0]  lut  [G][2**GRP];
  int checks = 0, failures = 0;

  da_lut_bank #(.COEF_W(COEF_W), .TAPS(TAPS), .GRP(GRP)) dut (.clk, .rst_n, .coef, .lut);

  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < TAPS; k++) coef[k] = COEF_W'($urandom);
    @(negedge clk);
    for (int g = 0; g < G; g++) for (int a = 0; a < 2**GRP; a++) begin
      checks++; if (lut[g][a] !== '0) failures++;
    end
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      for (int k = 0; k < TAPS; k++) coef[k] = (t == 0) ? -16'sd32768 : COEF_W'($urandom);
      @(negedge clk);
      for (int g = 0; g < G; g++) for (int a = 0; a < 2**GRP; a++) begin
        int want;
        want = 0;
        for (int j = 0; j < GRP; j++) if ((a >> j) & 1) want += int'(coef[g*GRP+j]);
        checks++;
        if (int'(lut[g][a]) != want) begin
          failures++;
          if (failures < 5) $display("FAIL lut[%0d][%0d]=%0d want %0d", g, a, lut[g][a], want);
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
