// Self-checking testbench of the coefficient register chain: reset value,
// a full serial load (last value entered lands in register 0), holding while
// load is low, and a partial reload.
module tb_coef_reg_chain;
  localparam int unsigned TAPS = 8, COEF_W = 16;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [COEF_W-1:0] coef_in, coef [TAPS];
  logic signed [COEF_W-1:0] model [TAPS];
  int checks = 0, failures = 0;

  coef_reg_chain #(.COEF_W(COEF_W), .TAPS(TAPS)) dut (.clk, .rst_n, .load, .coef_in, .coef);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (coef[i] !== model[i]) begin
        failures++;
        if (failures < 8) $display("FAIL %s coef[%0d]=%0d want %0d", what, i, coef[i], model[i]);
      end
    end
  endtask

  initial begin
    coef_in = '0;
    for (int i = 0; i < TAPS; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      load = 1'($urandom) | (r < TAPS);
      coef_in = COEF_W'($urandom);
      @(posedge clk);
      if (load) begin
        for (int i = TAPS - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = coef_in;
      end
      @(negedge clk);
      compare("shift");
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
