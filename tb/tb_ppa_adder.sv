// Self-checking testbench of the parallel prefix adder: random and corner
// operands at two widths, compared with the sum computed by the simulator's
// own arithmetic, carry out included.
module tb_ppa_adder;
  localparam int unsigned W1 = 38;
  localparam int unsigned W2 = 5;
  logic [W1-1:0] a1, b1, s1; logic c1, co1;
  logic [W2-1:0] a2, b2, s2; logic c2, co2;
  int checks = 0, failures = 0;

  ppa_adder #(.W(W1)) dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  ppa_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [W1:0] ref1;
      a1 = {$urandom, $urandom}; b1 = {$urandom, $urandom}; c1 = 1'($urandom);
      if (i == 0) begin a1 = '1; b1 = '0; c1 = 1'b1; end
      if (i == 1) begin a1 = '1; b1 = '1; c1 = 1'b1; end
      #1;
      ref1 = {1'b0, a1} + {1'b0, b1} + (W1+1)'(c1);
      checks++;
      if ({co1, s1} !== ref1) begin
        failures++;
        if (failures < 5) $display("FAIL W=%0d %h+%h+%b = %h, want %h", W1, a1, b1, c1, {co1, s1}, ref1);
      end
    end
    for (int a = 0; a < 32; a++) for (int b = 0; b < 32; b++) for (int c = 0; c < 2; c++) begin
      a2 = W2'(a); b2 = W2'(b); c2 = 1'(c); #1;
      checks++;
      if ({co2, s2} !== 6'(a + b + c)) failures++;
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
