// Self-checking testbench of the PPA adder tree: random signed operands,
// for an odd operand count (padding) and a power of two, compared with a
// plain sum.
module tb_ppa_tree;
  localparam int unsigned N1 = 11, N2 = 16, W = 24;
  logic [W-1:0] op1 [N1], op2 [N2], s1, s2;
  int checks = 0, failures = 0;

  ppa_tree #(.N(N1), .W(W)) dut1 (.op(op1), .sum(s1));
  ppa_tree #(.N(N2), .W(W)) dut2 (.op(op2), .sum(s2));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic signed [W-1:0] r1, r2;
      r1 = '0; r2 = '0;
      for (int i = 0; i < N1; i++) begin
        op1[i] = W'(signed'(18'($urandom))); r1 += signed'(op1[i]);
      end
      for (int i = 0; i < N2; i++) begin
        op2[i] = W'(signed'(18'($urandom))); r2 += signed'(op2[i]);
      end
      #1;
      checks += 2;
      if (s1 !== r1) begin failures++; if (failures < 5) $display("FAIL N1 %h want %h", s1, r1); end
      if (s2 !== r2) begin failures++; if (failures < 5) $display("FAIL N2 %h want %h", s2, r2); end
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
