// Adder tree of parallel prefix adders.
//
// Sums N two's-complement operands of W bits each into one W-bit result.
// The operands are padded with zeros to a power of two and added pairwise in
// log2(N) levels, every adder being a ppa_adder, so the depth of the whole
// accumulation is log2(N) prefix adders. The caller picks W wide enough for
// the full sum: no bit is dropped inside (the sum is taken modulo 2^W).
// Purely combinational. This is how the filter accumulates the partial
// products of one output in parallel; the balanced binary tree is this
// design's choice.
module ppa_tree #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] op  [N],
  output logic [W-1:0] sum
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned NP     = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] s [NP >> l];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < NP; i++) begin : g_op
        if (i < N) begin : g_used
          assign s[i] = op[i];
        end else begin : g_pad
          assign s[i] = '0;
        end
      end
    end else begin : g_add
      for (genvar i = 0; i < (NP >> l); i++) begin : g_node
        logic unused_cout;
        ppa_adder #(.W(W)) u_add (
          .a   (g_lvl[l-1].s[2*i]),
          .b   (g_lvl[l-1].s[2*i+1]),
          .cin (1'b0),
          .sum (s[i]),
          .cout(unused_cout)
        );
      end
    end
  end

  assign sum = g_lvl[LEVELS].s[0];
endmodule
