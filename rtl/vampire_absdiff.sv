// vampire_absdiff: absolute difference of one stored codeword component and
// one input component, computed the way the associative-memory chip does it.
//
// A greater-than signal ripples from the least- to the most-significant bit
// (GT_IN -> GT_OUT of each bit cell); the final GT tells which operand is the
// larger. The larger operand is one's-complemented and added to the smaller
// with a ripple carry, and the sum is one's-complemented again:
// ~(~L + S) = L - S. No two's-complement negation is needed.
// Purely combinational. Ports: c (stored component), i (input component),
// gt (c > i), d (|c - i|).
module vampire_absdiff #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] c,
  input  logic [W-1:0] i,
  output logic         gt,
  output logic [W-1:0] d
);

  logic [W:0]   gt_chain;   // gt_chain[b] = GT_IN of bit b
  logic [W:0]   carry;      // CIN-DIFF / COUT-DIFF chain
  logic [W-1:0] larger_n;   // one's complement of the larger operand
  logic [W-1:0] smaller;
  logic [W-1:0] sum;

  assign gt_chain[0] = 1'b0;
  for (genvar b = 0; b < W; b++) begin : g_gt
    assign gt_chain[b+1] = (c[b] & ~i[b]) | (gt_chain[b] & ~(c[b] ^ i[b]));
  end
  assign gt       = gt_chain[W];
  assign larger_n = gt ? ~c : ~i;
  assign smaller  = gt ? i : c;

  assign carry[0] = 1'b0;
  for (genvar b = 0; b < W; b++) begin : g_add
    assign sum[b]     = larger_n[b] ^ smaller[b] ^ carry[b];
    assign carry[b+1] = (larger_n[b] & smaller[b]) | (carry[b] & (larger_n[b] ^ smaller[b]));
  end
  assign d = ~sum;

endmodule
