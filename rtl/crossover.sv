// crossover: uniform crossover of two parent genotypes.
//
// The design applies crossover with probability 1, so every pair of parents
// produces two new children. Where the random mask bit is 1, child_a takes the
// bit of parent_a and child_b that of parent_b; where it is 0 they swap. The
// two children together hold exactly the bits of the two parents. The choice
// of uniform crossover is this implementation's; the operator kind is not
// fixed by the design.
//
// Interface: purely combinational; the caller registers the children.
module crossover #(
  parameter int unsigned GENE_W = gapd_pkg::GENE_W_DEF
) (
  input  logic [GENE_W-1:0] parent_a,
  input  logic [GENE_W-1:0] parent_b,
  input  logic [GENE_W-1:0] mask,
  output logic [GENE_W-1:0] child_a,
  output logic [GENE_W-1:0] child_b
);

  always_comb begin
    child_a = (parent_a & mask) | (parent_b & ~mask);
    child_b = (parent_b & mask) | (parent_a & ~mask);
  end

endmodule
