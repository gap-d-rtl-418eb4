// tournament_sel: simplified tournament selection for the steady-state GA.
//
// Each evolution cycle reads four individuals from randomly drawn addresses.
// Candidates 0 and 1 form the first tournament, 2 and 3 the second. The fitter
// individual of each pair becomes a parent (ties go to the lower candidate
// number); the address of the less fit one is where a child of this cycle
// will be written. So one cycle yields two parents and two slots to replace,
// which matches the design's two new genotypes per cycle. The exact
// tournament rules are this implementation's reading of the scheme's name.
//
// Interface: clear starts a new selection. Each clock with cand_valid stores
// the candidate numbered cand_idx. done is high once all four are stored;
// parent_gene and loser_addr are then valid and stay so until the next clear.
module tournament_sel #(
  parameter int unsigned POP_SIZE = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned GENE_W   = gapd_pkg::GENE_W_DEF,
  parameter int unsigned FIT_W    = gapd_pkg::FIT_W_DEF,
  localparam int unsigned AW      = $clog2(POP_SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              cand_valid,
  input  logic [1:0]        cand_idx,
  input  logic [AW-1:0]     cand_addr,
  input  logic [FIT_W-1:0]  cand_fit,
  input  logic [GENE_W-1:0] cand_gene,
  output logic [GENE_W-1:0] parent_gene [2],
  output logic [AW-1:0]     loser_addr  [2],
  output logic              done
);

  logic [AW-1:0]     c_addr [4];
  logic [FIT_W-1:0]  c_fit  [4];
  logic [GENE_W-1:0] c_gene [4];
  logic [3:0]        have;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      have <= '0;
      for (int i = 0; i < 4; i++) begin
        c_addr[i] <= '0;
        c_fit[i]  <= '0;
        c_gene[i] <= '0;
      end
    end else if (cand_valid) begin
      have[cand_idx]   <= 1'b1;
      c_addr[cand_idx] <= cand_addr;
      c_fit[cand_idx]  <= cand_fit;
      c_gene[cand_idx] <= cand_gene;
    end
  end

  // Two binary tournaments: pair p compares candidates 2p and 2p+1.
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      if (c_fit[2*p+1] > c_fit[2*p]) begin
        parent_gene[p] = c_gene[2*p+1];
        loser_addr[p]  = c_addr[2*p];
      end else begin
        parent_gene[p] = c_gene[2*p];
        loser_addr[p]  = c_addr[2*p+1];
      end
    end
  end

  assign done = &have;

endmodule
