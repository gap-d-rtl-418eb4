// immigration: the incoming migration port of a deme.
//
// Receives genotypes sent by the previous processor in the ring and holds one
// until the dispatch unit takes it; the dispatch unit then has it evaluated by
// a local FEP and written into this deme's population in place of a new child.
// The port follows the design; its one-entry buffer and valid/ready handshake
// are this implementation's choices.
//
// Timing: im_ready is high while the buffer is empty; a genotype accepted on
// clock n is on valid/gene from n+1 until a clock with pop. recv_count counts
// accepted genotypes.
module immigration #(
  parameter int unsigned GENE_W = gapd_pkg::GENE_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              im_valid,
  input  logic [GENE_W-1:0] im_gene,
  output logic              im_ready,
  output logic              valid,
  output logic [GENE_W-1:0] gene,
  input  logic              pop,
  output logic [31:0]       recv_count
);

  assign im_ready = !valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid      <= 1'b0;
      gene       <= '0;
      recv_count <= '0;
    end else if (im_valid && im_ready) begin
      valid      <= 1'b1;
      gene       <= im_gene;
      recv_count <= recv_count + 1;
    end else if (pop) begin
      valid <= 1'b0;
    end
  end

  a_pop: assert property (@(posedge clk) disable iff (!rst_n) pop |-> valid);

endmodule
