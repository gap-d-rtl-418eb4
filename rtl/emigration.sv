// emigration: the outgoing migration port of a deme.
//
// Processors form a ring, and a genotype that leaves this deme is delivered
// into the population of the next one. Each evolution cycle the population
// controller offers its first new child; the unit keeps it when the
// convergence monitor allows migration (migrate_en) and its one-entry buffer
// is free, and sends it to the next processor with a valid/ready handshake.
// A child offered while the buffer is still full is not migrated and is
// counted in skip_count. Ring migration of new children follows the design;
// the buffer depth, the handshake and the skip rule are this implementation's.
//
// Timing: a child offered on clock n appears on em_valid/em_gene at n+1 and
// stays until a clock with em_ready. The buffer can take a new child on the
// clock it is emptied.
module emigration #(
  parameter int unsigned GENE_W = gapd_pkg::GENE_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              offer,
  input  logic [GENE_W-1:0] offer_gene,
  input  logic              migrate_en,
  output logic              em_valid,
  output logic [GENE_W-1:0] em_gene,
  input  logic              em_ready,
  output logic [31:0]       sent_count,
  output logic [31:0]       skip_count
);

  logic take, space;

  assign space = !em_valid || em_ready;
  assign take  = offer && migrate_en && space;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      em_valid   <= 1'b0;
      em_gene    <= '0;
      sent_count <= '0;
      skip_count <= '0;
    end else begin
      if (em_valid && em_ready) sent_count <= sent_count + 1;
      if (take) begin
        em_valid <= 1'b1;
        em_gene  <= offer_gene;
      end else if (em_ready) begin
        em_valid <= 1'b0;
      end
      if (offer && migrate_en && !space) skip_count <= skip_count + 1;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           em_valid && !em_ready |=> em_valid && $stable(em_gene));

endmodule
