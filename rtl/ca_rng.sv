// ca_rng: random number generator built from a linear cellular automaton.
//
// W cells in a line with null (zero) boundaries. On every clock each cell takes
// the xor of its two neighbours (rule 90), and also its own value when
// RULE[i] is set (rule 150). Such a hybrid 90/150 automaton is a linear machine
// over GF(2); with the default rule vector its state runs through all 2^64-1
// nonzero values before repeating, and neighbouring bits are far less
// correlated than in a shift-register (LFSR) generator, whose state only shifts.
//
// Using a cellular automaton follows the design; the cell count, the rule
// vector and the seed are this implementation's choices.
//
// Interface: rnd is the current state and changes on every clock after reset.
// Reset (synchronous, active low) loads SEED, which must be nonzero.
module ca_rng #(
  parameter int unsigned W    = gapd_pkg::GENE_W_DEF,
  parameter logic [W-1:0] RULE = W'(gapd_pkg::CA_RULE_DEF),
  parameter logic [W-1:0] SEED = W'(gapd_pkg::CA_SEED_BASE)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] rnd
);

  logic [W-1:0] state, nxt;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic l, r;
      l = (i > 0)     ? state[(i > 0) ? i-1 : 0]       : 1'b0;
      r = (i < W - 1) ? state[(i < W - 1) ? i+1 : W-1] : 1'b0;
      nxt[i] = l ^ r ^ (RULE[i] & state[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= SEED;
    else        state <= nxt;
  end

  assign rnd = state;

  initial assert (SEED != '0) else $error("ca_rng: SEED must be nonzero");

endmodule
