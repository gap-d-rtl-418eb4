// gapd_pkg: sizes and constants shared by the GAP/D genetic-algorithm processor.
//
// The prototype sizes (population 256, 64-bit genotypes, 24-bit fitness,
// crossover probability 1, mutation probability 1/32, threshold 32, four demes)
// are the published configuration of the design. The CA rule vector, the
// gradient interval and the random seeds are this implementation's choices.
// A unit linted on its own uses only some of these constants, so lint lists
// the others as unused parameters; that is expected.
package gapd_pkg;

  localparam int unsigned POP_SIZE_DEF = 256;  // individuals per deme
  localparam int unsigned GENE_W_DEF   = 64;   // genotype length in bits
  localparam int unsigned FIT_W_DEF    = 24;   // fitness length in bits
  localparam int unsigned MUT_LOG2_DEF = 5;    // per-bit mutation probability 2^-5 = 1/32
  localparam int unsigned N_DEMES_DEF  = 4;    // processors in the ring
  localparam int unsigned G_TH_DEF     = 32;   // gradient threshold g_th
  localparam int unsigned DELTA_T_DEF  = 1;    // gradient interval, in generations

  // Hybrid 90/150 null-boundary CA of 64 cells: bit i = 1 makes cell i a
  // rule-150 cell (s[i-1]^s[i]^s[i+1]), 0 a rule-90 cell (s[i-1]^s[i+1]).
  // This vector gives a state cycle of the maximal length 2^64-1.
  localparam logic [63:0] CA_RULE_DEF = 64'hd8f3_3418_f3d4_e711;

  // Default seed of deme d: a fixed constant mixed with d (never zero).
  localparam logic [63:0] CA_SEED_BASE = 64'h9e37_79b9_7f4a_7c15;

  function automatic logic [63:0] deme_seed(int unsigned d);
    logic [31:0] k;
    k = (d + 32'd1) * 32'h85eb_ca6b;
    return CA_SEED_BASE ^ {k, ~k};
  endfunction

endpackage
