// gapd_top: GAP/D, a distributed genetic algorithm with adaptive migration.
//
// N_DEMES processors (gap_node) each evolve their own population (deme) with
// a steady-state GA. They are connected in a ring: the emigration port of
// deme d feeds the immigration port of deme (d+1) mod N_DEMES. A deme sends
// its new genotypes to its neighbour only while its own average-fitness curve
// is flat (gradient at or below G_TH), so migration happens when a deme is
// about to converge rather than at a fixed rate. Each deme has two fitness
// evaluation processor (FEP) ports, brought out here because the fitness
// function is problem-specific. The ring, four demes, the threshold of 32 and
// the population sizes follow the design; each deme gets its own random seed
// (this implementation's choice) so that the demes evolve differently.
//
// Interface: per deme and FEP, fep_req_valid/fep_req_ready pass a genotype and
// fep_rsp_valid (a one-clock pulse) returns its fitness. The status outputs
// show each deme's average fitness at the last generation boundary, its
// migration flag and counters of the events inside it.
module gapd_top #(
  parameter int unsigned N_DEMES  = gapd_pkg::N_DEMES_DEF,
  parameter int unsigned POP_SIZE = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned GENE_W   = gapd_pkg::GENE_W_DEF,
  parameter int unsigned FIT_W    = gapd_pkg::FIT_W_DEF,
  parameter int unsigned MUT_LOG2 = gapd_pkg::MUT_LOG2_DEF,
  parameter int unsigned G_TH     = gapd_pkg::G_TH_DEF,
  parameter int unsigned DELTA_T  = gapd_pkg::DELTA_T_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic [1:0]              fep_req_valid [N_DEMES],
  output logic [GENE_W-1:0]       fep_req_gene  [N_DEMES][2],
  input  logic [1:0]              fep_req_ready [N_DEMES],
  input  logic [1:0]              fep_rsp_valid [N_DEMES],
  input  logic [FIT_W-1:0]        fep_rsp_fit   [N_DEMES][2],
  output logic [N_DEMES-1:0]      running,
  output logic [N_DEMES-1:0]      migrate_en,
  output logic [N_DEMES-1:0]      gen_tick,
  output logic [FIT_W-1:0]        avg_fit          [N_DEMES],
  output logic signed [FIT_W+1:0] gradient         [N_DEMES],
  output logic [31:0]             gen_count        [N_DEMES],
  output logic [31:0]             cycle_count      [N_DEMES],
  output logic [31:0]             stall_count      [N_DEMES],
  output logic [31:0]             rd_block_count   [N_DEMES],
  output logic [31:0]             emig_count       [N_DEMES],
  output logic [31:0]             emig_skip_count  [N_DEMES],
  output logic [31:0]             immig_count      [N_DEMES],
  output logic [31:0]             immig_used_count [N_DEMES]
);

  logic [N_DEMES-1:0] em_valid, em_ready;
  logic [GENE_W-1:0]  em_gene [N_DEMES];

  for (genvar d = 0; d < N_DEMES; d++) begin : g_deme
    localparam int unsigned PREV = (d + N_DEMES - 1) % N_DEMES;

    gap_node #(
      .POP_SIZE(POP_SIZE), .GENE_W(GENE_W), .FIT_W(FIT_W), .MUT_LOG2(MUT_LOG2),
      .G_TH(G_TH), .DELTA_T(DELTA_T),
      .RULE(GENE_W'(gapd_pkg::CA_RULE_DEF)), .SEED(GENE_W'(gapd_pkg::deme_seed(d)))
    ) u_node (
      .clk, .rst_n,
      .fep_req_valid(fep_req_valid[d]), .fep_req_gene(fep_req_gene[d]),
      .fep_req_ready(fep_req_ready[d]), .fep_rsp_valid(fep_rsp_valid[d]),
      .fep_rsp_fit(fep_rsp_fit[d]),
      .em_valid(em_valid[d]), .em_gene(em_gene[d]), .em_ready(em_ready[d]),
      .im_valid(em_valid[PREV]), .im_gene(em_gene[PREV]), .im_ready(em_ready[PREV]),
      .running(running[d]), .avg_fit(avg_fit[d]), .gradient(gradient[d]),
      .migrate_en(migrate_en[d]), .gen_count(gen_count[d]), .gen_tick(gen_tick[d]), .cycle_count(cycle_count[d]),
      .stall_count(stall_count[d]), .rd_block_count(rd_block_count[d]),
      .emig_count(emig_count[d]), .emig_skip_count(emig_skip_count[d]),
      .immig_count(immig_count[d]), .immig_used_count(immig_used_count[d])
    );
  end

endmodule
