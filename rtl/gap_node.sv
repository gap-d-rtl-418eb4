// gap_node: one GAP/D processor, the hardware of one deme.
//
// It joins the problem-independent parts of a genetic algorithm: the cellular-
// automaton random number generator, population control with selection,
// crossover and mutation, the population memory, the convergence monitor
// ("Evaluation") that decides when to migrate, the dispatch unit that drives
// two external fitness evaluation processors (FEPs), and the emigration and
// immigration ports that link it to its neighbours in the ring. The fitness
// function itself lives in the FEPs, outside this module, so the same
// processor serves any problem. The set of units and how they connect follow
// the design; see the unit files for the choices made inside each.
//
// Interface: two FEP ports (request valid/ready with a genotype, response as a
// one-clock valid pulse with the fitness), an outgoing and an incoming
// migration link (valid/ready with a genotype), and status outputs. After
// reset the processor evaluates its random initial population (running low),
// then evolves continuously.
module gap_node #(
  parameter int unsigned POP_SIZE = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned GENE_W   = gapd_pkg::GENE_W_DEF,
  parameter int unsigned FIT_W    = gapd_pkg::FIT_W_DEF,
  parameter int unsigned MUT_LOG2 = gapd_pkg::MUT_LOG2_DEF,
  parameter int unsigned G_TH     = gapd_pkg::G_TH_DEF,
  parameter int unsigned DELTA_T  = gapd_pkg::DELTA_T_DEF,
  parameter logic [GENE_W-1:0] RULE = GENE_W'(gapd_pkg::CA_RULE_DEF),
  parameter logic [GENE_W-1:0] SEED = GENE_W'(gapd_pkg::CA_SEED_BASE),
  localparam int unsigned AW      = $clog2(POP_SIZE)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // FEP ports
  output logic [1:0]              fep_req_valid,
  output logic [GENE_W-1:0]       fep_req_gene [2],
  input  logic [1:0]              fep_req_ready,
  input  logic [1:0]              fep_rsp_valid,
  input  logic [FIT_W-1:0]        fep_rsp_fit [2],
  // migration links
  output logic                    em_valid,
  output logic [GENE_W-1:0]       em_gene,
  input  logic                    em_ready,
  input  logic                    im_valid,
  input  logic [GENE_W-1:0]       im_gene,
  output logic                    im_ready,
  // status
  output logic                    running,
  output logic [FIT_W-1:0]        avg_fit,
  output logic signed [FIT_W+1:0] gradient,
  output logic                    migrate_en,
  output logic [31:0]             gen_count,
  output logic                    gen_tick,
  output logic [31:0]             cycle_count,
  output logic [31:0]             stall_count,
  output logic [31:0]             rd_block_count,
  output logic [31:0]             emig_count,
  output logic [31:0]             emig_skip_count,
  output logic [31:0]             immig_count,
  output logic [31:0]             immig_used_count
);

  localparam int unsigned MW = GENE_W + FIT_W;

  logic [GENE_W-1:0] rnd;
  logic              mem_en, mem_we;
  logic [AW-1:0]     mem_addr;
  logic [MW-1:0]     mem_wdata, mem_rdata;
  logic              din_valid, din_ready, use_imm;
  logic [GENE_W-1:0] din_gene [2];
  logic [AW-1:0]     din_addr [2];
  logic              dout_valid, dout_ready, dout_imm;
  logic [GENE_W-1:0] dout_gene [2];
  logic [FIT_W-1:0]  dout_fit  [2];
  logic [AW-1:0]     dout_addr [2];
  logic              upd_valid;
  logic [FIT_W-1:0]  upd_old_fit, upd_new_fit;
  logic              em_offer;
  logic [GENE_W-1:0] em_offer_gene;
  logic              imm_valid, imm_pop;
  logic [GENE_W-1:0] imm_gene;

  ca_rng #(.W(GENE_W), .RULE(RULE), .SEED(SEED)) u_rng (.clk, .rst_n, .rnd);

  pop_mem #(.DEPTH(POP_SIZE), .W(MW)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  gap_ctrl #(.POP_SIZE(POP_SIZE), .GENE_W(GENE_W), .FIT_W(FIT_W), .MUT_LOG2(MUT_LOG2)) u_ctrl (
    .clk, .rst_n, .rnd,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .disp_in_valid(din_valid), .disp_in_ready(din_ready), .disp_in_gene(din_gene),
    .disp_in_addr(din_addr), .disp_use_imm(use_imm),
    .disp_out_valid(dout_valid), .disp_out_ready(dout_ready), .disp_out_gene(dout_gene),
    .disp_out_fit(dout_fit), .disp_out_addr(dout_addr),
    .upd_valid, .upd_old_fit, .upd_new_fit,
    .em_offer, .em_gene(em_offer_gene),
    .running, .cycle_count, .stall_count, .rd_block_count
  );

  conv_monitor #(.POP_SIZE(POP_SIZE), .FIT_W(FIT_W), .G_TH(G_TH), .DELTA_T(DELTA_T)) u_eval (
    .clk, .rst_n, .upd_valid, .upd_old_fit, .upd_new_fit,
    .avg_fit, .gradient, .migrate_en, .gen_count, .gen_tick
  );

  dispatch #(.GENE_W(GENE_W), .FIT_W(FIT_W), .AW(AW)) u_disp (
    .clk, .rst_n,
    .in_valid(din_valid), .in_ready(din_ready), .in_gene(din_gene), .in_addr(din_addr),
    .use_imm, .imm_valid, .imm_gene, .imm_pop,
    .fep_req_valid, .fep_req_gene, .fep_req_ready, .fep_rsp_valid, .fep_rsp_fit,
    .out_valid(dout_valid), .out_ready(dout_ready), .out_gene(dout_gene),
    .out_fit(dout_fit), .out_addr(dout_addr), .out_imm(dout_imm)
  );

  emigration #(.GENE_W(GENE_W)) u_emig (
    .clk, .rst_n, .offer(em_offer), .offer_gene(em_offer_gene), .migrate_en,
    .em_valid, .em_gene, .em_ready, .sent_count(emig_count), .skip_count(emig_skip_count)
  );

  immigration #(.GENE_W(GENE_W)) u_immig (
    .clk, .rst_n, .im_valid, .im_gene, .im_ready,
    .valid(imm_valid), .gene(imm_gene), .pop(imm_pop), .recv_count(immig_count)
  );

  // immigrants that have been evaluated and written into this population
  always_ff @(posedge clk) begin
    if (!rst_n)                                 immig_used_count <= '0;
    else if (dout_valid && dout_ready && dout_imm) immig_used_count <= immig_used_count + 1;
  end

endmodule
