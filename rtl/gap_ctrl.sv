// gap_ctrl: population control of one deme, with the genetic operators.
//
// The deme runs a steady-state GA on a single population memory. After reset
// the unit builds the initial population: POP_SIZE random genotypes, sent in
// pairs to the dispatch unit for evaluation and written to slots 0..POP_SIZE-1.
// It then runs evolution cycles. A cycle reads four individuals at random
// addresses, selects two parents by two tournaments (tournament_sel), makes two
// children by crossover (crossover), mutates them (mutation), and hands the
// pair to dispatch together with the two losers' slots. The first child is
// also offered to the emigration port.
//
// As in the design, genetic operations overlap fitness evaluation: while the
// FEPs evaluate one pair, the next cycle is already being prepared. A second
// state machine writes each evaluated pair back. It reads the old fitness of
// the slot (the convergence monitor's running sum needs it) and then writes
// {fitness, genotype}; it has priority on the single memory port, so a
// candidate read that collides with it waits (counted in rd_block_count). A
// finished pair that dispatch cannot take yet waits too (stall_count).
//
// Timing (this implementation's own; the published chip used 21 clocks per
// cycle): with no waiting, one evolution cycle takes 2*MUT_LOG2+1 = 11 clocks:
// the pair is accepted on clock 0, the four reads go out on clocks 1-4, the
// children are formed on clock 6 and the mutation masks, begun on clock 0, are
// ready on clock 11, which is clock 0 of the next cycle. The write-back of a
// pair takes 5 clocks from dispatch's out_valid to out_ready.
module gap_ctrl #(
  parameter int unsigned POP_SIZE = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned GENE_W   = gapd_pkg::GENE_W_DEF,
  parameter int unsigned FIT_W    = gapd_pkg::FIT_W_DEF,
  parameter int unsigned MUT_LOG2 = gapd_pkg::MUT_LOG2_DEF,
  localparam int unsigned AW      = $clog2(POP_SIZE),
  localparam int unsigned MW      = GENE_W + FIT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [GENE_W-1:0] rnd,
  // population memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [MW-1:0]     mem_wdata,
  input  logic [MW-1:0]     mem_rdata,
  // pair to dispatch
  output logic              disp_in_valid,
  input  logic              disp_in_ready,
  output logic [GENE_W-1:0] disp_in_gene [2],
  output logic [AW-1:0]     disp_in_addr [2],
  output logic              disp_use_imm,
  // evaluated pair from dispatch
  input  logic              disp_out_valid,
  output logic              disp_out_ready,
  input  logic [GENE_W-1:0] disp_out_gene [2],
  input  logic [FIT_W-1:0]  disp_out_fit  [2],
  input  logic [AW-1:0]     disp_out_addr [2],
  // to the convergence monitor
  output logic              upd_valid,
  output logic [FIT_W-1:0]  upd_old_fit,
  output logic [FIT_W-1:0]  upd_new_fit,
  // to emigration
  output logic              em_offer,
  output logic [GENE_W-1:0] em_gene,
  // status
  output logic              running,
  output logic [31:0]       cycle_count,
  output logic [31:0]       stall_count,
  output logic [31:0]       rd_block_count
);

  typedef enum logic [2:0] {G_INIT_A, G_INIT_B, G_INIT_OFFER, G_INIT_WAIT,
                            G_START, G_RD, G_MUT} gen_e;
  typedef enum logic [2:0] {W_IDLE, W_RD0, W_WR0, W_RD1, W_WR1} wb_e;

  gen_e gs;
  wb_e  ws;

  logic [AW:0]       init_pairs;   // pairs handed to dispatch during init
  logic [AW:0]       wb_written;   // words written during init
  logic [2:0]        rd_issued;    // candidate reads issued this cycle
  logic              rd_q;         // a candidate read was issued last clock
  logic [1:0]        rd_idx_q;
  logic [AW-1:0]     rd_addr_q;
  logic [GENE_W-1:0] child [2];
  logic [AW-1:0]     slot  [2];

  // operator datapath
  logic              sel_clear, sel_done;
  logic [GENE_W-1:0] parent_gene [2];
  logic [AW-1:0]     loser_addr  [2];
  logic [GENE_W-1:0] xo_a, xo_b;
  logic              mut_start, mut_ready;
  logic [GENE_W-1:0] mut_gene [2];

  tournament_sel #(.POP_SIZE(POP_SIZE), .GENE_W(GENE_W), .FIT_W(FIT_W)) u_sel (
    .clk, .rst_n, .clear(sel_clear),
    .cand_valid(rd_q), .cand_idx(rd_idx_q), .cand_addr(rd_addr_q),
    .cand_fit(mem_rdata[MW-1 -: FIT_W]), .cand_gene(mem_rdata[GENE_W-1:0]),
    .parent_gene, .loser_addr, .done(sel_done)
  );

  // The crossover mask is sampled on the clock the cycle starts, a clock on
  // which the mutation unit does not use the random word.
  logic [GENE_W-1:0] xo_mask;

  crossover #(.GENE_W(GENE_W)) u_xo (
    .parent_a(parent_gene[0]), .parent_b(parent_gene[1]), .mask(xo_mask),
    .child_a(xo_a), .child_b(xo_b)
  );

  mutation #(.GENE_W(GENE_W), .MUT_LOG2(MUT_LOG2)) u_mut (
    .clk, .rst_n, .start(mut_start), .rnd, .gene_in(child), .gene_out(mut_gene),
    .ready(mut_ready)
  );

  // ---------------- write-back state machine (memory-port priority) -------
  logic wb_port;
  assign wb_port = (ws != W_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ws         <= W_IDLE;
      wb_written <= '0;
    end else begin
      case (ws)
        W_IDLE: if (disp_out_valid) ws <= W_RD0;
        W_RD0:  ws <= W_WR0;
        W_WR0:  ws <= W_RD1;
        W_RD1:  ws <= W_WR1;
        W_WR1:  ws <= W_IDLE;
        default: ws <= W_IDLE;
      endcase
      if (!running && (ws == W_WR0 || ws == W_WR1)) wb_written <= wb_written + 1'b1;
    end
  end

  assign disp_out_ready = (ws == W_WR1);
  assign upd_valid      = (ws == W_WR0) || (ws == W_WR1);
  assign upd_new_fit    = disp_out_fit[ws == W_WR1];
  // during init the slot holds no individual yet, so nothing is removed
  assign upd_old_fit    = running ? mem_rdata[MW-1 -: FIT_W] : '0;

  // ---------------- generation state machine --------------------------------
  logic rd_go, accept;
  assign rd_go  = (gs == G_RD) && (rd_issued < 3'd4) && !wb_port;
  assign accept = disp_in_valid && disp_in_ready;

  always_comb begin
    disp_in_valid = (gs == G_INIT_OFFER) || ((gs == G_MUT) && mut_ready);
    disp_in_gene  = (gs == G_MUT) ? mut_gene : child;
    disp_in_addr  = slot;
    em_offer      = running && accept;
    em_gene       = mut_gene[0];
    sel_clear     = (gs == G_START) || (running && accept);
    mut_start     = sel_clear;
  end
  assign disp_use_imm = running;

  // memory port mux
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    case (ws)
      W_RD0: begin mem_en = 1'b1; mem_addr = disp_out_addr[0]; end
      W_RD1: begin mem_en = 1'b1; mem_addr = disp_out_addr[1]; end
      W_WR0: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = disp_out_addr[0];
                   mem_wdata = {disp_out_fit[0], disp_out_gene[0]}; end
      W_WR1: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = disp_out_addr[1];
                   mem_wdata = {disp_out_fit[1], disp_out_gene[1]}; end
      default: if (rd_go) begin mem_en = 1'b1; mem_addr = rnd[AW-1:0]; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gs             <= G_INIT_A;
      running        <= 1'b0;
      init_pairs     <= '0;
      rd_issued      <= '0;
      rd_q           <= 1'b0;
      rd_idx_q       <= '0;
      rd_addr_q      <= '0;
      cycle_count    <= '0;
      stall_count    <= '0;
      rd_block_count <= '0;
      xo_mask        <= '0;
      for (int i = 0; i < 2; i++) begin
        child[i] <= '0;
        slot[i]  <= '0;
      end
    end else begin
      if (sel_clear) xo_mask <= rnd;
      rd_q      <= rd_go;
      rd_idx_q  <= rd_issued[1:0];
      rd_addr_q <= rnd[AW-1:0];
      if (rd_go) rd_issued <= rd_issued + 1'b1;
      if ((gs == G_RD) && (rd_issued < 3'd4) && wb_port) rd_block_count <= rd_block_count + 1;
      if (disp_in_valid && !disp_in_ready && running) stall_count <= stall_count + 1;

      case (gs)
        // build the initial population: two random genotypes per pair
        G_INIT_A: begin
          child[0] <= rnd;
          slot[0]  <= {init_pairs[AW-2:0], 1'b0};
          slot[1]  <= {init_pairs[AW-2:0], 1'b1};
          gs       <= G_INIT_B;
        end
        G_INIT_B: begin
          child[1] <= rnd;
          gs       <= G_INIT_OFFER;
        end
        G_INIT_OFFER: if (accept) begin
          init_pairs <= init_pairs + 1'b1;
          gs <= (init_pairs == (AW+1)'(POP_SIZE/2 - 1)) ? G_INIT_WAIT : G_INIT_A;
        end
        G_INIT_WAIT: if (wb_written == (AW+1)'(POP_SIZE)) begin
          running <= 1'b1;
          gs      <= G_START;
        end
        G_START: begin
          rd_issued <= '0;
          gs        <= G_RD;
        end
        // four candidate reads, then crossover once selection is complete
        G_RD: if (sel_done && !rd_q) begin
          child[0] <= xo_a;
          child[1] <= xo_b;
          slot     <= loser_addr;
          gs       <= G_MUT;
        end
        // offer the mutated pair; the next cycle starts on acceptance
        G_MUT: if (accept) begin
          cycle_count <= cycle_count + 1;
          rd_issued   <= '0;
          gs          <= G_RD;
        end
        default: gs <= G_INIT_A;
      endcase
    end
  end

  initial assert (POP_SIZE >= 4 && (1 << AW) == POP_SIZE)
    else $error("gap_ctrl: POP_SIZE must be a power of two, at least 4");

  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) !(rd_go && wb_port));

endmodule
