// dispatch: feeds the two fitness evaluation processors (FEPs) of a deme.
//
// Every evolution cycle makes two new genotypes, so two FEPs evaluate them at
// the same time, which is how the design doubles fitness-evaluation
// throughput. The unit accepts a pair of genotypes with the memory slots they
// will replace, offers genotype i to FEP i, waits for both fitness results and
// hands the evaluated pair to the write-back. When use_imm is high and the
// immigration buffer holds a genotype, that immigrant takes the place of the
// second genotype of the pair, so it is evaluated locally and enters this
// deme's population. The FEP handshake and the immigrant rule are this
// implementation's choices.
//
// Interface: in_valid/in_ready accept a pair (one pair is in flight at a
// time). fep_req_valid[i]/fep_req_ready[i] pass the genotype; fep_rsp_valid[i]
// is a one-clock pulse carrying fep_rsp_fit[i]. out_valid stays high with the
// evaluated pair until out_ready; out_imm marks a pair whose second genotype
// was an immigrant. imm_pop is high on the clock an immigrant is taken.
module dispatch #(
  parameter int unsigned GENE_W = gapd_pkg::GENE_W_DEF,
  parameter int unsigned FIT_W  = gapd_pkg::FIT_W_DEF,
  parameter int unsigned AW     = $clog2(gapd_pkg::POP_SIZE_DEF)
) (
  input  logic              clk,
  input  logic              rst_n,
  // pair from population control
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [GENE_W-1:0] in_gene [2],
  input  logic [AW-1:0]     in_addr [2],
  // immigration buffer
  input  logic              use_imm,
  input  logic              imm_valid,
  input  logic [GENE_W-1:0] imm_gene,
  output logic              imm_pop,
  // FEP ports
  output logic [1:0]        fep_req_valid,
  output logic [GENE_W-1:0] fep_req_gene [2],
  input  logic [1:0]        fep_req_ready,
  input  logic [1:0]        fep_rsp_valid,
  input  logic [FIT_W-1:0]  fep_rsp_fit [2],
  // evaluated pair to write-back
  output logic              out_valid,
  input  logic              out_ready,
  output logic [GENE_W-1:0] out_gene [2],
  output logic [FIT_W-1:0]  out_fit  [2],
  output logic [AW-1:0]     out_addr [2],
  output logic              out_imm
);

  typedef enum logic [1:0] {SL_IDLE, SL_REQ, SL_WAIT, SL_DONE} slot_e;

  slot_e slot [2];

  assign in_ready = (slot[0] == SL_IDLE) && (slot[1] == SL_IDLE);
  assign imm_pop  = in_valid && in_ready && use_imm && imm_valid;
  assign out_valid = (slot[0] == SL_DONE) && (slot[1] == SL_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_imm <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        slot[i]     <= SL_IDLE;
        out_gene[i] <= '0;
        out_fit[i]  <= '0;
        out_addr[i] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        out_imm <= imm_pop;
        for (int i = 0; i < 2; i++) begin
          slot[i]     <= SL_REQ;
          out_addr[i] <= in_addr[i];
          out_gene[i] <= (i == 1 && imm_pop) ? imm_gene : in_gene[i];
        end
      end
      for (int i = 0; i < 2; i++) begin
        case (slot[i])
          SL_REQ:  if (fep_req_ready[i]) slot[i] <= SL_WAIT;
          SL_WAIT: if (fep_rsp_valid[i]) begin
                     slot[i]    <= SL_DONE;
                     out_fit[i] <= fep_rsp_fit[i];
                   end
          SL_DONE: if (out_valid && out_ready) slot[i] <= SL_IDLE;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      fep_req_valid[i] = (slot[i] == SL_REQ);
      fep_req_gene[i]  = out_gene[i];
    end
  end

  a_rsp: assert property (@(posedge clk) disable iff (!rst_n)
                          fep_rsp_valid[0] |-> slot[0] == SL_WAIT);

endmodule
