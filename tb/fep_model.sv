// fep_model: behavioural fitness evaluation processor for simulation.
//
// The GA processor leaves the fitness function to external FEPs. This model
// evaluates the Royal-Road function: the genotype is cut into blocks of
// BLOCK bits, and every block whose bits are all 1 adds BLOCK*SCALE to the
// fitness. Partial blocks earn nothing, which makes the landscape flat almost
// everywhere, so a GA climbs it slowly.
//
// Handshake: req_ready is high while the model is idle; a genotype accepted
// on clock n is answered with a one-clock rsp_valid pulse after a latency
// drawn uniformly from [LAT_MIN, LAT_MAX] clocks (at least 1).
module fep_model #(
  parameter int unsigned GENE_W  = 64,
  parameter int unsigned FIT_W   = 24,
  parameter int unsigned BLOCK   = 8,
  parameter int unsigned SCALE   = 64,
  parameter int unsigned LAT_MIN = 1,
  parameter int unsigned LAT_MAX = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic [GENE_W-1:0] req_gene,
  output logic              req_ready,
  output logic              rsp_valid,
  output logic [FIT_W-1:0]  rsp_fit
);

  function automatic logic [FIT_W-1:0] royal_road(logic [GENE_W-1:0] g);
    int unsigned f = 0;
    for (int b = 0; b < GENE_W / BLOCK; b++) begin
      logic all1 = 1'b1;
      for (int i = 0; i < BLOCK; i++) all1 &= g[b*BLOCK+i];
      if (all1) f += BLOCK * SCALE;
    end
    return FIT_W'(f);
  endfunction

  int unsigned       wait_cnt;
  logic              busy;
  logic [GENE_W-1:0] held;

  assign req_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_fit   <= '0;
      wait_cnt  <= 0;
      held      <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy     <= 1'b1;
        held     <= req_gene;
        wait_cnt <= LAT_MIN + ((LAT_MAX > LAT_MIN) ? ($urandom % (LAT_MAX - LAT_MIN + 1)) : 0);
      end else if (busy) begin
        if (wait_cnt <= 1) begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_fit   <= royal_road(held);
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end

endmodule
