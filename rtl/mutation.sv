// mutation: flips each bit of the two children with probability 2^-MUT_LOG2.
//
// The design mutates with probability 1/32. A bit of a flip mask is 1 with
// probability 1/32 when it is the AND of five independent random bits, so the
// unit builds one mask per child by AND-ing MUT_LOG2 words from the random
// number generator, taking them on alternate clocks for the two children.
// The masks are then xor-ed into the children. Reading the probability as a
// per-bit rate, and building it this way, are this implementation's choices.
//
// Timing: start (one clock) resets both masks to all ones; the following
// 2*MUT_LOG2 clocks each fold the current rnd word into one mask; ready rises
// after the last one and stays high until the next start. gene_out is
// combinational from gene_in and the masks, and valid while ready is high.
// Mask building may overlap the selection and crossover that produce gene_in.
module mutation #(
  parameter int unsigned GENE_W   = gapd_pkg::GENE_W_DEF,
  parameter int unsigned MUT_LOG2 = gapd_pkg::MUT_LOG2_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [GENE_W-1:0] rnd,
  input  logic [GENE_W-1:0] gene_in  [2],
  output logic [GENE_W-1:0] gene_out [2],
  output logic              ready
);

  localparam int unsigned STEPS = 2 * MUT_LOG2;
  localparam int unsigned CW    = $clog2(STEPS + 1);

  logic [GENE_W-1:0] mask [2];
  logic [CW-1:0]     cnt;   // mask words still to fold in

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mask[0] <= '0;
      mask[1] <= '0;
      cnt     <= '0;
    end else if (start) begin
      mask[0] <= '1;
      mask[1] <= '1;
      cnt     <= CW'(STEPS);
    end else if (cnt != '0) begin
      mask[cnt[0]] <= mask[cnt[0]] & rnd;
      cnt          <= cnt - 1'b1;
    end
  end

  assign ready       = (cnt == '0);
  assign gene_out[0] = gene_in[0] ^ mask[0];
  assign gene_out[1] = gene_in[1] ^ mask[1];

endmodule
