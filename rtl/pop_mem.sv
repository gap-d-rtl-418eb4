// pop_mem: the population memory of one deme.
//
// One word per individual, {fitness, genotype}. In the steady-state GA a single
// memory serves selection (reads) and the write-back of evaluated children
// (writes), so one synchronous port is enough: the population controller
// arbitrates between the two users. The single memory follows the design; the
// port arrangement is this implementation's choice.
//
// Timing: when en is high the word at addr is written (we=1) or read (we=0);
// read data appears on rdata on the next clock and holds until the next read.
// The memory has no reset: the controller writes every word while it builds
// the initial population, before the first read.
module pop_mem #(
  parameter int unsigned DEPTH = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned W     = gapd_pkg::GENE_W_DEF + gapd_pkg::FIT_W_DEF,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
