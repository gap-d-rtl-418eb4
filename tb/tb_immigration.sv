// tb_immigration: random arrivals and random pops; checks that every
// genotype accepted is delivered once, in order, and that the port refuses
// new genotypes while it holds one.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_immigration;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, im_valid = 0, im_ready, valid, pop = 0;
  logic [63:0] im_gene = 0, gene;
  logic [31:0] recv;
  always #5 clk = ~clk;
  immigration #(.GENE_W(64)) dut (.clk, .rst_n, .im_valid, .im_gene, .im_ready, .valid, .gene, .pop, .recv_count(recv));
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [63:0] held; logic full = 0; int n_recv = 0, n_refused = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      im_valid = $urandom % 2; im_gene = {$urandom, $urandom};
      pop = full && ($urandom % 3 == 0);
      `CHECK(im_ready == !full, "ready only when empty")
      `CHECK(valid == full, "valid when holding")
      if (full) `CHECK(gene == held, "held genotype")
      if (im_valid && !full) begin held = im_gene; full = 1; n_recv++; end
      else begin
        if (im_valid) n_refused++;
        if (pop) full = 0;
      end
      @(negedge clk);
      pop = 0;
      `CHECK(recv == 32'(n_recv), "receive count")
    end
    `CHECK(n_refused > 100, "back-pressure exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
