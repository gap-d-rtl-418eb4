// tb_tournament_sel: loads four random candidates in random order and checks
// the two winners and two losers; ties and equal addresses included.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_tournament_sel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, cand_valid = 0;
  logic [1:0] cand_idx = 0;
  logic [7:0] cand_addr = 0;
  logic [23:0] cand_fit = 0;
  logic [63:0] cand_gene = 0;
  logic [63:0] parent_gene [2];
  logic [7:0] loser_addr [2];
  logic done;
  always #5 clk = ~clk;
  tournament_sel #(.POP_SIZE(256), .GENE_W(64), .FIT_W(24)) dut (
    .clk, .rst_n, .clear, .cand_valid, .cand_idx, .cand_addr, .cand_fit, .cand_gene,
    .parent_gene, .loser_addr, .done);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] a [4]; logic [23:0] f [4]; logic [63:0] g [4];
    int order [4];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      `CHECK(!done, "done low after clear")
      for (int i = 0; i < 4; i++) begin
        a[i] = 8'($urandom); g[i] = {$urandom, $urandom};
        f[i] = (n % 4 == 0) ? 24'($urandom % 3) : 24'($urandom);
        order[i] = i;
      end
      order.shuffle();
      for (int k = 0; k < 4; k++) begin
        cand_valid = 1; cand_idx = 2'(order[k]);
        cand_addr = a[order[k]]; cand_fit = f[order[k]]; cand_gene = g[order[k]];
        @(negedge clk);
        cand_valid = 0;
        if (k < 3) `CHECK(!done, "done only after four candidates")
      end
      `CHECK(done, "done after four candidates")
      for (int p = 0; p < 2; p++) begin
        logic w1;  // candidate 2p+1 wins only when strictly fitter
        w1 = f[2*p+1] > f[2*p];
        `CHECK(parent_gene[p] == (w1 ? g[2*p+1] : g[2*p]), "winner genotype")
        `CHECK(loser_addr[p] == (w1 ? a[2*p] : a[2*p+1]), "loser address")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
