// tb_emigration: offers genotypes with random migrate_en and a random ready
// on the link; checks with a model that exactly the allowed genotypes are
// sent, in order, that skipped offers are counted and the data holds while
// the link is not ready.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_emigration;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, offer = 0, migrate_en = 0, em_ready = 0, em_valid;
  logic [63:0] offer_gene = 0, em_gene;
  logic [31:0] sent, skipped;
  always #5 clk = ~clk;
  emigration #(.GENE_W(64)) dut (.clk, .rst_n, .offer, .offer_gene, .migrate_en, .em_valid, .em_gene,
                                 .em_ready, .sent_count(sent), .skip_count(skipped));
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [63:0] q [$];
    int n_skip = 0, n_sent = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    `CHECK(!em_valid, "empty after reset")
    for (int n = 0; n < 3000; n++) begin
      logic buf_full, will_send;
      offer = ($urandom % 2); migrate_en = ($urandom % 4 != 0); em_ready = ($urandom % 3 == 0);
      offer_gene = {$urandom, $urandom};
      buf_full = (q.size() != 0);
      will_send = buf_full && em_ready;
      if (buf_full) `CHECK(em_valid && em_gene == q[0], "buffered genotype on the link")
      else          `CHECK(!em_valid, "link idle when empty")
      #1;
      if (will_send) begin void'(q.pop_front()); n_sent++; end
      if (offer && migrate_en) begin
        if (q.size() == 0) q.push_back(offer_gene);
        else n_skip++;
      end
      @(negedge clk);
      `CHECK(sent == 32'(n_sent) && skipped == 32'(n_skip), "counters")
    end
    `CHECK(n_skip > 50 && n_sent > 50, "sends and skips exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
