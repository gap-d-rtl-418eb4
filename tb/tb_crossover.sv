// tb_crossover: random parents and masks; each child bit is checked against
// the parent the mask selects.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_crossover;
  int checks = 0, failures = 0;
  logic [63:0] a, b, m, ca, cb;
  crossover #(.GENE_W(64)) dut (.parent_a(a), .parent_b(b), .mask(m), .child_a(ca), .child_b(cb));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; m = {$urandom, $urandom};
      if (n == 0) m = '1;
      if (n == 1) m = '0;
      #1;
      for (int i = 0; i < 64; i++) begin
        `CHECK(ca[i] == (m[i] ? a[i] : b[i]), "child_a bit")
        `CHECK(cb[i] == (m[i] ? b[i] : a[i]), "child_b bit")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
