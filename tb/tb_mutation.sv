// tb_mutation: drives its own random words, rebuilds the two flip masks
// (AND of alternate words, five each) and checks the mutated children, the
// ready timing (2*MUT_LOG2 clocks after start) and the flip rate near 1/32.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_mutation;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] rnd = 0;
  logic [63:0] gin [2], gout [2];
  logic ready;
  always #5 clk = ~clk;
  mutation #(.GENE_W(64), .MUT_LOG2(5)) dut (.clk, .rst_n, .start, .rnd, .gene_in(gin), .gene_out(gout), .ready);
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    longint flips = 0, bits = 0;
    logic [63:0] m [2];
    gin[0] = 0; gin[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int lat;
      gin[0] = {$urandom, $urandom}; gin[1] = {$urandom, $urandom};
      start = 1; rnd = {$urandom, $urandom};
      @(negedge clk);
      start = 0;
      m[0] = '1; m[1] = '1;
      lat = 0;
      // fold words: first word goes to mask 0 (counter value 10, even)
      for (int k = 0; k < 10; k++) begin
        rnd = {$urandom, $urandom};
        `CHECK(!ready, "not ready while masks build")
        m[k % 2] &= rnd;
        @(negedge clk);
        lat++;
      end
      `CHECK(ready, "ready after 10 clocks")
      `CHECK(lat == 10, "mask latency")
      `CHECK(gout[0] == (gin[0] ^ m[0]), "child 0 mutated by its mask")
      `CHECK(gout[1] == (gin[1] ^ m[1]), "child 1 mutated by its mask")
      flips += $countones(gout[0] ^ gin[0]) + $countones(gout[1] ^ gin[1]);
      bits  += 128;
    end
    // expected rate 1/32 = 0.03125; 256000 bits -> about 8000 flips
    `CHECK(flips > bits/32*90/100 && flips < bits/32*110/100, "flip rate near 1/32")
    $display("flip rate %0d / %0d", flips, bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
