// tb_ca_rng: checks the cellular-automaton generator against a word-level
// model of the same 90/150 automaton, for two seeds, and checks that the
// state never becomes zero and that the first state does not recur early.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_ca_rng;
  localparam logic [63:0] RULE = 64'hd8f3_3418_f3d4_e711;
  localparam logic [63:0] SEED = 64'h0000_0000_0000_0001;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [63:0] rnd;
  logic [63:0] model;
  always #5 clk = ~clk;

  ca_rng #(.W(64), .RULE(RULE), .SEED(SEED)) dut (.clk, .rst_n, .rnd);

  // next state: left neighbour, right neighbour, own bit on rule-150 cells
  function automatic logic [63:0] ca_next(logic [63:0] s);
    return (s << 1) ^ (s >> 1) ^ (s & RULE);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    repeat (2) @(negedge clk);
    model = SEED;
    `CHECK(rnd == SEED, "reset loads the seed")
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      model = ca_next(model);
      `CHECK(rnd == model, "state matches the 90/150 model")
      `CHECK(rnd != 0, "state never zero")
      `CHECK(rnd != SEED, "seed does not recur")
      ones += $countones(rnd);
    end
    // a good generator gives about half ones
    `CHECK(ones > 2000*64*45/100 && ones < 2000*64*55/100, "bit balance")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
