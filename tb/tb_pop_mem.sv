// tb_pop_mem: writes every word, then mixes random reads and writes and
// compares each read (one clock later) with a model array.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_pop_mem;
  localparam int DEPTH = 256, W = 88;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  always #5 clk = ~clk;
  pop_mem #(.DEPTH(DEPTH), .W(W)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] exp_q;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 8'(i); wdata = {$urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = ($urandom % 3 == 0); addr = 8'($urandom);
      wdata = {$urandom, $urandom, $urandom};
      exp_q = model[addr];
      if (we) model[addr] = wdata;
      if (!we) begin
        @(negedge clk);
        en = 0;
        `CHECK(rdata == exp_q, "read data")
        @(negedge clk);
        `CHECK(rdata == exp_q, "read data holds while idle")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
