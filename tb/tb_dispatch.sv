// tb_dispatch: two behavioural FEPs with random latency and random ready
// evaluate pairs; the testbench checks that each FEP gets its genotype, that
// the evaluated pair comes back with the right fitness and slots, that an
// immigrant replaces the second genotype only when allowed, and that the two
// evaluations overlap in time.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dispatch;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, use_imm = 0, imm_valid = 0, imm_pop;
  logic [63:0] in_gene [2], imm_gene = 0;
  logic [7:0] in_addr [2];
  logic [1:0] req_valid, req_ready, rsp_valid;
  logic [63:0] req_gene [2];
  logic [23:0] rsp_fit [2];
  logic out_valid, out_ready = 0, out_imm;
  logic [63:0] out_gene [2];
  logic [23:0] out_fit [2];
  logic [7:0] out_addr [2];
  int busy_both = 0;
  always #5 clk = ~clk;

  dispatch #(.GENE_W(64), .FIT_W(24), .AW(8)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_gene, .in_addr, .use_imm, .imm_valid, .imm_gene, .imm_pop,
    .fep_req_valid(req_valid), .fep_req_gene(req_gene), .fep_req_ready(req_ready),
    .fep_rsp_valid(rsp_valid), .fep_rsp_fit(rsp_fit),
    .out_valid, .out_ready, .out_gene, .out_fit, .out_addr, .out_imm);

  function automatic logic [23:0] fitf(logic [63:0] g);
    return 24'($countones(g) * 1000 + g[7:0]);
  endfunction

  // two FEPs: random ready, random latency 1..6
  for (genvar i = 0; i < 2; i++) begin : g_fep
    logic busy; int cnt; logic [63:0] held;
    always_ff @(posedge clk) begin
      if (!rst_n) begin busy <= 0; rsp_valid[i] <= 0; rsp_fit[i] <= 0; cnt <= 0; req_ready[i] <= 0; end
      else begin
        rsp_valid[i] <= 0;
        req_ready[i] <= !busy && ($urandom % 2 == 0);
        if (req_valid[i] && req_ready[i] && !busy) begin
          busy <= 1; held <= req_gene[i]; cnt <= 1 + $urandom % 6; req_ready[i] <= 0;
        end else if (busy) begin
          if (cnt <= 1) begin busy <= 0; rsp_valid[i] <= 1; rsp_fit[i] <= fitf(held); end
          else cnt <= cnt - 1;
        end
      end
    end
  end
  always @(posedge clk) if (g_fep[0].busy && g_fep[1].busy) busy_both++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_imm = 0;
    in_gene[0] = 0; in_gene[1] = 0; in_addr[0] = 0; in_addr[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [63:0] g0, g1, ig; logic [7:0] a0, a1; logic exp_imm; int w;
      g0 = {$urandom, $urandom}; g1 = {$urandom, $urandom}; ig = {$urandom, $urandom};
      a0 = 8'($urandom); a1 = 8'($urandom);
      use_imm = $urandom % 2; imm_valid = $urandom % 2; imm_gene = ig;
      exp_imm = use_imm && imm_valid;
      in_valid = 1; in_gene[0] = g0; in_gene[1] = g1; in_addr[0] = a0; in_addr[1] = a1;
      #1;
      `CHECK(in_ready, "ready when idle")
      `CHECK(imm_pop == exp_imm, "immigrant taken only when allowed and present")
      @(negedge clk);
      in_valid = 0; imm_valid = 0;
      `CHECK(!in_ready, "busy while a pair is in flight")
      w = 0;
      while (!out_valid && w < 100) begin
        if (req_valid[0]) `CHECK(req_gene[0] == g0, "FEP 0 genotype")
        if (req_valid[1]) `CHECK(req_gene[1] == (exp_imm ? ig : g1), "FEP 1 genotype")
        @(negedge clk); w++;
      end
      `CHECK(out_valid, "pair evaluated")
      repeat ($urandom % 3) begin @(negedge clk); `CHECK(out_valid, "result held until taken") end
      `CHECK(out_gene[0] == g0 && out_fit[0] == fitf(g0) && out_addr[0] == a0, "result 0")
      `CHECK(out_gene[1] == (exp_imm ? ig : g1) && out_fit[1] == fitf(exp_imm ? ig : g1) && out_addr[1] == a1, "result 1")
      `CHECK(out_imm == exp_imm, "immigrant flag")
      if (exp_imm) n_imm++;
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      `CHECK(!out_valid && in_ready, "idle after hand-off")
    end
    `CHECK(n_imm > 30, "immigrants exercised")
    `CHECK(busy_both > 100, "two FEPs evaluate at the same time")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
