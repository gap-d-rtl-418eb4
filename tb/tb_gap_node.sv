// tb_gap_node: one processor (population 16, Royal-Road FEPs with 4-bit
// blocks and random latency) whose emigration port is looped back to its own
// immigration port. Checks that the population is always correctly
// evaluated, that the monitor's average equals the memory's at every
// generation boundary, that migration is switched on and off and that
// immigrants are written, and that the population improves.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_gap_node;
  localparam int POP = 16, GW = 64, FW = 24, BLOCK = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] req_valid, req_ready, rsp_valid;
  logic [GW-1:0] req_gene [2];
  logic [FW-1:0] rsp_fit [2];
  logic em_valid, em_ready, running, migrate_en, gen_tick;
  logic [GW-1:0] em_gene;
  logic [FW-1:0] avg_fit;
  logic signed [FW+1:0] gradient;
  logic [31:0] gen_count, cycle_count, stall_count, rd_block_count, emig, skip, immig, used;
  always #5 clk = ~clk;

  gap_node #(.POP_SIZE(POP), .GENE_W(GW), .FIT_W(FW)) dut (
    .clk, .rst_n, .fep_req_valid(req_valid), .fep_req_gene(req_gene), .fep_req_ready(req_ready),
    .fep_rsp_valid(rsp_valid), .fep_rsp_fit(rsp_fit),
    .em_valid, .em_gene, .em_ready, .im_valid(em_valid), .im_gene(em_gene), .im_ready(em_ready),
    .running, .avg_fit, .gradient, .migrate_en, .gen_count, .gen_tick, .cycle_count, .stall_count,
    .rd_block_count, .emig_count(emig), .emig_skip_count(skip), .immig_count(immig), .immig_used_count(used));

  for (genvar i = 0; i < 2; i++) begin : g_fep
    fep_model #(.GENE_W(GW), .FIT_W(FW), .BLOCK(BLOCK), .SCALE(64), .LAT_MIN(1), .LAT_MAX(20)) u_fep (
      .clk, .rst_n, .req_valid(req_valid[i]), .req_gene(req_gene[i]), .req_ready(req_ready[i]),
      .rsp_valid(rsp_valid[i]), .rsp_fit(rsp_fit[i]));
  end

  function automatic logic [FW-1:0] rr(logic [GW-1:0] g);
    int unsigned f;
    f = 0;
    for (int b = 0; b < GW / BLOCK; b++) if (g[b*BLOCK +: BLOCK] == '1) f += BLOCK * 64;
    return FW'(f);
  endfunction

  int mig_on = 0, mig_off = 0, first_avg = -1;
  always @(negedge clk) if (rst_n) begin
    if (running) begin if (migrate_en) mig_on++; else mig_off++; end
    if (gen_tick) begin
      longint s; int bad;
      s = 0; bad = 0;
      for (int i = 0; i < POP; i++) begin
        s += dut.u_mem.mem[i][GW +: FW];
        if (dut.u_mem.mem[i][GW +: FW] != rr(dut.u_mem.mem[i][GW-1:0])) bad++;
      end
      `CHECK(longint'(avg_fit) == s / POP, "monitor average equals memory average")
      `CHECK(bad == 0, "stored fitness matches genotype")
      if (first_avg < 0) first_avg = int'(avg_fit);
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (gen_count == 200);
    @(negedge clk);
    $display("avg %0d (first %0d) cycles %0d stalls %0d emig %0d skip %0d immig %0d used %0d mig_on %0d mig_off %0d",
             avg_fit, first_avg, cycle_count, stall_count, emig, skip, immig, used, mig_on, mig_off);
    // generation 1 is the initial population; each later one takes POP/2
    // cycles; one more pair may be in evaluation
    `CHECK(cycle_count >= 199 * POP / 2 && cycle_count <= 199 * POP / 2 + 1, "one generation per POP/2 cycles")
    `CHECK(mig_on > 0 && mig_off > 0, "migration switched on and off")
    `CHECK(emig > 0 && used > 0, "own emigrants come back as immigrants")
    `CHECK(immig == emig, "loop link delivers every emigrant")
    `CHECK(int'(avg_fit) > first_avg, "population improves")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
