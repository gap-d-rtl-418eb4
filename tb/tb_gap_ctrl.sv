// tb_gap_ctrl: population control with its memory and random generator,
// and a dispatch model in the testbench whose answer delay changes by phase.
// Checked: the initial population fills every slot; every write carries the
// fitness of its genotype and goes to a slot chosen by the tournaments; the
// old fitness reported to the monitor is the one in memory; the offered
// children are the winners' bits up to a few mutations; with a dispatch delay
// of 5 clocks a cycle takes exactly 11 clocks; a fast dispatch makes write-back
// collide with candidate reads and a slow one stalls the pipeline.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_gap_ctrl;
  localparam int POP = 16, GW = 64, FW = 24, AW = 4, MW = GW + FW;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [GW-1:0] rnd;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [MW-1:0] mem_wdata, mem_rdata;
  logic din_valid, din_ready, use_imm, dout_valid, dout_ready;
  logic [GW-1:0] din_gene [2], dout_gene [2];
  logic [AW-1:0] din_addr [2], dout_addr [2];
  logic [FW-1:0] dout_fit [2];
  logic upd_valid, em_offer, running;
  logic [FW-1:0] upd_old, upd_new;
  logic [GW-1:0] em_gene;
  logic [31:0] cycles, stalls, blocks;
  always #5 clk = ~clk;

  ca_rng #(.W(GW)) u_rng (.clk, .rst_n, .rnd);
  pop_mem #(.DEPTH(POP), .W(MW)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  gap_ctrl #(.POP_SIZE(POP), .GENE_W(GW), .FIT_W(FW), .MUT_LOG2(5)) dut (
    .clk, .rst_n, .rnd, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .disp_in_valid(din_valid), .disp_in_ready(din_ready), .disp_in_gene(din_gene), .disp_in_addr(din_addr),
    .disp_use_imm(use_imm), .disp_out_valid(dout_valid), .disp_out_ready(dout_ready),
    .disp_out_gene(dout_gene), .disp_out_fit(dout_fit), .disp_out_addr(dout_addr),
    .upd_valid, .upd_old_fit(upd_old), .upd_new_fit(upd_new), .em_offer, .em_gene,
    .running, .cycle_count(cycles), .stall_count(stalls), .rd_block_count(blocks));

  function automatic logic [FW-1:0] fitf(logic [GW-1:0] g);
    return FW'($countones(g) * 100 + g[3:0]);
  endfunction

  // dispatch model: one pair at a time, answer after 'delay' clocks
  int delay = 5;
  logic busy = 0; int cnt = 0;
  assign din_ready = !busy;
  always_ff @(posedge clk) begin
    if (!rst_n) begin busy <= 0; dout_valid <= 0; end
    else if (!busy && din_valid) begin
      busy <= 1; cnt <= delay;
      dout_gene <= din_gene; dout_addr <= din_addr;
      dout_fit[0] <= fitf(din_gene[0]); dout_fit[1] <= fitf(din_gene[1]);
      if (delay == 0) dout_valid <= 1;
    end else if (busy && !dout_valid) begin
      if (cnt <= 1) dout_valid <= 1; else cnt <= cnt - 1;
    end else if (dout_valid && dout_ready) begin
      dout_valid <= 0; busy <= 0;
    end
  end

  // scoreboard
  logic [FW-1:0] sh_fit [POP];
  logic [GW-1:0] sh_gene [POP];
  logic [POP-1:0] written = '0;
  longint sum = 0;
  logic [AW-1:0] c_addr [4]; logic [FW-1:0] c_fit [4]; logic [GW-1:0] c_gene [4];
  logic [AW-1:0] exp_slot [$];
  int last_accept = -1, clk_n = 0, n_period11 = 0, n_pairs = 0;
  longint xor_bits = 0;

  always @(posedge clk) clk_n++;

  always @(negedge clk) if (rst_n) begin
    // candidate captured this clock
    if (dut.rd_q) begin
      c_addr[dut.rd_idx_q] = dut.rd_addr_q;
      c_fit[dut.rd_idx_q]  = mem_rdata[MW-1 -: FW];
      c_gene[dut.rd_idx_q] = mem_rdata[GW-1:0];
      `CHECK(written[dut.rd_addr_q] && mem_rdata == {sh_fit[dut.rd_addr_q], sh_gene[dut.rd_addr_q]}, "candidate read returns the slot")
    end
    if (upd_valid) begin
      `CHECK(upd_old == (running ? sh_fit[mem_addr] : '0), "old fitness reported")
      `CHECK(upd_new == mem_wdata[MW-1 -: FW], "new fitness reported")
    end
    if (mem_en && mem_we) begin
      `CHECK(mem_wdata[MW-1 -: FW] == fitf(mem_wdata[GW-1:0]), "written fitness belongs to genotype")
      if (running) begin
        `CHECK(exp_slot.size() > 0 && mem_addr == exp_slot[0], "write goes to a tournament loser")
        if (exp_slot.size() > 0) void'(exp_slot.pop_front());
      end
      sum += longint'(mem_wdata[MW-1 -: FW]) - (written[mem_addr] ? longint'(sh_fit[mem_addr]) : 0);
      sh_fit[mem_addr] = mem_wdata[MW-1 -: FW]; sh_gene[mem_addr] = mem_wdata[GW-1:0];
      written[mem_addr] = 1;
    end
    if (din_valid && din_ready && running) begin
      logic [GW-1:0] p [2]; logic [AW-1:0] l [2];
      for (int q = 0; q < 2; q++) begin
        if (c_fit[2*q+1] > c_fit[2*q]) begin p[q] = c_gene[2*q+1]; l[q] = c_addr[2*q]; end
        else begin p[q] = c_gene[2*q]; l[q] = c_addr[2*q+1]; end
      end
      `CHECK(din_addr[0] == l[0] && din_addr[1] == l[1], "pair goes to the losers' slots")
      `CHECK(em_offer && em_gene == din_gene[0], "first child offered for emigration")
      `CHECK($countones(din_gene[0] ^ din_gene[1] ^ p[0] ^ p[1]) <= 16, "children made from the winners")
      xor_bits += $countones(din_gene[0] ^ din_gene[1] ^ p[0] ^ p[1]);
      n_pairs++;
      exp_slot.push_back(l[0]); exp_slot.push_back(l[1]);
      if (delay == 5 && last_accept >= 0 && stalls == 0 && blocks == 0) begin
        `CHECK(clk_n - last_accept == 11, "11 clocks per evolution cycle")
        n_period11++;
      end
      last_accept = clk_n;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (!running && t < 5000) begin @(negedge clk); t++; end
    `CHECK(running, "initial population completed")
    `CHECK(written == '1, "every slot initialised")
    `CHECK(use_imm, "immigrants allowed once running")
    repeat (400) @(negedge clk);
    `CHECK(n_period11 > 20, "cycle period measured")
    `CHECK(blocks == 0 && stalls == 0, "no waiting with a 5-clock dispatch")
    delay = 0;  repeat (400) @(negedge clk);
    `CHECK(blocks > 0, "write-back blocks candidate reads")
    delay = 40; repeat (600) @(negedge clk);
    `CHECK(stalls > 0, "slow dispatch stalls the pipeline")
    begin
      longint s2; s2 = 0;
      for (int i = 0; i < POP; i++) s2 += sh_fit[i];
      `CHECK(s2 == sum, "running sum")
    end
    // two children, each bit flipped with probability 1/32: about 4 bits per pair
    `CHECK(xor_bits > n_pairs * 2 && xor_bits < n_pairs * 6, "mutation rate")
    $display("pairs=%0d cycles=%0d stalls=%0d blocks=%0d xor_bits=%0d", n_pairs, cycles, stalls, blocks, xor_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
