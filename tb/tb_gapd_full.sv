// tb_gapd_full: the published configuration end to end. Four demes of 256
// 64-bit genotypes, 24-bit fitness, threshold 32, all at the ring's default
// parameters, evolving on the Royal-Road function (eight 8-bit blocks, 8192
// per complete block, maximum 65536) for about 150,000 evolution cycles per
// deme (1172 generations of 128 cycles). The average fitness of every deme is
// printed as the run goes; the checks are those of gapd_tb_body.svh.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_gapd_full;
  localparam int ND = 4, POP = 256, GW = 64, FW = 24, BLOCK = 8, SCALE = 1024, LAT_MAX = 4;
  localparam longint RUN_GENS = 1172;
  `include "gapd_tb_body.svh"
  gapd_top dut (
    .clk, .rst_n, .fep_req_valid, .fep_req_gene, .fep_req_ready, .fep_rsp_valid, .fep_rsp_fit,
    .running, .migrate_en, .gen_tick, .avg_fit, .gradient, .gen_count, .cycle_count, .stall_count,
    .rd_block_count, .emig_count, .emig_skip_count, .immig_count, .immig_used_count);
endmodule
