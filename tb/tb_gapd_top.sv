// tb_gapd_top: end-to-end test of the four-deme ring at a reduced population
// (32 per deme) with Royal-Road FEPs of random latency; see gapd_tb_body.svh
// for what is checked.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_gapd_top;
  localparam int ND = 4, POP = 32, GW = 64, FW = 24, BLOCK = 8, SCALE = 1024, LAT_MAX = 24;
  localparam longint RUN_GENS = 60;
  `include "gapd_tb_body.svh"
  gapd_top #(.N_DEMES(ND), .POP_SIZE(POP)) dut (
    .clk, .rst_n, .fep_req_valid, .fep_req_gene, .fep_req_ready, .fep_rsp_valid, .fep_rsp_fit,
    .running, .migrate_en, .gen_tick, .avg_fit, .gradient, .gen_count, .cycle_count, .stall_count,
    .rd_block_count, .emig_count, .emig_skip_count, .immig_count, .immig_used_count);
endmodule
