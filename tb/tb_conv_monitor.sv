// tb_conv_monitor: feeds fitness replacements that make the average rise
// steeply, then flatten, then fall, into two monitors (dt = 1 and dt = 2
// generations, population 16) and checks the running average, the gradient
// and the migration decision g(t) <= g_th at every generation boundary
// against a model computed here.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_conv_monitor;
  localparam int POP = 16, FW = 24, GTH = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, upd_valid = 0;
  logic [FW-1:0] old_fit = 0, new_fit = 0;
  logic [FW-1:0] avg [2];
  logic signed [FW+1:0] grad [2];
  logic [1:0] mig, tick;
  logic [31:0] gens [2];
  always #5 clk = ~clk;

  conv_monitor #(.POP_SIZE(POP), .FIT_W(FW), .G_TH(GTH), .DELTA_T(1)) dut1 (
    .clk, .rst_n, .upd_valid, .upd_old_fit(old_fit), .upd_new_fit(new_fit),
    .avg_fit(avg[0]), .gradient(grad[0]), .migrate_en(mig[0]), .gen_count(gens[0]), .gen_tick(tick[0]));
  conv_monitor #(.POP_SIZE(POP), .FIT_W(FW), .G_TH(GTH), .DELTA_T(2)) dut2 (
    .clk, .rst_n, .upd_valid, .upd_old_fit(old_fit), .upd_new_fit(new_fit),
    .avg_fit(avg[1]), .gradient(grad[1]), .migrate_en(mig[1]), .gen_count(gens[1]), .gen_tick(tick[1]));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [FW-1:0] pop [POP];
    longint hist [$];
    int n_mig_on = 0, n_mig_off = 0;
    for (int i = 0; i < POP; i++) pop[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 40; g++) begin
      int step;
      // per-individual increase: steep, flat, slightly falling, steep again
      step = (g < 10) ? 200 : (g < 20) ? ($urandom % 40) : (g < 30) ? 0 : 100;
      for (int u = 0; u < POP; u++) begin
        int slot, nf;
        slot = $urandom % POP;
        nf = int'(pop[slot]) + step;
        if (g >= 20 && g < 30) nf -= int'($urandom % 8);
        if (nf < 0) nf = 0;
        old_fit = pop[slot]; new_fit = FW'(nf); upd_valid = 1;
        pop[slot] = FW'(nf);
        @(negedge clk);
        upd_valid = 0;
        if (u < POP - 1) `CHECK(tick == 2'b00, "no tick inside a generation")
        if ($urandom % 3 == 0) @(negedge clk);   // idle clocks between updates
      end
      begin
        longint sum, a;
        sum = 0;
        for (int i = 0; i < POP; i++) sum += pop[i];
        a = sum / POP;
        hist.push_back(a);
        `CHECK(avg[0] == FW'(a) && avg[1] == FW'(a), "average f(t)")
        `CHECK(gens[0] == 32'(g + 1), "generation count")
        for (int k = 0; k < 2; k++) begin
          int dt;
          logic exp_m; longint d;
          dt = k + 1;
          if (hist.size() > dt) begin
            d = hist[hist.size()-1] - hist[hist.size()-1-dt];
            exp_m = (d <= GTH * dt);
            `CHECK(grad[k] == (FW+2)'(d), "gradient f(t)-f(t-dt)")
          end else exp_m = 0;
          `CHECK(mig[k] == exp_m, "migration decision")
          if (k == 0) begin if (exp_m) n_mig_on++; else n_mig_off++; end
        end
      end
    end
    `CHECK(n_mig_on > 5 && n_mig_off > 5, "both decisions exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
