// gapd_tb_body.svh: end-to-end test body for the GAP/D ring, included by the
// top-level testbenches after they declare
//   localparam int ND, POP, GW, FW, BLOCK, SCALE, LAT_MAX;  longint RUN_GENS;
// and instantiate the ring as 'dut' on the signals declared here.
// Each FEP port gets a behavioural Royal-Road FEP. The body runs until every
// deme has completed RUN_GENS generations and then checks, per deme, that the
// memory holds only correctly evaluated genotypes, that the monitor's average
// is the memory's average at each generation boundary, that every genotype
// sent on a ring link arrived, and that each mechanism of the design occurred:
// initial population, FEP overlap, dispatch stall, migration switched on and off, emigration, skipped emigration and
// immigrants written into a population.

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0]           fep_req_valid [ND];
  logic [GW-1:0]        fep_req_gene  [ND][2];
  logic [1:0]           fep_req_ready [ND];
  logic [1:0]           fep_rsp_valid [ND];
  logic [FW-1:0]        fep_rsp_fit   [ND][2];
  logic [ND-1:0]        running, migrate_en, gen_tick;
  logic [FW-1:0]        avg_fit [ND];
  logic signed [FW+1:0] gradient [ND];
  logic [31:0] gen_count [ND], cycle_count [ND], stall_count [ND], rd_block_count [ND];
  logic [31:0] emig_count [ND], emig_skip_count [ND], immig_count [ND], immig_used_count [ND];
  always #5 clk = ~clk;

  for (genvar d = 0; d < ND; d++) begin : g_fep
    for (genvar i = 0; i < 2; i++) begin : g_i
      fep_model #(.GENE_W(GW), .FIT_W(FW), .BLOCK(BLOCK), .SCALE(SCALE), .LAT_MIN(1), .LAT_MAX(LAT_MAX)) u_fep (
        .clk, .rst_n, .req_valid(fep_req_valid[d][i]), .req_gene(fep_req_gene[d][i]),
        .req_ready(fep_req_ready[d][i]), .rsp_valid(fep_rsp_valid[d][i]), .rsp_fit(fep_rsp_fit[d][i]));
    end
  end

  function automatic logic [FW-1:0] rr(logic [GW-1:0] g);
    int unsigned f;
    f = 0;
    for (int b = 0; b < GW / BLOCK; b++) if (((g >> (b*BLOCK)) & ((64'd1 << BLOCK) - 1)) == ((64'd1 << BLOCK) - 1)) f += BLOCK * SCALE;
    return FW'(f);
  endfunction

  // event counters seen from outside
  int mig_on [ND], mig_off [ND], both_busy [ND], tick_ok [ND];
  int first_avg [ND];
  logic [ND-1:0] first_seen;

  // memory average at each generation boundary, read through the hierarchy
  function automatic longint mem_sum(int d);
    longint s;
    s = 0;
    case (d)
      0: for (int i = 0; i < POP; i++) s += dut.g_deme[0].u_node.u_mem.mem[i][GW +: FW];
      1: if (ND > 1) for (int i = 0; i < POP; i++) s += dut.g_deme[1 % ND].u_node.u_mem.mem[i][GW +: FW];
      2: if (ND > 2) for (int i = 0; i < POP; i++) s += dut.g_deme[2 % ND].u_node.u_mem.mem[i][GW +: FW];
      3: if (ND > 3) for (int i = 0; i < POP; i++) s += dut.g_deme[3 % ND].u_node.u_mem.mem[i][GW +: FW];
      default: s = 0;
    endcase
    return s;
  endfunction

  function automatic int mem_bad(int d);
    int bad;
    logic [GW+FW-1:0] w;
    bad = 0;
    for (int i = 0; i < POP; i++) begin
      case (d)
        0: w = dut.g_deme[0].u_node.u_mem.mem[i];
        1: w = dut.g_deme[1 % ND].u_node.u_mem.mem[i];
        2: w = dut.g_deme[2 % ND].u_node.u_mem.mem[i];
        default: w = dut.g_deme[3 % ND].u_node.u_mem.mem[i];
      endcase
      if (w[GW +: FW] != rr(w[GW-1:0])) bad++;
    end
    return bad;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < ND && d < 4; d++) begin
      if (running[d]) begin
        if (migrate_en[d]) mig_on[d]++; else mig_off[d]++;
      end
      if (fep_req_valid[d] == 2'b00 && g_fep_busy(d)) both_busy[d]++;
      if (gen_tick[d]) begin
        `CHECK(longint'(avg_fit[d]) == mem_sum(d) / POP, "monitor average equals memory average")
        if (!first_seen[d]) begin first_seen[d] = 1; first_avg[d] = int'(avg_fit[d]); end
      end
    end
  end

  function automatic logic g_fep_busy(int d);
    logic r;
    case (d)
      0: r = g_fep[0].g_i[0].u_fep.busy && g_fep[0].g_i[1].u_fep.busy;
      1: r = g_fep[1 % ND].g_i[0].u_fep.busy && g_fep[1 % ND].g_i[1].u_fep.busy;
      2: r = g_fep[2 % ND].g_i[0].u_fep.busy && g_fep[2 % ND].g_i[1].u_fep.busy;
      default: r = g_fep[3 % ND].g_i[0].u_fep.busy && g_fep[3 % ND].g_i[1].u_fep.busy;
    endcase
    return r;
  endfunction

  initial begin
    #(64'd10 * 64'd400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic done;
    longint t;
    first_seen = '0;
    for (int d = 0; d < ND; d++) begin mig_on[d] = 0; mig_off[d] = 0; both_busy[d] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    t = 0;
    do begin
      @(negedge clk); t++;
      done = 1;
      for (int d = 0; d < ND; d++) if (gen_count[d] < 32'(RUN_GENS)) done = 0;
      if (t % (64'd200 * POP) == 0) begin
        $write("clk %0d:", t);
        for (int d = 0; d < ND; d++) $write(" [gen %0d avg %0d mig %0d]", gen_count[d], avg_fit[d], migrate_en[d]);
        $write("\n");
      end
    end while (!done);
    $display("ran %0d clocks", t);
    for (int d = 0; d < ND; d++) begin
      int nd;
      nd = (d + 1) % ND;
      $display("deme %0d: cycles=%0d avg=%0d first_avg=%0d stalls=%0d rd_blocks=%0d mig_on=%0d mig_off=%0d emig=%0d skip=%0d immig=%0d used=%0d",
               d, cycle_count[d], avg_fit[d], first_avg[d], stall_count[d], rd_block_count[d], mig_on[d], mig_off[d],
               emig_count[d], emig_skip_count[d], immig_count[d], immig_used_count[d]);
      `CHECK(running[d], "initial population evaluated")
      `CHECK(mem_bad(d) == 0, "every stored fitness matches its genotype")
      `CHECK(emig_count[d] == immig_count[nd], "every emigrant received by the next deme")
      `CHECK(immig_count[d] - immig_used_count[d] <= 2, "received immigrants enter the population")
      `CHECK(both_busy[d] > 0, "both FEPs evaluate at once")
      `CHECK(stall_count[d] > 0, "mechanism: dispatch stall")
      `CHECK(mig_on[d] > 0, "mechanism: migration switched on")
      `CHECK(mig_off[d] > 0, "mechanism: migration switched off")
      `CHECK(emig_count[d] > 0, "mechanism: emigration")
      `CHECK(immig_used_count[d] > 0, "mechanism: immigrant written into population")
      `CHECK(int'(avg_fit[d]) >= first_avg[d], "average fitness does not fall below the first generation")
    end
    begin
      int skips;
      skips = 0;
      for (int d = 0; d < ND; d++) skips += emig_skip_count[d];
      `CHECK(skips > 0, "mechanism: emigration skipped while the link is busy")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
