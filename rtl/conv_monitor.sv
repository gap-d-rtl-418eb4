// conv_monitor: the convergence monitor ("Evaluation") that decides when a
// deme migrates.
//
// The idea of the design: a deme should send genotypes to its neighbour when
// its own evolution has stalled, i.e. when the slope of its average-fitness
// curve becomes flat. At every generation t the unit forms the average fitness
// f(t) and the gradient g(t) = (f(t) - f(t-dt)) / dt and raises migrate_en for
// the next generation when g(t) <= g_th. The threshold (32 in the published
// configuration) and the formula follow the design.
//
// This implementation's choices: the average is kept without scanning memory,
// as a running sum updated with (new - old) fitness on every write into the
// population memory, divided by POP_SIZE (a power of two, so a shift). A
// generation is POP_SIZE replaced individuals. The division by dt is avoided by
// comparing f(t) - f(t-dt) <= G_TH * DELTA_T. migrate_en stays low until
// DELTA_T+1 averages exist; a falling average also counts as flat.
//
// Interface and timing: each clock with upd_valid removes upd_old_fit and adds
// upd_new_fit. On the update that completes a generation, avg_fit, gradient,
// migrate_en and gen_count change on the next clock and gen_tick pulses.
module conv_monitor #(
  parameter int unsigned POP_SIZE = gapd_pkg::POP_SIZE_DEF,
  parameter int unsigned FIT_W    = gapd_pkg::FIT_W_DEF,
  parameter int unsigned G_TH     = gapd_pkg::G_TH_DEF,
  parameter int unsigned DELTA_T  = gapd_pkg::DELTA_T_DEF,
  localparam int unsigned AW      = $clog2(POP_SIZE)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    upd_valid,
  input  logic [FIT_W-1:0]        upd_old_fit,
  input  logic [FIT_W-1:0]        upd_new_fit,
  output logic [FIT_W-1:0]        avg_fit,
  output logic signed [FIT_W+1:0] gradient,
  output logic                    migrate_en,
  output logic [31:0]             gen_count,
  output logic                    gen_tick
);

  localparam int unsigned SW = FIT_W + AW;     // running-sum width
  localparam int unsigned HW = $clog2(DELTA_T + 2);

  logic [SW-1:0]    sum, sum_nxt;
  logic [AW-1:0]    n_upd;                     // updates in the current generation
  logic [FIT_W-1:0] hist [DELTA_T];            // hist[k] = f(t-1-k)
  logic [HW-1:0]    n_hist;                    // averages recorded, saturating
  logic [FIT_W-1:0] avg_nxt;
  logic signed [FIT_W+1:0] diff;

  initial assert ((1 << AW) == POP_SIZE) else $error("conv_monitor: POP_SIZE must be a power of two");

  assign sum_nxt = sum - SW'(upd_old_fit) + SW'(upd_new_fit);
  assign avg_nxt = FIT_W'(sum_nxt >> AW);
  assign diff    = $signed({2'b00, avg_nxt}) - $signed({2'b00, hist[DELTA_T-1]});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum        <= '0;
      n_upd      <= '0;
      n_hist     <= '0;
      avg_fit    <= '0;
      gradient   <= '0;
      migrate_en <= 1'b0;
      gen_count  <= '0;
      gen_tick   <= 1'b0;
      for (int k = 0; k < DELTA_T; k++) hist[k] <= '0;
    end else begin
      gen_tick <= 1'b0;
      if (upd_valid) begin
        sum   <= sum_nxt;
        n_upd <= n_upd + 1'b1;
        if (n_upd == AW'(POP_SIZE - 1)) begin
          // generation boundary: f(t) = sum / POP_SIZE
          avg_fit   <= avg_nxt;
          gen_count <= gen_count + 1;
          gen_tick  <= 1'b1;
          hist[0]   <= avg_nxt;
          for (int k = 1; k < DELTA_T; k++) hist[k] <= hist[k-1];
          if (n_hist != HW'(DELTA_T + 1)) n_hist <= n_hist + 1'b1;
          if (n_hist >= HW'(DELTA_T)) begin
            gradient   <= diff;
            migrate_en <= (diff <= $signed((FIT_W+2)'(G_TH * DELTA_T)));
          end else begin
            gradient   <= '0;
            migrate_en <= 1'b0;
          end
        end
      end
    end
  end

endmodule
