// End-to-end test of the block-matching system at its default size: N = 16,
// two chips (four modules), tracking ranges 16, 32 and 64.
//
// Writes random template blocks and search areas into the system, for each
// of the three tracking ranges in turn (the mode is switched with the array
// idle), and compares every returned motion vector and SAD with a software
// full search that scans k (rows) then l (columns) and keeps the first
// minimum. Also checks the block pipeline period ceil(K/NMOD)*N*K between
// consecutive results once the pipeline is full, and counts how often the
// design's mechanisms were used: force lines pf1 and pf2, partial results fed
// back for another round, blocks started back to back, search-area bank
// reuse and tracking-range switches.
module tb_fsbm_top_full;
  import fsbm_pkg::*;

  // must match the defaults of fsbm_top
  localparam int N      = 16;
  localparam int NCHIP  = 2;
  localparam int SER_W  = 4;
  localparam int NMOD   = 2 * NCHIP;
  localparam int NBLK   = 3;
  localparam int KMAX   = 4 * N;
  localparam int DIM    = KMAX + N - 1;

  logic       clk = 1'b0;
  logic       rst_n = 1'b1;
  trk_mode_t  trk_mode = '0;
  pixel_t     c_wdata = '0;
  logic       c_wvalid = 1'b0;
  logic       c_wready;
  pixel_t     sa_wdata [4];
  logic [3:0] sa_wvalid = '0;
  logic [3:0] sa_wready;
  logic       mv_valid;
  sad_t       mv_sad;
  idx_t       mv_k, mv_l;

  fsbm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pixel_t tmpl [NBLK][N][N];
  pixel_t sa   [NBLK][DIM][DIM];
  sad_t   exp_sad [NBLK];
  int     exp_k [NBLK], exp_l [NBLK];

  int n_res = 0;
  longint last_res_cyc = 0;
  int n_pf1 = 0, n_pf2 = 0, n_fwd = 0, n_b2b = 0, n_bank_reuse = 0, n_mode = 0;
  int n_period_ok = 0;
  int cur_k;

  // Reference full search.
  task automatic reference(int b, int k_rng);
    int best, s;
    best = -1;
    for (int k = 0; k < k_rng; k++)
      for (int l = 0; l < k_rng; l++) begin
        s = 0;
        for (int m = 0; m < N; m++)
          for (int n = 0; n < N; n++)
            s += (tmpl[b][m][n] > sa[b][m+k][n+l]) ? tmpl[b][m][n] - sa[b][m+k][n+l]
                                                   : sa[b][m+k][n+l] - tmpl[b][m][n];
        if (best < 0 || s < best) begin
          best = s; exp_k[b] = k; exp_l[b] = l;
        end
      end
    exp_sad[b] = sad_t'(best);
  endtask

  task automatic feed_template(int b);
    for (int i = 0; i < N*N; i++) begin
      @(negedge clk);
      while (!c_wready) begin c_wvalid = 1'b0; @(negedge clk); end
      c_wdata  = tmpl[b][i/N][i%N];
      c_wvalid = 1'b1;
    end
    @(negedge clk);
    c_wvalid = 1'b0;
  endtask

  task automatic feed_lane(int b, int q, int k_rng);
    int r0, r1;
    r0 = (q < 2) ? q : N + (q - 2);
    r1 = (q < 2) ? N - 1 : k_rng + N - 2;
    for (int r = r0; r <= r1; r += 2)
      for (int col = 0; col < k_rng + N - 1; col++) begin
        @(negedge clk);
        while (!sa_wready[q]) begin sa_wvalid[q] = 1'b0; @(negedge clk); end
        sa_wdata[q]  = sa[b][r][col];
        sa_wvalid[q] = 1'b1;
      end
    @(negedge clk);
    sa_wvalid[q] = 1'b0;
  endtask

  task automatic feed_block(int b, int k_rng);
    fork
      feed_template(b);
      feed_lane(b, 0, k_rng);
      feed_lane(b, 1, k_rng);
      feed_lane(b, 2, k_rng);
      feed_lane(b, 3, k_rng);
    join
  endtask

  // Result checking and period measurement.
  always @(posedge clk) begin
    if (mv_valid) begin
      int rounds, period;
      rounds = (cur_k + NMOD - 1) / NMOD;
      period = rounds * N * cur_k;
      checks += 3;
      if (mv_sad != exp_sad[n_res]) begin
        failures++;
        $display("block %0d: SAD %0d expected %0d", n_res, mv_sad, exp_sad[n_res]);
      end
      if (int'(mv_k) != exp_k[n_res] || int'(mv_l) != exp_l[n_res]) begin
        failures += 2;
        $display("block %0d: mv (%0d,%0d) expected (%0d,%0d)", n_res, mv_k, mv_l,
                 exp_k[n_res], exp_l[n_res]);
      end
      if (n_res >= 2) begin
        checks++;
        if (cyc - last_res_cyc != longint'(period)) begin
          failures++;
          $display("block %0d: %0d cycles after previous result, expected %0d",
                   n_res, cyc - last_res_cyc, period);
        end else n_period_ok++;
      end
      last_res_cyc = cyc;
      n_res++;
    end
  end

  // Mechanism counters.
  logic g2_q, g3_q;
  longint last_start = -1;
  always @(posedge clk) begin
    g2_q <= dut.u_ctrl.g_act[2];
    g3_q <= dut.u_ctrl.g_act[3];
    if (dut.u_ctrl.g_act[2] && !g2_q) n_pf1++;
    if (dut.u_ctrl.g_act[3] && !g3_q) n_pf2++;
    if (dut.u_ctrl.fwd_load) n_fwd++;
    if (dut.u_ctrl.start_block) begin
      if (dut.u_ctrl.cur_v[0]) n_b2b++;
      if (dut.u_ctrl.blk_started_q >= 3) n_bank_reuse++;
    end
  end

  initial begin
    int seed;
    seed = 1;
    for (int i = 0; i < 4; i++) sa_wdata[i] = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 3; mode++) begin
      int k_rng;
      k_rng = N << mode;
      cur_k = k_rng;
      @(negedge clk);
      if (mode != 0) n_mode++;
      trk_mode = trk_mode_t'(mode);
      n_res = 0;
      for (int b = 0; b < NBLK; b++) begin
        for (int m = 0; m < N; m++)
          for (int n = 0; n < N; n++) tmpl[b][m][n] = pixel_t'($urandom);
        for (int r = 0; r < DIM; r++)
          for (int col = 0; col < DIM; col++) sa[b][r][col] = pixel_t'($urandom);
        // plant a good match in some blocks
        if (b % 2 == 0) begin
          int pk, pl;
          pk = $urandom_range(k_rng - 1);
          pl = $urandom_range(k_rng - 1);
          for (int m = 0; m < N; m++)
            for (int n = 0; n < N; n++)
              sa[b][m+pk][n+pl] = tmpl[b][m][n] ^ pixel_t'($urandom_range(1));
        end
        reference(b, k_rng);
      end
      for (int b = 0; b < NBLK; b++) feed_block(b, k_rng);
      while (n_res < NBLK) @(posedge clk);
      repeat (10) @(posedge clk);
    end
    $display("mechanisms: pf1=%0d pf2=%0d feedback=%0d back_to_back=%0d bank_reuse=%0d mode_switch=%0d period_checks=%0d",
             n_pf1, n_pf2, n_fwd, n_b2b, n_bank_reuse, n_mode, n_period_ok);
    checks += 6;
    if (n_pf1 == 0) failures++;
    if (n_pf2 == 0) failures++;
    if (n_fwd == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_bank_reuse == 0) failures++;
    if (n_mode == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
