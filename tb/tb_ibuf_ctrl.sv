// Test of the input-buffer controller alone (N = 4, four modules), with a
// software stand-in for the array on the result link.
//
// Random template blocks and search areas are written through the handshake
// inputs in all three tracking ranges. Every output line is recorded per
// cycle and, after the run, compared with what the array expects for each
// job (one job = one round of one block) that starts at cycle c0:
//   - template pixel c(m,n) on c at cycle c0 + mK - 2 - n;
//   - search row k+m, pixel x, on p1 (m even) or p2 (m odd) at c0 + mK + x;
//   - for module j > 0 the row k+j+N-1 on the force line named by b_src[j]
//     at c0 + j(K+1) + (N-1)K + x;
//   - jobs of one block start N*K cycles apart.
// On the result link the test decodes every word sent towards the array:
// the first round of a block must receive the initial "no match yet" word,
// later rounds the word the stand-in returned for the previous round. The
// word returned for the last round must appear on the motion-vector outputs.
module tb_ibuf_ctrl;
  import fsbm_pkg::*;

  localparam int N     = 4;
  localparam int NMOD  = 4;
  localparam int SER_W = 4;
  localparam int NBLK  = 3;
  localparam int KMAX  = 4 * N;
  localparam int DIM   = KMAX + N - 1;

  logic             clk = 1'b0, rst_n = 1'b1;
  trk_mode_t        trk_mode = '0;
  pixel_t           c_wdata = '0;
  logic             c_wvalid = 1'b0;
  logic             c_wready;
  pixel_t           sa_wdata [4];
  logic [3:0]       sa_wvalid = '0;
  logic [3:0]       sa_wready;
  logic             start;
  pixel_t           c, p1, p2, pf1, pf2;
  bus_src_e         b_src [NMOD];
  logic [SER_W-1:0] res_ser, ret_ser;
  logic             res_ser_valid, ret_ser_valid;
  logic             mv_valid;
  sad_t             mv_sad;
  idx_t             mv_k, mv_l;

  ibuf_ctrl #(.N(N), .NMOD(NMOD), .SER_W(SER_W)) dut (.*);

  // stand-in for the array: receives words, sends returned results
  result_t rx_word, tx_word;
  logic    rx_valid, tx_load, tx_busy;
  res_sipo #(.WIDTH(RES_W), .SER_W(SER_W)) u_rx (
    .clk, .rst_n, .ser_data(res_ser), .ser_valid(res_ser_valid),
    .dout(rx_word), .dout_valid(rx_valid));
  res_piso #(.WIDTH(RES_W), .SER_W(SER_W)) u_tx (
    .clk, .rst_n, .din(tx_word), .load(tx_load), .ser_data(ret_ser),
    .ser_valid(ret_ser_valid), .busy(tx_busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pixel_t tmpl [3*NBLK][N][N];
  pixel_t sa   [3*NBLK][DIM][DIM];

  // per-cycle record of the outputs
  pixel_t   h_c [longint], h_p1 [longint], h_p2 [longint], h_pf1 [longint], h_pf2 [longint];
  bus_src_e h_src [longint][NMOD];

  // jobs seen
  longint  job_c0 [$];
  int      job_b [$], job_r [$], job_kr [$];
  result_t job_ret [$];
  int      blk_now = 0, k_now = N;
  int      n_rx = 0, n_mv = 0, n_tx = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    h_c[cyc] = c; h_p1[cyc] = p1; h_p2[cyc] = p2; h_pf1[cyc] = pf1; h_pf2[cyc] = pf2;
    for (int j = 0; j < NMOD; j++) h_src[cyc][j] = b_src[j];
    if (start) begin
      int r, rounds;
      result_t w;
      rounds = k_now / NMOD;
      r = (job_r.size() == 0 || job_kr[$] != k_now) ? 0 :
          ((job_r[$] + 1 == rounds) ? 0 : job_r[$] + 1);
      if (job_r.size() != 0 && r == 0) blk_now++;
      w.sad       = sad_t'($urandom);
      w.mv_k      = idx_t'($urandom);
      w.mv_l      = idx_t'($urandom);
      w.first_pos = idx_t'($urandom);
      job_c0.push_back(cyc);
      job_b.push_back(blk_now);
      job_r.push_back(r);
      job_kr.push_back(k_now);
      job_ret.push_back(w);
    end
    if (rx_valid) begin
      result_t e;
      if (n_rx < job_r.size()) begin
        if (job_r[n_rx] == 0) e = '{sad: '1, mv_k: '0, mv_l: '0, first_pos: '0};
        else                  e = job_ret[n_rx - 1];
        checks++;
        if (rx_word != e) begin
          failures++;
          $display("job %0d: word to the array %h expected %h", n_rx, rx_word, e);
        end
      end else begin
        failures++;
        $display("word to the array without a job");
      end
      n_rx++;
    end
    if (mv_valid) begin
      int j;
      j = 0;
      // the n_mv-th job that is the last round of its block
      for (int i = 0, cnt = 0; i < job_r.size(); i++)
        if (job_r[i] + 1 == job_kr[i] / NMOD) begin
          if (cnt == n_mv) j = i;
          cnt++;
        end
      check("mv_sad", int'(mv_sad), int'(job_ret[j].sad));
      check("mv_k", int'(mv_k), int'(job_ret[j].mv_k));
      check("mv_l", int'(mv_l), int'(job_ret[j].mv_l));
      n_mv++;
    end
  end

  // return each job's result N*K + 2..6 cycles after the job started
  always @(negedge clk) begin
    tx_load = 1'b0;
    if (n_tx < job_c0.size() &&
        cyc >= job_c0[n_tx] + longint'(N * job_kr[n_tx] + 2 + (n_tx % 5)) && !tx_busy) begin
      tx_word = job_ret[n_tx];
      tx_load = 1'b1;
      n_tx++;
    end
  end

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
        while (!sa_wready[q] || $urandom_range(7) == 0) begin
          sa_wvalid[q] = 1'b0; @(negedge clk);
        end
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

  function automatic pixel_t line(longint t, bus_src_e s);
    case (s)
      SRC_PF1: return h_pf1[t];
      SRC_PF2: return h_pf2[t];
      default: return 8'hxx;
    endcase
  endfunction

  initial begin
    int gb;
    for (int i = 0; i < 4; i++) sa_wdata[i] = '0;
    foreach (tmpl[b, m, n]) tmpl[b][m][n] = pixel_t'($urandom);
    foreach (sa[b, r, x]) sa[b][r][x] = pixel_t'($urandom);
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gb = 0;
    for (int mode = 0; mode < 3; mode++) begin
      int target;
      @(negedge clk);
      trk_mode = trk_mode_t'(mode);
      k_now = N << mode;
      target = n_mv + NBLK;
      for (int b = 0; b < NBLK; b++) feed_block(gb + b, k_now);
      gb += NBLK;
      while (n_mv < target) @(posedge clk);
      repeat (10) @(posedge clk);
    end
    repeat (4 * N * KMAX) @(posedge clk);

    // stream checks per job
    for (int j = 0; j < job_c0.size(); j++) begin
      int b, k, kr;
      longint c0;
      b = job_b[j]; kr = job_kr[j]; k = job_r[j] * NMOD; c0 = job_c0[j];
      if (j > 0 && job_r[j] > 0) check("job spacing", int'(c0 - job_c0[j-1]), N * kr);
      for (int m = 0; m < N; m++) begin
        for (int n = 0; n < N; n++)
          check("template", int'(h_c[c0 + m*kr - 2 - n]), int'(tmpl[b][m][n]));
        for (int x = 0; x < kr + N - 1; x++)
          check("main row", int'((m % 2 == 0) ? h_p1[c0 + m*kr + x] : h_p2[c0 + m*kr + x]),
                int'(sa[b][k + m][x]));
      end
      for (int mj = 1; mj < NMOD; mj++)
        for (int x = 0; x < kr + N - 1; x++) begin
          longint t;
          bus_src_e s;
          t = c0 + mj * (kr + 1) + (N - 1) * kr + x;
          s = h_src[t][mj];
          check("force select", int'(s == SRC_PF1 || s == SRC_PF2), 1);
          check("force row", int'(line(t, s)), int'(sa[b][k + mj + N - 1][x]));
        end
    end
    check("jobs", job_c0.size(), NBLK * (1 + 2 + 4));
    check("words to the array", n_rx, job_c0.size());
    check("motion vectors", n_mv, 3 * NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
