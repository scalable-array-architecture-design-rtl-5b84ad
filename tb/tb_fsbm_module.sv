// Test of one upper module driven directly: for several jobs back to back it
// sends the template and search-area rows on the documented cycles, computes
// every SAD of the module's candidate row in software, and checks the result
// word (best SAD, motion vector, incremented first-position index) against
// the incoming result, including the tie rule (the incoming result wins a
// tie). Also checks that the result appears in cycle c0 + N*K + N + 1 and
// that start_out pulses K+1 cycles after start_in.
module tb_fsbm_module;
  import fsbm_pkg::*;

  localparam int N = 4;
  localparam int KMAX = 4 * N;
  localparam int DIM = KMAX + N - 1;
  localparam int NJOB = 6;

  logic      clk = 1'b0;
  logic      rst_n = 1'b1;
  trk_mode_t trk_mode = 2'd1;
  logic      start_in = 1'b0;
  logic      start_out;
  pixel_t    main_a = '0, main_b = '0, pf1 = '0, pf2 = '0;
  bus_src_e  b_src = SRC_MAIN;
  pixel_t    bus_a_out, bus_b_out;
  pixel_t    c_in = '0;
  pixel_t    tmpl_upper [N];
  pixel_t    tmpl_prev [N];
  result_t   res_in = '0;
  logic      res_in_valid = 1'b0;
  result_t   res_out;
  logic      res_out_valid;

  fsbm_module #(.N(N), .UPPER(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pixel_t  tmpl [NJOB][N][N];
  pixel_t  sa   [NJOB][DIM][DIM];
  result_t rin  [NJOB];
  result_t rexp [NJOB];
  int      kk   [NJOB];
  int      K;
  longint  c0   [NJOB];
  int      n_out = 0;
  longint  start_cyc = -1;

  function automatic int sad_of(int j, int k, int l);
    int s = 0;
    for (int m = 0; m < N; m++)
      for (int n = 0; n < N; n++)
        s += (tmpl[j][m][n] > sa[j][m+k][n+l]) ? tmpl[j][m][n] - sa[j][m+k][n+l]
                                               : sa[j][m+k][n+l] - tmpl[j][m][n];
    return s;
  endfunction

  // Drive all inputs from the cycle number relative to each job's start.
  always @(negedge clk) begin
    pixel_t a, b, c;
    logic st;
    a = '0; b = '0; c = '0; st = 1'b0;
    for (int j = 0; j < NJOB; j++) begin
      longint t;
      t = cyc - c0[j];
      if (t == 0) st = 1'b1;
      for (int m = 0; m < N; m++) begin
        longint x;
        x = t - longint'(m * K);
        if (x >= 0 && x <= K + N - 2) begin
          if (m % 2 == 0) a = sa[j][kk[j] + m][x];
          else            b = sa[j][kk[j] + m][x];
        end
        for (int n = 0; n < N; n++)
          if (t == longint'(m * K - 2 - n)) c = tmpl[j][m][n];
      end
      if (t == 5) begin
        res_in       <= rin[j];
        res_in_valid <= 1'b1;
      end else if (t == 6) res_in_valid <= 1'b0;
    end
    main_a   <= a;
    main_b   <= b;
    c_in     <= c;
    start_in <= st;
  end

  always @(posedge clk) begin
    if (start_in) start_cyc = cyc;
    if (start_out && start_cyc >= 0) begin
      checks++;
      if (cyc - start_cyc != longint'(K + 1)) begin
        failures++;
        $display("start_out %0d cycles after start_in", cyc - start_cyc);
      end
    end
    if (res_out_valid) begin
      checks += 2;
      if (res_out != rexp[n_out]) begin
        failures++;
        $display("job %0d: got sad=%0d k=%0d l=%0d fp=%0d, expected sad=%0d k=%0d l=%0d fp=%0d",
                 n_out, res_out.sad, res_out.mv_k, res_out.mv_l, res_out.first_pos,
                 rexp[n_out].sad, rexp[n_out].mv_k, rexp[n_out].mv_l, rexp[n_out].first_pos);
      end
      if (cyc != c0[n_out] + longint'(N * K + N + 1)) begin
        failures++;
        $display("job %0d: result at cycle %0d, expected %0d", n_out, cyc - c0[n_out],
                 N * K + N + 1);
      end
      n_out++;
    end
  end

  initial begin
    for (int n = 0; n < N; n++) tmpl_upper[n] = '0;
    K = N << trk_mode;
    for (int j = 0; j < NJOB; j++) begin
      int best, bl, s;
      kk[j] = $urandom_range(K - 1);
      c0[j] = 20 + j * N * K;
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++) tmpl[j][m][n] = pixel_t'($urandom);
      for (int r = 0; r < DIM; r++)
        for (int col = 0; col < DIM; col++) sa[j][r][col] = pixel_t'($urandom);
      best = -1; bl = 0;
      for (int l = 0; l < K; l++) begin
        s = sad_of(j, kk[j], l);
        if (best < 0 || s < best) begin best = s; bl = l; end
      end
      // incoming result: better, equal (tie) or worse than the module's own
      rin[j].first_pos = idx_t'(kk[j]);
      rin[j].mv_k = idx_t'($urandom);
      rin[j].mv_l = idx_t'($urandom);
      case (j % 3)
        0: rin[j].sad = sad_t'(best + 1);
        1: rin[j].sad = sad_t'(best);
        default: rin[j].sad = sad_t'(best - 1);
      endcase
      if (best < int'(rin[j].sad))
        rexp[j] = '{sad: sad_t'(best), mv_k: idx_t'(kk[j]), mv_l: idx_t'(bl),
                    first_pos: idx_t'(kk[j] + 1)};
      else
        rexp[j] = '{sad: rin[j].sad, mv_k: rin[j].mv_k, mv_l: rin[j].mv_l,
                    first_pos: idx_t'(kk[j] + 1)};
    end
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    wait (n_out == NJOB);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != NJOB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d results", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
