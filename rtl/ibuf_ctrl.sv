// Input buffer and controller of the block-matching array ("host").
//
// It stores template blocks and search areas as they arrive, works out the
// schedule of the NMOD cascaded modules, and from that produces every input
// sequence the array needs: the start pulse of the first module, the serial
// template stream c, the main lines p1/p2 (the rows of the first module), the
// force lines pf1/pf2 (the last row of each later module's job, a row the
// previous module never had) together with the bus-source select of every
// module, and the result words that enter the first module. It also reads
// back the result of the last module: either a finished motion vector or,
// when the modules need several rounds per block, a partial result that it
// feeds to the first module again.
//
// Schedule. With K = N << trk_mode and NMOD modules, a block takes
// R = K / NMOD rounds; in round r module j owns candidate row k = r*NMOD + j.
// One job (one round of one module) lasts N*K cycles, so a block occupies the
// array for R*N*K cycles (the block pipeline period) and rounds and blocks
// follow each other without gaps. Module j runs (K+1)*j cycles behind module
// 0. The controller keeps one "tracker" per module that repeats this
// timeline N+2 cycles ahead of the module (the template of a row has to be
// sent that early), with the job it is on and the one before it, whose last
// row is still being sent. Row streams are produced by four stream generators
// (p1, p2, pf1, pf2) that read K+N-1 pixels of one search-area row, one per
// cycle. A force row goes to pf1 if that line is free and to pf2 otherwise;
// at most two force rows overlap.
//
// Buffering. Templates use two banks and search areas three (previous,
// current and next area); block w may be written once block w-1 has started
// and, for the search area, once nothing reads its bank any more.
// c_wready / sa_wready show when writing is accepted. Blocks are started as
// soon as both their template and their search area are complete.
//
// Timing of the outputs towards the array: start, c, the result link are
// registered; p1, p2, pf1, pf2 and b_src are read combinationally from the
// registered stream state. The result of a block leaves on mv_valid
// (one-cycle pulse).
//
// The host's role (feeding data, returning partial results for further
// rounds) and the buffers' bank counts follow the published system; the
// tracker and stream-generator organisation is this design's own.
// Lint note: rst_n is reported as used both asynchronously and
// synchronously; the synchronous use is only the assertions' disable
// condition, all flip-flops reset asynchronously. Also reported as unused:
// the k field of the pending block descriptor (a new block always starts at
// k = 0), the high bits of the row-number temporary and the PISO busy flag
// (the link-clash assertion covers what it would tell).
module ibuf_ctrl
  import fsbm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned NMOD  = 4,
  parameter int unsigned SER_W = 4,
  localparam int unsigned KMAX = 4 * N,
  localparam int unsigned DIM  = KMAX + N - 1,
  localparam int unsigned C_W  = $clog2(DIM),
  localparam int unsigned A_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned J_W  = (NMOD > 1) ? $clog2(NMOD) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  trk_mode_t        trk_mode,
  // template block input, raster order
  input  pixel_t           c_wdata,
  input  logic             c_wvalid,
  output logic             c_wready,
  // search area input, four lanes (U-Even, U-Odd, L-Even, L-Odd)
  input  pixel_t           sa_wdata  [4],
  input  logic [3:0]       sa_wvalid,
  output logic [3:0]       sa_wready,
  // towards the array
  output logic             start,
  output pixel_t           c,
  output pixel_t           p1,
  output pixel_t           p2,
  output pixel_t           pf1,
  output pixel_t           pf2,
  output bus_src_e         b_src [NMOD],
  output logic [SER_W-1:0] res_ser,
  output logic             res_ser_valid,
  input  logic [SER_W-1:0] ret_ser,
  input  logic             ret_ser_valid,
  // motion vector of each block
  output logic             mv_valid,
  output sad_t             mv_sad,
  output idx_t             mv_k,
  output idx_t             mv_l
);

  localparam int unsigned H_W = $clog2(2 * N * KMAX + 1);
  localparam int unsigned LOGN = $clog2(N);

  typedef struct packed {
    logic           tbank;  // template bank
    logic [1:0]     sbank;  // search-area bank
    idx_t           k;      // candidate row of this module's job
  } desc_t;

  // --------------------------------------------------------------- config
  logic [H_W-1:0] k_val, nk, ef;
  logic [H_W-1:0] k_mask;
  logic [3:0]     log_k;
  logic [H_W-1:0] rounds;

  always_comb begin
    k_val  = H_W'(N) << trk_mode;
    k_mask = k_val - 1'b1;
    log_k  = 4'(LOGN) + 4'(trk_mode);
    nk     = k_val << LOGN;
    ef     = nk - k_val + H_W'(N + 1);    // decision time of a force row
    rounds = k_val / H_W'(NMOD);
  end

  // -------------------------------------------------------------- buffers
  logic           t_done, s_done;
  logic           t_allow, s_allow;
  logic           t_rd_bank;
  logic [A_W-1:0] t_rd_m, t_rd_n;
  pixel_t         t_rd_data;
  logic [1:0]     s_rd_bank [4];
  logic [C_W-1:0] s_rd_row  [4];
  logic [C_W-1:0] s_rd_col  [4];
  pixel_t         s_rd_data [4];

  template_buffer #(.N(N)) u_tbuf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_data (c_wdata),
    .wr_valid(c_wvalid),
    .wr_allow(t_allow),
    .wr_done (t_done),
    .rd_bank (t_rd_bank),
    .rd_m    (t_rd_m),
    .rd_n    (t_rd_n),
    .rd_data (t_rd_data)
  );

  search_buffer #(.N(N)) u_sbuf (
    .clk       (clk),
    .rst_n     (rst_n),
    .trk_mode  (trk_mode),
    .wr_data   (sa_wdata),
    .wr_valid  (sa_wvalid),
    .wr_allow  (s_allow),
    .lane_ready(sa_wready),
    .wr_done   (s_done),
    .rd_bank   (s_rd_bank),
    .rd_row    (s_rd_row),
    .rd_col    (s_rd_col),
    .rd_data   (s_rd_data)
  );

  assign c_wready = t_allow;

  // ------------------------------------------------------------- trackers
  logic           cur_v  [NMOD];
  logic           prev_v [NMOD];
  desc_t          cur_d  [NMOD];
  desc_t          prev_d [NMOD];
  logic [H_W-1:0] h_q    [NMOD];
  logic           st_req [NMOD];
  desc_t          st_d   [NMOD];
  logic           f_req  [NMOD];
  desc_t          f_d    [NMOD];

  for (genvar j = 0; j < int'(NMOD); j++) begin : g_trk
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cur_v[j]  <= 1'b0;
        prev_v[j] <= 1'b0;
        cur_d[j]  <= '0;
        prev_d[j] <= '0;
        h_q[j]    <= '0;
      end else if (st_req[j]) begin
        cur_v[j]  <= 1'b1;
        cur_d[j]  <= st_d[j];
        prev_v[j] <= cur_v[j];
        prev_d[j] <= cur_d[j];
        h_q[j]    <= '0;
      end else if (cur_v[j] || prev_v[j]) begin
        h_q[j] <= (h_q[j] == nk - 1'b1) ? '0 : h_q[j] + 1'b1;
        if (cur_v[j] && h_q[j] == nk - 1'b1) begin
          cur_v[j]  <= 1'b0;
          prev_v[j] <= 1'b1;
          prev_d[j] <= cur_d[j];
        end else if (prev_v[j] && h_q[j] == H_W'(N + 1)) begin
          prev_v[j] <= 1'b0;
        end
      end
    end

    // Force row (last template row) of modules after the first.
    if (j == 0) begin : g_nf
      assign f_req[j] = 1'b0;
      assign f_d[j]   = '0;
    end else begin : g_f
      assign f_req[j] = (cur_v[j] && h_q[j] == ef) || (prev_v[j] && h_q[j] + nk == ef);
      assign f_d[j]   = (cur_v[j] && h_q[j] == ef) ? cur_d[j] : prev_d[j];
    end

    // The next tracker starts K+1 cycles after this one.
    if (j > 0) begin : g_st
      assign st_req[j] = cur_v[j-1] && (h_q[j-1] == k_val);
      assign st_d[j]   = '{tbank: cur_d[j-1].tbank, sbank: cur_d[j-1].sbank,
                           k: cur_d[j-1].k + 1'b1};
    end
  end

  // ------------------------------------------------------------ scheduler
  logic [15:0]    blk_started_q, t_written_q, s_written_q;
  logic [H_W-1:0] round_q;
  logic           more_q;
  desc_t          blk_d_q;
  logic           next_tb_q;
  logic [1:0]     next_sb_q, s_wb_q;
  logic           t0_free;
  logic           start_round, start_block;
  logic           ini_load;

  assign t0_free     = (cur_v[0] && h_q[0] == nk - 1'b1) || (!cur_v[0] && !prev_v[0]);
  assign start_round = t0_free && more_q;
  assign start_block = t0_free && !more_q &&
                       (t_written_q > blk_started_q) && (s_written_q > blk_started_q);

  always_comb begin
    st_req[0] = start_round || start_block;
    if (start_round)
      st_d[0] = '{tbank: blk_d_q.tbank, sbank: blk_d_q.sbank,
                  k: idx_t'((round_q + 1'b1) * H_W'(NMOD))};
    else
      st_d[0] = '{tbank: next_tb_q, sbank: next_sb_q, k: '0};
  end

  // The initial result word of a block is sent once the first module has
  // delivered the result of its previous job (N+1 cycles into the new job).
  assign ini_load = cur_v[0] && (cur_d[0].k == '0) && (h_q[0] == H_W'(2 * N + 3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_started_q <= '0;
      t_written_q   <= '0;
      s_written_q   <= '0;
      round_q       <= '0;
      more_q        <= 1'b0;
      blk_d_q       <= '0;
      next_tb_q     <= 1'b0;
      next_sb_q     <= '0;
      s_wb_q        <= '0;
    end else begin
      if (t_done) t_written_q <= t_written_q + 1'b1;
      if (s_done) begin
        s_written_q <= s_written_q + 1'b1;
        s_wb_q      <= (s_wb_q == 2'd2) ? 2'd0 : s_wb_q + 1'b1;
      end
      if (start_round) begin
        round_q <= round_q + 1'b1;
        more_q  <= (round_q + H_W'(2) < rounds);
      end else if (start_block) begin
        round_q       <= '0;
        more_q        <= (rounds > 1);
        blk_d_q       <= st_d[0];
        blk_started_q <= blk_started_q + 1'b1;
        next_tb_q     <= ~next_tb_q;
        next_sb_q     <= (next_sb_q == 2'd2) ? 2'd0 : next_sb_q + 1'b1;
      end
    end
  end

  // ---------------------------------------------------- stream generators
  // 0: p1, 1: p2, 2: pf1, 3: pf2
  logic           g_act  [4];
  logic [1:0]     g_bank [4];
  logic [C_W-1:0] g_row  [4];
  logic [C_W-1:0] g_x    [4];
  logic [J_W-1:0] g_dest [4];
  logic           g_req  [4];
  logic [1:0]     g_rbank[4];
  logic [C_W-1:0] g_rrow [4];
  logic [J_W-1:0] g_rdest[4];
  logic [C_W-1:0] x_last;
  logic [3:0]     bank_busy;

  assign x_last = C_W'(k_val + H_W'(N - 2));

  // Main rows of the first module: decision at e = m*K + N + 1.
  logic           mr_v;
  desc_t          mr_d;
  logic [H_W-1:0] mr_m;

  always_comb begin
    logic [H_W-1:0] e, t;
    e    = '0;
    t    = '0;
    mr_v = 1'b0;
    mr_d = cur_d[0];
    mr_m = '0;
    if (cur_v[0] && h_q[0] >= H_W'(N + 1)) begin
      t = h_q[0] - H_W'(N + 1);
      if ((t & k_mask) == '0 && (t >> log_k) < H_W'(N)) begin
        mr_v = 1'b1;
        mr_m = t >> log_k;
      end
    end
    if (!mr_v && prev_v[0]) begin
      e = h_q[0] + nk;
      t = e - H_W'(N + 1);
      if ((t & k_mask) == '0 && (t >> log_k) < H_W'(N)) begin
        mr_v = 1'b1;
        mr_d = prev_d[0];
        mr_m = t >> log_k;
      end
    end
  end

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      g_req[g]   = 1'b0;
      g_rbank[g] = mr_d.sbank;
      g_rrow[g]  = C_W'(mr_d.k) + C_W'(mr_m);
      g_rdest[g] = '0;
    end
    g_req[0] = mr_v && !mr_m[0];
    g_req[1] = mr_v &&  mr_m[0];
    for (int j = 1; j < int'(NMOD); j++) begin
      if (f_req[j]) begin
        if (!g_act[2] || g_x[2] == x_last) begin
          g_req[2]   = 1'b1;
          g_rbank[2] = f_d[j].sbank;
          g_rrow[2]  = C_W'(f_d[j].k) + C_W'(N - 1);
          g_rdest[2] = J_W'(j);
        end else begin
          g_req[3]   = 1'b1;
          g_rbank[3] = f_d[j].sbank;
          g_rrow[3]  = C_W'(f_d[j].k) + C_W'(N - 1);
          g_rdest[3] = J_W'(j);
        end
      end
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_gen
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        g_act[g]  <= 1'b0;
        g_bank[g] <= '0;
        g_row[g]  <= '0;
        g_x[g]    <= '0;
        g_dest[g] <= '0;
      end else if (g_req[g]) begin
        g_act[g]  <= 1'b1;
        g_bank[g] <= g_rbank[g];
        g_row[g]  <= g_rrow[g];
        g_x[g]    <= '0;
        g_dest[g] <= g_rdest[g];
      end else if (g_act[g]) begin
        if (g_x[g] == x_last) g_act[g] <= 1'b0;
        else                  g_x[g]   <= g_x[g] + 1'b1;
      end
    end
    assign s_rd_bank[g] = g_bank[g];
    assign s_rd_row[g]  = g_row[g];
    assign s_rd_col[g]  = g_x[g];
  end

  assign p1  = g_act[0] ? s_rd_data[0] : '0;
  assign p2  = g_act[1] ? s_rd_data[1] : '0;
  assign pf1 = g_act[2] ? s_rd_data[2] : '0;
  assign pf2 = g_act[3] ? s_rd_data[3] : '0;

  always_comb begin
    for (int j = 0; j < int'(NMOD); j++) begin
      if (g_act[2] && g_dest[2] == J_W'(j))      b_src[j] = SRC_PF1;
      else if (g_act[3] && g_dest[3] == J_W'(j)) b_src[j] = SRC_PF2;
      else                                       b_src[j] = SRC_MAIN;
    end
  end

  // Banks still in use by a tracker or a stream generator.
  always_comb begin
    bank_busy = '0;
    for (int j = 0; j < int'(NMOD); j++) begin
      if (cur_v[j])  bank_busy[cur_d[j].sbank]  = 1'b1;
      if (prev_v[j]) bank_busy[prev_d[j].sbank] = 1'b1;
    end
    for (int g = 0; g < 4; g++)
      if (g_act[g]) bank_busy[g_bank[g]] = 1'b1;
  end

  assign t_allow = (t_written_q <= blk_started_q);
  assign s_allow = (s_written_q <= blk_started_q) && !bank_busy[s_wb_q];

  // ------------------------------------------- start and template stream
  logic   start_q;
  pixel_t c_q;
  logic   c_v;

  always_comb begin
    t_rd_bank = cur_d[0].tbank;
    t_rd_m    = A_W'(h_q[0] >> log_k);
    t_rd_n    = A_W'(H_W'(N - 1) - (h_q[0] & k_mask));
    c_v       = cur_v[0] && ((h_q[0] & k_mask) < H_W'(N));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      c_q     <= '0;
    end else begin
      start_q <= cur_v[0] && (h_q[0] == H_W'(N + 1));
      c_q     <= c_v ? t_rd_data : '0;
    end
  end

  assign start = start_q;
  assign c     = c_q;

  // ---------------------------------------------------------- result link
  result_t ret_word;
  logic    ret_valid;
  logic    fwd_load;
  result_t piso_din;
  logic    piso_busy;
  logic [H_W-1:0] rr_q;
  sad_t    mv_sad_q;
  idx_t    mv_k_q, mv_l_q;
  logic    mv_valid_q;

  res_sipo #(.WIDTH(RES_W), .SER_W(SER_W)) u_ret (
    .clk       (clk),
    .rst_n     (rst_n),
    .ser_data  (ret_ser),
    .ser_valid (ret_ser_valid),
    .dout      (ret_word),
    .dout_valid(ret_valid)
  );

  assign fwd_load = ret_valid && (rr_q + 1'b1 < rounds);
  assign piso_din = ini_load ? '{sad: '1, mv_k: '0, mv_l: '0, first_pos: '0} : ret_word;

  res_piso #(.WIDTH(RES_W), .SER_W(SER_W)) u_res (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (piso_din),
    .load     (ini_load || fwd_load),
    .ser_data (res_ser),
    .ser_valid(res_ser_valid),
    .busy     (piso_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q       <= '0;
      mv_valid_q <= 1'b0;
      mv_sad_q   <= '0;
      mv_k_q     <= '0;
      mv_l_q     <= '0;
    end else begin
      mv_valid_q <= 1'b0;
      if (ret_valid) begin
        if (fwd_load) begin
          rr_q <= rr_q + 1'b1;
        end else begin
          rr_q       <= '0;
          mv_valid_q <= 1'b1;
          mv_sad_q   <= ret_word.sad;
          mv_k_q     <= ret_word.mv_k;
          mv_l_q     <= ret_word.mv_l;
        end
      end
    end
  end

  assign mv_valid = mv_valid_q;
  assign mv_sad   = mv_sad_q;
  assign mv_k     = mv_k_q;
  assign mv_l     = mv_l_q;

  // An initial word and a fed-back word never compete for the link.
  a_no_link_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(ini_load && fwd_load));
  // At most two force rows are in flight.
  a_force_lines: assert property (@(posedge clk) disable iff (!rst_n)
    g_req[3] |-> (!g_act[3] || g_x[3] == x_last));

endmodule
