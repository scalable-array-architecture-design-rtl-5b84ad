// One module of the block-matching array: a row of N processing elements
// that computes all K SADs of one row k of candidate positions.
//
// Data flow. The module owns the candidate row k given by the first-position
// index of the result word it receives. For template row m = 0..N-1 it needs
// search-area row k+m; rows arrive one pixel per cycle on two buses, even m on
// bus A and odd m on bus B, and consecutive rows overlap by N-1 cycles, which
// is why two buses are needed. Both buses are broadcast to all N PEs. PE n
// (n = 0 is the rightmost) holds template pixel c(m,n) and in the cycle it
// sees pixel x = l+n it adds |c(m,n) - p(k+m, l+n)| to the partial sum of
// candidate (k,l), which runs from right to left. The leftmost PE therefore
// delivers the sum over one template row for l = 0,1,..,K-1 in consecutive
// cycles. A K-word delay line with an adder accumulates these row sums over
// the N template rows, and a comparator keeps the smallest of the K finished
// SADs. At the end of the job this local minimum is compared with the result
// received from the previous module and the better one (the earlier one on a
// tie) goes to the next module, together with the incremented first-position
// index.
//
// Timing. A start pulse in cycle c0 begins a job of N*K cycles: the selection
// pulse enters PE 0 in c0 and again every K cycles, and search-area pixel x
// of row m must be on the module's bus inputs in cycle c0 + m*K + x (the
// inputs are registered once; the registered buses go on to the next
// module). The next job may start in cycle c0 + N*K. start_out pulses in
// cycle c0 + K + 1, the start of the next module, which then works one
// search-area row behind and one cycle later, so it can use this module's
// buses. An upper module takes template pixel c(m,n) on c_in in cycle
// c0 + m*K - 2 - n; a lower module copies its template from the upper module.
// The result leaves in cycle c0 + N*K + N + 1 (res_out_valid is a
// one-cycle pulse); res_in must arrive (res_in_valid) once per job, after the
// previous job's result has left and before cycle c0 + N*K + N.
//
// The second bus takes, by b_src, the main line or one of two force lines; a
// module needs a force line for the last row of its job, a row that the
// previous module never used. K = N << trk_mode (16/32/64 for N = 16).
// The PE structure, the K-word buffer and the chaining follow the published
// architecture; the exact cycle offsets, the start pulse, the tie rule and
// the result word format are this design's own choices.
// Lint note: rst_n is reported as used both asynchronously and
// synchronously; the synchronous use is only the result-handshake
// assertions' disable condition, all flip-flops reset asynchronously.
module fsbm_module
  import fsbm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter bit          UPPER = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  trk_mode_t trk_mode,
  input  logic      start_in,
  output logic      start_out,
  input  pixel_t    main_a,
  input  pixel_t    main_b,
  input  pixel_t    pf1,
  input  pixel_t    pf2,
  input  bus_src_e  b_src,
  output pixel_t    bus_a_out,
  output pixel_t    bus_b_out,
  input  pixel_t    c_in,
  input  pixel_t    tmpl_upper [N],
  output pixel_t    tmpl_prev  [N],
  input  result_t   res_in,
  input  logic      res_in_valid,
  output result_t   res_out,
  output logic      res_out_valid
);

  localparam int unsigned KMAX = 4 * N;
  localparam int unsigned LEN_W = $clog2(KMAX + 1);
  localparam int unsigned M_W = (N > 1) ? $clog2(N) : 1;

  // ---------------------------------------------------------------- buses
  pixel_t bus_a_q, bus_b_q;
  pixel_t b_next;

  always_comb begin
    unique case (b_src)
      SRC_PF1: b_next = pf1;
      SRC_PF2: b_next = pf2;
      default: b_next = main_b;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_a_q <= '0;
      bus_b_q <= '0;
    end else begin
      bus_a_q <= main_a;
      bus_b_q <= b_next;
    end
  end

  assign bus_a_out = bus_a_q;
  assign bus_b_out = bus_b_q;

  // ------------------------------------------------------------ controller
  logic [LEN_W-1:0] k_len;
  logic             run_q;
  logic [M_W-1:0]   m_q;
  idx_t             l_q;
  logic             row_end;
  logic             row_tick;
  logic             row_tick_b;
  logic             start_out_q;

  assign k_len    = LEN_W'(N) << trk_mode;
  assign row_end  = run_q && (LEN_W'(l_q) == k_len - 1'b1);
  // A selection pulse also ends the last row of a job, so that the template
  // pixels of that row move on to the lower module even if no job follows.
  assign row_tick  = start_in || row_end;
  assign row_tick_b = !start_in && row_end && (m_q != M_W'(N - 1)) && !m_q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      m_q         <= '0;
      l_q         <= '0;
      start_out_q <= 1'b0;
    end else begin
      start_out_q <= row_end && (m_q == '0);
      if (start_in) begin
        run_q <= 1'b1;
        m_q   <= '0;
        l_q   <= '0;
      end else if (run_q) begin
        if (row_end) begin
          l_q <= '0;
          if (m_q == M_W'(N - 1)) run_q <= 1'b0;
          else                    m_q   <= m_q + 1'b1;
        end else begin
          l_q <= l_q + 1'b1;
        end
      end
    end
  end

  assign start_out = start_out_q;

  // Side information travelling with the partial sums.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    idx_t l;
  } tag_t;

  tag_t tag_sr [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) tag_sr[i] <= '0;
    end else begin
      tag_sr[0] <= '{valid: run_q, first: (m_q == '0), last: (m_q == M_W'(N - 1)), l: l_q};
      for (int i = 1; i < int'(N); i++) tag_sr[i] <= tag_sr[i-1];
    end
  end

  // ------------------------------------------------------------- PE array
  logic   sel   [N+1];
  logic   sel_b [N+1];
  pixel_t chain [N+1];
  pixel_t lo    [N+1];
  pixel_t hi    [N+1];
  logic   cy    [N+1];

  assign sel[0]   = row_tick;
  assign sel_b[0] = row_tick_b;
  assign chain[0] = c_in;
  assign lo[0]    = '0;
  assign hi[0]    = '0;
  assign cy[0]    = 1'b0;

  for (genvar n = 0; n < int'(N); n++) begin : g_pe
    fsbm_pe #(.UPPER(UPPER)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .bus_a     (bus_a_q),
      .bus_b     (bus_b_q),
      .sel_in    (sel[n]),
      .sel_b_in  (sel_b[n]),
      .sel_out   (sel[n+1]),
      .sel_b_out (sel_b[n+1]),
      .chain_in  (chain[n]),
      .chain_out (chain[n+1]),
      .tmpl_upper(tmpl_upper[n]),
      .tmpl_prev (tmpl_prev[n]),
      .lo_in     (lo[n]),
      .hi_in     (hi[n]),
      .cy_in     (cy[n]),
      .lo_out    (lo[n+1]),
      .hi_out    (hi[n+1]),
      .cy_out    (cy[n+1])
    );
  end

  // ------------------------------------------- accumulator and SAD buffer
  tag_t tag;
  sad_t row_sum;
  sad_t buf_dout;
  sad_t acc;

  assign tag     = tag_sr[N-1];
  assign row_sum = {hi[N] + pixel_t'(cy[N]), lo[N]};
  assign acc     = row_sum + (tag.first ? '0 : buf_dout);

  var_delay_line #(.WIDTH(SAD_W), .DEPTH(KMAX)) u_sad_buf (
    .clk  (clk),
    .rst_n(rst_n),
    .len  (k_len),
    .din  (acc),
    .dout (buf_dout)
  );

  // ------------------------------------------------------------ comparator
  sad_t    best_q;
  idx_t    best_l_q;
  result_t res_in_q;
  logic    have_in_q;
  result_t res_out_q;
  logic    res_out_valid_q;

  logic    take_new;
  sad_t    own_sad;
  idx_t    own_l;
  logic    job_done;
  idx_t    k_own;

  assign take_new = (tag.l == '0) || (acc < best_q);
  assign own_sad  = take_new ? acc : best_q;
  assign own_l    = take_new ? tag.l : best_l_q;
  assign job_done = tag.valid && tag.last && (LEN_W'(tag.l) == k_len - 1'b1);
  assign k_own    = res_in_q.first_pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q          <= '0;
      best_l_q        <= '0;
      res_in_q        <= '0;
      have_in_q       <= 1'b0;
      res_out_q       <= '0;
      res_out_valid_q <= 1'b0;
    end else begin
      res_out_valid_q <= 1'b0;
      if (tag.valid && tag.last) begin
        best_q   <= own_sad;
        best_l_q <= own_l;
      end
      if (res_in_valid) begin
        res_in_q  <= res_in;
        have_in_q <= 1'b1;
      end
      if (job_done) begin
        have_in_q       <= 1'b0;
        res_out_valid_q <= 1'b1;
        if (own_sad < res_in_q.sad)
          res_out_q <= '{sad: own_sad, mv_k: k_own, mv_l: own_l, first_pos: k_own + 1'b1};
        else
          res_out_q <= '{sad: res_in_q.sad, mv_k: res_in_q.mv_k, mv_l: res_in_q.mv_l,
                         first_pos: k_own + 1'b1};
      end
    end
  end

  assign res_out       = res_out_q;
  assign res_out_valid = res_out_valid_q;

  // The previous module's result must arrive once per job, after this
  // module's previous result has left and before it finishes.
  a_result_once: assert property (@(posedge clk) disable iff (!rst_n)
    res_in_valid |-> !have_in_q);
  a_result_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    job_done |-> have_in_q);

endmodule
