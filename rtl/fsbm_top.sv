// Full-search block-matching system: an input buffer and controller driving
// NCHIP cascaded array chips of two N-PE modules each (NMOD = 2*NCHIP).
//
// For every N x N template block the system compares the template with all
// K x K candidate blocks of its (K+N-1) x (K+N-1) search area and returns the
// candidate with the smallest sum of absolute differences (SAD) and its
// motion vector (k, l), k being the row and l the column offset. K is 16, 32
// or 64 for N = 16 (trk_mode 0, 1, 2). With NMOD modules a block occupies the
// array for ceil(K/NMOD)*N*K cycles; blocks are pipelined back to back.
//
// Chips are chained: main lines p1/p2, the template stream c, the start pulse
// and the bit-serial result link go from chip to chip; the force lines pf1/pf2
// and the bus-source selects come from the controller to all chips. The last
// chip's results return to the controller, which outputs the motion vector
// or, if more rounds are needed, sends the partial result back to the first
// chip. This is the system of two cascaded chips and a host buffer shown for
// the published architecture; NCHIP sets the number of chips.
//
// Interface: write each template block (raster order) on c_w* and each search
// area on the four sa_w* lanes (see search_buffer for which rows go on which
// lane); a block starts as soon as both are complete. mv_valid pulses once
// per block, in block order. trk_mode must stay constant while blocks are in
// flight. When a block needs several rounds, the returned partial result
// must reach the first chip in time: N*K - (NMOD-1)*(K+1) cycles must exceed
// the serial-link round trip (about twice ceil(34/SER_W) plus 4 cycles), and
// between chips ceil(34/SER_W) must not exceed K-2.
// Lint note: rst_n is reported as used both asynchronously and
// synchronously because assertions below use it as their disable condition;
// no logic uses it synchronously.
module fsbm_top
  import fsbm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned NCHIP = 2,
  parameter int unsigned SER_W = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  trk_mode_t  trk_mode,
  input  pixel_t     c_wdata,
  input  logic       c_wvalid,
  output logic       c_wready,
  input  pixel_t     sa_wdata [4],
  input  logic [3:0] sa_wvalid,
  output logic [3:0] sa_wready,
  output logic       mv_valid,
  output sad_t       mv_sad,
  output idx_t       mv_k,
  output idx_t       mv_l
);

  localparam int unsigned NMOD = 2 * NCHIP;

  logic             start;
  pixel_t           c_line;
  pixel_t           p1, p2, pf1, pf2;
  bus_src_e         b_src [NMOD];
  logic [SER_W-1:0] res_ser;
  logic             res_ser_valid;

  // Chain signals; index i is the input of chip i.
  logic             st    [NCHIP+1];
  pixel_t           mp1   [NCHIP+1];
  pixel_t           mp2   [NCHIP+1];
  pixel_t           cc    [NCHIP+1];
  logic [SER_W-1:0] ser   [NCHIP+1];
  logic             ser_v [NCHIP+1];

  ibuf_ctrl #(.N(N), .NMOD(NMOD), .SER_W(SER_W)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .trk_mode     (trk_mode),
    .c_wdata      (c_wdata),
    .c_wvalid     (c_wvalid),
    .c_wready     (c_wready),
    .sa_wdata     (sa_wdata),
    .sa_wvalid    (sa_wvalid),
    .sa_wready    (sa_wready),
    .start        (start),
    .c            (c_line),
    .p1           (p1),
    .p2           (p2),
    .pf1          (pf1),
    .pf2          (pf2),
    .b_src        (b_src),
    .res_ser      (res_ser),
    .res_ser_valid(res_ser_valid),
    .ret_ser      (ser[NCHIP]),
    .ret_ser_valid(ser_v[NCHIP]),
    .mv_valid     (mv_valid),
    .mv_sad       (mv_sad),
    .mv_k         (mv_k),
    .mv_l         (mv_l)
  );

  assign st[0]    = start;
  assign mp1[0]   = p1;
  assign mp2[0]   = p2;
  assign cc[0]    = c_line;
  assign ser[0]   = res_ser;
  assign ser_v[0] = res_ser_valid;

  for (genvar i = 0; i < int'(NCHIP); i++) begin : g_chip
    bus_src_e src [2];
    assign src[0] = b_src[2*i];
    assign src[1] = b_src[2*i+1];

    fsbm_chip #(.N(N), .SER_W(SER_W)) u_chip (
      .clk          (clk),
      .rst_n        (rst_n),
      .trk_mode     (trk_mode),
      .start_in     (st[i]),
      .start_out    (st[i+1]),
      .p1           (mp1[i]),
      .p2           (mp2[i]),
      .pf1          (pf1),
      .pf2          (pf2),
      .b_src        (src),
      .p1_out       (mp1[i+1]),
      .p2_out       (mp2[i+1]),
      .c_in         (cc[i]),
      .c_out        (cc[i+1]),
      .ser_in       (ser[i]),
      .ser_in_valid (ser_v[i]),
      .ser_out      (ser[i+1]),
      .ser_out_valid(ser_v[i+1])
    );
  end

endmodule
