// Search-area input buffer: three banks, four write lanes, four read ports.
//
// A search area of (K+N-1) x (K+N-1) pixels is written through four lanes,
// named after the buffer's four external data lines: lane 0 (U-Even) writes
// the even rows below N, lane 1 (U-Odd) the odd rows below N, lane 2 (L-Even)
// the even rows from N on and lane 3 (L-Odd) the odd rows from N on. Each lane
// writes its rows in order, left to right, one pixel per cycle while its
// valid and wr_allow are high; lane_ready tells which lanes still expect
// data. When all four lanes have finished, wr_done pulses and writing moves
// to the next of the three banks (0, 1, 2, 0, ...). Three banks hold the
// previous, current and next search areas, because the last modules of the
// array still read the previous area while the first ones start the next.
//
// The four read ports are combinational (bank, row, column) look-ups; they
// feed the main lines p1, p2 and the force lines pf1, pf2.
//
// The published buffer keeps the first N rows in two "upper" cluster copies
// and the other rows in three "lower" cluster copies, each split into even-
// and odd-row banks, and copies rows from lower to upper clusters over two
// update buses. This design stores one copy of each area in a three-bank
// array with four read ports instead, which gives the same output sequences
// without the cluster-to-cluster updates.
module search_buffer
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned KMAX = 4 * N,
  localparam int unsigned DIM  = KMAX + N - 1,
  localparam int unsigned C_W  = $clog2(DIM)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  trk_mode_t       trk_mode,
  input  pixel_t          wr_data   [4],
  input  logic [3:0]      wr_valid,
  input  logic            wr_allow,
  output logic [3:0]      lane_ready,
  output logic            wr_done,
  input  logic [1:0]      rd_bank   [4],
  input  logic [C_W-1:0]  rd_row    [4],
  input  logic [C_W-1:0]  rd_col    [4],
  output pixel_t          rd_data   [4]
);

  pixel_t         mem_q [3][DIM][DIM];
  logic [1:0]     wbank_q;
  logic [C_W-1:0] row_q [4];
  logic [C_W-1:0] col_q [4];
  logic [3:0]     fin_q;
  logic           done_q;
  logic [C_W-1:0] last_col;
  logic [C_W-1:0] last_row [4];
  logic [C_W-1:0] first_row [4];
  logic [3:0]     wr_en;
  logic [3:0]     lane_fin_now;

  // Rows of a lane: lanes 0/1 rows < N, lanes 2/3 rows N .. K+N-2.
  always_comb begin
    last_col     = C_W'((N << trk_mode) + N - 2);
    first_row[0] = C_W'(0);
    first_row[1] = C_W'(1);
    first_row[2] = C_W'(N);
    first_row[3] = C_W'(N + 1);
    last_row[0]  = C_W'(N - 2);
    last_row[1]  = C_W'(N - 1);
    last_row[2]  = last_col;
    last_row[3]  = last_col - 1'b1;
    for (int q = 0; q < 4; q++) begin
      wr_en[q]        = wr_valid[q] && wr_allow && !fin_q[q];
      lane_ready[q]   = wr_allow && !fin_q[q];
      lane_fin_now[q] = wr_en[q] && (col_q[q] == last_col) && (row_q[q] == last_row[q]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank_q <= '0;
      fin_q   <= '0;
      done_q  <= 1'b0;
      for (int q = 0; q < 4; q++) begin
        row_q[q] <= first_row[q];
        col_q[q] <= '0;
      end
    end else begin
      done_q <= 1'b0;
      if ((fin_q | lane_fin_now) == 4'hF) begin
        fin_q   <= '0;
        done_q  <= 1'b1;
        wbank_q <= (wbank_q == 2'd2) ? 2'd0 : wbank_q + 1'b1;
        for (int q = 0; q < 4; q++) begin
          row_q[q] <= first_row[q];
          col_q[q] <= '0;
        end
      end else begin
        for (int q = 0; q < 4; q++) begin
          if (wr_en[q]) begin
            if (col_q[q] == last_col) begin
              col_q[q] <= '0;
              if (row_q[q] == last_row[q]) fin_q[q] <= 1'b1;
              else                         row_q[q] <= row_q[q] + C_W'(2);
            end else begin
              col_q[q] <= col_q[q] + 1'b1;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < 4; q++)
      if (wr_en[q]) mem_q[wbank_q][row_q[q]][col_q[q]] <= wr_data[q];
  end

  always_comb
    for (int q = 0; q < 4; q++) rd_data[q] = mem_q[rd_bank[q]][rd_row[q]][rd_col[q]];

  assign wr_done = done_q;

endmodule
