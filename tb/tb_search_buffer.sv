// Test of the three-bank search-area buffer: six random search areas are
// written through the four lanes, two in each search-range mode (K = N, 2N,
// 4N), each lane stalling at random and wr_allow dropping at random. Checks
// that a lane drops lane_ready once its rows are written, that wr_done pulses
// once per area, and that every pixel reads back correctly through all four
// read ports from the bank in rotation 0, 1, 2, 0, ...
module tb_search_buffer;
  import fsbm_pkg::*;

  localparam int unsigned N    = 4;
  localparam int unsigned KMAX = 4 * N;
  localparam int unsigned DIM  = KMAX + N - 1;
  localparam int unsigned C_W  = $clog2(DIM);

  logic           clk = 1'b0, rst_n = 1'b1;
  trk_mode_t      trk_mode = '0;
  pixel_t         wr_data [4];
  logic [3:0]     wr_valid = '0;
  logic           wr_allow = 1'b0;
  logic [3:0]     lane_ready;
  logic           wr_done;
  logic [1:0]     rd_bank [4];
  logic [C_W-1:0] rd_row  [4];
  logic [C_W-1:0] rd_col  [4];
  pixel_t         rd_data [4];

  search_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pixel_t area [DIM][DIM];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int q = 0; q < 4; q++) begin
      wr_data[q] = '0; rd_bank[q] = '0; rd_row[q] = '0; rd_col[q] = '0;
    end
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    for (int a = 0; a < 6; a++) begin
      int side, cnt [4], total [4], seen_done;
      trk_mode = trk_mode_t'(a / 2);
      side = int'(N << trk_mode) + int'(N) - 1;
      foreach (area[r, c]) area[r][c] = pixel_t'($urandom);
      for (int q = 0; q < 4; q++) begin
        cnt[q] = 0;
        total[q] = 0;
        for (int r = 0; r < side; r++)
          if ((r % 2 == q % 2) && ((r < int'(N)) == (q < 2))) total[q] += side;
      end
      seen_done = 0;
      while (!seen_done) begin
        @(negedge clk);
        if (wr_done) seen_done = 1;
        wr_allow = ($urandom_range(3) != 0);
        for (int q = 0; q < 4; q++) begin
          int r, c, k;
          // the lane's k-th pixel: rows of its parity and half, in order
          k = cnt[q];
          r = ((q < 2) ? 0 : int'(N)) + (q % 2) + 2 * (k / side);
          c = k % side;
          wr_valid[q] = (cnt[q] < total[q]) && ($urandom_range(3) != 0);
          wr_data[q]  = (cnt[q] < total[q]) ? area[r][c] : pixel_t'($urandom);
        end
        #1;
        for (int q = 0; q < 4; q++) begin
          if (!seen_done)
            check("lane_ready", int'(lane_ready[q]), int'(wr_allow && cnt[q] < total[q]));
          if (wr_valid[q] && lane_ready[q]) cnt[q]++;
        end
      end
      wr_valid = '0;
      for (int r = 0; r < side; r++)
        for (int c = 0; c < side; c++) begin
          int q = $urandom_range(3);
          rd_bank[q] = 2'(a % 3);
          rd_row[q]  = C_W'(r);
          rd_col[q]  = C_W'(c);
          #1 check("read", int'(rd_data[q]), int'(area[r][c]));
        end
      @(negedge clk);
      check("single wr_done", int'(wr_done), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
