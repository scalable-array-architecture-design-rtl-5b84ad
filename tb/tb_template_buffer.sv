// Test of the two-bank template buffer: five random N x N blocks are written
// with random gaps in wr_valid and wr_allow. Checks that wr_done pulses once
// per block, the cycle after its last pixel, and that every pixel of the
// finished block reads back from the expected bank (0, 1, 0, ...), while
// the other bank keeps the previous block.
module tb_template_buffer;
  import fsbm_pkg::*;

  localparam int unsigned N   = 4;
  localparam int unsigned A_W = $clog2(N);

  logic           clk = 1'b0, rst_n = 1'b1;
  pixel_t         wr_data = '0;
  logic           wr_valid = 1'b0, wr_allow = 1'b0;
  logic           wr_done;
  logic           rd_bank = 1'b0;
  logic [A_W-1:0] rd_m = '0, rd_n = '0;
  pixel_t         rd_data;

  template_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  pixel_t blk [5][N][N];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    foreach (blk[b, m, n]) blk[b][m][n] = pixel_t'($urandom);
    for (int b = 0; b < 5; b++) begin
      int i;
      i = 0;
      while (i < int'(N * N)) begin
        @(negedge clk);
        check("early wr_done", int'(wr_done), 0);
        wr_valid = 1'($urandom);
        wr_allow = ($urandom_range(3) != 0);
        wr_data  = wr_valid ? blk[b][i / N][i % N] : pixel_t'($urandom);
        if (wr_valid && wr_allow) i++;
      end
      @(negedge clk);
      wr_valid = 1'b0;
      check("wr_done", int'(wr_done), 1);
      for (int m = 0; m < int'(N); m++)
        for (int n = 0; n < int'(N); n++) begin
          rd_m = A_W'(m);
          rd_n = A_W'(n);
          rd_bank = 1'(b);
          #1 check("new block", int'(rd_data), int'(blk[b][m][n]));
          if (b > 0) begin
            rd_bank = 1'(b - 1);
            #1 check("old block", int'(rd_data), int'(blk[b-1][m][n]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
