// Template-block input buffer: two N x N pixel banks used alternately.
//
// While the array reads one template block from one bank, the next block is
// written into the other. Writes are sequential in raster order (row m, then
// column n), one pixel per cycle when wr_valid and wr_allow are both high;
// after N*N pixels wr_done pulses and writing moves to the other bank. The
// read port is combinational: rd_data = c(rd_m, rd_n) of bank rd_bank.
// The two alternating banks follow the published buffer; the raster write
// order and the handshake are this design's own choices.
module template_buffer
  import fsbm_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned A_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  pixel_t         wr_data,
  input  logic           wr_valid,
  input  logic           wr_allow,
  output logic           wr_done,
  input  logic           rd_bank,
  input  logic [A_W-1:0] rd_m,
  input  logic [A_W-1:0] rd_n,
  output pixel_t         rd_data
);

  pixel_t         mem_q [2][N][N];
  logic           wbank_q;
  logic [A_W-1:0] wm_q, wn_q;
  logic           done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank_q <= 1'b0;
      wm_q    <= '0;
      wn_q    <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (wr_valid && wr_allow) begin
        if (wn_q == A_W'(N - 1)) begin
          wn_q <= '0;
          if (wm_q == A_W'(N - 1)) begin
            wm_q    <= '0;
            wbank_q <= ~wbank_q;
            done_q  <= 1'b1;
          end else begin
            wm_q <= wm_q + 1'b1;
          end
        end else begin
          wn_q <= wn_q + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_allow) mem_q[wbank_q][wm_q][wn_q] <= wr_data;
  end

  assign rd_data = mem_q[rd_bank][rd_m][rd_n];
  assign wr_done = done_q;

endmodule
