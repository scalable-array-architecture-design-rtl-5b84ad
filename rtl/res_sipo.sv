// Serial-in parallel-out converter for the inter-chip result link.
//
// Receives the beats sent by res_piso: SER_W bits per cycle while ser_valid
// is high, least significant first. After ceil(WIDTH/SER_W) beats the
// assembled WIDTH-bit word is on dout and dout_valid pulses for one cycle
// (the cycle after the last beat). dout holds its value until the next word
// is complete. The bit-serial transfer of results follows the published
// chip; word format, beat order and the valid strobe are this design's own.
// Lint note: the lowest SER_W bits of the shift register are reported as
// unused: the register stores the first BEATS-1 beats in its upper part and
// the word is taken directly together with the last beat, so its lowest
// slot is never read.
module res_sipo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned SER_W = 4,
  localparam int unsigned BEATS = (WIDTH + SER_W - 1) / SER_W,
  localparam int unsigned CNT_W = $clog2(BEATS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SER_W-1:0] ser_data,
  input  logic             ser_valid,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid
);

  logic [BEATS*SER_W-1:0] sr_q;
  logic [CNT_W-1:0]       cnt_q;
  logic [WIDTH-1:0]       dout_q;
  logic                   dv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q   <= '0;
      cnt_q  <= '0;
      dout_q <= '0;
      dv_q   <= 1'b0;
    end else begin
      dv_q <= 1'b0;
      if (ser_valid) begin
        if (cnt_q == CNT_W'(BEATS - 1)) begin
          dout_q <= WIDTH'({ser_data, sr_q[BEATS*SER_W-1:SER_W]});
          dv_q   <= 1'b1;
          cnt_q  <= '0;
        end else begin
          sr_q  <= {ser_data, sr_q[BEATS*SER_W-1:SER_W]};
          cnt_q <= cnt_q + 1'b1;
        end
      end
    end
  end

  assign dout       = dout_q;
  assign dout_valid = dv_q;

endmodule
