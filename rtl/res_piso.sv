// Parallel-in serial-out converter for the inter-chip result link.
//
// Results and first-position indexes are few words per block, so chips pass
// them a few bits at a time instead of on a wide bus. A load pulse captures a
// WIDTH-bit word; it then leaves on ser_data SER_W bits per cycle, least
// significant bits first, for ceil(WIDTH/SER_W) consecutive cycles while
// ser_valid is high. The first beat is on the outputs the cycle after load.
// A load while a word is still being sent is an error (asserted).
// The number of bits per beat and the framing with a valid line are this
// design's own choices.
// Lint note: rst_n is reported as used both asynchronously and
// synchronously; the synchronous use is only the overrun assertion's
// disable condition, all flip-flops reset asynchronously.
module res_piso #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned SER_W = 4,
  localparam int unsigned BEATS = (WIDTH + SER_W - 1) / SER_W,
  localparam int unsigned CNT_W = $clog2(BEATS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             load,
  output logic [SER_W-1:0] ser_data,
  output logic             ser_valid,
  output logic             busy
);

  logic [BEATS*SER_W-1:0] sr_q;
  logic [CNT_W-1:0]       cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_q  <= '0;
      cnt_q <= '0;
    end else if (load) begin
      sr_q  <= (BEATS*SER_W)'(din);
      cnt_q <= CNT_W'(BEATS);
    end else if (cnt_q != '0) begin
      sr_q  <= sr_q >> SER_W;
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign ser_data  = sr_q[SER_W-1:0];
  assign ser_valid = (cnt_q != '0);
  assign busy      = (cnt_q != '0);

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> (cnt_q == '0));

endmodule
