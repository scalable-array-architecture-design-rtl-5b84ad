// Processing element (PE) of one module of the block-matching array.
//
// Every cycle the PE takes the search-area pixel from one of the module's two
// broadcast buses, subtracts it from its stored template pixel, takes the
// absolute value and adds it to the partial sum arriving from its right-hand
// neighbour; the new partial sum goes to the left-hand neighbour in the next
// cycle. A selection pulse, passed from right to left one PE per cycle, marks
// the start of a new template row: the PE then loads the next template pixel
// and switches to the bus named by the bit that travels with the pulse (even
// rows on bus A, odd rows on bus B, so the PE alternates between the buses;
// passing the bus number rather than toggling is this design's choice).
//
// The 16-bit partial sum travels as {hi, lo, cy}: its value is
// hi*256 + lo + cy*256. A PE adds the pixel difference to the low byte only
// and finishes the high byte of its neighbour's sum (hi + cy) in the same
// cycle, so the critical path is two 8-bit adders and two multiplexers
// instead of a 16-bit carry chain. The module completes the last carry.
//
// UPPER selects one of the two PE types. An upper PE receives template
// pixels through a two-register shift chain (half the speed of the selection
// pulse), so that the template pixel for PE n arrives exactly when the
// selection pulse reaches it. A lower PE instead copies the template pixel
// that the PE above it has just finished with (tmpl_prev of the upper PE).
// Both types keep tmpl_prev for a PE below them.
//
// Timing: all outputs are registered; one cycle from sel_in to sel_out and
// from the partial-sum inputs to the partial-sum outputs. The split
// accumulator and the two PE types follow the published chip; the template
// chain and hand-down are this design's reading of them.
module fsbm_pe
  import fsbm_pkg::*;
#(
  parameter bit UPPER = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pixel_t bus_a,        // search-area bus carrying even template rows
  input  pixel_t bus_b,        // search-area bus carrying odd template rows
  input  logic   sel_in,       // new-row pulse from the right neighbour
  input  logic   sel_b_in,     // the new row is on bus B
  output logic   sel_out,      // new-row pulse to the left neighbour
  output logic   sel_b_out,
  input  pixel_t chain_in,     // template shift chain in (upper PE)
  output pixel_t chain_out,    // template shift chain out (upper PE)
  input  pixel_t tmpl_upper,   // template pixel handed down (lower PE)
  output pixel_t tmpl_prev,    // template pixel used in the previous row
  input  pixel_t lo_in,        // partial sum from the right neighbour
  input  pixel_t hi_in,
  input  logic   cy_in,
  output pixel_t lo_out,       // partial sum to the left neighbour
  output pixel_t hi_out,
  output logic   cy_out
);

  pixel_t tmpl_q;
  pixel_t tmpl_prev_q;
  pixel_t chain1_q, chain2_q;
  logic   use_b_q;
  logic   sel_q;
  logic   sel_b_q;
  pixel_t lo_q, hi_q;
  logic   cy_q;

  pixel_t             pix;
  pixel_t             diff;
  logic [PIX_W:0]     lo_sum;
  pixel_t             hi_sum;

  always_comb begin
    pix    = use_b_q ? bus_b : bus_a;
    diff   = absdiff(tmpl_q, pix);
    lo_sum = {1'b0, lo_in} + {1'b0, diff};
    hi_sum = hi_in + pixel_t'(cy_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmpl_q      <= '0;
      tmpl_prev_q <= '0;
      chain1_q    <= '0;
      chain2_q    <= '0;
      use_b_q     <= 1'b0;
      sel_q       <= 1'b0;
      sel_b_q     <= 1'b0;
      lo_q        <= '0;
      hi_q        <= '0;
      cy_q        <= 1'b0;
    end else begin
      sel_q   <= sel_in;
      sel_b_q <= sel_b_in;
      if (UPPER) begin
        chain1_q <= chain_in;
        chain2_q <= chain1_q;
      end
      if (sel_in) begin
        tmpl_q      <= UPPER ? chain2_q : tmpl_upper;
        tmpl_prev_q <= tmpl_q;
        use_b_q     <= sel_b_in;
      end
      lo_q <= lo_sum[PIX_W-1:0];
      cy_q <= lo_sum[PIX_W];
      hi_q <= hi_sum;
    end
  end

  assign sel_out   = sel_q;
  assign sel_b_out = sel_b_q;
  assign chain_out = chain2_q;
  assign tmpl_prev = tmpl_prev_q;
  assign lo_out    = lo_q;
  assign hi_out    = hi_q;
  assign cy_out    = cy_q;

endmodule
