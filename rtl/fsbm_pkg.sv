// Shared types and constants of the scalable full-search block-matching array.
//
// Pixels are 8 bit and sums of absolute differences (SAD) are 16 bit, the
// widths of the chip's subtractor and accumulator. A candidate index (a
// motion-vector component or the "first position" index that tells a module
// which row of SADs it owns) is 6 bit, enough for a 64 x 64 tracking range.
// A result word is what one module hands to the next one: the best SAD seen
// so far, its motion vector, and the first-position index of the receiver.
package fsbm_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned SAD_W = 16;
  localparam int unsigned IDX_W = 6;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [SAD_W-1:0] sad_t;
  typedef logic [IDX_W-1:0] idx_t;

  // Result passed along the module chain (and bit-serially between chips).
  typedef struct packed {
    sad_t sad;        // smallest SAD found so far
    idx_t mv_k;       // row offset k of that candidate
    idx_t mv_l;       // column offset l of that candidate
    idx_t first_pos;  // index of the first candidate row of the receiving module
  } result_t;

  localparam int unsigned RES_W = $bits(result_t);

  // Source of a module's second search-area bus.
  typedef enum logic [1:0] {
    SRC_MAIN = 2'd0,  // main line from the previous module (p2 / bus1)
    SRC_PF1  = 2'd1,  // force line pf1
    SRC_PF2  = 2'd2   // force line pf2
  } bus_src_e;

  // Tracking-range mode: K = N << mode (16, 32 or 64 for N = 16).
  typedef logic [1:0] trk_mode_t;

  // Sum of an 8-bit absolute difference.
  function automatic pixel_t absdiff(pixel_t a, pixel_t b);
    return (a > b) ? pixel_t'(a - b) : pixel_t'(b - a);
  endfunction

endpackage
