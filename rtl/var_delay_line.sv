// Variable-length delay line.
//
// A word written in cycle t appears on dout in cycle t + len (len between 1
// and DEPTH, set at run time and held constant while data flows). It is a
// circular buffer of DEPTH words with one pointer: every cycle the word at
// the pointer is read out and replaced by din, and the pointer wraps at len.
// The module keeps the partial SADs of a module between template rows
// (len = K: 16, 32 or 64 words of 16 bit) and delays the serial template
// stream between chips (len = 2K + 2).
//
// Timing: dout is the stored word (combinational read of the location about
// to be overwritten); the write happens at the clock edge. Contents are
// cleared at reset.
module var_delay_line #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned LEN_W = $clog2(DEPTH + 1),
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LEN_W-1:0] len,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [PTR_W-1:0] ptr_q;

  assign dout = mem_q[ptr_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem_q[i] <= '0;
    end else begin
      mem_q[ptr_q] <= din;
      if (LEN_W'(ptr_q) + 1'b1 >= len) ptr_q <= '0;
      else                             ptr_q <= ptr_q + 1'b1;
    end
  end

endmodule
