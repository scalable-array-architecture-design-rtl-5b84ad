// Array chip: two cascaded modules of N processing elements each.
//
// The upper module takes its buses from the main lines p1 (bus A) and p2 or
// a force line (bus B). The lower module takes bus A from the upper module's
// bus B and bus B from the upper module's bus A or a force line, i.e. the
// two buses swap roles from module to module because each module works one
// search-area row behind the previous one. The lower module's buses leave the
// chip as the next chip's main lines (bus B to p1_out, bus A to p2_out, so the
// swap also holds at the chip boundary). The force lines pf1/pf2 are global
// and reach every module unregistered.
//
// The upper module receives the serial template stream on c_in; the lower
// module copies the template pixels from the upper one. c_out is c_in delayed
// by 2K + 2 cycles, the start offset of the next chip's upper module.
//
// Results: the result word of the previous chip (or of the controller)
// arrives bit-serially and is converted by a SIPO for the upper module, whose
// result goes in parallel to the lower module; the lower module's result is
// sent on bit-serially by a PISO. The start pulse ripples through both
// modules (start_out = start of the next chip's upper module).
//
// The module pair, the main and force lines and the serial result link
// follow the published chip; the delay line on the template stream and the
// serial framing are this design's own choices.
// Lint note: rst_n is reported as used both asynchronously and
// synchronously because of the assertions in the modules and the PISO (their
// disable condition); no logic uses it synchronously. The lower module's
// tmpl_prev and the PISO's busy flag are not needed inside a chip.
module fsbm_chip
  import fsbm_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned SER_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  trk_mode_t        trk_mode,
  input  logic             start_in,
  output logic             start_out,
  input  pixel_t           p1,
  input  pixel_t           p2,
  input  pixel_t           pf1,
  input  pixel_t           pf2,
  input  bus_src_e         b_src [2],
  output pixel_t           p1_out,
  output pixel_t           p2_out,
  input  pixel_t           c_in,
  output pixel_t           c_out,
  input  logic [SER_W-1:0] ser_in,
  input  logic             ser_in_valid,
  output logic [SER_W-1:0] ser_out,
  output logic             ser_out_valid
);

  localparam int unsigned KMAX   = 4 * N;
  localparam int unsigned CDEPTH = 2 * KMAX + 2;
  localparam int unsigned CLEN_W = $clog2(CDEPTH + 1);

  pixel_t  up_bus_a, up_bus_b, lo_bus_a, lo_bus_b;
  pixel_t  up_tmpl_prev [N];
  pixel_t  lo_tmpl_prev [N];
  pixel_t  no_tmpl      [N];
  logic    up_start_out;
  result_t res_chip_in, res_up, res_lo;
  logic    res_chip_in_valid, res_up_valid, res_lo_valid;
  logic    ser_busy;

  always_comb for (int i = 0; i < int'(N); i++) no_tmpl[i] = '0;

  res_sipo #(.WIDTH(RES_W), .SER_W(SER_W)) u_sipo (
    .clk       (clk),
    .rst_n     (rst_n),
    .ser_data  (ser_in),
    .ser_valid (ser_in_valid),
    .dout      (res_chip_in),
    .dout_valid(res_chip_in_valid)
  );

  fsbm_module #(.N(N), .UPPER(1'b1)) u_upper (
    .clk          (clk),
    .rst_n        (rst_n),
    .trk_mode     (trk_mode),
    .start_in     (start_in),
    .start_out    (up_start_out),
    .main_a       (p1),
    .main_b       (p2),
    .pf1          (pf1),
    .pf2          (pf2),
    .b_src        (b_src[0]),
    .bus_a_out    (up_bus_a),
    .bus_b_out    (up_bus_b),
    .c_in         (c_in),
    .tmpl_upper   (no_tmpl),
    .tmpl_prev    (up_tmpl_prev),
    .res_in       (res_chip_in),
    .res_in_valid (res_chip_in_valid),
    .res_out      (res_up),
    .res_out_valid(res_up_valid)
  );

  fsbm_module #(.N(N), .UPPER(1'b0)) u_lower (
    .clk          (clk),
    .rst_n        (rst_n),
    .trk_mode     (trk_mode),
    .start_in     (up_start_out),
    .start_out    (start_out),
    .main_a       (up_bus_b),
    .main_b       (up_bus_a),
    .pf1          (pf1),
    .pf2          (pf2),
    .b_src        (b_src[1]),
    .bus_a_out    (lo_bus_a),
    .bus_b_out    (lo_bus_b),
    .c_in         ('0),
    .tmpl_upper   (up_tmpl_prev),
    .tmpl_prev    (lo_tmpl_prev),
    .res_in       (res_up),
    .res_in_valid (res_up_valid),
    .res_out      (res_lo),
    .res_out_valid(res_lo_valid)
  );

  assign p1_out = lo_bus_b;
  assign p2_out = lo_bus_a;

  var_delay_line #(.WIDTH(PIX_W), .DEPTH(CDEPTH)) u_c_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .len  ((CLEN_W'(N) << (trk_mode + 1)) + CLEN_W'(2)),
    .din  (c_in),
    .dout (c_out)
  );

  res_piso #(.WIDTH(RES_W), .SER_W(SER_W)) u_piso (
    .clk      (clk),
    .rst_n    (rst_n),
    .din      (res_lo),
    .load     (res_lo_valid),
    .ser_data (ser_out),
    .ser_valid(ser_out_valid),
    .busy     (ser_busy)
  );

endmodule
