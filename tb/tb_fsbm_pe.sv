// Test of the processing element, both types side by side: random template
// stream, buses, partial sums and selection pulses. A software model of the
// PE (template chain, template registers, bus choice, carry-deferred sum)
// predicts every output each cycle; the check compares the numeric value
// hi*256 + lo + cy*256 of the outgoing partial sum and all relayed signals.
module tb_fsbm_pe;
  import fsbm_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1;
  pixel_t bus_a = '0, bus_b = '0, chain_in = '0, tmpl_upper = '0;
  logic   sel_in = 1'b0, sel_b_in = 1'b0;
  pixel_t lo_in = '0, hi_in = '0;
  logic   cy_in = 1'b0;

  logic   u_sel_out, u_sel_b_out, u_cy_out;
  pixel_t u_chain_out, u_tmpl_prev, u_lo_out, u_hi_out;
  logic   l_sel_out, l_sel_b_out, l_cy_out;
  pixel_t l_chain_out, l_tmpl_prev, l_lo_out, l_hi_out;

  fsbm_pe #(.UPPER(1'b1)) u_up (
    .clk, .rst_n, .bus_a, .bus_b, .sel_in, .sel_b_in,
    .sel_out(u_sel_out), .sel_b_out(u_sel_b_out), .chain_in, .chain_out(u_chain_out),
    .tmpl_upper, .tmpl_prev(u_tmpl_prev), .lo_in, .hi_in, .cy_in,
    .lo_out(u_lo_out), .hi_out(u_hi_out), .cy_out(u_cy_out));

  fsbm_pe #(.UPPER(1'b0)) u_lo (
    .clk, .rst_n, .bus_a, .bus_b, .sel_in, .sel_b_in,
    .sel_out(l_sel_out), .sel_b_out(l_sel_b_out), .chain_in, .chain_out(l_chain_out),
    .tmpl_upper, .tmpl_prev(l_tmpl_prev), .lo_in, .hi_in, .cy_in,
    .lo_out(l_lo_out), .hi_out(l_hi_out), .cy_out(l_cy_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // model state
  int     m_ch1, m_ch2, m_tu, m_tl, m_pu, m_pl, m_bu;
  int     e_sum_u, e_sum_l, e_sel, e_selb;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int cycles;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    m_ch1 = 0; m_ch2 = 0; m_tu = 0; m_tl = 0; m_pu = 0; m_pl = 0; m_bu = 0;
    for (cycles = 0; cycles < 3000; cycles++) begin
      int pix, din;
      @(negedge clk);
      bus_a      = pixel_t'($urandom);
      bus_b      = pixel_t'($urandom);
      chain_in   = pixel_t'($urandom);
      tmpl_upper = pixel_t'($urandom);
      sel_in     = ($urandom_range(7) == 0);
      sel_b_in   = 1'($urandom);
      lo_in      = pixel_t'($urandom);
      hi_in      = pixel_t'($urandom_range(15));
      cy_in      = 1'($urandom);
      // model of the cycle (uses the registers before the edge)
      pix  = m_bu ? bus_b : bus_a;
      din  = int'(hi_in) * 256 + int'(lo_in) + int'(cy_in) * 256;
      e_sum_u = din + ((m_tu > pix) ? m_tu - pix : pix - m_tu);
      e_sum_l = din + ((m_tl > pix) ? m_tl - pix : pix - m_tl);
      e_sel   = sel_in;
      e_selb  = sel_b_in;
      if (sel_in) begin
        m_pu = m_tu; m_pl = m_tl;
        m_tu = m_ch2; m_tl = tmpl_upper;
        m_bu = sel_b_in;
      end
      m_ch2 = m_ch1; m_ch1 = chain_in;
      @(posedge clk); #1;
      check("upper sum", int'(u_hi_out) * 256 + int'(u_lo_out) + int'(u_cy_out) * 256, e_sum_u);
      check("lower sum", int'(l_hi_out) * 256 + int'(l_lo_out) + int'(l_cy_out) * 256, e_sum_l);
      check("sel relay", int'(u_sel_out), e_sel);
      check("sel_b relay", int'(l_sel_b_out), e_selb);
      check("chain", int'(u_chain_out), m_ch2);
      check("upper tmpl_prev", int'(u_tmpl_prev), m_pu);
      check("lower tmpl_prev", int'(l_tmpl_prev), m_pl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
