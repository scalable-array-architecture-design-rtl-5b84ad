// Test of the bit-serial result link: a PISO sends random 34-bit words to a
// SIPO. Checks every received word, the beat count and order (least
// significant bits first) and the latency of ceil(34/SER_W) + 1 cycles from
// load to dout_valid.
module tb_res_link;

  localparam int WIDTH = 34;
  localparam int SER_W = 4;
  localparam int BEATS = (WIDTH + SER_W - 1) / SER_W;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic [WIDTH-1:0] din = '0;
  logic             load = 1'b0;
  logic [SER_W-1:0] ser_data;
  logic             ser_valid, busy;
  logic [WIDTH-1:0] dout;
  logic             dout_valid;

  res_piso #(.WIDTH(WIDTH), .SER_W(SER_W)) u_tx (.clk, .rst_n, .din, .load, .ser_data,
                                                  .ser_valid, .busy);
  res_sipo #(.WIDTH(WIDTH), .SER_W(SER_W)) u_rx (.clk, .rst_n, .ser_data, .ser_valid,
                                                  .dout, .dout_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [WIDTH-1:0] sent;
  longint t_load;
  int beats;
  logic [BEATS*SER_W-1:0] gathered;
  int n_rx = 0;

  always @(posedge clk) begin
    if (ser_valid) begin
      gathered[beats*SER_W +: SER_W] <= ser_data;
      beats <= beats + 1;
    end
    if (dout_valid) begin
      checks += 4;
      n_rx++;
      if (dout != sent) begin failures++; $display("word %0h expected %0h", dout, sent); end
      if (beats != BEATS) begin failures++; $display("%0d beats", beats); end
      if (WIDTH'(gathered) != sent) begin failures++; $display("beat order wrong"); end
      if (cyc - t_load != longint'(BEATS + 1)) begin
        failures++; $display("latency %0d", cyc - t_load);
      end
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      sent = {WIDTH{1'b0}} | {$urandom, $urandom};
      din  = sent;
      load = 1'b1;
      beats = 0;
      @(posedge clk) t_load = cyc;
      @(negedge clk) load = 1'b0;
      repeat (BEATS + 2 + $urandom_range(3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_rx != 200) failures++;
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
