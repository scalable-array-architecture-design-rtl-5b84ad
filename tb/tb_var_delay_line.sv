// Test of the variable-length delay line at the three lengths of the
// partial-SAD buffer (16, 32, 64) and at odd lengths: after the line has
// filled, every output word must equal the input word of len cycles before.
module tb_var_delay_line;

  localparam int WIDTH = 16;
  localparam int DEPTH = 64;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic [6:0]       len = 7'd16;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout;

  var_delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  initial begin
    int lens [6] = '{16, 32, 64, 1, 5, 63};
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    foreach (lens[i]) begin
      @(negedge clk);
      len = 7'(lens[i]);
      hist.delete();
      // restart the pointer at the new length by a reset pulse
      rst_n = 1'b0; #1 rst_n = 1'b1;
      for (int t = 0; t < 4 * lens[i] + 20; t++) begin
        @(negedge clk);
        din = WIDTH'($urandom);
        if (hist.size() >= lens[i]) begin
          checks++;
          if (dout != hist[hist.size() - lens[i]]) begin
            failures++;
            if (failures < 10) $display("len %0d: dout %0h expected %0h", lens[i], dout,
                                        hist[hist.size() - lens[i]]);
          end
        end
        hist.push_back(din);
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
