// tb_retime_dff: checks that the output flip-flop bank presents, after each
// rising clock edge, exactly the value its input had before that edge.
// Random 32-bit words are applied on the falling edge.
module tb_retime_dff;
  localparam int unsigned WIDTH = 32;
  logic             clk = 1'b0;
  logic [WIDTH-1:0] d, q, expected;
  int               checks = 0, failures = 0;

  retime_dff #(.WIDTH(WIDTH)) dut (.clk(clk), .d(d), .q(q));

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    repeat (500) begin
      expected = $urandom();
      d = expected;
      @(negedge clk);
      // the new value was captured by the edge in between
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL q=%h expected %h", q, expected);
      end
      d = ~expected;  // a change before the next edge must not show yet
      #0.5;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("FAIL q changed without a clock edge");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
