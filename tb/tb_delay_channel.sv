// tb_delay_channel: self-checking test of one programmable delay channel.
//
// Inputs change on the falling clock edge; outputs are sampled on the falling
// edge too. For each case the start is sampled at rising edge S; the expected
// pulse is high exactly at the falling edges after rising edges S+delay ..
// S+delay+max(width,1)-1. Covered: delay 0, delay 1, random delays and
// widths (width 0 counts as 1), and a start during a busy channel, which must
// be ignored.
module tb_delay_channel;
  localparam int unsigned CNT_W = 32;
  localparam int unsigned WID_W = 16;

  logic             clk = 1'b0;
  logic             rst;
  logic             start;
  logic [CNT_W-1:0] delay;
  logic [WID_W-1:0] width;
  logic             pulse, busy;
  int unsigned      cyc = 0;
  int               checks = 0, failures = 0;

  delay_channel #(.CNT_W(CNT_W), .WID_W(WID_W)) dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one case: start, then follow the pulse for delay+width+extra cycles.
  task automatic run_case(input int unsigned d, input int unsigned w, input bit restart_mid);
    int unsigned s, wf, rise_at, n_high, k;
    bit          seen_rise;
    @(negedge clk);
    delay = d; width = WID_W'(w); start = 1'b1;
    s = cyc + 1;
    @(negedge clk);
    start = 1'b0;
    wf = (w == 0) ? 1 : w;
    seen_rise = 1'b0; n_high = 0; rise_at = 0;
    for (k = 0; k < d + wf + 4; k++) begin
      // a start while busy must not disturb the running case
      if (restart_mid && k == d / 2) start = 1'b1; else start = 1'b0;
      if (pulse) begin
        if (!seen_rise) begin seen_rise = 1'b1; rise_at = cyc; end
        n_high++;
      end
      @(negedge clk);
    end
    start = 1'b0;
    checks++;
    if (!seen_rise || rise_at != s + d) begin
      failures++;
      $display("FAIL delay=%0d width=%0d: rise at %0d, expected %0d", d, w, rise_at, s + d);
    end
    checks++;
    if (n_high != wf) begin
      failures++;
      $display("FAIL delay=%0d width=%0d: high for %0d cycles", d, w, n_high);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("FAIL delay=%0d width=%0d: still busy", d, w);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; delay = '0; width = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    checks++;
    if (pulse || busy) begin failures++; $display("FAIL: not idle after reset"); end
    run_case(0, 1, 1'b0);
    run_case(1, 1, 1'b0);
    run_case(2, 0, 1'b0);
    run_case(5, 3, 1'b0);
    run_case(92, 115, 1'b0);
    run_case(40, 7, 1'b1);
    run_case(300, 20, 1'b1);
    repeat (25) run_case($urandom_range(0, 400), $urandom_range(0, 60), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
