// tb_freq_divider: self-checking test of the resynchronised frequency divider.
//
// Rising edges of div_out and resync pulses are logged by clock edge number
// (sampled on the falling edge). Checked: free-running period and high time
// for the ring's ratio 230 and for odd and tiny ratios; that with sync enabled
// a sync edge first sampled at edge E0 sets div_out at edge E0+3+delay (a
// visible rise only if it was low) and makes it rise every `ratio` edges after, for delays shorter and longer than a period;
// that a second sync during a running delay restarts it; and that with sync
// disabled the phase is untouched.
module tb_freq_divider;
  localparam int unsigned CNT_W = 32;

  logic             clk = 1'b0;
  logic             rst, sync_in, sync_en;
  logic [CNT_W-1:0] ratio, delay;
  logic             div_out, resync;
  int unsigned      cyc = 0;
  int               checks = 0, failures = 0;
  int unsigned      rises[$];
  int unsigned      resyncs[$];
  logic             prev = 1'b0;
  int unsigned      watch_cyc = 0;
  logic             watch_level;

  freq_divider #(.CNT_W(CNT_W)) dut (.*);

  always #0.982 clk = ~clk;  // about 509 MHz
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst && div_out && !prev) rises.push_back(cyc);
    if (!rst && resync) resyncs.push_back(cyc);
    if (cyc == watch_cyc) watch_level = div_out;
    prev = div_out;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit has_rise(int unsigned at);
    foreach (rises[i]) if (rises[i] == at) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Period and high time of a free-running divider.
  task automatic check_free_run(input int unsigned n);
    int unsigned r0, hi;
    int unsigned eff;
    eff = (n < 2) ? 2 : n;
    ratio = n;
    repeat (3 * eff + 5) @(negedge clk);
    rises.delete();
    repeat (3 * eff + 2) @(negedge clk);
    check(rises.size() >= 2, $sformatf("ratio %0d: too few rising edges", n));
    if (rises.size() >= 2)
      check(rises[1] - rises[0] == eff, $sformatf("ratio %0d: period %0d", n, rises[1] - rises[0]));
    // high time
    @(negedge clk iff (div_out && !prev) || (div_out && cyc == rises[rises.size()-1]));
    hi = 0;
    while (div_out) begin hi++; @(negedge clk); end
    check(hi == eff / 2, $sformatf("ratio %0d: high %0d cycles", n, hi));
  endtask

  // One sync edge, then check the restart edge and the next two periods.
  task automatic sync_case(input int unsigned d, input int unsigned n);
    int unsigned e0, exp0;
    ratio = n; delay = d;
    @(negedge clk);
    rises.delete(); resyncs.delete();
    sync_in = 1'b1;
    e0 = cyc + 1;
    exp0 = e0 + 3 + d;
    watch_cyc = exp0; watch_level = 1'b0;
    repeat (5) @(negedge clk);
    sync_in = 1'b0;
    while (cyc < exp0 + 2 * n + 2) @(negedge clk);
    // the restart edge sets div_out (a visible rise only if it was low)
    check(watch_level == 1'b1, $sformatf("sync delay %0d: not high at %0d", d, exp0));
    foreach (rises[i])
      if (rises[i] > exp0 && rises[i] < exp0 + n)
        check(1'b0, $sformatf("sync delay %0d: stray rise at %0d", d, rises[i]));
    check(has_rise(exp0 + n) && has_rise(exp0 + 2 * n), $sformatf("sync delay %0d: period after restart", d));
    check(resyncs.size() == 1 && resyncs[0] == exp0 - 1, $sformatf("sync delay %0d: resync pulse", d));
  endtask

  initial begin
    int unsigned ref_rise, e0, exp0;
    rst = 1'b1; sync_in = 1'b0; sync_en = 1'b0; ratio = 230; delay = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    check_free_run(230);
    check_free_run(7);
    check_free_run(1);
    check_free_run(16);

    sync_en = 1'b1;
    sync_case(0, 230);
    sync_case(5, 230);
    sync_case(97, 230);
    sync_case(700, 230);
    sync_case(13, 11);

    // second sync while the delay of the first is running restarts it
    ratio = 230; delay = 400;
    @(negedge clk);
    rises.delete(); resyncs.delete();
    sync_in = 1'b1; @(negedge clk); sync_in = 1'b0;
    repeat (150) @(negedge clk);
    sync_in = 1'b1; e0 = cyc + 1; @(negedge clk); sync_in = 1'b0;
    exp0 = e0 + 3 + 400;
    while (cyc < exp0 + 235) @(negedge clk);
    check(resyncs.size() == 1, $sformatf("retrigger: %0d resync pulses", resyncs.size()));
    check(resyncs.size() == 1 && resyncs[0] == exp0 - 1, "retrigger: restart after the second sync");
    check(has_rise(exp0 + 230), "retrigger: phase after the second sync");

    // sync disabled: phase unchanged
    sync_en = 1'b0; delay = 3;
    @(negedge clk);
    rises.delete();
    repeat (240) @(negedge clk);
    ref_rise = rises[rises.size() - 1];
    sync_in = 1'b1; @(negedge clk); sync_in = 1'b0;
    rises.delete(); resyncs.delete();
    repeat (700) @(negedge clk);
    check(resyncs.size() == 0, "sync disabled: resync seen");
    foreach (rises[i])
      check((rises[i] - ref_rise) % 230 == 0, $sformatf("sync disabled: phase moved (rise at %0d)", rises[i]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
