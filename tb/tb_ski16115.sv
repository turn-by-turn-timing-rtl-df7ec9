// tb_ski16115: self-checking test of the frequency divider unit.
//
// Checked: reset values (ratio 230, delay 0, sync enabled, fine code 0,
// no resyncs); register writes and read back, including the fine delay code
// output; the divided output period for the default and a written ratio;
// that fiducial_out, retimed by a copy of the RF clock delayed by 0.3 ns,
// follows the divider output within the same RF cycle; that a sync edge first
// sampled at edge E0 with delay D sets the fiducial at edge E0+3+D with a
// rising edge one period later; that the resync counter counts each sync;
// and that a sync with synchronization disabled is not counted.
module tb_ski16115;
  logic        clk = 1'b0;
  logic        ffclk;
  logic        rst, sync_in, we;
  logic [2:0]  addr;
  logic [31:0] wdata, rdata;
  logic [9:0]  fine_code;
  logic        div_out, fiducial_out;
  logic        prev = 1'b0;
  int unsigned cyc = 0;
  int          checks = 0, failures = 0;
  int unsigned rises[$];
  int unsigned watch_cyc = 0;
  logic        watch_level;

  ski16115 dut (.*);

  always #0.982 clk = ~clk;
  assign #0.3 ffclk = clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst) begin
      if (fiducial_out && !prev) rises.push_back(cyc);
      checks++;
      if (fiducial_out !== div_out) begin
        failures++;
        $display("FAIL fiducial_out differs from divider output at %0d", cyc);
      end
    end
    if (cyc == watch_cyc) watch_level = fiducial_out;
    prev = fiducial_out;
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input int unsigned a, input int unsigned v);
    @(negedge clk);
    we = 1'b1; addr = 3'(a); wdata = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd(input int unsigned a, output int unsigned v);
    @(negedge clk);
    addr = 3'(a);
    #0.1;
    v = rdata;
  endtask

  function automatic bit has(int unsigned v);
    foreach (rises[i]) if (rises[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check_period(input int unsigned n);
    repeat (2 * n + 10) @(negedge clk);
    rises.delete();
    repeat (2 * n + 2) @(negedge clk);
    check(rises.size() >= 2 && rises[1] - rises[0] == n, $sformatf("period for ratio %0d", n));
  endtask

  task automatic sync_case(input int unsigned d, input int unsigned n);
    int unsigned e0, exp0;
    wr(1, d);
    @(negedge clk);
    rises.delete();
    sync_in = 1'b1;
    e0 = cyc + 1;
    exp0 = e0 + 3 + d;
    watch_cyc = exp0; watch_level = 1'b0;
    repeat (4) @(negedge clk);
    sync_in = 1'b0;
    while (cyc < exp0 + n + 2) @(negedge clk);
    check(watch_level == 1'b1, $sformatf("sync delay %0d: fiducial not set at %0d", d, exp0));
    check(has(exp0 + n), $sformatf("sync delay %0d: no rise one period later", d));
  endtask

  initial begin
    int unsigned v;
    rst = 1'b1; sync_in = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    rd(0, v); check(v == 230, $sformatf("reset ratio %0d", v));
    rd(1, v); check(v == 0, "reset delay");
    rd(2, v); check(v == 1, "reset sync enable");
    rd(3, v); check(v == 0, "reset fine code");
    rd(4, v); check(v == 0, "reset resync count");
    rd(7, v); check(v == 0, "unmapped address");
    check_period(230);

    wr(3, 10'd200);
    rd(3, v); check(v == 200 && fine_code == 10'd200, "fine delay code");
    wr(0, 100);
    rd(0, v); check(v == 100, "ratio readback");
    check_period(100);

    sync_case(0, 100);
    sync_case(37, 100);
    sync_case(250, 100);
    wr(0, 230);
    sync_case(92, 230);
    rd(4, v); check(v == 4, $sformatf("resync count %0d", v));

    wr(2, 0);
    rd(2, v); check(v == 0, "sync disable readback");
    @(negedge clk); sync_in = 1'b1; repeat (4) @(negedge clk); sync_in = 1'b0;
    repeat (300) @(negedge clk);
    rd(4, v); check(v == 4, "sync while disabled was counted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
