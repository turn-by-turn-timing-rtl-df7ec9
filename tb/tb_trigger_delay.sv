// tb_trigger_delay: self-checking test of the single-shot delayed start
// trigger generator.
//
// Checked: nothing fires unarmed; an armed generator with the external input
// enabled accepts an injection edge first sampled at E0 (fired after edge
// E0+2) and drives all outputs from edge E0+3+delay for `width` cycles; it is
// then disarmed, so a second injection is ignored; an external edge with the
// external input disabled is ignored; a software trigger accepted at edge t
// starts the outputs at edge t+1+delay; disarm withdraws the arming.
module tb_trigger_delay;
  localparam int unsigned NUM_OUT = 4;
  localparam int unsigned CNT_W   = 32;
  localparam int unsigned WID_W   = 16;

  logic               clk = 1'b0;
  logic               rst, ext_trig, ext_en, sw_trig, arm, disarm;
  logic [CNT_W-1:0]   delay;
  logic [WID_W-1:0]   width;
  logic               armed, fired;
  logic [NUM_OUT-1:0] start_out;
  logic               prev = 1'b0;
  int unsigned        cyc = 0;
  int                 checks = 0, failures = 0;
  int unsigned        rises[$];
  int unsigned        fires[$];
  int unsigned        high_cnt = 0;

  trigger_delay #(.NUM_OUT(NUM_OUT), .CNT_W(CNT_W), .WID_W(WID_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst) begin
      if (start_out[0] && !prev) rises.push_back(cyc);
      if (start_out[0]) high_cnt++;
      if (fired) fires.push_back(cyc);
      checks++;
      if (start_out != {NUM_OUT{start_out[0]}}) begin
        failures++;
        $display("FAIL outputs differ");
      end
    end
    prev = start_out[0];
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_arm();
    @(negedge clk); arm = 1'b1; @(negedge clk); arm = 1'b0;
  endtask

  // external edge held high a few cycles; returns E0
  task automatic inject(output int unsigned e0);
    @(negedge clk);
    ext_trig = 1'b1; e0 = cyc + 1;
    repeat (4) @(negedge clk);
    ext_trig = 1'b0;
  endtask

  initial begin
    int unsigned e0, t;
    rst = 1'b1; ext_trig = 1'b0; ext_en = 1'b0; sw_trig = 1'b0; arm = 1'b0; disarm = 1'b0;
    delay = 25; width = 6;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // unarmed: nothing
    ext_en = 1'b1;
    inject(e0);
    repeat (60) @(negedge clk);
    check(rises.size() == 0 && fires.size() == 0, "fired while not armed");

    // armed, external trigger
    pulse_arm();
    check(armed, "not armed after arm");
    inject(e0);
    repeat (60) @(negedge clk);
    check(fires.size() == 1 && fires[0] == e0 + 2, "fired timing (external)");
    check(rises.size() == 1 && rises[0] == e0 + 3 + 25, "start timing (external)");
    check(high_cnt == 6, $sformatf("start width %0d", high_cnt));
    check(!armed, "still armed after a trigger");

    // single shot: a second injection is ignored
    inject(e0);
    repeat (60) @(negedge clk);
    check(rises.size() == 1, "second injection not ignored");

    // external input disabled
    pulse_arm();
    ext_en = 1'b0;
    inject(e0);
    repeat (60) @(negedge clk);
    check(rises.size() == 1, "external edge with input disabled");

    // software trigger, other delay
    delay = 0;
    @(negedge clk); sw_trig = 1'b1; t = cyc + 1; @(negedge clk); sw_trig = 1'b0;
    repeat (30) @(negedge clk);
    check(rises.size() == 2 && rises[1] == t + 1, "start timing (software, delay 0)");
    delay = 100;
    pulse_arm();
    @(negedge clk); sw_trig = 1'b1; t = cyc + 1; @(negedge clk); sw_trig = 1'b0;
    repeat (130) @(negedge clk);
    check(rises.size() == 3 && rises[2] == t + 1 + 100, "start timing (software, delay 100)");

    // disarm
    pulse_arm();
    @(negedge clk); disarm = 1'b1; @(negedge clk); disarm = 1'b0;
    check(!armed, "disarm");
    @(negedge clk); sw_trig = 1'b1; @(negedge clk); sw_trig = 1'b0;
    repeat (130) @(negedge clk);
    check(rises.size() == 3, "fired after disarm");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
