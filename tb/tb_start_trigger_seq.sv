// tb_start_trigger_seq: self-checking test of the start trigger sequencer.
//
// The bench plays the trigger generator (it reports `fired` one cycle after
// it is armed and triggered) and the detectors (`ready`). Checked: disabled
// means veto and no arming; in normal mode the sequencer arms once ready,
// enables only the external input, and after a start waits for ready to fall
// and rise before it arms again (veto meanwhile); in storage mode it issues
// the software trigger `period`+1 cycles after arming; in manual mode only on
// the manual command; a manual command during the busy phase is ignored;
// clearing enable while armed disarms; the start counter counts.
module tb_start_trigger_seq;
  import timing_pkg::*;
  localparam int unsigned CNT_W = 32;

  logic             clk = 1'b0;
  logic             rst, enable, ready, manual_trig, fired;
  trig_mode_e       mode;
  logic [CNT_W-1:0] period;
  logic             arm, disarm, ext_en, sw_trig, veto;
  logic [31:0]      n_starts;
  int unsigned      cyc = 0;
  int               checks = 0, failures = 0;
  int unsigned      arms[$], sws[$], disarms[$];
  logic             gen_armed = 1'b0;
  logic             inj = 1'b0;

  start_trigger_seq #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // generator model
  always @(posedge clk) begin
    if (rst) begin
      fired     <= 1'b0;
      gen_armed <= 1'b0;
    end else begin
      fired <= gen_armed && ((ext_en && inj) || sw_trig);
      if (gen_armed && ((ext_en && inj) || sw_trig)) gen_armed <= 1'b0;
      else if (disarm) gen_armed <= 1'b0;
      else if (arm) gen_armed <= 1'b1;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      if (arm) arms.push_back(cyc);
      if (sw_trig) sws.push_back(cyc);
      if (disarm) disarms.push_back(cyc);
    end
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

  task automatic injection();
    @(negedge clk); inj = 1'b1; @(negedge clk); inj = 1'b0;
  endtask

  // detectors take the start and process for n cycles
  task automatic detectors_busy(input int unsigned n);
    repeat (3) @(negedge clk);
    ready = 1'b0;
    repeat (n) @(negedge clk);
    check(veto && !ext_en, "veto while detectors busy");
    ready = 1'b1;
  endtask

  initial begin
    rst = 1'b1; enable = 1'b0; ready = 1'b1; manual_trig = 1'b0; mode = MODE_NORMAL; period = 50;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    check(veto && arms.size() == 0, "disabled: veto and no arm");

    // normal mode
    enable = 1'b1;
    repeat (10) @(negedge clk);
    check(arms.size() == 1 && !veto && ext_en, "normal: armed with external input");
    repeat (30) @(negedge clk);
    check(sws.size() == 0, "normal: software trigger issued");
    injection();
    repeat (3) @(negedge clk);
    check(n_starts == 1 && veto, "normal: start counted and vetoed");
    // a stale ready must not re-arm before the detectors drop it
    repeat (20) @(negedge clk);
    check(arms.size() == 1, "re-armed before the detectors went busy");
    detectors_busy(40);
    repeat (8) @(negedge clk);
    check(arms.size() == 2 && !veto, "normal: re-armed after ready");
    injection();
    detectors_busy(10);
    repeat (8) @(negedge clk);
    check(n_starts == 2 && arms.size() == 3, "normal: second cycle");

    // storage mode (generator already armed by the last arm)
    mode = MODE_STORAGE;
    @(negedge clk);
    check(!veto && !ext_en, "storage: armed, external input off");
    injection();
    repeat (100) @(negedge clk);
    check(sws.size() == 1 && sws[0] == arms[2] + 50 + 1, $sformatf("storage: sw trigger timing (arm %0d sw %0d)", arms[2], sws.size() ? sws[0] : 0));
    detectors_busy(10);
    repeat (80) @(negedge clk);
    check(sws.size() == 2 && sws[1] == arms[3] + 51, "storage: periodic re-trigger");
    detectors_busy(10);
    repeat (6) @(negedge clk);

    // manual mode
    mode = MODE_MANUAL;
    repeat (200) @(negedge clk);
    check(sws.size() == 2, "manual: trigger without command");
    @(negedge clk); manual_trig = 1'b1; @(negedge clk); manual_trig = 1'b0;
    repeat (3) @(negedge clk);
    check(sws.size() == 3 && n_starts == 5, "manual: command triggers");
    ready = 1'b0;
    repeat (5) @(negedge clk);
    @(negedge clk); manual_trig = 1'b1; @(negedge clk); manual_trig = 1'b0;
    repeat (5) @(negedge clk);
    check(sws.size() == 3, "manual: command accepted while busy");
    ready = 1'b1;
    repeat (8) @(negedge clk);
    check(!veto && !ext_en, "manual: re-armed, external input off");

    // disable while armed
    enable = 1'b0;
    repeat (3) @(negedge clk);
    check(disarms.size() == 1 && veto, "disable: disarm");
    check(n_starts == 5, "start count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
