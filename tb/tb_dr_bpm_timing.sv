// tb_dr_bpm_timing: end-to-end test of the whole timing system at its default
// size (4 stations of 32 channels, 32-bit counters, ratio 230).
//
// Clocks: RF about 509 MHz; a copy delayed by 0.3 ns stands in for the fine
// delay chip and clocks the master output flip-flop; the start trigger runs on
// 100 MHz. Injection pulses are applied 11 ps after an RF falling edge so
// they never coincide with a clock edge. A small detector model drops a
// station's ready when it sees a start and raises it again after BUSY trigger
// clocks. Injections are microseconds apart, not the ring's 20 ms, to keep
// the run short; nothing in the logic depends on that spacing.
//
// For each injection first sampled at RF edge E0 and trigger edge E0t:
//   - with sync enabled the master fiducial is set at E0+3+D and rises at
//     E0+3+D+230 (D = divider delay register),
//   - channel c of station s then rises 5+delay[s][c] RF edges after that
//     fiducial rise (one edge to reach the unit, four inside it),
//   - if the start trigger was armed, every station gets a start rising at
//     trigger edge E0t+3+TRG_DELAY; if the detectors were busy, none.
// Storage and manual modes must produce starts without injections, and with
// sync disabled an injection must not move the fiducial phase. Each of these
// mechanisms is counted and must occur at least once.
module tb_dr_bpm_timing;
  import timing_pkg::*;
  localparam int unsigned NS        = STATIONS;
  localparam int unsigned NC        = CHANNELS;
  localparam int unsigned D_DIV     = 20;
  localparam int unsigned TRG_DELAY = 30;
  localparam int unsigned TRG_WIDTH = 10;
  localparam int unsigned BUSY      = 150;

  logic                       rf_clk = 1'b0, trg_clk = 1'b0, ffclk_master;
  logic                       rf_rst, trg_rst, dr_injection;
  logic                       trg_enable, trg_manual;
  trig_mode_e                 trg_mode;
  logic [COUNTER_W-1:0]       trg_delay, trg_period;
  logic [PULSE_W-1:0]         trg_width;
  logic [NS-1:0]              bpm_ready, start_out, prev_start;
  logic                       trg_veto;
  logic [31:0]                trg_n_starts;
  logic                       div_we;
  logic [2:0]                 div_addr;
  logic [31:0]                div_wdata, div_rdata;
  logic [FINE_W-1:0]          ep195_code;
  logic                       fiducial_out, prev_fid;
  logic [NS-1:0]              dly_we;
  logic [NS-1:0][5:0]         dly_addr;
  logic [NS-1:0][31:0]        dly_wdata, dly_rdata;
  logic [NS-1:0][NC-1:0]      station_fiducial, prev_sf;

  dr_bpm_timing dut (.*);

  always #0.982 rf_clk = ~rf_clk;
  assign #0.3 ffclk_master = rf_clk;
  always #5 trg_clk = ~trg_clk;

  int unsigned rcyc = 0, tcyc = 0;
  always @(posedge rf_clk) rcyc <= rcyc + 1;
  always @(posedge trg_clk) tcyc <= tcyc + 1;

  int checks = 0, failures = 0;
  int unsigned fid_rises[$];
  int unsigned ch_rises[NS][NC][$];
  int unsigned start_rises[$];
  int unsigned busy_cnt[NS];
  int unsigned chdly[NS][NC];
  // mechanism counters
  int n_resync = 0, n_channel = 0, n_normal = 0, n_veto = 0, n_storage = 0,
      n_manual = 0, n_freerun = 0;

  // RF-side monitor
  always @(negedge rf_clk) begin
    if (!rf_rst) begin
      if (fiducial_out && !prev_fid) fid_rises.push_back(rcyc);
      for (int s = 0; s < NS; s++)
        for (int c = 0; c < NC; c++)
          if (station_fiducial[s][c] && !prev_sf[s][c]) ch_rises[s][c].push_back(rcyc);
    end
    prev_fid = fiducial_out;
    prev_sf  = station_fiducial;
  end

  // trigger-side monitor and detector model
  always @(negedge trg_clk) begin
    if (!trg_rst) begin
      if (start_out[0] && !prev_start[0]) start_rises.push_back(tcyc);
      checks++;
      if (start_out != {NS{start_out[0]}}) begin
        failures++;
        $display("FAIL station starts differ");
      end
      for (int s = 0; s < NS; s++) begin
        if (start_out[s] && !prev_start[s]) begin
          bpm_ready[s] = 1'b0;
          busy_cnt[s]  = BUSY;
        end else if (busy_cnt[s] > 0) begin
          busy_cnt[s]--;
          if (busy_cnt[s] == 0) bpm_ready[s] = 1'b1;
        end
      end
    end
    prev_start = start_out;
  end

  initial begin : watchdog
    repeat (200000) @(posedge rf_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit has(int unsigned q[$], int unsigned v);
    foreach (q[i]) if (q[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  task automatic div_wr(input int unsigned a, input int unsigned v);
    @(negedge rf_clk);
    div_we = 1'b1; div_addr = 3'(a); div_wdata = v;
    @(negedge rf_clk);
    div_we = 1'b0;
  endtask

  task automatic dly_wr(input int unsigned s, input int unsigned a, input int unsigned v);
    @(negedge rf_clk);
    dly_we[s] = 1'b1; dly_addr[s] = 6'(a); dly_wdata[s] = v;
    @(negedge rf_clk);
    dly_we[s] = 1'b0;
  endtask

  // Apply one injection pulse; return its first RF and trigger sample edges.
  task automatic inject(output int unsigned e0, output int unsigned e0t);
    @(negedge rf_clk);
    #0.011;
    dr_injection = 1'b1;
    e0  = rcyc + 1;
    e0t = tcyc + 1;
    #50;
    dr_injection = 1'b0;
  endtask

  // Fiducial and channel timing after a resynchronizing injection.
  task automatic check_resync(input int unsigned e0);
    int unsigned fr;
    fr = e0 + 3 + D_DIV + 230;
    while (rcyc < fr + 300) @(negedge rf_clk);
    check(has(fid_rises, fr), $sformatf("fiducial not restarted by injection at %0d", e0));
    check(has(fid_rises, fr + 230), "fiducial period after restart");
    if (has(fid_rises, fr)) n_resync++;
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < NC; c++) begin
        check(has(ch_rises[s][c], fr + 5 + chdly[s][c]),
              $sformatf("station %0d channel %0d timing", s, c));
        if (has(ch_rises[s][c], fr + 5 + chdly[s][c])) n_channel++;
      end
  endtask

  initial begin
    int unsigned e0, e0t, nst, last_fr, v;
    rf_rst = 1'b1; trg_rst = 1'b1; dr_injection = 1'b0;
    trg_enable = 1'b0; trg_manual = 1'b0; trg_mode = MODE_NORMAL;
    trg_delay = TRG_DELAY; trg_width = TRG_WIDTH; trg_period = 400;
    bpm_ready = '1; prev_start = '0; prev_fid = 1'b0; prev_sf = '0;
    div_we = 1'b0; div_addr = '0; div_wdata = '0;
    dly_we = '0; dly_addr = '0; dly_wdata = '0;
    foreach (busy_cnt[s]) busy_cnt[s] = 0;
    repeat (10) @(negedge trg_clk);
    rf_rst = 1'b0; trg_rst = 1'b0;

    // configuration over the register buses
    div_wr(DIV_REG_DELAY, D_DIV);
    div_wr(DIV_REG_FINE, 10'd150);
    check(ep195_code == 10'd150, "fine delay code");
    @(negedge rf_clk); div_addr = DIV_REG_RATIO; #0.1;
    check(div_rdata == 230, "default ratio 230");
    for (int s = 0; s < NS; s++) begin
      for (int c = 0; c < NC; c++) begin
        chdly[s][c] = $urandom_range(0, 230);
        dly_wr(s, c, chdly[s][c]);
      end
      @(negedge rf_clk); dly_addr[s] = 6'(7); #0.1;
      check(dly_rdata[s] == chdly[s][7], "station delay readback");
    end
    // a channel may be off for one fiducial period after its delay changes
    repeat (3 * 230) @(negedge rf_clk);
    trg_enable = 1'b1;
    repeat (20) @(negedge trg_clk);
    check(!trg_veto, "trigger armed after enable");

    // normal mode: injection gives resync, channel timing and a start
    nst = start_rises.size();
    inject(e0, e0t);
    check_resync(e0);
    while (tcyc < e0t + 3 + TRG_DELAY + 5) @(negedge trg_clk);
    check(start_rises.size() == nst + 1 && start_rises[nst] == e0t + 3 + TRG_DELAY,
          "start timing after injection");
    if (start_rises.size() == nst + 1) n_normal++;

    // a second injection while the detectors are busy: resync, but no start
    check(trg_veto && bpm_ready == '0, "detectors busy, trigger vetoed");
    nst = start_rises.size();
    inject(e0, e0t);
    check_resync(e0);
    repeat (20) @(negedge trg_clk);
    check(start_rises.size() == nst, "start while vetoed");
    if (start_rises.size() == nst) n_veto++;

    // wait for ready and re-arm, then a normal start again
    wait (bpm_ready == '1);
    repeat (10) @(negedge trg_clk);
    check(!trg_veto, "re-armed after ready");
    nst = start_rises.size();
    inject(e0, e0t);
    check_resync(e0);
    while (tcyc < e0t + 3 + TRG_DELAY + 5) @(negedge trg_clk);
    check(start_rises.size() == nst + 1 && start_rises[nst] == e0t + 3 + TRG_DELAY,
          "second normal start");
    if (start_rises.size() == nst + 1) n_normal++;

    // storage mode: periodic starts without injection
    trg_mode = MODE_STORAGE;
    nst = start_rises.size();
    repeat (3 * (BUSY + 400 + TRG_DELAY + 20)) @(negedge trg_clk);
    check(start_rises.size() >= nst + 2, $sformatf("storage mode: %0d starts", start_rises.size() - nst));
    n_storage = start_rises.size() - nst;

    // manual mode: a start only on command
    trg_mode = MODE_MANUAL;
    wait (bpm_ready == '1);
    repeat (BUSY) @(negedge trg_clk);
    nst = start_rises.size();
    repeat (200) @(negedge trg_clk);
    check(start_rises.size() == nst, "manual mode: start without command");
    @(negedge trg_clk); trg_manual = 1'b1; @(negedge trg_clk); trg_manual = 1'b0;
    repeat (TRG_DELAY + 10) @(negedge trg_clk);
    check(start_rises.size() == nst + 1, "manual mode: command");
    n_manual = start_rises.size() - nst;

    // sync disabled: injection leaves the fiducial phase alone
    div_wr(DIV_REG_CTRL, 0);
    repeat (500) @(negedge rf_clk);
    last_fr = fid_rises[fid_rises.size() - 1];
    inject(e0, e0t);
    repeat (1000) @(negedge rf_clk);
    v = 0;
    foreach (fid_rises[i])
      if (fid_rises[i] > last_fr) begin
        v++;
        check((fid_rises[i] - last_fr) % 230 == 0, "free-running phase moved by injection");
      end
    check(v >= 4, "free-running fiducial");
    n_freerun = 1;
    @(negedge rf_clk); div_addr = DIV_REG_NSYNC; #0.1;
    check(div_rdata == 3, $sformatf("resync count %0d", div_rdata));
    check(trg_n_starts == 2 + n_storage + n_manual, "start counter");

    $display("mechanisms: resync=%0d channel_pulses=%0d normal_start=%0d vetoed=%0d storage_start=%0d manual_start=%0d freerun=%0d",
             n_resync, n_channel, n_normal, n_veto, n_storage, n_manual, n_freerun);
    check(n_resync > 0,   "mechanism never happened: injection resync");
    check(n_channel > 0,  "mechanism never happened: channel delay");
    check(n_normal > 0,   "mechanism never happened: normal-mode start");
    check(n_veto > 0,     "mechanism never happened: veto while busy");
    check(n_storage > 0,  "mechanism never happened: storage-mode start");
    check(n_manual > 0,   "mechanism never happened: manual start");
    check(n_freerun > 0,  "mechanism never happened: sync disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
