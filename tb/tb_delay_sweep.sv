// tb_delay_sweep: the two delay sweeps the timing chain is characterised
// with, run on the whole system at its default size (4 stations of 32
// channels, ratio 230).
//
// 1. Divider delay sweep: the master divider's delay register is stepped
//    through 0, 1, 2, 57, 114, 115, 116, 228, 229 and 230 RF clocks. After
//    each injection first sampled at RF edge E0, the master fiducial must rise
//    at E0+3+D+230 and again one period later.
// 2. Channel delay sweep: the 128 channels are given delays spread evenly over
//    0..230 (channel k of 128 gets k*230/127, so both ends are included). A
//    second pass gives them the reverse order. For every fiducial rise at F
//    after the delays have settled, each channel must rise at F+5+d and fall
//    115 clocks later, so the delayed fiducial keeps the master's shape even
//    when the delay is a whole period.
// Both mechanisms are counted and must occur. Injection pulses start 11 ps
// after an RF falling edge so they never coincide with a clock edge. The
// start trigger part is held disabled here; other testbenches cover it.
module tb_delay_sweep;
  import timing_pkg::*;
  localparam int unsigned NS = STATIONS;
  localparam int unsigned NC = CHANNELS;

  logic                       rf_clk = 1'b0, trg_clk = 1'b0, ffclk_master;
  logic                       rf_rst, trg_rst, dr_injection;
  logic                       trg_enable, trg_manual;
  trig_mode_e                 trg_mode;
  logic [COUNTER_W-1:0]       trg_delay, trg_period;
  logic [PULSE_W-1:0]         trg_width;
  logic [NS-1:0]              bpm_ready, start_out;
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

  int unsigned rcyc = 0;
  always @(posedge rf_clk) rcyc <= rcyc + 1;

  int checks = 0, failures = 0;
  int unsigned fid_rises[$];
  int unsigned ch_rises[NS][NC][$];
  int unsigned ch_falls[NS][NC][$];
  int unsigned chdly[NS][NC];
  int n_div_steps = 0, n_ch_delays = 0;
  localparam int unsigned DSTEPS[10] = '{0, 1, 2, 57, 114, 115, 116, 228, 229, 230};

  always @(negedge rf_clk) begin
    if (!rf_rst) begin
      if (fiducial_out && !prev_fid) fid_rises.push_back(rcyc);
      for (int s = 0; s < NS; s++)
        for (int c = 0; c < NC; c++) begin
          if (station_fiducial[s][c] && !prev_sf[s][c]) ch_rises[s][c].push_back(rcyc);
          if (!station_fiducial[s][c] && prev_sf[s][c]) ch_falls[s][c].push_back(rcyc);
        end
    end
    prev_fid = fiducial_out;
    prev_sf  = station_fiducial;
  end

  initial begin : watchdog
    repeat (120000) @(posedge rf_clk);
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

  task automatic inject(output int unsigned e0);
    @(negedge rf_clk);
    #0.011;
    dr_injection = 1'b1;
    e0 = rcyc + 1;
    #20;
    dr_injection = 1'b0;
  endtask

  // Program all 128 channels: channel k = s*NC + c (or 127-k when reversed)
  // gets k*230/127.
  task automatic set_channels(input bit reverse);
    int unsigned k;
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < NC; c++) begin
        k = s * NC + c;
        if (reverse) k = NS * NC - 1 - k;
        chdly[s][c] = (k * 230) / (NS * NC - 1);
        dly_wr(s, c, chdly[s][c]);
      end
  endtask

  // Check every channel against two fiducial rises after time `after`.
  task automatic check_channels(input int unsigned after);
    int unsigned f[$];
    bit ok;
    while (rcyc < after + 2 * 230 + 10) @(negedge rf_clk);
    foreach (fid_rises[i]) if (fid_rises[i] > after && f.size() < 2) f.push_back(fid_rises[i]);
    while (rcyc < f[f.size() - 1] + 5 + 230 + 115 + 5) @(negedge rf_clk);
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < NC; c++) begin
        ok = 1'b1;
        foreach (f[i]) begin
          ok &= has(ch_rises[s][c], f[i] + 5 + chdly[s][c]);
          ok &= has(ch_falls[s][c], f[i] + 5 + chdly[s][c] + 115);
        end
        check(f.size() == 2 && ok, $sformatf("station %0d channel %0d delay %0d", s, c, chdly[s][c]));
        if (f.size() == 2 && ok) n_ch_delays++;
      end
  endtask

  initial begin
    int unsigned e0, fr, t;
    rf_rst = 1'b1; trg_rst = 1'b1; dr_injection = 1'b0;
    trg_enable = 1'b0; trg_manual = 1'b0; trg_mode = MODE_NORMAL;
    trg_delay = 10; trg_width = 10; trg_period = 100;
    bpm_ready = '1; prev_fid = 1'b0; prev_sf = '0;
    div_we = 1'b0; div_addr = '0; div_wdata = '0;
    dly_we = '0; dly_addr = '0; dly_wdata = '0;
    repeat (10) @(negedge trg_clk);
    rf_rst = 1'b0; trg_rst = 1'b0;

    // 1. divider delay sweep
    foreach (DSTEPS[i]) begin
      div_wr(DIV_REG_DELAY, DSTEPS[i]);
      inject(e0);
      fr = e0 + 3 + DSTEPS[i] + 230;
      while (rcyc < fr + 235) @(negedge rf_clk);
      check(has(fid_rises, fr) && has(fid_rises, fr + 230),
            $sformatf("divider delay %0d: fiducial phase", DSTEPS[i]));
      if (has(fid_rises, fr)) n_div_steps++;
    end
    @(negedge rf_clk); div_addr = DIV_REG_NSYNC; #0.1;
    check(div_rdata == 10, $sformatf("divider delay sweep: %0d restarts", div_rdata));

    // 2. channel delay sweep, both orders
    for (int pass = 0; pass < 2; pass++) begin
      set_channels(pass == 1);
      // a channel may be off for one fiducial period after its delay changes
      t = rcyc + 2 * 230;
      check_channels(t);
    end

    $display("mechanisms: divider_delay_steps=%0d channel_delays=%0d", n_div_steps, n_ch_delays);
    check(n_div_steps > 0, "mechanism never happened: divider delay step");
    check(n_ch_delays > 0, "mechanism never happened: channel delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
