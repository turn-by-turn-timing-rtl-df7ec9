// tb_ski17029: self-checking test of the 32-channel delay unit with its
// register bank and output flip-flops.
//
// Checked: reset values read back (delays 0); every channel delay is written
// and read back; an address beyond the map reads 0 and a write there changes
// nothing; with a 230-clock fiducial whose first high sample is at edge E0,
// fid_out[i] rises at edge E0+4+delay[i] and keeps the fiducial's 115-cycle
// high time, for every fiducial.
module tb_ski17029;
  localparam int unsigned NUM_CH = 32;
  localparam int unsigned PERIOD = 230;
  localparam int unsigned NFID   = 4;
  localparam int unsigned HIGH   = PERIOD / 2;

  logic              clk = 1'b0;
  logic              rst, fid_in, we;
  logic [5:0]        addr;
  logic [31:0]       wdata, rdata;
  logic [NUM_CH-1:0] fid_out, prev_out;
  int unsigned       cyc = 0;
  int                checks = 0, failures = 0;
  int unsigned       dly[NUM_CH];
  int unsigned       rise_log[NUM_CH][$];
  int unsigned       high_cnt[NUM_CH];
  int unsigned       e0s[$];

  ski17029 dut (.*);

  always #0.982 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NUM_CH; i++) begin
        if (fid_out[i] && !prev_out[i]) rise_log[i].push_back(cyc);
        if (fid_out[i]) high_cnt[i]++;
      end
    end
    prev_out = fid_out;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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
    we = 1'b1; addr = 6'(a); wdata = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rd(input int unsigned a, output int unsigned v);
    @(negedge clk);
    addr = 6'(a);
    #0.1;
    v = rdata;
  endtask

  function automatic bit has(int unsigned q[$], int unsigned v);
    foreach (q[i]) if (q[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    int unsigned v;
    rst = 1'b1; fid_in = 1'b0; we = 1'b0; addr = '0; wdata = '0; prev_out = '0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    rd(5, v);  check(v == 0, "reset delay");

    for (int i = 0; i < NUM_CH; i++) begin
      dly[i] = (i == 0) ? 0 : $urandom_range(1, PERIOD);
      wr(i, dly[i]);
    end
    wr(40, 32'hdead);
    for (int i = 0; i < NUM_CH; i++) begin
      rd(i, v);
      check(v == dly[i], $sformatf("readback ch%0d: %0d", i, v));
    end
    rd(40, v); check(v == 0, "unmapped address");

    repeat (10) @(negedge clk);
    for (int f = 0; f < NFID; f++) begin
      fid_in = 1'b1;
      e0s.push_back(cyc + 1);
      repeat (HIGH) @(negedge clk);
      fid_in = 1'b0;
      repeat (PERIOD - HIGH) @(negedge clk);
    end
    repeat (PERIOD + 20) @(negedge clk);
    for (int i = 0; i < NUM_CH; i++) begin
      check(rise_log[i].size() == NFID, $sformatf("ch%0d pulse count %0d", i, rise_log[i].size()));
      foreach (e0s[f])
        check(has(rise_log[i], e0s[f] + 4 + dly[i]), $sformatf("ch%0d fiducial %0d timing", i, f));
      check(high_cnt[i] == NFID * HIGH, $sformatf("ch%0d high %0d cycles", i, high_cnt[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
