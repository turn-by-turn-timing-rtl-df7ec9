// tb_delay32: self-checking test of the 32-channel fiducial delay.
//
// The bench drives a 230-clock fiducial (115 high), the ring revolution
// pattern, on the falling edge. Channel delays are random up to one period,
// with channel 0 at 0 and the last two channels at 229 and 230. With E0 the
// edge that first samples a fiducial high and F0 the edge that first samples
// it low again, every channel must rise at edge E0+3+delay, fall at edge
// F0+3+delay and so stay high 115 cycles per fiducial.
module tb_delay32;
  localparam int unsigned NUM_CH = 32;
  localparam int unsigned CNT_W  = 32;
  localparam int unsigned PERIOD = 230;
  localparam int unsigned HIGH   = PERIOD / 2;
  localparam int unsigned NFID   = 6;

  logic                         clk = 1'b0;
  logic                         rst;
  logic                         fid_in;
  logic [NUM_CH-1:0][CNT_W-1:0] delay;
  logic [NUM_CH-1:0]            ch_out, prev_out;
  logic                         fid_rise;
  int unsigned                  cyc = 0;
  int                           checks = 0, failures = 0;
  int unsigned                  rise_log[NUM_CH][$];
  int unsigned                  fall_log[NUM_CH][$];
  int unsigned                  high_cnt[NUM_CH];
  int unsigned                  e0s[$], f0s[$];

  delay32 #(.NUM_CH(NUM_CH), .CNT_W(CNT_W)) dut (.*);

  always #0.982 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (!rst) begin
      for (int i = 0; i < NUM_CH; i++) begin
        if (ch_out[i] && !prev_out[i]) rise_log[i].push_back(cyc);
        if (!ch_out[i] && prev_out[i]) fall_log[i].push_back(cyc);
        if (ch_out[i]) high_cnt[i]++;
      end
    end
    prev_out = ch_out;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit has(int unsigned q[$], int unsigned v);
    foreach (q[i]) if (q[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    rst = 1'b1; fid_in = 1'b0; prev_out = '0;
    for (int i = 0; i < NUM_CH; i++) delay[i] = $urandom_range(1, PERIOD);
    delay[0] = 0;
    delay[NUM_CH-2] = PERIOD - 1;
    delay[NUM_CH-1] = PERIOD;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    for (int f = 0; f < NFID; f++) begin
      fid_in = 1'b1;
      e0s.push_back(cyc + 1);
      repeat (HIGH) @(negedge clk);
      fid_in = 1'b0;
      f0s.push_back(cyc + 1);
      repeat (PERIOD - HIGH) @(negedge clk);
    end
    repeat (PERIOD + 20) @(negedge clk);

    for (int i = 0; i < NUM_CH; i++) begin
      checks++;
      if (rise_log[i].size() != NFID || fall_log[i].size() != NFID) begin
        failures++;
        $display("FAIL ch%0d: %0d rises %0d falls, expected %0d", i, rise_log[i].size(), fall_log[i].size(), NFID);
      end
      foreach (e0s[f]) begin
        checks++;
        if (!has(rise_log[i], e0s[f] + 3 + delay[i]) || !has(fall_log[i], f0s[f] + 3 + delay[i])) begin
          failures++;
          $display("FAIL ch%0d (delay %0d) fiducial %0d: edges not at %0d/%0d", i, delay[i], f,
                   e0s[f] + 3 + delay[i], f0s[f] + 3 + delay[i]);
        end
      end
      checks++;
      if (high_cnt[i] != NFID * HIGH) begin
        failures++;
        $display("FAIL ch%0d: high %0d cycles", i, high_cnt[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
