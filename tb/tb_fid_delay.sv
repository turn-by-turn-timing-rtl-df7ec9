// tb_fid_delay: self-checking test of one fiducial delay channel.
//
// The bench feeds edge pulses of a periodic fiducial (period 230, high 115,
// and also a short-period pattern) and checks that the output is the input
// waveform shifted by delay+1 clock edges, sample by sample, for delays 0, 1,
// random values, one less than the period and exactly the period. A delay
// changed while the fiducial runs must give the new shifted waveform again
// from the second period after the change.
module tb_fid_delay;
  localparam int unsigned CNT_W = 32;

  logic             clk = 1'b0;
  logic             rst, rise, fall, out;
  logic [CNT_W-1:0] delay;
  int unsigned      cyc = 0;
  int               checks = 0, failures = 0;
  logic             wave[int unsigned];  // input level after each edge

  fid_delay #(.CNT_W(CNT_W)) dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive `nper` periods of the pattern and compare the output with the
  // input level delay+1 edges earlier (edge pulses are sampled one edge after
  // the level change they mark, so the output trails the level by delay+2).
  task automatic run_case(input int unsigned d, input int unsigned period, input int unsigned high,
                          input int unsigned nper);
    int unsigned t0, bad;
    logic lvl, prev_lvl;
    @(negedge clk);
    rst = 1'b1; rise = 1'b0; fall = 1'b0; delay = d;
    @(negedge clk);
    rst = 1'b0;
    wave.delete();
    t0 = cyc;
    prev_lvl = 1'b0;
    bad = 0;
    for (int unsigned k = 0; k < nper * period + d + 4; k++) begin
      lvl = (k < nper * period) && ((k % period) < high);
      // edge pulses for the level that the input takes at this edge
      rise = lvl && !prev_lvl;
      fall = !lvl && prev_lvl;
      wave[cyc + 1] = lvl;
      prev_lvl = lvl;
      @(negedge clk);
      if (wave.exists(cyc - d - 1) && cyc - d - 1 > t0 + 1) begin
        checks++;
        if (out !== wave[cyc - d - 1]) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL delay %0d period %0d at %0d: out=%0b", d, period, cyc, out);
        end
      end
    end
    rise = 1'b0; fall = 1'b0;
  endtask

  // Change the delay from d1 to d2 in the low phase of a running fiducial,
  // then compare with the input shifted by d2+1 from two periods later on.
  task automatic change_case(input int unsigned d1, input int unsigned d2);
    int unsigned tchg, bad;
    logic lvl, prev_lvl;
    @(negedge clk);
    rst = 1'b1; rise = 1'b0; fall = 1'b0; delay = d1;
    @(negedge clk);
    rst = 1'b0;
    wave.delete();
    prev_lvl = 1'b0;
    bad = 0;
    tchg = 0;
    for (int unsigned k = 0; k < 8 * 230; k++) begin
      lvl = (k % 230) < 115;
      rise = lvl && !prev_lvl;
      fall = !lvl && prev_lvl;
      wave[cyc + 1] = lvl;
      prev_lvl = lvl;
      if (k == 3 * 230 + 150) begin delay = d2; tchg = cyc; end
      @(negedge clk);
      if (tchg != 0 && cyc > tchg + 2 * 230 + d2 + 2) begin
        checks++;
        if (out !== wave[cyc - d2 - 1]) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL delay change %0d->%0d at %0d", d1, d2, cyc);
        end
      end
    end
    rise = 1'b0; fall = 1'b0;
  endtask

  initial begin
    rst = 1'b1; rise = 1'b0; fall = 1'b0; delay = '0;
    repeat (3) @(negedge clk);
    run_case(0, 230, 115, 3);
    run_case(1, 230, 115, 3);
    run_case(92, 230, 115, 4);
    run_case(229, 230, 115, 4);
    run_case(230, 230, 115, 4);
    run_case(17, 20, 3, 10);
    repeat (6) run_case($urandom_range(2, 230), 230, 115, 3);
    change_case(0, 166);
    change_case(200, 10);
    change_case(30, 229);
    repeat (3) change_case($urandom_range(0, 230), $urandom_range(0, 230));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
