// freq_divider: 32-bit RF clock divider with delayed external resynchronization.
//
// A counter runs from 0 to ratio-1 on every RF clock and `div_out` is high for
// the first floor(ratio/2) counts of each cycle, so the output is the RF clock
// divided by `ratio` (230 gives the damping-ring revolution frequency). A
// ratio below 2 is treated as 2. When `sync_en` is set, each rising edge of the
// asynchronous `sync_in` (the injection timing) starts a 32-bit delay of
// `delay` RF clocks, after which the counter is restarted at 0, so the
// divider phase is locked to the injected bucket plus a programmable offset.
// A new sync edge during a running delay restarts the delay.
//
// Timing: with E0 the first RF edge that samples `sync_in` high, `div_out`
// rises at edge E0+3+delay (two synchroniser stages, one edge-detect stage,
// then the delay counter). `resync` pulses for one cycle before that edge.
//
// Division ratio, delay and sync enable are the unit's documented controls;
// the duty cycle, the ratio clamp and the latency are this design's choices.
module freq_divider #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sync_in,
  input  logic             sync_en,
  input  logic [CNT_W-1:0] ratio,
  input  logic [CNT_W-1:0] delay,
  output logic             div_out,
  output logic             resync
);
  logic             sync_rise;
  logic             sync_level;
  logic             dly_busy;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] ratio_eff;
  logic [CNT_W-1:0] half;
  logic [CNT_W-1:0] cnt_next;

  edge_sync u_sync (
    .clk  (clk),
    .rst  (rst),
    .d    (sync_in),
    .level(sync_level),
    .rise (sync_rise),
    .fall ()
  );

  delay_counter #(.CNT_W(CNT_W), .RETRIGGER(1'b1)) u_delay (
    .clk  (clk),
    .rst  (rst),
    .start(sync_rise & sync_en),
    .delay(delay),
    .fire (resync),
    .busy (dly_busy),
    .ready()
  );

  assign ratio_eff = (ratio < CNT_W'(2)) ? CNT_W'(2) : ratio;
  assign half      = ratio_eff >> 1;

  always_comb begin
    if (resync || cnt >= ratio_eff - 1'b1) cnt_next = '0;
    else                                   cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      div_out <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      div_out <= (cnt_next < half);
    end
  end
endmodule
