// trigger_delay: single-shot delayed start trigger for the BPM stations.
//
// The generator is armed by `arm` and accepts exactly one trigger while armed:
// a rising edge of the asynchronous external input `ext_trig` (the injection
// timing) when `ext_en` is set, or a software trigger `sw_trig`. The accepted
// trigger clears the armed state and, `delay` clock cycles later, drives the
// start pulse of `width` cycles on all NUM_OUT outputs (one per station).
// `disarm` withdraws an unused arming. While the delayed pulse of the last
// trigger is still in progress, triggers are not accepted.
//
// Timing: a software trigger accepted at edge t gives `fired` high after edge
// t and `start_out` rising at edge t+1+delay. An external edge first sampled
// high at E0 is accepted at edge E0+2.
//
// The single-shot external trigger with a preset delay, enabled only when the
// detectors are ready, follows the start trigger system as described (built
// there from a commercial delay generator); counting the delay in cycles of
// `clk` instead of a fine analog delay, and the port protocol, are this
// design's choices.
module trigger_delay #(
  parameter int unsigned NUM_OUT = 4,
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned WID_W   = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               ext_trig,
  input  logic               ext_en,
  input  logic               sw_trig,
  input  logic               arm,
  input  logic               disarm,
  input  logic [CNT_W-1:0]   delay,
  input  logic [WID_W-1:0]   width,
  output logic               armed,
  output logic               fired,
  output logic [NUM_OUT-1:0] start_out
);
  logic ext_level, ext_rise;
  logic accept;
  logic pulse, busy;
  logic start_q;

  edge_sync u_sync (
    .clk  (clk),
    .rst  (rst),
    .d    (ext_trig),
    .level(ext_level),
    .rise (ext_rise),
    .fall ()
  );

  assign accept = armed && !busy && ((ext_en && ext_rise) || sw_trig);

  always_ff @(posedge clk) begin
    if (rst) begin
      armed   <= 1'b0;
      fired   <= 1'b0;
      start_q <= 1'b0;
    end else begin
      fired   <= accept;
      start_q <= accept;
      if (accept || disarm) armed <= 1'b0;
      else if (arm)          armed <= 1'b1;
    end
  end

  delay_channel #(.CNT_W(CNT_W), .WID_W(WID_W)) u_delay (
    .clk  (clk),
    .rst  (rst),
    .start(start_q),
    .delay(delay),
    .width(width),
    .pulse(pulse),
    .busy (busy)
  );

  assign start_out = {NUM_OUT{pulse}};
endmodule
