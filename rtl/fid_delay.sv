// fid_delay: one channel of the fiducial delay, shifting a whole waveform by a
// programmable number of clock cycles.
//
// The channel receives one-cycle pulses marking the rising and the falling
// edges of the incoming fiducial. Two 32-bit delay counters, one per edge,
// reproduce each edge `delay` cycles later: the output is set when the
// rising-edge counter fires and cleared when the falling-edge counter fires.
// The output therefore keeps the duty cycle of the input. A counter that is
// still running ignores a new edge, except in its last cycle, so a periodic
// fiducial of period P is reproduced edge for edge for every delay up to P
// (0 to 230 RF clocks in the ring). Edges are taken in pairs: a falling edge
// is taken only if the rising edge before it was. When a resynchronization of
// the master divider shortens one period below the delay, the channel thus
// drops that whole pulse and is correct again from the next one.
//
// Timing: an edge pulse sampled at clock edge t appears on `out` at clock
// edge t+delay+1.
//
// Counting a 32-bit delay in RF clocks from the external timing follows the
// multi-channel delay unit as described; delaying both edges rather than
// generating a fixed-width pulse is this design's choice.
module fid_delay #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rise,
  input  logic             fall,
  input  logic [CNT_W-1:0] delay,
  output logic             out
);
  logic rise_fire, fall_fire, rise_busy, fall_busy, rise_ready, fall_ready;
  logic pending;  // a rising edge was taken, its falling edge not yet
  logic take_rise, take_fall;

  assign take_rise = rise && !pending && rise_ready;
  assign take_fall = fall && pending && fall_ready;

  always_ff @(posedge clk) begin
    if (rst)            pending <= 1'b0;
    else if (take_rise) pending <= 1'b1;
    else if (fall)      pending <= 1'b0;
  end

  delay_counter #(.CNT_W(CNT_W), .RETRIGGER(1'b0)) u_rise (
    .clk  (clk),
    .rst  (rst),
    .start(take_rise),
    .delay(delay),
    .fire (rise_fire),
    .busy (rise_busy),
    .ready(rise_ready)
  );

  delay_counter #(.CNT_W(CNT_W), .RETRIGGER(1'b0)) u_fall (
    .clk  (clk),
    .rst  (rst),
    .start(take_fall),
    .delay(delay),
    .fire (fall_fire),
    .busy (fall_busy),
    .ready(fall_ready)
  );

  always_ff @(posedge clk) begin
    if (rst)            out <= 1'b0;
    else if (rise_fire) out <= 1'b1;
    else if (fall_fire) out <= 1'b0;
  end
endmodule
