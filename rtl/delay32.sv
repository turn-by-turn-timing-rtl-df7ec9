// delay32: multi-channel digital delay of an external fiducial in RF clocks.
//
// The incoming fiducial (the divided clock of the master divider, asynchronous
// to this unit's copy of the RF clock) is synchronised once, and its rising
// and falling edges feed every channel. Channel i (fid_delay) reproduces the
// fiducial waveform on `ch_out[i]` `delay[i]` RF clocks later, so the delay
// step is one RF period (about 2 ns at 509 MHz) and the range is 32 bits;
// every fiducial is reproduced for delays up to one fiducial period.
//
// Timing: with E0 the first edge that samples a change of `fid_in`, the same
// change appears on `ch_out[i]` at edge E0+3+delay[i].
//
// Counting RF clocks from the external timing with a 32-bit delay per channel
// follows the unit as described; the synchroniser and the edge-pair scheme
// are this design's choices.
module delay32 #(
  parameter int unsigned NUM_CH = 32,
  parameter int unsigned CNT_W  = 32
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         fid_in,
  input  logic [NUM_CH-1:0][CNT_W-1:0] delay,
  output logic [NUM_CH-1:0]            ch_out,
  output logic                         fid_rise  // one-cycle pulse per fiducial
);
  logic fid_level, fid_fall;

  edge_sync u_sync (
    .clk  (clk),
    .rst  (rst),
    .d    (fid_in),
    .level(fid_level),
    .rise (fid_rise),
    .fall (fid_fall)
  );

  for (genvar i = 0; i < NUM_CH; i++) begin : g_ch
    fid_delay #(.CNT_W(CNT_W)) u_ch (
      .clk  (clk),
      .rst  (rst),
      .rise (fid_rise),
      .fall (fid_fall),
      .delay(delay[i]),
      .out  (ch_out[i])
    );
  end
endmodule
