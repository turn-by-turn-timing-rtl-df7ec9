// ski17029: 32-channel RF-clock delay unit for one BPM station.
//
// The unit holds one 32-bit delay register per channel, the channel logic
// (delay32), and a bank of output flip-flops
// clocked by the RF clock that retime all channel outputs. Each channel gives
// one position detector its copy of the revolution fiducial, delayed to make
// up for the detector's place in the ring and its cable.
//
// Registers (word addresses, all readable):
//   0..NUM_CH-1  delay of channel i in RF clocks, reset 0
//   others       read as 0, writes ignored
// Bus: a write takes effect on the `clk` edge where `we` is high; `rdata`
// shows the register at `addr` combinationally.
//
// Timing: with E0 the first RF edge that samples a change of `fid_in`, the
// same change appears on `fid_out[i]` at edge E0+4+delay[i] (two synchroniser
// stages, edge detect, channel, output flip-flop).
// The channel count, the 32-bit delays and the output flip-flops follow the
// unit's description; the register map is this design's choice.
module ski17029
  import timing_pkg::*;
#(
  parameter int unsigned NUM_CH = CHANNELS,
  parameter int unsigned CNT_W  = COUNTER_W
) (
  input  logic              clk,    // RF clock
  input  logic              rst,
  input  logic              fid_in, // fiducial from the master divider
  // register bus
  input  logic              we,
  input  logic [5:0]        addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata,
  // outputs
  output logic [NUM_CH-1:0] fid_out
);
  logic [NUM_CH-1:0][CNT_W-1:0] delay_q;
  logic [NUM_CH-1:0]            ch_out;
  logic                         fid_rise;

  always_ff @(posedge clk) begin
    if (rst)                           delay_q       <= '0;
    else if (we && 32'(addr) < NUM_CH) delay_q[addr] <= CNT_W'(wdata);
  end

  always_comb begin
    if (32'(addr) < NUM_CH) rdata = 32'(delay_q[addr]);
    else                    rdata = '0;
  end

  delay32 #(.NUM_CH(NUM_CH), .CNT_W(CNT_W)) u_dly (
    .clk     (clk),
    .rst     (rst),
    .fid_in  (fid_in),
    .delay   (delay_q),
    .ch_out  (ch_out),
    .fid_rise(fid_rise)
  );

  retime_dff #(.WIDTH(NUM_CH)) u_out_ff (
    .clk(clk),
    .d  (ch_out),
    .q  (fid_out)
  );
endmodule
