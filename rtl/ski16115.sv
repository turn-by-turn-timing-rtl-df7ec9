// ski16115: universal frequency divider unit with external synchronization.
//
// The unit holds a small register bank written over a simple word bus, the
// divider logic (freq_divider) and the output flip-flop that retimes the
// divided clock with the RF clock after a fine analog delay. The fine delay
// chip itself is outside: this unit only supplies its delay code (`fine_code`)
// and receives the delayed clock on `ffclk`.
//
// Registers (word addresses, all readable, see timing_pkg::div_reg_e):
//   0 RATIO  division ratio, reset DIV_RATIO_RESET (230, one ring turn)
//   1 DELAY  RF clocks from the sync edge to the divider restart, reset 0
//   2 CTRL   bit 0 enables external synchronization, reset 1
//   3 FINE   fine delay code, reset 0
//   4 NSYNC  read only, number of resynchronizations since reset
// Bus: a write takes effect on the `clk` edge where `we` is high; `rdata`
// shows the register at `addr` combinationally. The bus is assumed to be
// already in the RF clock domain.
//
// Timing: `fiducial_out` follows the divider output one `ffclk` edge later.
// The set of controls follows the unit's description (ratio, delay, sync
// enable, fine delay, all readable); the addresses, reset values, resync
// counter and bus protocol are this design's choices.
module ski16115
  import timing_pkg::*;
#(
  parameter int unsigned CNT_W           = COUNTER_W,
  parameter int unsigned EP_W            = FINE_W,
  parameter int unsigned DIV_RATIO_RESET = HARMONIC
) (
  input  logic             clk,      // RF clock
  input  logic             rst,
  input  logic             ffclk,    // delayed RF clock for the output flip-flop
  input  logic             sync_in,  // injection timing
  // register bus
  input  logic             we,
  input  logic [2:0]       addr,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  // outputs
  output logic [EP_W-1:0]  fine_code,
  output logic             div_out,
  output logic             fiducial_out
);
  logic [CNT_W-1:0] ratio_q;
  logic [CNT_W-1:0] delay_q;
  logic             sync_en_q;
  logic [EP_W-1:0]  fine_q;
  logic [31:0]      nsync_q;
  logic             resync;

  always_ff @(posedge clk) begin
    if (rst) begin
      ratio_q   <= CNT_W'(DIV_RATIO_RESET);
      delay_q   <= '0;
      sync_en_q <= 1'b1;
      fine_q    <= '0;
    end else if (we) begin
      unique case (addr)
        DIV_REG_RATIO: ratio_q   <= CNT_W'(wdata);
        DIV_REG_DELAY: delay_q   <= CNT_W'(wdata);
        DIV_REG_CTRL:  sync_en_q <= wdata[0];
        DIV_REG_FINE:  fine_q    <= wdata[EP_W-1:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)         nsync_q <= '0;
    else if (resync) nsync_q <= nsync_q + 1'b1;
  end

  always_comb begin
    unique case (addr)
      DIV_REG_RATIO: rdata = 32'(ratio_q);
      DIV_REG_DELAY: rdata = 32'(delay_q);
      DIV_REG_CTRL:  rdata = {31'd0, sync_en_q};
      DIV_REG_FINE:  rdata = 32'(fine_q);
      DIV_REG_NSYNC: rdata = nsync_q;
      default:       rdata = '0;
    endcase
  end

  assign fine_code = fine_q;

  freq_divider #(.CNT_W(CNT_W)) u_div (
    .clk    (clk),
    .rst    (rst),
    .sync_in(sync_in),
    .sync_en(sync_en_q),
    .ratio  (ratio_q),
    .delay  (delay_q),
    .div_out(div_out),
    .resync (resync)
  );

  retime_dff #(.WIDTH(1)) u_out_ff (
    .clk(ffclk),
    .d  (div_out),
    .q  (fiducial_out)
  );
endmodule
