// delay_counter: programmable one-shot delay in clock cycles.
//
// A `start` pulse loads the delay; with the start sampled at clock edge t,
// `fire` is high for the one cycle that follows edge t+delay (delay 0: the
// cycle right after edge t). With RETRIGGER=1 a start while counting restarts
// the count; with RETRIGGER=0 it is ignored, except in the last cycle of a
// count, where the finishing count fires and the new one begins. A periodic
// start of period P is therefore followed faithfully for any delay up to P.
// The counter width follows the 32-bit delays of the divider and delay units;
// the retrigger rules are this design's choice.
module delay_counter #(
  parameter int unsigned CNT_W     = 32,
  parameter bit          RETRIGGER = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CNT_W-1:0] delay,
  output logic             fire,
  output logic             busy,
  output logic             ready  // a start now would be accepted
);
  logic [CNT_W-1:0] cnt;
  logic             last;

  assign last  = busy && (cnt == CNT_W'(1));
  assign ready = RETRIGGER || !busy || last;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      busy <= 1'b0;
      fire <= 1'b0;
    end else begin
      fire <= 1'b0;
      if (busy) begin
        cnt <= cnt - 1'b1;
        if (last) begin
          fire <= 1'b1;
          busy <= 1'b0;
        end
      end
      // a start (later assignments win) loads a new count
      if (start && ready) begin
        if (delay == '0) begin
          fire <= 1'b1;
          busy <= 1'b0;
        end else begin
          cnt  <= delay;
          busy <= 1'b1;
        end
      end
    end
  end
endmodule
