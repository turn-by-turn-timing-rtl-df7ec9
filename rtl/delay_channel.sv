// delay_channel: one programmable delay channel counted in clock cycles.
//
// A `start` pulse begins a delay of `delay` clock cycles; the channel then
// drives `pulse` high for `width` cycles (a width of 0 counts as 1). With the
// start sampled at clock edge t, `pulse` rises at edge t+delay and falls at
// edge t+delay+width. The channel is not retriggerable: a start that arrives
// while it is counting or driving its pulse (`busy`) is ignored, so a
// periodic start of period P is reproduced on every period when
// delay+width < P. One counter is shared by the delay and the pulse phase.
//
// The 32-bit delay counted in RF clocks from an external timing edge is the
// scheme of the multi-channel delay unit; the programmable pulse width and the
// non-retriggerable rule are choices of this design.
module delay_channel #(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned WID_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [CNT_W-1:0] delay,
  input  logic [WID_W-1:0] width,
  output logic             pulse,
  output logic             busy
);
  typedef enum logic [1:0] {IDLE, WAIT, HIGH} phase_e;

  phase_e           phase;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] width_m1;

  assign width_m1 = (width == '0) ? '0 : CNT_W'(width) - 1'b1;
  assign busy     = (phase != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= IDLE;
      cnt   <= '0;
      pulse <= 1'b0;
    end else begin
      unique case (phase)
        IDLE: if (start) begin
          if (delay == '0) begin
            phase <= HIGH;
            pulse <= 1'b1;
            cnt   <= width_m1;
          end else begin
            phase <= WAIT;
            cnt   <= delay;
          end
        end
        WAIT: begin
          if (cnt == CNT_W'(1)) begin
            phase <= HIGH;
            pulse <= 1'b1;
            cnt   <= width_m1;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        HIGH: begin
          if (cnt == '0) begin
            phase <= IDLE;
            pulse <= 1'b0;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: phase <= IDLE;
      endcase
    end
  end
endmodule
