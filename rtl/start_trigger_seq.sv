// start_trigger_seq: sequencer of the BPM acquisition start trigger.
//
// The sequencer arms the single-shot trigger generator only while the
// position detectors report ready, and withholds it (veto) while they take
// and process data, so a detector that has finished early is not started
// again. Three modes choose what fires an armed generator:
//   MODE_NORMAL   the injection timing (external input enabled),
//   MODE_STORAGE  an internal timer: `period`+1 clock cycles after arming,
//   MODE_MANUAL   a software command `manual_trig`.
// After the generator has fired, the sequencer waits for `ready` to fall
// (the detectors took the start) and to rise again (data processed), then
// re-arms by itself. Clearing `enable` disarms and stops the cycle.
//
// `ready` is asynchronous and is synchronised here (two flip-flops), so it
// counts two clocks after it changes. `arm`, `disarm` and `sw_trig` are
// one-cycle pulses to the generator; `fired` comes back from it.
//
// The three modes, the ready/re-arm cycle and the veto follow the start
// trigger system as described, where this role is played by control software;
// the state encoding and the exact ready handshake are this design's choices.
module start_trigger_seq
  import timing_pkg::*;
#(
  parameter int unsigned CNT_W = COUNTER_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  trig_mode_e       mode,
  input  logic             ready,
  input  logic             manual_trig,
  input  logic [CNT_W-1:0] period,
  input  logic             fired,     // generator accepted a trigger
  output logic             arm,
  output logic             disarm,
  output logic             ext_en,
  output logic             sw_trig,
  output logic             veto,
  output logic [31:0]      n_starts   // triggers fired since reset
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_READY, S_ARMED, S_WAIT_BUSY} state_e;

  state_e           state;
  logic             ready_s, ready_rise_unused;
  logic [CNT_W-1:0] timer;
  logic             timer_done;

  edge_sync u_ready (
    .clk  (clk),
    .rst  (rst),
    .d    (ready),
    .level(ready_s),
    .rise (ready_rise_unused),
    .fall ()
  );

  assign timer_done = (timer >= period);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      arm      <= 1'b0;
      disarm   <= 1'b0;
      sw_trig  <= 1'b0;
      timer    <= '0;
      n_starts <= '0;
    end else begin
      arm     <= 1'b0;
      disarm  <= 1'b0;
      sw_trig <= 1'b0;
      if (fired) n_starts <= n_starts + 1'b1;
      if (!enable) begin
        if (state == S_ARMED) disarm <= 1'b1;
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE:       state <= S_WAIT_READY;
          S_WAIT_READY: if (ready_s) begin
            state <= S_ARMED;
            arm   <= 1'b1;
            timer <= '0;
          end
          S_ARMED: begin
            if (fired) begin
              state <= S_WAIT_BUSY;
            end else begin
              if (!timer_done) timer <= timer + 1'b1;
              if (mode == MODE_STORAGE && timer_done && !sw_trig) sw_trig <= 1'b1;
              if (mode == MODE_MANUAL && manual_trig)             sw_trig <= 1'b1;
            end
          end
          S_WAIT_BUSY:  if (!ready_s) state <= S_WAIT_READY;
          default:      state <= S_IDLE;
        endcase
      end
    end
  end

  assign ext_en = (state == S_ARMED) && (mode == MODE_NORMAL);
  assign veto   = (state != S_ARMED);
endmodule
