// dr_bpm_timing: timing system of the damping-ring beam position monitors.
//
// Turn-by-turn position detectors sample the beam once per turn and need two
// timings: a clock (fiducial) locked to the bucket that holds the beam, and a
// start trigger that begins an acquisition at a fixed time after injection.
// This top joins the three parts that provide them:
//   - start trigger: a sequencer (start_trigger_seq) arms a single-shot
//     delayed trigger generator (trigger_delay) when every station reports
//     ready; the start pulse goes to all NUM_STATIONS stations.
//   - master divider (ski16115): divides the 509 MHz RF clock by 230 (one
//     ring turn) and restarts its phase a programmable delay after every
//     injection, giving the master fiducial.
//   - one 32-channel delay unit (ski17029) per station: each channel re-times
//     the master fiducial by its own number of RF clocks for one detector.
// Parts outside the logic are ports: the RF comparator output is `rf_clk`,
// the fine analog delay chip receives `ep195_code` and returns `ffclk_master`,
// the event system supplies `dr_injection`, and the control computer drives
// the register buses and the start trigger settings.
//
// Two clock domains: `rf_clk` (divider and delay units, assumed to share the
// RF clock) and `trg_clk` (start trigger). `dr_injection` and `bpm_ready`
// are asynchronous and are synchronised where they are used.
module dr_bpm_timing
  import timing_pkg::*;
#(
  parameter int unsigned NUM_STATIONS    = STATIONS,
  parameter int unsigned NUM_CH          = CHANNELS,
  parameter int unsigned CNT_W           = COUNTER_W,
  parameter int unsigned DIV_RATIO_RESET = HARMONIC
) (
  // clocks and resets
  input  logic                               rf_clk,
  input  logic                               rf_rst,
  input  logic                               ffclk_master,
  input  logic                               trg_clk,
  input  logic                               trg_rst,
  // timing from the event system
  input  logic                               dr_injection,
  // start trigger settings and status
  input  logic                               trg_enable,
  input  trig_mode_e                         trg_mode,
  input  logic [CNT_W-1:0]                   trg_delay,
  input  logic [PULSE_W-1:0]                 trg_width,
  input  logic [CNT_W-1:0]                   trg_period,
  input  logic                               trg_manual,
  input  logic [NUM_STATIONS-1:0]            bpm_ready,
  output logic [NUM_STATIONS-1:0]            start_out,
  output logic                               trg_veto,
  output logic [31:0]                        trg_n_starts,
  // master divider register bus and outputs
  input  logic                               div_we,
  input  logic [2:0]                         div_addr,
  input  logic [31:0]                        div_wdata,
  output logic [31:0]                        div_rdata,
  output logic [FINE_W-1:0]                  ep195_code,
  output logic                               fiducial_out,
  // station delay unit register buses and outputs
  input  logic [NUM_STATIONS-1:0]            dly_we,
  input  logic [NUM_STATIONS-1:0][5:0]       dly_addr,
  input  logic [NUM_STATIONS-1:0][31:0]      dly_wdata,
  output logic [NUM_STATIONS-1:0][31:0]      dly_rdata,
  output logic [NUM_STATIONS-1:0][NUM_CH-1:0] station_fiducial
);
  // ---------------- start trigger ----------------
  logic arm, disarm, ext_en, sw_trig, fired, armed;

  start_trigger_seq #(.CNT_W(CNT_W)) u_seq (
    .clk        (trg_clk),
    .rst        (trg_rst),
    .enable     (trg_enable),
    .mode       (trg_mode),
    .ready      (&bpm_ready),
    .manual_trig(trg_manual),
    .period     (trg_period),
    .fired      (fired),
    .arm        (arm),
    .disarm     (disarm),
    .ext_en     (ext_en),
    .sw_trig    (sw_trig),
    .veto       (trg_veto),
    .n_starts   (trg_n_starts)
  );

  trigger_delay #(.NUM_OUT(NUM_STATIONS), .CNT_W(CNT_W), .WID_W(PULSE_W)) u_trg (
    .clk      (trg_clk),
    .rst      (trg_rst),
    .ext_trig (dr_injection),
    .ext_en   (ext_en),
    .sw_trig  (sw_trig),
    .arm      (arm),
    .disarm   (disarm),
    .delay    (trg_delay),
    .width    (trg_width),
    .armed    (armed),
    .fired    (fired),
    .start_out(start_out)
  );

  // ---------------- master frequency divider ----------------
  logic div_out;

  ski16115 #(.CNT_W(CNT_W), .EP_W(FINE_W), .DIV_RATIO_RESET(DIV_RATIO_RESET)) u_div (
    .clk         (rf_clk),
    .rst         (rf_rst),
    .ffclk       (ffclk_master),
    .sync_in     (dr_injection),
    .we          (div_we),
    .addr        (div_addr),
    .wdata       (div_wdata),
    .rdata       (div_rdata),
    .fine_code   (ep195_code),
    .div_out     (div_out),
    .fiducial_out(fiducial_out)
  );

  // ---------------- per-station 32-channel delays ----------------
  for (genvar s = 0; s < NUM_STATIONS; s++) begin : g_station
    ski17029 #(.NUM_CH(NUM_CH), .CNT_W(CNT_W)) u_dly (
      .clk    (rf_clk),
      .rst    (rf_rst),
      .fid_in (fiducial_out),
      .we     (dly_we[s]),
      .addr   (dly_addr[s]),
      .wdata  (dly_wdata[s]),
      .rdata  (dly_rdata[s]),
      .fid_out(station_fiducial[s])
    );
  end
endmodule
