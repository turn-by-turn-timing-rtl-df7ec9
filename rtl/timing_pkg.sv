// timing_pkg: shared constants and types of the damping-ring BPM timing system.
//
// The numbers that come from the system being modelled are the RF harmonic
// number (230 buckets per turn, so the revolution fiducial is RF/230), the
// 32-bit counters of the divider and delay units, the 32 channels of a delay
// unit and the four BPM stations. The register maps and the start trigger
// mode encoding are choices of this design.
package timing_pkg;

  // RF buckets per damping-ring turn; default division ratio of the divider.
  localparam int unsigned HARMONIC     = 230;
  // Counter width of the divider, its delay and every delay channel.
  localparam int unsigned COUNTER_W    = 32;
  // Delay channels per station unit.
  localparam int unsigned CHANNELS     = 32;
  // BPM stations around the ring.
  localparam int unsigned STATIONS     = 4;
  // Width of the output pulse width registers (in clock cycles).
  localparam int unsigned PULSE_W      = 16;
  // Width of the fine delay code sent to the programmable delay chip.
  localparam int unsigned FINE_W       = 10;

  // Start trigger operation modes.
  typedef enum logic [1:0] {
    MODE_NORMAL  = 2'd0,  // start follows the injection timing
    MODE_STORAGE = 2'd1,  // start follows an internal periodic timer
    MODE_MANUAL  = 2'd2   // start follows a software command
  } trig_mode_e;

  // Register map of the frequency divider unit (word addresses).
  typedef enum logic [2:0] {
    DIV_REG_RATIO = 3'd0,  // division ratio
    DIV_REG_DELAY = 3'd1,  // RF clocks from sync edge to divider restart
    DIV_REG_CTRL  = 3'd2,  // bit 0: external synchronization enable
    DIV_REG_FINE  = 3'd3,  // fine delay code for the programmable delay chip
    DIV_REG_NSYNC = 3'd4   // read only: number of resynchronizations seen
  } div_reg_e;

endpackage
