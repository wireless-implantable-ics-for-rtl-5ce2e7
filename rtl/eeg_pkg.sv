// Shared types and constants of the EEG recording designs.
//
// The activity-adaptive channel runs in one of three sampling modes. The
// reference clock (about 32.7 kHz, 256 Hz x 2^7) is used undivided during
// high activity, divided by 8 during moderate activity and divided by 128
// while the signal is idle. The three rates and the 11-bit amplitude word
// follow the design description; the enum encoding is this design's choice.
package eeg_pkg;

  // Width of the reconstructed amplitude, DC level and threshold sums.
  localparam int unsigned AMP_W = 11;
  // Width of the programmable threshold offsets.
  localparam int unsigned VTH_W = 10;

  // Sampling mode of the delta modulator.
  typedef enum logic [1:0] {
    MODE_IDLE = 2'b00,   // reference clock / 128 (256 S/s)
    MODE_MOD  = 2'b01,   // reference clock / 8   (~4 kS/s)
    MODE_HIGH = 2'b11    // reference clock       (~32.7 kS/s)
  } samp_mode_e;

endpackage
