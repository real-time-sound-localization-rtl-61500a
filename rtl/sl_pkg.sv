// sl_pkg: constants and types shared by the sound localization chip and the
// system around it.
//
// The sizes follow the published chip: three microphones, 16-bit samples, a
// 3200-sample analysis window that slides by 10 ms (160 samples at 16 kHz),
// a maximum lag of ND = 26 samples, and a 4096-word (12 address bits) sample
// memory per channel. Accumulator widths are this design's own choice: they
// are sized so that a sum of 3174 full-scale products cannot overflow.
package sl_pkg;

  localparam int unsigned NUM_MICS  = 3;
  localparam int unsigned SAMPLE_W  = 16;    // bits per sound sample
  localparam int unsigned ADDR_W    = 12;    // SRAM address bits (A12)
  localparam int unsigned WINDOW    = 3200;  // samples per analysis window
  localparam int unsigned HOP       = 160;   // samples between windows (10 ms at 16 kHz)
  localparam int unsigned ND        = 26;    // maximum lag in samples
  localparam int unsigned ACC_W     = 44;    // signed correlation sum: 31 product bits + 12 count bits + sign
  localparam int unsigned EN_W      = 43;    // unsigned energy sum: 30 square bits + 12 count bits + 1
  localparam int unsigned LAG_W     = 6;     // signed lag -26..+26
  localparam int unsigned AZ_W      = 9;     // signed azimuth in degrees -180..+180

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic        [EN_W-1:0]     energy_t;
  typedef logic signed [AZ_W-1:0]     azimuth_t;

  // One sample of every microphone, read in the same cycle.
  typedef sample_t [NUM_MICS-1:0] mic_samples_t;

  // Result of one correlation coefficient calculator: lag of the peak and
  // the correlation sum at that lag.
  typedef struct packed {
    logic [LAG_W-1:0] lag;   // 0..ND, unsigned
    acc_t             peak;
  } corr_peak_t;

endpackage
