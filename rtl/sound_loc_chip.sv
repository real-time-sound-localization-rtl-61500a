// sound_loc_chip: the sound localization chip.
//
// Three microphone channels of 16-bit samples enter in parallel (smp_valid,
// 16 kHz in the system). The chip runs on one clock, the 12.5 MHz processing
// clock, and has four modules:
//   data_buffer       - three circular 4096x16 dual-port SRAMs; a new
//                       3200-sample window every 10 ms
//   energy_calc x3    - short-term energy of each channel over 3174 samples,
//   energy_comparator   then a threshold test on the largest one
//   corr_coef_calc x6 - cross correlation of the ordered pairs 1&2, 1&3,
//                       2&1, 2&3, 3&1, 3&2 for lags 0..26, all in parallel
//   azimuth_calc      - pair delays from the peaks, azimuth by CORDIC
//   corr_normalizer x3 - normalized correlation coefficient of each pair,
//                       C / sqrt(Ex * Ey), reported with the azimuth
// sequenced by sl_controller. A window is read twice from the SRAMs: once
// for the energies and, if the frame is loud enough, once more for the
// correlations. At one sample per clock a frame takes about
// 2 x 3200 + 100 cycles (about 0.52 ms), well inside the 10 ms hop.
//
// Outputs: az_valid pulses with the azimuth (whole degrees, -180..+180,
// 0 = direction of MIC 1, +120 = MIC 2), the three pair delays and their
// normalized correlation coefficients (Q1.15); status
// counters tell how many windows were localized, skipped as too quiet, or
// dropped because the chip was still busy.
module sound_loc_chip
  import sl_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         smp_valid,
  input  mic_samples_t smp_in,
  input  energy_t      threshold,
  output logic         az_valid,
  output azimuth_t     azimuth,
  output logic signed [LAG_W-1:0] d12,
  output logic signed [LAG_W-1:0] d13,
  output logic signed [LAG_W-1:0] d23,
  output logic signed [2:0][15:0] coef,   // Q1.15 coefficients of pairs 1-2, 1-3, 2-3
  output energy_t      max_energy,
  output logic [1:0]   max_mic,
  output logic         busy,
  output logic [15:0]  cnt_localized,
  output logic [15:0]  cnt_skipped,
  output logic [15:0]  cnt_dropped
);

  // ---------------- data buffering ----------------
  logic              frame_ready, rd_start, rd_same, rd_valid, rd_last;
  logic [ADDR_W-1:0] rd_idx;
  mic_samples_t      rd_data;

  data_buffer u_buf (
    .clk, .rst_n, .smp_valid, .smp_in,
    .frame_ready, .rd_start, .rd_same,
    .rd_valid, .rd_idx, .rd_last, .rd_data
  );

  logic en_phase, xc_phase;
  logic en_valid, xc_valid, first;
  assign en_valid = rd_valid && en_phase;
  assign xc_valid = rd_valid && xc_phase;
  assign first    = (rd_idx == '0);

  // ---------------- short-term energy ----------------
  energy_t [NUM_MICS-1:0] energies;
  logic    [NUM_MICS-1:0] en_done;

  for (genvar m = 0; m < NUM_MICS; m++) begin : g_energy
    energy_calc u_energy (
      .clk, .rst_n,
      .in_valid  (en_valid),
      .in_first  (first),
      .in_last   (rd_last),
      .in_idx    (rd_idx),
      .in_sample (rd_data[m]),
      .energy    (energies[m]),
      .done      (en_done[m])
    );
  end

  logic       cmp_start, cmp_valid, detected;


  energy_comparator u_cmp (
    .clk, .rst_n,
    .in_valid   (cmp_start),
    .energies   (energies),
    .threshold  (threshold),
    .out_valid  (cmp_valid),
    .max_energy (max_energy),
    .max_mic    (max_mic),
    .detected   (detected)
  );

  // ---------------- cross correlation ----------------
  // ordered pairs (x, y): 1&2, 1&3, 2&1, 2&3, 3&1, 3&2 (microphones 0-based)
  localparam int unsigned PX [6] = '{0, 0, 1, 1, 2, 2};
  localparam int unsigned PY [6] = '{1, 2, 0, 2, 0, 1};

  corr_peak_t [5:0] peaks;
  logic       [5:0] xc_done;

  for (genvar p = 0; p < 6; p++) begin : g_corr
    corr_coef_calc u_corr (
      .clk, .rst_n,
      .in_valid (xc_valid),
      .in_first (first),
      .in_last  (rd_last),
      .in_idx   (rd_idx),
      .x_in     (rd_data[PX[p]]),
      .y_in     (rd_data[PY[p]]),
      .result   (peaks[p]),
      .done     (xc_done[p])
    );
  end

  // ---------------- azimuth ----------------
  logic az_start, az_done;

  azimuth_calc u_az (
    .clk, .rst_n,
    .start   (az_start),
    .peaks   (peaks),
    .azimuth (azimuth),
    .d12, .d13, .d23,
    .done    (az_done)
  );

  // ---------------- correlation coefficients ----------------
  // For each pair the stronger of its two ordered peaks is normalized by the
  // two channel energies; this runs beside the CORDIC and sets the frame's
  // end time (60 cycles against 16).
  localparam int unsigned NF [3] = '{0, 1, 3};   // forward calculator of pair 1-2, 1-3, 2-3
  localparam int unsigned NR [3] = '{2, 4, 5};   // its reverse calculator
  localparam int unsigned NX [3] = '{0, 0, 1};
  localparam int unsigned NY [3] = '{1, 2, 2};

  logic [2:0] norm_done;
  for (genvar q = 0; q < 3; q++) begin : g_norm
    acc_t win;
    assign win = (peaks[NF[q]].peak >= peaks[NR[q]].peak) ? peaks[NF[q]].peak : peaks[NR[q]].peak;
    corr_normalizer u_norm (
      .clk, .rst_n,
      .start    (az_start),
      .corr     (win),
      .energy_x (energies[NX[q]]),
      .energy_y (energies[NY[q]]),
      .coef     (coef[q]),
      .done     (norm_done[q])
    );
  end

  logic az_seen, calc_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        az_seen <= 1'b0;
    else if (az_start) az_seen <= 1'b0;
    else if (az_done)  az_seen <= 1'b1;
  end
  assign calc_done = norm_done[0] && (az_seen || az_done);

  // ---------------- control ----------------
  sl_controller u_ctrl (
    .clk, .rst_n,
    .frame_ready,
    .rd_start, .rd_same, .rd_last,
    .en_phase, .xc_phase,
    .energy_done  (en_done[0]),
    .cmp_start, .cmp_valid, .detected,
    .corr_done    (xc_done[0]),
    .az_start,
    .az_done      (calc_done),
    .result_valid (az_valid),
    .busy,
    .cnt_localized, .cnt_skipped, .cnt_dropped
  );

endmodule
