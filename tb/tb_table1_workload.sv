// tb_table1_workload: the chip at full size repeats the published accuracy
// experiment in simulation: a source at 0, +45, +90, +135, 180, -45, -90 and
// -135 degrees, ten azimuth measurements per position, a measurement being
// a success when it is within 5 degrees of the true direction.
//
// The recorded test word cannot be reproduced, so the source is a voiced,
// speech-like signal: eight harmonics of a 160 Hz pitch with fixed random
// phases and a syllable-rate envelope, plus a little noise, with full 16-bit
// swing. The delays to the microphones are exact, not rounded to whole
// samples (the harmonics are evaluated at fractional times), so the chip's
// whole-sample delay estimate adds a realistic quantization error. Each
// microphone adds its own independent noise about 27 dB below
// the signal. The microphones sit on a circle of radius 14 samples (about
// 0.3 m at 16 kHz), so pair delays reach +-24 of the 26 lags searched.
// The room is modelled by two image sources, as from two walls: a reflection
// arriving from the opposite direction, 60 samples (1.3 m) later at 0.35 of
// the direct amplitude, and one from 90 degrees aside, 97 samples later at
// 0.25. Each reflection reaches the three microphones with the delays of
// its own direction. A real room has many more, weaker reflections.
//
// Checked: per position and in total at least 90% of the measurements
// succeed (the published total was 92.5%), and every measurement arrives
// within 8 ms of its window. The table of measured angles is printed.
module tb_table1_workload;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  localparam int SP = 48;
  localparam real RADIUS = 14.0;
  localparam int NPOS = 8, NMEAS = 10;
  logic clk = 0, rst_n = 0;
  always #40 clk = ~clk;

  logic         smp_valid, az_valid, busy;
  mic_samples_t smp_in;
  energy_t      threshold, max_energy;
  logic [1:0]   max_mic;
  azimuth_t     azimuth;
  logic signed [LAG_W-1:0] d12, d13, d23;
  logic signed [2:0][15:0] coef;
  logic [15:0]  cnt_localized, cnt_skipped, cnt_dropped;
  int checks = 0, failures = 0;

  sound_loc_chip dut (.*);

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real phase [8];
  // source value at a real-valued sample time n (fractional delays)
  function automatic real speech(real n);
    real t, v, env;
    t = n / 16000.0;
    v = 0.0;
    for (int h = 1; h <= 8; h++) v += $sin(2.0 * PI * 160.0 * h * t + phase[h-1]) / real'(h);
    env = 0.55 + 0.45 * $sin(2.0 * PI * 4.0 * t);
    return env * (v * 9000.0 + real'(noise(int'($floor(n + 0.5)), 21, 4)));
  endfunction

  real  tdel [3], edel1 [3], edel2 [3];
  localparam real ECHO1 = 0.35, ECHO2 = 0.25;
  int   n_smp = 0, scene_start = 0;
  logic collect = 0;
  int   meas [NPOS][NMEAS];
  int   n_meas = 0;
  int   cyc = 0, ready_cyc = 0, ready_smp = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && dut.u_buf.frame_ready) begin ready_cyc = cyc; ready_smp = n_smp; end

  int pos_i = 0;
  always @(posedge clk) if (rst_n && az_valid && collect && ready_smp - WINDOW >= scene_start && n_meas < NMEAS) begin
    checks++;
    if (cyc - ready_cyc > 100000) begin failures++; $display("late result"); end
    meas[pos_i][n_meas] = azimuth;
    n_meas++;
  end

  task automatic feed_one();
    @(negedge clk);
    smp_valid = 1;
    for (int m = 0; m < NUM_MICS; m++) begin
      real v;
      v = speech(real'(n_smp) - tdel[m]) + ECHO1 * speech(real'(n_smp) - edel1[m])
        + ECHO2 * speech(real'(n_smp) - edel2[m]) + real'(noise(n_smp, 100 + m, 8));
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      smp_in[m] = sample_t'(int'(v));
    end
    @(negedge clk);
    smp_valid = 0;
    n_smp++;
    repeat (SP - 2) @(negedge clk);
  endtask

  initial begin
    real pos [NPOS] = '{0.0, 45.0, 90.0, 135.0, 180.0, -45.0, -90.0, -135.0};
    int total_ok = 0;
    foreach (phase[h]) phase[h] = real'($urandom % 6283) / 1000.0;
    smp_valid = 0; smp_in = '0;
    threshold = EN_W'(64'd1_000_000_000);
    tdel = '{40.0, 40.0, 40.0};
    edel1 = tdel; edel2 = tdel;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPOS; p++) begin
      int ok;
      string line;
      ok = 0;
      for (int m = 0; m < NUM_MICS; m++) begin
        real mang;
        mang = (m == 0) ? 0.0 : (m == 1) ? 120.0 : -120.0;
        tdel[m]  = 40.0 - RADIUS * $cos((pos[p] - mang) * PI / 180.0);
        edel1[m] = 100.0 - RADIUS * $cos((pos[p] + 180.0 - mang) * PI / 180.0);
        edel2[m] = 137.0 - RADIUS * $cos((pos[p] + 90.0 - mang) * PI / 180.0);
      end
      pos_i = p; n_meas = 0; scene_start = n_smp; collect = 1;
      while (n_meas < NMEAS) feed_one();
      collect = 0;
      line = $sformatf("%7.1f deg:", pos[p]);
      for (int i = 0; i < NMEAS; i++) begin
        line = {line, $sformatf(" %4d", meas[p][i])};
        if (ang_diff(real'(meas[p][i]), pos[p]) <= 5.0) ok++;
      end
      $display("%s   success %0d%%", line, ok * 100 / NMEAS);
      checks++;
      if (ok * 10 < NMEAS * 9) begin failures++; $display("position %f below 90%%", pos[p]); end
      total_ok += ok;
    end
    $display("total success %0d of %0d", total_ok, NPOS * NMEAS);
    checks++;
    if (total_ok * 10 < NPOS * NMEAS * 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
