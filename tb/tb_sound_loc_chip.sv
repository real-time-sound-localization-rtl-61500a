// tb_sound_loc_chip: the chip at its full size (3200-sample windows, 160
// sample hop, lags 0..26, 4096-word memories) localizes white-noise sources
// at the eight positions 0, +-45, +-90, +-135, 180 degrees around three
// microphones on a circle of radius 14 samples. A new sample of every
// channel arrives every SP = 48 clocks (faster than the 781 clocks of
// 16 kHz at 12.5 MHz, to keep the run short; the chip only needs a frame
// to end within one hop).
// For every window that holds only one source position it checks:
//   - the three pair delays equal the true integer delays,
//   - the normalized correlation coefficients are close to 1,
//   - the azimuth is within 1 degree of a floating-point evaluation of those
//     delays and within 5 degrees of the true direction,
//   - the result arrives no later than 8 ms (100000 clocks at 12.5 MHz)
//     after the window was complete, and results come exactly one hop apart.
// A quiet stretch must be skipped by the energy threshold, and a burst of
// samples faster than the chip can process must make it drop windows.
module tb_sound_loc_chip;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  localparam int SP = 48;
  localparam real RADIUS = 14.0;
  logic clk = 0, rst_n = 0;
  always #40 clk = ~clk;                 // 12.5 MHz

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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scene state
  int   n_smp = 0;            // samples delivered so far
  int   scene_start = 0;      // sample index where the current scene began
  int   tdel [3];             // arrival delays of the current scene
  real  truth;
  logic check_scene = 0;
  int   amp_shift = 2;
  int   cyc = 0;
  int   ready_cyc = 0, ready_smp = 0;
  int   last_res_cyc = -1;
  int   n_pure = 0, n_success = 0, n_interval = 0, n_wrap = 0;

  always @(posedge clk) cyc++;

  // the window announced last, and its completion time
  always @(posedge clk) if (rst_n && dut.u_buf.frame_ready) begin
    ready_cyc = cyc; ready_smp = n_smp;
  end
  always @(posedge clk) if (rst_n && dut.smp_valid && dut.u_buf.wr_ptr == '1) n_wrap++;

  always @(posedge clk) if (rst_n && az_valid) begin
    int lat;
    lat = cyc - ready_cyc;
    check(lat <= 100000, "result within 8 ms of the window");
    if (last_res_cyc >= 0 && check_scene && ready_smp - HOP >= scene_start + WINDOW) begin
      n_interval++;
      check(cyc - last_res_cyc == HOP * SP, "results one hop apart");
    end
    last_res_cyc = cyc;
    if (check_scene && ready_smp - WINDOW >= scene_start) begin
      real r;
      n_pure++;
      r = ref_azimuth(tdel[0] - tdel[1], tdel[0] - tdel[2], tdel[1] - tdel[2]);
      check(d12 == tdel[0] - tdel[1] && d13 == tdel[0] - tdel[2] && d23 == tdel[1] - tdel[2],
            $sformatf("delays %0d %0d %0d for source %f", d12, d13, d23, truth));
      check(ang_diff(real'(azimuth), r) <= 1.0, $sformatf("azimuth %0d vs %f", azimuth, r));
      // identical delayed copies: every pair coefficient is close to 1
      check(coef[0] > 16'sd31000 && coef[1] > 16'sd31000 && coef[2] > 16'sd31000,
            $sformatf("coefficients %0d %0d %0d", coef[0], coef[1], coef[2]));
      if (ang_diff(real'(azimuth), truth) <= 5.0) n_success++;
      else $display("source %f measured %0d", truth, azimuth);
    end
  end

  task automatic feed(int n, int period);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      smp_valid = 1;
      for (int m = 0; m < NUM_MICS; m++) smp_in[m] = noise(n_smp - tdel[m], 5, amp_shift);
      @(negedge clk);
      smp_valid = 0;
      n_smp++;
      repeat (period - 2) @(negedge clk);
    end
  endtask

  task automatic scene(real deg);
    truth = deg;
    for (int m = 0; m < NUM_MICS; m++) tdel[m] = mic_delay(deg, m, RADIUS);
    scene_start = n_smp;
    check_scene = 1;
    feed(WINDOW + 3 * HOP, SP);
  endtask

  initial begin
    int loc0, skip0;
    smp_valid = 0; smp_in = '0;
    threshold = EN_W'(64'd1_000_000_000);
    tdel = '{40, 40, 40};
    repeat (3) @(posedge clk);
    rst_n = 1;
    scene(0.0);   scene(45.0);  scene(90.0);   scene(135.0);
    scene(180.0); scene(-45.0); scene(-90.0);  scene(-135.0);
    check(n_pure >= 8 * 3 && n_success == n_pure, $sformatf("%0d of %0d windows within 5 degrees", n_success, n_pure));
    // quiet: below the energy threshold
    check_scene = 0;
    amp_shift = 11;
    loc0 = cnt_localized; skip0 = cnt_skipped;
    feed(WINDOW + 3 * HOP, SP);
    check(cnt_skipped - skip0 >= 3, "quiet windows skipped");
    // overrun: samples faster than a frame can be processed
    amp_shift = 2;
    feed(WINDOW, 4);
    repeat (20000) @(negedge clk);
    check(cnt_dropped > 0, "windows dropped when the chip is too slow");
    check(n_interval > 0 && n_wrap > 0, "hop spacing observed and memory wrapped");
    $display("pure windows %0d, within 5 deg %0d, localized %0d, skipped %0d, dropped %0d, wraps %0d",
             n_pure, n_success, cnt_localized, cnt_skipped, cnt_dropped, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
