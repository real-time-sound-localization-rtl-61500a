// tb_dslc_system: end-to-end run of the whole system with every parameter at
// its default, in real time: 12.5 MHz system clock, codec bit clock
// 12.288 MHz giving 48 kHz TDM frames, 16 kHz samples into the chip,
// 3200-sample windows every 10 ms, 115200 baud UART.
//
// The codec model plays white noise arriving at the three microphones with
// the delays of a far source (microphones on a circle of radius 14 samples).
// The sources sit at +135 and -45 degrees, then a quiet stretch follows,
// then a burst of frames at 40 times the normal bit clock. Checked:
//   - the codec setting words are sent over SPI,
//   - every window holding one source gives the true pair delays and an
//     azimuth within 5 degrees of the source (the success criterion of the
//     published measurements),
//   - each result is printed over the UART as text equal to the azimuth and
//     the LED nearest to it is lit,
//   - results come every 10 ms (160 samples),
//   - quiet windows are skipped by the energy threshold,
//   - the burst makes the chip drop windows.
// Each mechanism must be seen at least once.
module tb_dslc_system;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  localparam real RADIUS = 14.0;
  logic clk = 0, bclk = 0, rst_n = 0;
  realtime bhalf = 40.69ns;
  always #40ns clk = ~clk;                  // 12.5 MHz
  always #(bhalf) bclk = ~bclk;             // 12.288 MHz, 256 bits per 48 kHz frame

  logic               tdm_fsync, tdm_data, enable;
  logic [3:0][15:0]   cfg_words;
  logic               spi_cclk, spi_clatch, spi_cdata, cfg_done;
  energy_t            threshold;
  logic               uart_txd, az_valid, smp_valid;
  logic [179:0]       led;
  logic [7:0]         led_num, uart_dropped;
  azimuth_t           azimuth;
  logic signed [LAG_W-1:0] d12, d13, d23;
  logic signed [2:0][15:0] coef;
  logic [15:0]        cnt_localized, cnt_skipped, cnt_dropped;
  mic_samples_t       ch_in;
  int                 frame_no;
  int checks = 0, failures = 0;

  // scene: 16 kHz sample index = frame / 3
  int  tdel [3] = '{40, 40, 40};
  int  amp_shift = 2;
  real truth = 0.0;
  always_comb
    for (int m = 0; m < NUM_MICS; m++) ch_in[m] = noise(frame_no / 3 - tdel[m], 9, amp_shift);

  codec_tdm_model codec (.bclk, .enable, .ch_in, .fsync(tdm_fsync), .sdata(tdm_data), .frame_no);

  dslc_system dut (.*);

  initial begin
    #1200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // SPI words
  logic [15:0] sh; int spi_words = 0, spi_bad = 0;
  always @(posedge spi_cclk) if (!spi_clatch) sh = {sh[14:0], spi_cdata};
  always @(posedge spi_clatch) if (rst_n) begin
    if (sh !== cfg_words[spi_words % 4]) spi_bad++;
    spi_words++;
  end

  // samples into the chip, and the sample count at each scene change
  int n_smp = 0, scene_smp = 0;
  always @(posedge clk) if (rst_n && smp_valid) n_smp++;

  // results
  int   n_pure = 0, n_ok = 0, n_hop = 0, n_led = 0, n_loc = 0;
  realtime last_t = -1.0;
  int   last_az = 0;
  logic pure_scene = 0;
  always @(posedge clk) if (rst_n && az_valid) begin
    n_loc++;
    if (last_t >= 0 && pure_scene && n_smp - scene_smp >= WINDOW + HOP) begin
      realtime dt;
      dt = $realtime - last_t;
      n_hop++;
      check(dt > 9.9ms && dt < 10.1ms, $sformatf("result interval %t", dt));
    end
    last_t = $realtime;
    last_az = azimuth;
    if (pure_scene && n_smp - scene_smp >= WINDOW + 3) begin
      n_pure++;
      check(d12 == tdel[0] - tdel[1] && d13 == tdel[0] - tdel[2] && d23 == tdel[1] - tdel[2],
            $sformatf("delays %0d %0d %0d", d12, d13, d23));
      check(coef[0] > 16'sd31000 && coef[1] > 16'sd31000 && coef[2] > 16'sd31000,
            $sformatf("coefficients %0d %0d %0d", coef[0], coef[1], coef[2]));
      if (ang_diff(real'(azimuth), truth) <= 5.0) n_ok++;
      else $display("source %f measured %0d", truth, azimuth);
    end
  end
  // LED follows the azimuth
  always @(posedge clk) if (rst_n && az_valid) begin
    int a360, az;
    az = int'(azimuth);
    @(posedge clk); @(negedge clk);
    a360 = (az < 0) ? az + 360 : az;
    check(led_num == 8'(((a360 + 1) / 2) % 180 + 1) && $countones(led) == 1,
          $sformatf("LED %0d shows the azimuth %0d", led_num, az));
    n_led++;
  end

  // UART receiver at 115200 baud: every message must match the azimuth
  localparam realtime BIT = 80ns * 109;
  int n_msg = 0, msg_bad = 0;
  initial forever begin
    byte msg [6];
    string s;
    for (int k = 0; k < 6; k++) begin
      logic [7:0] b;
      @(negedge uart_txd);
      #(BIT / 2);
      for (int i = 0; i < 8; i++) begin #(BIT); b[i] = uart_txd; end
      #(BIT);
      msg[k] = b;
    end
    s = $sformatf("%s%03d\r\n", (last_az < 0) ? "-" : "+", (last_az < 0) ? -last_az : last_az);
    for (int k = 0; k < 6; k++) if (msg[k] != s[k]) begin msg_bad++; break; end
    n_msg++;
  end

  task automatic scene(real deg);
    truth = deg;
    for (int m = 0; m < NUM_MICS; m++) tdel[m] = mic_delay(deg, m, RADIUS);
    scene_smp = n_smp;
    pure_scene = 1;
    wait (n_smp >= scene_smp + WINDOW + 2 * HOP + 20);
  endtask

  initial begin
    int skip0;
    enable = 0;
    for (int i = 0; i < 4; i++) cfg_words[i] = 16'($urandom);
    threshold = EN_W'(64'd1_000_000_000);
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    scene(135.0);
    scene(-45.0);
    check(spi_words == 4 && spi_bad == 0 && cfg_done, "codec setting words sent");
    check(n_pure >= 4 && n_ok == n_pure, $sformatf("%0d of %0d windows within 5 degrees", n_ok, n_pure));
    // quiet
    pure_scene = 0;
    skip0 = cnt_skipped;
    amp_shift = 11;
    wait (n_smp >= scene_smp + 2 * WINDOW + 2 * HOP + 20 + 3 * HOP);
    check(cnt_skipped - skip0 >= 3, "quiet windows skipped");
    // burst: a bit clock 40 times faster brings windows faster than they can be processed
    amp_shift = 2;
    bhalf = 1.0ns;
    wait (n_smp >= scene_smp + 3 * WINDOW + 2 * HOP);
    bhalf = 40.69ns;
    #2ms;
    check(cnt_dropped > 0, "windows dropped during the burst");
    check(n_msg > 0 && msg_bad == 0 && n_msg + uart_dropped >= n_loc - 1, $sformatf("UART messages %0d (+%0d dropped) of %0d, %0d wrong", n_msg, uart_dropped, n_loc, msg_bad));
    check(n_hop > 0 && n_led > 0, "hop interval and LED seen");
    $display("samples %0d localized %0d skipped %0d dropped %0d uart %0d pure %0d ok %0d",
             n_smp, cnt_localized, cnt_skipped, cnt_dropped, n_msg, n_pure, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
