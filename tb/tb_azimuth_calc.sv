// tb_azimuth_calc: builds the six calculator peaks for known pair delays
// (random, and those of sources at every 15 degrees around the array) and
// checks the recovered delays and the azimuth against a floating-point
// reference; for the geometric sources the azimuth must also be within
// 5 degrees of the true direction. done must come ITER+2 = 16 cycles after
// start.
module tb_azimuth_calc;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start, done;
  corr_peak_t [5:0] peaks;
  azimuth_t         azimuth;
  logic signed [LAG_W-1:0] d12, d13, d23;
  int checks = 0, failures = 0;

  azimuth_calc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // peaks of the forward (i&j) and reverse (j&i) calculators for delay d
  task automatic set_pair(int fwd, int rev, int d);
    longint greater, lesser;
    greater   = 64'(1000000 + $urandom % 100000);
    lesser = greater - 1 - longint'($urandom % 900000);
    if (d > 0) begin
      peaks[fwd].lag = LAG_W'(d);                 peaks[fwd].peak = ACC_W'(greater);
      peaks[rev].lag = LAG_W'($urandom % (ND+1)); peaks[rev].peak = ACC_W'(lesser);
    end else if (d < 0) begin
      peaks[fwd].lag = LAG_W'($urandom % (ND+1)); peaks[fwd].peak = ACC_W'(lesser);
      peaks[rev].lag = LAG_W'(-d);                peaks[rev].peak = ACC_W'(greater);
    end else begin                                // lag 0 is seen by both, equal
      peaks[fwd].lag = '0; peaks[fwd].peak = ACC_W'(greater);
      peaks[rev].lag = '0; peaks[rev].peak = ACC_W'(greater);
    end
  endtask

  task automatic one(int a12, int a13, int a23, real truth, logic use_truth);
    real ref_a; int lat;
    @(negedge clk);
    set_pair(0, 2, a12); set_pair(1, 4, a13); set_pair(3, 5, a23);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    ref_a = ref_azimuth(a12, a13, a23);
    checks++;
    if (lat != 16) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (d12 != a12 || d13 != a13 || d23 != a23) begin
      failures++;
      $display("delays %0d %0d %0d expected %0d %0d %0d", d12, d13, d23, a12, a13, a23);
    end
    checks++;
    if (ang_diff(real'(azimuth), ref_a) > 1.0) begin
      failures++;
      $display("delays %0d %0d %0d: azimuth %0d expected %f", a12, a13, a23, azimuth, ref_a);
    end
    if (use_truth) begin
      checks++;
      if (ang_diff(real'(azimuth), truth) > 5.0) begin
        failures++;
        $display("source %f: azimuth %0d", truth, azimuth);
      end
    end
  endtask

  initial begin
    start = 0; peaks = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int deg = -180; deg < 180; deg += 15) begin
      int t0, t1, t2;
      t0 = mic_delay(real'(deg), 0, 14.0);
      t1 = mic_delay(real'(deg), 1, 14.0);
      t2 = mic_delay(real'(deg), 2, 14.0);
      one(t0 - t1, t0 - t2, t1 - t2, real'(deg), 1'b1);
    end
    for (int i = 0; i < 500; i++) begin
      int a, b;
      a = int'($urandom % 53) - 26;
      b = int'($urandom % 53) - 26;
      if (a - b > 26 || a - b < -26) continue;
      one(a, b, b - a, 0.0, 1'b0);
    end
    one(0, 0, 0, 0.0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
