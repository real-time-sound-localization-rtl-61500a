// tb_cordic_atan2: random vectors in all four quadrants, on the axes and at
// full scale; the angle is compared with a floating-point atan2. The whole
// degree output may be off by one degree from the rounded true angle, the
// 1/256 degree output by at most 0.1 degree. done must come ITER+1 = 15
// cycles after start.
module tb_cordic_atan2;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               start, done;
  logic signed [15:0] x_in, y_in;
  azimuth_t           angle;
  logic signed [17:0] angle_fine;
  int checks = 0, failures = 0;

  cordic_atan2 dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int x, int y);
    real ref_a; int lat;
    @(negedge clk);
    x_in = 16'(x); y_in = 16'(y); start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    ref_a = $atan2(real'(y), real'(x)) * 180.0 / PI;
    checks++;
    if (lat != 15) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (ang_diff(real'(angle), ref_a) > 1.0 || ang_diff(real'(angle_fine) / 256.0, ref_a) > 0.1
        || angle > 180 || angle < -180) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d): got %0d (%f) expected %f", x, y, angle,
                                  real'(angle_fine) / 256.0, ref_a);
    end
  endtask

  initial begin
    start = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(-1000, 1); one(-1000, -1); one(0, 0);
    one(32767, 32767); one(-32768, -32768); one(-32768, 32767); one(3, -5);
    for (int i = 0; i < 3000; i++) begin
      int x, y;
      x = int'(16'sh0 + $signed(16'($urandom))) >>> ($urandom % 10);
      y = int'(16'sh0 + $signed(16'($urandom))) >>> ($urandom % 10);
      if (x == 0 && y == 0) x = 1;
      if ((x * x + y * y) < 64) continue;        // too short for the angle precision
      one(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
