// tb_angle_displayer: every azimuth from -180 to +180 must light exactly
// one LED, the one nearest to the angle taken in 0..359 (LED k at 2k
// degrees), with led_num = k + 1; nothing is lit after reset, and the LED
// stays lit until the next azimuth.
module tb_angle_displayer;
  import sl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         az_valid;
  azimuth_t     azimuth;
  logic [179:0] led;
  logic [7:0]   led_num;
  int checks = 0, failures = 0;

  angle_displayer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    az_valid = 0; azimuth = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (led != '0) begin failures++; $display("LED lit after reset"); end
    for (int a = -180; a <= 180; a++) begin
      int a360, k;
      a360 = (a < 0) ? a + 360 : a;
      k = ((a360 + 1) / 2) % 180;
      @(negedge clk); azimuth = AZ_W'(a); az_valid = 1;
      @(negedge clk); az_valid = 0; azimuth = AZ_W'(a + 37);
      repeat (2) @(negedge clk);
      checks++;
      if ($countones(led) != 1 || !led[k] || led_num != 8'(k + 1)) begin
        failures++;
        if (failures < 10) $display("azimuth %0d: led_num %0d expected %0d", a, led_num, k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
