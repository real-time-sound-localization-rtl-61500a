// tb_corr_normalizer: random energies (from tiny to full 43-bit range) and
// correlation sums with a chosen coefficient between -1 and +1, plus
// saturating and zero-energy cases. The Q1.15 output must be within 2 LSB
// of C / sqrt(Ex*Ey) computed in floating point, plus the error of an
// integer square root (relative 1/sqrt(Ex*Ey), only visible for tiny
// energies), and done must come 60
// clocks after start.
module tb_corr_normalizer;
  import sl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               start, done;
  acc_t               corr;
  energy_t            energy_x, energy_y;
  logic signed [15:0] coef;
  int checks = 0, failures = 0;

  corr_normalizer dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint unsigned ex, longint unsigned ey, longint c);
    real r, e, tol; int lat;
    @(negedge clk);
    energy_x = EN_W'(ex); energy_y = EN_W'(ey); corr = ACC_W'(c); start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    tol = 2.0;
    if (ex == 0 || ey == 0) e = 0.0;
    else begin
      // the integer square root is exact to one unit: relative error below 1/sqrt(Ex*Ey)
      tol = 2.0 + 32768.0 * 2.0 / ($sqrt(real'(ex)) * $sqrt(real'(ey)));
      r = real'(c) / ($sqrt(real'(ex)) * $sqrt(real'(ey)));
      e = r * 32768.0;
      if (e > 32767.0) e = 32767.0;
      if (e < -32768.0) e = -32768.0;
    end
    checks++;
    if (lat != 60) begin failures++; $display("latency %0d", lat); end
    checks++;
    if (real'(coef) - e > tol || e - real'(coef) > tol) begin
      failures++;
      if (failures < 10) $display("Ex=%0d Ey=%0d C=%0d: coef %0d expected %f", ex, ey, c, coef, e);
    end
  endtask

  initial begin
    start = 0; corr = 0; energy_x = 0; energy_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(1000, 1000, 500);
    one(1000, 1000, -1000);
    one(64'h3FF_FFFF_FFFF, 64'h3FF_FFFF_FFFF, 64'sh3FF_FFFF_FFFF);
    one(0, 12345, 77);
    one(100, 100, 300);                      // saturates
    one(100, 100, -300);
    for (int i = 0; i < 400; i++) begin
      longint unsigned ex, ey;
      real rho, g;
      ex = {$urandom, $urandom} >> (21 + $urandom % 40);
      ey = {$urandom, $urandom} >> (21 + $urandom % 40);
      if (ex == 0) ex = 1;
      if (ey == 0) ey = 1;
      rho = (real'($urandom % 20001) - 10000.0) / 10000.0;
      g = rho * $sqrt(real'(ex)) * $sqrt(real'(ey));
      one(ex, ey, longint'(g));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
