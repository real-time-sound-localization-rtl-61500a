// tb_corr_coef_calc: streams 3200-sample windows into one correlation
// calculator and compares its peak lag and value with a full correlation
// C(k) = sum_{n=26}^{3199} x(n) y(n-k), k = 0..26, computed here. Windows
// use y as x delayed by 0..26 samples, y leading x, and unrelated noise.
// The result must arrive ND+2 = 28 cycles after the last sample.
module tb_corr_coef_calc;
  import sl_pkg::*;
  import tb_sound_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              in_valid, in_first, in_last, done;
  logic [ADDR_W-1:0] in_idx;
  sample_t           x_in, y_in;
  corr_peak_t        result;
  int checks = 0, failures = 0;

  corr_coef_calc dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t xs [WINDOW];
  sample_t ys [WINDOW];

  task automatic run_window(int kind, int shift, int seed);
    longint c [ND+1];
    longint best; int best_k; int lat;
    for (int n = 0; n < WINDOW; n++) begin
      xs[n] = noise(n + 1000, seed);
      case (kind)
        0: ys[n] = noise(n + 1000 + shift, seed);   // y leads x by shift: peak at k = shift
        1: ys[n] = noise(n + 1000 - shift, seed);   // y lags x: belongs to the reverse pair
        default: ys[n] = noise(n, seed + 77);
      endcase
    end
    for (int k = 0; k <= ND; k++) begin
      c[k] = 0;
      for (int n = ND; n < WINDOW; n++) c[k] += longint'(xs[n]) * longint'(ys[n-k]);
    end
    best = c[0]; best_k = 0;
    for (int k = 1; k <= ND; k++) if (c[k] > best) begin best = c[k]; best_k = k; end
    for (int n = 0; n < WINDOW; n++) begin
      @(negedge clk);
      in_valid = 1; in_first = (n == 0); in_last = (n == WINDOW - 1);
      in_idx = ADDR_W'(n); x_in = xs[n]; y_in = ys[n];
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    lat = 0;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (lat != ND + 2) begin failures++; $display("latency %0d expected %0d", lat, ND + 2); end
    checks++;
    if (result.lag !== LAG_W'(best_k) || result.peak !== ACC_W'(best)) begin
      failures++;
      $display("kind %0d shift %0d: lag %0d peak %0d, expected lag %0d peak %0d",
               kind, shift, result.lag, result.peak, best_k, best);
    end
    if (kind == 0) begin
      checks++;
      if (best_k != shift) begin failures++; $display("reference peak not at the shift"); end
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_idx = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s <= ND; s += 13) run_window(0, s, s + 3);
    run_window(0, 7, 9);
    run_window(1, 5, 4);
    run_window(2, 0, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
