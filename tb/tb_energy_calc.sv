// tb_energy_calc: streams full 3200-sample windows of random and full-scale
// samples and compares the energy with a sum of squares over samples
// 26..3199 computed here. Also checks that done comes one cycle after the
// last sample.
module tb_energy_calc;
  import sl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid, in_first, in_last, done;
  logic [ADDR_W-1:0]   in_idx;
  sample_t             in_sample;
  energy_t             energy;
  int checks = 0, failures = 0;

  energy_calc dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(int mode);
    longint unsigned expv;
    sample_t s;
    expv = 0;
    for (int n = 0; n < WINDOW; n++) begin
      @(negedge clk);
      case (mode)
        0: s = sample_t'($urandom);
        1: s = -16'sd32768;                         // full scale
        default: s = sample_t'($urandom) >>> 6;     // quiet
      endcase
      in_valid = 1; in_first = (n == 0); in_last = (n == WINDOW - 1);
      in_idx = ADDR_W'(n); in_sample = s;
      if (n >= ND) expv += longint'(s) * longint'(s);
      // a gap cycle now and then: in_valid low must hold the sum
      if (n % 97 == 50) begin
        @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
        in_sample = 16'sh7fff; in_idx = ADDR_W'(n + 1);
        @(negedge clk); in_idx = ADDR_W'(n);
      end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0; in_first = 0;
    checks++;
    if (!done) begin failures++; $display("done not one cycle after last"); end
    checks++;
    if (energy !== EN_W'(expv)) begin
      failures++;
      $display("mode %0d energy %0d expected %0d", mode, energy, expv);
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_idx = 0; in_sample = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) run_window(w % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
