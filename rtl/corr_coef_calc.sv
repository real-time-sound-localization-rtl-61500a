// corr_coef_calc: correlation coefficient calculator for one ordered
// microphone pair (x = MIC i, y = MIC j).
//
// It computes the numerator of the published correlation coefficient,
//   C(k) = sum_{n=ND}^{WINDOW-1} x(n) * y(n-k),   k = 0 .. ND,
// for all ND+1 = 27 lags at once. The y samples pass through a delay line of
// ND registers (the "delayed sound data storage" step), so while sample n
// streams in, tap k holds y(n-k); the first ND samples only fill the delay
// line. Each lag has its own multiplier and accumulator, so the whole window
// takes one pass of WINDOW cycles. The calculator for the reverse pair
// (MIC j&i) supplies the negative lags.
//
// After in_last the accumulators are scanned, one lag per clock, for the
// largest sum (lowest lag on a tie); done then pulses with the peak's lag
// and value, ND+2 cycles after the last sample. The normalizing denominator
// of the coefficient does not depend on k here (both energies are taken over
// the same fixed 3174 samples), and the two calculators of a pair share it,
// so the peak of the raw sum is the peak of the coefficient.
//
// The ordered-pair split into six calculators follows the published block
// diagram; the parallel-lag structure and the serial peak scan are this
// design's reading of it.
module corr_coef_calc
  import sl_pkg::*;
#(
  parameter int unsigned MAX_LAG = ND,
  parameter int unsigned IW      = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [IW-1:0] in_idx,
  input  sample_t       x_in,
  input  sample_t       y_in,
  output corr_peak_t    result,
  output logic          done
);

  localparam int unsigned NL = MAX_LAG + 1;
  localparam int unsigned KW = $clog2(NL + 1);

  sample_t dly [MAX_LAG];                  // dly[k-1] = y(n-k) while sample n arrives
  sample_t tap [NL];
  acc_t    acc [NL];

  logic          scanning;
  logic [KW-1:0] scan_k;
  acc_t          best;
  logic [KW-1:0] best_k;

  always_comb begin
    tap[0] = y_in;
    for (int k = 1; k < NL; k++) tap[k] = dly[k-1];
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dly[0] <= y_in;
      for (int k = 1; k < MAX_LAG; k++) dly[k] <= dly[k-1];
    end
  end

  for (genvar k = 0; k < NL; k++) begin : g_lag
    acc_t prod;
    assign prod = ACC_W'(x_in) * ACC_W'(tap[k]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        acc[k] <= '0;
      end else if (in_valid) begin
        if (in_idx >= IW'(MAX_LAG)) acc[k] <= (in_first ? '0 : acc[k]) + prod;
        else if (in_first)          acc[k] <= '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      scan_k   <= '0;
      best     <= '0;
      best_k   <= '0;
      result   <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid && in_last) begin
        scanning <= 1'b1;
        scan_k   <= '0;
      end else if (scanning) begin
        if (scan_k == '0 || acc[scan_k] > best) begin
          best   <= acc[scan_k];
          best_k <= scan_k;
        end
        if (scan_k == KW'(MAX_LAG)) begin
          scanning <= 1'b0;
        end else begin
          scan_k <= scan_k + 1'b1;
        end
      end else if (scan_k == KW'(MAX_LAG)) begin
        // one cycle after the last comparison: publish
        result.lag  <= LAG_W'(best_k);
        result.peak <= best;
        done        <= 1'b1;
        scan_k      <= '0;
      end
    end
  end

  initial assert (MAX_LAG < 2**(LAG_W-1)) else $error("lag does not fit LAG_W");

endmodule
