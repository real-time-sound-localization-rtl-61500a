// azimuth_calc: azimuth calculation module.
//
// Inputs are the peaks of the six correlation coefficient calculators, in the
// order MIC 1&2, 1&3, 2&1, 2&3, 3&1, 3&2. For each microphone pair the
// larger of the two ordered peaks decides the sign of the time difference
// of arrival, in samples:
//   d_ij = +lag(i&j) if peak(i&j) >= peak(j&i), else -lag(j&i)
// (d_ij > 0: the sound reaches MIC i later than MIC j).
//
// The microphones sit on a circle at equal spacing: MIC 1 at 0 degrees,
// MIC 2 at +120 and MIC 3 at -120 degrees. For a far source at azimuth theta
// the arrival times are t_m ~ -cos(theta - phi_m), which gives
//   cos(theta) ~ -(d_12 + d_13),   sin(theta) ~ -sqrt(3) * d_23.
// Both are formed in fixed point (scaled by 256; sqrt(3)*256 = 443) and a
// vectoring CORDIC turns them into the azimuth in whole degrees, -180..+180.
// All three pairs are used, which gives the full 360 degree range with
// three microphones.
//
// Timing: start (one cycle) -> vector registered -> CORDIC -> done pulses
// ITER+2 cycles after start, with azimuth and the three delays held until
// the next start. The published design states only that the azimuth is
// found from the correlation results with CORDIC; the microphone numbering
// on the circle and the combination formula are this design's own.
module azimuth_calc
  import sl_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  corr_peak_t [5:0] peaks,     // [0]=1&2 [1]=1&3 [2]=2&1 [3]=2&3 [4]=3&1 [5]=3&2
  output azimuth_t         azimuth,
  output logic signed [LAG_W-1:0] d12,
  output logic signed [LAG_W-1:0] d13,
  output logic signed [LAG_W-1:0] d23,
  output logic             done
);

  localparam int unsigned VW = 16;
  localparam logic signed [VW-1:0] SQRT3_Q8 = 16'sd443;

  function automatic logic signed [LAG_W-1:0] pair_delay(corr_peak_t fwd, corr_peak_t rev);
    if (fwd.peak >= rev.peak) return  signed'(fwd.lag);
    else                      return -signed'(rev.lag);
  endfunction

  logic signed [LAG_W-1:0] d12_c, d13_c, d23_c;
  assign d12_c = pair_delay(peaks[0], peaks[2]);
  assign d13_c = pair_delay(peaks[1], peaks[4]);
  assign d23_c = pair_delay(peaks[3], peaks[5]);

  logic signed [VW-1:0] vx, vy;
  logic                 go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vx  <= '0;
      vy  <= '0;
      go  <= 1'b0;
      d12 <= '0;
      d13 <= '0;
      d23 <= '0;
    end else begin
      go <= start;
      if (start) begin
        d12 <= d12_c;
        d13 <= d13_c;
        d23 <= d23_c;
        vx  <= -((VW'(d12_c) + VW'(d13_c)) <<< 8);
        vy  <= -(SQRT3_Q8 * VW'(d23_c));
      end
    end
  end

  logic signed [17:0] unused_fine;

  cordic_atan2 #(.XW(VW), .ITER(ITER)) u_cordic (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (go),
    .x_in       (vx),
    .y_in       (vy),
    .angle      (azimuth),
    .angle_fine (unused_fine),
    .done       (done)
  );

endmodule
