// cordic_atan2: vectoring-mode CORDIC that returns the angle of the vector
// (x, y) in degrees, in the range -180 .. +180.
//
// A start pulse loads the vector. If x is negative the vector is first
// turned by 180 degrees (both components negated) and the angle register
// starts at +180 or -180, so that the iterations only ever see |angle| < 90.
// Each following clock performs one shift-and-add micro-rotation that drives
// y towards zero and adds or subtracts atan(2^-i) to the angle register.
// After ITER (14) iterations the angle, kept internally in 1/256 degree, is
// rounded to whole degrees; done pulses ITER+1 cycles after start. The
// null vector (0, 0) gives angle 0.
//
// The published design names CORDIC for the azimuth but gives no detail:
// the iteration count, the angle unit and the quadrant pre-rotation are
// this design's choices. The arctangent table is atan(2^-i) * 256 / (pi/180)
// rounded to the nearest integer.
module cordic_atan2
  import sl_pkg::*;
#(
  parameter int unsigned XW   = 16,   // width of the signed input components
  parameter int unsigned ITER = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  output azimuth_t             angle,  // whole degrees
  output logic signed [17:0]   angle_fine, // 1/256 degree
  output logic                 done
);

  localparam int unsigned GUARD = 8;
  localparam int unsigned W     = XW + 2 + GUARD;
  localparam int unsigned IW    = $clog2(ITER + 1);

  // atan(2^-i) in 1/256 degree, i = 0..15
  localparam logic signed [17:0] ATAN_TAB [16] = '{
    18'sd11520, 18'sd6801, 18'sd3593, 18'sd1824, 18'sd916, 18'sd458, 18'sd229,
    18'sd115,   18'sd57,   18'sd29,   18'sd14,   18'sd7,   18'sd4,   18'sd2,
    18'sd1,     18'sd0
  };

  logic signed [W-1:0]  xr, yr;
  logic signed [17:0]   zr;
  logic [IW-1:0]        it;
  logic                 busy;
  logic                 zero;      // the null vector has no angle: report 0

  logic signed [W-1:0]  x_ext, y_ext;
  assign x_ext = W'(x_in) <<< GUARD;
  assign y_ext = W'(y_in) <<< GUARD;

  // rounding of 1/256 degree to whole degrees, half away from zero
  logic signed [17:0] z_round;
  always_comb begin
    if (zr >= 0) z_round = (zr + 18'sd128) >>> 8;
    else         z_round = -((-zr + 18'sd128) >>> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr         <= '0;
      yr         <= '0;
      zr         <= '0;
      it         <= '0;
      busy       <= 1'b0;
      zero       <= 1'b0;
      done       <= 1'b0;
      angle      <= '0;
      angle_fine <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        zero <= (x_in == 0) && (y_in == 0);
        if (x_in < 0) begin
          xr <= -x_ext;
          yr <= -y_ext;
          zr <= (y_in >= 0) ? 18'sd46080 : -18'sd46080;
        end else begin
          xr <= x_ext;
          yr <= y_ext;
          zr <= '0;
        end
      end else if (busy) begin
        if (it == IW'(ITER)) begin
          busy       <= 1'b0;
          done       <= 1'b1;
          angle      <= zero ? '0 : AZ_W'(z_round);
          angle_fine <= zero ? '0 : zr;
        end else begin
          if (yr >= 0) begin
            xr <= xr + (yr >>> it);
            yr <= yr - (xr >>> it);
            zr <= zr + ATAN_TAB[it];
          end else begin
            xr <= xr - (yr >>> it);
            yr <= yr + (xr >>> it);
            zr <= zr - ATAN_TAB[it];
          end
          it <= it + 1'b1;
        end
      end
    end
  end

  initial assert (ITER <= 16) else $error("ITER exceeds the arctangent table");

endmodule
