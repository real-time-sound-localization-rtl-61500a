// angle_displayer: drives the ring of 180 LEDs placed every 2 degrees.
//
// On az_valid the azimuth (signed whole degrees) is brought into 0..359 and
// rounded to the nearest LED, index = round(angle / 2) mod 180, so LED 0
// sits at 0 degrees and LED k at 2k degrees. Exactly that LED is lit
// (led is one-hot) until the next azimuth; led_num gives its number 1..180.
// Nothing is lit after reset. The LED count and spacing are published; the
// numbering direction and the rounding are this design's choices.
module angle_displayer
  import sl_pkg::*;
#(
  parameter int unsigned NUM_LEDS = 180
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                az_valid,
  input  azimuth_t            azimuth,
  output logic [NUM_LEDS-1:0] led,
  output logic [7:0]          led_num
);

  localparam int unsigned STEP = 360 / NUM_LEDS;

  logic [9:0] a360;
  logic [7:0] idx;
  always_comb begin
    a360 = azimuth[AZ_W-1] ? 10'(10'sd360 + 10'(azimuth)) : 10'(azimuth);
    idx  = 8'(((a360 + 10'(STEP / 2)) / 10'(STEP)) % 10'(NUM_LEDS));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led     <= '0;
      led_num <= '0;
    end else if (az_valid) begin
      led      <= '0;
      led[idx] <= 1'b1;
      led_num  <= idx + 8'd1;
    end
  end

  initial assert (STEP * NUM_LEDS == 360 && NUM_LEDS < 256) else $error("LEDs must divide 360 degrees");

endmodule
