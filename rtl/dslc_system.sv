// dslc_system: the complete sound localization system, top level.
//
// The codec board (three microphones, codec, not part of this RTL) sends its
// samples over TDM to the communication controller, which configures the
// codec over SPI, separates the channels, reduces 48 kHz frames to 16 kHz
// samples and feeds them in parallel to the sound localization chip. The
// chip returns an azimuth every 10 ms while the sound is loud enough; the
// communication controller prints it over the UART and lights the matching
// LED of the 180-LED ring. Both halves run on the 12.5 MHz system clock;
// the TDM receiver runs on the codec's bit clock.
//
// Ports: the codec's TDM and SPI pins, the codec setting words, the energy
// threshold of the chip, the UART line, the LED ring, and the chip's result
// and status signals for observation.
module dslc_system
  import sl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // codec
  input  logic                bclk,
  input  logic                tdm_fsync,
  input  logic                tdm_data,
  input  logic [3:0][15:0]    cfg_words,
  output logic                spi_cclk,
  output logic                spi_clatch,
  output logic                spi_cdata,
  output logic                cfg_done,
  // chip setting
  input  energy_t             threshold,
  // PC and LED ring
  output logic                uart_txd,
  output logic [179:0]        led,
  output logic [7:0]          led_num,
  // observation
  output logic                az_valid,
  output azimuth_t            azimuth,
  output logic signed [LAG_W-1:0] d12,
  output logic signed [LAG_W-1:0] d13,
  output logic signed [LAG_W-1:0] d23,
  output logic signed [2:0][15:0] coef,
  output logic                smp_valid,
  output logic [15:0]         cnt_localized,
  output logic [15:0]         cnt_skipped,
  output logic [15:0]         cnt_dropped,
  output logic [7:0]          uart_dropped
);

  mic_samples_t smp;
  energy_t      max_energy;
  logic         busy;

  comm_controller u_comm (
    .clk, .rst_n,
    .bclk, .tdm_fsync, .tdm_data,
    .cfg_words,
    .spi_cclk, .spi_clatch, .spi_cdata, .cfg_done,
    .smp_valid,
    .smp_out  (smp),
    .az_valid, .azimuth,
    .uart_txd, .led, .led_num, .uart_dropped
  );

  sound_loc_chip u_chip (
    .clk, .rst_n,
    .smp_valid,
    .smp_in   (smp),
    .threshold,
    .az_valid, .azimuth,
    .d12, .d13, .d23,
    .coef,
    .max_energy,
    .max_mic  (),
    .busy,
    .cnt_localized, .cnt_skipped, .cnt_dropped
  );

endmodule
