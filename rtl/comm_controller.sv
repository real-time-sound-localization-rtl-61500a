// comm_controller: the communication controller between the codec board and
// the sound localization chip (an FPGA in the published system).
//
// It has four parts:
//   spi_master      - writes the codec's setting words after reset
//   tdm_rx          - receives the codec's serial TDM stream (bit clock
//                     domain) and separates the three microphone channels
//   uart_controller - sends every azimuth from the chip to the PC as text
//   angle_displayer - lights the LED of the ring nearest to the azimuth
// Each received TDM frame is handed to the system clock domain with a
// toggle that is synchronized through two flip-flops; the channel words
// are stable for a whole frame, so they are captured directly once the
// synchronized toggle changes. The codec delivers 48 kHz frames while the
// chip stores 16 kHz samples: every DECIM-th (3rd) frame is passed on, in
// parallel for the three channels, with smp_valid high for one clock.
// The decimation by plain frame dropping (no filter) is this design's
// reading of the two rates; the CDC scheme is also its own.
module comm_controller
  import sl_pkg::*;
#(
  parameter int unsigned DECIM        = 3,
  parameter int unsigned CLKS_PER_BIT = 109,
  parameter int unsigned N_CFG        = 4,
  parameter int unsigned SPI_DIV      = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // codec TDM port
  input  logic                       bclk,
  input  logic                       tdm_fsync,
  input  logic                       tdm_data,
  // codec SPI port
  input  logic [N_CFG-1:0][15:0]     cfg_words,
  output logic                       spi_cclk,
  output logic                       spi_clatch,
  output logic                       spi_cdata,
  output logic                       cfg_done,
  // to the sound localization chip
  output logic                       smp_valid,
  output mic_samples_t               smp_out,
  // from the sound localization chip
  input  logic                       az_valid,
  input  azimuth_t                   azimuth,
  // to the PC and the LED ring
  output logic                       uart_txd,
  output logic [179:0]               led,
  output logic [7:0]                 led_num,
  output logic [7:0]                 uart_dropped
);

  // ---------------- codec setup ----------------
  spi_master #(.N_WORDS(N_CFG), .WORD_W(16), .CLK_DIV(SPI_DIV)) u_spi (
    .clk, .rst_n,
    .start     (1'b0),
    .cfg_words,
    .cclk      (spi_cclk),
    .clatch    (spi_clatch),
    .cdata     (spi_cdata),
    .cfg_done
  );

  // ---------------- TDM reception ----------------
  mic_samples_t ch_data;
  logic         frame_tgl;

  tdm_rx u_tdm (
    .bclk, .rst_n,
    .fsync     (tdm_fsync),
    .sdata     (tdm_data),
    .ch_data,
    .frame_tgl
  );

  logic [2:0] tgl_sync;
  logic [1:0] dec_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tgl_sync  <= '0;
      dec_cnt   <= '0;
      smp_valid <= 1'b0;
      smp_out   <= '0;
    end else begin
      tgl_sync  <= {tgl_sync[1:0], frame_tgl};
      smp_valid <= 1'b0;
      if (tgl_sync[2] != tgl_sync[1]) begin
        if (dec_cnt == 2'(DECIM - 1)) begin
          dec_cnt   <= '0;
          smp_valid <= 1'b1;
          smp_out   <= ch_data;
        end else begin
          dec_cnt <= dec_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------- azimuth output ----------------
  uart_controller #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n,
    .az_valid, .azimuth,
    .txd     (uart_txd),
    .busy    (),
    .dropped (uart_dropped)
  );

  angle_displayer #(.NUM_LEDS(180)) u_disp (
    .clk, .rst_n,
    .az_valid, .azimuth,
    .led, .led_num
  );

  initial assert (DECIM >= 1 && DECIM <= 4) else $error("DECIM out of range");

endmodule
