// uart_controller: sends each azimuth to the PC over an RS-232 style UART.
//
// On az_valid the azimuth (signed whole degrees) is turned into six ASCII
// characters, sign, three digits, CR, LF (for example "-045\r\n"), which
// are sent in order through uart_tx. An azimuth that arrives while a message
// is still going out is dropped and counted in dropped (wrapping); at
// 115200 baud a message takes about 0.52 ms, far less than the 10 ms between
// results.
//
// The published system only states that the azimuth goes to the PC through
// the UART; the text format and baud rate are this design's choices.
module uart_controller
  import sl_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 109
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       az_valid,
  input  azimuth_t   azimuth,
  output logic       txd,
  output logic       busy,
  output logic [7:0] dropped
);

  logic [5:0][7:0] msg;
  logic [2:0]      idx;
  logic            sending;
  logic            tx_valid, tx_ready;

  // decimal digits of |azimuth| (0..180)
  logic [8:0] mag;
  logic [7:0] hund, tens, ones;
  always_comb begin
    mag  = azimuth[AZ_W-1] ? 9'(-azimuth) : 9'(azimuth);
    hund = 8'(mag / 100);
    tens = 8'((mag / 10) % 10);
    ones = 8'(mag % 10);
  end

  assign busy     = sending || !tx_ready;
  assign tx_valid = sending && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg     <= '0;
      idx     <= '0;
      sending <= 1'b0;
      dropped <= '0;
    end else begin
      if (az_valid) begin
        if (sending) begin
          dropped <= dropped + 1'b1;
        end else begin
          msg[0]  <= azimuth[AZ_W-1] ? 8'h2D : 8'h2B;   // '-' or '+'
          msg[1]  <= 8'h30 + hund;
          msg[2]  <= 8'h30 + tens;
          msg[3]  <= 8'h30 + ones;
          msg[4]  <= 8'h0D;
          msg[5]  <= 8'h0A;
          idx     <= '0;
          sending <= 1'b1;
        end
      end else if (tx_valid) begin
        if (idx == 3'd5) sending <= 1'b0;
        idx <= idx + 1'b1;
      end
    end
  end

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n,
    .tx_valid,
    .tx_byte  (msg[idx]),
    .tx_ready,
    .txd
  );

endmodule
