// uart_tx: 8N1 asynchronous serial transmitter.
//
// A byte offered with tx_valid while tx_ready is high is sent as one start
// bit (0), eight data bits LSB first and one stop bit (1), each bit
// CLKS_PER_BIT system clocks long. The line idles high. tx_ready is low from
// the cycle after acceptance until the stop bit has ended.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 109     // 12.5 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_byte,
  output logic       tx_ready,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;      // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    nbits;
  logic [CW-1:0] cnt;

  assign tx_ready = (nbits == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else if (nbits == 4'd0) begin
      txd <= 1'b1;
      if (tx_valid) begin
        frame <= {1'b1, tx_byte, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
        txd   <= 1'b0;
      end
    end else if (cnt == CW'(CLKS_PER_BIT - 1)) begin
      cnt   <= '0;
      nbits <= nbits - 1'b1;
      frame <= {1'b1, frame[9:1]};
      txd   <= (nbits == 4'd1) ? 1'b1 : frame[1];
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
