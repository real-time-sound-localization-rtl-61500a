// spi_master: writes the codec's operation settings over SPI.
//
// After reset (or on a start pulse) it sends N_WORDS control words of WORD_W
// bits, taken in order from cfg_words, MSB first. For each word the latch
// line clatch goes low, WORD_W clock pulses are sent on cclk, and clatch goes
// high again for one bit time before the next word. cdata changes while cclk
// is low and is stable on the rising edge, where the codec samples it. One
// cclk period is 2*CLK_DIV system clocks. cfg_done goes high once all words
// are sent and stays high until the next start.
//
// The published system uses SPI to configure the codec but does not list the
// register values; they are therefore a port of this block, to be filled in
// for the codec in use. Word length, pin polarity and clock rate are this
// design's choices.
module spi_master #(
  parameter int unsigned N_WORDS = 4,
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned CLK_DIV = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [N_WORDS-1:0][WORD_W-1:0] cfg_words,
  output logic                           cclk,
  output logic                           clatch,
  output logic                           cdata,
  output logic                           cfg_done
);

  localparam int unsigned DW = $clog2(CLK_DIV + 1);
  localparam int unsigned BW = $clog2(WORD_W + 1);
  localparam int unsigned NW = $clog2(N_WORDS + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_GAP} state_t;
  state_t        state;
  logic [DW-1:0] div;
  logic [BW-1:0] bit_i;
  logic [NW-1:0] word_i;
  logic          pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      div      <= '0;
      bit_i    <= '0;
      word_i   <= '0;
      cclk     <= 1'b0;
      clatch   <= 1'b1;
      cdata    <= 1'b0;
      cfg_done <= 1'b0;
      pending  <= 1'b1;                  // configure once after reset
    end else begin
      if (start) pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (pending || start) begin
            pending  <= 1'b0;
            cfg_done <= 1'b0;
            word_i   <= '0;
            bit_i    <= '0;
            div      <= '0;
            clatch   <= 1'b0;
            cdata    <= cfg_words[0][WORD_W-1];
            state    <= S_LOW;
          end
        end
        S_LOW: begin                     // cclk low, data set up
          if (div == DW'(CLK_DIV - 1)) begin
            div   <= '0;
            cclk  <= 1'b1;
            state <= S_HIGH;
          end else div <= div + 1'b1;
        end
        S_HIGH: begin                    // cclk high, codec samples
          if (div == DW'(CLK_DIV - 1)) begin
            div  <= '0;
            cclk <= 1'b0;
            if (bit_i == BW'(WORD_W - 1)) begin
              clatch <= 1'b1;
              state  <= S_GAP;
            end else begin
              bit_i <= bit_i + 1'b1;
              cdata <= cfg_words[word_i][WORD_W-2-32'(bit_i)];
              state <= S_LOW;
            end
          end else div <= div + 1'b1;
        end
        S_GAP: begin                     // latch high between words
          if (div == DW'(2*CLK_DIV - 1)) begin
            div <= '0;
            if (word_i == NW'(N_WORDS - 1)) begin
              cfg_done <= 1'b1;
              state    <= S_IDLE;
            end else begin
              word_i <= word_i + 1'b1;
              bit_i  <= '0;
              clatch <= 1'b0;
              cdata  <= cfg_words[word_i + 1'b1][WORD_W-1];
              state  <= S_LOW;
            end
          end else div <= div + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
