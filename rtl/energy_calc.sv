// energy_calc: short-term energy of one microphone channel.
//
// The window is streamed in one sample per clock (in_valid, with the sample's
// index in the window on in_idx). Samples with index >= SKIP (ND = 26) are
// squared and summed, so the energy covers the WINDOW - ND = 3174 samples
// that the correlation pass multiplies, as in the published design.
// in_first clears the sum; one cycle after the sample flagged in_last has
// been taken, energy holds the result and done pulses.
//
// The square-and-accumulate datapath (one multiplier, one adder) is this
// design's own; the published text gives only the function.
module energy_calc
  import sl_pkg::*;
#(
  parameter int unsigned SKIP = ND,
  parameter int unsigned IW   = ADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  logic [IW-1:0] in_idx,
  input  sample_t       in_sample,
  output energy_t       energy,
  output logic          done
);

  logic [2*SAMPLE_W-1:0] sq;
  assign sq = unsigned'(32'(in_sample * in_sample));

  energy_t acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      energy <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (in_first) acc <= '0;
        if (in_idx >= IW'(SKIP)) begin
          if (in_first) acc <= EN_W'(sq);
          else          acc <= acc + EN_W'(sq);
        end
        if (in_last) begin
          energy <= (in_idx >= IW'(SKIP)) ? acc + EN_W'(sq) : acc;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
