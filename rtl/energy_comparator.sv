// energy_comparator: picks the largest of the three short-term energies and
// compares it with a threshold.
//
// When in_valid is high the three energies are compared; one cycle later
// out_valid pulses with the largest energy, the microphone it belongs to
// (0..2, lowest index on a tie) and `detected`, which is high when that
// energy is strictly greater than the threshold. A frame whose energy is
// not above the threshold is not localized (the chip waits for the next
// window), as in the published design. The threshold is a chip input here;
// its value is not published.
module energy_comparator
  import sl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  energy_t [NUM_MICS-1:0] energies,
  input  energy_t             threshold,
  output logic                out_valid,
  output energy_t             max_energy,
  output logic [1:0]          max_mic,
  output logic                detected
);

  energy_t    best;
  logic [1:0] best_idx;

  always_comb begin
    best     = energies[0];
    best_idx = 2'd0;
    for (int m = 1; m < NUM_MICS; m++) begin
      if (energies[m] > best) begin
        best     = energies[m];
        best_idx = 2'(m);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      max_energy <= '0;
      max_mic    <= '0;
      detected   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        max_energy <= best;
        max_mic    <= best_idx;
        detected   <= best > threshold;
      end
    end
  end

endmodule
