// sl_controller: frame sequencer of the sound localization chip.
//
// It follows the published processing flow for every window the data buffer
// announces (frame_ready):
//   1. ENERGY   - read the window once; the three energy calculators sum it.
//   2. COMPARE  - the energy comparator checks the largest energy against
//                 the threshold. Below it, the frame is skipped and the chip
//                 waits for the next window.
//   3. XCORR    - read the same window again; the six correlation
//                 calculators accumulate all lags and find their peaks.
//   4. AZIMUTH  - the azimuth module combines the peaks with CORDIC.
// result_valid pulses when the azimuth is ready.
//
// A window announced while a frame is in progress is remembered (one deep)
// and started as soon as the controller is idle; if yet another window is
// announced before that, the older pending one is dropped and counted.
// Status counters (wrapping) report localized, skipped (quiet) and dropped
// windows. The pending/drop policy and the counters are this design's own.
module sl_controller (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_ready,
  // data buffer read control
  output logic        rd_start,
  output logic        rd_same,
  input  logic        rd_last,
  // datapath phases
  output logic        en_phase,      // read stream belongs to the energy pass
  output logic        xc_phase,      // read stream belongs to the correlation pass
  input  logic        energy_done,
  output logic        cmp_start,
  input  logic        cmp_valid,
  input  logic        detected,
  input  logic        corr_done,
  output logic        az_start,
  input  logic        az_done,
  // results and status
  output logic        result_valid,
  output logic        busy,
  output logic [15:0] cnt_localized,
  output logic [15:0] cnt_skipped,
  output logic [15:0] cnt_dropped
);

  typedef enum logic [2:0] {
    S_IDLE, S_ENERGY, S_COMPARE, S_XCORR, S_AZIMUTH
  } state_t;

  state_t state;
  logic   pending;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pending       <= 1'b0;
      rd_start      <= 1'b0;
      rd_same       <= 1'b0;
      en_phase      <= 1'b0;
      xc_phase      <= 1'b0;
      cmp_start     <= 1'b0;
      az_start      <= 1'b0;
      result_valid  <= 1'b0;
      cnt_localized <= '0;
      cnt_skipped   <= '0;
      cnt_dropped   <= '0;
    end else begin
      rd_start     <= 1'b0;
      cmp_start    <= 1'b0;
      az_start     <= 1'b0;
      result_valid <= 1'b0;

      // remember a window that arrives while busy
      if (frame_ready && (state != S_IDLE)) begin
        if (pending) cnt_dropped <= cnt_dropped + 1'b1;
        pending <= 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (frame_ready || pending) begin
            pending  <= 1'b0;
            rd_start <= 1'b1;
            rd_same  <= 1'b0;
            en_phase <= 1'b1;
            state    <= S_ENERGY;
          end
        end
        S_ENERGY: begin
          if (rd_last) en_phase <= 1'b0;
          if (energy_done) begin
            cmp_start <= 1'b1;
            state     <= S_COMPARE;
          end
        end
        S_COMPARE: begin
          if (cmp_valid) begin
            if (detected) begin
              rd_start <= 1'b1;
              rd_same  <= 1'b1;
              xc_phase <= 1'b1;
              state    <= S_XCORR;
            end else begin
              cnt_skipped <= cnt_skipped + 1'b1;
              state       <= S_IDLE;
            end
          end
        end
        S_XCORR: begin
          if (rd_last) xc_phase <= 1'b0;
          if (corr_done) begin
            az_start <= 1'b1;
            state    <= S_AZIMUTH;
          end
        end
        S_AZIMUTH: begin
          if (az_done) begin
            result_valid  <= 1'b1;
            cnt_localized <= cnt_localized + 1'b1;
            state         <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a read is only started from idle or after the comparison
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_start |-> !$past(rd_start));

endmodule
