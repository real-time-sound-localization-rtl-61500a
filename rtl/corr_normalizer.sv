// corr_normalizer: turns a correlation peak into the normalized correlation
// coefficient of the published formula,
//   R = C / ( sqrt(Ex) * sqrt(Ey) ) = C / sqrt(Ex * Ey),
// where C is the peak correlation sum of a microphone pair and Ex, Ey are
// the short-term energies of its two channels over the same 3174 samples.
//
// A start pulse registers the product Ex*Ey (86 bits). A bit-serial integer
// square root then takes one result bit per clock (43 clocks), and a
// restoring divider produces |C| / sqrt(Ex*Ey) with 15 fraction bits (16
// clocks). The result is a signed Q1.15 number; values of magnitude 1 or more
// (possible because the lagged channel's energy is taken over a slightly
// different stretch) saturate to +-32767/32768. If either energy is zero the
// coefficient is 0. done pulses 60 clocks after start. The square root is an
// integer one, so the relative error is below 1/sqrt(Ex*Ey): negligible for
// any window loud enough to pass the energy threshold.
//
// The formula is the published one; the sequential square root and divider
// and the Q1.15 format are this design's own.
module corr_normalizer
  import sl_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  acc_t                corr,       // signed peak correlation sum
  input  energy_t             energy_x,
  input  energy_t             energy_y,
  output logic signed [15:0]  coef,       // Q1.15
  output logic                done
);

  localparam int unsigned PW = 2 * EN_W;        // product width, 86
  localparam int unsigned RW = EN_W;            // square-root width, 43
  localparam int unsigned CW = ACC_W - 1;       // |C| fits 43 bits

  typedef enum logic [1:0] {S_IDLE, S_SQRT, S_DIV, S_OUT} state_t;
  state_t state;

  logic [PW-1:0]   prod;        // remaining radicand
  logic [RW-1:0]   root;
  logic [PW+1:0]   rem_s;       // square-root partial remainder
  logic [5:0]      step;
  logic            neg;
  logic [RW:0]     r_div;       // divider remainder
  logic [16:0]     quo;
  logic [CW-1:0]   mag;

  // one square-root step: bring down two bits, try (4*root + 1)
  logic [PW+1:0] sq_try;
  logic [PW+1:0] sq_rem;
  assign sq_rem = {rem_s[PW-1:0], prod[PW-1 -: 2]};
  assign sq_try = (PW+2)'({root, 2'b01});

  // one divider step
  logic [RW+1:0] dv_sh;
  assign dv_sh = {r_div, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      prod  <= '0;
      root  <= '0;
      rem_s <= '0;
      step  <= '0;
      neg   <= 1'b0;
      r_div <= '0;
      quo   <= '0;
      mag   <= '0;
      coef  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          prod  <= energy_x * energy_y;
          root  <= '0;
          rem_s <= '0;
          step  <= '0;
          neg   <= corr[ACC_W-1];
          mag   <= corr[ACC_W-1] ? CW'(-corr) : CW'(corr);
          state <= S_SQRT;
        end
        S_SQRT: begin
          prod <= prod << 2;
          if (sq_rem >= sq_try) begin
            rem_s <= sq_rem - sq_try;
            root  <= {root[RW-2:0], 1'b1};
          end else begin
            rem_s <= sq_rem;
            root  <= {root[RW-2:0], 1'b0};
          end
          if (step == 6'(RW - 1)) begin
            step  <= '0;
            state <= S_DIV;
          end else step <= step + 1'b1;
        end
        S_DIV: begin
          if (step == '0) begin
            // integer bit: |C| < 2*root unless saturating
            if ({1'b0, mag} >= {1'b0, root}) begin
              r_div <= (RW+1)'(mag) - (RW+1)'(root);
              quo   <= 17'd1;
            end else begin
              r_div <= (RW+1)'(mag);
              quo   <= 17'd0;
            end
          end else begin
            if (dv_sh >= (RW+2)'(root)) begin
              r_div <= (RW+1)'(dv_sh - (RW+2)'(root));
              quo   <= {quo[15:0], 1'b1};
            end else begin
              r_div <= (RW+1)'(dv_sh);
              quo   <= {quo[15:0], 1'b0};
            end
          end
          if (step == 6'd15) state <= S_OUT;
          step <= step + 1'b1;
        end
        S_OUT: begin
          if (root == '0)                   coef <= '0;
          else if (quo >= 17'd32768)        coef <= neg ? -16'sd32768 : 16'sd32767;
          else                              coef <= neg ? -signed'(16'(quo)) : signed'(16'(quo));
          done  <= 1'b1;
          step  <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
