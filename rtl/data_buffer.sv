// data_buffer: the chip's data buffering module.
//
// Each channel's 16-bit samples arrive together with smp_valid (16 kHz in the
// system) and are written into that channel's dual-port SRAM at a common
// write pointer that wraps around, so each memory works as a circular queue.
// Once the first WINDOW (3200) samples are stored, and after that every HOP
// (160) new samples, i.e. every 10 ms, frame_ready pulses: a new window of
// the latest WINDOW samples is ready (sliding window).
//
// A pulse on rd_start streams a window out of all three memories in parallel,
// one sample per clock (the 12.5 MHz processing rate): rd_valid is high for
// WINDOW cycles starting two cycles after rd_start, rd_idx counts 0..WINDOW-1
// (oldest sample first) and rd_last marks the final sample. With rd_same high
// the window of the previous read is streamed again, so a later frame_ready
// does not move a window that is still being processed; with rd_same low the
// most recent window is taken. Writing goes on during a read; the memory
// holds 2^ADDR_W - WINDOW spare samples, which bounds how long a window may
// stay in use.
//
// Window length, hop and memory size are from the published design; the
// read handshake (rd_start / rd_same) is this design's own.
module data_buffer
  import sl_pkg::*;
#(
  parameter int unsigned WIN_LEN = WINDOW,
  parameter int unsigned HOP_LEN = HOP,
  parameter int unsigned AW      = ADDR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  // sample input
  input  logic         smp_valid,
  input  mic_samples_t smp_in,
  // window status
  output logic         frame_ready,
  // window read
  input  logic         rd_start,
  input  logic         rd_same,
  output logic         rd_valid,
  output logic [AW-1:0] rd_idx,
  output logic         rd_last,
  output mic_samples_t rd_data
);

  localparam int unsigned CW = $clog2(WIN_LEN + 1);

  logic [AW-1:0] wr_ptr;
  logic [CW-1:0] fill_cnt;                 // samples stored, saturates at WIN_LEN
  logic [CW-1:0] hop_cnt;                  // samples since the last window
  logic [AW-1:0] frame_base;               // oldest sample of the newest window
  logic [AW-1:0] cur_base;                 // window being read
  logic          reading;
  logic [AW-1:0] rd_cnt;
  logic [AW-1:0] rd_addr;
  logic          rd_en;
  logic          rd_en_q;
  logic          rd_last_q;
  logic [AW-1:0] rd_cnt_q;

  // ---------------- write side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '0;
      fill_cnt    <= '0;
      hop_cnt     <= '0;
      frame_base  <= '0;
      frame_ready <= 1'b0;
    end else begin
      frame_ready <= 1'b0;
      if (smp_valid) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (fill_cnt < CW'(WIN_LEN)) begin
          fill_cnt <= fill_cnt + 1'b1;
          if (fill_cnt == CW'(WIN_LEN - 1)) begin
            frame_ready <= 1'b1;
            frame_base  <= wr_ptr + 1'b1 - AW'(WIN_LEN);
            hop_cnt     <= '0;
          end
        end else if (hop_cnt == CW'(HOP_LEN - 1)) begin
          frame_ready <= 1'b1;
          frame_base  <= wr_ptr + 1'b1 - AW'(WIN_LEN);
          hop_cnt     <= '0;
        end else begin
          hop_cnt <= hop_cnt + 1'b1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      rd_cnt    <= '0;
      rd_addr   <= '0;
      cur_base  <= '0;
      rd_en_q   <= 1'b0;
      rd_last_q <= 1'b0;
      rd_cnt_q  <= '0;
    end else begin
      rd_en_q   <= rd_en;
      rd_last_q <= rd_en && (rd_cnt == AW'(WIN_LEN - 1));
      rd_cnt_q  <= rd_cnt;
      if (rd_start && !reading) begin
        reading <= 1'b1;
        rd_cnt  <= '0;
        if (rd_same) begin
          rd_addr <= cur_base;
        end else begin
          rd_addr  <= frame_base;
          cur_base <= frame_base;
        end
      end else if (reading) begin
        rd_addr <= rd_addr + 1'b1;
        rd_cnt  <= rd_cnt + 1'b1;
        if (rd_cnt == AW'(WIN_LEN - 1)) reading <= 1'b0;
      end
    end
  end

  assign rd_en    = reading;
  assign rd_valid = rd_en_q;
  assign rd_last  = rd_last_q;
  assign rd_idx   = rd_cnt_q;

  for (genvar m = 0; m < NUM_MICS; m++) begin : g_mem
    dual_port_sram #(.ADDR_W(AW), .DATA_W(SAMPLE_W)) u_sram (
      .clk     (clk),
      .wr_en   (smp_valid),
      .wr_addr (wr_ptr),
      .wr_data (smp_in[m]),
      .rd_en   (rd_en),
      .rd_addr (rd_addr),
      .rd_data (rd_data[m])
    );
  end

  initial assert (WIN_LEN < 2**AW) else $error("window does not fit the memory");

endmodule
