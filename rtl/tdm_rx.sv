// tdm_rx: receiver for the codec's time-division-multiplexed serial port.
//
// Runs on the codec's bit clock. A frame holds SLOTS slots of SLOT_BITS bits,
// MSB first; fsync is high during the first bit of a frame. The upper
// SAMPLE_W bits of slots 0..NUM_MICS-1 are the three microphone channels.
// Bits are sampled on the rising edge of bclk. When the last bit of the
// frame has been shifted in, the three channels are copied to ch_data and
// frame_tgl toggles; ch_data then stays stable for a whole frame, which
// lets the system clock domain pick it up through a synchronized toggle.
// An fsync in the middle of a frame restarts the bit count (resync).
//
// The published system receives the codec data over TDM at 48 kHz; the frame
// layout (8 slots of 32 bits, channels in the first three slots, sync pulse
// on the first bit) is this design's choice for the codec used.
module tdm_rx
  import sl_pkg::*;
#(
  parameter int unsigned SLOTS     = 8,
  parameter int unsigned SLOT_BITS = 32
) (
  input  logic         bclk,
  input  logic         rst_n,
  input  logic         fsync,
  input  logic         sdata,
  output mic_samples_t ch_data,
  output logic         frame_tgl
);

  localparam int unsigned FB = SLOTS * SLOT_BITS;
  localparam int unsigned BW = $clog2(FB);
  localparam int unsigned SW = $clog2(SLOT_BITS);

  logic [BW-1:0]       bit_cnt;
  logic [SLOT_BITS-1:0] shreg;
  mic_samples_t        cur;
  logic                in_frame;

  logic [BW-1:0] pos;          // bit position of the bit sampled now
  assign pos = fsync ? '0 : bit_cnt;

  logic [SLOT_BITS-1:0] shnext;
  assign shnext = {shreg[SLOT_BITS-2:0], sdata};

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt   <= '0;
      shreg     <= '0;
      cur       <= '0;
      ch_data   <= '0;
      frame_tgl <= 1'b0;
      in_frame  <= 1'b0;
    end else begin
      shreg <= shnext;
      if (fsync) in_frame <= 1'b1;
      bit_cnt <= (pos == BW'(FB - 1)) ? '0 : pos + 1'b1;
      // end of a slot: keep the upper bits of the channel slots
      if (pos[SW-1:0] == SW'(SLOT_BITS - 1)) begin
        for (int m = 0; m < NUM_MICS; m++) begin
          if (pos[BW-1:SW] == (BW-SW)'(m)) cur[m] <= shnext[SLOT_BITS-1 -: SAMPLE_W];
        end
      end
      if (pos == BW'(FB - 1) && (in_frame || fsync)) begin
        ch_data   <= cur;
        frame_tgl <= ~frame_tgl;
      end
    end
  end

  initial assert (SLOTS > NUM_MICS && SLOT_BITS >= SAMPLE_W && (2**SW) == SLOT_BITS)
    else $error("unsupported TDM frame layout");

endmodule
