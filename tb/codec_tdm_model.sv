// codec_tdm_model: behavioural model of the codec's TDM serial output, for
// testbenches only (the codec is a bought part, not designed here).
//
// On every falling edge of bclk it drives the next bit of a frame of SLOTS
// slots of SLOT_BITS bits, MSB first, with fsync high during the frame's
// first bit. Slots 0..2 carry ch_in[0..2] in their upper 16 bits and a fill
// pattern below; the other slots carry noise. ch_in is taken at the start
// of each frame; frame_no counts the frames started, so a testbench can
// derive ch_in from it.
module codec_tdm_model
  import sl_pkg::*;
#(
  parameter int SLOTS     = 8,
  parameter int SLOT_BITS = 32
) (
  input  logic         bclk,
  input  logic         enable,
  input  mic_samples_t ch_in,
  output logic         fsync,
  output logic         sdata,
  output int           frame_no
);
  logic [SLOTS*SLOT_BITS-1:0] frame;
  int bit_i = 0;

  initial begin
    fsync = 0; sdata = 0; frame_no = 0;
  end

  always @(negedge bclk) begin
    if (!enable) begin
      fsync <= 0; sdata <= 0; bit_i = 0;
    end else begin
      if (bit_i == 0) begin
        for (int s = 0; s < SLOTS; s++) begin
          logic [SLOT_BITS-1:0] w;
          w = {$urandom, $urandom};
          if (s < NUM_MICS) w = {ch_in[s], 16'hA5C3} << (SLOT_BITS - 32);
          frame[(SLOTS-1-s)*SLOT_BITS +: SLOT_BITS] = w;
        end
        frame_no <= frame_no + 1;
      end
      fsync <= (bit_i == 0);
      sdata <= frame[SLOTS*SLOT_BITS-1-bit_i];
      bit_i = (bit_i == SLOTS*SLOT_BITS-1) ? 0 : bit_i + 1;
    end
  end
endmodule
