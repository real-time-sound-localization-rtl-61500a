// tb_tdm_rx: the codec model sends frames whose three channels carry values
// derived from the frame number; after each frame the receiver must toggle
// frame_tgl once and present exactly those three 16-bit words. A burst of
// fsync in mid-frame must resynchronize the receiver.
module tb_tdm_rx;
  import sl_pkg::*;
  logic bclk = 0, rst_n = 0;
  always #5 bclk = ~bclk;

  logic         fsync, sdata, frame_tgl, enable;
  mic_samples_t ch_data, ch_in;
  int           frame_no;
  int checks = 0, failures = 0;

  function automatic mic_samples_t vals(int f);
    mic_samples_t v;
    for (int m = 0; m < NUM_MICS; m++) v[m] = sample_t'(f * 1237 + m * 4099 - 30000);
    return v;
  endfunction

  assign ch_in = vals(frame_no);

  codec_tdm_model codec (.bclk, .enable, .ch_in, .fsync, .sdata, .frame_no);
  tdm_rx dut (.bclk, .rst_n, .fsync, .sdata, .ch_data, .frame_tgl);

  initial begin
    repeat (200000) @(posedge bclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_tgl = 0;
  logic tgl_q = 0;
  always @(posedge bclk) begin
    #1;
    if (frame_tgl != tgl_q) begin
      tgl_q = frame_tgl;
      n_tgl++;
      checks++;
      // the frame just completed was started as frame_no (ch_in sampled at frame_no-1)
      if (ch_data !== vals(frame_no - 1)) begin
        failures++;
        if (failures < 10) $display("frame %0d: got %h %h %h", frame_no, ch_data[0], ch_data[1], ch_data[2]);
      end
    end
  end

  initial begin
    enable = 0;
    repeat (3) @(posedge bclk);
    rst_n = 1;
    repeat (37) @(posedge bclk);            // start out of phase
    enable = 1;
    repeat (256 * 40 + 10) @(posedge bclk);
    checks++;
    if (n_tgl < 39 || n_tgl > 40) begin failures++; $display("%0d frames received", n_tgl); end
    // restart the codec in mid-frame: the receiver follows the new fsync
    enable = 0;
    repeat (3) @(posedge bclk);
    enable = 1;
    repeat (256 * 10 + 10) @(posedge bclk);
    $display("frames %0d", n_tgl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
