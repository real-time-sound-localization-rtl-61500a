// tb_comm_controller: the codec model sends 48 kHz TDM frames on its own
// bit clock (12.288 MHz) while the controller runs at 12.5 MHz. Checked:
// the codec setting words go out over SPI and cfg_done rises; exactly one
// of every three frames reaches the chip side, with all three channels
// intact and in order; an azimuth from the chip lights the right LED and
// is sent over the UART as text.
module tb_comm_controller;
  import sl_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, bclk = 0, rst_n = 0;
  always #40 clk = ~clk;                    // 12.5 MHz
  always #40.69 bclk = ~bclk;               // 12.288 MHz

  logic               tdm_fsync, tdm_data, enable;
  logic [3:0][15:0]   cfg_words;
  logic               spi_cclk, spi_clatch, spi_cdata, cfg_done;
  logic               smp_valid, az_valid, uart_txd;
  mic_samples_t       smp_out, ch_in;
  azimuth_t           azimuth;
  logic [179:0]       led;
  logic [7:0]         led_num, uart_dropped;
  int                 frame_no;
  int checks = 0, failures = 0;

  function automatic mic_samples_t vals(int f);
    mic_samples_t v;
    for (int m = 0; m < NUM_MICS; m++) v[m] = sample_t'(f * 991 + m * 7001);
    return v;
  endfunction
  assign ch_in = vals(frame_no);

  codec_tdm_model codec (.bclk, .enable, .ch_in, .fsync(tdm_fsync), .sdata(tdm_data), .frame_no);

  comm_controller #(.CLKS_PER_BIT(CPB)) dut (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SPI words seen by the codec
  logic [15:0] sh; int spi_words = 0, spi_bad = 0;
  always @(posedge spi_cclk) if (!spi_clatch) sh = {sh[14:0], spi_cdata};
  always @(posedge spi_clatch) if (rst_n) begin
    if (sh !== cfg_words[spi_words]) spi_bad++;
    spi_words++;
  end

  // samples handed to the chip: consecutive ones are three frames apart
  int n_smp = 0, prev_f = -1, smp_bad = 0;
  always @(posedge clk) if (rst_n && smp_valid) begin
    int f;
    // recover the frame number from channel 0 and check the others
    f = -1;
    for (int k = 0; k <= frame_no; k++) if (vals(k)[0] == smp_out[0]) begin f = k; break; end
    checks++;
    if (f < 0 || smp_out !== vals(f) || (prev_f >= 0 && f - prev_f != 3)) begin
      smp_bad++;
      failures++;
      if (smp_bad < 5) $display("sample from frame %0d after frame %0d", f, prev_f);
    end
    prev_f = f;
    n_smp++;
  end

  // UART receiver
  byte rx [$];
  initial forever begin
    logic [7:0] b;
    @(negedge uart_txd);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
    repeat (CPB) @(posedge clk);
    rx.push_back(b);
  end

  initial begin
    enable = 0; az_valid = 0; azimuth = 0;
    for (int i = 0; i < 4; i++) cfg_words[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    repeat (256 * 3 * 30) @(posedge bclk);
    checks++;
    if (!cfg_done || spi_words != 4 || spi_bad != 0) begin
      failures++; $display("SPI: done %b words %0d bad %0d", cfg_done, spi_words, spi_bad);
    end
    checks++;
    if (n_smp < 28 || n_smp > 31) begin
      failures++; $display("%0d samples, %0d bad", n_smp, smp_bad);
    end
    // azimuth to LED and UART
    @(negedge clk); azimuth = -9'sd135; az_valid = 1;
    @(negedge clk); az_valid = 0;
    repeat (CPB * 70) @(posedge clk);
    checks++;
    if (!led[113] || led_num != 8'd113 + 8'd1) begin failures++; $display("LED %0d", led_num); end
    checks++;
    if (rx.size() != 6 || rx[0] != "-" || rx[1] != "1" || rx[2] != "3" || rx[3] != "5") begin
      failures++; $display("UART: %0d bytes", rx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
