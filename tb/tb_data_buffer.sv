// tb_data_buffer: feeds numbered samples (channel m of sample s carries
// s*4+m) into a reduced buffer (window 40, hop 8, 64-word memories, so the
// write pointer wraps many times) and checks that frame_ready comes after
// the 40th sample and then every 8 samples, that a read streams exactly the
// 40 newest samples, oldest first, with rd_idx 0..39, rd_last on the final
// one and the two-cycle start latency, and that rd_same re-reads the old
// window after a newer one has been announced.
module tb_data_buffer;
  import sl_pkg::*;
  localparam int WIN = 40, HOPL = 8, AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          smp_valid, frame_ready, rd_start, rd_same, rd_valid, rd_last;
  mic_samples_t  smp_in, rd_data;
  logic [AW-1:0] rd_idx;
  int checks = 0, failures = 0;
  int n_written = 0;
  int frames [$];

  data_buffer #(.WIN_LEN(WIN), .HOP_LEN(HOPL), .AW(AW)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record how many samples were written when each frame_ready came
  always @(posedge clk) if (rst_n && frame_ready) frames.push_back(n_written);

  task automatic write_samples(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      smp_valid = 1;
      for (int m = 0; m < NUM_MICS; m++) smp_in[m] = sample_t'(n_written * 4 + m);
      @(posedge clk); #1;
      n_written++;
      @(negedge clk);
      smp_valid = 0;
    end
  endtask

  // read one window; `newest` is the sample count the window ends at
  task automatic read_window(logic same, int newest);
    int cnt, lat;
    @(negedge clk);
    rd_start = 1; rd_same = same;
    @(negedge clk);
    rd_start = 0;
    lat = 1;
    while (!rd_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("read latency %0d", lat); end
    cnt = 0;
    while (rd_valid) begin
      checks++;
      if (rd_idx != AW'(cnt) || rd_last != (cnt == WIN - 1) ||
          rd_data[0] != sample_t'((newest - WIN + cnt) * 4) ||
          rd_data[2] != sample_t'((newest - WIN + cnt) * 4 + 2)) begin
        failures++;
        if (failures < 10) $display("read %0d: idx %0d last %b data %0d expected %0d",
                                    cnt, rd_idx, rd_last, rd_data[0], (newest - WIN + cnt) * 4);
      end
      cnt++;
      @(negedge clk);
    end
    checks++;
    if (cnt != WIN) begin failures++; $display("read %0d samples", cnt); end
  endtask

  initial begin
    smp_valid = 0; smp_in = '0; rd_start = 0; rd_same = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    write_samples(WIN - 1);
    checks++;
    if (frames.size() != 0) begin failures++; $display("frame before the window was full"); end
    write_samples(1);
    read_window(1'b0, WIN);
    for (int r = 0; r < 12; r++) begin
      write_samples(HOPL);
      read_window(1'b0, WIN + (r + 1) * HOPL);
    end
    // announce a newer window, then re-read the old one
    write_samples(HOPL);
    read_window(1'b1, WIN + 12 * HOPL);
    read_window(1'b0, WIN + 13 * HOPL);
    write_samples(3);
    // frame_ready positions
    checks++;
    if (frames.size() != 14) begin failures++; $display("%0d frames", frames.size()); end
    foreach (frames[i]) begin
      checks++;
      if (frames[i] != WIN + i * HOPL) begin
        failures++; $display("frame %0d after %0d samples", i, frames[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
