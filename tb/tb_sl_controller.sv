// tb_sl_controller: the controller runs against a small model of the
// datapath (a 10-sample window read, energy result one cycle after the last
// sample, comparator one cycle later, correlation peaks 28 cycles and the
// azimuth 16 cycles after their starts). Checked: the order of the phases,
// rd_same on the second read only, a quiet frame skipped without a second
// read, a window announced while busy started afterwards, one announced
// twice while busy dropped, and the status counters.
module tb_sl_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_ready, rd_start, rd_same, rd_last, en_phase, xc_phase;
  logic energy_done, cmp_start, cmp_valid, detected, corr_done, az_start, az_done;
  logic result_valid, busy;
  logic [15:0] cnt_localized, cnt_skipped, cnt_dropped;
  int checks = 0, failures = 0;
  logic loud;
  int n_rd = 0, n_rd_same = 0, n_az = 0, n_res = 0, n_cmp = 0;

  sl_controller dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // datapath model
  initial begin
    rd_last = 0; energy_done = 0; cmp_valid = 0; detected = 0; corr_done = 0; az_done = 0;
    forever begin
      @(posedge clk); #1;
      rd_last = 0; energy_done = 0; cmp_valid = 0; corr_done = 0; az_done = 0;
      if (rd_start) begin
        logic was_en;
        n_rd++;
        if (rd_same) n_rd_same++;
        was_en = !rd_same;
        check(rd_same ? (xc_phase && !en_phase) : (en_phase && !xc_phase), "phase flag with read");
        repeat (11) @(posedge clk);
        #1 rd_last = 1;
        @(posedge clk); #1 rd_last = 0;
        check(!en_phase && !xc_phase, "phase flag cleared after the last sample");
        if (was_en) energy_done = 1;
        else begin
          repeat (27) @(posedge clk);
          #1 corr_done = 1;
        end
      end else if (cmp_start) begin
        n_cmp++;
        cmp_valid = 1; detected = loud;
      end else if (az_start) begin
        n_az++;
        repeat (15) @(posedge clk);
        #1 az_done = 1;
      end
    end
  end

  always @(posedge clk) if (rst_n && result_valid) n_res++;

  task automatic announce();
    @(negedge clk); frame_ready = 1;
    @(negedge clk); frame_ready = 0;
  endtask

  task automatic wait_idle();
    int n = 0, quiet = 0;
    while (quiet < 5 && n < 1000) begin
      @(negedge clk); n++;
      quiet = (busy || frame_ready || rd_start) ? 0 : quiet + 1;
    end
  endtask

  initial begin
    frame_ready = 0; loud = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: a loud frame goes through all phases
    announce(); wait_idle();
    check(n_rd == 2 && n_rd_same == 1 && n_cmp == 1 && n_az == 1 && n_res == 1, "loud frame phases");
    check(cnt_localized == 1 && cnt_skipped == 0, "counters after a loud frame");
    // 2: a quiet frame is skipped after the comparison
    loud = 0;
    announce(); wait_idle();
    check(n_rd == 3 && n_rd_same == 1 && n_cmp == 2 && n_az == 1 && n_res == 1, "quiet frame skipped");
    check(cnt_skipped == 1, "skip counter");
    // 3: a window announced while busy is started afterwards
    loud = 1;
    announce(); repeat (5) @(negedge clk); announce();
    wait_idle();
    check(n_res == 3 && cnt_localized == 3 && cnt_dropped == 0, "pending window processed");
    // 4: two more announced while busy: one is dropped
    announce(); repeat (5) @(negedge clk); announce(); repeat (5) @(negedge clk); announce();
    wait_idle();
    check(n_res == 5 && cnt_localized == 5 && cnt_dropped == 1, "overrun drops one window");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
