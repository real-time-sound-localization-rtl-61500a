// tb_spi_master: a model of the codec's control port shifts in cdata on
// each rising cclk while clatch is low and stores a word when clatch rises.
// After reset the four setting words must arrive in order, with 16 clocks
// each and the clock period of 2*CLK_DIV system clocks; cfg_done must then
// be high. A start pulse sends them again.
module tb_spi_master;
  localparam int N = 4, DIV = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cclk, clatch, cdata, cfg_done;
  logic [N-1:0][15:0] cfg_words;
  int checks = 0, failures = 0;

  spi_master #(.N_WORDS(N), .WORD_W(16), .CLK_DIV(DIV)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // codec control port model
  logic [15:0] shreg;
  int nbits = 0;
  logic [15:0] got [$];
  int nb [$];
  int last_rise = -1, cyc = 0, bad_period = 0;
  always @(posedge clk) cyc++;
  always @(posedge cclk) if (!clatch) begin
    shreg = {shreg[14:0], cdata};
    nbits++;
    if (last_rise >= 0 && nbits > 1 && cyc - last_rise != 2 * DIV) bad_period++;
    last_rise = cyc;
  end
  always @(posedge clatch) if (rst_n) begin
    got.push_back(shreg); nb.push_back(nbits); nbits = 0;
  end

  task automatic expect_words();
    checks++;
    if (got.size() != N) begin failures++; $display("%0d words", got.size()); end
    foreach (got[i]) begin
      checks++;
      if (got[i] !== cfg_words[i] || nb[i] != 16) begin
        failures++; $display("word %0d: %h (%0d bits) expected %h", i, got[i], nb[i], cfg_words[i]);
      end
    end
    checks++;
    if (!cfg_done || bad_period != 0) begin failures++; $display("done %b, bad periods %0d", cfg_done, bad_period); end
  endtask

  initial begin
    start = 0;
    for (int i = 0; i < N; i++) cfg_words[i] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (cfg_done);
    repeat (10) @(posedge clk);
    expect_words();
    got.delete(); nb.delete();
    for (int i = 0; i < N; i++) cfg_words[i] = 16'($urandom);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(posedge clk);
    checks++;
    if (cfg_done) begin failures++; $display("cfg_done stays high after start"); end
    wait (cfg_done);
    repeat (10) @(posedge clk);
    expect_words();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
