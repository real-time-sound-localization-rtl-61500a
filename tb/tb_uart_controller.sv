// tb_uart_controller: a UART receiver model samples txd in the middle of
// each bit (CLKS_PER_BIT = 16 here) and checks the start and stop bits. Each
// azimuth must arrive as sign, three digits, CR, LF; an azimuth offered
// while a message is still being sent must be dropped and counted.
module tb_uart_controller;
  import sl_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       az_valid, txd, busy;
  azimuth_t   azimuth;
  logic [7:0] dropped;
  int checks = 0, failures = 0;

  uart_controller #(.CLKS_PER_BIT(CPB)) dut (.*);

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver model
  byte rx [$];
  int  framing_err = 0;
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      if (txd != 0) framing_err++;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (txd != 1) framing_err++;
      rx.push_back(b);
    end
  end

  task automatic send(int a);
    string s;
    @(negedge clk); azimuth = AZ_W'(a); az_valid = 1;
    @(negedge clk); az_valid = 0;
    wait (!busy);
    repeat (2 * CPB) @(posedge clk);
    s = $sformatf("%s%03d\r\n", (a < 0) ? "-" : "+", (a < 0) ? -a : a);
    checks++;
    if (rx.size() != 6) begin
      failures++; $display("azimuth %0d: %0d bytes", a, rx.size());
    end else begin
      for (int i = 0; i < 6; i++) if (rx[i] != s[i]) begin
        failures++; $display("azimuth %0d: byte %0d is %h expected %h", a, i, rx[i], s[i]); break;
      end
    end
    rx.delete();
  endtask

  initial begin
    az_valid = 0; azimuth = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(0); send(45); send(-45); send(180); send(-180); send(-7); send(99); send(100); send(-135);
    for (int i = 0; i < 20; i++) send(int'($urandom % 361) - 180);
    // offered while busy: dropped
    @(negedge clk); azimuth = 9'sd12; az_valid = 1;
    @(negedge clk); az_valid = 0;
    repeat (50) @(negedge clk);
    azimuth = 9'sd77; az_valid = 1;
    @(negedge clk); az_valid = 0;
    wait (!busy);
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (dropped != 1 || rx.size() != 6 || rx[2] != "1") begin
      failures++; $display("drop: dropped=%0d bytes=%0d", dropped, rx.size());
    end
    checks++;
    if (framing_err != 0) begin failures++; $display("%0d framing errors", framing_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
