// tb_dual_port_sram: random writes and reads against a reference array,
// including reads of the address being written in the same cycle (old data).
module tb_dual_port_sram;
  localparam int AW = 12, DW = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data;
  logic [DW-1:0] model [2**AW];
  logic          written [2**AW];
  int checks = 0, failures = 0;

  dual_port_sram dut (.*);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] exp_q;
    logic          chk_q;
    foreach (written[i]) written[i] = 1'b0;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    chk_q = 0; exp_q = 0;
    // fill every word
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = DW'($urandom);
      model[a] = wr_data; written[a] = 1'b1;
    end
    @(negedge clk); wr_en = 0;
    // random mixed traffic
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (chk_q) begin
        checks++;
        if (rd_data !== exp_q) begin
          failures++;
          if (failures < 10) $display("read mismatch: got %h expected %h", rd_data, exp_q);
        end
      end
      rd_en   = ($urandom % 4) != 0;
      rd_addr = AW'($urandom);
      wr_en   = ($urandom % 2) != 0;
      wr_addr = ($urandom % 8 == 0) ? rd_addr : AW'($urandom);
      wr_data = DW'($urandom);
      chk_q   = rd_en;
      exp_q   = model[rd_addr];           // old data on a same-address write
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
