// dual_port_sram: one channel's sample memory, 2^ADDR_W words of DATA_W bits
// (4096 x 16 by default, the "A12xD16" macro of the chip).
//
// Port A writes, port B reads, both on the same clock. The read is
// synchronous: the word at rd_addr appears on rd_data one cycle after rd_en.
// A read of the address being written in the same cycle returns the old word.
// The chip used a foundry dual-port SRAM macro; here it is an array that a
// synthesis tool maps to a memory. Contents are not reset.
module dual_port_sram #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  // write port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
