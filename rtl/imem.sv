// imem: instruction block RAM (the low-latency instruction memory).
//
// 2**ADDR_W words of DATA_W bits, 1024 x 18 by default. The fetch port is a
// synchronous read: the word at rd_addr appears on rd_data one clock after a
// rising edge with rd_en high, and holds while rd_en is low. The second port
// only writes and is used to load a program. Contents are not reset.
// The size follows the processor description (10-bit address, 18-bit
// instruction); the load port is this design's addition.
module imem #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 18
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
