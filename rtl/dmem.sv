// dmem: data block RAM with two read/write ports.
//
// 2**ADDR_W words of DATA_W bits, 1024 x 16 by default. Each port does one
// access per rising edge when its enable is high: a write stores wdata, and
// rdata shows the word as it was before that edge (read-first), one clock
// after the address. Port A belongs to the processor's load-store unit, port
// B to the host that loads operands and reads results. If both ports write
// the same word in one clock, port B's value is kept. Contents are not reset.
// The size follows the processor description (10-bit address, 16-bit data);
// the second port and the read-first behaviour are this design's choices.
module dmem #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
