// register_file: the processor's general registers.
//
// NREGS registers of WIDTH bits (four 16-bit registers, addressed by a 2-bit
// index). Two read ports are combinational: ra_data/rb_data follow
// ra_idx/rb_idx in the same clock. One write port writes wr_data to wr_idx at
// the rising edge when we is high. Reset clears every register.
// The count and width follow the processor description; reset clearing is
// this design's choice.
module register_file #(
  parameter int unsigned NREGS = 4,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned IW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IW-1:0]    ra_idx,
  input  logic [IW-1:0]    rb_idx,
  output logic [WIDTH-1:0] ra_data,
  output logic [WIDTH-1:0] rb_data,
  input  logic             we,
  input  logic [IW-1:0]    wr_idx,
  input  logic [WIDTH-1:0] wr_data
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wr_idx] <= wr_data;
    end
  end

  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];
endmodule
