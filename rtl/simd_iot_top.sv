// simd_iot_top: reconfigurable SIMD processor for IoT end devices.
//
// The non-pipelined SIMD core with its two block RAMs: a 1024 x 18
// instruction RAM and a 1024 x 16 data RAM. The pins are the clock, the
// reset, a program-load port into the instruction RAM (prog_*), a host port
// on the data RAM's second port (host_*, one-clock read latency, used to
// place operands and read results) and status: halted, the PC and the count
// of retired instructions.
// Typical use: hold rst_n low, write the program and the data, release
// rst_n; the core runs from address 0 at five clocks per instruction until
// HALT raises halted. The host ports are this design's way of bringing the
// address, data and RAM control pins out.
module simd_iot_top
  import simd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_we,
  input  logic [IADDR_W-1:0] prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  input  logic               host_en,
  input  logic               host_we,
  input  logic [DADDR_W-1:0] host_addr,
  input  logic [DATA_W-1:0]  host_wdata,
  output logic [DATA_W-1:0]  host_rdata,
  output logic               halted,
  output logic [IADDR_W-1:0] pc,
  output logic [31:0]        retired
);
  logic               imem_en;
  logic [IADDR_W-1:0] imem_addr;
  logic [INSTR_W-1:0] imem_rdata;
  logic               dmem_en, dmem_we;
  logic [DADDR_W-1:0] dmem_addr;
  logic [DATA_W-1:0]  dmem_wdata, dmem_rdata;

  simd_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .imem_en   (imem_en),
    .imem_addr (imem_addr),
    .imem_rdata(imem_rdata),
    .dmem_en   (dmem_en),
    .dmem_we   (dmem_we),
    .dmem_addr (dmem_addr),
    .dmem_wdata(dmem_wdata),
    .dmem_rdata(dmem_rdata),
    .halted    (halted),
    .pc        (pc),
    .retired   (retired)
  );

  imem #(.ADDR_W(IADDR_W), .DATA_W(INSTR_W)) u_imem (
    .clk    (clk),
    .rd_en  (imem_en),
    .rd_addr(imem_addr),
    .rd_data(imem_rdata),
    .wr_en  (prog_we),
    .wr_addr(prog_addr),
    .wr_data(prog_data)
  );

  dmem #(.ADDR_W(DADDR_W), .DATA_W(DATA_W)) u_dmem (
    .clk    (clk),
    .a_en   (dmem_en),
    .a_we   (dmem_we),
    .a_addr (dmem_addr),
    .a_wdata(dmem_wdata),
    .a_rdata(dmem_rdata),
    .b_en   (host_en),
    .b_we   (host_we),
    .b_addr (host_addr),
    .b_wdata(host_wdata),
    .b_rdata(host_rdata)
  );
endmodule
