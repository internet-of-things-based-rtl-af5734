// lsu: load-store unit with its address generation unit (AGU).
//
// In the EX clock (agu_en) the AGU forms the data address, either the 10-bit
// immediate (direct) or the low bits of the base register (indexed), and
// holds it together with the store data and the access kind. In the MEM clock
// (mem_en) the unit drives the data RAM port: enable for a load or a store,
// write enable for a store. The RAM returns a load's word one clock later,
// in WB, and ld_data passes it on to the write-back.
// The direct 10-bit address follows the processor description; the indexed
// form is this design's choice.
module lsu
  import simd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               agu_en,
  input  logic               mem_en,
  input  logic               is_load,
  input  logic               is_store,
  input  logic               indexed,
  input  logic [IMM_W-1:0]   imm,
  input  logic [DATA_W-1:0]  base,
  input  logic [DATA_W-1:0]  st_data,
  output logic               dmem_en,
  output logic               dmem_we,
  output logic [DADDR_W-1:0] dmem_addr,
  output logic [DATA_W-1:0]  dmem_wdata,
  input  logic [DATA_W-1:0]  dmem_rdata,
  output logic [DATA_W-1:0]  ld_data
);
  logic               ld_q, st_q;
  logic [DADDR_W-1:0] addr_q;
  logic [DATA_W-1:0]  wdata_q;

  // AGU: address and store data captured in EX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_q    <= 1'b0;
      st_q    <= 1'b0;
      addr_q  <= '0;
      wdata_q <= '0;
    end else if (agu_en) begin
      ld_q    <= is_load;
      st_q    <= is_store;
      addr_q  <= indexed ? base[DADDR_W-1:0] : DADDR_W'(imm);
      wdata_q <= st_data;
    end
  end

  assign dmem_en    = mem_en && (ld_q || st_q);
  assign dmem_we    = mem_en && st_q;
  assign dmem_addr  = addr_q;
  assign dmem_wdata = wdata_q;
  assign ld_data    = dmem_rdata;

  // a memory access is either a load or a store
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(ld_q && st_q))
    else $error("lsu: load and store at once");
endmodule
