// simd_core: non-pipelined reconfigurable SIMD processor core.
//
// A phase sequencer steps every instruction through five clocks, one per
// phase, with no overlap between instructions:
//   IF  : the PC goes to the instruction RAM (10-bit address);
//   ID  : the 18-bit word returned by the RAM is decoded, the register file
//         is read and the RALU captures its operands (the RALU's load clock);
//   EX  : the RALU computes into its shadow register (its execute clock) and
//         the load-store unit's AGU forms the data address;
//   MEM : the load-store unit drives the data RAM; the next PC is chosen
//         (JMP, or LOOP when its decremented counter is not zero);
//   WB  : rd is written with the shadow register or the loaded word, the PC
//         advances and the instruction counts as retired.
// HALT stops the sequencer in a halted state until reset. An instruction
// therefore takes five clocks; a program of N instructions (HALT included)
// finishes 5*N clocks after reset is released.
// Both RAMs are outside the core; imem_* and dmem_* are their ports.
// The phases, the two-clock RALU and the memory widths follow the processor
// description; the instruction set and the reset behaviour are this design's.
module simd_core
  import simd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  output logic               imem_en,
  output logic [IADDR_W-1:0] imem_addr,
  input  logic [INSTR_W-1:0] imem_rdata,
  output logic               dmem_en,
  output logic               dmem_we,
  output logic [DADDR_W-1:0] dmem_addr,
  output logic [DATA_W-1:0]  dmem_wdata,
  input  logic [DATA_W-1:0]  dmem_rdata,
  output logic               halted,
  output logic [IADDR_W-1:0] pc,
  output logic [31:0]        retired
);
  typedef enum logic [2:0] {
    PH_IF, PH_ID, PH_EX, PH_MEM, PH_WB, PH_HALT
  } phase_e;

  phase_e             phase;
  dec_t               dec_now, dec_q, dec_use;
  logic [IADDR_W-1:0] pc_next_q;

  logic [DATA_W-1:0]  ra_data, rb_data, opnd2, alu_result, ld_data, wb_data;
  logic               rf_we, alu_valid;

  // ---------------------------------------------------------------- fetch
  assign imem_en   = (phase == PH_IF);
  assign imem_addr = pc;

  // --------------------------------------------------------------- decode
  decoder u_dec (
    .instr(imem_rdata),
    .dec  (dec_now)
  );

  // in ID the fresh decode drives the register ports, afterwards the held one
  assign dec_use = (phase == PH_ID) ? dec_now : dec_q;

  register_file #(.NREGS(4), .WIDTH(DATA_W)) u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ra_idx (dec_use.ra),
    .rb_idx (dec_use.rb),
    .ra_data(ra_data),
    .rb_data(rb_data),
    .we     (rf_we),
    .wr_idx (dec_q.rd),
    .wr_data(wb_data)
  );

  always_comb begin
    if (dec_now.use_imm)      opnd2 = DATA_W'(dec_now.imm);
    else if (dec_now.use_one) opnd2 = DATA_W'(1);
    else                      opnd2 = rb_data;
  end

  // ----------------------------------------------------------------- RALU
  ralu #(.WIDTH(DATA_W)) u_ralu (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (phase == PH_ID),
    .exec  (phase == PH_EX && dec_q.use_alu),
    .op    (dec_now.alu_op),
    .mode  (dec_now.lane),
    .a     (ra_data),
    .b     (opnd2),
    .result(alu_result),
    .valid (alu_valid)
  );

  // ------------------------------------------------------------------ LSU
  lsu u_lsu (
    .clk       (clk),
    .rst_n     (rst_n),
    .agu_en    (phase == PH_EX),
    .mem_en    (phase == PH_MEM),
    .is_load   (dec_q.is_load),
    .is_store  (dec_q.is_store),
    .indexed   (dec_q.indexed),
    .imm       (dec_q.imm),
    .base      (ra_data),
    .st_data   (rb_data),
    .dmem_en   (dmem_en),
    .dmem_we   (dmem_we),
    .dmem_addr (dmem_addr),
    .dmem_wdata(dmem_wdata),
    .dmem_rdata(dmem_rdata),
    .ld_data   (ld_data)
  );

  // an instruction that used the RALU has its result in the shadow register by MEM
  a_ralu_two_clocks: assert property (@(posedge clk) disable iff (!rst_n)
      (phase == PH_MEM && dec_q.use_alu) |-> alu_valid)
    else $error("simd_core: RALU result missing in MEM");

  // ----------------------------------------------------------- write back
  assign rf_we   = (phase == PH_WB) && dec_q.wr_rd;
  assign wb_data = dec_q.wb_mem ? ld_data : alu_result;
  assign halted  = (phase == PH_HALT);

  // ------------------------------------------------------ phase sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IF;
      pc        <= '0;
      pc_next_q <= '0;
      dec_q     <= '0;
      retired   <= '0;
    end else begin
      unique case (phase)
        PH_IF:  phase <= PH_ID;
        PH_ID: begin
          dec_q <= dec_now;
          phase <= PH_EX;
        end
        PH_EX:  phase <= PH_MEM;
        PH_MEM: begin
          if (dec_q.is_jmp || (dec_q.is_loop && alu_result != '0))
            pc_next_q <= dec_q.imm;
          else
            pc_next_q <= pc + 1'b1;
          phase <= PH_WB;
        end
        PH_WB: begin
          retired <= retired + 1;
          if (dec_q.is_halt) begin
            phase <= PH_HALT;
          end else begin
            pc    <= pc_next_q;
            phase <= PH_IF;
          end
        end
        default: phase <= PH_HALT;
      endcase
    end
  end
endmodule
