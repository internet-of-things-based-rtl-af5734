// decoder: instruction decoder (ID stage).
//
// Splits the 18-bit instruction into the 6-bit command, the 2-bit register
// indexes and the 10-bit immediate, and turns the command into the control
// word dec_t used by EX, MEM and WB. opcode[5:4] selects H/O/Q lanes for the
// ALU functions or, when 11, the memory and control group; see simd_pkg for
// the layout. Codes without a meaning decode as no-operations.
// Register-port use: port A reads rs1 (operand 1, or the address register of
// LDX/STX) or rd (LOOP counter); port B reads rs2 (operand 2) or rd (store
// data of ST/STX).
// Purely combinational. The 18-bit length, the 6-bit opcode, the 2-bit
// register index and the 10-bit immediate follow the processor description;
// the field positions and code assignments are this design's choices.
module decoder
  import simd_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output dec_t               dec
);
  lane_e                ln;
  logic [3:0]           fn;
  logic [REG_IDX_W-1:0] rd, rs1, rs2;

  assign ln  = lane_e'(instr[17:16]);
  assign fn  = instr[15:12];
  assign rd  = instr[11:10];
  assign rs1 = instr[9:8];
  assign rs2 = instr[7:6];

  always_comb begin
    dec        = '0;
    dec.alu_op = ALU_PASS;
    dec.lane   = LANE_H;
    dec.rd     = rd;
    dec.ra     = rs1;
    dec.rb     = rs2;
    dec.imm    = instr[IMM_W-1:0];

    if (ln != LANE_CTL) begin
      dec.lane = ln;
      dec.use_alu = 1'b1;
      dec.wr_rd   = 1'b1;
      case (fn)
        F_ADD:   dec.alu_op = ALU_ADD;
        F_SUB:   dec.alu_op = ALU_SUB;
        F_MUL:   dec.alu_op = ALU_MUL;
        F_AND:   dec.alu_op = ALU_AND;
        F_OR:    dec.alu_op = ALU_OR;
        F_XOR:   dec.alu_op = ALU_XOR;
        F_SHL:   dec.alu_op = ALU_SHL;
        F_SHR:   dec.alu_op = ALU_SHR;
        F_SRA:   dec.alu_op = ALU_SRA;
        default: begin          // F_NOP and unused codes
          dec.use_alu = 1'b0;
          dec.wr_rd   = 1'b0;
        end
      endcase
    end else begin
      case (fn)
        C_LDI: begin
          dec.use_alu = 1'b1;
          dec.use_imm = 1'b1;
          dec.wr_rd   = 1'b1;
        end
        C_LD: begin
          dec.is_load = 1'b1;
          dec.wb_mem  = 1'b1;
          dec.wr_rd   = 1'b1;
        end
        C_ST: begin
          dec.is_store = 1'b1;
          dec.rb       = rd;
        end
        C_LDX: begin
          dec.is_load = 1'b1;
          dec.indexed = 1'b1;
          dec.wb_mem  = 1'b1;
          dec.wr_rd   = 1'b1;
        end
        C_STX: begin
          dec.is_store = 1'b1;
          dec.indexed  = 1'b1;
          dec.rb       = rd;
        end
        C_JMP: dec.is_jmp = 1'b1;
        C_LOOP: begin
          dec.is_loop = 1'b1;
          dec.use_alu = 1'b1;
          dec.alu_op  = ALU_SUB;
          dec.use_one = 1'b1;
          dec.ra      = rd;
          dec.wr_rd   = 1'b1;
        end
        C_HALT: dec.is_halt = 1'b1;
        default: ;
      endcase
    end
  end
endmodule
