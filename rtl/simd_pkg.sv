// simd_pkg: types and constants shared by the reconfigurable SIMD processor.
//
// The processor has an 18-bit instruction with a 6-bit opcode, a 10-bit
// instruction address, a 10-bit data address, 16-bit data and four registers
// addressed by a 2-bit index; these sizes come from the processor description.
// The field layout and the opcode numbering below are this design's own:
//
//   [17:12] opcode   [11:10] rd   [9:8] rs1   [7:6] rs2   [5:0] zero  (register form)
//   [17:12] opcode   [11:10] rd   [9:0] imm                           (immediate form)
//
//   opcode[5:4] : 00 = H (16-bit lanes), 01 = O (8-bit lanes), 10 = Q (4-bit
//                 lanes) for ALU functions; 11 = memory and control group.
//   opcode[3:0] : function (see alu_func_e and ctl_func_e).
package simd_pkg;

  localparam int unsigned INSTR_W   = 18;
  localparam int unsigned OPC_W     = 6;
  localparam int unsigned IADDR_W   = 10;
  localparam int unsigned DADDR_W   = 10;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned REG_IDX_W = 2;
  localparam int unsigned IMM_W     = 10;

  // Lane width selected by opcode[5:4]
  typedef enum logic [1:0] {
    LANE_H   = 2'b00,   // one 16-bit lane
    LANE_O   = 2'b01,   // two 8-bit lanes
    LANE_Q   = 2'b10,   // four 4-bit lanes
    LANE_CTL = 2'b11    // memory / control group (not a lane width)
  } lane_e;

  // ALU function field (opcode[3:0] when opcode[5:4] != 11)
  typedef enum logic [3:0] {
    F_NOP = 4'h0,
    F_ADD = 4'h1,
    F_SUB = 4'h2,
    F_MUL = 4'h3,
    F_AND = 4'h4,
    F_OR  = 4'h5,
    F_XOR = 4'h6,
    F_SHL = 4'h7,
    F_SHR = 4'h8,
    F_SRA = 4'h9
  } alu_func_e;

  // Memory / control function field (opcode[3:0] when opcode[5:4] == 11)
  typedef enum logic [3:0] {
    C_LDI  = 4'h0,  // rd <- zero-extended imm
    C_LD   = 4'h1,  // rd <- DMEM[imm]
    C_ST   = 4'h2,  // DMEM[imm] <- rd
    C_LDX  = 4'h3,  // rd <- DMEM[rs1[9:0]]
    C_STX  = 4'h4,  // DMEM[rs1[9:0]] <- rd
    C_JMP  = 4'h5,  // pc <- imm
    C_LOOP = 4'h6,  // rd <- rd - 1; if (rd != 0) pc <- imm
    C_HALT = 4'hF   // stop
  } ctl_func_e;

  // Operation performed by the RALU
  typedef enum logic [3:0] {
    ALU_ADD  = 4'h0,
    ALU_SUB  = 4'h1,
    ALU_MUL  = 4'h2,
    ALU_AND  = 4'h3,
    ALU_OR   = 4'h4,
    ALU_XOR  = 4'h5,
    ALU_SHL  = 4'h6,
    ALU_SHR  = 4'h7,
    ALU_SRA  = 4'h8,
    ALU_PASS = 4'h9   // result = operand 2
  } alu_op_e;

  // Decoded control word produced in ID and held through EX, MEM and WB
  typedef struct packed {
    alu_op_e              alu_op;
    lane_e                lane;       // H/O/Q for the RALU (never LANE_CTL)
    logic [REG_IDX_W-1:0] rd;
    logic [REG_IDX_W-1:0] ra;         // index read on port A (operand 1 / base)
    logic [REG_IDX_W-1:0] rb;         // index read on port B (operand 2 / store data)
    logic [IMM_W-1:0]     imm;
    logic                 use_imm;    // operand 2 = zero-extended imm
    logic                 use_one;    // operand 2 = 1 (LOOP decrement)
    logic                 use_alu;    // the RALU runs for this instruction
    logic                 wr_rd;      // WB writes rd
    logic                 wb_mem;     // WB data comes from the data memory
    logic                 is_load;
    logic                 is_store;
    logic                 indexed;    // memory address from register ra
    logic                 is_jmp;
    logic                 is_loop;
    logic                 is_halt;
  } dec_t;

  // Instruction builders (used by testbenches and program generators)
  function automatic logic [INSTR_W-1:0] enc_r(input lane_e ln, input alu_func_e f,
      input logic [1:0] rd, input logic [1:0] rs1, input logic [1:0] rs2);
    return {ln, f, rd, rs1, rs2, 6'd0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_i(input ctl_func_e f, input logic [1:0] rd,
      input logic [IMM_W-1:0] imm);
    return {LANE_CTL, f, rd, imm};
  endfunction

endpackage
