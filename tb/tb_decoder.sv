// tb_decoder: every opcode and random register/immediate fields.
// For each of the 64 opcodes, random rd, rs1, rs2 and immediate values are
// encoded and the control word is compared with the expected one, written
// out here as a table of what each instruction must do.
module tb_decoder;
  import simd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [17:0] instr;
  dec_t        dec;

  decoder dut (.instr(instr), .dec(dec));

  initial begin
    for (int n = 0; n < 64 * 40; n++) begin
      logic [5:0] opc;
      logic [1:0] rd, rs1, rs2;
      logic [9:0] imm;
      dec_t e;
      opc = 6'(n % 64);
      rd = 2'($urandom); rs1 = 2'($urandom); rs2 = 2'($urandom); imm = {rs1, rs2, 6'($urandom)};
      instr = {opc, rd, imm};
      #1;
      e = '0;
      e.alu_op = ALU_PASS; e.lane = LANE_H; e.rd = rd; e.ra = rs1; e.rb = rs2; e.imm = imm;
      if (opc[5:4] != 2'b11) begin
        e.lane = lane_e'(opc[5:4]);
        if (opc[3:0] >= 4'h1 && opc[3:0] <= 4'h9) begin
          e.use_alu = 1; e.wr_rd = 1;
          e.alu_op = alu_op_e'(opc[3:0] - 4'h1);   // ADD..SRA map in order onto ALU_ADD..ALU_SRA
        end
      end else begin
        case (opc[3:0])
          4'h0: begin e.use_alu = 1; e.use_imm = 1; e.wr_rd = 1; end
          4'h1: begin e.is_load = 1; e.wb_mem = 1; e.wr_rd = 1; end
          4'h2: begin e.is_store = 1; e.rb = rd; end
          4'h3: begin e.is_load = 1; e.indexed = 1; e.wb_mem = 1; e.wr_rd = 1; end
          4'h4: begin e.is_store = 1; e.indexed = 1; e.rb = rd; end
          4'h5: e.is_jmp = 1;
          4'h6: begin e.is_loop = 1; e.use_alu = 1; e.alu_op = ALU_SUB; e.use_one = 1; e.ra = rd; e.wr_rd = 1; end
          4'hF: e.is_halt = 1;
          default: ;
        endcase
      end
      checks++;
      if (dec !== e) begin
        failures++;
        if (failures < 10) $display("FAIL instr=%h got %h exp %h", instr, dec, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
