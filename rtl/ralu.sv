// ralu: reconfigurable ALU of the SIMD processor.
//
// An operation takes two clocks. In the first (load = 1) the two operands,
// the operation and the lane mode are captured in the Operand 1 / Operand 2
// registers. In the second (exec = 1) the processing units work on the held
// operands and the selected result is written to the shadow register; valid
// is high in the clock after exec. The result stays in the shadow register
// until the next exec.
//
// Processing units, all lane-wise in 4-bit (Q), 8-bit (O) or 16-bit (H)
// lanes: the KS-CLA hybrid adder (ADD, and SUB as a + ~b + 1 in two's
// complement), the SIMD multiplier (MUL, low half of each lane product), the
// SIMD shifter (SHL, SHR, SRA by operand 2's low four bits) and bitwise
// AND/OR/XOR. PASS returns operand 2.
// The two-clock load/execute behaviour, the three units and the lane widths
// follow the processor description; the operation list and encoding are this
// design's choices.
module ralu
  import simd_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             exec,
  input  alu_op_e          op,
  input  lane_e            mode,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] result,
  output logic             valid
);
  // operand registers (first clock)
  logic [WIDTH-1:0] opnd1_q, opnd2_q;
  alu_op_e          op_q;
  lane_e            mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opnd1_q <= '0;
      opnd2_q <= '0;
      op_q    <= ALU_PASS;
      mode_q  <= LANE_H;
    end else if (load) begin
      opnd1_q <= a;
      opnd2_q <= b;
      op_q    <= op;
      mode_q  <= mode;
    end
  end

  logic lq, lo, lh;
  assign lq = (mode_q == LANE_Q);
  assign lo = (mode_q == LANE_O);
  assign lh = (mode_q == LANE_H) || (mode_q == LANE_CTL);

  // processing units
  logic             is_sub;
  logic [WIDTH-1:0] add_b, add_sum, mul_p, sh_y;
  logic [WIDTH/4-1:0] add_cout;

  assign is_sub = (op_q == ALU_SUB);
  assign add_b  = is_sub ? ~opnd2_q : opnd2_q;

  hybrid_adder #(.WIDTH(WIDTH)) u_add (
    .a   (opnd1_q),
    .b   (add_b),
    .cin (is_sub),
    .q   (lq),
    .o   (lo),
    .h   (lh),
    .sum (add_sum),
    .cout(add_cout)
  );

  simd_multiplier #(.WIDTH(WIDTH)) u_mul (
    .a(opnd1_q),
    .b(opnd2_q),
    .q(lq),
    .o(lo),
    .h(lh),
    .p(mul_p)
  );

  simd_shifter #(.WIDTH(WIDTH)) u_sh (
    .a        (opnd1_q),
    .shamt    (opnd2_q[3:0]),
    .dir_right(op_q != ALU_SHL),
    .arith    (op_q == ALU_SRA),
    .q        (lq),
    .o        (lo),
    .h        (lh),
    .y        (sh_y)
  );

  logic [WIDTH-1:0] res_d;
  always_comb begin
    unique case (op_q)
      ALU_ADD, ALU_SUB:           res_d = add_sum;
      ALU_MUL:                    res_d = mul_p;
      ALU_AND:                    res_d = opnd1_q & opnd2_q;
      ALU_OR:                     res_d = opnd1_q | opnd2_q;
      ALU_XOR:                    res_d = opnd1_q ^ opnd2_q;
      ALU_SHL, ALU_SHR, ALU_SRA:  res_d = sh_y;
      default:                    res_d = opnd2_q;   // ALU_PASS
    endcase
  end

  // shadow register (second clock)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= exec;
      if (exec) result <= res_d;
    end
  end
endmodule
