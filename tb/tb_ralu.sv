// tb_ralu: two-clock operation of the reconfigurable ALU.
// Each operation is applied with load high for one clock and exec high for
// the next. The result must appear in the shadow register, with valid high,
// exactly two clocks after the operands were presented, and must stay put
// while a new load happens without exec. Expected values are computed lane
// by lane with integer arithmetic for every operation and lane mode.
module tb_ralu;
  import simd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, load, exec, valid;
  alu_op_e     op;
  lane_e       mode;
  logic [15:0] a, b, result;

  ralu dut (.clk(clk), .rst_n(rst_n), .load(load), .exec(exec), .op(op), .mode(mode),
            .a(a), .b(b), .result(result), .valid(valid));

  function automatic logic [15:0] model(input alu_op_e f, input lane_e m,
                                        input logic [15:0] x, input logic [15:0] y);
    int lw;
    logic [15:0] r;
    lw = (m == LANE_Q) ? 4 : (m == LANE_O) ? 8 : 16;
    for (int base = 0; base < 16; base += lw) begin
      int unsigned lx, ly, mask, v, s;
      mask = (1 << lw) - 1;
      lx = (int'(x) >> base) & mask;
      ly = (int'(y) >> base) & mask;
      s  = int'(y[3:0]) % lw;
      case (f)
        ALU_ADD: v = lx + ly;
        ALU_SUB: v = lx - ly;
        ALU_MUL: v = lx * ly;
        ALU_AND: v = lx & ly;
        ALU_OR:  v = lx | ly;
        ALU_XOR: v = lx ^ ly;
        ALU_SHL: v = lx << s;
        ALU_SHR: v = lx >> s;
        ALU_SRA: v = (((lx >> (lw - 1)) & 1) != 0) ? ((lx | ~mask) >> s) : (lx >> s);
        default: v = ly;
      endcase
      v = v & mask;
      for (int i = 0; i < lw; i++) r[base + i] = v[i];
    end
    return r;
  endfunction

  initial begin
    rst_n = 0; load = 0; exec = 0; op = ALU_ADD; mode = LANE_H; a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (valid !== 1'b0 || result !== 16'h0) begin failures++; $display("FAIL reset state"); end

    for (int n = 0; n < 3000; n++) begin
      logic [15:0] exp_r, held;
      alu_op_e f;
      lane_e   m;
      int      lat;
      f = alu_op_e'($urandom_range(0, 9));
      m = lane_e'($urandom_range(0, 2));
      @(negedge clk);
      op = f; mode = m; a = 16'($urandom); b = 16'($urandom);
      if (n % 13 == 0) b = 16'hFFFF;
      exp_r = model(f, m, a, b);
      load = 1; exec = 0;
      @(negedge clk);
      // operands must be held by the RALU: change the inputs now
      load = 0; exec = 1; a = ~a; b = 16'($urandom); op = alu_op_e'($urandom_range(0, 9));
      lat = 1;
      @(negedge clk);
      exec = 0; lat++;
      checks++;
      if (!valid || result !== exp_r || lat != 2) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s mode=%s got %h exp %h valid=%b", f.name(), m.name(), result, exp_r, valid);
      end
      // a load without exec leaves the shadow register alone
      held = result;
      load = 1; a = 16'($urandom); b = 16'($urandom);
      @(negedge clk);
      load = 0;
      checks++;
      if (valid || result !== held) begin
        failures++;
        if (failures < 10) $display("FAIL shadow register changed without exec");
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
