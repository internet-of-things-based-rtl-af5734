// tb_simd_iot_top: end-to-end runs of the whole processor at its default sizes.
//
// Each run loads a program and data through the host ports, releases reset,
// waits for halted and compares the data RAM (read back through the host
// port), the retired-instruction count and the cycle count (five clocks per
// instruction) with an instruction-level reference model written here.
// A program is:
//   - a vector kernel: a LOOP over VEC_N words that loads each word through a
//     pointer (LDX), squares it in 4-bit lanes, adds the original in 8-bit
//     lanes, shifts and XORs in 16-bit lanes and stores it back (STX);
//   - a random straight-line part of ALU instructions in every lane mode,
//     immediate loads, direct loads and stores, and undefined codes that must
//     act as no-operations;
//   - stores of all registers, a JMP over a store that must not run, HALT.
// The testbench counts how often each mechanism occurred in the design
// (every ALU function in every lane mode, each memory form, LOOP taken and
// not taken, JMP, HALT, the two-clock RALU load/execute) and fails any that
// never did.
module tb_simd_iot_top;
  import simd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int RUNS     = 6;
  localparam int VEC_BASE = 256;
  localparam int VEC_N    = 16;
  localparam int RND_LEN  = 300;

  logic        rst_n, prog_we, host_en, host_we, halted;
  logic [9:0]  prog_addr, host_addr, pc;
  logic [17:0] prog_data;
  logic [15:0] host_wdata, host_rdata;
  logic [31:0] retired;

  simd_iot_top dut (.clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
                    .prog_data(prog_data), .host_en(host_en), .host_we(host_we),
                    .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata),
                    .halted(halted), .pc(pc), .retired(retired));

  // ------------------------------------------------------ reference model
  logic [17:0] prog [1024];
  logic [15:0] mem0 [1024];     // initial data
  logic [15:0] mref [1024];     // data after the reference run
  int          ref_retired;

  function automatic logic [15:0] lane_alu(input logic [3:0] fn, input int lw,
                                           input logic [15:0] x, input logic [15:0] y);
    logic [15:0] r;
    for (int base = 0; base < 16; base += lw) begin
      int unsigned lx, ly, mask, v, s;
      mask = (1 << lw) - 1;
      lx = (int'(x) >> base) & mask;
      ly = (int'(y) >> base) & mask;
      s  = int'(y[3:0]) % lw;
      case (fn)
        4'h1: v = lx + ly;
        4'h2: v = lx - ly;
        4'h3: v = lx * ly;
        4'h4: v = lx & ly;
        4'h5: v = lx | ly;
        4'h6: v = lx ^ ly;
        4'h7: v = lx << s;
        4'h8: v = lx >> s;
        4'h9: v = (((lx >> (lw - 1)) & 1) != 0) ? ((lx | ~mask) >> s) : (lx >> s);
        default: v = 0;
      endcase
      v = v & mask;
      for (int i = 0; i < lw; i++) r[base + i] = v[i];
    end
    return r;
  endfunction

  task automatic run_reference();
    logic [15:0] r [4];
    int p;
    bit done;
    for (int i = 0; i < 1024; i++) mref[i] = mem0[i];
    for (int i = 0; i < 4; i++) r[i] = '0;
    p = 0; ref_retired = 0; done = 0;
    while (!done && ref_retired < 100000) begin
      logic [17:0] ins;
      logic [1:0] grp, rd, rs1, rs2;
      logic [3:0] fn;
      logic [9:0] imm;
      ins = prog[p];
      grp = ins[17:16]; fn = ins[15:12]; rd = ins[11:10]; rs1 = ins[9:8]; rs2 = ins[7:6]; imm = ins[9:0];
      ref_retired++;
      p = (p + 1) % 1024;
      if (grp != 2'b11) begin
        int lw;
        lw = (grp == 2'b10) ? 4 : (grp == 2'b01) ? 8 : 16;
        if (fn >= 4'h1 && fn <= 4'h9) r[rd] = lane_alu(fn, lw, r[rs1], r[rs2]);
      end else begin
        case (fn)
          4'h0: r[rd] = 16'(imm);
          4'h1: r[rd] = mref[imm];
          4'h2: mref[imm] = r[rd];
          4'h3: r[rd] = mref[r[rs1][9:0]];
          4'h4: mref[r[rs1][9:0]] = r[rd];
          4'h5: p = int'(imm);
          4'h6: begin r[rd] = r[rd] - 16'd1; if (r[rd] != 0) p = int'(imm); end
          4'hF: done = 1;
          default: ;
        endcase
      end
    end
  endtask

  // ------------------------------------------------------ program builder
  task automatic build_program(input int run);
    int a;
    for (int i = 0; i < 1024; i++) prog[i] = enc_i(C_HALT, 0, 0);
    a = 0;
    // vector kernel: r3 = pointer, r0 = counter
    prog[a++] = enc_i(C_LDI, 3, 10'(VEC_BASE));
    prog[a++] = enc_i(C_LDI, 0, 10'(VEC_N));
    prog[a++] = {LANE_CTL, C_LDX, 2'd1, 2'd3, 8'd0};   // 2: r1 = m[r3]
    prog[a++] = enc_r(LANE_Q, F_MUL, 2, 1, 1);         // r2 = r1 * r1 (4-bit lanes)
    prog[a++] = enc_r(LANE_O, F_ADD, 2, 2, 1);         // r2 += r1 (8-bit lanes)
    prog[a++] = enc_r(LANE_H, F_SHR, 1, 2, 1);         // r1 = r2 >> r1[3:0]
    prog[a++] = enc_r(LANE_H, F_XOR, 2, 2, 1);         // r2 ^= r1
    prog[a++] = {LANE_CTL, C_STX, 2'd2, 2'd3, 8'd0};   // m[r3] = r2
    prog[a++] = enc_i(C_LDI, 1, 1);
    prog[a++] = enc_r(LANE_H, F_ADD, 3, 3, 1);         // r3++
    prog[a++] = enc_i(C_LOOP, 0, 2);
    // random straight-line part
    for (int k = 0; k < RND_LEN; k++) begin
      int kind;
      kind = $urandom_range(0, 19);
      if (kind < 14) begin
        lane_e ln;
        ln = lane_e'($urandom_range(0, 2));
        prog[a++] = {ln, 4'($urandom_range(0, 9)), 2'($urandom), 2'($urandom), 2'($urandom), 6'd0};
      end else if (kind < 16) begin
        prog[a++] = enc_i(C_LDI, 2'($urandom), 10'($urandom));
      end else if (kind < 17) begin
        prog[a++] = enc_i(C_LD, 2'($urandom), 10'($urandom_range(VEC_BASE, VEC_BASE + 127)));
      end else if (kind < 18) begin
        prog[a++] = enc_i(C_ST, 2'($urandom), 10'($urandom_range(512, 639)));
      end else if (kind < 19) begin
        prog[a++] = {2'($urandom_range(0, 2)), 4'($urandom_range(10, 15)), 12'($urandom)};  // undefined: no-op
      end else begin
        prog[a++] = {LANE_CTL, 4'($urandom_range(7, 14)), 12'($urandom)};                // undefined: no-op
      end
    end
    for (int i = 0; i < 4; i++) prog[a++] = enc_i(C_ST, 2'(i), 10'(700 + 4 * run + i));
    prog[a] = enc_i(C_JMP, 0, 10'(a + 2)); a++;
    prog[a++] = enc_i(C_ST, 0, 10'(900));               // must be skipped
    prog[a++] = enc_i(C_HALT, 0, 0);
  endtask

  // ------------------------------------------------------ mechanism counters
  // observed on the design: the decoded instruction as it reaches WB
  int n_alu [3][10];        // [lane H/O/Q][function 0..9]
  int n_ldi, n_ld, n_st, n_ldx, n_stx, n_jmp, n_loop_taken, n_loop_exit, n_halt, n_nop;
  int n_ralu_2clk;

  always @(posedge clk) begin
    if (rst_n && dut.u_core.phase == 3'd4) begin   // WB
      automatic dec_t d = dut.u_core.dec_q;
      if (d.use_alu && !d.use_imm && !d.is_loop)
        n_alu[d.lane][int'(d.alu_op) + 1]++;
      if (d.use_imm) n_ldi++;
      if (d.is_load && !d.indexed) n_ld++;
      if (d.is_load && d.indexed) n_ldx++;
      if (d.is_store && !d.indexed) n_st++;
      if (d.is_store && d.indexed) n_stx++;
      if (d.is_jmp) n_jmp++;
      if (d.is_loop && dut.u_core.pc_next_q == d.imm) n_loop_taken++;
      if (d.is_loop && dut.u_core.pc_next_q != d.imm) n_loop_exit++;
      if (d.is_halt) n_halt++;
      if (!d.use_alu && !d.is_load && !d.is_store && !d.is_jmp && !d.is_halt) n_nop++;
    end
    // the RALU's shadow register is written exactly two clocks after its operands are loaded
    if (rst_n && dut.u_core.u_ralu.valid && $past(dut.u_core.u_ralu.load, 2)) n_ralu_2clk++;
  end

  // ------------------------------------------------------ host port helpers
  task automatic host_write(input int ad, input logic [15:0] v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_addr = 10'(ad); host_wdata = v;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int ad, output logic [15:0] v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_addr = 10'(ad);
    @(negedge clk);
    host_en = 0;
    v = host_rdata;
  endtask

  initial begin
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    host_en = 0; host_we = 0; host_addr = 0; host_wdata = 0;
    for (int r = 0; r < RUNS; r++) begin
      int cycles, bad;
      build_program(r);
      for (int i = 0; i < 1024; i++) mem0[i] = 16'($urandom);
      run_reference();
      // load program and data while the core is in reset
      rst_n = 0;
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk);
        prog_we = 1; prog_addr = 10'(i); prog_data = prog[i];
      end
      @(negedge clk);
      prog_we = 0;
      for (int i = 0; i < 1024; i++) host_write(i, mem0[i]);
      @(negedge clk) rst_n = 1;
      cycles = 0;
      while (!halted && cycles < 200000) begin
        @(posedge clk);
        cycles++;
        #1;
      end
      checks++;
      if (retired != 32'(ref_retired) || cycles != 5 * ref_retired) begin
        failures++;
        $display("FAIL run %0d: retired %0d exp %0d, cycles %0d exp %0d", r, retired, ref_retired,
                 cycles, 5 * ref_retired);
      end
      bad = 0;
      for (int i = 0; i < 1024; i++) begin
        logic [15:0] v;
        host_read(i, v);
        checks++;
        if (v !== mref[i]) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL run %0d: m[%0d] = %h exp %h", r, i, v, mref[i]);
        end
      end
      $display("run %0d: %0d instructions, %0d clocks", r, retired, cycles);
    end

    // every mechanism must have happened
    for (int l = 0; l < 3; l++)
      for (int f = 1; f < 10; f++) begin
        checks++;
        if (n_alu[l][f] == 0) begin failures++; $display("FAIL never ran ALU function %0d in lane mode %0d", f, l); end
      end
    begin
      int cnt [12];
      string nm [12];
      cnt = '{n_ldi, n_ld, n_st, n_ldx, n_stx, n_jmp, n_loop_taken, n_loop_exit, n_halt, n_nop, n_ralu_2clk, n_alu[2][3]};
      nm  = '{"LDI", "LD", "ST", "LDX", "STX", "JMP", "LOOP taken", "LOOP exit", "HALT", "no-op",
              "RALU two-clock op", "Q-lane MUL"};
      for (int i = 0; i < 12; i++) begin
        checks++;
        $display("mechanism %-18s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
