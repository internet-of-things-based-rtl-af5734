// tb_simd_core: the core running a hand-worked program.
// The two block RAMs are modelled here as plain arrays with one-clock reads.
// The program exercises immediate loads, lane-wise adds in H and Q mode, a
// counted LOOP, direct and indexed loads and stores, an O-mode subtract and
// a JMP over an instruction that must not run. Expected memory words were
// worked out by hand (see the comments). The core must retire 20
// instructions and halt exactly 100 clocks (five per instruction) after reset.
module tb_simd_core;
  import simd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic        imem_en, dmem_en, dmem_we, halted;
  logic [9:0]  imem_addr, dmem_addr, pc;
  logic [17:0] imem_rdata;
  logic [15:0] dmem_wdata, dmem_rdata;
  logic [31:0] retired;

  logic [17:0] irom [32];
  logic [15:0] dram [32];

  simd_core dut (.clk(clk), .rst_n(rst_n), .imem_en(imem_en), .imem_addr(imem_addr),
                 .imem_rdata(imem_rdata), .dmem_en(dmem_en), .dmem_we(dmem_we),
                 .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
                 .halted(halted), .pc(pc), .retired(retired));

  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= irom[imem_addr[4:0]];
    if (dmem_en) begin
      dmem_rdata <= dram[dmem_addr[4:0]];
      if (dmem_we) dram[dmem_addr[4:0]] <= dmem_wdata;
    end
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    int cycles;
    for (int i = 0; i < 32; i++) begin irom[i] = enc_i(C_HALT, 0, 0); dram[i] = 16'hDEAD; end
    irom[0]  = enc_i(C_LDI, 0, 10'h123);             // r0 = 0123
    irom[1]  = enc_i(C_LDI, 1, 10'h0FF);             // r1 = 00FF
    irom[2]  = enc_r(LANE_H, F_ADD, 2, 0, 1);        // r2 = 0222
    irom[3]  = enc_r(LANE_Q, F_ADD, 3, 0, 1);        // nibbles 0+0,1+0,2+F,3+F -> 0112
    irom[4]  = enc_i(C_ST, 3, 10);                   // m[10] = 0112
    irom[5]  = enc_i(C_LDI, 0, 3);                   // r0 = 3 (loop count)
    irom[6]  = enc_r(LANE_H, F_ADD, 2, 2, 1);        // r2 += 00FF, three times -> 051F
    irom[7]  = enc_i(C_LOOP, 0, 6);                  // r0--, back to 6 while r0 != 0
    irom[8]  = enc_i(C_ST, 2, 11);                   // m[11] = 051F
    irom[9]  = enc_i(C_LD, 1, 10);                   // r1 = 0112
    irom[10] = enc_i(C_LDI, 3, 11);                  // r3 = 11
    irom[11] = {LANE_CTL, C_LDX, 2'd0, 2'd3, 8'd0};  // r0 = m[r3] = 051F
    irom[12] = enc_r(LANE_O, F_SUB, 2, 0, 1);        // bytes 05-01, 1F-12 -> 040D
    irom[13] = {LANE_CTL, C_STX, 2'd2, 2'd3, 8'd0};  // m[r3] = 040D
    irom[14] = enc_i(C_JMP, 0, 16);
    irom[15] = enc_i(C_ST, 0, 12);                   // skipped
    irom[16] = enc_i(C_HALT, 0, 0);

    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    expect_eq("pc after reset", 32'(pc), 0);
    cycles = 0;
    while (!halted && cycles < 1000) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    expect_eq("cycles to halt", cycles, 100);
    expect_eq("retired", retired, 20);
    expect_eq("pc at halt", 32'(pc), 16);
    expect_eq("m[10]", 32'(dram[10]), 32'h0112);
    expect_eq("m[11]", 32'(dram[11]), 32'h040D);
    expect_eq("m[12] untouched", 32'(dram[12]), 32'hDEAD);
    expect_eq("r0 after LOOP", 32'(dut.u_rf.regs[0]), 32'h051F);
    expect_eq("r2", 32'(dut.u_rf.regs[2]), 32'h040D);
    // halted is sticky
    repeat (10) @(posedge clk);
    #1;
    expect_eq("still halted", {31'b0, halted}, 1);
    expect_eq("retired unchanged", retired, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
