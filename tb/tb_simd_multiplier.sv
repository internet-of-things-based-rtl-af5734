// tb_simd_multiplier: random check of the lane-wise multiplier.
// A 16-bit instance (the default) runs in Q, O and H mode and a 32-bit
// instance also in full-width mode (no mode bit). Every lane's expected
// result is the low lane-width bits of the integer product of the two lane
// values, computed lane by lane here. All-ones operands are mixed in to
// force the longest carries.
module tb_simd_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, p32;
  logic [15:0] p16;
  logic        q, o, h;

  simd_multiplier dut16 (.a(a[15:0]), .b(b[15:0]), .q(q), .o(o), .h(h), .p(p16));
  simd_multiplier #(.WIDTH(32)) dut32 (.a(a), .b(b), .q(q), .o(o), .h(h), .p(p32));

  task automatic check(input int w, input int lw, input logic [31:0] got);
    logic [31:0] e;
    e = '0;
    for (int base = 0; base < w; base += lw) begin
      longint unsigned la, lb, pr, mask;
      mask = (64'd1 << lw) - 1;
      la = (longint'(a) >> base) & mask;
      lb = (longint'(b) >> base) & mask;
      pr = la * lb;
      for (int i = 0; i < lw; i++) e[base + i] = pr[i];
    end
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d lw=%0d a=%h b=%h p=%h exp %h", w, lw, a, b, got, e);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int md;
      md = n % 4;
      q = (md == 0); o = (md == 1); h = (md == 2);
      a = $urandom; b = $urandom;
      if (n % 9 == 0) a = '1;
      if (n % 10 == 0) b = '1;
      #1;
      if (md != 3) check(16, (md == 0) ? 4 : (md == 1) ? 8 : 16, {16'b0, p16});
      check(32, (md == 0) ? 4 : (md == 1) ? 8 : (md == 2) ? 16 : 32, p32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
