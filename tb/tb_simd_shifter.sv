// tb_simd_shifter: random check of the lane-wise shifter.
// The expected value is built bit by bit: output bit i of a lane takes input
// bit i - s (left) or i + s (right) of the same lane, or a zero / the lane's
// sign bit when that position falls outside the lane; s = shamt mod lane width.
module tb_simd_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [15:0] a, y;
  logic [3:0]  shamt;
  logic        dir_right, arith, q, o, h;

  simd_shifter dut (.a(a), .shamt(shamt), .dir_right(dir_right), .arith(arith),
                    .q(q), .o(o), .h(h), .y(y));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int md, lw, s;
      logic [15:0] e;
      md = n % 3;
      q = (md == 0); o = (md == 1); h = (md == 2);
      lw = (md == 0) ? 4 : (md == 1) ? 8 : 16;
      a = 16'($urandom); shamt = 4'($urandom);
      dir_right = 1'($urandom); arith = 1'($urandom);
      #1;
      s = int'(shamt) % lw;
      for (int base = 0; base < 16; base += lw) begin
        for (int k = 0; k < lw; k++) begin
          int src;
          src = dir_right ? k + s : k - s;
          if (src >= 0 && src < lw) e[base + k] = a[base + src];
          else if (dir_right && arith) e[base + k] = a[base + lw - 1];
          else e[base + k] = 1'b0;
        end
      end
      checks++;
      if (y != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL lw=%0d a=%h s=%0d r=%b ar=%b y=%h exp %h", lw, a, shamt, dir_right, arith, y, e);
      end
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
