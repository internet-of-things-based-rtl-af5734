// tb_hybrid_adder: random check of the reconfigurable KS-CLA adder.
// A 16-bit instance (the default) and a 32-bit instance run with random
// operands, carry in and lane modes (Q, O, H, and none = one full-width
// lane). For every lane the expected sum is the integer sum of the lane
// values plus cin, and the expected carry out of every 4-bit unit is the
// carry out of the lane's bits up to that unit. Lane-boundary carries are
// forced by also using all-ones operands.
module tb_hybrid_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, s16, s32;
  logic [7:0]  c32;
  logic [3:0]  c16;
  logic        cin, q, o, h;

  hybrid_adder dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .q(q), .o(o), .h(h),
                      .sum(s16[15:0]), .cout(c16));
  hybrid_adder #(.WIDTH(32)) dut32 (.a(a), .b(b), .cin(cin), .q(q), .o(o), .h(h),
                      .sum(s32), .cout(c32));
  assign s16[31:16] = '0;

  // expected sum and unit carries for a width-w adder with lane width lw
  task automatic check(input int w, input int lw, input logic [31:0] got_s, input logic [7:0] got_c);
    logic [31:0] exp_s;
    logic [7:0]  exp_c;
    exp_s = '0;
    exp_c = '0;
    for (int base = 0; base < w; base += lw) begin
      longint unsigned la, lb, t;
      la = (longint'(a) >> base) & ((64'd1 << lw) - 1);
      lb = (longint'(b) >> base) & ((64'd1 << lw) - 1);
      t  = la + lb + longint'(cin);
      for (int i = 0; i < lw; i++) exp_s[base + i] = t[i];
      for (int u = 0; u < lw / 4; u++) begin
        longint unsigned m, tu;
        m  = (64'd1 << (4 * (u + 1))) - 1;
        tu = (la & m) + (lb & m) + longint'(cin);
        exp_c[base / 4 + u] = tu[4 * (u + 1)];
      end
    end
    checks++;
    if (got_s != exp_s || ((got_c ^ exp_c) & 8'((1 << (w / 4)) - 1)) != 0) begin
      failures++;
      if (failures < 10)
        $display("FAIL w=%0d lw=%0d a=%h b=%h cin=%b sum=%h exp %h cout=%b exp %b",
                 w, lw, a, b, cin, got_s, exp_s, got_c, exp_c);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int md;
      md = n % 4;
      q = (md == 0); o = (md == 1); h = (md == 2);
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (n % 7 == 0) begin a = '1; b = 32'h1; end        // carries through every unit
      if (n % 11 == 0) begin b = ~a; cin = 1'b1; end      // exact wrap of every lane
      #1;
      check(16, (md == 0) ? 4 : (md == 1) ? 8 : 16, s16, {4'b0, c16});
      check(32, (md == 0) ? 4 : (md == 1) ? 8 : (md == 2) ? 16 : 32, s32, c32);
    end
    // several modes at once: the narrowest wins
    q = 1; o = 1; h = 1; a = 32'h8F8F_8F8F; b = 32'h0101_0101; cin = 0;
    #1;
    check(16, 4, s16, {4'b0, c16});
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
