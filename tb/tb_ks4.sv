// tb_ks4: exhaustive check of the 4-bit Kogge-Stone unit.
// All 512 combinations of a, b and cin are applied; sum and carry out are
// compared with the integer sum a + b + cin.
module tb_ks4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  ks4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int i = 0; i < 512; i++) begin
      int unsigned ref_sum;
      {cin, a, b} = 9'(i);
      #1;
      ref_sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== 5'(ref_sum)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, cin, cout, sum, ref_sum);
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
