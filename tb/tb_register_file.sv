// tb_register_file: reset, writes and both read ports of the register file.
// A shadow array in the testbench tracks what every register should hold;
// random writes and random reads on both ports are compared against it.
module tb_register_file;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, we;
  logic [1:0]  ra_idx, rb_idx, wr_idx;
  logic [15:0] ra_data, rb_data, wr_data;
  logic [15:0] model [4];

  register_file dut (.clk(clk), .rst_n(rst_n), .ra_idx(ra_idx), .rb_idx(rb_idx),
                     .ra_data(ra_data), .rb_data(rb_data), .we(we), .wr_idx(wr_idx),
                     .wr_data(wr_data));

  initial begin
    rst_n = 0; we = 0; ra_idx = 0; rb_idx = 0; wr_idx = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      model[i] = '0;
      ra_idx = 2'(i); rb_idx = 2'(3 - i);
      #1;
      checks++;
      if (ra_data !== 16'h0 || rb_data !== 16'h0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wr_idx = 2'($urandom); wr_data = 16'($urandom);
      ra_idx = 2'($urandom); rb_idx = 2'($urandom);
      #1;
      checks++;
      if (ra_data !== model[ra_idx] || rb_data !== model[rb_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL read r%0d=%h r%0d=%h", ra_idx, ra_data, rb_idx, rb_data);
      end
      @(posedge clk);
      if (we) model[wr_idx] = wr_data;
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
