// tb_dmem: both ports of the data RAM.
// Random reads and writes on both ports are checked against a testbench copy
// of the memory: a read returns the word as it was before the same clock's
// write (read-first), one clock after the address; a word written on one
// port is read back on the other.
module tb_dmem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        a_en, a_we, b_en, b_we;
  logic [9:0]  a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [15:0] model [64];

  dmem dut (.clk(clk), .a_en(a_en), .a_we(a_we), .a_addr(a_addr), .a_wdata(a_wdata),
            .a_rdata(a_rdata), .b_en(b_en), .b_we(b_we), .b_addr(b_addr),
            .b_wdata(b_wdata), .b_rdata(b_rdata));

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill the tested window (the top 64 words) through port B
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 10'(960 + i); b_wdata = 16'($urandom);
      model[i] = b_wdata;
    end
    @(negedge clk);
    b_en = 0; b_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [5:0]  ia, ib;
      logic [15:0] ea, eb;
      logic        rda, rdb;
      ia = 6'($urandom); ib = 6'($urandom);
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); a_addr = 10'(960 + ia); a_wdata = 16'($urandom);
      b_en = 1; b_we = 1'($urandom); b_addr = 10'(960 + ib); b_wdata = 16'($urandom);
      if (a_we && b_we && ia == ib) a_we = 0;   // no same-word double write
      ea = model[ia]; eb = model[ib];
      rda = 1; rdb = 1;
      @(posedge clk);
      if (a_we) model[ia] = a_wdata;
      if (b_we) model[ib] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      checks++;
      if ((rda && a_rdata !== ea) || (rdb && b_rdata !== eb)) begin
        failures++;
        if (failures < 10) $display("FAIL a[%0d]=%h exp %h b[%0d]=%h exp %h", ia, a_rdata, ea, ib, b_rdata, eb);
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
