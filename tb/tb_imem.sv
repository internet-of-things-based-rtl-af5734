// tb_imem: instruction RAM load port and one-clock fetch port.
// Every word is loaded with a pattern derived from its address, then read
// back in random order: the word must appear one clock after the address and
// hold while rd_en is low.
module tb_imem;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rd_en, wr_en;
  logic [9:0]  rd_addr, wr_addr;
  logic [17:0] rd_data, wr_data;

  imem dut (.clk(clk), .rd_en(rd_en), .rd_addr(rd_addr), .rd_data(rd_data),
            .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  function automatic logic [17:0] pat(input logic [9:0] ad);
    return {ad[7:0], ~ad} ^ 18'h2A5A5;
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(i); wr_data = pat(10'(i));
    end
    @(negedge clk);
    wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [9:0] ad;
      ad = 10'($urandom);
      @(negedge clk);
      rd_en = 1; rd_addr = ad;
      @(negedge clk);
      rd_en = 0; rd_addr = ~ad;
      checks++;
      if (rd_data !== pat(ad)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", ad, rd_data, pat(ad));
      end
      @(negedge clk);
      checks++;
      if (rd_data !== pat(ad)) begin failures++; $display("FAIL hold addr %0d", ad); end
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
