// tb_lsu: address generation and data RAM control of the load-store unit.
// The unit is driven through the EX clock (agu_en) and the MEM clock
// (mem_en) as the core does, with a small RAM model in the testbench that
// answers one clock later. Checks: the address is the immediate (direct) or
// the base register's low ten bits (indexed); enable and write enable are
// high only in MEM and only for a load or store; a store writes the held
// data; a load's word reaches ld_data one clock after MEM.
module tb_lsu;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n, agu_en, mem_en, is_load, is_store, indexed;
  logic [9:0]  imm, dmem_addr;
  logic [15:0] base, st_data, dmem_wdata, dmem_rdata, ld_data;
  logic        dmem_en, dmem_we;
  logic [15:0] ram [1024];

  lsu dut (.clk(clk), .rst_n(rst_n), .agu_en(agu_en), .mem_en(mem_en), .is_load(is_load),
           .is_store(is_store), .indexed(indexed), .imm(imm), .base(base), .st_data(st_data),
           .dmem_en(dmem_en), .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata),
           .dmem_rdata(dmem_rdata), .ld_data(ld_data));

  always_ff @(posedge clk) begin
    if (dmem_en) begin
      dmem_rdata <= ram[dmem_addr];
      if (dmem_we) ram[dmem_addr] <= dmem_wdata;
    end
  end

  initial begin
    for (int i = 0; i < 1024; i++) ram[i] = 16'(i * 7 + 3);
    rst_n = 0; agu_en = 0; mem_en = 0; is_load = 0; is_store = 0; indexed = 0;
    imm = 0; base = 0; st_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      logic [9:0]  ea;
      logic [15:0] exp_ld;
      int kind;
      kind = $urandom_range(0, 2);     // 0 load, 1 store, 2 neither
      @(negedge clk);
      is_load = (kind == 0); is_store = (kind == 1); indexed = 1'($urandom);
      imm = 10'($urandom); base = 16'($urandom); st_data = 16'($urandom);
      ea = indexed ? base[9:0] : imm;
      agu_en = 1;                                   // EX
      #1;
      checks++;
      if (dmem_en || dmem_we) begin failures++; $display("FAIL RAM access outside MEM"); end
      @(negedge clk);
      agu_en = 0; mem_en = 1;                       // MEM
      is_load = 0; is_store = 0; imm = ~imm; base = ~base;   // inputs must be held
      exp_ld = ram[ea];
      #1;
      checks++;
      if (dmem_en !== (kind != 2) || dmem_we !== (kind == 1) || (kind != 2 && dmem_addr !== ea)
          || (kind == 1 && dmem_wdata !== st_data)) begin
        failures++;
        if (failures < 10) $display("FAIL kind=%0d en=%b we=%b addr=%0d exp %0d", kind, dmem_en, dmem_we, dmem_addr, ea);
      end
      @(negedge clk);
      mem_en = 0;                                   // WB
      if (kind == 0) begin
        checks++;
        if (ld_data !== exp_ld) begin
          failures++;
          if (failures < 10) $display("FAIL load %0d got %h exp %h", ea, ld_data, exp_ld);
        end
      end
      if (kind == 1) begin
        checks++;
        if (ram[ea] !== st_data) begin failures++; $display("FAIL store %0d", ea); end
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
