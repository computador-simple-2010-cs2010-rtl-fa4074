// Self-checking testbench of the code memory: fill all words through the
// load port, then read them back in random order on the program-counter
// port, and overwrite a few while reading others.
module tb_cs_codemem;
  logic        clk = 0, ld_we;
  logic [7:0]  addr, ld_addr;
  logic [15:0] code, ld_data;
  logic [15:0] model [256];
  int          checks = 0, failures = 0;

  cs_codemem #(.W(16), .AW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_we = 0; addr = 0; ld_addr = 0; ld_data = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 8'(i); ld_data = 16'($urandom); model[i] = ld_data;
    end
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      ld_we = 1'($urandom_range(3) == 0); ld_addr = 8'($urandom); ld_data = 16'($urandom);
      addr = 8'($urandom);
      #1;
      checks++;
      if (code !== model[addr]) begin
        failures++;
        $display("FAIL code(%02h) = %04h, expected %04h", addr, code, model[addr]);
      end
      @(negedge clk);
      if (ld_we) model[ld_addr] = ld_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
