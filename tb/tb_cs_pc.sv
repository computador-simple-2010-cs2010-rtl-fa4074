// Self-checking testbench of the program counter: random clear, load and
// increment commands (including the wrap from $FF to 0) against a model.
module tb_cs_pc;
  logic       clk = 0, rst, cl, wr, inc;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  cs_pc #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cl = 0; wr = 0; inc = 0; d = 0;
    @(negedge clk);
    rst = 0;
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL PC = %02h, expected %02h", q, model);
      end
      cl = ($urandom_range(40) == 0); wr = ($urandom_range(10) == 0);
      inc = 1'($urandom); d = 8'($urandom);
      @(negedge clk);
      if (cl) model = 0;
      else if (wr) model = d;
      else if (inc) model = model + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
