// Self-checking testbench of the stack pointer: reset to $FF, then random
// load, increment and decrement commands against a model.
module tb_cs_sp;
  logic       clk = 0, rst, ld, inc, dec;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  cs_sp #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 0; inc = 0; dec = 0; d = 0;
    @(negedge clk);
    rst = 0;
    model = 8'hFF;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL SP = %02h, expected %02h", q, model);
      end
      ld = ($urandom_range(20) == 0); inc = 1'($urandom); dec = 1'($urandom);
      d = 8'($urandom);
      @(negedge clk);
      if (ld) model = d;
      else if (inc) model = model + 1;
      else if (dec) model = model - 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
