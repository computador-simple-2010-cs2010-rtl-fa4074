// Self-checking testbench of the register file: the reset values Rk = 10*k,
// then random writes and reads on both ports against an array model,
// including a read of the register being written in the same cycle.
module tb_cs_regfile;
  logic       clk = 0, rst, we;
  logic [2:0] sa, sb, sw;
  logic [7:0] a, b, din;
  logic [7:0] model [8];
  int         checks = 0, failures = 0;

  cs_regfile #(.W(8), .NREG(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %02h, expected %02h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; sa = 0; sb = 0; sw = 0; din = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int k = 0; k < 8; k++) model[k] = 8'(10 * k);
    for (int k = 0; k < 8; k++) begin
      sa = 3'(k); sb = 3'(7 - k);
      #1;
      check(a, 8'(10 * k), "reset value on A");
      check(b, 8'(10 * (7 - k)), "reset value on B");
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); sw = 3'($urandom); din = 8'($urandom);
      sa = 3'($urandom); sb = 3'($urandom);
      #1;
      check(a, model[sa], "port A before the edge");
      check(b, model[sb], "port B before the edge");
      @(negedge clk);
      if (we) model[sw] = din;
      check(a, model[sa], "port A after the edge");
      check(b, model[sb], "port B after the edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
