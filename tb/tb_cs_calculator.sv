// Self-checking testbench of the register-file calculator: reset values,
// then random operations R[D] <- R[D] op R[F] (with and without W) against
// an array model, including D = F.
module tb_cs_calculator;
  logic       clk = 0, rst, we;
  logic [2:0] d, f;
  logic [1:0] p;
  logic [7:0] a, b;
  logic [7:0] model [8];
  int         checks = 0, failures = 0;

  cs_calculator #(.W(8)) dut (.*);

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
    rst = 1; we = 0; d = 0; f = 0; p = 0;
    @(negedge clk);
    rst = 0;
    for (int k = 0; k < 8; k++) model[k] = 8'(10 * k);
    for (int i = 0; i < 4000; i++) begin
      d = 3'($urandom); f = 3'($urandom); p = 2'($urandom); we = ($urandom_range(3) != 0);
      #1;
      check(a, model[d], "R[D]");
      check(b, model[f], "R[F]");
      @(negedge clk);
      if (we) begin
        case (p)
          2'b00: model[d] = model[d] + model[f];
          2'b01: model[d] = model[d];
          2'b10: model[d] = model[d] - model[f];
          default: model[d] = model[f];
        endcase
      end
    end
    for (int k = 0; k < 8; k++) begin
      d = 3'(k); #1;
      check(a, model[k], $sformatf("final R%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
