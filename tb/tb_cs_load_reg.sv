// Self-checking testbench of the load-enabled register: reset value, hold
// and load with random enables and data.
module tb_cs_load_reg;
  logic       clk = 0, rst, we;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0;

  cs_load_reg #(.W(8), .RESET_VAL(8'h5A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; d = 8'hFF;
    @(negedge clk);
    model = 8'h5A;
    for (int i = 0; i < 3000; i++) begin
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL q = %02h, expected %02h", q, model);
      end
      rst = ($urandom_range(50) == 0); we = 1'($urandom); d = 8'($urandom);
      @(negedge clk);
      if (rst) model = 8'h5A;
      else if (we) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
