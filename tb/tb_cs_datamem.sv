// Self-checking testbench of the data memory: the nibble-swapped initial
// contents after reset (M($7A) = $A7 and so on), the read drive flag, and
// random writes and reads against an array model.
module tb_cs_datamem;
  logic       clk = 0, rst, we, re, d_drive;
  logic [7:0] addr, din, dout;
  logic [7:0] model [256];
  int         checks = 0, failures = 0;

  cs_datamem #(.W(8), .AW(8)) dut (.*);

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
    rst = 1; we = 0; re = 0; addr = 0; din = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // examples of the initial-value rule
    addr = 8'h7A; #1; check(dout, 8'hA7, "M($7A)");
    addr = 8'h00; #1; check(dout, 8'h00, "M($00)");
    addr = 8'h07; #1; check(dout, 8'h70, "M($07)");
    addr = 8'h12; #1; check(dout, 8'h21, "M($12)");
    addr = 8'hFE; #1; check(dout, 8'hEF, "M($FE)");
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'((i % 16) * 16 + i / 16);
      addr = 8'(i); #1;
      check(dout, model[i], $sformatf("initial M(%02h)", i));
    end
    re = 1; #1; check(8'(d_drive), 8'd1, "drives D while R");
    re = 0; #1; check(8'(d_drive), 8'd0, "releases D otherwise");
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); re = !we; addr = 8'($urandom); din = 8'($urandom);
      #1;
      check(dout, model[addr], "read");
      @(negedge clk);
      if (we) model[addr] = din;
      check(dout, model[addr], "after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
