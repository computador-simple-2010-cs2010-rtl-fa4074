// Self-checking testbench of the 2-bit-controlled ALU: every control code
// with every pair of 8-bit operands.
module tb_cs2_alu;
  logic [7:0] ia, ib, out;
  logic [1:0] c;
  int         checks = 0, failures = 0;
  logic [7:0] e;

  cs2_alu #(.W(8)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          c = 2'(k); ia = 8'(x); ib = 8'(y);
          #1;
          case (k)
            0: e = 8'((x + y) % 256);
            1: e = 8'(x);
            2: e = 8'((x - y + 256) % 256);
            default: e = 8'(y);
          endcase
          checks++;
          if (out !== e) begin
            failures++;
            if (failures < 10) $display("FAIL c=%0d %02h %02h -> %02h, expected %02h", k, x, y, out, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
