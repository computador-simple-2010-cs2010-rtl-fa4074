// Self-checking testbench of the CS2010 ALU: all 16 operation codes with
// random operands and random input flags, plus corner cases, against an
// integer reference of the ALU table.
module tb_cs2010_alu;
  import cs_pkg::*;

  logic [7:0] a, b, result;
  logic [3:0] op;
  flags_t     s_in, s_out;
  int         checks = 0, failures = 0;

  cs2010_alu dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic [7:0] r, flags_t f);
    checks++;
    if (result !== r || s_out !== f) begin
      failures++;
      $display("FAIL op=%04b a=%02h b=%02h in=%04b: got %02h %04b, expected %02h %04b",
               op, a, b, s_in, result, s_out, r, f);
    end
  endtask

  task automatic one(logic [3:0] o, logic [7:0] x, logic [7:0] y, flags_t f);
    int sx, sy, full;
    logic [7:0] r;
    flags_t e;
    op = o; a = x; b = y; s_in = f;
    #1;
    sx = x > 127 ? int'(x) - 256 : int'(x);
    sy = y > 127 ? int'(y) - 256 : int'(y);
    e = f;
    r = x;
    if (o[3:2] == 2'b00) begin
      e.c = o[0];
    end else if (o == 4'b0100) begin
      r = {f.c, x[7:1]}; e.v = f.c ^ x[7]; e.c = x[0];
    end else if (o == 4'b0101) begin
      r = {x[6:0], f.c}; e.v = x[7] ^ x[6]; e.c = x[7];
    end else if (o[3:1] == 3'b011) begin
      r = x;
    end else if (o[3:1] == 3'b100) begin
      full = int'(x) + int'(y);
      r = 8'(full); e.c = full > 255; e.v = (sx + sy > 127) || (sx + sy < -128);
    end else if (o[3:1] == 3'b101) begin
      full = int'(x) - int'(y);
      r = 8'(full); e.c = x < y; e.v = (sx - sy > 127) || (sx - sy < -128);
    end else begin
      r = y;
    end
    if (o[3:2] == 2'b01 || o[3:2] == 2'b10) begin
      e.n = r[7]; e.z = (r == 0);
    end
    expect_out(r, e);
  endtask

  initial begin
    // corner cases
    one(4'b1000, 8'h7F, 8'h01, 4'b0000);   // overflow to 0x80
    one(4'b1000, 8'hFF, 8'h01, 4'b0000);   // carry, zero
    one(4'b1010, 8'h00, 8'h01, 4'b0000);   // borrow
    one(4'b1010, 8'h80, 8'h01, 4'b0000);   // overflow to 0x7F
    one(4'b0100, 8'h01, 8'h00, 4'b0001);   // SHR with C_in
    one(4'b0101, 8'h40, 8'h00, 4'b0000);   // SHL, V = A7^A6
    for (int i = 0; i < 20000; i++)
      one(4'($urandom), 8'($urandom), 8'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
