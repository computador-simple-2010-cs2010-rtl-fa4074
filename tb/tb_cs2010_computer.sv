// Self-checking testbench of the CS2010 computer.
//
// A directed program uses every instruction (all branch conditions taken and
// not taken, CALL/RET, the four memory moves, shifts, flag instructions, an
// unused operation code); then random straight-line programs with forward
// branches and jumps are run. After each program the registers, the whole
// data memory, PC, SP, flags, the number of instructions fetched and the
// clock cycles from START to STOP are compared with the reference model.
module tb_cs2010_computer;
  import cs_pkg::*;
  import cs2010_ref_pkg::*;

  logic        clk = 0;
  logic        rst, start, stop, ld_we, fetch;
  logic [7:0]  ld_addr, pc;
  logic [15:0] ld_data;
  flags_t      flags;
  int          checks = 0, failures = 0;
  int          cycles, fetches;
  logic        started;

  cs2010_computer dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) begin
      started <= 0; cycles <= 0; fetches <= 0;
    end else begin
      if (start) started <= 1;
      if (started && !stop) cycles <= cycles + 1;
      if (fetch) fetches <= fetches + 1;
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(Cs2010Model md);
    int exp_cycles = 0, exp_instr = 0, guard = 0;
    rst = 1; start = 0; ld_we = 0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      ld_we = 1; ld_addr = 8'(a); ld_data = md.code[a];
      @(negedge clk);
    end
    ld_we = 0;
    rst = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    md.reset();
    while (!md.halted && guard < 5000) begin
      exp_cycles += md.step();
      exp_instr++;
      guard++;
    end
    while (!stop && guard < 100000) begin @(negedge clk); guard++; end
    check(stop, "STOP reached");
    for (int k = 0; k < 8; k++)
      check(dut.u_rf.regs[k] == md.r[k],
            $sformatf("R%0d = %02h, expected %02h", k, dut.u_rf.regs[k], md.r[k]));
    for (int a = 0; a < 256; a++)
      check(dut.u_memdat.mem[a] == md.m[a],
            $sformatf("M(%02h) = %02h, expected %02h", a, dut.u_memdat.mem[a], md.m[a]));
    check(flags == {md.v, md.n, md.z, md.c},
          $sformatf("VNZC = %04b, expected %04b", flags, {md.v, md.n, md.z, md.c}));
    check(pc == md.pc, $sformatf("PC = %02h, expected %02h", pc, md.pc));
    check(dut.u_sp.q == md.sp, $sformatf("SP = %02h, expected %02h", dut.u_sp.q, md.sp));
    check(fetches == exp_instr, $sformatf("%0d instructions, expected %0d", fetches, exp_instr));
    check(cycles == exp_cycles, $sformatf("%0d cycles, expected %0d", cycles, exp_cycles));
  endtask

  function automatic logic [15:0] rand_instr(int at);
    int rd = $urandom_range(7), rf = $urandom_range(7), imm = $urandom_range(255);
    case ($urandom_range(17))
      0:  return enc_a(ADD, rd, rf);
      1:  return enc_a(SUB, rd, rf);
      2:  return enc_a(CP, rd, rf);
      3:  return enc_a(MOV, rd, rf);
      4:  return enc_a(CLC, 0, 0);
      5:  return enc_a(SEC, 0, 0);
      6:  return enc_a(ROR, rd, 0);
      7:  return enc_a(ROL, rd, 0);
      8:  return enc_b(ADDI, rd, imm);
      9:  return enc_b(SUBI, rd, imm);
      10: return enc_b(CPI, rd, imm);
      11: return enc_b(LDI, rd, imm);
      12: return enc_a(ST, rd, rf);
      13: return enc_a(LD, rd, rf);
      14: return enc_b(STS, rd, imm);
      15: return enc_b(LDS, rd, imm);
      16: return enc_b(BR, $urandom_range(7), at + 2);
      default: return enc_b(JMP, 0, at + 2);
    endcase
  endfunction

  initial begin
    Cs2010Model md = new();
    logic [15:0] p [256];
    rst = 1; start = 0; ld_we = 0; ld_addr = 0; ld_data = 0;

    // directed program
    for (int a = 0; a < 256; a++) p[a] = enc_a(STOP, 0, 0);
    p[0]  = enc_b(LDI, 1, 8'h7F);
    p[1]  = enc_b(ADDI, 1, 1);          // 0x80: V=1 N=1
    p[2]  = enc_b(BR, 2, 4);            // BRVS taken
    p[4]  = enc_b(BR, 0, 3);            // BRZS not taken
    p[5]  = enc_b(CALL, 0, 30);
    p[6]  = enc_b(STS, 1, 8'h40);
    p[7]  = enc_b(LDI, 2, 8'h40);
    p[8]  = enc_a(LD, 3, 2);
    p[9]  = enc_a(ST, 5, 2);
    p[10] = enc_b(LDS, 4, 8'h40);
    p[11] = enc_a(CP, 4, 5);            // Z=1
    p[12] = enc_b(BR, 0, 14);           // BREQ taken
    p[14] = enc_b(LDI, 6, 5);
    p[15] = enc_b(CPI, 6, 9);           // 5-9: N=1 C=1 V=0
    p[16] = enc_b(BR, 3, 18);           // BRLT taken
    p[18] = enc_b(BR, 1, 20);           // BRCS taken
    p[20] = enc_a(SUB, 6, 7);
    p[21] = enc_b(SUBI, 7, 8'h80);      // 70+128: V=1
    p[22] = enc_a(MOV, 0, 7);
    p[23] = enc_b(JMP, 0, 25);
    p[25] = enc_b(BR, 4, 24);           // undefined condition: never taken
    p[26] = {5'h09, 11'h123};           // unused operation code: no operation
    p[27] = enc_a(ADD, 0, 1);
    p[28] = enc_b(BR, 1, 26);           // BRCS not taken after the carry clears
    p[30] = enc_a(ROL, 1, 0);
    p[31] = enc_a(ROR, 2, 0);
    p[32] = enc_a(SEC, 0, 0);
    p[33] = enc_a(ROL, 3, 0);
    p[34] = enc_a(CLC, 0, 0);
    p[35] = enc_a(ROR, 3, 0);
    p[36] = enc_a(RET, 0, 0);
    for (int a = 0; a < 256; a++) md.code[a] = p[a];
    run(md);
    check(md.n_call == 1 && md.n_ret == 1 && md.n_br_taken == 4 && md.n_br_not >= 2,
          "directed program took the planned path");

    // random programs
    for (int t = 0; t < 30; t++) begin
      for (int a = 0; a < 256; a++) md.code[a] = enc_a(STOP, 0, 0);
      for (int a = 0; a < 80; a++) md.code[a] = rand_instr(a);
      run(md);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
