// End-to-end testbench of the whole design at its default sizes.
//
// CS2010 runs a small program: it adds the eight bytes M($10)..M($17) (their
// initial values) into a 16-bit sum with a counted loop and carry
// propagation, doubles the sum in a subroutine with ROL through the carry,
// stores it with STS and ST, then forces a signed overflow and a signed
// less-than and ends on STOP. CS2 runs a copy-and-add program over memory,
// and the calculator executes a sequence of register operations, all at the
// same time. The final state of each machine is compared with reference
// models, and each mechanism of the design (taken and not-taken branches of
// every condition, JMP, CALL, RET, loads, stores, carry, overflow, zero,
// negative, shifts, flag instructions, an unused operation code, STOP; the
// CS2 instructions; every calculator operation) is counted; one that never
// happened counts as a failure.
module tb_cs_top;
  import cs_pkg::*;
  import cs2010_ref_pkg::*;

  logic        clk = 0, rst;
  logic        cs2010_start, cs2010_stop, cs2010_ld_we, cs2010_fetch;
  logic [7:0]  cs2010_ld_addr, cs2010_pc;
  logic [15:0] cs2010_ld_data;
  flags_t      cs2010_flags;
  logic        cs2_start, cs2_stop, cs2_ld_we, cs2_fetch;
  logic [7:0]  cs2_ld_addr, cs2_pc;
  logic [13:0] cs2_ld_data;
  logic [2:0]  calc_d, calc_f;
  logic [1:0]  calc_p;
  logic        calc_we;
  logic [7:0]  calc_a, calc_b;

  int checks = 0, failures = 0;

  cs_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
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

  // ---- mechanism counters, from the design's own signals ---------------
  typedef enum int {
    M_BR_TAKEN, M_BR_NOT, M_BR_Z, M_BR_C, M_BR_V, M_BR_LT, M_JMP, M_CALL, M_RET,
    M_LOAD, M_STORE, M_CARRY, M_OVERFLOW, M_ZERO, M_NEGATIVE, M_SHIFT, M_FLAGOP,
    M_UNUSED, M_STOP, M_CS2_ALU, M_CS2_LOAD, M_CS2_STORE, M_CS2_STOP,
    M_CALC_ADD, M_CALC_PASA, M_CALC_SUB, M_CALC_PASB, M_COUNT
  } mech_e;
  int unsigned mech [M_COUNT];
  logic        cs2010_prev_fetch;

  ctrl_t      c10, c2;
  logic [4:0] cop10;
  flags_t     sout10;
  assign c10    = dut.u_cs2010.ctrl;
  assign cop10  = dut.u_cs2010.ir[15:11];
  assign sout10 = dut.u_cs2010.s_out;
  assign c2     = dut.u_cs2.ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      foreach (mech[i]) mech[i] <= 0;
      cs2010_prev_fetch <= 0;
    end else begin
      cs2010_prev_fetch <= cs2010_fetch;
      if (cop10 == COP_BR && c10.w_pc) begin
        mech[M_BR_TAKEN] <= mech[M_BR_TAKEN] + 1;
        case (dut.u_cs2010.ir[10:8])
          3'd0: mech[M_BR_Z]  <= mech[M_BR_Z] + 1;
          3'd1: mech[M_BR_C]  <= mech[M_BR_C] + 1;
          3'd2: mech[M_BR_V]  <= mech[M_BR_V] + 1;
          3'd3: mech[M_BR_LT] <= mech[M_BR_LT] + 1;
          default: ;
        endcase
      end
      if (cs2010_prev_fetch && cop10 == COP_BR && !c10.w_ac) mech[M_BR_NOT] <= mech[M_BR_NOT] + 1;
      if (cop10 == COP_JMP && c10.w_pc) mech[M_JMP]   <= mech[M_JMP] + 1;
      if (c10.d_sp)                     mech[M_CALL]  <= mech[M_CALL] + 1;
      if (c10.i_sp)                     mech[M_RET]   <= mech[M_RET] + 1;
      if (c10.r_mem)                    mech[M_LOAD]  <= mech[M_LOAD] + 1;
      if (c10.w_mem)                    mech[M_STORE] <= mech[M_STORE] + 1;
      if (c10.w_s && sout10.c && !(cop10 inside {COP_SEC})) mech[M_CARRY] <= mech[M_CARRY] + 1;
      if (c10.w_s && sout10.v)          mech[M_OVERFLOW] <= mech[M_OVERFLOW] + 1;
      if (c10.w_s && sout10.z)          mech[M_ZERO]     <= mech[M_ZERO] + 1;
      if (c10.w_s && sout10.n)          mech[M_NEGATIVE] <= mech[M_NEGATIVE] + 1;
      if (c10.w_s && c10.op[3:1] == 3'b010) mech[M_SHIFT]  <= mech[M_SHIFT] + 1;
      if (c10.w_s && c10.op[3:2] == 2'b00)  mech[M_FLAGOP] <= mech[M_FLAGOP] + 1;
      if (cs2010_prev_fetch && cop10 == 5'h09) mech[M_UNUSED] <= mech[M_UNUSED] + 1;
      if (cs2010_stop && !$past(cs2010_stop)) mech[M_STOP] <= mech[M_STOP] + 1;
      if (c2.w_ac && c2.op[1:0] != 2'b11 && !c2.w_mar) mech[M_CS2_ALU] <= mech[M_CS2_ALU] + 1;
      if (c2.r_mem)                     mech[M_CS2_LOAD]  <= mech[M_CS2_LOAD] + 1;
      if (c2.w_mem)                     mech[M_CS2_STORE] <= mech[M_CS2_STORE] + 1;
      if (cs2_stop && !$past(cs2_stop)) mech[M_CS2_STOP]  <= mech[M_CS2_STOP] + 1;
      if (calc_we) begin
        case (calc_p)
          2'b00: mech[M_CALC_ADD]  <= mech[M_CALC_ADD] + 1;
          2'b01: mech[M_CALC_PASA] <= mech[M_CALC_PASA] + 1;
          2'b10: mech[M_CALC_SUB]  <= mech[M_CALC_SUB] + 1;
          default: mech[M_CALC_PASB] <= mech[M_CALC_PASB] + 1;
        endcase
      end
    end
  end

  initial begin
    Cs2010Model md = new();
    logic [15:0] p10 [256];
    logic [13:0] p2 [256];
    logic [7:0]  r2 [8];
    logic [7:0]  m2 [256];
    logic [7:0]  rc [8];
    int          cyc;
    mech_e       e;

    rst = 1;
    cs2010_start = 0; cs2010_ld_we = 0; cs2010_ld_addr = 0; cs2010_ld_data = 0;
    cs2_start = 0; cs2_ld_we = 0; cs2_ld_addr = 0; cs2_ld_data = 0;
    calc_d = 0; calc_f = 0; calc_p = 0; calc_we = 0;

    // CS2010 program
    for (int a = 0; a < 256; a++) p10[a] = enc_a(STOP, 0, 0);
    p10[0]  = enc_b(LDI, 1, 8'h10);     // pointer
    p10[1]  = enc_b(LDI, 2, 0);         // sum, low byte
    p10[2]  = enc_b(LDI, 3, 0);         // sum, high byte
    p10[3]  = enc_a(LD, 4, 1);          // loop: R4 <- M(R1)
    p10[4]  = enc_a(ADD, 2, 4);
    p10[5]  = enc_b(BR, 1, 7);          // BRCS: propagate carry
    p10[6]  = enc_b(JMP, 0, 8);
    p10[7]  = enc_b(ADDI, 3, 1);
    p10[8]  = enc_b(ADDI, 1, 1);
    p10[9]  = enc_b(CPI, 1, 8'h18);
    p10[10] = enc_b(BR, 0, 12);         // BREQ: loop done
    p10[11] = enc_b(JMP, 0, 3);
    p10[12] = enc_b(CALL, 0, 40);
    p10[13] = enc_b(STS, 2, 8'h80);
    p10[14] = enc_b(LDI, 5, 8'h81);
    p10[15] = enc_a(ST, 3, 5);
    p10[16] = enc_b(LDI, 6, 8'h70);
    p10[17] = enc_b(ADDI, 6, 8'h20);    // 0x90: signed overflow
    p10[18] = enc_b(BR, 2, 20);         // BRVS
    p10[20] = enc_b(CPI, 6, 8'h10);     // -112 < 16
    p10[21] = enc_b(BR, 3, 23);         // BRLT
    p10[23] = {5'h09, 11'h000};         // unused code
    p10[24] = enc_b(BR, 2, 22);         // BRVS not taken now
    p10[25] = enc_b(LDS, 7, 8'h80);
    p10[26] = enc_a(MOV, 0, 7);
    p10[27] = enc_a(SUB, 0, 2);         // zero
    p10[28] = enc_a(STOP, 0, 0);
    p10[40] = enc_a(CLC, 0, 0);
    p10[41] = enc_a(ROL, 2, 0);
    p10[42] = enc_a(ROL, 3, 0);
    p10[43] = enc_a(SEC, 0, 0);
    p10[44] = enc_a(ROR, 6, 0);
    p10[45] = enc_a(RET, 0, 0);

    // CS2 program: M($A0) <- M($13) + M($24), copies through a pointer
    for (int a = 0; a < 256; a++) p2[a] = {3'd7, 11'd0};
    p2[0] = {3'd3, 3'd1, 8'h13};        // LDS R1,$13
    p2[1] = {3'd3, 3'd2, 8'h24};        // LDS R2,$24
    p2[2] = {3'd4, 3'd1, 8'd2};         // ADD R1,R2
    p2[3] = {3'd2, 3'd1, 8'hA0};        // STS $A0,R1
    p2[4] = {3'd6, 3'd3, 8'd1};         // MOV R3,R1
    p2[5] = {3'd5, 3'd3, 8'd4};         // SUB R3,R4
    p2[6] = {3'd0, 3'd3, 8'd7};         // ST (R7),R3
    p2[7] = {3'd1, 3'd5, 8'd7};         // LD R5,(R7)

    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      cs2010_ld_we = 1; cs2010_ld_addr = 8'(a); cs2010_ld_data = p10[a];
      cs2_ld_we = 1; cs2_ld_addr = 8'(a); cs2_ld_data = p2[a];
      @(negedge clk);
    end
    cs2010_ld_we = 0; cs2_ld_we = 0;
    rst = 0;
    @(negedge clk);
    cs2010_start = 1; cs2_start = 1;
    @(negedge clk);
    cs2010_start = 0; cs2_start = 0;

    // calculator runs while the computers execute
    for (int k = 0; k < 8; k++) rc[k] = 8'(10 * k);
    for (int i = 0; i < 64; i++) begin
      calc_d = 3'(i); calc_f = 3'(i * 5 + 1); calc_p = 2'(i / 2); calc_we = i[0] | i[3];
      @(negedge clk);
      if (calc_we) begin
        case (calc_p)
          2'b00: rc[calc_d] = rc[calc_d] + rc[calc_f];
          2'b01: ;
          2'b10: rc[calc_d] = rc[calc_d] - rc[calc_f];
          default: rc[calc_d] = rc[calc_f];
        endcase
      end
    end
    calc_we = 0;

    cyc = 0;
    while (!(cs2010_stop && cs2_stop) && cyc < 5000) begin @(negedge clk); cyc++; end
    check(cs2010_stop, "CS2010 reached STOP");
    check(cs2_stop, "CS2 reached STOP");

    // CS2010 reference
    for (int a = 0; a < 256; a++) md.code[a] = p10[a];
    md.reset();
    while (!md.halted) void'(md.step());
    for (int k = 0; k < 8; k++)
      check(dut.u_cs2010.u_rf.regs[k] == md.r[k],
            $sformatf("CS2010 R%0d = %02h, expected %02h", k, dut.u_cs2010.u_rf.regs[k], md.r[k]));
    for (int a = 0; a < 256; a++)
      check(dut.u_cs2010.u_memdat.mem[a] == md.m[a], $sformatf("CS2010 M(%02h)", a));
    check(cs2010_flags == {md.v, md.n, md.z, md.c}, "CS2010 flags");
    check(cs2010_pc == md.pc, "CS2010 PC");
    // the doubled sum of the eight bytes: 2 * 0x1C8 = 0x390
    check(dut.u_cs2010.u_memdat.mem[8'h80] == 8'h90 && dut.u_cs2010.u_memdat.mem[8'h81] == 8'h03,
          "CS2010 result 0x390 in M($81):M($80)");

    // CS2 reference
    for (int k = 0; k < 8; k++) r2[k] = 8'(10 * k);
    for (int a = 0; a < 256; a++) m2[a] = {a[3:0], a[7:4]};
    r2[1] = m2[8'h13]; r2[2] = m2[8'h24]; r2[1] = r2[1] + r2[2]; m2[8'hA0] = r2[1];
    r2[3] = r2[1]; r2[3] = r2[3] - r2[4]; m2[r2[7]] = r2[3]; r2[5] = m2[r2[7]];
    for (int k = 0; k < 8; k++)
      check(dut.u_cs2.u_rf.regs[k] == r2[k],
            $sformatf("CS2 R%0d = %02h, expected %02h", k, dut.u_cs2.u_rf.regs[k], r2[k]));
    for (int a = 0; a < 256; a++)
      check(dut.u_cs2.u_memdat.mem[a] == m2[a], $sformatf("CS2 M(%02h)", a));

    // calculator
    for (int k = 0; k < 8; k++) begin
      calc_d = 3'(k); #1;
      check(calc_a == rc[k], $sformatf("calculator R%0d = %02h, expected %02h", k, calc_a, rc[k]));
    end

    @(negedge clk);
    for (int i = 0; i < M_COUNT; i++) begin
      e = mech_e'(i);
      $display("mechanism %-12s happened %0d times", e.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", e.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
