// Self-checking testbench of the CS2 computer: a directed program using all
// eight instructions, then random programs, each compared after STOP with an
// instruction-level model of CS2 (registers, whole data memory, PC,
// instruction count and cycle count).
module tb_cs2_computer;
  logic        clk = 0, rst, start, stop, ld_we, fetch;
  logic [7:0]  ld_addr, pc;
  logic [13:0] ld_data;
  int          checks = 0, failures = 0;
  int          cycles, fetches;
  logic        started;

  logic [13:0] code [256];
  logic [7:0]  r [8];
  logic [7:0]  m [256];

  cs2_computer dut (.*);

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
    #10_000_000;
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

  function automatic logic [13:0] enc(int cop, int rd, int low);
    return {3'(cop), 3'(rd), 8'(low)};
  endfunction

  task automatic run();
    int exp_cycles = 0, exp_instr = 0, p = 0;
    bit halted = 0;
    logic [13:0] i;
    rst = 1; start = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ld_we = 1; ld_addr = 8'(a); ld_data = code[a];
    end
    @(negedge clk);
    ld_we = 0; rst = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k < 8; k++) r[k] = 8'(10 * k);
    for (int a = 0; a < 256; a++) m[a] = {a[3:0], a[7:4]};
    while (!halted && exp_instr < 300) begin
      i = code[p]; p = (p + 1) % 256; exp_instr++;
      case (i[13:11])
        0: begin m[r[i[2:0]]] = r[i[10:8]]; exp_cycles += 6; end
        1: begin r[i[10:8]] = m[r[i[2:0]]]; exp_cycles += 5; end
        2: begin m[i[7:0]] = r[i[10:8]]; exp_cycles += 6; end
        3: begin r[i[10:8]] = m[i[7:0]]; exp_cycles += 5; end
        4: begin r[i[10:8]] = r[i[10:8]] + r[i[2:0]]; exp_cycles += 3; end
        5: begin r[i[10:8]] = r[i[10:8]] - r[i[2:0]]; exp_cycles += 3; end
        6: begin r[i[10:8]] = r[i[2:0]]; exp_cycles += 3; end
        default: begin halted = 1; exp_cycles += 2; end
      endcase
    end
    for (int g = 0; g < 5000 && !stop; g++) @(negedge clk);
    check(stop, "STOP reached");
    for (int k = 0; k < 8; k++)
      check(dut.u_rf.regs[k] == r[k],
            $sformatf("R%0d = %02h, expected %02h", k, dut.u_rf.regs[k], r[k]));
    for (int a = 0; a < 256; a++)
      check(dut.u_memdat.mem[a] == m[a],
            $sformatf("M(%02h) = %02h, expected %02h", a, dut.u_memdat.mem[a], m[a]));
    check(pc == 8'(p), $sformatf("PC = %02h, expected %02h", pc, p));
    check(fetches == exp_instr, $sformatf("%0d instructions, expected %0d", fetches, exp_instr));
    check(cycles == exp_cycles, $sformatf("%0d cycles, expected %0d", cycles, exp_cycles));
  endtask

  initial begin
    rst = 1; start = 0; ld_we = 0; ld_addr = 0; ld_data = 0;
    for (int a = 0; a < 256; a++) code[a] = enc(7, 0, 0);
    code[0] = enc(4, 1, 2);          // ADD R1,R2   -> 30
    code[1] = enc(5, 3, 7);          // SUB R3,R7   -> 30-70
    code[2] = enc(2, 1, 8'h90);      // STS $90,R1
    code[3] = enc(6, 4, 1);          // MOV R4,R1
    code[4] = enc(3, 5, 8'h90);      // LDS R5,$90
    code[5] = enc(0, 3, 4);          // ST (R4),R3
    code[6] = enc(1, 6, 4);          // LD R6,(R4)
    code[7] = enc(1, 0, 7);          // LD R0,(R7): initial value of M($46)
    run();
    for (int t = 0; t < 30; t++) begin
      for (int a = 0; a < 256; a++) code[a] = enc(7, 0, 0);
      for (int a = 0; a < 60; a++) code[a] = enc($urandom_range(6), $urandom_range(7), $urandom_range(255));
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
