// Self-checking testbench of the CS2010 control unit.
//
// The instruction register is driven directly. For every operation code
// (and, for BRxx, every condition code with every flag combination) the
// test starts the unit and measures one instruction: the number of cycles
// from its FETCH to the next FETCH (or to STOP), the set of commands it
// asserts, and the ALU operation and INM it uses for the arithmetic, shift
// and flag instructions. The expected command sets follow the register
// transfers each instruction needs in the data path.
module tb_cs2010_control;
  import cs_pkg::*;

  logic       clk = 0, rst, start, stop, fetch;
  logic [7:0] ir_hi;
  flags_t     flags;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  cs2010_control dut (.*);

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


  // measure one instruction: returns cycles, union of commands, and the
  // operation and INM seen when AC or SR is written first
  task automatic measure(logic [4:0] cop, logic [2:0] cond, flags_t f,
                         output int n, output ctrl_t u, output logic [3:0] op,
                         output logic inm, output bit halted);
    bit seen = 0;
    rst = 1; start = 0; ir_hi = {cop, cond}; flags = f;
    @(negedge clk);
    rst = 0; start = 1;
    @(negedge clk);
    start = 0;
    check(fetch, "FETCH follows START");
    n = 0; u = '0; op = '0; inm = 0; halted = 0;
    do begin
      u = u | ctrl;
      if (!seen && (ctrl.w_ac || ctrl.w_s)) begin
        op = ctrl.op; inm = ctrl.inm; seen = 1;
      end
      n++;
      @(negedge clk);
    end while (!fetch && !stop && n < 20);
    halted = stop;
  endtask

  initial begin
    int n;
    ctrl_t u, e;
    logic [3:0] op;
    logic inm;
    bit halted, taken;
    int exp_n;
    flags_t f;
    logic [4:0] cop;

    rst = 1; start = 0; ir_hi = 0; flags = '0;
    for (int k = 0; k < 32; k++) begin
      cop = 5'(k);
      for (int cond = 0; cond < 8; cond++) begin
        for (int fv = 0; fv < 16; fv++) begin
          if (cop != COP_BR && (cond != 0 || fv != 0)) continue;
          f = 4'(fv);
          measure(cop, 3'(cond), f, n, u, op, inm, halted);
          e = '0; e.w_ir = 1; e.i_pc = 1;
          exp_n = 2;
          case (cop)
            COP_ADD, COP_SUB, COP_ROR, COP_ROL, COP_ADDI, COP_SUBI: begin
              e.w_ac = 1; e.w_s = 1; e.r_ac = 1; e.w_reg = 1; exp_n = 3;
            end
            COP_MOV, COP_LDI: begin e.w_ac = 1; e.r_ac = 1; e.w_reg = 1; exp_n = 3; end
            COP_CP, COP_CPI, COP_CLC, COP_SEC: e.w_s = 1;
            COP_ST, COP_STS: begin
              e.w_ac = 1; e.r_ac = 1; e.w_mar = 1; e.w_mdr = 1; e.w_mem = 1;
              e.inm = (cop == COP_STS); exp_n = 6;
            end
            COP_LD, COP_LDS: begin
              e.w_ac = 1; e.r_ac = 1; e.w_mar = 1; e.r_mem = 1; e.w_mdr = 1;
              e.io_mdr = 1; e.w_reg = 1; e.inm = (cop == COP_LDS); exp_n = 5;
            end
            COP_CALL: begin
              e.r_sp = 1; e.w_mar = 1; e.r_pc = 1; e.w_mdr = 1; e.w_mem = 1;
              e.d_sp = 1; e.inm = 1; e.w_ac = 1; e.r_ac = 1; e.w_pc = 1; exp_n = 6;
            end
            COP_RET: begin
              e.i_sp = 1; e.r_sp = 1; e.w_mar = 1; e.r_mem = 1; e.w_mdr = 1;
              e.io_mdr = 1; e.w_pc = 1; exp_n = 5;
            end
            COP_JMP, COP_BR: begin
              case (cond)
                0: taken = f.z;
                1: taken = f.c;
                2: taken = f.v;
                3: taken = f.n ^ f.v;
                default: taken = 0;
              endcase
              if (cop == COP_JMP || taken) begin
                e.inm = 1; e.w_ac = 1; e.r_ac = 1; e.w_pc = 1; exp_n = 3;
              end
            end
            default: ;
          endcase
          // the ALU group takes INM from COP[4]
          if (cop inside {COP_CP, COP_CLC, COP_SEC, COP_ROR, COP_ROL, COP_ADDI, COP_SUBI,
                          COP_CPI, COP_LDI}) e.inm = cop[4];
          u.op = '0;
          check(n == exp_n, $sformatf("COP %05b cond %0d flags %04b: %0d cycles, expected %0d",
                                      cop, cond, f, n, exp_n));
          check(u == e, $sformatf("COP %05b cond %0d flags %04b: commands %h, expected %h",
                                  cop, cond, f, u, e));
          check(halted == (cop == COP_STOP), $sformatf("COP %05b: STOP output", cop));
          if (cop inside {COP_ADD, COP_SUB, COP_CP, COP_MOV, COP_CLC, COP_SEC, COP_ROR,
                          COP_ROL, COP_ADDI, COP_SUBI, COP_CPI, COP_LDI})
            check(op == cop[3:0] && inm == cop[4],
                  $sformatf("COP %05b: ALU op %04b inm %b", cop, op, inm));
        end
      end
    end
    // STOP holds until reset
    measure(COP_STOP, 0, '0, n, u, op, inm, halted);
    repeat (5) @(negedge clk);
    check(stop && !fetch, "halted after STOP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
