// Self-checking testbench of the CS2 control unit: for each operation code,
// the cycle count of one instruction, the set of commands it asserts, the
// ALU control it uses first, and that START clears the PC.
module tb_cs2_control;
  import cs_pkg::*;

  logic       clk = 0, rst, start, stop, fetch;
  logic [2:0] cop;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  cs2_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
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

  initial begin
    int n;
    ctrl_t u, e;
    logic [1:0] op;
    bit seen;
    rst = 1; start = 0; cop = 0;
    for (int k = 0; k < 8; k++) begin
      rst = 1; start = 0; cop = 3'(k);
      @(negedge clk);
      rst = 0; start = 1;
      #1;
      check(ctrl.cl_pc, "START clears the PC");
      @(negedge clk);
      start = 0;
      n = 0; u = '0; seen = 0; op = '0;
      do begin
        u = u | ctrl;
        if (!seen && ctrl.w_ac) begin op = ctrl.op[1:0]; seen = 1; end
        n++;
        @(negedge clk);
      end while (!fetch && !stop && n < 20);
      e = '0; e.w_ir = 1; e.i_pc = 1;
      case (cop)
        CS2_ADD, CS2_SUB, CS2_MOV: begin e.w_ac = 1; e.r_ac = 1; e.w_reg = 1; end
        CS2_ST, CS2_STS: begin
          e.w_ac = 1; e.r_ac = 1; e.w_mar = 1; e.w_mdr = 1; e.w_mem = 1; e.inm = (cop == CS2_STS);
        end
        CS2_LD, CS2_LDS: begin
          e.w_ac = 1; e.r_ac = 1; e.w_mar = 1; e.r_mem = 1; e.w_mdr = 1; e.io_mdr = 1;
          e.w_reg = 1; e.inm = (cop == CS2_LDS);
        end
        default: ;
      endcase
      u.op = '0;
      check(u == e, $sformatf("COP %03b: commands %h, expected %h", cop, u, e));
      check(n == ((cop inside {CS2_ST, CS2_STS}) ? 6 : (cop inside {CS2_LD, CS2_LDS}) ? 5 :
                  (cop == CS2_STOP) ? 2 : 3), $sformatf("COP %03b: %0d cycles", cop, n));
      check(stop == (cop == CS2_STOP), $sformatf("COP %03b: STOP output", cop));
      if (cop == CS2_ADD) check(op == 2'b00, "ADD uses IA+IB");
      if (cop == CS2_SUB) check(op == 2'b10, "SUB uses IA-IB");
      if (cop == CS2_MOV) check(op == 2'b11, "MOV uses IB");
      if (cop inside {CS2_ST, CS2_LD, CS2_STS, CS2_LDS}) check(op == 2'b11, "address through IB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
