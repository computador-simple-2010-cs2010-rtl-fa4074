// Control unit of CS2010: a multi-cycle sequencer.
//
// After reset it waits in IDLE for START. Each instruction then takes one
// FETCH cycle (IR <- MEMCOD(PC), PC <- PC+1) followed by execute steps that
// depend on the operation code IR[15:11]. Every step is one clock cycle and
// asserts one set of data-unit commands (ctrl_t); the shared bus carries one
// value per cycle, so a transfer from one register to another takes one step.
//
//   ADD SUB MOV ROR ROL ADDI SUBI LDI   E0 AC <- ALU(Rd, Rf|dato), SR (not MOV/LDI)
//                                        E1 Rd <- AC                       (3 cycles)
//   CP CPI CLC SEC                       E0 SR <- ALU flags                (2 cycles)
//   ST STS                               E0 AC <- Rb|dir   E1 MAR <- AC
//                                        E2 AC <- Rf       E3 MDR <- AC
//                                        E4 M(MAR) <- MDR                  (6 cycles)
//   LD LDS                               E0 AC <- Rb|dir   E1 MAR <- AC
//                                        E2 MDR <- M(MAR)  E3 Rd <- MDR    (5 cycles)
//   CALL                                 E0 MAR <- SP      E1 MDR <- PC
//                                        E2 M(MAR) <- MDR, SP <- SP-1
//                                        E3 AC <- dir      E4 PC <- AC     (6 cycles)
//   RET                                  E0 SP <- SP+1     E1 MAR <- SP
//                                        E2 MDR <- M(MAR)  E3 PC <- MDR    (5 cycles)
//   JMP, BRxx taken                      E0 AC <- dir      E1 PC <- AC     (3 cycles)
//   BRxx not taken                       E0 nothing                        (2 cycles)
//   STOP                                 E0 -> HALTED, STOP output high    (2 cycles)
//
// The ALU operation of the arithmetic, shift and flag instructions is
// IR[14:11] and the immediate select INM is IR[15]; address and data moves
// use the ALU's pass-A / pass-B codes. BRxx tests IR[10:8] against the status
// register: 000 Z, 001 C, 010 V, 011 N^V; the undefined codes 1xx never
// branch. Operation codes the instruction set leaves unused execute as a
// two-cycle no-operation. The instruction set, the branch conditions and the
// flag effects are the CS2010 reference sheets'; the step sequence, the cycle counts and
// the IDLE/HALTED behaviour are this design's own, since the reference sheets gives
// only the data path and the effect of each instruction. HALTED lasts until
// reset.
module cs2010_control
  import cs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] ir_hi,    // IR[15:8]
  input  flags_t     flags,    // SR
  output ctrl_t      ctrl,
  output logic       stop,
  output logic       fetch     // high in the FETCH cycle of each instruction
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC, S_HALT} state_e;

  state_e     state;
  logic [2:0] step;
  logic       last;            // current execute step is the instruction's last
  logic       go_halt;

  logic [4:0] cop;
  logic [2:0] cond;
  logic       taken;

  assign cop  = ir_hi[7:3];
  assign cond = ir_hi[2:0];

  always_comb begin
    unique case (cond)
      BR_ZS:   taken = flags.z;
      BR_CS:   taken = flags.c;
      BR_VS:   taken = flags.v;
      BR_LT:   taken = flags.n ^ flags.v;
      default: taken = 1'b0;
    endcase
  end

  always_comb begin
    ctrl    = CTRL_NONE;
    last    = 1'b1;
    go_halt = 1'b0;
    if (state == S_FETCH) begin
      ctrl.w_ir = 1'b1;
      ctrl.i_pc = 1'b1;
    end else if (state == S_EXEC) begin
      case (cop)
        COP_ADD, COP_SUB, COP_MOV, COP_ROR, COP_ROL,
        COP_ADDI, COP_SUBI, COP_LDI: begin
          last = (step == 3'd1);
          if (step == 3'd0) begin
            ctrl.op   = cop[3:0];
            ctrl.inm  = cop[4];
            ctrl.w_ac = 1'b1;
            ctrl.w_s  = !(cop == COP_MOV || cop == COP_LDI);
          end else begin
            ctrl.r_ac  = 1'b1;
            ctrl.w_reg = 1'b1;
          end
        end
        COP_CP, COP_CPI, COP_CLC, COP_SEC: begin
          ctrl.op  = cop[3:0];
          ctrl.inm = cop[4];
          ctrl.w_s = 1'b1;
        end
        COP_ST, COP_STS: begin
          last = (step == 3'd4);
          unique case (step)
            3'd0: begin ctrl.inm = cop[1]; ctrl.op = ALU_PASB; ctrl.w_ac = 1'b1; end
            3'd1: begin ctrl.r_ac = 1'b1; ctrl.w_mar = 1'b1; end
            3'd2: begin ctrl.op = ALU_PASA; ctrl.w_ac = 1'b1; end
            3'd3: begin ctrl.r_ac = 1'b1; ctrl.w_mdr = 1'b1; end
            default: ctrl.w_mem = 1'b1;
          endcase
        end
        COP_LD, COP_LDS: begin
          last = (step == 3'd3);
          unique case (step)
            3'd0: begin ctrl.inm = cop[1]; ctrl.op = ALU_PASB; ctrl.w_ac = 1'b1; end
            3'd1: begin ctrl.r_ac = 1'b1; ctrl.w_mar = 1'b1; end
            3'd2: begin ctrl.r_mem = 1'b1; ctrl.w_mdr = 1'b1; ctrl.io_mdr = 1'b1; end
            default: begin ctrl.io_mdr = 1'b1; ctrl.w_reg = 1'b1; end
          endcase
        end
        COP_CALL: begin
          last = (step == 3'd4);
          unique case (step)
            3'd0: begin ctrl.r_sp = 1'b1; ctrl.w_mar = 1'b1; end
            3'd1: begin ctrl.r_pc = 1'b1; ctrl.w_mdr = 1'b1; end
            3'd2: begin ctrl.w_mem = 1'b1; ctrl.d_sp = 1'b1; end
            3'd3: begin ctrl.inm = 1'b1; ctrl.op = ALU_PASB; ctrl.w_ac = 1'b1; end
            default: begin ctrl.r_ac = 1'b1; ctrl.w_pc = 1'b1; end
          endcase
        end
        COP_RET: begin
          last = (step == 3'd3);
          unique case (step)
            3'd0: ctrl.i_sp = 1'b1;
            3'd1: begin ctrl.r_sp = 1'b1; ctrl.w_mar = 1'b1; end
            3'd2: begin ctrl.r_mem = 1'b1; ctrl.w_mdr = 1'b1; ctrl.io_mdr = 1'b1; end
            default: begin ctrl.io_mdr = 1'b1; ctrl.w_pc = 1'b1; end
          endcase
        end
        COP_BR, COP_JMP: begin
          if (cop == COP_JMP || taken) begin
            last = (step == 3'd1);
            if (step == 3'd0) begin
              ctrl.inm  = 1'b1;
              ctrl.op   = ALU_PASB;
              ctrl.w_ac = 1'b1;
            end else begin
              ctrl.r_ac = 1'b1;
              ctrl.w_pc = 1'b1;
            end
          end
        end
        COP_STOP: go_halt = 1'b1;
        default: ;  // unused operation codes: no operation
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      step  <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_FETCH;
        S_FETCH: begin
          state <= S_EXEC;
          step  <= '0;
        end
        S_EXEC: begin
          if (go_halt)   state <= S_HALT;
          else if (last) state <= S_FETCH;
          else           step  <= step + 1'b1;
        end
        S_HALT: ;
      endcase
    end
  end

  assign stop  = (state == S_HALT);
  assign fetch = (state == S_FETCH);

  // the step sequences never ask two sources for the shared bus at once
  a_one_bus_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.r_ac, ctrl.r_sp, ctrl.r_pc, !ctrl.w_mdr && ctrl.io_mdr}));
  // the memory and the MDR never drive the memory data bus together
  a_one_mem_source: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.r_mem && !ctrl.w_mdr && !ctrl.io_mdr));

endmodule
