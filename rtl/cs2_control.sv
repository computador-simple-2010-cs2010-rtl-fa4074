// Control unit of CS2, the 14-bit-instruction simple computer.
//
// After reset it waits in IDLE for START; the START cycle also clears PC
// (CL_PC), so every run begins at address 0. Each instruction takes a FETCH
// cycle (IR <- MEMCOD(PC), PC <- PC+1) and then execute steps chosen by the
// operation code IR[13:11]:
//
//   ADD SUB MOV   E0 AC <- ALU(Rd, Rf)  E1 Rd <- AC                (3 cycles)
//   ST STS        E0 AC <- Rb|dir  E1 MAR <- AC  E2 AC <- Rf
//                 E3 MDR <- AC     E4 M(MAR) <- MDR                (6 cycles)
//   LD LDS        E0 AC <- Rb|dir  E1 MAR <- AC  E2 MDR <- M(MAR)
//                 E3 Rd <- MDR                                     (5 cycles)
//   STOP          E0 -> HALTED, STOP output high                   (2 cycles)
//
// The ALU takes C1C0 = 00 for ADD, 10 for SUB and 11 (pass IB) for MOV and
// for moving an address; 01 (pass IA) moves the register to be stored. The
// register in IR[10:8] feeds ALU input A, the one in IR[2:0] (or, for STS
// and LDS, the address IR[7:0]) input B. The instruction formats are the
// reference sheets'; the step sequence and cycle counts are this design's own.
// HALTED lasts until reset.
module cs2_control
  import cs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [2:0] cop,      // IR[13:11]
  output ctrl_t      ctrl,
  output logic       stop,
  output logic       fetch
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC, S_HALT} state_e;

  state_e     state;
  logic [2:0] step;
  logic       last;
  logic       go_halt;

  always_comb begin
    ctrl    = CTRL_NONE;
    last    = 1'b1;
    go_halt = 1'b0;
    unique case (state)
      S_IDLE:  ctrl.cl_pc = start;
      S_FETCH: begin
        ctrl.w_ir = 1'b1;
        ctrl.i_pc = 1'b1;
      end
      S_EXEC: begin
        unique case (cop)
          CS2_ADD, CS2_SUB, CS2_MOV: begin
            last = (step == 3'd1);
            if (step == 3'd0) begin
              ctrl.op   = (cop == CS2_ADD) ? 4'(ALU2_ADD) :
                          (cop == CS2_SUB) ? 4'(ALU2_SUB) : 4'(ALU2_PSB);
              ctrl.w_ac = 1'b1;
            end else begin
              ctrl.r_ac  = 1'b1;
              ctrl.w_reg = 1'b1;
            end
          end
          CS2_ST, CS2_STS: begin
            last = (step == 3'd4);
            unique case (step)
              3'd0: begin ctrl.inm = cop[1]; ctrl.op = 4'(ALU2_PSB); ctrl.w_ac = 1'b1; end
              3'd1: begin ctrl.r_ac = 1'b1; ctrl.w_mar = 1'b1; end
              3'd2: begin ctrl.op = 4'(ALU2_PSA); ctrl.w_ac = 1'b1; end
              3'd3: begin ctrl.r_ac = 1'b1; ctrl.w_mdr = 1'b1; end
              default: ctrl.w_mem = 1'b1;
            endcase
          end
          CS2_LD, CS2_LDS: begin
            last = (step == 3'd3);
            unique case (step)
              3'd0: begin ctrl.inm = cop[1]; ctrl.op = 4'(ALU2_PSB); ctrl.w_ac = 1'b1; end
              3'd1: begin ctrl.r_ac = 1'b1; ctrl.w_mar = 1'b1; end
              3'd2: begin ctrl.r_mem = 1'b1; ctrl.w_mdr = 1'b1; ctrl.io_mdr = 1'b1; end
              default: begin ctrl.io_mdr = 1'b1; ctrl.w_reg = 1'b1; end
            endcase
          end
          CS2_STOP: go_halt = 1'b1;
        endcase
      end
      S_HALT: ;
    endcase
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

  a_one_bus_source: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.r_ac, !ctrl.w_mdr && ctrl.io_mdr}));

endmodule
