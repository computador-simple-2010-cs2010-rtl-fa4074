// Instruction-level reference model of CS2010 for the testbenches, plus
// instruction encoders.
//
// The model executes one instruction per call of step() on its own copy of
// the registers, data memory, PC, SP and flags, using plain integer
// arithmetic for the flags, and reports the number of clock cycles the
// hardware sequencer is specified to take for it (fetch included), so that a
// testbench can check both the architectural state and the cycle count.
package cs2010_ref_pkg;

  // ---- encoders --------------------------------------------------------
  function automatic logic [15:0] enc_a(logic [4:0] cop, int rd, int rf);
    return {cop, 3'(rd), 5'b0, 3'(rf)};
  endfunction
  function automatic logic [15:0] enc_b(logic [4:0] cop, int rd, int imm);
    return {cop, 3'(rd), 8'(imm)};
  endfunction

  localparam logic [4:0] ST = 5'h00, LD = 5'h01, STS = 5'h02, LDS = 5'h03,
    CALL = 5'h04, RET = 5'h05, BR = 5'h06, JMP = 5'h07, ADD = 5'h08,
    SUB = 5'h0A, CP = 5'h0B, MOV = 5'h0F, CLC = 5'h12, SEC = 5'h13,
    ROR = 5'h14, ROL = 5'h15, STOP = 5'h17, ADDI = 5'h18, SUBI = 5'h1A,
    CPI = 5'h1B, LDI = 5'h1F;

  class Cs2010Model;
    logic [7:0]  r [8];
    logic [7:0]  m [256];
    logic [15:0] code [256];
    logic [7:0]  pc, sp;
    bit          v, n, z, c;
    bit          halted;
    // event counters
    int          n_br_taken, n_br_not, n_call, n_ret, n_ld, n_st;

    function new();
      reset();
    endfunction

    function void reset();
      for (int k = 0; k < 8; k++) r[k] = 8'(10 * k);
      for (int a = 0; a < 256; a++) m[a] = {a[3:0], a[7:4]};
      pc = 0; sp = 8'hFF; {v, n, z, c} = 4'b0; halted = 0;
      n_br_taken = 0; n_br_not = 0; n_call = 0; n_ret = 0; n_ld = 0; n_st = 0;
    endfunction

    function void nz(int res);
      n = res[7];
      z = (res[7:0] == 0);
    endfunction

    // executes one instruction, returns its cycle count
    function int step();
      logic [15:0] i;
      logic [4:0]  cop;
      int          rd, rf, imm, a, b, res, sa, sb;
      bit          take;
      i = code[pc];
      pc = pc + 1;
      cop = i[15:11]; rd = i[10:8]; rf = i[2:0]; imm = i[7:0];
      a = r[rd];
      b = cop[4] ? imm : int'(r[rf]);
      sa = a > 127 ? a - 256 : a;
      sb = b > 127 ? b - 256 : b;
      case (cop)
        ADD, ADDI: begin
          res = a + b; c = res > 255; v = (sa + sb > 127) || (sa + sb < -128);
          nz(res); r[rd] = 8'(res); return 3;
        end
        SUB, SUBI, CP, CPI: begin
          res = a - b; c = a < b; v = (sa - sb > 127) || (sa - sb < -128);
          nz(res);
          if (cop == SUB || cop == SUBI) begin r[rd] = 8'(res); return 3; end
          return 2;
        end
        MOV, LDI: begin r[rd] = 8'(b); return 3; end
        CLC: begin c = 0; return 2; end
        SEC: begin c = 1; return 2; end
        ROR: begin
          res = (int'(c) << 7) | (a >> 1);
          v = c ^ a[7]; c = a[0]; nz(res); r[rd] = 8'(res); return 3;
        end
        ROL: begin
          res = ((a << 1) | int'(c)) & 255;
          v = a[7] ^ a[6]; c = a[7]; nz(res); r[rd] = 8'(res); return 3;
        end
        ST:  begin m[r[rf]] = r[rd]; n_st++; return 6; end
        STS: begin m[imm]   = r[rd]; n_st++; return 6; end
        LD:  begin r[rd] = m[r[rf]]; n_ld++; return 5; end
        LDS: begin r[rd] = m[imm];   n_ld++; return 5; end
        CALL: begin m[sp] = pc; sp = sp - 1; pc = 8'(imm); n_call++; return 6; end
        RET:  begin sp = sp + 1; pc = m[sp]; n_ret++; return 5; end
        JMP:  begin pc = 8'(imm); return 3; end
        BR: begin
          case (rd)
            0: take = z;
            1: take = c;
            2: take = v;
            3: take = n ^ v;
            default: take = 0;
          endcase
          if (take) begin pc = 8'(imm); n_br_taken++; return 3; end
          n_br_not++;
          return 2;
        end
        STOP: begin halted = 1; return 2; end
        default: return 2;
      endcase
    endfunction
  endclass

endpackage
