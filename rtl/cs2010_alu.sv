// CS2010 arithmetic-logic unit.
//
// Purely combinational. A and B are 8-bit operands, OP a 4-bit operation and
// S_IN = {V,N,Z,C} the current status; the unit produces RESULT and the next
// status S_OUT, which the status register SR stores when the control unit
// asserts W_S.
//
//   OP      RESULT          V_OUT            N_OUT     Z_OUT       C_OUT
//   00x0    A               V_IN             N_IN      Z_IN        0
//   00x1    A               V_IN             N_IN      Z_IN        1
//   0100    SHR(A,C_IN)     C_IN ^ A7        RESULT7   RESULT==0   A0
//   0101    SHL(A,C_IN)     A7 ^ A6          RESULT7   RESULT==0   A7
//   011x    A               V_IN             RESULT7   RESULT==0   C_IN
//   100x    A + B           C7 ^ C_OUT       RESULT7   RESULT==0   carry out
//   101x    A - B           two's-compl. ovf RESULT7   RESULT==0   borrow out
//   11xx    B               V_IN             N_IN      Z_IN        C_IN
//
// The table follows the CS2010 reference sheets' ALU table. SHR/SHL are rotations through
// the carry: SHR puts C_IN in bit 7, SHL puts it in bit 0. Entries the
// reference sheets leave open are this design's choice: RESULT of the 00xx codes is
// A, the unlisted code 0001 sets C like 0011, and the flags marked "don't
// care" keep their input value. C after A-B is the borrow, so C=1 means A<B
// unsigned.
module cs2010_alu
  import cs_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [3:0]        op,
  input  flags_t            s_in,
  output logic [DATA_W-1:0] result,
  output flags_t            s_out
);

  logic [DATA_W:0]   sum;      // A + B with carry out
  logic [DATA_W:0]   diff;     // A - B with borrow out
  logic [DATA_W-1:0] low_sum;  // low 7 bits added, for the carry into bit 7
  logic              c7;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    diff    = {1'b0, a} - {1'b0, b};
    low_sum = {1'b0, a[DATA_W-2:0]} + {1'b0, b[DATA_W-2:0]};
    c7      = low_sum[DATA_W-1];

    result = a;
    s_out  = s_in;
    unique casez (op)
      4'b00?0: s_out.c = 1'b0;
      4'b00?1: s_out.c = 1'b1;
      4'b0100: begin
        result  = {s_in.c, a[DATA_W-1:1]};
        s_out.v = s_in.c ^ a[DATA_W-1];
        s_out.c = a[0];
      end
      4'b0101: begin
        result  = {a[DATA_W-2:0], s_in.c};
        s_out.v = a[DATA_W-1] ^ a[DATA_W-2];
        s_out.c = a[DATA_W-1];
      end
      4'b011?: result = a;
      4'b100?: begin
        result  = sum[DATA_W-1:0];
        s_out.v = c7 ^ sum[DATA_W];
        s_out.c = sum[DATA_W];
      end
      4'b101?: begin
        result  = diff[DATA_W-1:0];
        s_out.v = (a[DATA_W-1] ^ b[DATA_W-1]) & (a[DATA_W-1] ^ diff[DATA_W-1]);
        s_out.c = diff[DATA_W];
      end
      4'b11??: result = b;
      default: result = a;
    endcase
    // N and Z are defined for every operation from SHR to A-B
    if (op[3:2] == 2'b01 || op[3:2] == 2'b10) begin
      s_out.n = result[DATA_W-1];
      s_out.z = (result == '0);
    end
  end

endmodule
