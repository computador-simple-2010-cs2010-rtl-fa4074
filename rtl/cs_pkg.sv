// Shared types and constants of the two simple computers (CS2 and CS2010)
// and of the register-file calculator.
//
// CS2010 instruction word: IR[15:11] is the operation code (COP), IR[10:8]
// the destination register (the source register in ST/STS, the condition in
// BRxx), IR[7:0] an address or immediate, IR[2:0] the source/base register.
// The COP values are the ones of the CS2010 instruction table. The 4-bit ALU
// operation of an arithmetic, shift or flag instruction equals COP[3:0], and
// COP[4] selects the immediate IR[7:0] as ALU input B; the control unit relies
// on that regularity of the table.
package cs_pkg;

  localparam int unsigned DATA_W = 8;   // data path, register and memory width
  localparam int unsigned ADDR_W = 8;   // code and data address width

  // CS2010 operation codes (IR[15:11])
  typedef enum logic [4:0] {
    COP_ST   = 5'b00000,
    COP_LD   = 5'b00001,
    COP_STS  = 5'b00010,
    COP_LDS  = 5'b00011,
    COP_CALL = 5'b00100,
    COP_RET  = 5'b00101,
    COP_BR   = 5'b00110,
    COP_JMP  = 5'b00111,
    COP_ADD  = 5'b01000,
    COP_SUB  = 5'b01010,
    COP_CP   = 5'b01011,
    COP_MOV  = 5'b01111,
    COP_CLC  = 5'b10010,
    COP_SEC  = 5'b10011,
    COP_ROR  = 5'b10100,
    COP_ROL  = 5'b10101,
    COP_STOP = 5'b10111,
    COP_ADDI = 5'b11000,
    COP_SUBI = 5'b11010,
    COP_CPI  = 5'b11011,
    COP_LDI  = 5'b11111
  } cop_e;

  // CS2010 ALU operations (OP[3:0]); codes with don't-care bits are given
  // by one representative
  typedef enum logic [3:0] {
    ALU_CLC  = 4'b0000,  // C <- 0, V N Z kept
    ALU_SEC  = 4'b0011,  // C <- 1, V N Z kept
    ALU_SHR  = 4'b0100,  // rotate right through carry
    ALU_SHL  = 4'b0101,  // rotate left through carry
    ALU_PASA = 4'b0110,  // RESULT = A
    ALU_ADD  = 4'b1000,  // A + B
    ALU_SUB  = 4'b1010,  // A - B
    ALU_PASB = 4'b1100   // RESULT = B, flags kept
  } alu_op_e;

  // BRxx condition codes (IR[10:8])
  typedef enum logic [2:0] {
    BR_ZS = 3'b000,  // Z      (BRZS, BREQ)
    BR_CS = 3'b001,  // C      (BRCS, BRLO)
    BR_VS = 3'b010,  // V      (BRVS)
    BR_LT = 3'b011   // N ^ V  (BRLT)
  } br_cond_e;

  // status register S = {V, N, Z, C}
  typedef struct packed {
    logic v;
    logic n;
    logic z;
    logic c;
  } flags_t;

  // CS2 (14-bit instruction) operation codes (IR[13:11])
  typedef enum logic [2:0] {
    CS2_ST   = 3'b000,
    CS2_LD   = 3'b001,
    CS2_STS  = 3'b010,
    CS2_LDS  = 3'b011,
    CS2_ADD  = 3'b100,
    CS2_SUB  = 3'b101,
    CS2_MOV  = 3'b110,
    CS2_STOP = 3'b111
  } cs2_cop_e;

  // CS2 ALU control C1C0
  typedef enum logic [1:0] {
    ALU2_ADD = 2'b00,  // IA + IB
    ALU2_PSA = 2'b01,  // IA
    ALU2_SUB = 2'b10,  // IA - IB
    ALU2_PSB = 2'b11   // IB
  } alu2_op_e;

  // commands from a control unit to its data unit. CS2 leaves op[3:2],
  // w_s and the stack/PC-load commands unused.
  typedef struct packed {
    logic       w_reg;   // register file write (S_W = IR[10:8], IN = bus)
    logic       inm;     // ALU input B: 0 register B, 1 IR[7:0]
    logic [3:0] op;      // ALU operation
    logic       w_s;     // status register write
    logic       w_ac;    // AC <- RESULT
    logic       r_ac;    // AC drives the shared bus
    logic       i_sp;    // SP <- SP + 1
    logic       d_sp;    // SP <- SP - 1
    logic       c_sp;    // SP <- bus
    logic       r_sp;    // SP drives the shared bus
    logic       i_pc;    // PC <- PC + 1
    logic       w_pc;    // PC <- bus
    logic       cl_pc;   // PC <- 0
    logic       r_pc;    // PC drives the shared bus
    logic       w_ir;    // IR <- code memory
    logic       w_mdr;   // MDR write (see cs_mdr)
    logic       io_mdr;  // MDR I/O* select (see cs_mdr)
    logic       w_mar;   // MAR <- bus
    logic       w_mem;   // data memory write
    logic       r_mem;   // data memory read
  } ctrl_t;

  localparam ctrl_t CTRL_NONE = '0;

  // initial value of data memory word a: the low byte of a with its nibbles
  // swapped
  function automatic logic [DATA_W-1:0] mem_init_value(input logic [ADDR_W-1:0] a);
    return {a[3:0], a[7:4]};
  endfunction

  // initial value of register k: 10*k
  function automatic logic [DATA_W-1:0] reg_init_value(input int unsigned k);
    return DATA_W'(10 * k);
  endfunction

endpackage
