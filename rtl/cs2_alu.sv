// ALU of the register-file calculator and of CS2.
//
// Combinational, no status outputs. Control C = {C1,C0}:
//   00: OUT = IA + IB    01: OUT = IA    10: OUT = IA - IB    11: OUT = IB
// The function table is the CS2010 reference sheets'; the width is a parameter (8 bits in
// both machines that use it). Sums and differences wrap modulo 2^W.
module cs2_alu #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] ia,
  input  logic [W-1:0] ib,
  input  logic [1:0]   c,
  output logic [W-1:0] out
);

  always_comb begin
    unique case (c)
      2'b00: out = ia + ib;
      2'b01: out = ia;
      2'b10: out = ia - ib;
      2'b11: out = ib;
    endcase
  end

endmodule
