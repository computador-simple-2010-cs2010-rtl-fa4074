// Register-file calculator: eight 8-bit registers and the 2-bit ALU wired so
// that one clock cycle performs R[D] <- R[D] op R[F].
//
// D (3 bits) selects ALU input IA through one read multiplexer and, through
// a 3-to-8 decoder enabled by W, the register written; F selects input IB
// through the other multiplexer. P = {P1,P0} is the ALU control (00 add,
// 01 IA, 10 IA-IB, 11 IB). With W high, the ALU output is written into R[D]
// at the rising clock edge. Both register values are visible on a and b.
// The structure is the CS2010 reference sheets' drawing; the synchronous reset to the
// initial values Rk = 10*k and the visible read ports are this design's
// choices.
module cs_calculator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   d,
  input  logic [2:0]   f,
  input  logic [1:0]   p,
  input  logic         we,
  output logic [W-1:0] a,
  output logic [W-1:0] b
);

  logic [W-1:0] alu_out;

  cs_regfile #(.W(W), .NREG(8)) u_rf (
    .clk, .rst,
    .sa (d), .a (a),
    .sb (f), .b (b),
    .we (we), .sw (d), .din (alu_out)
  );

  cs2_alu #(.W(W)) u_alu (
    .ia (a), .ib (b), .c (p), .out (alu_out)
  );

endmodule
