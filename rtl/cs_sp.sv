// Stack pointer of CS2010.
//
// Commands at the rising clock edge: C loads the shared bus value, I adds one,
// D subtracts one; R is applied by the data unit, which puts q on the shared
// bus. CALL stores at M(SP) and then decrements (a descending, empty stack);
// RET increments and then reads M(SP). Reset to RESET_VAL (the top of the
// 256-byte data memory) is this design's choice, as is reading C as "load".
module cs_sp #(
  parameter int unsigned  W         = 8,
  parameter logic [W-1:0] RESET_VAL = '1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic         inc,
  input  logic         dec,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)      q <= RESET_VAL;
    else if (ld)  q <= d;
    else if (inc) q <= q + 1'b1;
    else if (dec) q <= q - 1'b1;
  end

endmodule
