// Register with a write enable, used for the accumulator AC, the instruction
// register IR, the memory address register MAR and the status register SR.
//
// At the rising clock edge with W (we) high the register takes d; q always
// shows its content. Where the drawing gives a register a read command R
// (AC), the enclosing data unit uses it to put q on the shared bus. Reset is
// synchronous, active high, to RESET_VAL (0 by default); the reference sheets gives
// no reset value for these registers.
module cs_load_reg #(
  parameter int unsigned     W         = 8,
  parameter logic [W-1:0]    RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end

endmodule
