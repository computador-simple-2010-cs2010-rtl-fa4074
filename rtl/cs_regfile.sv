// Register file: NREG registers of W bits, two combinational read ports and
// one write port.
//
// Port A reads register S_A, port B reads register S_B. On a rising clock
// edge with W (we) high, register S_W takes IN; a 3-to-8 decoder enabled by W
// produces the per-register write strobes, as in the CS2010 reference sheets' register file
// drawing. Reads see the old value until the edge (no write-through).
// Reset loads every register Rk with 10*k, the initial values the reference sheets
// fixes for the simple computers; the reset itself, synchronous and active
// high, is this design's choice.
module cs_regfile #(
  parameter int unsigned W    = 8,
  parameter int unsigned NREG = 8,
  localparam int unsigned SW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] sa,
  output logic [W-1:0]  a,
  input  logic [SW-1:0] sb,
  output logic [W-1:0]  b,
  input  logic          we,
  input  logic [SW-1:0] sw,
  input  logic [W-1:0]  din
);

  logic [W-1:0]    regs [NREG];
  logic [NREG-1:0] wsel;   // decoder outputs W0..W(NREG-1)

  always_comb begin
    wsel = '0;
    if (we) wsel[sw] = 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NREG; k++) begin
      if (rst)          regs[k] <= W'(10 * k);
      else if (wsel[k]) regs[k] <= din;
    end
  end

  assign a = regs[sa];
  assign b = regs[sb];

endmodule
