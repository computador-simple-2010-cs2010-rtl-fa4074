// Data memory system (MEMDAT): 2^AW words of W bits.
//
// A is the address (from MAR). With W_MEM (we) high, the word on the data bus
// D (din) is written at the rising clock edge. With R_MEM (re) high the memory
// drives D: dout carries M(A) combinationally and d_drive is high, so a
// register that samples D at the same edge captures the word (single-cycle
// read). The bidirectional bus D of the drawing is split into din, dout and
// the drive flag d_drive.
// Reset loads every word with the low byte of its own address, nibbles
// swapped (M($7A)=$A7), the initial contents the reference sheets prescribes. The
// synchronous, active-high reset and the combinational read are this design's
// choices.
module cs_datamem
  import cs_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  din,
  input  logic          we,
  input  logic          re,
  output logic [W-1:0]  dout,
  output logic          d_drive
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem[i] <= W'(mem_init_value(ADDR_W'(i)));
      end
    end else if (we) begin
      mem[addr] <= din;
    end
  end

  assign dout    = mem[addr];
  assign d_drive = re;

endmodule
