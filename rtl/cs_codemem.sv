// Code memory (MEMCOD): 2^AW instruction words of W bits.
//
// The program counter addresses it directly (CODE_ADD) and the word appears
// combinationally on CODE, which IR samples when W_IR is high. The computers
// never write it; a separate load port (ld_we, ld_addr, ld_data), written at
// the rising clock edge, fills it with a program before START. The load port
// and the lack of a reset value are this design's choices; the reference sheets gives
// only the widths (16-bit words in CS2010, 14-bit in CS2, 8-bit address).
module cs_codemem #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  code,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [W-1:0]  ld_data
);

  logic [W-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign code = mem[addr];

endmodule
