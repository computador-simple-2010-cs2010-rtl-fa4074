// Memory data register (MDR): the only path between the shared internal bus
// (IB side) and the data bus of the memory (EB side).
//
// Controlled by W and I/O*, following the CS2010 reference sheets' MDR table:
//   W I/O*   MDR <-   IB side      EB side
//   0  0     MDR      released     driven with MDR
//   0  1     MDR      driven w/MDR released
//   1  0     IB       released     released
//   1  1     EB       released     released
// The two bidirectional sides are split into an input, an output and a drive
// flag each (*_drive high where the table says the MDR drives that side,
// "H.I." where it releases it). The register loads at the rising clock edge;
// its reset value 0 is this design's choice.
module cs_mdr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         w,
  input  logic         io_n,
  input  logic [W-1:0] ib_in,
  output logic [W-1:0] ib_out,
  output logic         ib_drive,
  input  logic [W-1:0] eb_in,
  output logic [W-1:0] eb_out,
  output logic         eb_drive
);

  logic [W-1:0] q;

  always_ff @(posedge clk) begin
    if (rst)    q <= '0;
    else if (w) q <= io_n ? eb_in : ib_in;
  end

  assign ib_out   = q;
  assign eb_out   = q;
  assign ib_drive = !w &&  io_n;
  assign eb_drive = !w && !io_n;

endmodule
