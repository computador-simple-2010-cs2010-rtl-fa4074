// Program counter.
//
// Commands, sampled at the rising clock edge, in priority order:
// CL (clear, CS2) sets PC to 0, W (load, CS2010) takes the shared bus value,
// I increments by one. R is applied by the data unit, which puts q on the
// shared bus. The PC addresses the code memory continuously. Reset to 0 is
// this design's choice, and so is the priority, since the control units
// never assert two commands together.
module cs_pc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cl,
  input  logic         wr,
  input  logic         inc,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || cl) q <= '0;
    else if (wr)   q <= d;
    else if (inc)  q <= q + 1'b1;
  end

endmodule
