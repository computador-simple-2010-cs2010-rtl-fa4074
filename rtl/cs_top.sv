// Top level: the three machines of the collection side by side, each with
// its own ports.
//
//   cs2010_*  the CS2010 computer (16-bit instructions, flags, stack)
//   cs2_*     the CS2 computer (14-bit instructions)
//   calc_*    the register-file calculator (R[D] <- R[D] op R[F] per cycle)
//
// All three share only the clock and the synchronous, active-high reset.
// See the individual modules for the timing of each interface.
module cs_top
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // CS2010
  input  logic              cs2010_start,
  output logic              cs2010_stop,
  input  logic              cs2010_ld_we,
  input  logic [ADDR_W-1:0] cs2010_ld_addr,
  input  logic [15:0]       cs2010_ld_data,
  output logic              cs2010_fetch,
  output logic [ADDR_W-1:0] cs2010_pc,
  output flags_t            cs2010_flags,
  // CS2
  input  logic              cs2_start,
  output logic              cs2_stop,
  input  logic              cs2_ld_we,
  input  logic [ADDR_W-1:0] cs2_ld_addr,
  input  logic [13:0]       cs2_ld_data,
  output logic              cs2_fetch,
  output logic [ADDR_W-1:0] cs2_pc,
  // calculator
  input  logic [2:0]        calc_d,
  input  logic [2:0]        calc_f,
  input  logic [1:0]        calc_p,
  input  logic              calc_we,
  output logic [DATA_W-1:0] calc_a,
  output logic [DATA_W-1:0] calc_b
);

  cs2010_computer u_cs2010 (
    .clk, .rst,
    .start   (cs2010_start),
    .stop    (cs2010_stop),
    .ld_we   (cs2010_ld_we),
    .ld_addr (cs2010_ld_addr),
    .ld_data (cs2010_ld_data),
    .fetch   (cs2010_fetch),
    .pc      (cs2010_pc),
    .flags   (cs2010_flags)
  );

  cs2_computer u_cs2 (
    .clk, .rst,
    .start   (cs2_start),
    .stop    (cs2_stop),
    .ld_we   (cs2_ld_we),
    .ld_addr (cs2_ld_addr),
    .ld_data (cs2_ld_data),
    .fetch   (cs2_fetch),
    .pc      (cs2_pc)
  );

  cs_calculator #(.W(DATA_W)) u_calc (
    .clk, .rst,
    .d  (calc_d),
    .f  (calc_f),
    .p  (calc_p),
    .we (calc_we),
    .a  (calc_a),
    .b  (calc_b)
  );

endmodule
