// CS2 simple computer: the 14-bit-instruction predecessor of CS2010, with
// eight 8-bit registers, a 256 x 14-bit code memory, a 256 x 8-bit data
// memory, no status register, no stack and no jumps.
//
// Data unit, as in the CS2010 reference sheets' CS2 drawing: register IR[10:8] feeds ALU
// input A, register IR[2:0] or the address IR[7:0] (INM) feeds ALU input B;
// the 2-bit-controlled ALU writes the hidden accumulator AC. A shared bus
// joins AC and MDR (sources) with the register file input, MDR and MAR. The
// bus is a multiplexer gated by R_AC and by the MDR's IB drive; it reads 0
// when undriven. The PC (clear and increment only) addresses the code memory
// into IR.
//
// Interface: START clears the PC and begins execution at address 0; STOP
// goes high after a STOP instruction. The code memory is filled through
// ld_we/ld_addr/ld_data before START; fetch pulses at the first cycle of
// every instruction. After reset Rk = 10*k and M(a) = a with nibbles
// swapped. CS2 shares the command struct of CS2010, so the commands it has
// no hardware for (SR, SP, PC load, ALU op[3:2]) are left unconnected here.
module cs2_computer
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              stop,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [13:0]       ld_data,
  output logic              fetch,
  output logic [ADDR_W-1:0] pc
);

  ctrl_t              ctrl;
  logic [13:0]        ir;
  logic [13:0]        code;
  logic [DATA_W-1:0]  bus;
  logic [DATA_W-1:0]  reg_a, reg_b, alu_b, result, ac, mar;
  logic [DATA_W-1:0]  mdr_ib, mdr_eb, mem_dout, data_bus;
  logic               mdr_ib_drive, mdr_eb_drive, mem_drive;

  cs2_control u_ctrl (
    .clk, .rst, .start,
    .cop   (ir[13:11]),
    .ctrl  (ctrl),
    .stop  (stop),
    .fetch (fetch)
  );

  cs_regfile #(.W(DATA_W), .NREG(8)) u_rf (
    .clk, .rst,
    .sa  (ir[10:8]), .a (reg_a),
    .sb  (ir[2:0]),  .b (reg_b),
    .we  (ctrl.w_reg),
    .sw  (ir[10:8]),
    .din (bus)
  );

  assign alu_b = ctrl.inm ? ir[7:0] : reg_b;

  cs2_alu #(.W(DATA_W)) u_alu (
    .ia (reg_a), .ib (alu_b), .c (ctrl.op[1:0]), .out (result)
  );

  cs_load_reg #(.W(DATA_W)) u_ac (
    .clk, .rst, .we (ctrl.w_ac), .d (result), .q (ac)
  );

  cs_pc #(.W(ADDR_W)) u_pc (
    .clk, .rst, .cl (ctrl.cl_pc), .wr (1'b0), .inc (ctrl.i_pc),
    .d (bus), .q (pc)
  );

  cs_codemem #(.W(14), .AW(ADDR_W)) u_memcod (
    .clk, .addr (pc), .code (code),
    .ld_we, .ld_addr, .ld_data
  );

  cs_load_reg #(.W(14)) u_ir (
    .clk, .rst, .we (ctrl.w_ir), .d (code), .q (ir)
  );

  cs_load_reg #(.W(ADDR_W)) u_mar (
    .clk, .rst, .we (ctrl.w_mar), .d (bus), .q (mar)
  );

  cs_mdr #(.W(DATA_W)) u_mdr (
    .clk, .rst, .w (ctrl.w_mdr), .io_n (ctrl.io_mdr),
    .ib_in (bus), .ib_out (mdr_ib), .ib_drive (mdr_ib_drive),
    .eb_in (data_bus), .eb_out (mdr_eb), .eb_drive (mdr_eb_drive)
  );

  cs_datamem #(.W(DATA_W), .AW(ADDR_W)) u_memdat (
    .clk, .rst, .addr (mar), .din (data_bus),
    .we (ctrl.w_mem), .re (ctrl.r_mem),
    .dout (mem_dout), .d_drive (mem_drive)
  );

  assign bus = ({DATA_W{ctrl.r_ac}}    & ac)
             | ({DATA_W{mdr_ib_drive}} & mdr_ib);

  assign data_bus = ({DATA_W{mem_drive}}    & mem_dout)
                  | ({DATA_W{mdr_eb_drive}} & mdr_eb);

  a_bus_single_driver: assert property (@(posedge clk) disable iff (rst)
    !(ctrl.r_ac && mdr_ib_drive));
  a_data_bus_single_driver: assert property (@(posedge clk) disable iff (rst)
    !(mem_drive && mdr_eb_drive));

endmodule
