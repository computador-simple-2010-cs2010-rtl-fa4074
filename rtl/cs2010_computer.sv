// CS2010 simple computer: an 8-bit multi-cycle processor with eight
// registers, a status register {V,N,Z,C}, a stack pointer, a 256 x 16-bit
// code memory and a 256 x 8-bit data memory.
//
// Data unit, as in the CS2010 reference sheets' architecture drawing: the register file
// feeds ALU input A from register IR[10:8] and, through the INM multiplexer,
// ALU input B from register IR[2:0] or the immediate IR[7:0]. The ALU result
// goes to the hidden accumulator AC and its flags to SR. One shared internal
// bus connects AC, SP, PC and MDR (sources) with the register file input,
// SP, PC, MDR and MAR (destinations); the bus is built as a multiplexer, each
// source gated by its read command (R_AC, R_SP, R_PC, MDR with W=0 I/O*=1),
// and reads 0 when nothing drives it. The data memory is reached only
// through MAR (address) and MDR (data). The PC addresses the code memory,
// whose word is latched in IR. The control unit sequences all commands.
//
// Interface: START begins execution at address 0 (after reset); STOP goes
// high when a STOP instruction has executed. The code memory is filled
// through ld_we/ld_addr/ld_data before START. fetch pulses in the first cycle
// of every instruction, and pc/flags show the PC and SR. After reset the
// registers hold Rk = 10*k and the data memory M(a) = a with nibbles swapped.
module cs2010_computer
  import cs_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              stop,
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [15:0]       ld_data,
  output logic              fetch,
  output logic [ADDR_W-1:0] pc,
  output flags_t            flags
);

  ctrl_t              ctrl;
  logic [15:0]        ir;
  logic [15:0]        code;
  logic [DATA_W-1:0]  bus;        // shared internal bus
  logic [DATA_W-1:0]  reg_a, reg_b, alu_b, result, ac, sp, mar;
  flags_t             s_out;
  logic [DATA_W-1:0]  mdr_ib, mdr_eb, mem_dout, data_bus;
  logic               mdr_ib_drive, mdr_eb_drive, mem_drive;

  cs2010_control u_ctrl (
    .clk, .rst, .start,
    .ir_hi (ir[15:8]),
    .flags (flags),
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

  cs2010_alu u_alu (
    .a (reg_a), .b (alu_b), .op (ctrl.op),
    .s_in (flags), .result (result), .s_out (s_out)
  );

  cs_load_reg #(.W(4)) u_sr (
    .clk, .rst, .we (ctrl.w_s), .d (s_out), .q (flags)
  );

  cs_load_reg #(.W(DATA_W)) u_ac (
    .clk, .rst, .we (ctrl.w_ac), .d (result), .q (ac)
  );

  cs_sp #(.W(DATA_W)) u_sp (
    .clk, .rst, .ld (ctrl.c_sp), .inc (ctrl.i_sp), .dec (ctrl.d_sp),
    .d (bus), .q (sp)
  );

  cs_pc #(.W(ADDR_W)) u_pc (
    .clk, .rst, .cl (ctrl.cl_pc), .wr (ctrl.w_pc), .inc (ctrl.i_pc),
    .d (bus), .q (pc)
  );

  cs_codemem #(.W(16), .AW(ADDR_W)) u_memcod (
    .clk, .addr (pc), .code (code),
    .ld_we, .ld_addr, .ld_data
  );

  cs_load_reg #(.W(16)) u_ir (
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

  // shared internal bus: OR of the gated sources
  assign bus = ({DATA_W{ctrl.r_ac}}   & ac)
             | ({DATA_W{ctrl.r_sp}}   & sp)
             | ({DATA_W{ctrl.r_pc}}   & pc)
             | ({DATA_W{mdr_ib_drive}} & mdr_ib);

  // memory data bus D: driven by the memory (R_MEM) or by the MDR
  assign data_bus = ({DATA_W{mem_drive}}    & mem_dout)
                  | ({DATA_W{mdr_eb_drive}} & mdr_eb);

  a_bus_single_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.r_ac, ctrl.r_sp, ctrl.r_pc, mdr_ib_drive}));
  a_data_bus_single_driver: assert property (@(posedge clk) disable iff (rst)
    !(mem_drive && mdr_eb_drive));

endmodule
