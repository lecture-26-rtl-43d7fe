// single_cycle_cpu: single-cycle processor for a MIPS instruction subset.
//
// Executes add, sub, ori, lw, sw, beq and j, each in exactly one clock
// cycle: the instruction is fetched at the PC, decoded by the controller,
// carried out by the datapath, and at the next rising edge the register
// file, data memory and PC are all updated together. Three parts:
//   instr_fetch_unit  PC, instruction memory, next-PC (PC+4 / branch / jump)
//   control           two-level AND/OR decoder producing the control signals
//   datapath          register file, extender, ALU, data memory and muxes
// Interface: clk, rst_n (synchronous, active low: PC <- 0, and no register
// or data memory write while it is low). The current pc,
// instruction, control signals, ALU zero flag and result (alu_y, also the
// data memory address), register-B bus (busb, the store data) and register
// write-back bus (busw) are outputs for observation. Instruction and data memory sizes are parameters; the
// programs are placed in the instruction memory from outside.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output ctrl_t       ctrl,
  output logic        zero,
  output logic [31:0] alu_y,
  output logic [31:0] busb,
  output logic [31:0] busw
);
  ctrl_t dp_ctrl;

  // While reset is held no register or memory write takes place, so state
  // loaded before reset is released is not disturbed.
  always_comb begin
    dp_ctrl           = ctrl;
    dp_ctrl.reg_write = ctrl.reg_write & rst_n;
    dp_ctrl.mem_write = ctrl.mem_write & rst_n;
  end

  instr_fetch_unit #(.IMEM_WORDS(IMEM_WORDS)) u_ifu (
    .clk(clk), .rst_n(rst_n),
    .npc_sel(ctrl.npc_sel), .zero(zero), .jump(ctrl.jump),
    .instr(instr), .pc(pc));

  control u_ctrl (.op(f_op(instr)), .func(f_func(instr)), .ctrl(ctrl));

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk(clk), .instr(instr), .ctrl(dp_ctrl), .zero(zero),
    .alu_y(alu_y), .busb(busb), .busw(busw));
endmodule
