// datapath: execution part of the single-cycle processor.
//
// From the instruction fields Rs (25:21), Rt (20:16), Rd (15:11) and Imm16
// (15:0) and the control signals it does, within one clock cycle:
//   busA = R[Rs], busB = R[Rt]
//   ALU  = busA (op) (ALUSrc ? Extend(Imm16, ExtOp) : busB)
//   Data Memory read at the ALU result, written with busB if MemWr
//   R[RegDst ? Rd : Rt] = MemtoReg ? memory data : ALU result, if RegWr
// All writes happen at the rising clock edge that ends the instruction;
// everything else is combinational. zero goes to the fetch unit for beq.
// alu_y, busb and busw are brought out for observation.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        zero,
  output logic [31:0] alu_y,
  output logic [31:0] busb,
  output logic [31:0] busw
);
  logic [4:0]  rw;
  logic [31:0] busa, imm32, alu_b, mem_dout;

  mux2 #(.WIDTH(5)) u_regdst_mux (
    .d0(f_rt(instr)), .d1(f_rd(instr)), .sel(ctrl.reg_dst), .y(rw));

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk(clk), .we(ctrl.reg_write), .rw(rw),
    .ra(f_rs(instr)), .rb(f_rt(instr)),
    .busw(busw), .busa(busa), .busb(busb));

  extender u_ext (.imm16(f_imm16(instr)), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.WIDTH(32)) u_alusrc_mux (.d0(busb), .d1(imm32), .sel(ctrl.alu_src), .y(alu_b));

  alu u_alu (.a(busa), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .y(alu_y), .zero(zero));

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .wr_en(ctrl.mem_write), .adr(alu_y), .din(busb), .dout(mem_dout));

  mux2 #(.WIDTH(32)) u_memtoreg_mux (.d0(alu_y), .d1(mem_dout), .sel(ctrl.mem_to_reg), .y(busw));
endmodule
