// ctrl_or_plane: the "OR" half of the processor's controller.
//
// Every control signal is the OR of the decoded instructions that need it:
//   RegDst   = add + sub            ALUSrc   = ori + lw + sw
//   MemtoReg = lw                   RegWrite = add + sub + ori + lw
//   MemWrite = sw                   nPC_sel  = beq
//   Jump     = jump                 ExtOp    = lw + sw
//   ALUctr[0] = sub + beq           ALUctr[1] = ori
// Where an instruction does not care about a signal these sums give 0. With
// no decoded line active (an unknown instruction) nothing is written and the
// PC simply advances. Combinational.
module ctrl_or_plane
  import cpu_pkg::*;
(
  input  dec_t  dec,
  output ctrl_t ctrl
);
  always_comb begin
    ctrl.reg_dst    = dec.add | dec.sub;
    ctrl.alu_src    = dec.ori | dec.lw | dec.sw;
    ctrl.mem_to_reg = dec.lw;
    ctrl.reg_write  = dec.add | dec.sub | dec.ori | dec.lw;
    ctrl.mem_write  = dec.sw;
    ctrl.npc_sel    = dec.beq;
    ctrl.jump       = dec.jump;
    ctrl.ext_op     = dec.lw | dec.sw;
    ctrl.alu_ctr    = alu_ctr_e'({dec.ori, dec.sub | dec.beq});
  end
endmodule
