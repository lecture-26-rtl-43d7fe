// control: main controller of the single-cycle processor.
//
// Turns the opcode (instruction bits 31:26) and function field (bits 5:0)
// into the control signals of the datapath and fetch unit. It is built as
// a two-level logic array: an AND plane that recognises each instruction
// and an OR plane that combines the recognised instructions into signals.
// Purely combinational: the signals settle within the instruction's cycle.
// Immediate assertions check that the decode is one-hot or empty.
//
//   inst  RegDst ALUSrc MemtoReg RegWrite MemWrite nPC_sel Jump ExtOp ALUctr
//   add     1      0       0        1        0        0     0    0    ADD
//   sub     1      0       0        1        0        0     0    0    SUB
//   ori     0      1       0        1        0        0     0    0    OR
//   lw      0      1       1        1        0        0     0    1    ADD
//   sw      0      1       0        0        1        0     0    1    ADD
//   beq     0      0       0        0        0        1     0    0    SUB
//   j       0      0       0        0        0        0     1    0    ADD
// (zeros in don't-care positions are what the OR plane produces)
module control
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);
  dec_t dec;

  ctrl_and_plane u_and (.op(op), .func(func), .dec(dec));
  ctrl_or_plane  u_or  (.dec(dec), .ctrl(ctrl));

  // At most one instruction line is active, and no instruction writes both
  // the register file and the data memory.
  always_comb begin
    assert ((7'(dec) & (7'(dec) - 7'd1)) == '0)
      else $error("control: more than one instruction decoded");
    assert (!(ctrl.reg_write && ctrl.mem_write))
      else $error("control: register and memory write together");
  end
endmodule
