// ctrl_and_plane: the "AND" half of the processor's controller.
//
// Each output line is one product term of the opcode bits (and, for R-type,
// the function bits) and is 1 exactly when the instruction is that one:
//   rtype = op == 000000      ori  = op == 001101   lw = op == 100011
//   sw    = op == 101011      beq  = op == 000100   jump = op == 000010
//   add   = rtype & func == 100000   sub = rtype & func == 100010
// The lines are therefore one-hot, or all 0 for any other instruction.
// Combinational; the terms are written bit by bit as AND gates would be.
module ctrl_and_plane
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output dec_t       dec
);
  logic rtype;

  always_comb begin
    rtype    = ~op[5] & ~op[4] & ~op[3] & ~op[2] & ~op[1] & ~op[0];
    dec.ori  = ~op[5] & ~op[4] &  op[3] &  op[2] & ~op[1] &  op[0];
    dec.lw   =  op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] &  op[0];
    dec.sw   =  op[5] & ~op[4] &  op[3] & ~op[2] &  op[1] &  op[0];
    dec.beq  = ~op[5] & ~op[4] & ~op[3] &  op[2] & ~op[1] & ~op[0];
    dec.jump = ~op[5] & ~op[4] & ~op[3] & ~op[2] &  op[1] & ~op[0];
    dec.add  = rtype &  func[5] & ~func[4] & ~func[3] & ~func[2] & ~func[1] & ~func[0];
    dec.sub  = rtype &  func[5] & ~func[4] & ~func[3] & ~func[2] &  func[1] & ~func[0];
  end
endmodule
