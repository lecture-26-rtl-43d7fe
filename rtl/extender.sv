// extender: widens a 16-bit immediate to 32 bits.
//
// ext_op = 0 fills the upper half with zeros (used by ori), ext_op = 1 fills
// it with copies of bit 15 (used by lw and sw). Combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);
  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};
endmodule
