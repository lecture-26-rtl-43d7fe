// alu: 32-bit arithmetic-logic unit of the single-cycle processor.
//
// Performs the three operations the instruction subset needs, selected by
// alu_ctr: 00 ADD (add, lw, sw address), 01 SUB (sub, and beq's compare),
// 10 OR (ori). zero is 1 when the result is all zeros; beq uses it to see
// R[rs] - R[rt] == 0. Overflow is not detected. The code 11 is unused and
// yields 0. Combinational.
module alu
  import cpu_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctr_e    alu_ctr,
  output logic [31:0] y,
  output logic        zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_OR:  y = a | b;
      default: y = '0;
    endcase
    zero = (y == '0);
  end
endmodule
