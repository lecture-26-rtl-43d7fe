// mux2: two-input multiplexer of configurable width.
//
// y = sel ? d1 : d0, purely combinational. The processor uses it for every
// two-way choice drawn in its datapath: the destination register (RegDst),
// the ALU's second operand (ALUSrc), the register write-back value
// (MemtoReg) and the two next-PC selections in the fetch unit. Input 0 and
// input 1 are as labelled on each of those multiplexers.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
