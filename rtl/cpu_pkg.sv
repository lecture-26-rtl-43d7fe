// cpu_pkg: types and constants shared by the single-cycle processor.
//
// Holds the instruction-field extractors of the R, I and J formats used by
// the seven supported instructions (add, sub, ori, lw, sw, beq, j), the
// two-bit ALU operation code, the decoded-instruction bundle that leaves
// the controller's AND plane and the control-signal bundle that leaves its
// OR plane and steers the datapath.
// The field positions follow the MIPS instruction formats and the ALU
// encoding (00 ADD, 01 SUB, 10 OR) is the one the controller equations
// assume; the bundling into structs is this design's own choice. The
// opcode and function values themselves live only in the controller's
// AND plane, where each is written out as a product term.
package cpu_pkg;

  // ALU operation
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // One line per recognised instruction (AND plane output)
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } dec_t;

  // Datapath control signals (OR plane output)
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data memory
    logic     reg_write;  // write the register file
    logic     mem_write;  // write the data memory
    logic     npc_sel;    // 1: branch instruction
    logic     jump;       // 1: jump instruction
    logic     ext_op;     // 0: zero-extend, 1: sign-extend
    alu_ctr_e alu_ctr;
  } ctrl_t;

  // Instruction field helpers
  function automatic logic [5:0] f_op(input logic [31:0] i);
    return i[31:26];
  endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);
    return i[25:21];
  endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);
    return i[20:16];
  endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);
    return i[15:11];
  endfunction
  function automatic logic [15:0] f_imm16(input logic [31:0] i);
    return i[15:0];
  endfunction
  function automatic logic [25:0] f_target(input logic [31:0] i);
    return i[25:0];
  endfunction
  function automatic logic [5:0] f_func(input logic [31:0] i);
    return i[5:0];
  endfunction

endpackage
