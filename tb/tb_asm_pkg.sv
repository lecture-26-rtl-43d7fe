// tb_asm_pkg: instruction encoders for the processor testbenches.
//
// Builds 32-bit machine words of the seven supported instructions from
// their fields, following the R, I and J formats:
//   R: op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
//   I: op[31:26] rs[25:21] rt[20:16] immediate[15:0]
//   J: op[31:26] target[25:0]
// The numeric opcodes are written out here rather than taken from the
// design's package, so the checks do not share its constants.
package tb_asm_pkg;
  function automatic logic [31:0] a_add(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h20};
  endfunction
  function automatic logic [31:0] a_sub(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h22};
  endfunction
  function automatic logic [31:0] a_ori(int rt, int rs, int imm);
    return {6'h0d, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] a_lw(int rt, int off, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] a_sw(int rt, int off, int rs);
    return {6'h2b, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] a_beq(int rs, int rt, int off);
    return {6'h04, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] a_j(int byte_addr);
    return {6'h02, 26'(byte_addr >> 2)};
  endfunction
endpackage
