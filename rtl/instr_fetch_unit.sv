// instr_fetch_unit: program counter, instruction memory and next-PC logic.
//
// The PC register holds address bits 31:2; bits 1:0 are always 00 because
// instructions are word aligned. Each rising clock edge loads the next PC:
//   PC + 4                                 normally
//   PC + 4 + (SignExt(imm16) << 2)         when npc_sel & zero (beq taken)
//   {PC[31:28], target26, 00}              when jump
// Two adders form PC + 4 and the branch target; a first multiplexer picks
// between them under nPC_MUX_sel = npc_sel & zero, and a second one, after
// it, replaces the result with the jump target when jump is 1. The
// instruction memory is read combinationally at the PC, so instr belongs to
// the current cycle. rst_n is a synchronous active-low reset that sets the
// PC to 0.
module instr_fetch_unit
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        jump,
  output logic [31:0] instr,
  output logic [31:0] pc
);
  logic [31:2] pc_q;
  logic [31:0] pc_plus4, br_offset, br_target, jmp_target, seq_or_br, pc_next;
  logic        npc_mux_sel;

  always_comb begin
    pc          = {pc_q, 2'b00};
    pc_plus4    = pc + 32'd4;
    br_offset   = {{14{instr[15]}}, instr[15:0], 2'b00};   // PC Ext
    br_target   = pc_plus4 + br_offset;
    jmp_target  = {pc[31:28], f_target(instr), 2'b00};
    npc_mux_sel = npc_sel & zero;
  end

  mux2 #(.WIDTH(32)) u_br_mux  (.d0(pc_plus4),  .d1(br_target),  .sel(npc_mux_sel), .y(seq_or_br));
  mux2 #(.WIDTH(32)) u_jmp_mux (.d0(seq_or_br), .d1(jmp_target), .sel(jump),        .y(pc_next));

  always_ff @(posedge clk) begin
    if (!rst_n) pc_q <= '0;
    else        pc_q <= pc_next[31:2];
  end

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (.adr(pc), .instr(instr));
endmodule
