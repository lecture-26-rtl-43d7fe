// tb_datapath: self-checking test of the execution datapath. The
// testbench plays the controller (its own table of control settings per
// instruction) and keeps a model of the registers and data memory. It
// first loads registers with ori and the whole data memory with sw, then
// runs random add, sub, ori, lw, sw and beq instructions, checking the
// ALU result, the Zero flag, the store data and the write-back bus every
// cycle. A wrong register or memory write shows up in later reads.
module tb_datapath;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  import tb_asm_pkg::*;
  localparam int WORDS = 1024;
  logic        clk = 0;
  logic [31:0] instr, alu_y, busb, busw;
  ctrl_t       ctrl;
  logic        zero;
  logic [31:0] regs [32];
  logic [31:0] mem  [WORDS];
  int checks = 0, failures = 0;
  bit loading = 1;   // registers not yet all written: busB is not known

  datapath #(.DMEM_WORDS(WORDS)) dut (.clk, .instr, .ctrl, .zero, .alu_y, .busb, .busw);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 add 1 sub 2 ori 3 lw 4 sw 5 beq
  task automatic exec(int kind, logic [31:0] word);
    logic [4:0]  rs = word[25:21], rt = word[20:16], rd = word[15:11];
    logic [31:0] a = regs[rs], b = regs[rt];
    logic [31:0] sx = {{16{word[15]}}, word[15:0]}, zx = {16'h0, word[15:0]};
    logic [31:0] y;
    instr = word;
    ctrl  = '0;
    case (kind)
      0: begin ctrl.reg_dst = 1; ctrl.reg_write = 1; ctrl.alu_ctr = ALU_ADD; y = a + b; end
      1: begin ctrl.reg_dst = 1; ctrl.reg_write = 1; ctrl.alu_ctr = ALU_SUB; y = a - b; end
      2: begin ctrl.alu_src = 1; ctrl.reg_write = 1; ctrl.alu_ctr = ALU_OR;  y = a | zx; end
      3: begin ctrl.alu_src = 1; ctrl.reg_write = 1; ctrl.mem_to_reg = 1; ctrl.ext_op = 1;
               ctrl.alu_ctr = ALU_ADD; y = a + sx; end
      4: begin ctrl.alu_src = 1; ctrl.mem_write = 1; ctrl.ext_op = 1; ctrl.alu_ctr = ALU_ADD;
               y = a + sx; end
      default: begin ctrl.npc_sel = 1; ctrl.alu_ctr = ALU_SUB; y = a - b; end
    endcase
    #1;
    checks++;
    if (alu_y !== y) begin failures++; $display("FAIL kind=%0d alu %h want %h", kind, alu_y, y); end
    checks++;
    if (zero !== (y == 0)) begin failures++; $display("FAIL kind=%0d zero=%0b", kind, zero); end
    if (!loading) checks++;
    if (!loading && busb !== b) begin failures++; $display("FAIL kind=%0d busb %h want %h", kind, busb, b); end
    if (kind <= 3) begin
      logic [31:0] wb = (kind == 3) ? mem[y[11:2]] : y;
      checks++;
      if (busw !== wb) begin failures++; $display("FAIL kind=%0d busw %h want %h", kind, busw, wb); end
    end
    @(negedge clk);
    case (kind)
      0, 1: if (rd != 0) regs[rd] = y;
      2:    if (rt != 0) regs[rt] = y;
      3:    if (rt != 0) regs[rt] = mem[y[11:2]];
      4:    mem[y[11:2]] = b;
      default: ;
    endcase
  endtask

  initial begin
    regs[0] = '0;
    instr = '0; ctrl = '0;
    for (int r = 1; r < 32; r++) begin
      regs[r] = '0;                                    // ori from r0 sets the whole register
      exec(2, a_ori(r, 0, $urandom));
    end
    loading = 0;
    for (int w = 0; w < WORDS; w++) exec(4, a_sw(1 + $urandom % 31, w * 4, 0));
    for (int i = 0; i < 20000; i++) begin
      int kind, rs, rt, rd;
      kind = $urandom % 6; rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32;
      case (kind)
        0: exec(0, a_add(rd, rs, rt));
        1: exec(1, a_sub(rd, rs, rt));
        2: exec(2, a_ori(rt, rs, $urandom));
        3: exec(3, a_lw(rt, $urandom, rs));
        4: exec(4, a_sw(rt, $urandom, rs));
        default: exec(5, a_beq(rs, (i % 3 == 0) ? rs : rt, $urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
