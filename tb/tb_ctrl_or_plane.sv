// tb_ctrl_or_plane: test of the OR plane. Drives every one-hot decoded
// instruction and the all-zero case, then random multi-hot patterns, and
// compares each control signal with the OR of the instructions that need
// it (worked out here from the per-instruction control table).
module tb_ctrl_or_plane;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  dec_t  dec;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ctrl_or_plane dut (.dec(dec), .ctrl(ctrl));

  // per-instruction rows, order add sub ori lw sw beq jump:
  // {RegDst, ALUSrc, MemtoReg, RegWrite, MemWrite, nPCsel, Jump, ExtOp, ALUctr[1:0]}
  localparam logic [9:0] ROW [7] = '{
    10'b1_0_0_1_0_0_0_0_00, 10'b1_0_0_1_0_0_0_0_01, 10'b0_1_0_1_0_0_0_0_10,
    10'b0_1_1_1_0_0_0_1_00, 10'b0_1_0_0_1_0_0_1_00, 10'b0_0_0_0_0_1_0_0_01,
    10'b0_0_0_0_0_0_1_0_00};

  task automatic apply(logic [6:0] lines);
    logic [9:0] want = '0, got;
    dec = dec_t'(lines);
    for (int k = 0; k < 7; k++) if (lines[6-k]) want |= ROW[k];
    #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write, ctrl.mem_write,
           ctrl.npc_sel, ctrl.jump, ctrl.ext_op, 2'(ctrl.alu_ctr)};
    checks++;
    if (got !== want) begin
      failures++; $display("FAIL lines=%b got %b want %b", lines, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    for (int k = 0; k < 7; k++) apply(7'(1 << k));
    for (int i = 0; i < 128; i++) apply(7'(i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
