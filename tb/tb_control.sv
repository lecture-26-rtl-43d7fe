// tb_control: exhaustive test of the main controller over all 4096
// opcode/function combinations. Expected signals come from the control
// table of the instruction set, written out here as rows; positions the
// table leaves as don't-care are expected to be 0, which is what the
// sum-of-products equations give. Any other instruction must produce all
// zeros (no write of any state, PC + 4).
module tb_control;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  logic [5:0] op, func;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  control dut (.op(op), .func(func), .ctrl(ctrl));

  // {RegDst, ALUSrc, MemtoReg, RegWrite, MemWrite, nPCsel, Jump, ExtOp, ALUctr[1:0]}
  function automatic logic [9:0] expected(logic [5:0] o, logic [5:0] f);
    if (o == 6'h00 && f == 6'h20) return 10'b1_0_0_1_0_0_0_0_00; // add
    if (o == 6'h00 && f == 6'h22) return 10'b1_0_0_1_0_0_0_0_01; // sub
    if (o == 6'h0d)               return 10'b0_1_0_1_0_0_0_0_10; // ori
    if (o == 6'h23)               return 10'b0_1_1_1_0_0_0_1_00; // lw
    if (o == 6'h2b)               return 10'b0_1_0_0_1_0_0_1_00; // sw
    if (o == 6'h04)               return 10'b0_0_0_0_0_1_0_0_01; // beq
    if (o == 6'h02)               return 10'b0_0_0_0_0_0_1_0_00; // j
    return '0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        logic [9:0] got, want;
        op = 6'(o); func = 6'(f);
        #1;
        got  = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_write, ctrl.mem_write,
                ctrl.npc_sel, ctrl.jump, ctrl.ext_op, 2'(ctrl.alu_ctr)};
        want = expected(op, func);
        checks++;
        if (got !== want) begin
          failures++;
          if (failures < 20) $display("FAIL op=%b func=%b got %b want %b", op, func, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
