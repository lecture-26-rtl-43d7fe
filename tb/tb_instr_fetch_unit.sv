// tb_instr_fetch_unit: self-checking test of the fetch unit. The
// instruction memory is filled with random words, so every instruction
// carries a random 16-bit offset and 26-bit target. Each cycle npc_sel,
// zero and jump are driven at random and the next PC is compared with
// PC + 4, the branch target PC + 4 + SignExt(imm16)*4 (only when npc_sel
// and zero are both 1) or the jump target {PC[31:28], target, 00}. The
// instruction output is checked against the memory image at every PC.
// Also checks reset and counts each next-PC path.
module tb_instr_fetch_unit;
  timeunit 1ns; timeprecision 1ps;
  localparam int WORDS = 1024;
  logic        clk = 0, rst_n;
  logic        npc_sel, zero, jump;
  logic [31:0] instr, pc;
  logic [31:0] image [WORDS];
  logic [31:0] pc_model;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br = 0, n_br_not = 0, n_jmp = 0;

  instr_fetch_unit #(.IMEM_WORDS(WORDS)) dut (.clk, .rst_n, .npc_sel, .zero, .jump, .instr, .pc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      image[w] = $urandom;
      dut.u_imem.mem[w] = image[w];
    end
    npc_sel = 0; zero = 0; jump = 0; rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    pc_model = 0;
    checks++;
    if (pc !== 32'h0) begin failures++; $display("FAIL reset pc=%h", pc); end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] cur;
      npc_sel = 1'($urandom); zero = 1'($urandom); jump = ($urandom % 4) == 0;
      #1;
      cur = image[pc_model[11:2]];
      checks++;
      if (instr !== cur) begin failures++; $display("FAIL instr pc=%h got %h want %h", pc, instr, cur); end
      @(negedge clk);
      if (jump) begin
        pc_model = {pc_model[31:28], cur[25:0], 2'b00}; n_jmp++;
      end else if (npc_sel && zero) begin
        pc_model = pc_model + 4 + {{14{cur[15]}}, cur[15:0], 2'b00}; n_br++;
      end else begin
        pc_model = pc_model + 4;
        if (npc_sel) n_br_not++; else n_seq++;
      end
      checks++;
      if (pc !== pc_model) begin failures++; $display("FAIL pc got %h want %h", pc, pc_model); end
    end
    checks++;
    if (n_seq == 0 || n_br == 0 || n_br_not == 0 || n_jmp == 0) begin
      failures++; $display("FAIL a next-PC path was never taken");
    end
    $display("paths: seq=%0d branch_taken=%0d branch_not_taken=%0d jump=%0d", n_seq, n_br, n_br_not, n_jmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
