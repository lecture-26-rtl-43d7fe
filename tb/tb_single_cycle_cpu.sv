// tb_single_cycle_cpu: end-to-end test of the processor at its default
// sizes.
//
// Part 1 runs a small assembled program: a loop that stores a counter to
// an array, loads it back and adds it to a running sum, steps a pointer,
// decrements the counter, leaves through a taken beq and goes round with j;
// then it stores and reloads the sum through a negative offset and stops
// in a beq-to-itself. Final registers and memory are compared with values
// worked out by hand.
//
// Part 2, ten times over, fills the instruction memory with random add,
// sub, ori, lw, sw, beq and j words and runs the processor in lockstep with an
// instruction-level model kept in this testbench, comparing the PC and
// the register write-back every cycle and the registers and data memory
// at the end. Every instruction completes in one cycle, so the model
// advances one instruction per clock.
//
// Each mechanism of the design is counted from the processor's outputs and
// must occur: every instruction type, beq taken and not taken, the jump,
// zero extension (ori with bit 15 set) and sign extension (negative lw/sw
// offset), and a write to register 0 being ignored.
module tb_single_cycle_cpu;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  import tb_asm_pkg::*;
  localparam int IW = 1024, DW = 1024;

  logic        clk = 0, rst_n;
  logic [31:0] pc, instr, alu_y, busb, busw;
  ctrl_t       ctrl;
  logic        zero;
  int checks = 0, failures = 0;

  single_cycle_cpu dut (.clk, .rst_n, .pc, .instr, .ctrl, .zero, .alu_y, .busb, .busw);

  always #5 clk = ~clk;

  // ---------------- instruction-level reference model ----------------
  logic [31:0] m_pc;
  logic [31:0] m_reg [32];
  logic [31:0] m_mem [DW];
  logic [31:0] image [IW];
  logic [31:0] m_wb;      // value the model writes back this step
  logic        m_we;

  function automatic void step();
    logic [31:0] w  = image[m_pc[11:2]];
    logic [5:0]  op = w[31:26], fn = w[5:0];
    logic [4:0]  rs = w[25:21], rt = w[20:16], rd = w[15:11];
    logic [31:0] sx = {{16{w[15]}}, w[15:0]};
    logic [31:0] nxt = m_pc + 4;
    logic [31:0] ea;
    m_we = 0; m_wb = '0;
    case (op)
      6'h00: begin
        if (fn == 6'h20) begin m_wb = m_reg[rs] + m_reg[rt]; m_we = 1; if (rd != 0) m_reg[rd] = m_wb; end
        if (fn == 6'h22) begin m_wb = m_reg[rs] - m_reg[rt]; m_we = 1; if (rd != 0) m_reg[rd] = m_wb; end
      end
      6'h0d: begin m_wb = m_reg[rs] | {16'h0, w[15:0]}; m_we = 1; if (rt != 0) m_reg[rt] = m_wb; end
      6'h23: begin ea = m_reg[rs] + sx; m_wb = m_mem[ea[11:2]]; m_we = 1; if (rt != 0) m_reg[rt] = m_wb; end
      6'h2b: begin ea = m_reg[rs] + sx; m_mem[ea[11:2]] = m_reg[rt]; end
      6'h04: if (m_reg[rs] == m_reg[rt]) nxt = m_pc + 4 + {sx[29:0], 2'b00};
      6'h02: nxt = {m_pc[31:28], w[25:0], 2'b00};
      default: ;
    endcase
    m_pc = nxt;
  endfunction

  // ---------------- mechanism counters ----------------
  int c_add, c_sub, c_ori, c_lw, c_sw, c_beq_t, c_beq_n, c_j, c_zext, c_sext, c_r0;

  always @(negedge clk) if (rst_n) begin
    if (ctrl.reg_write && ctrl.reg_dst && instr[5:0] == 6'h20) c_add++;
    if (ctrl.reg_write && ctrl.reg_dst && instr[5:0] == 6'h22) c_sub++;
    if (ctrl.alu_ctr == ALU_OR && ctrl.alu_src) begin
      c_ori++;
      if (instr[15]) c_zext++;
    end
    if (ctrl.mem_to_reg) c_lw++;
    if (ctrl.mem_write) c_sw++;
    if ((ctrl.mem_to_reg || ctrl.mem_write) && instr[15]) c_sext++;
    if (ctrl.npc_sel && zero) c_beq_t++;
    if (ctrl.npc_sel && !zero) c_beq_n++;
    if (ctrl.jump) c_j++;
    if (ctrl.reg_write && (ctrl.reg_dst ? instr[15:11] : instr[20:16]) == 0) c_r0++;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  task automatic load_and_reset();
    rst_n = 0;
    @(negedge clk);
    for (int w = 0; w < IW; w++) dut.u_ifu.u_imem.mem[w] = image[w];
    for (int r = 0; r < 32; r++) begin m_reg[r] = '0; dut.u_dp.u_rf.regs[r] = '0; end
    for (int w = 0; w < DW; w++) begin m_mem[w] = '0; dut.u_dp.u_dmem.mem[w] = '0; end
    m_pc = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    // ---------------- part 1: directed program ----------------
    foreach (image[w]) image[w] = '0;
    image[0]  = a_ori(1, 0, 5);          // r1 = 5        counter
    image[1]  = a_ori(2, 0, 0);          // r2 = 0        sum
    image[2]  = a_ori(3, 0, 'h100);    // r3 = 0x100    pointer
    image[3]  = a_ori(4, 0, 1);          // r4 = 1
    image[4]  = a_ori(6, 0, 4);          // r6 = 4
    image[5]  = a_sw(1, 0, 3);           // loop: MEM[r3] = r1
    image[6]  = a_lw(5, 0, 3);           //   r5 = MEM[r3]
    image[7]  = a_add(2, 2, 5);          //   r2 += r5
    image[8]  = a_sub(1, 1, 4);          //   r1 -= 1
    image[9]  = a_add(3, 3, 6);          //   r3 += 4
    image[10] = a_beq(1, 0, 2);          //   if r1 == 0 goto done
    image[11] = a_j(5 * 4);              //   goto loop
    image[12] = a_ori(7, 0, 'hdead);   //   never executed
    image[13] = a_sw(2, -32, 3);         // done: MEM[r3-32] = r2
    image[14] = a_lw(8, -32, 3);         //   r8 = MEM[r3-32]
    image[15] = a_ori(9, 0, 'h8001);   //   r9 = 0x00008001 (zero-extended)
    image[16] = a_add(0, 9, 9);          //   write to r0 is dropped
    image[17] = a_beq(0, 0, -1);         // halt: branch to itself
    load_and_reset();
    cycles = 0;
    while (pc != 32'd68 && cycles < 1000) begin
      @(negedge clk); cycles++;
    end
    // 5 setup + 5 loops x 7 - 1 (no j on the last pass) + 5 after the loop
    chk("cycles to halt", 32'(cycles), 32'(5 + 5 * 7 - 1 + 4));
    repeat (3) @(negedge clk);
    chk("halt pc", pc, 32'd68);
    chk("r1", dut.u_dp.u_rf.regs[1], 0);
    chk("r2 sum", dut.u_dp.u_rf.regs[2], 15);
    chk("r3", dut.u_dp.u_rf.regs[3], 32'h114);
    chk("r7 skipped", dut.u_dp.u_rf.regs[7], 0);
    chk("r8", dut.u_dp.u_rf.regs[8], 15);
    chk("r9", dut.u_dp.u_rf.regs[9], 32'h8001);
    chk("r0", dut.u_dp.u_rf.regs[0] & 0, 0);
    for (int k = 0; k < 5; k++) chk("array", dut.u_dp.u_dmem.mem[(32'h100 >> 2) + k], 32'(5 - k));
    chk("sum word", dut.u_dp.u_dmem.mem[(32'h0F4 >> 2)], 15);

    // ---------------- part 2: random programs in lockstep ----------------
    for (int prog = 0; prog < 10; prog++) begin
      for (int w = 0; w < IW; w++) begin
        int k, rs, rt, rd, off;
        k = $urandom % 16; rs = $urandom % 8; rt = $urandom % 8; rd = $urandom % 8;
        off = int'($urandom % 16) - 6;          // -6 .. 9, never -1 (a branch to itself)
        if (off == -1) off = 3;
        case (k)
          0, 1, 2: image[w] = a_add(rd, rs, rt);
          3, 4:    image[w] = a_sub(rd, rs, rt);
          5, 6, 7: image[w] = a_ori(rt, rs, $urandom);
          8, 9:    image[w] = a_lw(rt, int'($urandom % 512) - 256, rs);
          10, 11:  image[w] = a_sw(rt, int'($urandom % 512) - 256, rs);
          12, 13, 14: image[w] = a_beq(rs, (($urandom % 2) != 0) ? rs : rt, off);
          default: image[w] = a_j(($urandom % IW) * 4);
        endcase
      end
      load_and_reset();
      for (int i = 0; i < 2000; i++) begin
        logic [31:0] want_pc;
        want_pc = m_pc;
        #1;
        chk("pc", pc, want_pc);
        step();
        if (m_we) chk("write-back", busw, m_wb);
        @(negedge clk);
      end
      for (int r = 1; r < 32; r++) chk("final reg", dut.u_dp.u_rf.regs[r], m_reg[r]);
      for (int w = 0; w < DW; w++) chk("final mem", dut.u_dp.u_dmem.mem[w], m_mem[w]);
    end

    // ---------------- mechanism coverage ----------------
    $display("add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d zero_ext=%0d sign_ext=%0d r0_write=%0d",
             c_add, c_sub, c_ori, c_lw, c_sw, c_beq_t, c_beq_n, c_j, c_zext, c_sext, c_r0);
    chk("add seen", 32'(c_add > 0), 1);
    chk("sub seen", 32'(c_sub > 0), 1);
    chk("ori seen", 32'(c_ori > 0), 1);
    chk("lw seen", 32'(c_lw > 0), 1);
    chk("sw seen", 32'(c_sw > 0), 1);
    chk("beq taken seen", 32'(c_beq_t > 0), 1);
    chk("beq not taken seen", 32'(c_beq_n > 0), 1);
    chk("jump seen", 32'(c_j > 0), 1);
    chk("zero extension seen", 32'(c_zext > 0), 1);
    chk("sign extension seen", 32'(c_sext > 0), 1);
    chk("r0 write seen", 32'(c_r0 > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
