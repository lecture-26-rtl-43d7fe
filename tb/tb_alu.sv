// tb_alu: self-checking test of the ALU: ADD, SUB and OR on corner and
// random operands, and the Zero flag (including equal operands under SUB,
// the beq case).
module tb_alu;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  logic [31:0] a, b, y;
  alu_ctr_e    ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alu_ctr(ctr), .y(y), .zero(zero));

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [1:0] tc);
    longint unsigned r;
    a = ta; b = tb_; ctr = alu_ctr_e'(tc);
    #1;
    case (tc)
      2'b00: r = (longint'(ta) + longint'(tb_)) % 64'h1_0000_0000;
      2'b01: r = (longint'(ta) + 64'h1_0000_0000 - longint'(tb_)) % 64'h1_0000_0000;
      default: r = {32'h0, ta | tb_};
    endcase
    checks++;
    if (y !== 32'(r)) begin
      failures++; $display("FAIL op=%0d a=%h b=%h y=%h want %h", tc, ta, tb_, y, 32'(r));
    end
    checks++;
    if (zero !== (r == 0)) begin
      failures++; $display("FAIL zero op=%0d a=%h b=%h zero=%0b", tc, ta, tb_, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};
    for (int op = 0; op < 3; op++)
      foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j], 2'(op));
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r1;
      r1 = $urandom;
      check(r1, $urandom, 2'(i % 3));
      check(r1, r1, 2'b01);      // equal operands: SUB gives zero
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
