// tb_extender: exhaustive test of the immediate extender, all 65536
// immediates with zero and sign extension.
module tb_extender;
  timeunit 1ns; timeprecision 1ps;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, expect_v;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm16), .ext_op(ext_op), .imm32(imm32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 2; op++) begin
      for (int v = 0; v < 65536; v++) begin
        imm16 = 16'(v); ext_op = 1'(op);
        #1;
        // integer arithmetic reference: signed value as 32 bits, or plain value
        expect_v = (op == 1 && v >= 32768) ? 32'(v - 65536) : 32'(v);
        checks++;
        if (imm32 !== expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h op=%0d got %h want %h", imm16, op, imm32, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
