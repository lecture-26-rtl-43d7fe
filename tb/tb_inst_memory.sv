// tb_inst_memory: self-checking test of the instruction memory. Loads a
// word pattern computed from the index into the array, then reads every
// word through aligned byte addresses and checks the pattern.
module tb_inst_memory;
  timeunit 1ns; timeprecision 1ps;
  localparam int WORDS = 1024;
  logic [31:0] adr, instr;
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(WORDS)) dut (.adr(adr), .instr(instr));

  function automatic logic [31:0] pattern(int w);
    return 32'(w) * 32'h9E37_79B9 ^ 32'hA5A5_0000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) dut.mem[w] = pattern(w);
    for (int k = 0; k < 4 * WORDS; k++) begin
      int w;
      w = (k * 7 + 3) % WORDS;
      adr = 32'(w * 4);
      #1;
      checks++;
      if (instr !== pattern(w)) begin
        failures++;
        if (failures < 10) $display("FAIL adr=%h got %h want %h", adr, instr, pattern(w));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
