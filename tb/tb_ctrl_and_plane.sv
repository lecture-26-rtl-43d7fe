// tb_ctrl_and_plane: exhaustive test of the instruction decoder over all
// 4096 opcode/function combinations: each line must be 1 for exactly its
// instruction's encoding and 0 otherwise.
module tb_ctrl_and_plane;
  timeunit 1ns; timeprecision 1ps;
  import cpu_pkg::*;
  logic [5:0] op, func;
  dec_t       dec;
  int checks = 0, failures = 0;
  int hits [7];

  ctrl_and_plane dut (.op(op), .func(func), .dec(dec));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        logic [6:0] got, want;
        op = 6'(o); func = 6'(f);
        #1;
        got = {dec.add, dec.sub, dec.ori, dec.lw, dec.sw, dec.beq, dec.jump};
        want = {o == 0 && f == 32, o == 0 && f == 34, o == 13, o == 35, o == 43, o == 4, o == 2};
        checks++;
        if (got !== want) begin
          failures++;
          if (failures < 20) $display("FAIL op=%0d func=%0d got %b want %b", o, f, got, want);
        end
        for (int k = 0; k < 7; k++) if (got[k]) hits[k]++;
      end
    end
    // every line fires for its own encodings: 1 each for add/sub, 64 for the I/J types
    checks++;
    if (hits[6] != 1 || hits[5] != 1 || hits[4] != 64 || hits[3] != 64 ||
        hits[2] != 64 || hits[1] != 64 || hits[0] != 64) begin
      failures++; $display("FAIL line counts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
