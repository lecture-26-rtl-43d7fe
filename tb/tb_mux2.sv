// tb_mux2: self-checking test of mux2 at 32 and 5 bits with random data.
module tb_mux2;
  timeunit 1ns; timeprecision 1ps;
  logic [31:0] a0, a1, ay;
  logic [4:0]  b0, b1, by;
  logic        sa, sb;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(32)) dut32 (.d0(a0), .d1(a1), .sel(sa), .y(ay));
  mux2 #(.WIDTH(5))  dut5  (.d0(b0), .d1(b1), .sel(sb), .y(by));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a0 = $urandom; a1 = $urandom; sa = 1'($urandom);
      b0 = 5'($urandom); b1 = 5'($urandom); sb = 1'($urandom);
      #1;
      checks++;
      if (ay !== (sa ? a1 : a0)) begin failures++; $display("FAIL 32 sel=%0b y=%h", sa, ay); end
      checks++;
      if (by !== (sb ? b1 : b0)) begin failures++; $display("FAIL 5 sel=%0b y=%h", sb, by); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
