// tb_data_memory: self-checking test of the data memory against an array
// model: random word writes under wr_en, combinational reads, byte-offset
// bits ignored, and write visible only after the clock edge.
module tb_data_memory;
  timeunit 1ns; timeprecision 1ps;
  localparam int WORDS = 1024;
  logic        clk = 0;
  logic        wr_en;
  logic [31:0] adr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(WORDS)) dut (.clk, .wr_en, .adr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1;
    for (int w = 0; w < WORDS; w++) begin
      adr = 32'(w * 4); din = $urandom;
      @(negedge clk);
      model[w] = din;
    end
    for (int i = 0; i < 10000; i++) begin
      wr_en = 1'($urandom); din = $urandom;
      adr = {20'($urandom), 10'($urandom), 2'($urandom)};
      #1;
      checks++;
      if (dout !== model[adr[11:2]]) begin failures++; $display("FAIL rd %h got %h want %h", adr, dout, model[adr[11:2]]); end
      @(negedge clk);
      if (wr_en) model[adr[11:2]] = din;
      checks++;
      if (dout !== model[adr[11:2]]) begin failures++; $display("FAIL after edge %h got %h want %h", adr, dout, model[adr[11:2]]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
