// tb_regfile: self-checking test of the 32 x 32 register file against an
// array model: random writes with and without write enable, both read
// ports each cycle, register 0 reading zero, and a write becoming visible
// only after the clock edge.
module tb_regfile;
  timeunit 1ns; timeprecision 1ps;
  logic        clk = 0;
  logic        we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .we, .rw, .ra, .rb, .busw, .busa, .busb);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (busa !== model[ra]) begin failures++; $display("FAIL A r%0d=%h want %h", ra, busa, model[ra]); end
    checks++;
    if (busb !== model[rb]) begin failures++; $display("FAIL B r%0d=%h want %h", rb, busb, model[rb]); end
  endtask

  initial begin
    // fill every register
    we = 1;
    for (int r = 0; r < 32; r++) begin
      rw = 5'(r); busw = $urandom; ra = 0; rb = 0;
      @(negedge clk);
      model[r] = (r == 0) ? 32'h0 : busw;
    end
    for (int i = 0; i < 5000; i++) begin
      we = 1'($urandom); rw = 5'($urandom); busw = $urandom;
      ra = (i % 4 == 0) ? rw : 5'($urandom); rb = 5'($urandom);
      #1;
      check_reads();          // before the edge: old value
      @(negedge clk);
      if (we && rw != 0) model[rw] = busw;
      check_reads();          // after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
