// regfile: register file of NREGS registers of WIDTH bits (32 x 32 here).
//
// Two read ports (ra -> busa, rb -> busb) are combinational. One write port
// stores busw into register rw at the rising clock edge when we (RegWr) is 1,
// so a value written in one instruction is read by the next. Register 0
// always reads as zero and ignores writes, as in the MIPS architecture the
// processor implements. No reset: registers start undefined, as hardware
// would.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    rw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [WIDTH-1:0] busw,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busw;
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end
endmodule
