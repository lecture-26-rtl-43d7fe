// data_memory: word-organised data memory of WORDS 32-bit words.
//
// adr is a byte address; bits [AW+1:2] pick the word and the two lowest bits
// are ignored, since lw and sw move whole words. Higher address bits are
// ignored as well, so the memory repeats through the address space. Reading
// is combinational (dout follows adr in the same cycle); din is written at
// the rising clock edge when wr_en (MemWr) is 1. Contents are not reset.
module data_memory #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] din,
  output logic [31:0] dout
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  always_comb widx = adr[AW+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= din;
  end

  always_comb dout = mem[widx];
endmodule
