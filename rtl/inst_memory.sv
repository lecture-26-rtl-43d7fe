// inst_memory: read-only instruction memory of WORDS 32-bit words.
//
// Instruction = MEM[adr], combinational, where adr is the byte address held
// in the PC; bits [AW+1:2] pick the word and higher bits are ignored. The
// contents are loaded from outside the processor before it runs (a
// simulation testbench writes the mem array directly, or a file can be
// named in INIT_FILE for $readmemh); the processor never writes it.
// Synthesized without an INIT_FILE the array has no contents, so a
// synthesis tool may reduce it to constant outputs; in a real chip it is
// a ROM or a memory loaded through a port this design does not model.
module inst_memory #(
  parameter int unsigned WORDS     = 1024,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic [31:0] adr,
  output logic [31:0] instr
);
  logic [31:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_comb instr = mem[adr[AW+1:2]];
endmodule
