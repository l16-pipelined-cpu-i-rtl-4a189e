// dmem: data memory, asynchronous read and clocked write.
//
// Adr is a byte address whose bits <AW+1:2> select a word. RD follows Adr
// combinationally; when Wr is 1 the word WD is written at the rising clock
// edge. Only whole-word accesses (lw, sw) exist. Port names follow the
// datapath drawings; the depth is this design's choice.
module dmem
  import mips_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic  clk,
  input  word_t adr,
  input  word_t wd,
  input  logic  wr,
  output word_t rd
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];
  always_ff @(posedge clk) if (wr) mem[adr[AW+1:2]] <= wd;
  assign rd = mem[adr[AW+1:2]];
endmodule
