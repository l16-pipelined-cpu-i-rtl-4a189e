// imem: instruction memory, an asynchronous-read word array.
//
// Address A is a byte address; its bits <AW+1:2> select the word, so the
// reset vector 0x80000000 maps to word 0. D follows A combinationally, as in
// the datapath drawings. The processor only reads it; a separate load port
// (load_we/load_addr/load_data, word address, written at the clock edge)
// fills it with a program before the processor leaves reset. The load port
// and the depth are this design's choices; the lecture gives neither.
module imem
  import mips_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic                     clk,
  input  word_t                    a,
  output word_t                    d,
  input  logic                     load_we,
  input  logic [$clog2(WORDS)-1:0] load_addr,
  input  word_t                    load_data
);
  localparam int AW = $clog2(WORDS);
  word_t mem [WORDS];
  always_ff @(posedge clk) if (load_we) mem[load_addr] <= load_data;
  assign d = mem[a[AW+1:2]];
endmodule
