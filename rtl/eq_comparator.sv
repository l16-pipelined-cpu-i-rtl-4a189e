// eq_comparator: the early branch-decision comparator ("=" box, output BZ).
//
// Combinational: BZ is 1 when the two register operands are equal. It sits in
// the register-file stage next to the register file, so beq/bne are decided
// one stage after fetch instead of at the end of the ALU stage, leaving a
// single branch delay slot. The equality test is written as the reduction of
// a bitwise XOR, the bit-by-bit comparison the lecture describes.
module eq_comparator #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             bz
);
  assign bz = ~|(a ^ b);
endmodule
