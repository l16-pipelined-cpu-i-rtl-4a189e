// alu: the miniMIPS arithmetic and logic unit.
//
// Purely combinational. Computes Y = A op B for the function ALUFN and the
// flags N (sign of Y), V (two's-complement overflow of add/subtract),
// C (carry out of add/subtract; for subtract, 1 means no borrow) and Z (Y is
// zero). Shifts move operand B by the amount in A<4:0>, so that the shamt
// field and the constant 16 (for lui) can be steered onto A by ASEL.
// The lecture names the unit, its A/B/Y ports, ALUFN and the N V C Z flags;
// the set of functions and their encoding are this design's choice, sized to
// the MIPS-I integer instructions the control logic decodes.
module alu
  import mips_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  alufn_e alufn,
  output word_t  y,
  output logic   n,
  output logic   v,
  output logic   c,
  output logic   z
);

  logic        sub;
  logic [32:0] sum;
  word_t       bx;

  assign sub = (alufn == ALU_SUB) || (alufn == ALU_SLT) || (alufn == ALU_SLTU);
  assign bx  = sub ? ~b : b;
  assign sum = {1'b0, a} + {1'b0, bx} + {32'd0, sub};

  always_comb begin
    unique case (alufn)
      ALU_ADD, ALU_SUB: y = sum[31:0];
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = word_t'($signed(b) >>> a[4:0]);
      default:  y = sum[31:0];
    endcase
  end

  assign n = y[31];
  assign z = (y == '0);
  assign c = sum[32];
  assign v = (a[31] == bx[31]) && (sum[31] != a[31]);

endmodule
