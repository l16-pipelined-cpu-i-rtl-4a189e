// pc_mux: the PCSEL multiplexer that chooses the next program counter.
//
// Combinational. Inputs, in PCSEL order: 0 PC+4, 1 branch target BT,
// 2 jump target PC<31:28>:J<25:0>:00, 3 register jump target JT, 4 reset
// vector 0x80000000, 5 illegal-instruction vector 0x80000040, 6 interrupt
// vector 0x80000080. Input numbering and the three constants are those of the
// datapath drawings; which constant serves which event is this design's
// reading of them.
module pc_mux
  import mips_pkg::*;
(
  input  pcsel_e pcsel,
  input  word_t  pc4,
  input  word_t  bt,
  input  word_t  jump,
  input  word_t  jt,
  output word_t  pc_next
);
  always_comb begin
    unique case (pcsel)
      PC_PLUS4: pc_next = pc4;
      PC_BT:    pc_next = bt;
      PC_JUMP:  pc_next = jump;
      PC_JT:    pc_next = jt;
      PC_RESET: pc_next = RESET_VEC;
      PC_ILLOP: pc_next = ILLOP_VEC;
      default:  pc_next = IRQ_VEC;
    endcase
  end
endmodule
