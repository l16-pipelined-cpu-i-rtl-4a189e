// bypass_unit: operand bypass selection and load-use stall for the 4-stage
// miniMIPS pipeline.
//
// Combinational. For each source register of the instruction in the RF stage
// it chooses where the operand comes from:
//   BYP_ALU  the instruction in the ALU stage computes its result with the ALU
//            and writes the register (its destination is Rd for R-type, Rt for
//            I-type, already resolved into alu_wa);
//   BYP_WB   otherwise, the instruction in the write-back stage writes the
//            register this cycle (WERF=1 and WA equal), so the register file
//            still holds the old value;
//   BYP_RF   otherwise, the register file.
// No path is taken for register 0 or for an operand the instruction does not
// read. These two rules are the lecture's. When the ALU-stage instruction
// writes the register with a value that is not its ALU output (lw: memory
// data, jal/jalr: return address), the value does not exist yet; `stall`
// then asks the pipeline to freeze IF and RF for one cycle and send a NOP
// into the ALU stage. Using a stall for that case is this design's choice,
// borrowed from the lecture's stall solution to data hazards.
module bypass_unit
  import mips_pkg::*;
(
  input  reg_addr_t rs,
  input  reg_addr_t rt,
  input  logic      reads_rs,
  input  logic      reads_rt,
  input  reg_addr_t alu_wa,
  input  logic      alu_werf,
  input  logic      alu_from_alu,   // ALU-stage result is its ALU output (WDSEL=1)
  input  reg_addr_t wb_wa,
  input  logic      wb_werf,
  output byp_e      sel_a,
  output byp_e      sel_b,
  output logic      stall
);

  function automatic byp_e pick(reg_addr_t r, logic reads,
                                reg_addr_t awa, logic awe, logic afa,
                                reg_addr_t wwa, logic wwe);
    if (!reads || r == 5'd0)               return BYP_RF;
    if (awe && afa && awa == r)            return BYP_ALU;
    if (wwe && wwa == r)                   return BYP_WB;
    return BYP_RF;
  endfunction

  function automatic logic waits(reg_addr_t r, logic reads,
                                 reg_addr_t awa, logic awe, logic afa);
    return reads && r != 5'd0 && awe && !afa && awa == r;
  endfunction

  assign sel_a = pick(rs, reads_rs, alu_wa, alu_werf, alu_from_alu, wb_wa, wb_werf);
  assign sel_b = pick(rt, reads_rt, alu_wa, alu_werf, alu_from_alu, wb_wa, wb_werf);
  assign stall = waits(rs, reads_rs, alu_wa, alu_werf, alu_from_alu) ||
                 waits(rt, reads_rt, alu_wa, alu_werf, alu_from_alu);

endmodule
