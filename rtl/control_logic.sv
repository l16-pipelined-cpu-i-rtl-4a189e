// control_logic: miniMIPS instruction decoder and next-PC selection.
//
// Combinational. From the instruction word it produces the datapath selects
// the drawings list (WASEL, SEXT, BSEL, ASEL, ALUFN, WDSEL, Wr, WERF, PCSEL)
// plus a few flags the pipelines need (which source registers are read, the
// branch class, illegal opcode). PCSEL is computed from the decoded branch
// class and the equality flag `z`, the branch comparator's BZ output. RESET forces PCSEL=4 and disables
// all writes; IRQ (when `irq` is 1) or an undefined instruction turns the
// instruction into a trap that writes PC+4 to register 27 and selects PCSEL=6
// or 5. Opcodes are the MIPS-I integer subset (add/addu and addi/addiu alike
// do not trap on overflow). DELAY_SLOT=1 makes jal/jalr link with PC+8, the
// address after the branch delay slot; DELAY_SLOT=0 links with PC+4.
// The signal names come from the lecture; the instruction set, encodings
// and trap behaviour are this design's choices.
module control_logic
  import mips_pkg::*;
#(
  parameter bit DELAY_SLOT = 1'b1
) (
  input  word_t  ir,
  input  logic   z,
  input  logic   irq,
  input  logic   rst,
  output ctrl_t  ctrl,
  output pcsel_e pcsel
);

  logic [5:0] op, fn;
  assign op = ir[31:26];
  assign fn = ir[5:0];

  logic rs_used, rt_used;

  // Decode: everything that does not depend on the branch outcome.
  always_comb begin
    rs_used = 1'b0;
    rt_used = 1'b0;
    ctrl = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        ctrl.wasel    = WA_RD;
        ctrl.werf     = 1'b1;
        ctrl.reads_rs = 1'b1;
        ctrl.reads_rt = 1'b1;
        unique case (fn)
          FN_SLL:  begin ctrl.alufn = ALU_SLL; ctrl.asel = A_SHAMT; ctrl.reads_rs = 1'b0; end
          FN_SRL:  begin ctrl.alufn = ALU_SRL; ctrl.asel = A_SHAMT; ctrl.reads_rs = 1'b0; end
          FN_SRA:  begin ctrl.alufn = ALU_SRA; ctrl.asel = A_SHAMT; ctrl.reads_rs = 1'b0; end
          FN_SLLV: ctrl.alufn = ALU_SLL;
          FN_SRLV: ctrl.alufn = ALU_SRL;
          FN_SRAV: ctrl.alufn = ALU_SRA;
          FN_JR:   begin ctrl.br = BR_JR; ctrl.werf = 1'b0; ctrl.reads_rt = 1'b0; end
          FN_JALR: begin
            ctrl.br = BR_JR; ctrl.reads_rt = 1'b0;
            ctrl.wdsel = DELAY_SLOT ? WD_PC8 : WD_PC4;
          end
          FN_ADD, FN_ADDU: ctrl.alufn = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alufn = ALU_SUB;
          FN_AND:  ctrl.alufn = ALU_AND;
          FN_OR:   ctrl.alufn = ALU_OR;
          FN_XOR:  ctrl.alufn = ALU_XOR;
          FN_NOR:  ctrl.alufn = ALU_NOR;
          FN_SLT:  ctrl.alufn = ALU_SLT;
          FN_SLTU: ctrl.alufn = ALU_SLTU;
          default: ctrl = CTRL_NOP;
        endcase
        if (ctrl == CTRL_NOP && ir != NOP) ctrl.illop = 1'b1;
      end
      OP_J:   ctrl.br = BR_J;
      OP_JAL: begin
        ctrl.br    = BR_J;
        ctrl.werf  = 1'b1;
        ctrl.wasel = WA_31;
        ctrl.wdsel = DELAY_SLOT ? WD_PC8 : WD_PC4;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.br       = (op == OP_BEQ) ? BR_BEQ : BR_BNE;
        ctrl.alufn    = ALU_SUB;   // ALU unused; the comparator decides
        ctrl.reads_rs = 1'b1;
        ctrl.reads_rt = 1'b1;
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU,
      OP_ANDI, OP_ORI, OP_XORI, OP_LUI, OP_LW: begin
        ctrl.wasel    = WA_RT;
        ctrl.werf     = 1'b1;
        ctrl.bsel     = 1'b1;
        ctrl.sext     = 1'b1;
        ctrl.reads_rs = 1'b1;
        unique case (op)
          OP_ADDI, OP_ADDIU: ctrl.alufn = ALU_ADD;
          OP_SLTI:           ctrl.alufn = ALU_SLT;
          OP_SLTIU:          ctrl.alufn = ALU_SLTU;
          OP_ANDI: begin ctrl.alufn = ALU_AND; ctrl.sext = 1'b0; end
          OP_ORI:  begin ctrl.alufn = ALU_OR;  ctrl.sext = 1'b0; end
          OP_XORI: begin ctrl.alufn = ALU_XOR; ctrl.sext = 1'b0; end
          OP_LUI:  begin
            ctrl.alufn = ALU_SLL; ctrl.sext = 1'b0;
            ctrl.asel = A_16; ctrl.reads_rs = 1'b0;
          end
          default: begin ctrl.alufn = ALU_ADD; ctrl.wdsel = WD_MEM; end  // lw
        endcase
      end
      OP_SW: begin
        ctrl.alufn    = ALU_ADD;
        ctrl.bsel     = 1'b1;
        ctrl.sext     = 1'b1;
        ctrl.wr       = 1'b1;
        ctrl.reads_rs = 1'b1;
        ctrl.reads_rt = 1'b1;
      end
      default: ctrl.illop = 1'b1;
    endcase

    // Traps: the instruction is not executed; PC+4 goes to register 27.
    // The source-register flags are kept so that a pipeline's stall decision
    // does not depend on the interrupt input.
    if (irq || ctrl.illop) begin
      rs_used       = ctrl.reads_rs;
      rt_used       = ctrl.reads_rt;
      ctrl          = CTRL_NOP;
      ctrl.reads_rs = rs_used;
      ctrl.reads_rt = rt_used;
      ctrl.illop    = ~irq;
      ctrl.werf     = 1'b1;
      ctrl.wasel    = WA_27;
      ctrl.wdsel    = WD_PC4;
    end
    if (rst) ctrl = CTRL_NOP;
  end

  // Next-PC selection.
  always_comb begin
    if (rst)                   pcsel = PC_RESET;
    else if (irq)              pcsel = PC_IRQ;
    else if (ctrl.illop)       pcsel = PC_ILLOP;
    else begin
      unique case (ctrl.br)
        BR_BEQ:  pcsel = z  ? PC_BT : PC_PLUS4;
        BR_BNE:  pcsel = !z ? PC_BT : PC_PLUS4;
        BR_J:    pcsel = PC_JUMP;
        BR_JR:   pcsel = PC_JT;
        default: pcsel = PC_PLUS4;
      endcase
    end
  end

endmodule
