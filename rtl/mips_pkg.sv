// mips_pkg: types and constants shared by the miniMIPS pipelines.
//
// The instruction fields (Rs <25:21>, Rt <20:16>, Rd <15:11>, shamt <10:6>,
// Imm <15:0>, J <25:0>), the select inputs of the PCSEL, WASEL, ASEL, BSEL and
// WDSEL multiplexers, the exception vectors 0x80000000 / 0x80000040 /
// 0x80000080, register 31 (link) and register 27 (exception return) are those
// of the miniMIPS datapath drawings. The opcode and function-code numbers are
// the standard MIPS-I encodings; the ALUFN encoding is this design's own.
package mips_pkg;

  localparam int XLEN = 32;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_addr_t;

  // All-zero word is "sll $0,$0,0", the NOP the annul and stall logic insert.
  localparam word_t NOP = 32'h0000_0000;

  // Exception vectors, PCSEL inputs 4, 5 and 6.
  localparam word_t RESET_VEC = 32'h8000_0000;
  localparam word_t ILLOP_VEC = 32'h8000_0040;
  localparam word_t IRQ_VEC   = 32'h8000_0080;

  localparam reg_addr_t REG_LINK = 5'd31;  // WASEL input 2
  localparam reg_addr_t REG_XP   = 5'd27;  // WASEL input 3

  // Opcodes (instruction bits <31:26>).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00, OP_J     = 6'h02, OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04, OP_BNE   = 6'h05,
    OP_ADDI  = 6'h08, OP_ADDIU = 6'h09, OP_SLTI  = 6'h0A, OP_SLTIU = 6'h0B,
    OP_ANDI  = 6'h0C, OP_ORI   = 6'h0D, OP_XORI  = 6'h0E, OP_LUI   = 6'h0F,
    OP_LW    = 6'h23, OP_SW    = 6'h2B
  } opcode_e;

  // Function codes of R-type instructions (bits <5:0>).
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
    FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
    FN_JR   = 6'h08, FN_JALR = 6'h09,
    FN_ADD  = 6'h20, FN_ADDU = 6'h21, FN_SUB  = 6'h22, FN_SUBU = 6'h23,
    FN_AND  = 6'h24, FN_OR   = 6'h25, FN_XOR  = 6'h26, FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A, FN_SLTU = 6'h2B
  } funct_e;

  // ALU function (ALUFN).
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA
  } alufn_e;

  // PCSEL: next-PC source.
  typedef enum logic [2:0] {
    PC_PLUS4 = 3'd0, PC_BT = 3'd1, PC_JUMP = 3'd2, PC_JT = 3'd3,
    PC_RESET = 3'd4, PC_ILLOP = 3'd5, PC_IRQ = 3'd6
  } pcsel_e;

  // WASEL: register-file write address.
  typedef enum logic [1:0] {
    WA_RD = 2'd0, WA_RT = 2'd1, WA_31 = 2'd2, WA_27 = 2'd3
  } wasel_e;

  // ASEL: ALU A operand.
  typedef enum logic [1:0] {
    A_RD1 = 2'd0, A_SHAMT = 2'd1, A_16 = 2'd2
  } asel_e;

  // WDSEL: register-file write data. Inputs 0..2 are the drawing's
  // (PC+4, ALU, memory); input 3 is this design's link value past a
  // branch delay slot (PC+8), used by jal/jalr in the 4-stage pipeline.
  typedef enum logic [1:0] {
    WD_PC4 = 2'd0, WD_ALU = 2'd1, WD_MEM = 2'd2, WD_PC8 = 2'd3
  } wdsel_e;

  // Branch / jump class, kept so the pipeline can tell delay-slot owners.
  typedef enum logic [2:0] {
    BR_NONE, BR_BEQ, BR_BNE, BR_J, BR_JR
  } brtype_e;

  // Decoded control word of one instruction (outputs of the control logic
  // that do not depend on the branch outcome).
  typedef struct packed {
    wasel_e  wasel;
    logic    sext;     // 1: sign-extend Imm, 0: zero-extend
    logic    bsel;     // 0: RD2, 1: extended immediate
    asel_e   asel;
    alufn_e  alufn;
    wdsel_e  wdsel;
    logic    wr;       // data-memory write
    logic    werf;     // register-file write
    brtype_e br;
    logic    reads_rs;
    logic    reads_rt;
    logic    illop;
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    wasel: WA_RD, sext: 1'b0, bsel: 1'b0, asel: A_RD1, alufn: ALU_ADD,
    wdsel: WD_ALU, wr: 1'b0, werf: 1'b0, br: BR_NONE,
    reads_rs: 1'b0, reads_rt: 1'b0, illop: 1'b0
  };

  // Bypass-multiplexer select for one register operand in the RF stage.
  typedef enum logic [1:0] {
    BYP_RF  = 2'd0,   // value read from the register file
    BYP_ALU = 2'd1,   // ALU output of the instruction in the ALU stage
    BYP_WB  = 2'd2    // write-back data of the instruction in the last stage
  } byp_e;

  // Pipeline events, one flag per mechanism, brought out for observation.
  typedef struct packed {
    logic stall;        // RF and IF frozen, NOP inserted into the ALU stage
    logic bypass_alu;   // an operand taken from the ALU-stage bypass
    logic bypass_wb;    // an operand taken from the write-back bypass
    logic branch_taken; // beq/bne redirected the PC
    logic jump;         // j/jal/jr/jalr redirected the PC
    logic annul;        // the instruction just fetched was replaced by NOP
    logic trap;         // illegal instruction or interrupt taken
  } pipe_events_t;

  function automatic reg_addr_t f_rs(word_t ir); return ir[25:21]; endfunction
  function automatic reg_addr_t f_rt(word_t ir); return ir[20:16]; endfunction

  // WASEL multiplexer.
  function automatic reg_addr_t write_addr(word_t ir, wasel_e sel);
    unique case (sel)
      WA_RD:   return ir[15:11];
      WA_RT:   return ir[20:16];
      WA_31:   return REG_LINK;
      default: return REG_XP;
    endcase
  endfunction

  // Jump target PC<31:28>:J<25:0>:00, upper bits from the address after the jump.
  function automatic word_t jump_target(word_t pc4, word_t ir);
    return {pc4[31:28], ir[25:0], 2'b00};
  endfunction

  // Branch target PC + 4 + 4*SEXT(offset), given PC+4.
  function automatic word_t branch_target(word_t pc4, word_t ir);
    return pc4 + {{14{ir[15]}}, ir[15:0], 2'b00};
  endfunction

endpackage
