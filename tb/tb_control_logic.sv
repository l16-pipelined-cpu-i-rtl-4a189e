// tb_control_logic: self-checking testbench of the instruction decoder.
// Every supported instruction, with random register fields, is decoded with
// the branch flag at 0 and at 1; the control word and PCSEL are compared with
// an expected-value table written out here. Undefined opcodes and function
// codes must trap to PCSEL=5, an interrupt to PCSEL=6 and reset to PCSEL=4,
// each with the expected register-27 write (or no write for reset). Both
// DELAY_SLOT settings are checked for the jal link source.
module tb_control_logic;
  import mips_pkg::*;
  word_t ir;
  logic z, irq, rst;
  ctrl_t c1, c0;
  pcsel_e p1, p0;
  int checks = 0, failures = 0;

  control_logic #(.DELAY_SLOT(1'b1)) dut1 (.ir, .z, .irq, .rst, .ctrl(c1), .pcsel(p1));
  control_logic #(.DELAY_SLOT(1'b0)) dut0 (.ir, .z, .irq, .rst, .ctrl(c0), .pcsel(p0));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (ir=%h z=%b): got %0d exp %0d", what, ir, z, got, exp);
    end
  endtask

  // werf wasel wdsel wr alufn asel bsel sext ; pcsel for z=0 and z=1
  task automatic row(string nm, word_t w, bit werf, wasel_e wa, wdsel_e wd, bit wr,
                     alufn_e fn, asel_e as, bit bs, bit sx, pcsel_e pz0, pcsel_e pz1,
                     bit rrs, bit rrt);
    irq = 0; rst = 0;
    for (int zz = 0; zz < 2; zz++) begin
      ir = w; z = zz[0];
      #1;
      expect_eq({nm, " werf"}, c1.werf, werf);
      if (werf) expect_eq({nm, " wasel"}, c1.wasel, wa);
      if (werf) expect_eq({nm, " wdsel"}, c1.wdsel, wd);
      expect_eq({nm, " wr"}, c1.wr, wr);
      if (werf && wd == WD_ALU || wr) begin
        expect_eq({nm, " alufn"}, c1.alufn, fn);
        expect_eq({nm, " asel"}, c1.asel, as);
        expect_eq({nm, " bsel"}, c1.bsel, bs);
        if (bs) expect_eq({nm, " sext"}, c1.sext, sx);
      end
      if (rrs) expect_eq({nm, " reads rs"}, c1.reads_rs, 1);
      if (rrt) expect_eq({nm, " reads rt"}, c1.reads_rt, 1);
      expect_eq({nm, " pcsel"}, p1, zz ? pz1 : pz0);
      expect_eq({nm, " illop"}, c1.illop, 0);
    end
  endtask

  function automatic word_t rr(funct_e f);
    return {6'h00, 5'($urandom), 5'($urandom), 5'($urandom), 5'($urandom), f};
  endfunction
  function automatic word_t ii(opcode_e o);
    return {o, 5'($urandom), 5'($urandom), 16'($urandom)};
  endfunction

  initial begin
    repeat (20) begin
      row("add",  rr(FN_ADD),  1, WA_RD, WD_ALU, 0, ALU_ADD,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("addu", rr(FN_ADDU), 1, WA_RD, WD_ALU, 0, ALU_ADD,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("sub",  rr(FN_SUB),  1, WA_RD, WD_ALU, 0, ALU_SUB,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("and",  rr(FN_AND),  1, WA_RD, WD_ALU, 0, ALU_AND,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("or",   rr(FN_OR),   1, WA_RD, WD_ALU, 0, ALU_OR,   A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("xor",  rr(FN_XOR),  1, WA_RD, WD_ALU, 0, ALU_XOR,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("nor",  rr(FN_NOR),  1, WA_RD, WD_ALU, 0, ALU_NOR,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("slt",  rr(FN_SLT),  1, WA_RD, WD_ALU, 0, ALU_SLT,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("sltu", rr(FN_SLTU), 1, WA_RD, WD_ALU, 0, ALU_SLTU, A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("sll",  rr(FN_SLL),  1, WA_RD, WD_ALU, 0, ALU_SLL,  A_SHAMT, 0, 0, PC_PLUS4, PC_PLUS4, 0, 1);
      row("srl",  rr(FN_SRL),  1, WA_RD, WD_ALU, 0, ALU_SRL,  A_SHAMT, 0, 0, PC_PLUS4, PC_PLUS4, 0, 1);
      row("sra",  rr(FN_SRA),  1, WA_RD, WD_ALU, 0, ALU_SRA,  A_SHAMT, 0, 0, PC_PLUS4, PC_PLUS4, 0, 1);
      row("sllv", rr(FN_SLLV), 1, WA_RD, WD_ALU, 0, ALU_SLL,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("srlv", rr(FN_SRLV), 1, WA_RD, WD_ALU, 0, ALU_SRL,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("srav", rr(FN_SRAV), 1, WA_RD, WD_ALU, 0, ALU_SRA,  A_RD1,   0, 0, PC_PLUS4, PC_PLUS4, 1, 1);
      row("jr",   rr(FN_JR),   0, WA_RD, WD_ALU, 0, ALU_ADD,  A_RD1,   0, 0, PC_JT,    PC_JT,    1, 0);
      row("jalr", rr(FN_JALR), 1, WA_RD, WD_PC8, 0, ALU_ADD,  A_RD1,   0, 0, PC_JT,    PC_JT,    1, 0);
      row("addi", ii(OP_ADDI), 1, WA_RT, WD_ALU, 0, ALU_ADD,  A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 0);
      row("addiu",ii(OP_ADDIU),1, WA_RT, WD_ALU, 0, ALU_ADD,  A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 0);
      row("slti", ii(OP_SLTI), 1, WA_RT, WD_ALU, 0, ALU_SLT,  A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 0);
      row("sltiu",ii(OP_SLTIU),1, WA_RT, WD_ALU, 0, ALU_SLTU, A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 0);
      row("andi", ii(OP_ANDI), 1, WA_RT, WD_ALU, 0, ALU_AND,  A_RD1,   1, 0, PC_PLUS4, PC_PLUS4, 1, 0);
      row("ori",  ii(OP_ORI),  1, WA_RT, WD_ALU, 0, ALU_OR,   A_RD1,   1, 0, PC_PLUS4, PC_PLUS4, 1, 0);
      row("xori", ii(OP_XORI), 1, WA_RT, WD_ALU, 0, ALU_XOR,  A_RD1,   1, 0, PC_PLUS4, PC_PLUS4, 1, 0);
      row("lui",  ii(OP_LUI),  1, WA_RT, WD_ALU, 0, ALU_SLL,  A_16,    1, 0, PC_PLUS4, PC_PLUS4, 0, 0);
      row("lw",   ii(OP_LW),   1, WA_RT, WD_MEM, 0, ALU_ADD,  A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 0);
      row("sw",   ii(OP_SW),   0, WA_RT, WD_ALU, 1, ALU_ADD,  A_RD1,   1, 1, PC_PLUS4, PC_PLUS4, 1, 1);
      row("beq",  ii(OP_BEQ),  0, WA_RT, WD_ALU, 0, ALU_SUB,  A_RD1,   0, 0, PC_PLUS4, PC_BT,    1, 1);
      row("bne",  ii(OP_BNE),  0, WA_RT, WD_ALU, 0, ALU_SUB,  A_RD1,   0, 0, PC_BT,    PC_PLUS4, 1, 1);
      row("j",    {OP_J, 26'($urandom)},   0, WA_RD, WD_ALU, 0, ALU_ADD, A_RD1, 0, 0, PC_JUMP, PC_JUMP, 0, 0);
      row("jal",  {OP_JAL, 26'($urandom)}, 1, WA_31, WD_PC8, 0, ALU_ADD, A_RD1, 0, 0, PC_JUMP, PC_JUMP, 0, 0);
    end

    // Link source without delay slot.
    irq = 0; rst = 0; z = 0;
    ir = {OP_JAL, 26'd5}; #1;
    expect_eq("jal link, no delay slot", c0.wdsel, WD_PC4);
    ir = rr(FN_JALR); #1;
    expect_eq("jalr link, no delay slot", c0.wdsel, WD_PC4);

    // Undefined instructions trap to 0x80000040 and save PC+4 in $27.
    repeat (50) begin
      ir = {6'h3F, 26'($urandom)}; #1;
      expect_eq("undefined opcode pcsel", p1, PC_ILLOP);
      expect_eq("undefined opcode illop", c1.illop, 1);
      expect_eq("undefined opcode werf", c1.werf, 1);
      expect_eq("undefined opcode wasel", c1.wasel, WA_27);
      expect_eq("undefined opcode wdsel", c1.wdsel, WD_PC4);
      expect_eq("undefined opcode wr", c1.wr, 0);
      ir = {6'h00, 20'($urandom), 6'h3F}; #1;
      expect_eq("undefined funct pcsel", p1, PC_ILLOP);
    end
    // Interrupt overrides any instruction.
    repeat (50) begin
      ir = ii(OP_SW); irq = 1; #1;
      expect_eq("irq pcsel", p1, PC_IRQ);
      expect_eq("irq wr", c1.wr, 0);
      expect_eq("irq werf", c1.werf, 1);
      expect_eq("irq wasel", c1.wasel, WA_27);
      expect_eq("irq illop", c1.illop, 0);
    end
    // Reset overrides everything and writes nothing.
    ir = ii(OP_SW); irq = 1; rst = 1; #1;
    expect_eq("reset pcsel", p1, PC_RESET);
    expect_eq("reset werf", c1.werf, 0);
    expect_eq("reset wr", c1.wr, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
