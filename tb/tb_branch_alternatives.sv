// tb_branch_alternatives: the branch-delay-slot code variants run on both
// miniMIPS systems, at the top's default sizes.
//
// The same loop ($t0=$8, $t1=$9, $t2=$10; $t2 starts at 200, $t0 at 3):
//   original  loop: add $t1,$t1,$t0 ; srl $t2,$t2,1 ; bne $t2,$0,loop ; andi $t0,$t2,1
//   nop-fill  the same with a nop after the bne
//   rewritten add ; loopx: srl ; bne loopx ; add (delay slot) ; sub ; andi
// The 2-stage system runs the original code with annulment; the 4-stage
// system, whose delay slot is always executed, runs the two rewritten forms.
// All three must end with the sequential result ($t1 = 8*3 = 24, $t2 = 0,
// $t0 = 0). Cycle counts are checked exactly: the 2-stage system loses one
// annulled cycle per taken branch; the 4-stage one loses none, spending
// them instead on the nop (nop-fill) or on useful work (rewritten, where only
// the extra add and sub of the last iteration are wasted).
module tb_branch_alternatives;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1, lwe = 1'b0;
  logic [9:0] laddr = '0;
  word_t ldata = '0, pc4, pc2;
  pipe_events_t ev4, ev2;
  int checks = 0, failures = 0;
  word_t prog [PROG_WORDS];

  always #5 clk = ~clk;

  minimips_top dut (
    .clk, .rst,
    .irq4(1'b0), .load4_we(lwe), .load4_addr(laddr), .load4_data(ldata), .pc4, .events4(ev4),
    .irq2(1'b0), .load2_we(lwe), .load2_addr(laddr), .load2_data(ldata), .pc2, .events2(ev2),
    .irq2m(1'b0), .load2m_we(1'b0), .load2m_addr('0), .load2m_data('0), .pc2m(), .events2m()
  );

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load();
    @(negedge clk);
    rst = 1'b1;
    for (int i = 0; i < PROG_WORDS; i++) begin
      lwe = 1'b1; laddr = 10'(i); ldata = prog[i];
      @(negedge clk);
    end
    lwe = 1'b0;
    @(negedge clk);
  endtask

  // Cycles until the system's PC reaches word h (which = 4 or 2).
  task automatic run(int h, int which, output int cycles);
    word_t halt;
    halt = RESET_VEC + 32'(h * 4);
    cycles = 0;
    @(negedge clk) rst = 1'b0;
    while (((which == 4) ? pc4 : pc2) != halt && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
    repeat (10) @(negedge clk);
  endtask

  task automatic prologue();
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_i(OP_ADDI, 10, 0, 200);
    prog[1] = asm_i(OP_ADDI, 8, 0, 3);
  endtask

  initial begin : main
    int cyc, h;

    // Original code on the 2-stage system (taken branches annul).
    prologue();
    prog[2] = asm_r(FN_ADD, 9, 9, 8);
    prog[3] = asm_r(FN_SRL, 10, 0, 10, 1);
    prog[4] = asm_b(OP_BNE, 10, 0, 4, 2);
    prog[5] = asm_i(OP_ANDI, 8, 10, 1);
    h = 6;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load();
    run(h, 2, cyc);
    check("annul: $t1", dut.u_cpu2.u_rf.regs[9], 24);
    check("annul: $t2", dut.u_cpu2.u_rf.regs[10], 0);
    check("annul: $t0", dut.u_cpu2.u_rf.regs[8], 0);
    // 2 + 8*3 + 1 instructions, plus 7 annulled slots.
    check("annul: cycles", cyc, 2 + 8 * 3 + 1 + 7);

    // Delay slot filled with a nop, on the 4-stage system.
    prologue();
    prog[2] = asm_r(FN_ADD, 9, 9, 8);
    prog[3] = asm_r(FN_SRL, 10, 0, 10, 1);
    prog[4] = asm_b(OP_BNE, 10, 0, 4, 2);
    prog[5] = NOP;
    prog[6] = asm_i(OP_ANDI, 8, 10, 1);
    h = 7;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load();
    run(h, 4, cyc);
    check("nop-fill: $t1", dut.u_cpu4.u_rf.regs[9], 24);
    check("nop-fill: $t2", dut.u_cpu4.u_rf.regs[10], 0);
    check("nop-fill: $t0", dut.u_cpu4.u_rf.regs[8], 0);
    check("nop-fill: cycles", cyc, 2 + 8 * 4 + 1);

    // Delay slot filled with useful work, on the 4-stage system.
    prologue();
    prog[2] = asm_r(FN_ADD, 9, 9, 8);
    prog[3] = asm_r(FN_SRL, 10, 0, 10, 1);       // loopx
    prog[4] = asm_b(OP_BNE, 10, 0, 4, 3);
    prog[5] = asm_r(FN_ADD, 9, 9, 8);            // delay slot
    prog[6] = asm_r(FN_SUB, 9, 9, 8);            // undoes the last add
    prog[7] = asm_i(OP_ANDI, 8, 10, 1);
    h = 8;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load();
    run(h, 4, cyc);
    check("rewritten: $t1", dut.u_cpu4.u_rf.regs[9], 24);
    check("rewritten: $t2", dut.u_cpu4.u_rf.regs[10], 0);
    check("rewritten: $t0", dut.u_cpu4.u_rf.regs[8], 0);
    check("rewritten: cycles", cyc, 2 + 1 + 8 * 3 + 1 + 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
