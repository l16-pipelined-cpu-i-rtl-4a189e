// tb_minimips_top: end-to-end testbench of the three miniMIPS systems, at
// the top's default sizes.
//
// Each program is loaded into all systems through their load ports and
// all run it at once from reset. The results (registers and the first 64
// data words) are compared with the instruction-level reference model: with
// delay slots for the 4-stage system, sequential for the two 2-stage ones. The
// programs are the textbook counting loop and random programs with data
// hazards, loads and stores, branches, calls, undefined instructions and,
// in later runs, interrupts. Every pipeline mechanism is counted across all
// runs and must occur at least once: 4-stage ALU bypass, write-back bypass,
// load-use stall, taken branch with executed delay slot, jump, trap,
// interrupt; 2-stage taken branch, jump, annulled fetch, trap, interrupt;
// the same for the 2-cycle-memory variant, plus its extra memory cycle,
// whose total must exceed the plain 2-stage core's cycle count by exactly
// the number of loads and stores executed (checked on runs without
// interrupts).
module tb_minimips_top;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic irq4 = 1'b0, irq2 = 1'b0, irq2m = 1'b0, lwe = 1'b0;
  logic [9:0] laddr = '0;
  word_t ldata = '0, pc4, pc2, pc2m;
  pipe_events_t ev4, ev2, ev2m;

  int checks = 0, failures = 0;
  word_t prog [PROG_WORDS];
  // Mechanism counters over the whole test.
  int m4_stall, m4_byp_alu, m4_byp_wb, m4_taken, m4_jump, m4_trap, m4_irq, m4_ds;
  int m2_taken, m2_jump, m2_annul, m2_trap, m2_irq;
  int mm_stall, mm_taken, mm_jump, mm_annul, mm_trap, mm_irq;
  // Cycles each 2-stage system took to reach the halt word in the last run.
  int cyc2, cyc2m;

  always #5 clk = ~clk;

  minimips_top dut (
    .clk, .rst,
    .irq4, .load4_we(lwe), .load4_addr(laddr), .load4_data(ldata), .pc4, .events4(ev4),
    .irq2, .load2_we(lwe), .load2_addr(laddr), .load2_data(ldata), .pc2, .events2(ev2),
    .irq2m, .load2m_we(lwe), .load2m_addr(laddr), .load2m_data(ldata), .pc2m, .events2m(ev2m)
  );

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    for (int i = 0; i < DATA_WORDS; i++) begin
      dut.u_dmem4.mem[i] = '0;
      dut.u_dmem2.mem[i] = '0;
      dut.u_dmem2m.mem[i] = '0;
    end
    @(negedge clk);
  endtask

  // Run all systems until each has reached word `h`; irq pulses are offered
  // while ordinary code runs when use_irq is set. Counts mechanisms.
  task automatic run(int h, bit use_irq, output int n_irq4, output int n_irq2,
                     output int n_irq2m);
    word_t halt;
    bit done4, done2, donem;
    int run4, run2, runm, gap4, gap2, gapm, cyc;
    halt = RESET_VEC + 32'(h * 4);
    done4 = 0; done2 = 0; donem = 0; run4 = 0; run2 = 0; runm = 0;
    gap4 = 20; gap2 = 20; gapm = 20; cyc = 0;
    n_irq4 = 0; n_irq2 = 0; n_irq2m = 0;
    @(negedge clk) rst = 1'b0;
    while (!(done4 && done2 && donem) && cyc < 200000) begin
      irq4 = 1'b0; irq2 = 1'b0; irq2m = 1'b0;
      if (use_irq) begin
        run4 = (pc4 >= RESET_VEC + W_START * 4) ? run4 + 1 : 0;
        run2 = (pc2 >= RESET_VEC + W_START * 4) ? run2 + 1 : 0;
        runm = (pc2m >= RESET_VEC + W_START * 4) ? runm + 1 : 0;
        if (gap4 > 0) gap4--;
        else if (!done4 && pc4 != halt && run4 >= 3 && $urandom % 8 == 0) begin irq4 = 1; gap4 = 60; end
        if (gap2 > 0) gap2--;
        else if (!done2 && pc2 != halt && run2 >= 3 && $urandom % 8 == 0) begin irq2 = 1; gap2 = 60; end
        if (gapm > 0) gapm--;
        else if (!donem && pc2m != halt && runm >= 3 && $urandom % 8 == 0) begin irq2m = 1; gapm = 60; end
      end
      #1;
      if (!done4) begin
        if (ev4.stall)        m4_stall++;
        if (ev4.bypass_alu)   m4_byp_alu++;
        if (ev4.bypass_wb)    m4_byp_wb++;
        if (ev4.branch_taken) m4_taken++;
        if (ev4.jump)         m4_jump++;
        if (ev4.trap)         m4_trap++;
        if (ev4.trap && irq4) begin m4_irq++; n_irq4++; end
        if (pc4 == halt) done4 = 1;
      end
      if (!done2) begin
        if (ev2.branch_taken) m2_taken++;
        if (ev2.jump)         m2_jump++;
        if (ev2.annul)        m2_annul++;
        if (ev2.trap)         m2_trap++;
        if (ev2.trap && irq2) begin m2_irq++; n_irq2++; end
        if (pc2 == halt) begin done2 = 1; cyc2 = cyc; end
      end
      if (!donem) begin
        if (ev2m.stall)        mm_stall++;
        if (ev2m.branch_taken) mm_taken++;
        if (ev2m.jump)         mm_jump++;
        if (ev2m.annul)        mm_annul++;
        if (ev2m.trap)         mm_trap++;
        if (ev2m.trap && irq2m) begin mm_irq++; n_irq2m++; end
        if (pc2m == halt) begin donem = 1; cyc2m = cyc; end
      end
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    irq4 = 1'b0; irq2 = 1'b0; irq2m = 1'b0;
    repeat (40) @(posedge clk);
  endtask

  task automatic compare(bit skip_xp, string tag);
    iss r4, r2;
    int g;
    r4 = new(1'b1);
    r2 = new(1'b0);
    g = 0;
    while (r4.pc != RESET_VEC + 32'(halt_word * 4) && g < 100000) begin r4.step(prog); g++; end
    g = 0;
    while (r2.pc != RESET_VEC + 32'(halt_word * 4) && g < 100000) begin r2.step(prog); g++; end
    for (int i = 1; i < 32; i++) begin
      if (skip_xp && (i == 26 || i == 27)) continue;
      check($sformatf("%s 4-stage r%0d", tag, i), dut.u_cpu4.u_rf.regs[i], r4.r[i]);
      check($sformatf("%s 2-stage r%0d", tag, i), dut.u_cpu2.u_rf.regs[i], r2.r[i]);
      check($sformatf("%s 2-cycle-memory r%0d", tag, i), dut.u_cpu2m.u_rf.regs[i], r2.r[i]);
    end
    for (int i = 0; i < 64; i++) begin
      check($sformatf("%s 4-stage mem[%0d]", tag, i), dut.u_dmem4.mem[i], r4.m[i]);
      check($sformatf("%s 2-stage mem[%0d]", tag, i), dut.u_dmem2.mem[i], r2.m[i]);
      check($sformatf("%s 2-cycle-memory mem[%0d]", tag, i), dut.u_dmem2m.mem[i], r2.m[i]);
    end
    check({tag, " 4-stage undefined-instruction traps"}, dut.u_cpu4.u_rf.regs[25], r4.illops);
    check({tag, " 2-stage undefined-instruction traps"}, dut.u_cpu2.u_rf.regs[25], r2.illops);
    check({tag, " 2-cycle-memory undefined-instruction traps"}, dut.u_cpu2m.u_rf.regs[25], r2.illops);
    if (!skip_xp) check({tag, " 2-cycle-memory extra cycles"}, cyc2m - cyc2, r2.memops);
  endtask

  int halt_word;

  initial begin : main
    int ni4, ni2, nim;
    m4_stall = 0; m4_byp_alu = 0; m4_byp_wb = 0; m4_taken = 0; m4_jump = 0;
    m4_trap = 0; m4_irq = 0; m4_ds = 0;
    m2_taken = 0; m2_jump = 0; m2_annul = 0; m2_trap = 0; m2_irq = 0;
    mm_stall = 0; mm_taken = 0; mm_jump = 0; mm_annul = 0; mm_trap = 0; mm_irq = 0;

    // Counting loop: the two machines give different results because the
    // 4-stage one executes the andi in the delay slot on every iteration.
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_i(OP_ADDI, 10, 0, 200);
    prog[1] = asm_i(OP_ADDI, 8, 0, 3);
    prog[2] = asm_r(FN_ADD, 9, 9, 8);
    prog[3] = asm_r(FN_SRL, 10, 0, 10, 1);
    prog[4] = asm_b(OP_BNE, 10, 0, 4, 2);
    prog[5] = asm_i(OP_ANDI, 8, 10, 1);
    halt_word = 6;
    prog[halt_word] = asm_b(OP_BEQ, 0, 0, halt_word, halt_word);
    load();
    run(halt_word, 1'b0, ni4, ni2, nim);
    compare(1'b0, "loop");
    // $10 runs 200,100,50,25,12,6,3,1,0; with the delay slot the andi sets $8
    // to bit 0 of $10 every iteration, so $9 = 3+0+0+1+0+0+1+1 = 6; without
    // it $8 stays 3 and $9 = 8*3 = 24.
    check("loop 4-stage $9", dut.u_cpu4.u_rf.regs[9], 6);
    check("loop 2-stage $9", dut.u_cpu2.u_rf.regs[9], 24);
    if (dut.u_cpu4.u_rf.regs[9] != dut.u_cpu2.u_rf.regs[9]) m4_ds++;

    for (int seed = 101; seed <= 130; seed++) begin
      halt_word = gen_program(prog, 150, seed);
      load();
      run(halt_word, seed > 110, ni4, ni2, nim);
      compare(seed > 110, $sformatf("seed %0d", seed));
      if (seed > 110) begin
        check($sformatf("seed %0d 4-stage irq count", seed), dut.u_cpu4.u_rf.regs[26], ni4);
        check($sformatf("seed %0d 2-stage irq count", seed), dut.u_cpu2.u_rf.regs[26], ni2);
        check($sformatf("seed %0d 2-cycle-memory irq count", seed), dut.u_cpu2m.u_rf.regs[26], nim);
      end
    end

    $display("4-stage: ALU bypass %0d, WB bypass %0d, stalls %0d, taken branches %0d, delay-slot loop %0d, jumps %0d, traps %0d, interrupts %0d",
             m4_byp_alu, m4_byp_wb, m4_stall, m4_taken, m4_ds, m4_jump, m4_trap, m4_irq);
    $display("2-stage: taken branches %0d, jumps %0d, annulled %0d, traps %0d, interrupts %0d",
             m2_taken, m2_jump, m2_annul, m2_trap, m2_irq);
    $display("2-cycle memory: extra memory cycles %0d, taken branches %0d, jumps %0d, annulled %0d, traps %0d, interrupts %0d",
             mm_stall, mm_taken, mm_jump, mm_annul, mm_trap, mm_irq);
    check("4-stage ALU bypass happened", m4_byp_alu > 0, 1);
    check("4-stage WB bypass happened", m4_byp_wb > 0, 1);
    check("4-stage stall happened", m4_stall > 0, 1);
    check("4-stage taken branch happened", m4_taken > 0, 1);
    check("4-stage delay slot executed", m4_ds > 0, 1);
    check("4-stage jump happened", m4_jump > 0, 1);
    check("4-stage trap happened", m4_trap > m4_irq, 1);
    check("4-stage interrupt happened", m4_irq > 0, 1);
    check("2-stage taken branch happened", m2_taken > 0, 1);
    check("2-stage jump happened", m2_jump > 0, 1);
    check("2-stage annul happened", m2_annul > 0, 1);
    check("2-stage trap happened", m2_trap > m2_irq, 1);
    check("2-stage interrupt happened", m2_irq > 0, 1);
    check("2-cycle-memory extra cycle happened", mm_stall > 0, 1);
    check("2-cycle-memory taken branch happened", mm_taken > 0, 1);
    check("2-cycle-memory jump happened", mm_jump > 0, 1);
    check("2-cycle-memory annul happened", mm_annul > 0, 1);
    check("2-cycle-memory trap happened", mm_trap > mm_irq, 1);
    check("2-cycle-memory interrupt happened", mm_irq > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
