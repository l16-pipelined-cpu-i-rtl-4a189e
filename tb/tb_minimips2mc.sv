// tb_minimips2mc: self-checking testbench of the 2-stage miniMIPS core with
// 2-cycle loads and stores.
//
// The core runs with its own instruction and data memories. Directed
// programs check one cycle per instruction on straight-line code, exactly
// one extra cycle for each load and store (reported as a stall) with the
// loaded values correct, and one annulled slot per taken branch on a
// counting loop. Random programs are then compared, register by register
// and word by word, against the instruction-level reference model in
// sequential mode, with the cycle count checked against instructions
// executed plus redirects plus loads and stores, and with interrupts
// injected at random times.
module tb_minimips2mc;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam bit DS = 1'b0;

  logic clk = 1'b0, rst = 1'b1, irq = 1'b0;
  word_t imem_addr, imem_data, dmem_adr, dmem_wd, dmem_rd;
  logic dmem_wr, load_we = 1'b0;
  logic [9:0] load_addr = '0;
  word_t load_data = '0;
  pipe_events_t ev;

  int checks = 0, failures = 0;
  int n_stall, n_byp_alu, n_byp_wb, n_taken, n_jump, n_trap, n_irq, n_annul;
  word_t prog [PROG_WORDS];

  always #5 clk = ~clk;

  minimips2mc dut (
    .clk, .rst, .irq, .imem_addr, .imem_data,
    .dmem_adr, .dmem_wd, .dmem_wr, .dmem_rd, .events(ev)
  );
  imem #(.WORDS(PROG_WORDS)) u_imem (
    .clk, .a(imem_addr), .d(imem_data), .load_we, .load_addr, .load_data
  );
  dmem #(.WORDS(DATA_WORDS)) u_dmem (
    .clk, .adr(dmem_adr), .wd(dmem_wd), .wr(dmem_wr), .rd(dmem_rd)
  );

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  // Load a program and clear data memory while in reset.
  task automatic load(input word_t p [PROG_WORDS]);
    @(negedge clk);
    rst = 1'b1;
    for (int i = 0; i < PROG_WORDS; i++) begin
      load_we = 1'b1; load_addr = 10'(i); load_data = p[i];
      @(negedge clk);
    end
    load_we = 1'b0;
    for (int i = 0; i < DATA_WORDS; i++) u_dmem.mem[i] = '0;
    @(posedge clk);
  endtask

  // Release reset and run until the PC reaches word `halt_at`; return the
  // number of cycles that took, then drain the pipeline.
  task automatic run(input int halt_at, input bit use_irq, output int cycles);
    int body_run, gap;
    n_stall = 0; n_byp_alu = 0; n_byp_wb = 0; n_taken = 0; n_jump = 0; n_trap = 0; n_irq = 0; n_annul = 0;
    body_run = 0; gap = 20;
    cycles = 0;
    @(negedge clk) rst = 1'b0;
    forever begin
      // An interrupt is offered now and then, only while ordinary code runs.
      irq = 1'b0;
      if (use_irq && imem_addr != RESET_VEC + 32'(halt_at * 4)) begin
        body_run = (imem_addr >= RESET_VEC + W_START * 4) ? body_run + 1 : 0;
        if (gap > 0) gap--;
        else if (body_run >= 3 && $urandom % 8 == 0) begin irq = 1'b1; gap = 60; end
      end
      #1;
      if (ev.stall)        n_stall++;
      if (ev.bypass_alu)   n_byp_alu++;
      if (ev.bypass_wb)    n_byp_wb++;
      if (ev.branch_taken) n_taken++;
      if (ev.jump)         n_jump++;
      if (ev.trap)         n_trap++;
      if (ev.annul)        n_annul++;
      if (ev.trap && irq)  n_irq++;
      if (imem_addr == RESET_VEC + 32'(halt_at * 4) || cycles >= 100000) break;
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    irq = 1'b0;
    repeat (40) @(posedge clk);
  endtask

  task automatic compare(iss ref_m, bit skip_xp, string tag);
    for (int i = 1; i < 32; i++) begin
      if (skip_xp && (i == 26 || i == 27)) continue;
      check($sformatf("%s r%0d", tag, i), dut.u_rf.regs[i], ref_m.r[i]);
    end
    for (int i = 0; i < 64; i++)
      check($sformatf("%s mem[%0d]", tag, i), u_dmem.mem[i], ref_m.m[i]);
  endtask

  task automatic run_ref(iss ref_m, int halt_at);
    int guard = 0;
    while (ref_m.pc != RESET_VEC + 32'(halt_at * 4) && guard < 100000) begin
      ref_m.step(prog);
      guard++;
    end
  endtask

  initial begin : main
    int cyc, h;
    iss ref_m;

    // 1. Straight-line code, one instruction per cycle:
    //    addi $10,$9,1 ; xor $10,$9,$10 ; sltiu $11,$10,1 ; srl $10,$10,1
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_i(OP_ADDI, 9, 0, 6);
    prog[1] = asm_i(OP_ADDI, 10, 9, 1);
    prog[2] = asm_r(FN_XOR, 10, 9, 10);
    prog[3] = asm_i(OP_SLTIU, 11, 10, 1);
    prog[4] = asm_r(FN_SRL, 10, 0, 10, 1);
    h = 5;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load(prog);
    run(h, 1'b0, cyc);
    check("seq: $10", dut.u_rf.regs[10], 0);
    check("seq: $11", dut.u_rf.regs[11], 0);
    check("seq: 1 instr/cycle", cyc, h);
    check("seq: nothing annulled", n_annul, 0);

    // 2. Loop whose taken branch annuls the instruction fetched behind it:
    //    loop: add $9,$9,$8 ; srl $10,$10,1 ; bne $10,$0,loop ; andi $8,$10,1
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_i(OP_ADDI, 10, 0, 200);
    prog[1] = asm_i(OP_ADDI, 8, 0, 3);
    prog[2] = asm_r(FN_ADD, 9, 9, 8);
    prog[3] = asm_r(FN_SRL, 10, 0, 10, 1);
    prog[4] = asm_b(OP_BNE, 10, 0, 4, 2);
    prog[5] = asm_i(OP_ANDI, 8, 10, 1);
    h = 6;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load(prog);
    ref_m = new(DS);
    run_ref(ref_m, h);
    run(h, 1'b0, cyc);
    compare(ref_m, 1'b0, "loop");
    check("loop: $8 from the fall-through andi only", dut.u_rf.regs[8], 0);
    check("loop: taken branches", n_taken, 7);
    check("loop: one annulled slot per taken branch", n_annul, 7);
    check("loop: cycles", cyc, ref_m.executed + 7);

    // 3. Loads and stores, two cycles each:
    //    addi $8,$0,5 ; sw $8,8($0) ; lw $9,8($0) ; add $10,$9,$9 ; sw $10,12($0) ; lw $11,12($0) ;
    //    addi $12,$11,1
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_i(OP_ADDI, 8, 0, 5);
    prog[1] = asm_i(OP_SW, 8, 0, 8);
    prog[2] = asm_i(OP_LW, 9, 0, 8);
    prog[3] = asm_r(FN_ADD, 10, 9, 9);
    prog[4] = asm_i(OP_SW, 10, 0, 12);
    prog[5] = asm_i(OP_LW, 11, 0, 12);
    prog[6] = asm_i(OP_ADDI, 12, 11, 1);
    h = 7;
    prog[h] = asm_b(OP_BEQ, 0, 0, h, h);
    load(prog);
    run(h, 1'b0, cyc);
    check("mem: $9", dut.u_rf.regs[9], 5);
    check("mem: $10", dut.u_rf.regs[10], 10);
    check("mem: $11", dut.u_rf.regs[11], 10);
    check("mem: $12", dut.u_rf.regs[12], 11);
    check("mem: mem[2]", u_dmem.mem[2], 5);
    check("mem: mem[3]", u_dmem.mem[3], 10);
    check("mem: one extra cycle per load or store", n_stall, 4);
    check("mem: cycles", cyc, h + 4);

    // 5. Random programs against the reference model, with interrupts.
    for (int seed = 1; seed <= 12; seed++) begin
      h = gen_program(prog, 120, seed);
      load(prog);
      ref_m = new(DS);
      run_ref(ref_m, h);
      run(h, seed > 4, cyc);
      compare(ref_m, seed > 4, $sformatf("seed %0d", seed));
      if (seed > 4) check($sformatf("seed %0d irq count", seed), dut.u_rf.regs[26], n_irq);
      check($sformatf("seed %0d illegal count", seed), dut.u_rf.regs[25], ref_m.illops);
      if (seed <= 4) begin
        check($sformatf("seed %0d cycles", seed), cyc, ref_m.executed + ref_m.redirects + ref_m.memops);
        check($sformatf("seed %0d stalls", seed), n_stall, ref_m.memops);
      end
      $display("seed %0d: %0d instr, %0d cycles, stalls %0d, bypass ALU %0d WB %0d, taken %0d, jumps %0d, traps %0d (irq %0d)",
               seed, ref_m.executed, cyc, n_stall, n_byp_alu, n_byp_wb, n_taken, n_jump, n_trap, n_irq);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
