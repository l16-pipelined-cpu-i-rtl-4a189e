// mips_tb_pkg: testbench support for the miniMIPS pipelines.
//
// Instruction encoders (asm_r, asm_i, asm_j), a random program generator, and
// iss, an instruction-at-a-time reference model of the programmer-visible
// machine. The model knows nothing about pipelines: with delay_slot=1 it
// executes the instruction after every branch or jump before the transfer
// takes effect and links jal/jalr with PC+8 (the 4-stage machine); with
// delay_slot=0 it transfers immediately and links with PC+4 (the 2-stage
// machine with annulment). Undefined instructions trap to 0x80000040 with
// PC+4 in register 27.
package mips_tb_pkg;
  import mips_pkg::*;

  localparam int PROG_WORDS = 1024;
  localparam int DATA_WORDS = 1024;

  // Fixed program layout (word indices from 0x80000000).
  localparam int W_ILLOP = 16;   // 0x80000040
  localparam int W_IRQ   = 32;   // 0x80000080
  localparam int W_START = 64;   // 0x80000100

  function automatic word_t asm_r(funct_e fn, int rd, int rs, int rt, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction

  function automatic word_t asm_i(opcode_e op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // Jump to word index `widx` of the program.
  function automatic word_t asm_j(opcode_e op, int widx);
    word_t target;
    target = RESET_VEC + 32'(widx * 4);
    return {op, target[27:2]};
  endfunction

  // Branch at word `from` to word `to`.
  function automatic word_t asm_b(opcode_e op, int rs, int rt, int from, int to);
    return asm_i(op, rt, rs, to - from - 1);
  endfunction

  localparam word_t ILLEGAL = 32'hFC00_0000;   // opcode 0x3F

  class iss;
    word_t r [32];
    word_t m [DATA_WORDS];
    word_t pc, npc;
    bit    delay_slot;
    int    executed, illops, redirects, memops;

    function new(bit ds);
      delay_slot = ds;
      foreach (r[i]) r[i] = '0;
      foreach (m[i]) m[i] = '0;
      pc = RESET_VEC;
      npc = RESET_VEC + 4;
      executed = 0;
      illops = 0;
      redirects = 0;
      memops = 0;
    endfunction

    function automatic void transfer(word_t target);
      if (!delay_slot && target != pc + 4) redirects++;
      if (delay_slot) begin
        pc  = npc;
        npc = target;
      end else begin
        pc  = target;
        npc = target + 4;
      end
    endfunction

    function automatic void step(const ref word_t prog [PROG_WORDS]);
      word_t ir, a, b, simm, zimm, res, link;
      logic [5:0] op, fn;
      logic [4:0] rs, rt, rd, sh;
      bit wr_en, illegal;
      int wreg;
      ir   = prog[pc[11:2]];
      op   = ir[31:26]; fn = ir[5:0];
      rs   = ir[25:21]; rt = ir[20:16]; rd = ir[15:11]; sh = ir[10:6];
      a    = r[rs]; b = r[rt];
      simm = {{16{ir[15]}}, ir[15:0]};
      zimm = {16'd0, ir[15:0]};
      link = delay_slot ? pc + 8 : pc + 4;
      wr_en = 1'b0; illegal = 1'b0; wreg = 0; res = '0;
      executed++;
      case (op)
        6'h00: begin
          wr_en = 1'b1; wreg = rd;
          case (fn)
            6'h00: res = b << sh;
            6'h02: res = b >> sh;
            6'h03: res = word_t'($signed(b) >>> sh);
            6'h04: res = b << a[4:0];
            6'h06: res = b >> a[4:0];
            6'h07: res = word_t'($signed(b) >>> a[4:0]);
            6'h08: wr_en = 1'b0;
            6'h09: res = link;
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2A: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2B: res = (a < b) ? 1 : 0;
            default: begin illegal = 1'b1; wr_en = 1'b0; end
          endcase
        end
        6'h08, 6'h09: begin wr_en = 1; wreg = rt; res = a + simm; end
        6'h0A: begin wr_en = 1; wreg = rt; res = ($signed(a) < $signed(simm)) ? 1 : 0; end
        6'h0B: begin wr_en = 1; wreg = rt; res = (a < simm) ? 1 : 0; end
        6'h0C: begin wr_en = 1; wreg = rt; res = a & zimm; end
        6'h0D: begin wr_en = 1; wreg = rt; res = a | zimm; end
        6'h0E: begin wr_en = 1; wreg = rt; res = a ^ zimm; end
        6'h0F: begin wr_en = 1; wreg = rt; res = {ir[15:0], 16'd0}; end
        6'h23: begin wr_en = 1; wreg = rt; res = m[(a + simm) >> 2 & (DATA_WORDS - 1)]; end
        6'h2B: m[(a + simm) >> 2 & (DATA_WORDS - 1)] = b;
        6'h02, 6'h03, 6'h04, 6'h05: ;
        default: illegal = 1'b1;
      endcase
      if (op == 6'h23 || op == 6'h2B) memops++;
      if (illegal) begin
        illops++;
        redirects++;
        r[27] = pc + 4;
        pc  = ILLOP_VEC;
        npc = ILLOP_VEC + 4;
        return;
      end
      if (op == 6'h03) begin wr_en = 1; wreg = 31; res = link; end
      if (wr_en && wreg != 0) r[wreg] = res;
      case (op)
        6'h02, 6'h03: begin
          link = pc + 4;
          transfer({link[31:28], ir[25:0], 2'b00});
        end
        6'h04: if (a == b) transfer(pc + 4 + (simm << 2)); else transfer(npc_seq());
        6'h05: if (a != b) transfer(pc + 4 + (simm << 2)); else transfer(npc_seq());
        6'h00: if (fn == 6'h08 || fn == 6'h09) transfer(a); else transfer(npc_seq());
        default: transfer(npc_seq());
      endcase
    endfunction

    // Address of the next instruction when nothing is taken.
    function automatic word_t npc_seq();
      return delay_slot ? npc + 4 : pc + 4;
    endfunction
  endclass

  // Random test program: handlers, a random body with data hazards, loads
  // and stores, forward branches, a counting loop, a subroutine call and
  // undefined instructions, then a halt loop. Returns the halt word index.
  function automatic int gen_program(ref word_t prog [PROG_WORDS], input int n_items,
                                     input int seed);
    int p, k, kind, sub_at, halt_at, loops;
    int unsigned rnd;
    bit prev_ctl;
    static funct_e rfn [14] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_NOR,
                                FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV,
                                FN_SLL, FN_SRL, FN_SRA};
    static opcode_e iop [7] = '{OP_ADDI, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI};
    rnd = $urandom(seed);
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = asm_j(OP_J, W_START);
    // Undefined-instruction handler: count, return past the instruction.
    prog[W_ILLOP]     = asm_i(OP_ADDI, 25, 25, 1);
    prog[W_ILLOP + 1] = asm_r(FN_JR, 0, 27, 0);
    // Interrupt handler: count, return to the interrupted instruction.
    prog[W_IRQ]     = asm_i(OP_ADDI, 26, 26, 1);
    prog[W_IRQ + 1] = asm_i(OP_ADDI, 27, 27, -4);
    prog[W_IRQ + 2] = asm_r(FN_JR, 0, 27, 0);
    p = W_START;
    halt_at = W_START + 10 + n_items * 6 + 16;
    sub_at  = halt_at + 2;
    // Seed registers 1..8 with values; $14 holds the subroutine address for
    // jalr and is never written again (a branch may land anywhere).
    for (int i = 1; i <= 8; i++) prog[p++] = asm_i(OP_ADDI, i, 0, int'($urandom) % 2000 - 1000);
    prog[p++] = asm_i(OP_LUI, 14, 0, 16'h8000);
    prog[p++] = asm_i(OP_ORI, 14, 14, sub_at * 4);
    prev_ctl = 1'b0;
    loops = 0;
    for (int it = 0; it < n_items; it++) begin
      kind = int'($urandom % 100);
      if (prev_ctl && kind >= 60) kind = kind % 60;   // no control in a delay slot
      if (kind < 30) begin
        k = int'($urandom % 14);
        prog[p++] = asm_r(rfn[k], 1 + $urandom % 8, 1 + $urandom % 8, 1 + $urandom % 8,
                          int'($urandom % 32));
        if (rfn[k] inside {FN_SLLV, FN_SRLV, FN_SRAV, FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR,
                           FN_NOR, FN_SLT, FN_SLTU})
          prog[p-1][10:6] = 5'd0;
        prev_ctl = 1'b0;
      end else if (kind < 45) begin
        k = int'($urandom % 7);
        prog[p++] = asm_i(iop[k], 1 + $urandom % 8, iop[k] == OP_LUI ? 0 : 1 + $urandom % 8,
                          int'($urandom % 65536));
        prev_ctl = 1'b0;
      end else if (kind < 52) begin
        prog[p++] = asm_i(OP_LW, 1 + $urandom % 8, 0, int'($urandom % 64) * 4);
        prev_ctl = 1'b0;
      end else if (kind < 60) begin
        prog[p++] = asm_i(OP_SW, 1 + $urandom % 8, 0, int'($urandom % 64) * 4);
        prev_ctl = 1'b0;
      end else if (kind < 80) begin
        k = p + 2 + int'($urandom % 3);
        prog[p] = asm_b(($urandom % 2) ? OP_BEQ : OP_BNE, 1 + $urandom % 8,
                        ($urandom % 3 == 0) ? 0 : 1 + $urandom % 8, p, k);
        p++;
        prev_ctl = 1'b1;
      end else if (kind < 86) begin
        prog[p++] = asm_j(OP_JAL, sub_at);
        prev_ctl = 1'b1;
      end else if (kind < 92) begin
        prog[p++] = ILLEGAL;
        prev_ctl = 1'b0;
      end else if (loops < 3) begin
        // Counting loop: add $10,$10,$9; srl $9,$9,1; bne $9,$0,loop; andi $11,$9,1
        loops++;
        prog[p++] = asm_i(OP_ADDI, 9, 0, 1 + int'($urandom % 60));
        prog[p]   = asm_r(FN_ADD, 10, 10, 9); p++;
        prog[p++] = asm_r(FN_SRL, 9, 0, 9, 1);
        prog[p]   = asm_b(OP_BNE, 9, 0, p, p - 2); p++;
        prog[p++] = asm_i(OP_ANDI, 11, 9, 1);
        prev_ctl = 1'b0;
      end else begin
        // Call through a register: jalr $31,$14.
        prog[p++] = asm_r(FN_JALR, 31, 14, 0);
        prev_ctl = 1'b1;
      end
    end
    // Pad up to the halt loop with harmless instructions.
    while (p < halt_at) prog[p++] = asm_i(OP_ADDI, 13, 13, 1);
    prog[halt_at]     = asm_b(OP_BEQ, 0, 0, halt_at, halt_at);
    prog[halt_at + 1] = NOP;
    // Subroutine: add to $12 and return.
    prog[sub_at]     = asm_i(OP_ADDI, 12, 12, 5);
    prog[sub_at + 1] = asm_r(FN_JR, 0, 31, 0);
    prog[sub_at + 2] = NOP;
    return halt_at;
  endfunction

endpackage
