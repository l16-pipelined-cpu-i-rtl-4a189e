// minimips4: the 4-stage pipelined miniMIPS processor core.
//
// Stages and pipeline registers:
//   IF   PC, instruction-memory access, PC+4.      -> PC^RF (holds PC+4), IR^RF
//   RF   control logic, register-file read, bypass muxes, "=" comparator (BZ),
//        branch target BT, jump targets, ASEL/BSEL. -> PC^ALU, IR^ALU, A, B, WD^ALU
//   ALU  the ALU.                                   -> PC^MEM, IR^MEM, Y, WD^MEM
//   WB   data-memory access at address Y, WDSEL and WASEL muxes, register write.
// beq/bne are decided in the RF stage by the comparator, so each branch and
// jump has exactly one delay slot: the instruction after it is always
// executed, and jal/jalr link with PC+8. Two bypass paths feed the RF stage:
// the ALU output of the instruction one ahead and the write-back data of the
// instruction two ahead. A source register written by a lw (or jal/jalr) in
// the ALU stage cannot be bypassed yet; IF and RF then stall one cycle and a
// NOP enters the ALU stage.
// Interrupts and undefined instructions are taken in the RF stage: that
// instruction is replaced by a trap that writes its PC+4 to register 27, the
// PC is loaded from 0x80000080 / 0x80000040 and the instruction being fetched
// is annulled. An interrupt waits while the RF stage holds a delay-slot
// instruction or a bubble, so that register 27 always points just past a
// restartable instruction; a stalled cycle commits nothing, so a trap decided
// during a stall simply takes effect when the stall ends.
// The stage split, the pipeline registers, the comparator, the single delay
// slot and the two bypass rules follow the lecture. The load-use stall, the
// PC+8 link, trap handling in a pipeline and synchronous reset (PC <- 0x80000000,
// pipeline registers <- NOP) are this design's choices.
// Interface: instruction memory (imem_addr -> imem_data, combinational),
// data memory (dmem_adr/dmem_wd/dmem_wr, dmem_rd combinational, written at
// the clock edge), irq level input, and a per-cycle pipe_events_t report.
// The ALU's N, V, C and Z flags are left unconnected: branches are decided
// by the comparator, and no instruction of this set reads the flags.
module minimips4
  import mips_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         irq,
  output word_t        imem_addr,
  input  word_t        imem_data,
  output word_t        dmem_adr,
  output word_t        dmem_wd,
  output logic         dmem_wr,
  input  word_t        dmem_rd,
  output pipe_events_t events
);

  // ---------------- IF ----------------
  word_t pc, pc4, pc_next;
  assign pc4       = pc + 32'd4;
  assign imem_addr = pc;

  // ---------------- RF ----------------
  word_t  pc_rf, ir_rf;
  logic   v_rf, ds_rf;          // valid (not a bubble), is a delay slot
  ctrl_t  ctrl_rf;
  pcsel_e pcsel;
  logic   bz, stall, irq_take, trap;
  word_t  rd1, rd2, opa, opb, imm, a_in, b_in, bt, jmp;
  byp_e   sel_a, sel_b;

  // ---------------- ALU ----------------
  word_t pc_alu, ir_alu, a_alu, b_alu, wd_alu, y;
  ctrl_t ctrl_alu;
  logic  n_f, v_f, c_f, z_f;

  // ---------------- WB ----------------
  word_t     pc_mem, ir_mem, y_mem, wd_mem, wb_data;
  ctrl_t     ctrl_mem;
  reg_addr_t wb_wa;

  assign irq_take = irq && v_rf && !ds_rf;

  control_logic #(.DELAY_SLOT(1'b1)) u_ctrl (
    .ir(ir_rf), .z(bz), .irq(irq_take), .rst(rst), .ctrl(ctrl_rf), .pcsel(pcsel)
  );

  regfile u_rf (
    .clk, .rst,
    .ra1(f_rs(ir_rf)), .rd1(rd1),
    .ra2(f_rt(ir_rf)), .rd2(rd2),
    .wa(wb_wa), .wd(wb_data), .we(ctrl_mem.werf)
  );

  bypass_unit u_byp (
    .rs(f_rs(ir_rf)), .rt(f_rt(ir_rf)),
    .reads_rs(ctrl_rf.reads_rs), .reads_rt(ctrl_rf.reads_rt),
    .alu_wa(write_addr(ir_alu, ctrl_alu.wasel)), .alu_werf(ctrl_alu.werf),
    .alu_from_alu(ctrl_alu.wdsel == WD_ALU),
    .wb_wa(wb_wa), .wb_werf(ctrl_mem.werf),
    .sel_a(sel_a), .sel_b(sel_b), .stall(stall)
  );

  // Bypass multiplexers, ahead of every use of a register operand.
  always_comb begin
    unique case (sel_a)
      BYP_ALU: opa = y;
      BYP_WB:  opa = wb_data;
      default: opa = rd1;
    endcase
    unique case (sel_b)
      BYP_ALU: opb = y;
      BYP_WB:  opb = wb_data;
      default: opb = rd2;
    endcase
  end

  eq_comparator #(.WIDTH(32)) u_eq (.a(opa), .b(opb), .bz(bz));

  assign imm = ctrl_rf.sext ? {{16{ir_rf[15]}}, ir_rf[15:0]} : {16'd0, ir_rf[15:0]};
  assign bt  = branch_target(pc_rf, ir_rf);
  assign jmp = jump_target(pc_rf, ir_rf);

  always_comb begin
    unique case (ctrl_rf.asel)
      A_SHAMT: a_in = {27'd0, ir_rf[10:6]};
      A_16:    a_in = 32'd16;
      default: a_in = opa;
    endcase
  end
  assign b_in = ctrl_rf.bsel ? imm : opb;

  pc_mux u_pcmux (
    .pcsel(pcsel), .pc4(pc4), .bt(bt), .jump(jmp), .jt(opa), .pc_next(pc_next)
  );

  assign trap = (pcsel == PC_IRQ) || (pcsel == PC_ILLOP);

  // IF -> RF
  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= RESET_VEC;
      pc_rf <= RESET_VEC;
      ir_rf <= NOP;
      v_rf  <= 1'b0;
      ds_rf <= 1'b0;
    end else if (!stall) begin
      pc    <= pc_next;
      pc_rf <= pc4;
      ir_rf <= trap ? NOP : imem_data;
      v_rf  <= !trap;
      ds_rf <= (ctrl_rf.br != BR_NONE);
    end
  end

  // RF -> ALU
  always_ff @(posedge clk) begin
    if (rst || stall) begin
      pc_alu   <= pc_rf;
      ir_alu   <= NOP;
      a_alu    <= '0;
      b_alu    <= '0;
      wd_alu   <= '0;
      ctrl_alu <= CTRL_NOP;
    end else begin
      pc_alu   <= pc_rf;
      ir_alu   <= ir_rf;
      a_alu    <= a_in;
      b_alu    <= b_in;
      wd_alu   <= opb;
      ctrl_alu <= ctrl_rf;
    end
  end

  alu u_alu (
    .a(a_alu), .b(b_alu), .alufn(ctrl_alu.alufn),
    .y(y), .n(n_f), .v(v_f), .c(c_f), .z(z_f)
  );

  // ALU -> WB
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_mem   <= '0;
      ir_mem   <= NOP;
      y_mem    <= '0;
      wd_mem   <= '0;
      ctrl_mem <= CTRL_NOP;
    end else begin
      pc_mem   <= pc_alu;
      ir_mem   <= ir_alu;
      y_mem    <= y;
      wd_mem   <= wd_alu;
      ctrl_mem <= ctrl_alu;
    end
  end

  assign dmem_adr = y_mem;
  assign dmem_wd  = wd_mem;
  assign dmem_wr  = ctrl_mem.wr;
  assign wb_wa    = write_addr(ir_mem, ctrl_mem.wasel);

  always_comb begin
    unique case (ctrl_mem.wdsel)
      WD_PC4:  wb_data = pc_mem;
      WD_ALU:  wb_data = y_mem;
      WD_MEM:  wb_data = dmem_rd;
      default: wb_data = pc_mem + 32'd4;
    endcase
  end

  assign events.stall        = stall;
  assign events.bypass_alu   = (sel_a == BYP_ALU) || (sel_b == BYP_ALU);
  assign events.bypass_wb    = (sel_a == BYP_WB)  || (sel_b == BYP_WB);
  assign events.branch_taken = !stall && pcsel == PC_BT;
  assign events.jump         = !stall && (pcsel == PC_JUMP || pcsel == PC_JT);
  assign events.annul        = !stall && trap;
  assign events.trap         = !stall && trap;

  // A stalled RF stage keeps its instruction and sends a bubble onward.
  a_stall_holds: assert property (@(posedge clk) disable iff (rst)
    stall |=> $stable(ir_rf) && ctrl_alu == CTRL_NOP);
  // A trap is never taken on a bubble or on a stalled instruction.
  a_trap_valid: assert property (@(posedge clk) disable iff (rst)
    (pcsel == PC_IRQ) |-> v_rf && !ds_rf);

endmodule
