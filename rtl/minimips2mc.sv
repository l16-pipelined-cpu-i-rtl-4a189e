// minimips2mc: the 2-stage pipelined miniMIPS with 2-cycle loads and stores.
//
// The variant of the 2-stage core (minimips2) meant for a much shorter
// clock period: EXE no longer fits an ALU operation and a data-memory
// access into one cycle, so an instruction that touches
// data memory (lw, sw) stays in EXE for two cycles. In its first cycle the
// ALU forms the address, which is captured, together with the store data,
// in the memory-address registers; nothing is written, the PC and IR^EXE
// hold, and the instruction fetched behind it waits in IF. In the second
// cycle the data memory is accessed from those registers, a store writes
// and a load writes its word into the register file, and the pipeline
// moves on. All other instructions take one cycle in EXE as in minimips2,
// with the same ANNUL^IF multiplexer loading NOP behind every redirect.
// Timing: a program takes one cycle per instruction, plus one per load or
// store, plus one per annulled slot. The events output reports the first
// cycle of a load or store as a stall; its bypass flags are always 0, since
// registers are read and written in the same stage.
// Interrupts are taken, as in minimips2, on any instruction in EXE except
// an annulled bubble, and only in its first cycle: a load or store, once its
// address is captured, always completes.
// Splitting loads and stores into two cycles follows the lecture; the
// memory-address registers, the hold of IF and the interrupt rule are this
// design's choices, since the lecture describes the variant only by its
// timing.
// Interface: as minimips2. The data memory is read combinationally from
// dmem_adr and written at the clock edge when dmem_wr is 1.
// The ALU's N, V, C and Z flags are left unconnected: branches are decided
// by the comparator, and no instruction of this set reads the flags.
module minimips2mc
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

  word_t  pc, pc4, pc_next;
  word_t  pc_exe, ir_exe;
  logic   v_exe, annul, irq_take;
  logic   mem_op, mem_phase, hold;
  word_t  ma_q, md_q;                 // memory-address and store-data registers
  ctrl_t  ctrl;
  pcsel_e pcsel;
  word_t  rd1, rd2, imm, a_in, b_in, y, wb_data;
  logic   n_f, v_f, c_f, z_f, bz;

  assign pc4       = pc + 32'd4;
  assign imem_addr = pc;
  assign irq_take  = irq && v_exe && !mem_phase;

  control_logic #(.DELAY_SLOT(1'b0)) u_ctrl (
    .ir(ir_exe), .z(bz), .irq(irq_take), .rst(rst), .ctrl(ctrl), .pcsel(pcsel)
  );

  // A load or store spends its first EXE cycle forming the address.
  assign mem_op = ctrl.wr || (ctrl.wdsel == WD_MEM);
  assign hold   = mem_op && !mem_phase;

  regfile u_rf (
    .clk, .rst,
    .ra1(f_rs(ir_exe)), .rd1(rd1),
    .ra2(f_rt(ir_exe)), .rd2(rd2),
    .wa(write_addr(ir_exe, ctrl.wasel)), .wd(wb_data), .we(ctrl.werf && !hold)
  );

  eq_comparator #(.WIDTH(32)) u_eq (.a(rd1), .b(rd2), .bz(bz));

  assign imm = ctrl.sext ? {{16{ir_exe[15]}}, ir_exe[15:0]} : {16'd0, ir_exe[15:0]};

  always_comb begin
    unique case (ctrl.asel)
      A_SHAMT: a_in = {27'd0, ir_exe[10:6]};
      A_16:    a_in = 32'd16;
      default: a_in = rd1;
    endcase
  end
  assign b_in = ctrl.bsel ? imm : rd2;

  alu u_alu (
    .a(a_in), .b(b_in), .alufn(ctrl.alufn),
    .y(y), .n(n_f), .v(v_f), .c(c_f), .z(z_f)
  );

  assign dmem_adr = ma_q;
  assign dmem_wd  = md_q;
  assign dmem_wr  = ctrl.wr && mem_phase;

  always_comb begin
    unique case (ctrl.wdsel)
      WD_PC4:  wb_data = pc_exe;
      WD_MEM:  wb_data = dmem_rd;
      default: wb_data = y;
    endcase
  end

  pc_mux u_pcmux (
    .pcsel(pcsel), .pc4(pc4),
    .bt(branch_target(pc_exe, ir_exe)), .jump(jump_target(pc_exe, ir_exe)),
    .jt(rd1), .pc_next(pc_next)
  );

  // ANNUL^IF: any redirect discards the instruction fetched this cycle.
  assign annul = (pcsel != PC_PLUS4);

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_phase <= 1'b0;
    end else begin
      mem_phase <= hold;
    end
    if (hold) begin
      ma_q <= y;
      md_q <= rd2;
    end
    if (rst || !hold) begin
      pc     <= pc_next;         // PCSEL=4 during reset loads 0x80000000
      pc_exe <= pc4;
      ir_exe <= annul ? NOP : imem_data;
      v_exe  <= !annul;
    end
  end

  assign events.stall        = !rst && hold;
  assign events.bypass_alu   = 1'b0;
  assign events.bypass_wb    = 1'b0;
  assign events.branch_taken = (pcsel == PC_BT);
  assign events.jump         = (pcsel == PC_JUMP) || (pcsel == PC_JT);
  assign events.annul        = !rst && annul;
  assign events.trap         = (pcsel == PC_IRQ) || (pcsel == PC_ILLOP);

  // A load or store never redirects, so its first cycle only holds.
  a_hold_no_redirect: assert property (@(posedge clk) disable iff (rst)
    hold |-> pcsel == PC_PLUS4);

  // The second cycle follows the first, with the same instruction.
  a_two_cycles: assert property (@(posedge clk) disable iff (rst)
    hold |=> mem_phase && $stable(ir_exe));

endmodule
