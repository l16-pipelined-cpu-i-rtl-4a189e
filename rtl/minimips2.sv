// minimips2: the 2-stage pipelined miniMIPS processor core with branch
// annulment.
//
// Stage IF holds the PC, reads the instruction memory and computes PC+4; the
// pipeline registers PC^EXE (holding PC+4) and IR^EXE carry the instruction to
// stage EXE, which does everything else in one cycle: decode, register read,
// ALU, data-memory access and register write. Because register reads and
// writes happen in the same stage there are no data hazards (the stall and
// bypass flags of `events` are therefore always 0). A branch is decided in
// EXE by the "=" comparator on the two register operands (BZ), which settles
// long before the ALU's Z flag would; still, the instruction fetched
// meanwhile belongs to the old path: whenever EXE
// selects any next PC other than PC+4 (taken branch, jump, trap, reset), the
// ANNUL^IF multiplexer loads NOP (0x00000000) into IR^EXE instead. Programs
// therefore run exactly as on an unpipelined miniMIPS, and jal links with
// PC+4. Interrupts are taken on any instruction in EXE except an annulled
// bubble: it is not executed, its PC+4 goes to register 27 and the PC is
// loaded from 0x80000080.
// The two stages, the annul multiplexer with its NOP constant, and the
// comparator follow the lecture; which redirects annul, trap handling and
// synchronous reset are this design's choices.
// Interface: as minimips4 (instruction memory, data memory, irq, events).
// The ALU's N, V, C and Z flags are left unconnected: branches are decided
// by the comparator, and no instruction of this set reads the flags.
module minimips2
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
  ctrl_t  ctrl;
  pcsel_e pcsel;
  word_t  rd1, rd2, imm, a_in, b_in, y, wb_data;
  logic   n_f, v_f, c_f, z_f, bz;

  assign pc4       = pc + 32'd4;
  assign imem_addr = pc;
  assign irq_take  = irq && v_exe;

  control_logic #(.DELAY_SLOT(1'b0)) u_ctrl (
    .ir(ir_exe), .z(bz), .irq(irq_take), .rst(rst), .ctrl(ctrl), .pcsel(pcsel)
  );

  regfile u_rf (
    .clk, .rst,
    .ra1(f_rs(ir_exe)), .rd1(rd1),
    .ra2(f_rt(ir_exe)), .rd2(rd2),
    .wa(write_addr(ir_exe, ctrl.wasel)), .wd(wb_data), .we(ctrl.werf)
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

  assign dmem_adr = y;
  assign dmem_wd  = rd2;
  assign dmem_wr  = ctrl.wr;

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
    pc     <= pc_next;           // PCSEL=4 during reset loads 0x80000000
    pc_exe <= pc4;
    ir_exe <= annul ? NOP : imem_data;
    v_exe  <= !annul;
  end

  assign events.stall        = 1'b0;
  assign events.bypass_alu   = 1'b0;
  assign events.bypass_wb    = 1'b0;
  assign events.branch_taken = (pcsel == PC_BT);
  assign events.jump         = (pcsel == PC_JUMP) || (pcsel == PC_JT);
  assign events.annul        = !rst && annul;
  assign events.trap         = (pcsel == PC_IRQ) || (pcsel == PC_ILLOP);

  // An annulled slot never reaches the register file or memory.
  a_annul_nop: assert property (@(posedge clk) disable iff (rst)
    !v_exe |-> !ctrl.wr && !(ctrl.werf && write_addr(ir_exe, ctrl.wasel) != 5'd0));

endmodule
