// minimips_top: the two pipelined miniMIPS systems, side by side.
//
// sys4: the 4-stage miniMIPS (IF, RF, ALU, WB) with early branch decision,
//       one architectural branch delay slot and two bypass paths;
// sys2: the 2-stage miniMIPS (IF, EXE) that annuls the instruction fetched
//       behind a taken branch or jump;
// sys2m: the 2-stage variant whose loads and stores take two cycles in EXE,
//       for a shorter clock period.
// Each system is a processor core with its own instruction memory and data
// memory. The three share only the clock and the reset, and each brings out its
// interrupt input, an instruction-memory load port (used while in reset to
// place a program; word address, written at the clock edge), its current PC
// and its per-cycle pipeline events. Reset is synchronous: hold rst for at
// least one clock edge; the first instruction is fetched from 0x80000000.
// Memory depths are this design's choice (1024 words each).
module minimips_top
  import mips_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst,
  // 4-stage system
  input  logic                          irq4,
  input  logic                          load4_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load4_addr,
  input  word_t                         load4_data,
  output word_t                         pc4,
  output pipe_events_t                  events4,
  // 2-stage system
  input  logic                          irq2,
  input  logic                          load2_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load2_addr,
  input  word_t                         load2_data,
  output word_t                         pc2,
  output pipe_events_t                  events2,
  // 2-stage system with 2-cycle loads and stores
  input  logic                          irq2m,
  input  logic                          load2m_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] load2m_addr,
  input  word_t                         load2m_data,
  output word_t                         pc2m,
  output pipe_events_t                  events2m
);

  word_t i4_a, i4_d, d4_adr, d4_wd, d4_rd;
  logic  d4_wr;
  word_t i2_a, i2_d, d2_adr, d2_wd, d2_rd;
  logic  d2_wr;
  word_t i2m_a, i2m_d, d2m_adr, d2m_wd, d2m_rd;
  logic  d2m_wr;

  minimips4 u_cpu4 (
    .clk, .rst, .irq(irq4),
    .imem_addr(i4_a), .imem_data(i4_d),
    .dmem_adr(d4_adr), .dmem_wd(d4_wd), .dmem_wr(d4_wr), .dmem_rd(d4_rd),
    .events(events4)
  );
  imem #(.WORDS(IMEM_WORDS)) u_imem4 (
    .clk, .a(i4_a), .d(i4_d),
    .load_we(load4_we), .load_addr(load4_addr), .load_data(load4_data)
  );
  dmem #(.WORDS(DMEM_WORDS)) u_dmem4 (
    .clk, .adr(d4_adr), .wd(d4_wd), .wr(d4_wr), .rd(d4_rd)
  );

  minimips2 u_cpu2 (
    .clk, .rst, .irq(irq2),
    .imem_addr(i2_a), .imem_data(i2_d),
    .dmem_adr(d2_adr), .dmem_wd(d2_wd), .dmem_wr(d2_wr), .dmem_rd(d2_rd),
    .events(events2)
  );
  imem #(.WORDS(IMEM_WORDS)) u_imem2 (
    .clk, .a(i2_a), .d(i2_d),
    .load_we(load2_we), .load_addr(load2_addr), .load_data(load2_data)
  );
  dmem #(.WORDS(DMEM_WORDS)) u_dmem2 (
    .clk, .adr(d2_adr), .wd(d2_wd), .wr(d2_wr), .rd(d2_rd)
  );

  minimips2mc u_cpu2m (
    .clk, .rst, .irq(irq2m),
    .imem_addr(i2m_a), .imem_data(i2m_d),
    .dmem_adr(d2m_adr), .dmem_wd(d2m_wd), .dmem_wr(d2m_wr), .dmem_rd(d2m_rd),
    .events(events2m)
  );
  imem #(.WORDS(IMEM_WORDS)) u_imem2m (
    .clk, .a(i2m_a), .d(i2m_d),
    .load_we(load2m_we), .load_addr(load2m_addr), .load_data(load2m_data)
  );
  dmem #(.WORDS(DMEM_WORDS)) u_dmem2m (
    .clk, .adr(d2m_adr), .wd(d2m_wd), .wr(d2m_wr), .rd(d2m_rd)
  );

  assign pc4 = i4_a;
  assign pc2 = i2_a;
  assign pc2m = i2m_a;

endmodule
