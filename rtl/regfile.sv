// regfile: the miniMIPS register file, 32 registers of 32 bits.
//
// Two combinational read ports (RA1/RD1 for Rs, RA2/RD2 for Rt) and one write
// port (WA/WD/WE) that writes at the rising clock edge. Register 0 always
// reads as zero and ignores writes. A read of the register being written in
// the same cycle returns the old value: the pipelines cover that case with a
// bypass path instead of a write-through register file.
// Port names and the combinational-read / clocked-write split follow the
// datapath drawings. Clearing all registers on reset is this design's choice,
// made so that simulations start from a known state.
module regfile
  import mips_pkg::*;
#(
  parameter int NREGS = 32
) (
  input  logic      clk,
  input  logic      rst,
  input  reg_addr_t ra1,
  output word_t     rd1,
  input  reg_addr_t ra2,
  output word_t     rd2,
  input  reg_addr_t wa,
  input  word_t     wd,
  input  logic      we
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == 5'd0) ? '0 : regs[ra2];

endmodule
