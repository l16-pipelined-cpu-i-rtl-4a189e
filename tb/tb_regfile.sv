// tb_regfile: self-checking testbench of the register file.
// Random writes and reads against a shadow array: register 0 stays zero,
// reads are combinational, a write lands at the clock edge (a read in the
// same cycle still returns the old value), and reset clears all registers.
module tb_regfile;
  import mips_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  reg_addr_t ra1 = 0, ra2 = 0, wa = 0;
  word_t rd1, rd2, wd = 0;
  word_t shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .rd1, .ra2, .rd2, .wa, .wd, .we);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(reg_addr_t r, word_t got);
    checks++;
    if (got !== shadow[r]) begin
      failures++;
      $display("FAIL r%0d got %h exp %h", r, got, shadow[r]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) begin ra1 = 5'(i); #1 chk(ra1, rd1); end
    repeat (3000) begin
      @(negedge clk);
      we = $urandom % 2; wa = 5'($urandom); wd = $urandom;
      ra1 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      ra2 = 5'($urandom);
      #1;
      chk(ra1, rd1);   // old value even when being written
      chk(ra2, rd2);
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    @(negedge clk); we = 0; rst = 1;
    @(negedge clk); rst = 0;
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 32; i++) begin ra2 = 5'(i); #1 chk(ra2, rd2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
