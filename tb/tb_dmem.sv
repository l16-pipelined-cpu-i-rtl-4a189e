// tb_dmem: self-checking testbench of the data memory.
// Random writes and reads against a shadow array: a read is combinational,
// a write takes effect only at the clock edge and only when Wr is 1.
module tb_dmem;
  import mips_pkg::*;
  logic clk = 0, wr = 0;
  word_t adr = 0, wd = 0, rd;
  word_t shadow [1024];
  int checks = 0, failures = 0;

  dmem #(.WORDS(1024)) dut (.clk, .adr, .wd, .wr, .rd);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); wr = 1; adr = 32'(i * 4); wd = word_t'(i) ^ 32'hC0DE_0000;
      shadow[i] = wd;
    end
    repeat (5000) begin
      int i;
      @(negedge clk);
      i = int'($urandom % 64);
      wr = $urandom % 2; adr = 32'(i * 4); wd = $urandom;
      #1;
      checks++;
      if (rd !== shadow[i]) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", i, rd, shadow[i]);
      end
      @(posedge clk);
      if (wr) shadow[i] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
