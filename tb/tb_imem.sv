// tb_imem: self-checking testbench of the instruction memory.
// Fills every word through the load port with a pattern computed from its
// index, then reads back through the byte-address port, including addresses
// in the 0x80000000 window and with the two low address bits set.
module tb_imem;
  import mips_pkg::*;
  logic clk = 0, we = 0;
  logic [9:0] la = 0;
  word_t ld = 0, a = 0, d;
  int checks = 0, failures = 0;

  imem #(.WORDS(1024)) dut (.clk, .a, .d, .load_we(we), .load_addr(la), .load_data(ld));
  always #5 clk = ~clk;

  function automatic word_t pat(int i);
    return word_t'(i) * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; la = 10'(i); ld = pat(i);
    end
    @(negedge clk); we = 0;
    repeat (2000) begin
      int i;
      i = int'($urandom % 1024);
      a = 32'h8000_0000 + 32'(i * 4) + 32'($urandom % 4);
      #1;
      checks++;
      if (d !== pat(i)) begin
        failures++;
        $display("FAIL word %0d got %h", i, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
