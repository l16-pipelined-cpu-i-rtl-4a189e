// tb_eq_comparator: self-checking testbench of the branch comparator.
// Equal pairs, pairs that differ in exactly one bit (every position) and
// random pairs; BZ must be 1 exactly when the operands are equal.
module tb_eq_comparator;
  logic [31:0] a, b;
  logic bz;
  int checks = 0, failures = 0;

  eq_comparator #(.WIDTH(32)) dut (.a, .b, .bz);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [31:0] x, logic [31:0] y);
    a = x; b = y; #1;
    checks++;
    if (bz !== (x == y)) begin
      failures++;
      $display("FAIL %h %h bz=%b", x, y, bz);
    end
  endtask

  initial begin
    repeat (100) begin
      logic [31:0] r;
      r = $urandom;
      one(r, r);
      for (int i = 0; i < 32; i++) one(r, r ^ (32'd1 << i));
      one(r, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
