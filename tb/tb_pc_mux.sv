// tb_pc_mux: self-checking testbench of the PCSEL multiplexer.
// Each select value must pass its own input (PC+4, BT, jump target, JT) or
// produce its exception vector (0x80000000, 0x80000040, 0x80000080).
module tb_pc_mux;
  import mips_pkg::*;
  pcsel_e sel;
  word_t pc4, bt, jump, jt, nx, e;
  int checks = 0, failures = 0;

  pc_mux dut (.pcsel(sel), .pc4, .bt, .jump, .jt, .pc_next(nx));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50) begin
      pc4 = $urandom; bt = $urandom; jump = $urandom; jt = $urandom;
      for (int s = 0; s <= 6; s++) begin
        sel = pcsel_e'(s);
        #1;
        case (s)
          0: e = pc4;
          1: e = bt;
          2: e = jump;
          3: e = jt;
          4: e = 32'h8000_0000;
          5: e = 32'h8000_0040;
          default: e = 32'h8000_0080;
        endcase
        checks++;
        if (nx !== e) begin
          failures++;
          $display("FAIL pcsel=%0d got %h exp %h", s, nx, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
