// tb_bypass_unit: self-checking testbench of the bypass selection and stall.
// Random register numbers drawn from a small set (so that matches are
// frequent) are compared with the select rules written out here: ALU path
// when the ALU-stage instruction writes the register with an ALU result,
// write-back path otherwise when the last stage writes it, never for
// register 0 or an operand not read; stall when the ALU-stage instruction
// writes the register with a value the ALU does not compute.
module tb_bypass_unit;
  import mips_pkg::*;
  reg_addr_t rs, rt, awa, wwa;
  logic rrs, rrt, awe, afa, wwe, stall;
  byp_e sa, sb;
  int checks = 0, failures = 0;
  int seen_alu = 0, seen_wb = 0, seen_stall = 0;

  bypass_unit dut (
    .rs, .rt, .reads_rs(rrs), .reads_rt(rrt), .alu_wa(awa), .alu_werf(awe),
    .alu_from_alu(afa), .wb_wa(wwa), .wb_werf(wwe), .sel_a(sa), .sel_b(sb), .stall
  );

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byp_e exp_sel(reg_addr_t r, logic rd);
    if (rd && r != 0 && awe && afa && awa == r) return BYP_ALU;
    if (rd && r != 0 && wwe && wwa == r && !(awe && afa && awa == r)) return BYP_WB;
    return BYP_RF;
  endfunction

  initial begin
    logic exp_stall;
    repeat (20000) begin
      rs = 5'($urandom % 4); rt = 5'($urandom % 4);
      awa = 5'($urandom % 4); wwa = 5'($urandom % 4);
      {rrs, rrt, awe, afa, wwe} = 5'($urandom);
      #1;
      exp_stall = awe && !afa && ((rrs && rs != 0 && awa == rs) || (rrt && rt != 0 && awa == rt));
      checks++;
      if (sa !== exp_sel(rs, rrs) || sb !== exp_sel(rt, rrt) || stall !== exp_stall) begin
        failures++;
        $display("FAIL rs=%0d rt=%0d awa=%0d wwa=%0d flags=%b: %s %s %b",
                 rs, rt, awa, wwa, {rrs, rrt, awe, afa, wwe}, sa.name(), sb.name(), stall);
      end
      if (sa == BYP_ALU) seen_alu++;
      if (sb == BYP_WB) seen_wb++;
      if (stall) seen_stall++;
    end
    checks++;
    if (seen_alu == 0 || seen_wb == 0 || seen_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
