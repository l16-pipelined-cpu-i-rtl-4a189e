// tb_alu: self-checking testbench of the ALU.
// Random and corner operands for every ALU function; results and the N V C Z
// flags are compared with values computed here with plain 64-bit arithmetic.
module tb_alu;
  import mips_pkg::*;
  word_t a, b, y;
  alufn_e fn;
  logic n, v, c, z;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alufn(fn), .y, .n, .v, .c, .z);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(alufn_e f, word_t x, word_t w);
    longint sx, sw;
    sx = longint'($signed(x)); sw = longint'($signed(w));
    case (f)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return (sx < sw) ? 1 : 0;
      ALU_SLTU: return ({32'd0, x} < {32'd0, w}) ? 1 : 0;
      ALU_SLL:  return w << x[4:0];
      ALU_SRL:  return w >> x[4:0];
      default:  return word_t'(sw >>> x[4:0]);
    endcase
  endfunction

  task automatic one(alufn_e f, word_t x, word_t w);
    word_t e;
    longint s;
    logic [32:0] u;
    fn = f; a = x; b = w;
    #1;
    e = model(f, x, w);
    checks++;
    if (y !== e || n !== e[31] || z !== (e == 0)) begin
      failures++;
      $display("FAIL %s %h %h: y=%h exp %h", f.name(), x, w, y, e);
    end
    if (f == ALU_ADD || f == ALU_SUB) begin
      s = (f == ALU_ADD) ? longint'($signed(x)) + longint'($signed(w))
                         : longint'($signed(x)) - longint'($signed(w));
      u = (f == ALU_ADD) ? {1'b0, x} + {1'b0, w} : {1'b0, x} + {1'b0, ~w} + 33'd1;
      checks++;
      if (v !== (s > 64'sh7FFF_FFFF || s < -64'sh8000_0000) || c !== u[32]) begin
        failures++;
        $display("FAIL flags %s %h %h: v=%b c=%b", f.name(), x, w, v, c);
      end
    end
  endtask

  initial begin
    word_t corner [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h1F};
    for (int f = 0; f <= int'(ALU_SRA); f++) begin
      foreach (corner[i]) foreach (corner[j]) one(alufn_e'(f), corner[i], corner[j]);
      repeat (200) one(alufn_e'(f), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
