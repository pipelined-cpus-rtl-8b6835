// tb_alu: every ALU operation on random and corner-case operands, compared
// with results computed here from the operation's definition, plus the
// N, V, C, Z flags of additions and subtractions.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  alufn_e      fn;
  logic        n, v, c, z;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alufn(fn), .y, .n, .v, .c, .z);

  function automatic logic [31:0] ref_y(alufn_e f, logic [31:0] x, logic [31:0] w);
    case (f)
      ALU_ADD:  return x + w;
      ALU_SUB:  return x - w;
      ALU_AND:  return x & w;
      ALU_OR:   return x | w;
      ALU_XOR:  return x ^ w;
      ALU_NOR:  return ~(x | w);
      ALU_SLT:  return {31'd0, $signed(x) < $signed(w)};
      ALU_SLTU: return {31'd0, x < w};
      ALU_SLL:  return w << x[4:0];
      ALU_SRL:  return w >> x[4:0];
      ALU_SRA:  return $signed(w) >>> x[4:0];
      default:  return '0;
    endcase
  endfunction

  task automatic one(alufn_e f, logic [31:0] x, logic [31:0] w);
    logic [32:0] s;
    longint      si;
    fn = f; a = x; b = w;
    #1;
    checks++;
    if (y !== ref_y(f, x, w)) begin
      failures++;
      $display("FAIL %s %h %h -> %h want %h", f.name(), x, w, y, ref_y(f, x, w));
    end
    if (f == ALU_ADD || f == ALU_SUB) begin
      s  = (f == ALU_ADD) ? {1'b0, x} + {1'b0, w} : {1'b0, x} + {1'b0, ~w} + 33'd1;
      si = (f == ALU_ADD) ? longint'($signed(x)) + longint'($signed(w))
                          : longint'($signed(x)) - longint'($signed(w));
      checks++;
      if (n !== s[31] || c !== s[32] || z !== (s[31:0] == 0) ||
          v !== (si > 64'sd2147483647 || si < -64'sd2147483648)) begin
        failures++;
        $display("FAIL flags %s %h %h: nvcz=%b%b%b%b", f.name(), x, w, n, v, c, z);
      end
    end
  endtask

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff, 32'h0000_001f};
    for (int f = 0; f <= int'(ALU_SRA); f++) begin
      foreach (corner[i]) foreach (corner[j]) one(alufn_e'(f), corner[i], corner[j]);
      for (int k = 0; k < 500; k++) one(alufn_e'(f), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
