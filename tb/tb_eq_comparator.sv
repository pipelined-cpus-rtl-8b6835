// tb_eq_comparator: equal pairs, pairs differing in exactly one bit (every
// position) and random pairs; eq must be 1 exactly when a equals b.
module tb_eq_comparator;
  logic [31:0] a, b;
  logic        eq;
  int checks = 0, failures = 0;

  eq_comparator #(.WIDTH(32)) dut (.a, .b, .eq);

  task automatic one(logic [31:0] x, logic [31:0] w);
    a = x; b = w;
    #1;
    checks++;
    if (eq !== (x == w)) begin failures++; $display("FAIL %h %h eq=%b", x, w, eq); end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [31:0] r;
      r = $urandom;
      one(r, r);
      one(r, r ^ (32'd1 << (i % 32)));
      one(r, $urandom);
    end
    one('0, '0);
    one('1, '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
