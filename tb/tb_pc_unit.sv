// tb_pc_unit: reset to 0x80000000, sequential counting, hold, and every
// PCSEL source (branch target, register target, jump address, the three
// vectors), each compared with the address computed here.
module tb_pc_unit;
  import mips_pkg::*;
  logic        clk = 1'b0;
  logic        rst, hold;
  pcsel_e      pcsel;
  logic [31:0] pc4_rf, imm_ext, jt, pc, pc_plus4;
  logic [25:0] jaddr;
  int checks = 0, failures = 0;

  pc_unit dut (.clk, .rst, .hold, .pcsel, .pc4_rf, .imm_ext, .jt, .jaddr, .pc, .pc_plus4);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: pc=%h", what, pc); end
  endtask

  task automatic step(pcsel_e s, logic h, logic [31:0] want, string what);
    @(negedge clk);
    pcsel = s; hold = h;
    pc4_rf = $urandom; imm_ext = 32'($signed(16'($urandom))); jt = $urandom; jaddr = 26'($urandom);
    case (s)
      PCSEL_BT: want = pc4_rf + imm_ext * 4;
      PCSEL_JT: want = jt & ~32'd3;
      PCSEL_JA: want = {pc4_rf[31:28], jaddr, 2'b00};
      default: ;
    endcase
    if (h) want = pc;
    @(posedge clk); #1;
    check(pc == want, what);
  endtask

  initial begin
    rst = 1'b1; hold = 1'b0; pcsel = PCSEL_PC4; pc4_rf = '0; imm_ext = '0; jt = '0; jaddr = '0;
    @(posedge clk); #1;
    check(pc == 32'h8000_0000, "reset vector");
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      logic [31:0] p;
      p = pc;
      case ($urandom_range(0, 8))
        0: step(PCSEL_BT, 0, 0, "branch target");
        1: step(PCSEL_JT, 0, 0, "register target");
        2: step(PCSEL_JA, 0, 0, "jump address");
        3: step(PCSEL_IRQ, 0, 32'h8000_0080, "vector 4");
        4: step(PCSEL_ILLOP, 0, 32'h8000_0040, "vector 5");
        5: step(PCSEL_RESET, 0, 32'h8000_0000, "vector 6");
        6: step(pcsel_e'($urandom_range(0, 6)), 1, 0, "hold");
        default: begin
          check(pc_plus4 == p + 4, "pc_plus4");
          step(PCSEL_PC4, 0, p + 4, "sequential");
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
