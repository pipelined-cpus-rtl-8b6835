// tb_hazard_sequences: classic short instruction sequences that show the
// pipeline, run on two pipelines side by side (u0: delay-slot mode, the
// default; u1: ANNUL_DELAY_SLOT = 1) with result and cycle checks:
//  A  addi/sll/andi/sub, independent: one write-back per clock.
//  B  addi $t0 then sll $t1,$t0,2 at once: ALU bypass, still no stall.
//  C  xor $1; add $5; sub $3,$1,$2: the value reaches sub through the WB
//     bypass while it is being written.
//  D  loop: add; srl; bne $t2,$0,loop; andi (in the branch slot). In
//     delay-slot mode andi runs on every pass; with annulment only after the
//     last. Either way one pass takes 4 clocks.
//  E  the same loop rewritten with srl in the slot (delay-slot mode only):
//     3 clocks per pass.
//  F  lw followed at once by a use of the loaded register: exactly one
//     stall cycle.
module tb_hazard_sequences;
  import mips_pkg::*;
  import mips_iss_pkg::enc_r;
  import mips_iss_pkg::enc_i;

  localparam int T0 = 8, T1 = 9, T2 = 10, T3 = 11;

  logic        clk = 1'b0;
  logic        rst, imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic [31:0] pc [2];
  logic        wb_we [2], mem_we [2], stall [2], annul [2], irq_ack [2];
  logic [4:0]  wb_wa [2];
  logic [31:0] wb_wd [2], mem_addr [2], mem_wdata [2];
  byp_e        byp_a [2], byp_b [2];

  minimips4 u0 (
    .clk, .rst, .irq(1'b0), .imem_we, .imem_waddr, .imem_wdata, .pc(pc[0]),
    .wb_we(wb_we[0]), .wb_wa(wb_wa[0]), .wb_wd(wb_wd[0]), .mem_we(mem_we[0]),
    .mem_addr(mem_addr[0]), .mem_wdata(mem_wdata[0]), .stall(stall[0]), .annul(annul[0]),
    .irq_ack(irq_ack[0]), .byp_a(byp_a[0]), .byp_b(byp_b[0]));
  minimips4 #(.ANNUL_DELAY_SLOT(1'b1)) u1 (
    .clk, .rst, .irq(1'b0), .imem_we, .imem_waddr, .imem_wdata, .pc(pc[1]),
    .wb_we(wb_we[1]), .wb_wa(wb_wa[1]), .wb_wd(wb_wd[1]), .mem_we(mem_we[1]),
    .mem_addr(mem_addr[1]), .mem_wdata(mem_wdata[1]), .stall(stall[1]), .annul(annul[1]),
    .irq_ack(irq_ack[1]), .byp_a(byp_a[1]), .byp_b(byp_b[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // Write-back trace per pipeline: cycle, register, value.
  int          wcyc [2][$];
  logic [4:0]  wreg [2][$];
  logic [31:0] wval [2][$];
  int          n_stall [2], n_alu [2], n_wb [2], n_annul [2];
  int          cyc;
  bit          running = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) if (running) begin
    cyc++;
    for (int d = 0; d < 2; d++) begin
      if (wb_we[d] && wb_wa[d] != 0) begin
        wcyc[d].push_back(cyc); wreg[d].push_back(wb_wa[d]); wval[d].push_back(wb_wd[d]);
      end
      if (stall[d]) n_stall[d]++;
      if (annul[d]) n_annul[d]++;
      if (byp_a[d] == BYP_ALU || byp_b[d] == BYP_ALU) n_alu[d]++;
      if (byp_a[d] == BYP_WB || byp_b[d] == BYP_WB) n_wb[d]++;
    end
  end

  // Cycle of the k-th write (0-based) of register r, or -1.
  function automatic int nth_write(int d, int r, int k);
    foreach (wreg[d][i]) if (int'(wreg[d][i]) == r) begin
      if (k == 0) return wcyc[d][i];
      k--;
    end
    return -1;
  endfunction
  function automatic int n_writes(int d, int r);
    int n = 0;
    foreach (wreg[d][i]) if (int'(wreg[d][i]) == r) n++;
    return n;
  endfunction

  task automatic run(logic [31:0] prog [$], int ncycles);
    prog.push_back(enc_i(OP_BEQ, 0, 0, 16'hffff));   // end: beq $0,$0,end
    prog.push_back('0);
    rst = 1'b1;
    foreach (prog[i]) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 32'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    for (int d = 0; d < 2; d++) begin
      wcyc[d].delete(); wreg[d].delete(); wval[d].delete();
      n_stall[d] = 0; n_alu[d] = 0; n_wb[d] = 0; n_annul[d] = 0;
    end
    cyc = -1;
    rst = 1'b0;
    running = 1'b1;
    repeat (ncycles) @(negedge clk);
    running = 1'b0;
  endtask

  function automatic logic [31:0] reg_of(int d, int r);
    return d == 0 ? u0.u_rf.regs[r] : u1.u_rf.regs[r];
  endfunction

  initial begin
    logic [31:0] p [$];
    int c0, c1, npass;
    logic [31:0] t0, t1, t2;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0; rst = 1'b1;

    // ---- A: independent instructions
    p = '{enc_i(OP_ADDIU, 0, T0, 16'd5), enc_i(OP_ADDIU, 0, T1, 16'd3),
          enc_i(OP_ADDIU, 0, T2, 16'h7f), enc_i(OP_ADDIU, 0, T3, 16'd9),
          enc_i(OP_ADDI, T0, T0, 16'd1), enc_r(FN_SLL, T1, 0, T1, 2),
          enc_i(OP_ANDI, T2, T2, 16'd15), enc_r(FN_SUB, T3, 0, T3)};
    run(p, 30);
    for (int d = 0; d < 2; d++) begin
      check(reg_of(d, T0) == 6 && reg_of(d, T1) == 12 && reg_of(d, T2) == 15 &&
            reg_of(d, T3) == -32'sd9, "A: results");
      check(wcyc[d].size() == 8 && wcyc[d][7] - wcyc[d][0] == 7, "A: one write-back per clock");
      check(wcyc[d][0] == 3, "A: first write-back in the 4th clock");
    end

    // ---- B: addi then dependent sll (ALU bypass)
    p = '{enc_i(OP_ADDIU, 0, T0, 16'd5), enc_i(OP_ADDIU, 0, T2, 16'h7f),
          enc_i(OP_ADDIU, 0, T3, 16'd9), 32'h0, 32'h0,
          enc_i(OP_ADDI, T0, T0, 16'd1), enc_r(FN_SLL, T1, 0, T0, 2),
          enc_i(OP_ANDI, T2, T2, 16'd15), enc_r(FN_SUB, T3, 0, T3)};
    run(p, 30);
    for (int d = 0; d < 2; d++) begin
      check(reg_of(d, T1) == 24, "B: sll sees the addi result");
      check(n_alu[d] >= 1 && n_stall[d] == 0, "B: ALU bypass, no stall");
      check(nth_write(d, T1, 0) - nth_write(d, T0, 1) == 1, "B: sll one clock after addi");
    end

    // ---- C: xor $1 / add $5 / sub $3,$1,$2 (WB bypass)
    p = '{enc_i(OP_ADDIU, 0, 2, 16'd100), enc_i(OP_ADDIU, 0, 6, 16'd7),
          enc_i(OP_ADDIU, 0, 4, 16'd1), enc_i(OP_ADDIU, 0, 7, 16'd2), 32'h0, 32'h0,
          enc_r(FN_XOR, 1, 2, 6), enc_r(FN_ADD, 5, 4, 7), enc_r(FN_SUB, 3, 1, 2)};
    run(p, 30);
    for (int d = 0; d < 2; d++) begin
      check(reg_of(d, 3) == ((32'd100 ^ 32'd7) - 32'd100), "C: sub sees xor result");
      check(reg_of(d, 5) == 3, "C: add result");
      check(n_wb[d] >= 1 && n_stall[d] == 0, "C: WB bypass, no stall");
    end

    // ---- D: loop with andi in the branch slot
    p = '{enc_i(OP_ADDIU, 0, T0, 16'd1), enc_i(OP_ADDIU, 0, T1, 16'd0),
          enc_i(OP_ADDIU, 0, T2, 16'h00b5),
          enc_r(FN_ADD, T1, T1, T0),                      // loop (word 3)
          enc_r(FN_SRL, T2, 0, T2, 1),
          enc_i(OP_BNE, T2, 0, 16'hfffd),                 // bne $t2,$0,loop
          enc_i(OP_ANDI, T2, T0, 16'd1)};                 // andi $t0,$t2,1
    run(p, 120);
    for (int d = 0; d < 2; d++) begin
      // reference: the andi runs every pass (d=0) or only after the last (d=1)
      t0 = 1; t1 = 0; t2 = 32'hb5; npass = 0;
      do begin
        t1 = t1 + t0; t2 = t2 >> 1; npass++;
        if (d == 0 || t2 == 0) t0 = t2 & 1;
      end while (t2 != 0);
      check(reg_of(d, T0) == t0 && reg_of(d, T1) == t1 && reg_of(d, T2) == t2,
            $sformatf("D: loop results mode %0d", d));
      check(n_writes(d, T1) == npass + 1, "D: number of passes");
      c0 = nth_write(d, T1, 1); c1 = nth_write(d, T1, 2);
      check(c1 - c0 == 4, $sformatf("D: 4 clocks per pass (mode %0d: %0d)", d, c1 - c0));
      check(d == 0 ? n_annul[d] == 0 : n_annul[d] >= npass - 1, "D: annulment only with ANNUL_DELAY_SLOT");
    end

    // ---- E: srl moved into the slot (delay-slot mode)
    p = '{enc_i(OP_ADDIU, 0, T0, 16'd3), enc_i(OP_ADDIU, 0, T1, 16'd0),
          enc_i(OP_ADDIU, 0, T2, 16'h0040),
          enc_r(FN_SRL, T2, 0, T2, 1),
          enc_r(FN_ADD, T1, T1, T0),                      // loop (word 4)
          enc_i(OP_BNE, T2, 0, 16'hfffe),
          enc_r(FN_SRL, T2, 0, T2, 1)};
    run(p, 80);
    check(reg_of(0, T1) == 32'd3 * 7 && reg_of(0, T2) == 0, "E: results");
    check(nth_write(0, T1, 2) - nth_write(0, T1, 1) == 3, "E: 3 clocks per pass");

    // ---- F: load followed by a use
    p = '{enc_i(OP_ADDIU, 0, 4, 16'd1234), enc_i(OP_SW, 0, 4, 16'd8), 32'h0,
          enc_i(OP_LW, 0, 2, 16'd8), enc_r(FN_ADD, 3, 2, 2), enc_i(OP_ADDIU, 0, 5, 16'd1)};
    run(p, 30);
    for (int d = 0; d < 2; d++) begin
      check(reg_of(d, 3) == 2468, "F: add sees loaded word");
      check(n_stall[d] == 1, $sformatf("F: exactly one stall cycle (%0d)", n_stall[d]));
      check(nth_write(d, 3, 0) - nth_write(d, 2, 0) == 2, "F: use writes back 2 clocks after the load");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
