// mips_iss_pkg: instruction-level reference model and random program
// generator for the miniMIPS pipeline testbenches.
//
// Iss executes one instruction per step() with architectural semantics
// (no pipeline): either one delay slot after every branch/jump
// (annul = 0) or none (annul = 1, the slot of a taken transfer is skipped).
// Illegal instructions trap to 0x80000040 and interrupts, injected by
// step(1), to 0x80000080, both writing PC+4 to register 27. Each step
// reports the register write (wa != 0) or memory write it made, so that
// a testbench can compare it with the pipeline's WB-stage writes in order.
//
// gen_program() builds a program: reset code at 0x80000000 that jumps to
// user code at 0x400, trap handlers at 0x80000040 and 0x80000080, a
// prologue that initialises registers and data words, nlen random
// instructions (ALU, loads with dependent uses, stores, forward branches,
// j/jal/jr/jalr, illegal opcodes) and a final self-loop.
package mips_iss_pkg;

  localparam int IWORDS    = 1024;
  localparam int DWORDS    = 1024;
  localparam int USER_WORD = 256;   // user code starts at byte 0x400

  function automatic logic [31:0] enc_r(logic [5:0] fn, int rd, int rs, int rt, int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction
  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction

  typedef struct {
    bit          rwr;   // register write with wa != 0
    bit          mwr;   // memory write
    logic [4:0]  wa;
    logic [31:0] wd;
    logic [31:0] addr;
  } ev_t;

  class Iss;
    logic [31:0] imem [IWORDS];
    logic [31:0] dmem [DWORDS];
    logic [31:0] regs [32];
    logic [31:0] pc, npc;
    bit          annul;
    int          executed;     // instructions executed or trapped
    int          irq_bad;      // interrupts injected at a forbidden point
    int          n_illop, n_irq, n_taken;

    function new(bit annul_mode);
      annul = annul_mode;
      foreach (regs[i]) regs[i] = '0;
      foreach (dmem[i]) dmem[i] = '0;
      foreach (imem[i]) imem[i] = '0;
      pc = 32'h8000_0000;
      npc = pc + 4;
      executed = 0; irq_bad = 0; n_illop = 0; n_irq = 0; n_taken = 0;
    endfunction

    function void wr(ref ev_t e, input logic [4:0] wa, input logic [31:0] wd);
      if (wa != 0) begin
        regs[wa] = wd;
        e.rwr = 1; e.wa = wa; e.wd = wd;
      end
    endfunction

    // Move on: target is the transfer destination, or 'x-free sentinel
    function void advance(bit taken, logic [31:0] target, bit is_trap);
      if (is_trap || (taken && annul)) begin
        pc = target; npc = target + 4;
      end else if (taken) begin
        pc = npc; npc = target;
      end else begin
        pc = npc; npc = npc + 4;
      end
    endfunction

    function ev_t step(bit irq);
      ev_t e;
      logic [31:0] ins, a, b, pc4, imm_s, imm_z;
      logic [5:0] op, fn;
      int rs, rt, rd, sh;
      bit ill;
      e = '{default:0};
      executed++;
      pc4 = pc + 4;
      if (irq) begin
        n_irq++;
        if (pc[31] || (!annul && npc != pc4)) irq_bad++;
        wr(e, 27, pc4);
        advance(1, 32'h8000_0080, 1);
        return e;
      end
      ins = imem[pc[11:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]); sh = int'(ins[10:6]);
      a = regs[rs]; b = regs[rt];
      imm_s = {{16{ins[15]}}, ins[15:0]};
      imm_z = {16'h0, ins[15:0]};
      ill = 0;
      case (op)
        6'h00: begin
          case (fn)
            6'h00: wr(e, 5'(rd), b << sh);
            6'h02: wr(e, 5'(rd), b >> sh);
            6'h03: wr(e, 5'(rd), $signed(b) >>> sh);
            6'h04: wr(e, 5'(rd), b << a[4:0]);
            6'h06: wr(e, 5'(rd), b >> a[4:0]);
            6'h07: wr(e, 5'(rd), $signed(b) >>> a[4:0]);
            6'h20, 6'h21: wr(e, 5'(rd), a + b);
            6'h22, 6'h23: wr(e, 5'(rd), a - b);
            6'h24: wr(e, 5'(rd), a & b);
            6'h25: wr(e, 5'(rd), a | b);
            6'h26: wr(e, 5'(rd), a ^ b);
            6'h27: wr(e, 5'(rd), ~(a | b));
            6'h2a: wr(e, 5'(rd), ($signed(a) < $signed(b)) ? 32'd1 : 32'd0);
            6'h2b: wr(e, 5'(rd), (a < b) ? 32'd1 : 32'd0);
            6'h08: begin n_taken++; advance(1, {a[31:2], 2'b00}, 0); return e; end
            6'h09: begin
              n_taken++;
              wr(e, 5'(rd), annul ? pc4 : pc4 + 4);
              advance(1, {a[31:2], 2'b00}, 0);
              return e;
            end
            default: ill = 1;
          endcase
        end
        6'h08, 6'h09: wr(e, 5'(rt), a + imm_s);
        6'h0a: wr(e, 5'(rt), ($signed(a) < $signed(imm_s)) ? 32'd1 : 32'd0);
        6'h0b: wr(e, 5'(rt), (a < imm_s) ? 32'd1 : 32'd0);
        6'h0c: wr(e, 5'(rt), a & imm_z);
        6'h0d: wr(e, 5'(rt), a | imm_z);
        6'h0e: wr(e, 5'(rt), a ^ imm_z);
        6'h0f: wr(e, 5'(rt), {ins[15:0], 16'h0});
        6'h23: wr(e, 5'(rt), dmem[(a + imm_s) >> 2 & (DWORDS - 1)]);
        6'h2b: begin
          dmem[(a + imm_s) >> 2 & (DWORDS - 1)] = b;
          e.mwr = 1; e.addr = a + imm_s; e.wd = b;
        end
        6'h04, 6'h05: begin
          bit t;
          t = (op == 6'h04) ? (a == b) : (a != b);
          if (t) n_taken++;
          advance(t, pc4 + (imm_s << 2), 0);
          return e;
        end
        6'h02, 6'h03: begin
          n_taken++;
          if (op == 6'h03) wr(e, 31, annul ? pc4 : pc4 + 4);
          advance(1, {pc4[31:28], ins[25:0], 2'b00}, 0);
          return e;
        end
        default: ill = 1;
      endcase
      if (ill) begin
        n_illop++;
        e = '{default:0};
        wr(e, 27, pc4);
        advance(1, 32'h8000_0040, 1);
        return e;
      end
      advance(0, 0, 0);
      return e;
    endfunction
  endclass

  // Random register from a small set so that dependences are frequent.
  function automatic int rreg();
    int r;
    r = $urandom_range(0, 12);
    if (r == 0 && $urandom_range(0, 3) != 0) r = 1;
    return r;
  endfunction

  // Fills prog (all IWORDS words); returns the byte address of the end loop.
  function automatic logic [31:0] gen_program(ref logic [31:0] prog [IWORDS], input int nlen);
    int p, k, t, r, left;
    logic [31:0] ins;
    foreach (prog[i]) prog[i] = '0;
    // Reset code at word 0: jump to user code at 0x400.
    prog[0] = enc_i(6'h09, 0, 1, 16'(USER_WORD * 4));      // addiu $1,$0,0x400
    prog[1] = enc_r(6'h08, 0, 1, 0);                         // jr $1
    prog[2] = '0;                                            // nop (slot)
    // Illegal-instruction handler at word 16 (0x80000040).
    prog[16] = enc_i(6'h09, 25, 25, 16'd1);                  // addiu $25,$25,1
    prog[17] = enc_r(6'h08, 0, 27, 0);                       // jr $27
    prog[18] = '0;
    // Interrupt handler at word 32 (0x80000080).
    prog[32] = enc_i(6'h09, 26, 26, 16'd1);                  // addiu $26,$26,1
    prog[33] = enc_i(6'h09, 27, 27, 16'hfffc);               // addiu $27,$27,-4
    prog[34] = enc_r(6'h08, 0, 27, 0);                       // jr $27
    prog[35] = '0;
    p = USER_WORD;
    // Prologue: every register, then data words 0..15.
    for (int i = 1; i < 32; i++) prog[p++] = enc_i(6'h09, 0, i, 16'($urandom));
    for (int i = 0; i < 16; i++) prog[p++] = enc_i(6'h2b, 0, $urandom_range(1, 31), 16'(4 * i));
    // Random body.
    for (int n = 0; n < nlen && p < IWORDS - 12; n++) begin
      left = IWORDS - 12 - p;
      k = $urandom_range(0, 99);
      if (k < 30) begin                          // R-type ALU
        logic [5:0] fns [13] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26,
                                 6'h27, 6'h2a, 6'h2b, 6'h04, 6'h06, 6'h07};
        prog[p++] = enc_r(fns[$urandom_range(0, 12)], rreg(), rreg(), rreg());
      end else if (k < 38) begin                 // shift by shamt
        logic [5:0] sf [3] = '{6'h00, 6'h02, 6'h03};
        prog[p++] = enc_r(sf[$urandom_range(0, 2)], rreg(), 0, rreg(), $urandom_range(0, 31));
      end else if (k < 56) begin                 // I-type ALU
        logic [5:0] ops [8] = '{6'h08, 6'h09, 6'h0a, 6'h0b, 6'h0c, 6'h0d, 6'h0e, 6'h0f};
        prog[p++] = enc_i(ops[$urandom_range(0, 7)], rreg(), rreg(), 16'($urandom));
      end else if (k < 68) begin                 // load, often used at once
        r = $urandom_range(1, 12);
        prog[p++] = enc_i(6'h23, 0, r, 16'(4 * $urandom_range(0, 15)));
        if ($urandom_range(0, 1) == 1)
          prog[p++] = enc_r(6'h20, rreg(), r, rreg());
      end else if (k < 76) begin                 // store
        prog[p++] = enc_i(6'h2b, 0, rreg(), 16'(4 * $urandom_range(0, 15)));
      end else if (k < 86 && left > 8) begin     // forward branch + slot
        t = $urandom_range(0, 3);
        prog[p++] = enc_i(($urandom_range(0, 1) == 1) ? 6'h04 : 6'h05, rreg(), rreg(), 16'(t));
        prog[p++] = enc_i(6'h09, rreg(), rreg(), 16'($urandom));
        for (int s = 0; s < t; s++) prog[p++] = enc_i(6'h0d, rreg(), rreg(), 16'($urandom));
      end else if (k < 90 && left > 8) begin     // j / jal forward
        t = $urandom_range(0, 2);
        ins = 32'((p + 2 + t) * 4);
        prog[p++] = enc_j(($urandom_range(0, 1) == 1) ? 6'h03 : 6'h02, ins);
        prog[p++] = enc_r(6'h21, rreg(), 31, rreg());      // slot reads $31
        for (int s = 0; s < t; s++) prog[p++] = enc_i(6'h0e, rreg(), rreg(), 16'($urandom));
      end else if (k < 95 && left > 8) begin     // jr / jalr through a register
        t = $urandom_range(0, 2);
        ins = 32'((p + 3 + t) * 4);
        prog[p++] = enc_i(6'h09, 0, 20, ins[15:0]);          // addiu $20,$0,target
        prog[p++] = ($urandom_range(0, 1) == 1) ? enc_r(6'h08, 0, 20, 0) : enc_r(6'h09, 31, 20, 0);
        prog[p++] = enc_i(6'h09, rreg(), rreg(), 16'($urandom));
        for (int s = 0; s < t; s++) prog[p++] = enc_i(6'h0c, rreg(), rreg(), 16'($urandom));
      end else if (k < 97) begin                 // illegal opcode
        prog[p++] = {6'h3f, 26'($urandom)};
      end else begin
        prog[p++] = '0;                          // nop
      end
    end
    prog[p]   = enc_i(6'h04, 0, 0, 16'hffff);    // end: beq $0,$0,end
    prog[p+1] = '0;
    return 32'(p * 4);
  endfunction

endpackage
