// tb_rvex_core: tests of the rho-VEX core pipeline on its own.
//
// The testbench holds simple synchronous instruction and data memories.
// Each test loads a program, resets the core, enables it and waits for done.
//   1. Operations: every ALU and multiply operation on three operand pairs,
//      results stored to data memory and compared with the operation
//      model in rvex_tb_pkg; loads and stores of every width.
//   2. Forwarding distances: a result is not seen by the next instruction
//      and is seen by the second, third and fourth (E1, WB, register file),
//      for an ALU result, a load and a branch condition.
//   3. Timing: straight-line code runs at one instruction per cycle, and a
//      taken branch costs one extra cycle (the single-cycle branch penalty).
//   4. Traps: an illegal slot and a misaligned store stop the core with
//      trap set, and the misaligned store writes nothing.
//   5. The test kernel, compared with its reference model.
module tb_rvex_core;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  logic         imem_re;
  logic [8:0]   imem_addr;
  logic [127:0] imem_rdata;
  logic         dmem_en;
  logic [3:0]   dmem_we;
  logic [13:0]  dmem_addr;
  logic [31:0]  dmem_wdata, dmem_rdata;
  logic         done, trap, ev_fwd, ev_branch;
  logic [31:0]  pc;

  rvex_core dut (.*);

  ins_t        imem [512];
  logic [31:0] dmem [16384];

  always_ff @(posedge clk) begin
    if (imem_re) imem_rdata <= imem[imem_addr];
    if (dmem_en) begin
      dmem_rdata <= dmem[dmem_addr];
      for (int i = 0; i < 4; i++) if (dmem_we[i]) dmem[dmem_addr][i*8 +: 8] <= dmem_wdata[i*8 +: 8];
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ins_t p[$];

  // load p, reset, run until done; returns cycles with en high
  task automatic run(output int cyc, input int limit = 100000);
    foreach (imem[i]) imem[i] = '0;
    foreach (p[i]) imem[i] = p[i];
    en = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk); en = 1;
    cyc = 0;
    while (!done && cyc < limit) begin @(posedge clk); cyc++; #1; end
    @(negedge clk); en = 0;
    check(done, "program reached done");
  endtask


  // operands: r2 = 12345678, r3 = -5, r4 = FFFFC003, r6 = 7, b3 = 1, b4 = 0; r7 = store pointer
  task automatic setup(logic [31:0] ptr);
    p.delete();
    p.push_back(ins(movl(2, 32'h12345), ri(OP_ADD, 3, 0, -5), movl(5, 32'h678), movl(4, 32'h3FFFF)));
    p.push_back(ins(ri(OP_ADD, 6, 0, 7), NOP, NOP, movl(7, int'(ptr))));
    p.push_back(ins(ri(OP_SHL, 2, 2, 12), NOP, NOP, ri(OP_SHL, 4, 4, 14)));
    p.push_back(ins(NOP));
    p.push_back(ins(rr(OP_OR, 2, 2, 5), NOP, NOP, ri(OP_OR, 4, 4, 3)));
    p.push_back(ins(NOP));
    p.push_back(ins(rr(OP_MTB, 3, 2, 0), rr(OP_MTB, 4, 0, 0)));   // b3 = 1, b4 = 0
    p.push_back(ins(NOP));
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    int cyc, t1, t2, n;
    logic [31:0] regs [8];
    op_e ops[$];
    int pairs[3][2];
    logic bo, bx;
    int k, slot;
    logic [31:0] exp_v;
    logic        exp_b;
    byte unsigned blk[BLK*BLK];
    shortint cosc[NWAVE*NROW], sinc[NWAVE*NROW];
    int unsigned pw[NWAVE];

    foreach (dmem[i]) dmem[i] = '0;

    // ---- 1. operations
    regs[2] = 32'h12345678; regs[3] = 32'hFFFFFFFB; regs[4] = 32'hFFFFC003; regs[6] = 32'd7;
    pairs = '{'{2, 3}, '{3, 4}, '{4, 6}};
    ops = {OP_ADD, OP_SUB, OP_AND, OP_ANDC, OP_OR, OP_ORC, OP_XOR, OP_SHL, OP_SHR, OP_SHRU,
           OP_SH1ADD, OP_SH2ADD, OP_SH3ADD, OP_SH4ADD, OP_MIN, OP_MINU, OP_MAX, OP_MAXU,
           OP_SXTB, OP_SXTH, OP_ZXTB, OP_ZXTH, OP_SLCT, OP_SLCTF,
           OP_CMPEQ, OP_CMPNE, OP_CMPGE, OP_CMPGEU, OP_CMPGT, OP_CMPGTU, OP_CMPLE, OP_CMPLEU,
           OP_CMPLT, OP_CMPLTU, OP_ANDL, OP_NANDL, OP_ORL, OP_NORL,
           OP_MPYLL, OP_MPYLLU, OP_MPYLH, OP_MPYLHU, OP_MPYHH, OP_MPYHHU, OP_MPYL, OP_MPYLU,
           OP_MPYH, OP_MPYHU, OP_MPYHS};
    setup(32'h100);
    k = 0;
    foreach (ops[o]) for (int q = 0; q < 3; q++) begin
      if (op_class(ops[o]) == CLS_MUL) slot = (k % 2) ? 3 : 1; else slot = k % 4;
      begin
        syl_t s[4];
        s = '{NOP, NOP, NOP, NOP};
        s[slot] = rb(ops[o], 10, pairs[q][0], pairs[q][1], (q == 1) ? 4 : 3);
        p.push_back(ins(s[0], s[1], s[2], s[3]));
      end
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, ri(OP_ADD, 7, 7, 4), mem(OP_STW, 10, 7, 0)));
      k++;
    end
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(cyc);
    check(!trap, "operation program ran without trap");
    setup(32'h100 + 32'(4*k));
    // compares into branch registers, read back with mfb
    for (int c = 0; c < 14; c++) for (int q = 0; q < 3; q++) begin
      p.push_back(ins(cmpb(op_e'(7'h30 + c), 2, pairs[q][0], pairs[q][1])));
      p.push_back(ins(NOP));
      p.push_back(ins(rb(OP_MFB, 10, 0, 0, 2)));
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, ri(OP_ADD, 7, 7, 4), mem(OP_STW, 10, 7, 0)));
    end
    // add with carry: r10 = a + b + b3, carry to b5
    for (int q = 0; q < 3; q++) begin
      p.push_back(ins(addcg(10, 5, pairs[q][0], pairs[q][1], 3)));
      p.push_back(ins(NOP));
      p.push_back(ins(rb(OP_MFB, 11, 0, 0, 5), NOP, mem(OP_STW, 10, 7, 0)));
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, ri(OP_ADD, 7, 7, 8), mem(OP_STW, 11, 7, 4)));
    end
    // loads and stores of every width around word 0x800
    p.push_back(ins(movl(8, 32'h800)));
    p.push_back(ins(NOP));
    p.push_back(ins(NOP, NOP, mem(OP_STW, 2, 8, 0)));
    p.push_back(ins(NOP, NOP, mem(OP_STH, 3, 8, 6)));
    p.push_back(ins(NOP, NOP, mem(OP_STB, 2, 8, 9)));
    p.push_back(ins(NOP, NOP, mem(OP_LDW, 20, 8, 0)));
    p.push_back(ins(NOP, NOP, mem(OP_LDH, 21, 8, 6)));
    p.push_back(ins(NOP, NOP, mem(OP_LDHU, 22, 8, 6)));
    p.push_back(ins(NOP, NOP, mem(OP_LDB, 23, 8, 1)));
    p.push_back(ins(NOP, NOP, mem(OP_LDBU, 24, 8, 7)));
    p.push_back(ins(NOP, NOP, mem(OP_LDB, 25, 8, 9)));
    p.push_back(ins(NOP));
    for (int r = 20; r <= 25; r++) p.push_back(ins(NOP, NOP, mem(OP_STW, r, 8, 20 + 4*(r-20))));
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(cyc);
    check(!trap, "operation program ran without trap");
    k = 0;
    foreach (ops[o]) for (int q = 0; q < 3; q++) begin
      exp_v = model(ops[o], regs[pairs[q][0]], regs[pairs[q][1]], q != 1, bo);
      check(dmem[(32'h100 >> 2) + k] == exp_v,
            $sformatf("%s(%h,%h) = %h, expected %h", ops[o].name(), regs[pairs[q][0]], regs[pairs[q][1]],
                      dmem[(32'h100 >> 2) + k], exp_v));
      k++;
    end
    for (int c = 0; c < 14; c++) for (int q = 0; q < 3; q++) begin
      exp_v = model(op_e'(7'h20 + c), regs[pairs[q][0]], regs[pairs[q][1]], 0, bo);
      check(dmem[(32'h100 >> 2) + k] == exp_v, $sformatf("branch compare %0d pair %0d", c, q));
      k++;
    end
    for (int q = 0; q < 3; q++) begin
      {exp_b, exp_v} = {1'b0, regs[pairs[q][0]]} + {1'b0, regs[pairs[q][1]]} + 33'd1;
      check(dmem[(32'h100 >> 2) + k] == exp_v, $sformatf("addcg sum pair %0d", q));
      check(dmem[(32'h100 >> 2) + k + 1] == 32'(exp_b), $sformatf("addcg carry pair %0d", q));
      k += 2;
    end
    // memory: word 0x800 = 12345678, 0x804 = 0000FFFB, 0x808 = 00780000 (byte 0x78 at 0x809)
    check(dmem[32'h800 >> 2] == 32'h12345678, "stw");
    check(dmem[32'h804 >> 2] == 32'h0000FFFB, "sth");
    check(dmem[32'h808 >> 2] == 32'h00780000, "stb");
    check(dmem[(32'h814 >> 2) + 0] == 32'h12345678, "ldw");
    check(dmem[(32'h814 >> 2) + 1] == 32'hFFFFFFFB, "ldh");
    check(dmem[(32'h814 >> 2) + 2] == 32'h0000FFFB, "ldhu");
    check(dmem[(32'h814 >> 2) + 3] == 32'h00000034, "ldb");
    check(dmem[(32'h814 >> 2) + 4] == 32'h000000FB, "ldbu");
    check(dmem[(32'h814 >> 2) + 5] == 32'h00000078, "ldb positive");

    // ---- 2. forwarding distances
    foreach (dmem[i]) dmem[i] = '0;
    dmem[32'h200 >> 2] = 32'h0000_0099;
    p.delete();
    p.push_back(ins(ri(OP_ADD, 20, 0, 5), NOP, movl(9, 32'h200)));
    p.push_back(ins(NOP, ri(OP_ADD, 21, 20, 0)));            // distance 1: old value
    p.push_back(ins(NOP, NOP, NOP, ri(OP_ADD, 22, 20, 0)));  // distance 2: from E1
    p.push_back(ins(ri(OP_ADD, 23, 20, 0), cmpbi(OP_CMPEQB, 1, 0, 0)));  // distance 3: WB; b1 = 1
    p.push_back(ins(ri(OP_ADD, 24, 20, 0), NOP, mem(OP_LDW, 30, 9, 0)));  // distance 4: register file
    p.push_back(ins(ri(OP_ADD, 31, 30, 0), rb(OP_MFB, 25, 0, 0, 1)));     // load +1 old, b1 +2 via E1
    p.push_back(ins(ri(OP_ADD, 32, 30, 0)));                               // load +2 via E1
    p.push_back(ins(NOP));
    for (int r = 21; r <= 25; r++) p.push_back(ins(NOP, NOP, mem(OP_STW, r, 0, 4*(r-21))));
    p.push_back(ins(NOP, NOP, mem(OP_STW, 31, 0, 32)));
    p.push_back(ins(NOP, NOP, mem(OP_STW, 32, 0, 36)));
    // branch reading a condition set two instructions before (E1 forwarding)
    p.push_back(ins(cmpbi(OP_CMPEQB, 6, 0, 0)));
    p.push_back(ins(NOP));
    p.push_back(ins(ctl(OP_BR, 6, 3)));
    p.push_back(ins(NOP, NOP, mem(OP_STW, 20, 0, 40)));   // skipped when the branch is taken
    p.push_back(ins(NOP));
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(cyc);
    check(dmem[0] == 32'd0, "distance 1 sees the old value");
    check(dmem[1] == 32'd5, "distance 2 forwarded from E1");
    check(dmem[2] == 32'd5, "distance 3 forwarded from WB");
    check(dmem[3] == 32'd5, "distance 4 from the register file");
    check(dmem[4] == 32'd1, "branch register forwarded from E1");
    check(dmem[8] == 32'd0, "load distance 1 sees the old value");
    check(dmem[9] == 32'h99, "load distance 2 forwarded");
    check(dmem[10] == 32'd0, "branch with forwarded condition taken");

    // ---- 3. timing: one instruction per cycle, one extra cycle per taken branch
    p.delete();
    for (int i = 0; i < 10; i++) p.push_back(ins(NOP));
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(t1);
    p.delete();
    for (int i = 0; i < 30; i++) p.push_back(ins(NOP));
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(t2);
    check(t2 - t1 == 20, $sformatf("20 more instructions take %0d more cycles", t2 - t1));
    for (int L = 5; L <= 10; L += 5) begin
      p.delete();
      p.push_back(ins(ri(OP_ADD, 2, 0, L)));
      p.push_back(ins(NOP));
      p.push_back(ins(cmpbi(OP_CMPGTB, 0, 2, 1), ri(OP_ADD, 2, 2, -1)));   // loop body
      p.push_back(ins(NOP));
      p.push_back(ins(ctl(OP_BR, 0, -2)));
      p.push_back(ins(ctl(OP_STOP, 0, 0)));
      run(n);
      if (L == 5) t1 = n; else t2 = n;
    end
    check(t2 - t1 == 5 * 4, $sformatf("5 more loop turns of 3 instructions take %0d more cycles", t2 - t1));

    // ---- 4. traps
    p.delete();
    p.push_back(ins(NOP));
    p.push_back(ins(NOP, NOP, NOP, mem(OP_LDW, 3, 0, 0)));   // load in slot 3
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(cyc);
    check(trap, "memory operation in slot 3 traps");
    foreach (dmem[i]) dmem[i] = '0;
    p.delete();
    p.push_back(ins(ri(OP_ADD, 2, 0, 77)));
    p.push_back(ins(NOP));
    p.push_back(ins(NOP, NOP, mem(OP_STW, 2, 0, 6)));        // misaligned word store
    p.push_back(ins(NOP, NOP, mem(OP_STW, 2, 0, 8)));        // never executed
    p.push_back(ins(ctl(OP_STOP, 0, 0)));
    run(cyc);
    check(trap, "misaligned store traps");
    check(dmem[1] == 0 && dmem[2] == 0, "misaligned store and what follows write nothing");

    // ---- 5. the test kernel
    foreach (dmem[i]) dmem[i] = '0;
    void'($urandom(5));
    foreach (blk[i]) blk[i] = 8'($urandom);
    foreach (cosc[i]) cosc[i] = 16'($signed($urandom_range(512)) - 256);
    foreach (sinc[i]) sinc[i] = 16'($signed($urandom_range(512)) - 256);
    for (int i = 0; i < BLK*BLK; i += 4)
      dmem[(A_DATA + 32'(i)) >> 2] = be_word(blk[i], blk[i+1], blk[i+2], blk[i+3]);
    for (int i = 0; i < NWAVE*NROW; i += 2) begin
      dmem[(A_COS + 32'(2*i)) >> 2] = {cosc[i], cosc[i+1]};
      dmem[(A_SIN + 32'(2*i)) >> 2] = {sinc[i], sinc[i+1]};
    end
    kernel_program(p);
    run(cyc);
    check(!trap, "kernel ran without trap");
    kernel_ref(blk, cosc, sinc, pw);
    for (int w = 0; w < NWAVE; w++)
      check(dmem[(A_POWERS >> 2) + w] == pw[w], $sformatf("kernel power[%0d]", w));
    $display("kernel: %0d cycles", cyc);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
