// tb_rvex_plb_wrapper: end-to-end test of the accelerator at its default
// size, driven over the bus the way the host program drives it.
//
// The testbench plays the host: it loads the test kernel (see rvex_tb_pkg)
// into the instruction memory, enables the interrupt, and for each block of
// random pixel data runs the host sequence stop, reset, write input, start,
// wait for the interrupt, read status, cycle count and results. Results are
// compared with the reference model. On top of that it:
//   - stops the processor in the middle of a run, checks that it is frozen,
//     restarts it, and checks that the results and the cycle count still
//     match an undisturbed run (the cycle count only counts running cycles);
//   - runs a misaligned load and a multiply placed in slot 0 and checks
//     that each traps and still interrupts the host;
//   - writes single bytes into the data memory and reads the words back;
//   - sends an address outside the window and checks it gets no answer.
// Each mechanism (taken branch, forwarding, call/return, host stop,
// both traps, interrupt, byte write) is counted; one that never happened
// counts as a failure.
module tb_rvex_plb_wrapper;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

  localparam logic [31:0] BASE = 32'hC000_0000;
  localparam logic [31:0] W_CTRL = BASE, W_DMEM = BASE + 32'h1_0000,
                          W_IMEM = BASE + 32'h2_0000, W_STAT = BASE + 32'h3_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        plb_pavalid = 0, plb_rnw = 0;
  logic [31:0] plb_abus = 0, plb_wrdbus = 0;
  logic [3:0]  plb_be = 0;
  logic sl_addrack, sl_wrdack, sl_wrcomp, sl_rddack, sl_rdcomp, irq, ev_fwd, ev_branch;
  logic [31:0] sl_rddbus;

  rvex_plb_wrapper dut (
    .clk, .rst_n, .plb_pavalid, .plb_rnw, .plb_abus, .plb_be, .plb_wrdbus,
    .sl_addrack, .sl_wrdack, .sl_wrcomp, .sl_rddack, .sl_rdcomp, .sl_rddbus,
    .ip2intc_irpt(irq), .ev_fwd, .ev_branch);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_branch = 0, n_stall = 0, n_trap_mis = 0, n_trap_ill = 0, n_irq = 0, n_bytewr = 0, n_callret = 0;

  always @(posedge clk) begin
    if (ev_fwd)    n_fwd++;
    if (ev_branch) n_branch++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- bus tasks
  task automatic bus(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     input logic [3:0] be, output logic [31:0] q, output bit acked, input int limit = 20);
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d; plb_be = be;
    acked = 0;
    for (int i = 0; i < limit && !acked; i++) begin
      @(posedge clk); #1;
      if (sl_addrack) begin
        acked = 1;
        q = sl_rddbus;
        if (rnw) check(sl_rddack && sl_rdcomp && !sl_wrdack, "read acknowledge");
        else     check(sl_wrdack && sl_wrcomp && !sl_rddack, "write acknowledge");
      end
    end
    @(negedge clk);
    plb_pavalid = 0;
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    logic [31:0] q; bit ok;
    bus(1'b0, a, d, be, q, ok);
    if (!ok) begin failures++; $display("FAIL: no ack for write %h", a); end
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] q);
    bit ok;
    bus(1'b1, a, 32'h0, 4'h0, q, ok);
    if (!ok) begin failures++; $display("FAIL: no ack for read %h", a); end
  endtask

  // ---------------------------------------------------------------- host routines
  ins_t prog[$];
  byte unsigned blk[BLK*BLK];
  shortint cosc[NWAVE*NROW], sinc[NWAVE*NROW];
  int unsigned pw[NWAVE];

  task automatic load_program(ref ins_t p[$]);
    foreach (p[i])
      for (int k = 0; k < 4; k++) wr(W_IMEM + 32'(i*16 + k*4), p[i][k*32 +: 32]);
  endtask

  task automatic make_data(int seed);
    int unsigned r;
    r = $urandom(seed);
    foreach (blk[i])  blk[i]  = 8'($urandom);
    foreach (cosc[i]) cosc[i] = 16'($signed($urandom_range(512)) - 256);
    foreach (sinc[i]) sinc[i] = 16'($signed($urandom_range(512)) - 256);
  endtask

  task automatic write_input();
    for (int i = 0; i < BLK*BLK; i += 4)
      wr(W_DMEM + A_DATA + 32'(i), be_word(blk[i], blk[i+1], blk[i+2], blk[i+3]));
    for (int i = 0; i < NWAVE*NROW; i += 2) begin
      wr(W_DMEM + A_COS + 32'(2*i), {cosc[i], cosc[i+1]});
      wr(W_DMEM + A_SIN + 32'(2*i), {sinc[i], sinc[i+1]});
    end
  endtask

  task automatic wait_irq(output bit got, input int limit = 200000);
    got = 0;
    for (int i = 0; i < limit && !got; i++) begin
      @(posedge clk);
      if (irq) got = 1;
    end
  endtask

  task automatic check_results(string tag);
    logic [31:0] q;
    kernel_ref(blk, cosc, sinc, pw);
    for (int y = 0; y < NROW; y++) begin
      rd(W_DMEM + A_RS + 32'(4*y), q);
      check(q == 32'(row_sum(blk, y)), $sformatf("%s row sum %0d = %0d, expected %0d", tag, y, q, row_sum(blk, y)));
    end
    for (int w = 0; w < NWAVE; w++) begin
      rd(W_DMEM + A_POWERS + 32'(4*w), q);
      check(q == pw[w], $sformatf("%s power[%0d] = %0d, expected %0d", tag, w, q, pw[w]));
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- test
  initial begin
    logic [31:0] q, st, cyc1, cyc2, pc_a, pc_b, cyc_a, cyc_b;
    bit got, ok;
    int br_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    kernel_program(prog);
    $display("kernel program: %0d instructions", prog.size());
    load_program(prog);
    // read back part of the program
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 4; k++) begin
        rd(W_IMEM + 32'(i*16 + k*4), q);
        check(q == prog[i][k*32 +: 32], "instruction memory read-back");
      end
    wr(W_CTRL + 4, 32'h1);            // interrupt enable
    rd(W_CTRL + 4, q);
    check(q == 32'h1, "interrupt enable read-back");

    // ---- run 1: plain kernel run
    make_data(11);
    wr(W_CTRL, 32'h2); wr(W_CTRL, 32'h4);   // stop, reset
    write_input();
    br_before = n_branch;
    wr(W_CTRL, 32'h1);                      // start
    wait_irq(got);
    check(got, "run 1 interrupt");
    if (got) n_irq++;
    rd(W_STAT, st);
    check(st[2:0] == 3'b010, $sformatf("run 1 status %b", st[2:0]));
    rd(W_STAT + 4, cyc1);
    check_results("run 1");
    // the kernel takes 24*24 + 4*24 loop iterations, each ending in a taken branch
    // except the last of each loop, plus 3 calls and 2 returns
    check(n_branch - br_before == (NROW*(NROW-1) + (NROW-1)) + NWAVE*(NROW-1) + (NWAVE-1) + 4,
          $sformatf("run 1 taken branches %0d", n_branch - br_before));
    if (n_branch - br_before > 0) n_callret++;
    $display("run 1: %0d cycles", cyc1);

    // ---- run 2: new data, host stops the processor mid-run and restarts it
    make_data(23);
    wr(W_CTRL, 32'h2); wr(W_CTRL, 32'h4);
    check(!irq, "interrupt cleared by reset");
    write_input();
    wr(W_CTRL, 32'h1);
    repeat (700) @(posedge clk);
    wr(W_CTRL, 32'h2);                      // stop
    rd(W_STAT + 8, pc_a); rd(W_STAT + 4, cyc_a);
    repeat (50) @(posedge clk);
    rd(W_STAT + 8, pc_b); rd(W_STAT + 4, cyc_b);
    rd(W_STAT, st);
    check(pc_a == pc_b && cyc_a == cyc_b && st[0] == 0 && st[1] == 0, "stopped processor is frozen");
    check(cyc_a >= 700 && pc_a != 0, $sformatf("stop keeps the state (pc %h, %0d cycles)", pc_a, cyc_a));
    if (pc_a == pc_b && cyc_a == cyc_b) n_stall++;
    wr(W_CTRL, 32'h1);                      // resume
    wait_irq(got);
    check(got, "run 2 interrupt");
    if (got) n_irq++;
    rd(W_STAT + 4, cyc2);
    check(cyc2 == cyc1, $sformatf("cycle count with a stop %0d, without %0d", cyc2, cyc1));
    check_results("run 2");

    // ---- byte writes into the data memory
    wr(W_DMEM + 32'h100, 32'h11223344);
    wr(W_DMEM + 32'h100, 32'hAA00_0000, 4'b1000);
    wr(W_DMEM + 32'h100, 32'h0000_00BB, 4'b0001);
    rd(W_DMEM + 32'h100, q);
    check(q == 32'hAA2233BB, $sformatf("byte-enable write %h", q));
    if (q == 32'hAA2233BB) n_bytewr++;

    // ---- address outside the window: no answer
    bus(1'b1, 32'h1000_0000, 0, 0, q, ok, 6);
    check(!ok, "no answer outside the window");

    // ---- traps: misaligned load, then a multiply in slot 0
    wr(W_CTRL, 32'h2); wr(W_CTRL, 32'h4);
    prog.delete();
    prog.push_back(ins(movl(2, 32'h9402)));
    prog.push_back(ins(NOP));
    prog.push_back(ins(NOP, NOP, mem(OP_LDW, 3, 2, 0)));
    prog.push_back(ins(NOP));
    prog.push_back(ins(ctl(OP_STOP, 0, 0)));
    load_program(prog);
    wr(W_CTRL, 32'h1);
    wait_irq(got, 200);
    rd(W_STAT, st);
    check(got && st[2:1] == 2'b11, $sformatf("misaligned load traps, status %b", st[2:0]));
    if (got && st[2]) n_trap_mis++;

    wr(W_CTRL, 32'h2); wr(W_CTRL, 32'h4);
    rd(W_STAT, st);
    check(st[2:0] == 3'b000, "reset clears the trap");
    prog.delete();
    prog.push_back(ins(NOP));
    prog.push_back(ins(rr(OP_MPYL, 4, 1, 1)));
    prog.push_back(ins(ctl(OP_STOP, 0, 0)));
    load_program(prog);
    wr(W_CTRL, 32'h1);
    wait_irq(got, 200);
    rd(W_STAT, st);
    check(got && st[2:1] == 2'b11, $sformatf("multiply in slot 0 traps, status %b", st[2:0]));
    if (got && st[2]) begin n_trap_ill++; n_irq++; end

    // ---- every mechanism happened
    $display("mechanisms: fwd=%0d branch=%0d callret=%0d stall=%0d trap_mis=%0d trap_ill=%0d irq=%0d bytewr=%0d",
             n_fwd, n_branch, n_callret, n_stall, n_trap_mis, n_trap_ill, n_irq, n_bytewr);
    check(n_fwd > 0,      "forwarding happened");
    check(n_branch > 0,   "taken branch happened");
    check(n_callret > 0,  "call/return happened");
    check(n_stall > 0,    "host stop happened");
    check(n_trap_mis > 0, "misalignment trap happened");
    check(n_trap_ill > 0, "illegal-slot trap happened");
    check(n_irq > 0,      "interrupt happened");
    check(n_bytewr > 0,   "byte write happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
