// tb_dft_block: workload test - one full direction-DFT block, the job the
// accelerator is built for, run on the processor subsystem at its default
// sizes through the host ports.
//
// For each of 16 directions (angle d*pi/16) the kernel sums the pixels of
// the 24 rows of a 24x24 window rotated about the centre of a 34x34 byte
// block, then for each of 4 waves forms the cosine and sine sums of the 24
// row sums and stores the power (c>>12)^2 + (s>>12)^2 as word
// 0x9300 + 4*(16*wave + direction): a 4x16 power matrix at 0x9300 and the
// input block at 0x9400, the layout the host software of the original
// platform uses. The rotation is given to the kernel as a table of 16 x 576
// absolute pixel addresses (halfwords, 18 kB at address 0), computed here
// with $cos/$sin; the coefficients are round(256*cos(2*pi*k*i/24)) and
// round(256*sin(...)) for waves k = 1..4. The kernel is a hand-scheduled
// program for the two-instruction latency (5 instructions per pixel).
//
// Checks: every one of the 64 powers and the 24 row sums of the last
// direction against a reference model written here, no trap, done, and that
// the run-cycle counter stops; two blocks of different data are run.
module tb_dft_block;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

  localparam int unsigned NDIR   = 16;
  localparam logic [31:0] A_GRID = 32'h0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_start = 0, cmd_stop = 0, cmd_reset = 0;
  logic h_imem_en = 0, h_imem_we = 0; logic [10:0] h_imem_addr = 0;
  logic [31:0] h_imem_wdata = 0, h_imem_rdata;
  logic h_dmem_en = 0; logic [3:0] h_dmem_we = 0; logic [13:0] h_dmem_addr = 0;
  logic [31:0] h_dmem_wdata = 0, h_dmem_rdata;
  logic running, done, trap, ev_fwd, ev_branch;
  logic [31:0] cycles, pc;

  rvex_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- host access
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask
  task automatic iwr(int a, logic [31:0] d);
    @(negedge clk) h_imem_en = 1; h_imem_we = 1; h_imem_addr = 11'(a); h_imem_wdata = d;
    @(negedge clk) h_imem_en = 0; h_imem_we = 0;
  endtask
  task automatic dwr(logic [31:0] byte_addr, logic [31:0] d);
    @(negedge clk) h_dmem_en = 1; h_dmem_we = 4'hF; h_dmem_addr = byte_addr[15:2]; h_dmem_wdata = d;
    @(negedge clk) h_dmem_en = 0; h_dmem_we = 0;
  endtask
  task automatic drd(logic [31:0] byte_addr, output logic [31:0] q);
    @(negedge clk) h_dmem_en = 1; h_dmem_addr = byte_addr[15:2];
    @(negedge clk) h_dmem_en = 0; q = h_dmem_rdata;
  endtask

  // ---------------------------------------------------------------- tables
  logic [15:0] grid [NDIR*NROW*NROW];     // absolute byte address of each pixel
  shortint     cosc [NWAVE*NROW], sinc [NWAVE*NROW];
  byte unsigned blk [BLK*BLK];

  function automatic int clamp(int v);
    return v < 0 ? 0 : v > BLK-1 ? BLK-1 : v;
  endfunction

  task automatic make_tables();
    real pi, th, dx, dy;
    int cx, cy;
    pi = 3.14159265358979;
    for (int d = 0; d < NDIR; d++) begin
      th = d * pi / NDIR;
      for (int y = 0; y < NROW; y++)
        for (int x = 0; x < NROW; x++) begin
          dx = x - (NROW-1)/2.0; dy = y - (NROW-1)/2.0;
          cx = clamp(int'($floor(dx*$cos(th) - dy*$sin(th) + (BLK-1)/2.0 + 0.5)));
          cy = clamp(int'($floor(dx*$sin(th) + dy*$cos(th) + (BLK-1)/2.0 + 0.5)));
          grid[(d*NROW + y)*NROW + x] = 16'(int'(A_DATA) + cy*BLK + cx);
        end
    end
    for (int k = 0; k < NWAVE; k++)
      for (int i = 0; i < NROW; i++) begin
        cosc[k*NROW+i] = 16'(int'($floor(256.0*$cos(2.0*pi*(k+1)*i/NROW) + 0.5)));
        sinc[k*NROW+i] = 16'(int'($floor(256.0*$sin(2.0*pi*(k+1)*i/NROW) + 0.5)));
      end
  endtask

  // ---------------------------------------------------------------- reference
  int          ref_rs [NDIR][NROW];
  int unsigned ref_pw [NWAVE][NDIR];
  task automatic reference();
    int c, s;
    for (int d = 0; d < NDIR; d++) begin
      for (int y = 0; y < NROW; y++) begin
        ref_rs[d][y] = 0;
        for (int x = 0; x < NROW; x++)
          ref_rs[d][y] += int'(blk[int'(grid[(d*NROW + y)*NROW + x]) - int'(A_DATA)]);
      end
      for (int w = 0; w < NWAVE; w++) begin
        c = 0; s = 0;
        for (int i = 0; i < NROW; i++) begin
          c += ref_rs[d][i] * int'(cosc[w*NROW+i]);
          s += ref_rs[d][i] * int'(sinc[w*NROW+i]);
        end
        c = c >>> 12; s = s >>> 12;
        ref_pw[w][d] = int'(c*c + s*s);
      end
    end
  endtask

  // ---------------------------------------------------------------- kernel program
  function automatic void dft_block_program(ref ins_t p[$]);
    int L_main, L_kern, L_dir, L_row, L_col, L_w, L_dft;
    int n;
    L_main = 0; L_kern = 0; L_dir = 0; L_row = 0; L_col = 0; L_w = 0; L_dft = 0;
    for (int pass = 0; pass < 2; pass++) begin
      p.delete();
      // _start: stack, call main, stop
      p.push_back(ins(movl(1, int'(A_STACK))));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_CALL, 0, L_main - n)));
      p.push_back(ins(ctl(OP_STOP, 0, 0)));
      // main: frame, save link, call the kernel, restore, return
      L_main = p.size();
      p.push_back(ins(ri(OP_ADD, 1, 1, -32)));
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, NOP, mem(OP_STW, 63, 1, 0)));
      n = p.size(); p.push_back(ins(ctl(OP_CALL, 0, L_kern - n)));
      p.push_back(ins(NOP, NOP, mem(OP_LDW, 63, 1, 0)));
      p.push_back(ins(NOP));
      p.push_back(ins(ret(1, 1, 32)));
      // kernel: r30 grid pointer, r31 direction, r3 power pointer of this direction
      L_kern = p.size();
      p.push_back(ins(movl(30, int'(A_GRID)), ri(OP_ADD, 31, 0, 0), movl(3, int'(A_POWERS))));
      p.push_back(ins(NOP));
      L_dir = p.size();
      p.push_back(ins(ri(OP_ADD, 11, 0, 0), movl(16, int'(A_RS))));
      // rotated row sums
      L_row = p.size();
      p.push_back(ins(ri(OP_ADD, 15, 0, NROW), ri(OP_ADD, 12, 0, 0)));
      p.push_back(ins(NOP));
      L_col = p.size();
      p.push_back(ins(cmpbi(OP_CMPGTB, 0, 15, 1), ri(OP_ADD, 15, 15, -1),
                      mem(OP_LDHU, 13, 30, 0), ri(OP_ADD, 30, 30, 2)));
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, NOP, mem(OP_LDBU, 14, 13, 0)));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 0, L_col - n), rr(OP_ADD, 12, 12, 14)));
      p.push_back(ins(cmpbi(OP_CMPLTB, 1, 11, NROW-1), NOP, NOP, ri(OP_ADD, 11, 11, 1)));
      p.push_back(ins(NOP, ri(OP_ADD, 16, 16, 4), mem(OP_STW, 12, 16, 0)));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 1, L_row - n)));
      // waves of this direction
      p.push_back(ins(movl(17, int'(A_COS)), movl(18, int'(A_SIN)), ri(OP_ADD, 19, 0, 0), ri(OP_ADD, 4, 3, 0)));
      L_w = p.size();
      p.push_back(ins(movl(16, int'(A_RS)), ri(OP_ADD, 15, 0, NROW), ri(OP_ADD, 20, 0, 0), ri(OP_ADD, 21, 0, 0)));
      p.push_back(ins(NOP));
      L_dft = p.size();
      p.push_back(ins(cmpbi(OP_CMPGTB, 0, 15, 1), ri(OP_ADD, 15, 15, -1), mem(OP_LDW, 24, 16, 0), ri(OP_ADD, 16, 16, 4)));
      p.push_back(ins(NOP, NOP, mem(OP_LDH, 25, 17, 0), ri(OP_ADD, 17, 17, 2)));
      p.push_back(ins(ri(OP_ADD, 18, 18, 2), NOP, mem(OP_LDH, 26, 18, 0)));
      p.push_back(ins(NOP, rr(OP_MPYL, 22, 24, 25)));
      p.push_back(ins(NOP, NOP, NOP, rr(OP_MPYL, 23, 24, 26)));
      p.push_back(ins(rr(OP_ADD, 20, 20, 22)));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 0, L_dft - n), rr(OP_ADD, 21, 21, 23)));
      p.push_back(ins(ri(OP_SHR, 20, 20, 12)));
      p.push_back(ins(ri(OP_SHR, 21, 21, 12)));
      p.push_back(ins(NOP, rr(OP_MPYL, 22, 20, 20)));
      p.push_back(ins(NOP, NOP, NOP, rr(OP_MPYL, 23, 21, 21)));
      p.push_back(ins(NOP));
      p.push_back(ins(rr(OP_ADD, 22, 22, 23)));
      p.push_back(ins(NOP));
      p.push_back(ins(cmpbi(OP_CMPLTB, 1, 19, NWAVE-1), ri(OP_ADD, 4, 4, 4*NDIR), mem(OP_STW, 22, 4, 0), ri(OP_ADD, 19, 19, 1)));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 1, L_w - n)));
      // next direction
      p.push_back(ins(cmpbi(OP_CMPLTB, 2, 31, NDIR-1), ri(OP_ADD, 3, 3, 4), NOP, ri(OP_ADD, 31, 31, 1)));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 2, L_dir - n)));
      p.push_back(ins(ret(1, 1, 0)));
    end
  endfunction

  // ---------------------------------------------------------------- test
  initial begin
    ins_t prog[$];
    logic [31:0] q, c_end;
    bit got;
    repeat (3) @(negedge clk);
    rst_n = 1;

    make_tables();
    dft_block_program(prog);
    foreach (prog[i]) for (int k = 0; k < 4; k++) iwr(i*4 + k, prog[i][k*32 +: 32]);
    for (int i = 0; i < NDIR*NROW*NROW; i += 2) dwr(A_GRID + 32'(2*i), {grid[i], grid[i+1]});
    for (int i = 0; i < NWAVE*NROW; i += 2) begin
      dwr(A_COS + 32'(2*i), {cosc[i], cosc[i+1]});
      dwr(A_SIN + 32'(2*i), {sinc[i], sinc[i+1]});
    end

    for (int run = 0; run < 2; run++) begin
      // host sequence of the original platform: stop, reset, write the block, start, wait
      pulse(cmd_stop); pulse(cmd_reset);
      foreach (blk[i]) blk[i] = (run == 0) ? 8'($urandom) : 8'((i % BLK) * 7 + (i / BLK) * 3);
      for (int i = 0; i < BLK*BLK; i += 4) dwr(A_DATA + 32'(i), be_word(blk[i], blk[i+1], blk[i+2], blk[i+3]));
      reference();
      pulse(cmd_start);
      got = 0;
      for (int i = 0; i < 1_500_000 && !got; i++) begin
        @(posedge clk);
        if (done && !running) got = 1;
      end
      check(got, $sformatf("block %0d done", run));
      check(!trap, $sformatf("block %0d no trap", run));
      c_end = cycles;
      repeat (10) @(negedge clk);
      check(cycles == c_end, "cycle counter stops at done");
      for (int y = 0; y < NROW; y++) begin
        drd(A_RS + 32'(4*y), q);
        check(q == 32'(ref_rs[NDIR-1][y]), $sformatf("block %0d row sum %0d", run, y));
      end
      for (int w = 0; w < NWAVE; w++)
        for (int d = 0; d < NDIR; d++) begin
          drd(A_POWERS + 32'(4*(w*NDIR + d)), q);
          check(q == ref_pw[w][d], $sformatf("block %0d power[%0d][%0d] = %0d, expected %0d", run, w, d, q, ref_pw[w][d]));
        end
      begin
        int nz = 0;
        for (int w = 0; w < NWAVE; w++) for (int d = 0; d < NDIR; d++) nz += (ref_pw[w][d] != 0);
        check(nz > NWAVE*NDIR/2, $sformatf("block %0d: %0d of 64 powers non-zero", run, nz));
      end
      $display("block %0d: %0d instructions, %0d cycles", run, prog.size(), c_end);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
