// tb_rvex_system: test of the processor subsystem (core, instruction and
// data memory, run control) through its host-side ports, without the bus.
// The host loads the test kernel (row sums and a four-wave DFT, see
// rvex_tb_pkg), writes the input block, pulses start and waits for done,
// then checks the results against the reference model. It also checks:
// the cycle counter stops at done and is cleared by reset; a stop pulse
// freezes pc and the counter and start resumes with the same final count;
// reset while running returns the core to address 0; a start while done is
// ignored; host instruction-memory read-back.
module tb_rvex_system;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

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
    repeat (1_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask
  task automatic iwr(int a, logic [31:0] d);
    @(negedge clk) h_imem_en = 1; h_imem_we = 1; h_imem_addr = 11'(a); h_imem_wdata = d;
    @(negedge clk) h_imem_en = 0; h_imem_we = 0;
  endtask
  task automatic ird(int a, output logic [31:0] q);
    @(negedge clk) h_imem_en = 1; h_imem_addr = 11'(a);
    @(negedge clk) h_imem_en = 0; q = h_imem_rdata;
  endtask
  task automatic dwr(logic [31:0] byte_addr, logic [31:0] d);
    @(negedge clk) h_dmem_en = 1; h_dmem_we = 4'hF; h_dmem_addr = byte_addr[15:2]; h_dmem_wdata = d;
    @(negedge clk) h_dmem_en = 0; h_dmem_we = 0;
  endtask
  task automatic drd(logic [31:0] byte_addr, output logic [31:0] q);
    @(negedge clk) h_dmem_en = 1; h_dmem_addr = byte_addr[15:2];
    @(negedge clk) h_dmem_en = 0; q = h_dmem_rdata;
  endtask

  ins_t prog[$];
  byte unsigned blk[BLK*BLK];
  shortint cosc[NWAVE*NROW], sinc[NWAVE*NROW];
  int unsigned pw[NWAVE];

  task automatic load_run_data();
    foreach (blk[i])  blk[i]  = 8'($urandom);
    foreach (cosc[i]) cosc[i] = 16'($signed($urandom_range(512)) - 256);
    foreach (sinc[i]) sinc[i] = 16'($signed($urandom_range(512)) - 256);
    for (int i = 0; i < BLK*BLK; i += 4) dwr(A_DATA + 32'(i), be_word(blk[i], blk[i+1], blk[i+2], blk[i+3]));
    for (int i = 0; i < NWAVE*NROW; i += 2) begin
      dwr(A_COS + 32'(2*i), {cosc[i], cosc[i+1]});
      dwr(A_SIN + 32'(2*i), {sinc[i], sinc[i+1]});
    end
  endtask

  task automatic check_results(string tag);
    logic [31:0] q;
    kernel_ref(blk, cosc, sinc, pw);
    for (int y = 0; y < NROW; y++) begin
      drd(A_RS + 32'(4*y), q);
      check(q == 32'(row_sum(blk, y)), $sformatf("%s row sum %0d", tag, y));
    end
    for (int w = 0; w < NWAVE; w++) begin
      drd(A_POWERS + 32'(4*w), q);
      check(q == pw[w], $sformatf("%s power[%0d] = %0d, expected %0d", tag, w, q, pw[w]));
    end
  endtask

  task automatic wait_done(output bit got);
    got = 0;
    for (int i = 0; i < 100000 && !got; i++) begin
      @(posedge clk);
      if (done && !running) got = 1;
    end
  endtask

  initial begin
    logic [31:0] q, c1, c2, pa, ca;
    bit got;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!running && cycles == 0, "idle after reset");

    kernel_program(prog);
    foreach (prog[i]) for (int k = 0; k < 4; k++) iwr(i*4 + k, prog[i][k*32 +: 32]);
    for (int i = 0; i < 4; i++) for (int k = 0; k < 4; k++) begin
      ird(i*4 + k, q);
      check(q == prog[i][k*32 +: 32], "instruction memory read-back");
    end

    // run 1
    load_run_data();
    pulse(cmd_start);
    check(running, "running after start");
    wait_done(got);
    check(got, "run 1 done");
    check(!trap, "run 1 no trap");
    c1 = cycles;
    repeat (20) @(posedge clk);
    check(cycles == c1, "cycle counter stops at done");
    check_results("run 1");
    pulse(cmd_start);
    check(!running, "start while done is ignored");

    // run 2: stop and resume
    pulse(cmd_reset);
    @(negedge clk);
    check(cycles == 0 && !done && pc == 0, "reset clears counter, done and pc");
    load_run_data();
    pulse(cmd_start);
    repeat (900) @(negedge clk);
    pulse(cmd_stop);
    pa = pc; ca = cycles;
    repeat (40) @(negedge clk);
    check(!running && pc == pa && cycles == ca, "stop freezes the processor");
    pulse(cmd_start);
    wait_done(got);
    check(got, "run 2 done");
    c2 = cycles;
    check(c2 == c1, $sformatf("stop/resume run takes the same cycles (%0d vs %0d)", c2, c1));
    check_results("run 2");

    // run 3: reset while running, then a full run
    pulse(cmd_reset);
    load_run_data();
    pulse(cmd_start);
    repeat (500) @(negedge clk);
    check(pc != 0, "pc moved");
    pulse(cmd_reset);
    @(negedge clk);
    check(!running && pc == 0 && cycles == 0, "reset while running");
    pulse(cmd_start);
    wait_done(got);
    check(got && cycles == c1, "run 3 after reset");
    check_results("run 3");

    $display("kernel: %0d cycles", c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
