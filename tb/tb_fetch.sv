// tb_fetch: test of the fetch stage against a cycle model: sequential
// fetch in 16-byte steps, one bubble after every redirect, halt empties
// decode and stops memory reads, en=0 freezes everything.
module tb_fetch;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, redirect, halt, imem_re, d_valid;
  logic [31:0] target, d_pc;
  logic [8:0] imem_addr;
  fetch dut (.*);

  int checks = 0, failures = 0;
  int n_redirect = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] m_pc, m_dpc; logic m_dv;
    en = 0; redirect = 0; halt = 0; target = 0;
    m_pc = 0; m_dpc = 0; m_dv = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check(d_valid == m_dv && (!m_dv || d_pc == m_dpc), $sformatf("cycle %0d decode %b/%h, expected %b/%h", n, d_valid, d_pc, m_dv, m_dpc));
      check(imem_addr == m_pc[12:4], "fetch address");
      en = ($urandom_range(9) != 0);
      halt = ($urandom_range(30) == 0);
      redirect = ($urandom_range(6) == 0);
      target = 32'($urandom_range(511)) << 4;
      #1;
      check(imem_re == (en && !halt), "memory read enable");
      if (en) begin
        if (halt) m_dv = 0;
        else if (redirect) begin m_pc = target; m_dv = 0; n_redirect++; end
        else begin m_dpc = m_pc; m_pc += 16; m_dv = 1; end
      end
    end
    check(n_redirect > 100, "redirects exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
