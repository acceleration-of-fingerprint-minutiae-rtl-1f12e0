// tb_i_mem: test of the instruction memory: host writes of 32-bit words,
// host read-back, and 128-bit core reads in which host word 4i+k is
// syllable k (bits 32k+31:32k); a core port with re low holds its output.
module tb_i_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re = 0, h_en = 0, h_we = 0;
  logic [8:0] addr = 0; logic [10:0] h_addr = 0;
  logic [127:0] rdata; logic [31:0] h_wdata = 0, h_rdata;
  i_mem dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] m [2048];
  initial begin
    logic [127:0] held;
    for (int i = 0; i < 2048; i++) begin
      m[i] = $urandom;
      @(negedge clk) h_en = 1; h_we = 1; h_addr = 11'(i); h_wdata = m[i];
    end
    @(negedge clk) h_en = 0; h_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      re = 1'($urandom); addr = 9'($urandom);
      h_en = 1; h_addr = 11'($urandom);
      held = rdata;
      @(negedge clk);
      check(h_rdata == m[h_addr], "host read-back");
      if (re) check(rdata == {m[4*addr+3], m[4*addr+2], m[4*addr+1], m[4*addr]}, "core read");
      else    check(rdata == held, "core output held");
      h_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
