// tb_gr_file: random test of the 64x32 general register file against an
// array model: four write ports (higher port wins on a clash), ten read
// ports, $r0 always zero, reset to zero.
module tb_gr_file;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [9:0][5:0] raddr; logic [9:0][31:0] rdata;
  logic [3:0] we; logic [3:0][5:0] waddr; logic [3:0][31:0] wdata;
  gr_file dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] model [64];
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 10; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++; $display("FAIL: r%0d = %h, expected %h", raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      for (int p = 0; p < 4; p++) begin
        we[p] = 1'($urandom); waddr[p] = 6'($urandom_range(9)); wdata[p] = $urandom;
        if (n % 5 == 0) waddr[p] = 6'(p);     // frequent clashes and $r0 writes
      end
      for (int r = 0; r < 10; r++) raddr[r] = 6'($urandom_range(9));
      for (int p = 0; p < 4; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
