// tb_br_file: random test of the 8x1 branch register file against a
// model: four write ports, higher port wins on a clash, reset to zero.
module tb_br_file;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0][2:0] raddr; logic [4:0] rdata;
  logic [3:0] we; logic [3:0][2:0] waddr; logic [3:0] wdata;
  br_file dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic model [8];
  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 5; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++; $display("FAIL: b%0d = %b, expected %b", raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      for (int p = 0; p < 4; p++) begin
        we[p] = 1'($urandom); waddr[p] = 3'($urandom); wdata[p] = 1'($urandom);
      end
      for (int r = 0; r < 5; r++) raddr[r] = 3'($urandom);
      for (int p = 0; p < 4; p++) if (we[p]) model[waddr[p]] = wdata[p];
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
