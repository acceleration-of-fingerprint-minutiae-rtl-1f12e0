// tb_mul: random and corner-case test of the 16x32 multiplier against the
// operation model in rvex_tb_pkg, for all eleven multiply operations.
module tb_mul;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

  op_e op; logic [31:0] a, b, result;
  mul dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic bo;
    logic [31:0] e;
    logic [31:0] corner[5] = '{32'h0, 32'hFFFF_FFFF, 32'h8000_8000, 32'h7FFF_7FFF, 32'h0001_FFFF};
    for (int n = 0; n < 2000; n++) begin
      for (int o = 7'h40; o <= 7'h4A; o++) begin
        op = op_e'(o);
        a = (n < 25) ? corner[n % 5] : $urandom;
        b = (n < 25) ? corner[n / 5] : $urandom;
        #1;
        e = model(op, a, b, 1'b0, bo);
        checks++;
        if (result !== e) begin
          failures++;
          $display("FAIL: %s(%h,%h) = %h, expected %h", op.name(), a, b, result, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
