// tb_alu: random and corner-case test of the ALU against the operation
// model in rvex_tb_pkg, plus the branch-register outputs (compares to a
// branch register, add with carry, mtb).
module tb_alu;
  import rvex_pkg::*;
  import rvex_tb_pkg::*;

  op_e op; logic [31:0] a, b, result; logic bin, bout;
  alu dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    op_e gr_ops[$];
    logic bo, eb;
    logic [31:0] e;
    logic [32:0] s;
    logic [31:0] corner[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_0080};
    gr_ops = {OP_ADD, OP_SUB, OP_AND, OP_ANDC, OP_OR, OP_ORC, OP_XOR, OP_SHL, OP_SHR, OP_SHRU,
              OP_SH1ADD, OP_SH2ADD, OP_SH3ADD, OP_SH4ADD, OP_MIN, OP_MINU, OP_MAX, OP_MAXU,
              OP_SXTB, OP_SXTH, OP_ZXTB, OP_ZXTH, OP_SLCT, OP_SLCTF,
              OP_CMPEQ, OP_CMPNE, OP_CMPGE, OP_CMPGEU, OP_CMPGT, OP_CMPGTU, OP_CMPLE, OP_CMPLEU,
              OP_CMPLT, OP_CMPLTU, OP_ANDL, OP_NANDL, OP_ORL, OP_NORL};
    for (int n = 0; n < 400; n++) begin
      foreach (gr_ops[i]) begin
        op = gr_ops[i];
        a = (n < 36) ? corner[n % 6] : $urandom;
        b = (n < 36) ? corner[n / 6] : $urandom;
        if (n % 3 == 0) b = b % 40;
        bin = 1'($urandom);
        #1;
        e = model(op, a, b, bin, bo);
        check(result == e, $sformatf("%s(%h,%h,%b) = %h, expected %h", op.name(), a, b, bin, result, e));
        // the same condition into a branch register
        if (op >= OP_CMPEQ && op <= OP_NORL) begin
          op = op_e'(7'(op) + 7'h10);
          #1;
          check(bout == e[0], $sformatf("%s to branch register", op.name()));
        end
      end
      op = OP_ADDCG; a = $urandom; b = $urandom; bin = 1'($urandom); #1;
      s = {1'b0, a} + {1'b0, b} + 33'(bin);
      check(result == s[31:0] && bout == s[32], "addcg");
      op = OP_MTB; #1; check(bout == (a != 0) && result == 0, "mtb");
      op = OP_MFB; #1; check(result == 32'(bin), "mfb");
      op = OP_MOVL; #1; check(result == b, "movl");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
