// tb_branch_unit: test of the branch unit: relative targets for goto, call
// and conditional branches (forward and backward), register targets for
// igoto, icall and return, the branch-register condition of br and brf,
// stop, and that nothing happens when the syllable is not valid.
module tb_branch_unit;
  import rvex_pkg::*;

  logic valid, bval, taken, stop;
  op_e op;
  logic [31:0] pc, link, target;
  logic [20:0] disp;
  branch_unit dut (.*);

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
    op_e ops[9] = '{OP_GOTO, OP_IGOTO, OP_CALL, OP_ICALL, OP_BR, OP_BRF, OP_RETURN, OP_STOP, OP_ADD};
    int d;
    bit et, es; logic [31:0] etg;
    for (int n = 0; n < 2000; n++) begin
      op = ops[n % 9]; valid = (n % 13) != 0; bval = 1'($urandom);
      pc = $urandom & 32'h0000_FFF0; link = $urandom & 32'hFFF0;
      d = $urandom_range(200) - 100; disp = 21'(d);
      #1;
      et = 0; es = 0; etg = pc + 32'(d * 16);
      if (valid) case (op)
        OP_GOTO, OP_CALL: et = 1;
        OP_BR:  et = bval;
        OP_BRF: et = !bval;
        OP_IGOTO, OP_ICALL, OP_RETURN: begin et = 1; etg = link; end
        OP_STOP: es = 1;
        default: ;
      endcase
      check(taken == et, $sformatf("%s taken=%b", op.name(), taken));
      check(stop == es, $sformatf("%s stop=%b", op.name(), stop));
      if (et) check(target == etg, $sformatf("%s target %h, expected %h", op.name(), target, etg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
