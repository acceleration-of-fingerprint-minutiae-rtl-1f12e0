// tb_syllable_decoder: test of the syllable decoder in all four slots.
// For every 7-bit opcode, with random field contents, it checks which slot
// accepts it (Fig 5-2 unit placement), that rejected or unknown opcodes
// decode as illegal no-ops, and the register fields, write enables and
// immediates of each syllable format, including call/return link handling.
module tb_syllable_decoder;
  import rvex_pkg::*;

  logic [31:0] syl;
  dec_t dec [4];
  syllable_decoder #(.SLOT(0)) d0 (.syl, .dec(dec[0]));
  syllable_decoder #(.SLOT(1)) d1 (.syl, .dec(dec[1]));
  syllable_decoder #(.SLOT(2)) d2 (.syl, .dec(dec[2]));
  syllable_decoder #(.SLOT(3)) d3 (.syl, .dec(dec[3]));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit is_known(int o);
    return o == 0 || (o >= 8'h01 && o <= 8'h1C) || (o >= 8'h20 && o <= 8'h2D) ||
           (o >= 8'h30 && o <= 8'h3D) || (o >= 8'h40 && o <= 8'h4A) ||
           (o >= 8'h50 && o <= 8'h54) || (o >= 8'h58 && o <= 8'h5A) ||
           (o >= 8'h60 && o <= 8'h67);
  endfunction

  initial begin
    int n_legal = 0;
    for (int o = 0; o < 128; o++)
      for (int r = 0; r < 20; r++) begin
        op_e op;
        bit ok_slot[4];
        op = op_e'(o);
        syl = {7'(o), 25'($urandom)};
        #1;
        for (int s = 0; s < 4; s++) begin
          ok_slot[s] = is_known(o);
          if (o >= 8'h40 && o <= 8'h4A) ok_slot[s] = (s == 1 || s == 3);
          if (o >= 8'h50 && o <= 8'h5A) ok_slot[s] = ok_slot[s] && (s == 2);
          if (o >= 8'h60) ok_slot[s] = ok_slot[s] && (s == 0);
          check(dec[s].illegal == !ok_slot[s], $sformatf("opcode %h slot %0d illegal=%b", o, s, dec[s].illegal));
          if (!ok_slot[s] || o == 0) begin
            check(!dec[s].valid && !dec[s].gr_we && !dec[s].br_we, $sformatf("opcode %h slot %0d decodes as nop", o, s));
            continue;
          end
          n_legal++;
          check(dec[s].valid && dec[s].op == op, "valid and op");
          check(dec[s].src1 == syl[17:12], "src1 field");
          if (o >= 8'h01 && o <= 8'h2D && o != 8'h1A && o != 8'h1B && o != 8'h19) begin
            // ALU to a general register
            check(dec[s].gr_we && !dec[s].br_we && dec[s].gr_dst == syl[23:18] && dec[s].alu_op == op, $sformatf("%s to register", op.name()));
            check(dec[s].use_imm == syl[24], "immediate flag");
            if (syl[24]) check(dec[s].imm == 32'($signed(syl[8:0])), "9-bit immediate");
            else         check(dec[s].src2 == syl[5:0], "src2 field");
          end
          if (op == OP_MOVL) check(dec[s].gr_we && dec[s].use_imm && dec[s].imm == {14'd0, syl[17:0]}, "movl immediate");
          if (op == OP_ADDCG) check(dec[s].gr_we && dec[s].br_we && dec[s].br_dst == syl[8:6] && !dec[s].use_imm, "addcg");
          if (o >= 8'h30 && o <= 8'h3D || op == OP_MTB)
            check(!dec[s].gr_we && dec[s].br_we && dec[s].br_dst == syl[20:18], $sformatf("%s to branch register", op.name()));
          if (o >= 8'h40 && o <= 8'h4A) check(dec[s].cls == CLS_MUL && dec[s].gr_we, "multiply");
          if (o >= 8'h50 && o <= 8'h54) check(dec[s].cls == CLS_MEM && dec[s].gr_we && dec[s].use_imm && dec[s].gr_dst == syl[23:18], "load");
          if (o >= 8'h58 && o <= 8'h5A) check(dec[s].cls == CLS_MEM && !dec[s].gr_we && dec[s].src3 == syl[23:18], "store");
          if (op == OP_CALL || op == OP_ICALL)
            check(dec[s].gr_we && dec[s].gr_dst == 63 && dec[s].a_is_link && dec[s].alu_op == OP_ADD, "call writes the link register");
          if (op == OP_RETURN)
            check(dec[s].gr_we && dec[s].gr_dst == syl[23:18] && dec[s].alu_op == OP_ADD && dec[s].use_imm, "return pops the frame");
          if (op == OP_BR || op == OP_BRF) check(dec[s].bsrc == syl[23:21] && !dec[s].gr_we, "branch condition register");
        end
      end
    check(n_legal > 1000, "legal syllables exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
