// rvex_tb_pkg: test support for the rho-VEX testbenches.
//
// Holds a small assembler (one function per syllable format, see rvex_pkg
// for the encoding), the test kernel and a reference model of it, written
// independently of the RTL.
//
// The test kernel is a cut-down version of the block-direction DFT the
// accelerator runs for fingerprint minutiae extraction: over a 34x34 byte
// block it forms 24 row sums of 24 pixels (the 24x24 window at offset 5,5,
// the unrotated grid), then for each of 4 waves the cosine and sine sums of
// row sum x 16-bit coefficient, and stores power = (cos>>12)^2 + (sin>>12)^2
// as 32-bit words. Like the original it runs as _start -> main ->
// kernel with a call, a stack frame, returns and a final stop. Every
// instruction is scheduled for the core's two-instruction latency.
package rvex_tb_pkg;
  import rvex_pkg::*;

  localparam int unsigned BLK      = 34;           // block edge, bytes
  localparam int unsigned NROW     = 24;           // rows summed
  localparam int unsigned NWAVE    = 4;
  localparam logic [31:0] A_DATA   = 32'h9400;      // input block
  localparam logic [31:0] A_POWERS = 32'h9300;      // results
  localparam logic [31:0] A_COS    = 32'h9900;      // cos coefficients, 4x24 halfwords
  localparam logic [31:0] A_SIN    = 32'h9A00;      // sin coefficients
  localparam logic [31:0] A_RS     = 32'h9B00;      // row sums
  localparam logic [31:0] A_STACK  = 32'hFF00;

  typedef logic [31:0]  syl_t;
  typedef logic [127:0] ins_t;

  // ---------------------------------------------------------------- assembler
  function automatic syl_t rr(op_e op, int d, int s1, int s2);
    return {op, 1'b0, 6'(d), 6'(s1), 6'd0, 6'(s2)};
  endfunction
  function automatic syl_t ri(op_e op, int d, int s1, int imm);
    return {op, 1'b1, 6'(d), 6'(s1), 3'd0, 9'(imm)};
  endfunction
  function automatic syl_t rb(op_e op, int d, int s1, int s2, int b);   // slct, slctf, mfb
    return {op, 1'b0, 6'(d), 6'(s1), 3'(b), 3'd0, 6'(s2)};
  endfunction
  function automatic syl_t rbi(op_e op, int d, int s1, int imm, int b);
    return {op, 1'b1, 6'(d), 6'(s1), 3'(b), 9'(imm)};
  endfunction
  function automatic syl_t addcg(int d, int bd, int s1, int s2, int bin);
    return {OP_ADDCG, 1'b0, 6'(d), 6'(s1), 3'(bin), 3'(bd), 6'(s2)};
  endfunction
  function automatic syl_t cmpb(op_e op, int bd, int s1, int s2);
    return {op, 1'b0, 6'(bd), 6'(s1), 6'd0, 6'(s2)};
  endfunction
  function automatic syl_t cmpbi(op_e op, int bd, int s1, int imm);
    return {op, 1'b1, 6'(bd), 6'(s1), 3'd0, 9'(imm)};
  endfunction
  function automatic syl_t movl(int d, int imm18);
    return {OP_MOVL, 1'b0, 6'(d), 18'(imm18)};
  endfunction
  function automatic syl_t mem(op_e op, int r, int base, int off);  // load dst / store src
    return {op, 1'b1, 6'(r), 6'(base), 3'd0, 9'(off)};
  endfunction
  function automatic syl_t ctl(op_e op, int b, int disp);
    return {op, 1'b0, 3'(b), 21'(disp)};
  endfunction
  function automatic syl_t ret(int d, int s1, int imm);
    return {OP_RETURN, 1'b1, 6'(d), 6'(s1), 3'd0, 9'(imm)};
  endfunction
  localparam syl_t NOP = '0;
  function automatic ins_t ins(syl_t s0, syl_t s1 = NOP, syl_t s2 = NOP, syl_t s3 = NOP);
    return {s3, s2, s1, s0};
  endfunction

  // ---------------------------------------------------------------- kernel program
  // Built in two passes so that forward labels resolve.
  function automatic void kernel_program(ref ins_t p[$]);
    int L_main, L_kern, L_row, L_col, L_w, L_dft;
    int n;
    L_main = 0; L_kern = 0; L_row = 0; L_col = 0; L_w = 0; L_dft = 0;
    for (int pass = 0; pass < 2; pass++) begin
      p.delete();
      // _start
      p.push_back(ins(movl(1, int'(A_STACK))));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_CALL, 0, L_main - n)));
      p.push_back(ins(ctl(OP_STOP, 0, 0)));
      // main: make a frame, save the link register, call the kernel, return
      L_main = p.size();
      p.push_back(ins(ri(OP_ADD, 1, 1, -32)));
      p.push_back(ins(NOP));
      p.push_back(ins(NOP, NOP, mem(OP_STW, 63, 1, 0)));
      n = p.size(); p.push_back(ins(ctl(OP_CALL, 0, L_kern - n)));
      p.push_back(ins(NOP, NOP, mem(OP_LDW, 63, 1, 0)));
      p.push_back(ins(NOP));
      p.push_back(ins(ret(1, 1, 32)));
      // kernel, phase 1: row sums
      L_kern = p.size();
      p.push_back(ins(movl(10, int'(A_DATA) + 5*BLK + 5), ri(OP_ADD, 11, 0, 0), movl(16, int'(A_RS))));
      p.push_back(ins(NOP));
      L_row = p.size();
      p.push_back(ins(ri(OP_ADD, 14, 10, 0), ri(OP_ADD, 15, 0, NROW), ri(OP_ADD, 12, 0, 0)));
      p.push_back(ins(NOP));
      L_col = p.size();
      p.push_back(ins(cmpbi(OP_CMPGTB, 0, 15, 1), ri(OP_ADD, 15, 15, -1),
                      mem(OP_LDBU, 13, 14, 0), ri(OP_ADD, 14, 14, 1)));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 0, L_col - n), rr(OP_ADD, 12, 12, 13)));
      p.push_back(ins(cmpbi(OP_CMPLTB, 1, 11, NROW-1), ri(OP_ADD, 10, 10, BLK), NOP, ri(OP_ADD, 11, 11, 1)));
      p.push_back(ins(NOP, ri(OP_ADD, 16, 16, 4), mem(OP_STW, 12, 16, 0)));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 1, L_row - n)));
      // phase 2: DFT waves
      p.push_back(ins(movl(17, int'(A_COS)), movl(18, int'(A_SIN)), ri(OP_ADD, 19, 0, 0), movl(3, int'(A_POWERS))));
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
      p.push_back(ins(cmpbi(OP_CMPLTB, 1, 19, NWAVE-1), ri(OP_ADD, 3, 3, 4), mem(OP_STW, 22, 3, 0), ri(OP_ADD, 19, 19, 1)));
      p.push_back(ins(NOP));
      n = p.size(); p.push_back(ins(ctl(OP_BR, 1, L_w - n)));
      p.push_back(ins(ret(1, 1, 0)));
    end
  endfunction

  // ---------------------------------------------------------------- operation model (general-register results of ALU and multiplier)
  function automatic logic [31:0] model(op_e op, logic [31:0] a, logic [31:0] b, logic bi, output logic bo);
    longint sa, sb;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    bo = 0;
    case (op)
      OP_ADD:    return a + b;
      OP_SUB:    return a - b;
      OP_AND:    return a & b;
      OP_ANDC:   return (~a) & b;
      OP_OR:     return a | b;
      OP_ORC:    return (~a) | b;
      OP_XOR:    return a ^ b;
      OP_SHL:    return a << (b % 32);
      OP_SHR:    return 32'(sa >>> (b % 32));
      OP_SHRU:   return a >> (b % 32);
      OP_SH1ADD: return 2*a + b;
      OP_SH2ADD: return 4*a + b;
      OP_SH3ADD: return 8*a + b;
      OP_SH4ADD: return 16*a + b;
      OP_MIN:    return sa < sb ? a : b;
      OP_MINU:   return a < b ? a : b;
      OP_MAX:    return sa > sb ? a : b;
      OP_MAXU:   return a > b ? a : b;
      OP_SXTB:   return 32'(longint'($signed(a[7:0])));
      OP_SXTH:   return 32'(longint'($signed(a[15:0])));
      OP_ZXTB:   return a & 32'hFF;
      OP_ZXTH:   return a & 32'hFFFF;
      OP_SLCT:   return bi ? a : b;
      OP_SLCTF:  return bi ? b : a;
      OP_CMPEQ:  return 32'(a == b);
      OP_CMPNE:  return 32'(a != b);
      OP_CMPGE:  return 32'(sa >= sb);
      OP_CMPGEU: return 32'(a >= b);
      OP_CMPGT:  return 32'(sa > sb);
      OP_CMPGTU: return 32'(a > b);
      OP_CMPLE:  return 32'(sa <= sb);
      OP_CMPLEU: return 32'(a <= b);
      OP_CMPLT:  return 32'(sa < sb);
      OP_CMPLTU: return 32'(a < b);
      OP_ANDL:   return 32'(a != 0 && b != 0);
      OP_NANDL:  return 32'(!(a != 0 && b != 0));
      OP_ORL:    return 32'(a != 0 || b != 0);
      OP_NORL:   return 32'(!(a != 0 || b != 0));
      OP_MPYLL:  return 32'(longint'($signed(a[15:0])) * longint'($signed(b[15:0])));
      OP_MPYLLU: return 32'(longint'(a[15:0]) * longint'(b[15:0]));
      OP_MPYLH:  return 32'(longint'($signed(a[15:0])) * longint'($signed(b[31:16])));
      OP_MPYLHU: return 32'(longint'(a[15:0]) * longint'(b[31:16]));
      OP_MPYHH:  return 32'(longint'($signed(a[31:16])) * longint'($signed(b[31:16])));
      OP_MPYHHU: return 32'(longint'(a[31:16]) * longint'(b[31:16]));
      OP_MPYL:   return 32'(sa * longint'($signed(b[15:0])));
      OP_MPYLU:  return 32'(longint'(a) * longint'(b[15:0]));
      OP_MPYH:   return 32'(sa * longint'($signed(b[31:16])));
      OP_MPYHU:  return 32'(longint'(a) * longint'(b[31:16]));
      OP_MPYHS:  return 32'(sa * longint'($signed(b[31:16]))) << 16;
      default:   return 32'hDEAD_BEEF;
    endcase
  endfunction

  // ---------------------------------------------------------------- reference
  function automatic int row_sum(input byte unsigned blk[BLK*BLK], input int y);
    int r;
    r = 0;
    for (int x = 0; x < NROW; x++) r += int'(blk[(y+5)*BLK + x + 5]);
    return r;
  endfunction

  function automatic void kernel_ref(input byte unsigned blk[BLK*BLK],
                                     input shortint cosc[NWAVE*NROW],
                                     input shortint sinc[NWAVE*NROW],
                                     output int unsigned pw[NWAVE]);
    int rs[NROW];
    int c, s;
    for (int y = 0; y < NROW; y++) begin
      rs[y] = 0;
      for (int x = 0; x < NROW; x++) rs[y] += int'(blk[(y+5)*BLK + x + 5]);
    end
    for (int w = 0; w < NWAVE; w++) begin
      c = 0; s = 0;
      for (int i = 0; i < NROW; i++) begin
        c += rs[i] * int'(cosc[w*NROW+i]);
        s += rs[i] * int'(sinc[w*NROW+i]);
      end
      c = c >>> 12; s = s >>> 12;
      pw[w] = int'(c*c + s*s);
    end
  endfunction

  // big-endian words of the test data, as the host writes them
  function automatic logic [31:0] be_word(byte unsigned b0, byte unsigned b1,
                                          byte unsigned b2, byte unsigned b3);
    return {b0, b1, b2, b3};
  endfunction

endpackage
