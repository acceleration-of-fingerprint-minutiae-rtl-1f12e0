// alu: the 32-bit integer ALU of one issue slot of the rho-VEX.
//
// Every one of the four issue slots has one of these (the document: "four
// 32-bit ALUs, i.e. each issue slot has one ALU unit"). It is purely
// combinational and sits in the first execute stage (E0). It covers the VEX
// integer operations: add/subtract, logic, shifts, shift-and-add, min/max,
// sign and zero extension, select on a branch register, add with carry
// (carry in and out through a branch register), compares and logical
// compares that produce 0/1 for a general or a branch register, and moves
// between general and branch registers. The exact operation list is this
// design's reading of the VEX instruction classes; the document names the
// classes but does not list the operations.
//
// Interface: op selects the operation, a and b are the operands (b is the
// register or the immediate), bin is the branch register read by slct,
// slctf and addcg. result goes to the general register, bout to the branch
// register (compare result, carry out or mtb value).
module alu
  import rvex_pkg::*;
(
  input  op_e         op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        bin,
  output logic [31:0] result,
  output logic        bout
);

  logic [32:0] sum_c;
  logic        cond;

  always_comb begin
    // compare / logical-compare condition, shared by the GR and BR forms
    unique case (4'(op[3:0]))
      4'h0: cond = (a == b);
      4'h1: cond = (a != b);
      4'h2: cond = ($signed(a) >= $signed(b));
      4'h3: cond = (a >= b);
      4'h4: cond = ($signed(a) >  $signed(b));
      4'h5: cond = (a >  b);
      4'h6: cond = ($signed(a) <= $signed(b));
      4'h7: cond = (a <= b);
      4'h8: cond = ($signed(a) <  $signed(b));
      4'h9: cond = (a <  b);
      4'hA: cond =  ((a != 0) && (b != 0));
      4'hB: cond = !((a != 0) && (b != 0));
      4'hC: cond =  ((a != 0) || (b != 0));
      4'hD: cond = !((a != 0) || (b != 0));
      default: cond = 1'b0;
    endcase
  end

  always_comb begin
    sum_c  = {1'b0, a} + {1'b0, b} + {32'd0, bin};
    result = '0;
    bout   = 1'b0;
    unique case (op)
      OP_ADD:    result = a + b;
      OP_SUB:    result = a - b;
      OP_AND:    result = a & b;
      OP_ANDC:   result = ~a & b;
      OP_OR:     result = a | b;
      OP_ORC:    result = ~a | b;
      OP_XOR:    result = a ^ b;
      OP_SHL:    result = a << b[4:0];
      OP_SHR:    result = $unsigned($signed(a) >>> b[4:0]);
      OP_SHRU:   result = a >> b[4:0];
      OP_SH1ADD: result = (a << 1) + b;
      OP_SH2ADD: result = (a << 2) + b;
      OP_SH3ADD: result = (a << 3) + b;
      OP_SH4ADD: result = (a << 4) + b;
      OP_MIN:    result = ($signed(a) < $signed(b)) ? a : b;
      OP_MINU:   result = (a < b) ? a : b;
      OP_MAX:    result = ($signed(a) > $signed(b)) ? a : b;
      OP_MAXU:   result = (a > b) ? a : b;
      OP_SXTB:   result = {{24{a[7]}}, a[7:0]};
      OP_SXTH:   result = {{16{a[15]}}, a[15:0]};
      OP_ZXTB:   result = {24'd0, a[7:0]};
      OP_ZXTH:   result = {16'd0, a[15:0]};
      OP_SLCT:   result = bin ? a : b;
      OP_SLCTF:  result = bin ? b : a;
      OP_ADDCG: begin
        result = sum_c[31:0];
        bout   = sum_c[32];
      end
      OP_MOVL:   result = b;
      OP_MTB:    bout   = (a != 0);
      OP_MFB:    result = {31'd0, bin};
      OP_CMPEQ, OP_CMPNE, OP_CMPGE, OP_CMPGEU, OP_CMPGT, OP_CMPGTU,
      OP_CMPLE, OP_CMPLEU, OP_CMPLT, OP_CMPLTU,
      OP_ANDL, OP_NANDL, OP_ORL, OP_NORL:
        result = {31'd0, cond};
      OP_CMPEQB, OP_CMPNEB, OP_CMPGEB, OP_CMPGEUB, OP_CMPGTB, OP_CMPGTUB,
      OP_CMPLEB, OP_CMPLEUB, OP_CMPLTB, OP_CMPLTUB,
      OP_ANDLB, OP_NANDLB, OP_ORLB, OP_NORLB:
        bout = cond;
      default: result = '0;
    endcase
  end

endmodule
