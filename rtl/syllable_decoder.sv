// syllable_decoder: decodes one 32-bit syllable for one issue slot.
//
// An instruction is dispersed into four syllables, one per issue slot
// (Fig 3-1, Fig 5-2). Fig 5-2 prints which units each slot reaches:
// slot 0 {ALU, CTRL}, slot 1 {ALU, MUL}, slot 2 {ALU, MEM}, slot 3 {ALU, MUL}.
// This decoder is instantiated once per slot with SLOT set; it splits the
// syllable into fields (layout in rvex_pkg, this design's own), picks the
// operation for the lane's ALU, and says which registers are read and
// written. An operation that the slot cannot execute, or an unknown opcode,
// raises illegal and decodes as a no-op; the core then traps.
// Combinational.
module syllable_decoder
  import rvex_pkg::*;
#(
  parameter int unsigned SLOT = 0
) (
  input  logic [31:0] syl,
  output dec_t        dec
);

  op_e      op;
  opclass_e cls;
  logic     known;
  logic     allowed;

  always_comb begin
    op    = op_e'(syl[31:25]);
    cls   = op_class(op);
    known = op inside {
      OP_NOP, OP_ADD, OP_SUB, OP_AND, OP_ANDC, OP_OR, OP_ORC, OP_XOR, OP_SHL,
      OP_SHR, OP_SHRU, OP_SH1ADD, OP_SH2ADD, OP_SH3ADD, OP_SH4ADD, OP_MIN,
      OP_MINU, OP_MAX, OP_MAXU, OP_SXTB, OP_SXTH, OP_ZXTB, OP_ZXTH, OP_SLCT,
      OP_SLCTF, OP_ADDCG, OP_MOVL, OP_MTB, OP_MFB,
      OP_CMPEQ, OP_CMPNE, OP_CMPGE, OP_CMPGEU, OP_CMPGT, OP_CMPGTU, OP_CMPLE,
      OP_CMPLEU, OP_CMPLT, OP_CMPLTU, OP_ANDL, OP_NANDL, OP_ORL, OP_NORL,
      OP_CMPEQB, OP_CMPNEB, OP_CMPGEB, OP_CMPGEUB, OP_CMPGTB, OP_CMPGTUB,
      OP_CMPLEB, OP_CMPLEUB, OP_CMPLTB, OP_CMPLTUB, OP_ANDLB, OP_NANDLB,
      OP_ORLB, OP_NORLB,
      OP_MPYLL, OP_MPYLLU, OP_MPYLH, OP_MPYLHU, OP_MPYHH, OP_MPYHHU, OP_MPYL,
      OP_MPYLU, OP_MPYH, OP_MPYHU, OP_MPYHS,
      OP_LDW, OP_LDH, OP_LDHU, OP_LDB, OP_LDBU, OP_STW, OP_STH, OP_STB,
      OP_GOTO, OP_IGOTO, OP_CALL, OP_ICALL, OP_BR, OP_BRF, OP_RETURN, OP_STOP};
    unique case (cls)
      CLS_MUL:  allowed = (SLOT == 1) || (SLOT == 3);
      CLS_MEM:  allowed = (SLOT == MEM_SLOT);
      CLS_CTRL: allowed = (SLOT == 0);
      default:  allowed = 1'b1;
    endcase

    dec           = '0;
    dec.illegal   = !(known && allowed);
    dec.valid     = known && allowed && (cls != CLS_NOP);
    dec.cls       = dec.valid ? cls : CLS_NOP;
    dec.op        = dec.valid ? op  : OP_NOP;
    dec.alu_op    = OP_NOP;
    dec.use_imm   = syl[24];
    dec.imm       = {{23{syl[8]}}, syl[8:0]};
    dec.src1      = syl[17:12];
    dec.src2      = syl[5:0];
    dec.src3      = syl[23:18];
    dec.bsrc      = syl[11:9];
    dec.gr_dst    = syl[23:18];
    dec.br_dst    = syl[20:18];

    if (dec.valid) begin
      unique case (cls)
        CLS_ALU: begin
          dec.alu_op = op;
          if (op == OP_MOVL) begin
            dec.use_imm = 1'b1;
            dec.imm     = {14'd0, syl[17:0]};
          end
          if (op inside {OP_MTB} || (op >= OP_CMPEQB && op <= OP_NORLB))
            dec.br_we = 1'b1;
          else if (op == OP_ADDCG) begin
            dec.gr_we  = 1'b1;
            dec.br_we  = 1'b1;
            // addcg: carry out goes to the branch register named by [8:6]
            dec.br_dst = syl[8:6];
            dec.use_imm = 1'b0;
          end else
            dec.gr_we = 1'b1;
        end
        CLS_MUL: dec.gr_we = 1'b1;
        CLS_MEM: begin
          dec.use_imm = 1'b1;
          dec.gr_we   = is_load(op);
        end
        CLS_CTRL: begin
          dec.bsrc = syl[23:21];
          unique case (op)
            OP_CALL, OP_ICALL: begin
              // the return address goes to the link register
              dec.alu_op    = OP_ADD;
              dec.a_is_link = 1'b1;
              dec.use_imm   = 1'b1;
              dec.imm       = '0;
              dec.gr_we     = 1'b1;
              dec.gr_dst    = greg_t'(LINK_REG);
            end
            OP_RETURN: begin
              // return also pops the stack frame: dst = src1 + imm
              dec.alu_op  = OP_ADD;
              dec.use_imm = 1'b1;
              dec.gr_we   = 1'b1;
            end
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

endmodule
