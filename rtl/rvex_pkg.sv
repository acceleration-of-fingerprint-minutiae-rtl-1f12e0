// rvex_pkg: types and constants shared by the rho-VEX processor modules.
//
// The processor is a 4-issue VLIW: an instruction is 128 bits made of four
// 32-bit syllables, syllable 0 in bits 31:0 and syllable 3 in bits 127:96.
// Each issue slot owns an ALU; slot 0 also owns the branch unit, slots 1 and 3
// a 16x32 multiplier and slot 2 the load/store unit. There are 64 general
// registers of 32 bits ($r0 reads as zero, $r63 is the link register) and
// 8 one-bit branch registers. The slot assignment, the register counts and the
// 128-bit format follow the document; the opcode numbers and field layout of a
// syllable below are this design's own, since the document does not give the
// binary encoding.
//
// Syllable layout:
//   [31:25] opcode
//   [24]    I: second operand is the immediate instead of a register
//   [23:18] destination general register (store: register holding the data;
//           compare/logic to branch register: bits [20:18] give the $b index)
//   [17:12] first source register
//   [11:9]  branch register source (slct, slctf, addcg, mfb)
//   [8:0]   signed 9-bit immediate (I=1)   [5:0] second source register (I=0)
// MOVL puts the zero-extended 18-bit field [17:0] in the destination.
// Control syllables: [23:21] branch register, [20:0] signed displacement
// counted in instructions from the branch itself.
package rvex_pkg;

  localparam int unsigned ISSUE    = 4;
  localparam int unsigned SYL_W    = 32;
  localparam int unsigned INSTR_W  = ISSUE * SYL_W;
  localparam int unsigned NGR      = 64;
  localparam int unsigned NBR      = 8;
  localparam int unsigned LINK_REG = 63;
  localparam int unsigned MEM_SLOT = 2;

  typedef logic [5:0] greg_t;
  typedef logic [2:0] breg_t;

  typedef enum logic [6:0] {
    OP_NOP    = 7'h00,
    // ALU
    OP_ADD    = 7'h01, OP_SUB    = 7'h02, OP_AND    = 7'h03, OP_ANDC   = 7'h04,
    OP_OR     = 7'h05, OP_ORC    = 7'h06, OP_XOR    = 7'h07, OP_SHL    = 7'h08,
    OP_SHR    = 7'h09, OP_SHRU   = 7'h0A, OP_SH1ADD = 7'h0B, OP_SH2ADD = 7'h0C,
    OP_SH3ADD = 7'h0D, OP_SH4ADD = 7'h0E, OP_MIN    = 7'h0F, OP_MINU   = 7'h10,
    OP_MAX    = 7'h11, OP_MAXU   = 7'h12, OP_SXTB   = 7'h13, OP_SXTH   = 7'h14,
    OP_ZXTB   = 7'h15, OP_ZXTH   = 7'h16, OP_SLCT   = 7'h17, OP_SLCTF  = 7'h18,
    OP_ADDCG  = 7'h19, OP_MOVL   = 7'h1A, OP_MTB    = 7'h1B, OP_MFB    = 7'h1C,
    // compare and logic to a general register: condition in opcode[3:0]
    OP_CMPEQ  = 7'h20, OP_CMPNE  = 7'h21, OP_CMPGE  = 7'h22, OP_CMPGEU = 7'h23,
    OP_CMPGT  = 7'h24, OP_CMPGTU = 7'h25, OP_CMPLE  = 7'h26, OP_CMPLEU = 7'h27,
    OP_CMPLT  = 7'h28, OP_CMPLTU = 7'h29, OP_ANDL   = 7'h2A, OP_NANDL  = 7'h2B,
    OP_ORL    = 7'h2C, OP_NORL   = 7'h2D,
    // the same to a branch register
    OP_CMPEQB = 7'h30, OP_CMPNEB = 7'h31, OP_CMPGEB = 7'h32, OP_CMPGEUB= 7'h33,
    OP_CMPGTB = 7'h34, OP_CMPGTUB= 7'h35, OP_CMPLEB = 7'h36, OP_CMPLEUB= 7'h37,
    OP_CMPLTB = 7'h38, OP_CMPLTUB= 7'h39, OP_ANDLB  = 7'h3A, OP_NANDLB = 7'h3B,
    OP_ORLB   = 7'h3C, OP_NORLB  = 7'h3D,
    // multiplier (16 x 32)
    OP_MPYLL  = 7'h40, OP_MPYLLU = 7'h41, OP_MPYLH  = 7'h42, OP_MPYLHU = 7'h43,
    OP_MPYHH  = 7'h44, OP_MPYHHU = 7'h45, OP_MPYL   = 7'h46, OP_MPYLU  = 7'h47,
    OP_MPYH   = 7'h48, OP_MPYHU  = 7'h49, OP_MPYHS  = 7'h4A,
    // memory
    OP_LDW    = 7'h50, OP_LDH    = 7'h51, OP_LDHU   = 7'h52, OP_LDB    = 7'h53,
    OP_LDBU   = 7'h54, OP_STW    = 7'h58, OP_STH    = 7'h59, OP_STB    = 7'h5A,
    // control
    OP_GOTO   = 7'h60, OP_IGOTO  = 7'h61, OP_CALL   = 7'h62, OP_ICALL  = 7'h63,
    OP_BR     = 7'h64, OP_BRF    = 7'h65, OP_RETURN = 7'h66, OP_STOP   = 7'h67
  } op_e;

  typedef enum logic [2:0] {
    CLS_NOP, CLS_ALU, CLS_MUL, CLS_MEM, CLS_CTRL
  } opclass_e;

  // One decoded syllable, as the decode stage hands it to the execute stages.
  typedef struct packed {
    logic      valid;     // syllable does something (not a nop, not illegal)
    opclass_e  cls;
    op_e       op;        // the syllable's own operation
    op_e       alu_op;    // operation the lane's ALU performs
    logic      a_is_link; // ALU operand A is the return address (call)
    logic      use_imm;
    logic [31:0] imm;
    greg_t     src1;
    greg_t     src2;
    greg_t     src3;      // store data register
    breg_t     bsrc;
    logic      gr_we;
    greg_t     gr_dst;
    logic      br_we;
    breg_t     br_dst;
    logic      illegal;   // operation not available in this slot
  } dec_t;

  function automatic opclass_e op_class(op_e op);
    logic [6:0] v;
    v = op;
    if (op == OP_NOP)           return CLS_NOP;
    else if (v < 7'h40)         return CLS_ALU;
    else if (v < 7'h50)         return CLS_MUL;
    else if (v < 7'h60)         return CLS_MEM;
    else                        return CLS_CTRL;
  endfunction

  function automatic logic is_store(op_e op);
    return op inside {OP_STW, OP_STH, OP_STB};
  endfunction

  function automatic logic is_load(op_e op);
    return op inside {OP_LDW, OP_LDH, OP_LDHU, OP_LDB, OP_LDBU};
  endfunction

endpackage
