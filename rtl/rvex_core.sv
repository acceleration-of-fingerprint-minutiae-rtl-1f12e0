// rvex_core: the rho-VEX 4-issue VLIW processor core, five pipeline stages.
//
// The organisation follows the document (Sec 5-5-2, Fig 5-3): a Harvard
// machine with four issue slots, four 32-bit ALUs (one per slot), two 16x32
// multipliers (slots 1 and 3), one load/store unit (slot 2), one branch unit
// (slot 0), a 64x32 general register file and an 8x1 branch register file,
// and five stages: fetch, decode, execute E0, execute E1 and writeback.
//
//   F   fetch sends the program counter to the instruction memory.
//   D   the 128-bit instruction arrives; four syllable decoders split it;
//       operands are read from the register files with forwarding; the
//       branch unit resolves branches (one bubble when taken).
//   E0  ALUs, multipliers and the load/store address; the data memory
//       registers the access at the end of E0.
//   E1  load data comes back from the data memory and is aligned.
//   WB  results are written to the register files.
//
// Like every VEX implementation the core does not interlock: the compiler
// schedules for the visible latencies. Results of E1 and WB are forwarded to
// the decode stage (ALU, multiply and load results and branch conditions
// alike), so a result may be used by the second instruction after its
// producer; the instruction right behind it still sees the old value. That
// is a latency of 2 for every operation, the value of every latency in the
// compiler configuration the document uses. All operands of an instruction
// are read before any of its results is written.
//
// stop ends the program: fetching ends, the pipeline drains and done rises.
// A syllable in a slot that lacks its unit, an unknown opcode or a
// misaligned memory access is a trap: fetching ends, the faulting
// instruction (for a misaligned access: only its memory access) is dropped,
// and done rises with trap set. en=0 freezes every stage (host stop).
// Syllable encoding and trap handling are this design's choices.
//
// Event outputs (one pulse per cycle) count forwarding and taken branches
// for test and profiling. Verilator reports rst_n as used both
// asynchronously and synchronously: the synchronous use is only the
// assertion's disable condition, sampled on the clock.
module rvex_core
  import rvex_pkg::*;
#(
  parameter int unsigned IMEM_AW = 9,    // 512 instructions = 8 kB
  parameter int unsigned DMEM_AW = 14    // 16384 words = 64 kB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  // instruction memory
  output logic               imem_re,
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [INSTR_W-1:0] imem_rdata,
  // data memory
  output logic               dmem_en,
  output logic [3:0]         dmem_we,
  output logic [DMEM_AW-1:0] dmem_addr,
  output logic [31:0]        dmem_wdata,
  input  logic [31:0]        dmem_rdata,
  // status
  output logic               done,
  output logic               trap,
  output logic [31:0]        pc,
  output logic               ev_fwd,
  output logic               ev_branch
);

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    opclass_e    cls;
    op_e         op;
    op_e         alu_op;
    logic [31:0] a;
    logic [31:0] b;
    logic        bin;
    logic [31:0] sdata;
    logic        gr_we;
    greg_t       gr_dst;
    logic        br_we;
    breg_t       br_dst;
  } e0_t;

  typedef struct packed {
    logic        gr_we;
    greg_t       gr_dst;
    logic [31:0] result;
    logic        br_we;
    breg_t       br_dst;
    logic        bres;
  } res_t;

  // ---------------------------------------------------------------- state
  logic             halted;          // stop or trap seen, fetch ended
  logic             d_valid;
  logic [31:0]      d_pc;
  e0_t  [ISSUE-1:0] e0;
  res_t [ISSUE-1:0] e1, wb;
  logic             e1_load;
  op_e              e1_ld_op;
  logic [1:0]       e1_byte_off;

  // ---------------------------------------------------------------- decode
  dec_t [ISSUE-1:0] dec;
  logic             d_illegal, d_ok;
  logic             bu_taken, bu_stop;
  logic [31:0]      bu_target;
  logic             trap_mem;        // misaligned access in E0
  logic             halt_now;

  for (genvar s = 0; s < ISSUE; s++) begin : g_dec
    syllable_decoder #(.SLOT(s)) u_dec (.syl(imem_rdata[s*SYL_W +: SYL_W]), .dec(dec[s]));
  end

  always_comb begin
    d_illegal = 1'b0;
    for (int s = 0; s < ISSUE; s++) d_illegal |= dec[s].illegal;
    d_illegal = d_illegal && d_valid && !halted;
    d_ok      = d_valid && !halted && !d_illegal && !trap_mem;
  end

  // register files, read in decode, written in writeback
  localparam int unsigned NGRD = 2 * ISSUE + 2;
  logic [NGRD-1:0][5:0]  gr_raddr;
  logic [NGRD-1:0][31:0] gr_rdata;
  logic [ISSUE-1:0][2:0] br_raddr;
  logic [ISSUE-1:0]      br_rdata;
  logic [ISSUE-1:0]        gr_we_w, br_we_w, br_wd_w;
  logic [ISSUE-1:0][5:0]   gr_wa_w;
  logic [ISSUE-1:0][31:0]  gr_wd_w;
  logic [ISSUE-1:0][2:0]   br_wa_w;

  always_comb begin
    for (int s = 0; s < ISSUE; s++) begin
      gr_raddr[2*s]   = dec[s].src1;
      gr_raddr[2*s+1] = dec[s].src2;
      br_raddr[s]     = dec[s].bsrc;
      gr_we_w[s] = en && wb[s].gr_we;
      gr_wa_w[s] = wb[s].gr_dst;
      gr_wd_w[s] = wb[s].result;
      br_we_w[s] = en && wb[s].br_we;
      br_wa_w[s] = wb[s].br_dst;
      br_wd_w[s] = wb[s].bres;
    end
    gr_raddr[2*ISSUE]   = dec[MEM_SLOT].src3;
    gr_raddr[2*ISSUE+1] = greg_t'(LINK_REG);
  end

  gr_file #(.NREG(NGR), .W(32), .NRD(NGRD), .NWR(ISSUE)) u_gr (
    .clk, .rst_n, .raddr(gr_raddr), .rdata(gr_rdata),
    .we(gr_we_w), .waddr(gr_wa_w), .wdata(gr_wd_w));

  br_file #(.NREG(NBR), .NRD(ISSUE), .NWR(ISSUE)) u_br (
    .clk, .rst_n, .raddr(br_raddr), .rdata(br_rdata),
    .we(br_we_w), .waddr(br_wa_w), .wdata(br_wd_w));

  // E1 values as seen by forwarding (load data replaces the ALU result)
  logic [31:0]           ld_data;
  logic [ISSUE-1:0][31:0] e1_val;
  always_comb
    for (int s = 0; s < ISSUE; s++)
      e1_val[s] = (s == MEM_SLOT && e1_load) ? ld_data : e1[s].result;

  // forwarding: E1 (younger) before WB, higher slot first within a stage
  function automatic logic [31:0] fwd_gr(greg_t r, logic [31:0] rf, output logic hit);
    hit = 1'b0;
    if (r == '0) return '0;
    for (int s = ISSUE-1; s >= 0; s--)
      if (e1[s].gr_we && e1[s].gr_dst == r) begin hit = 1'b1; return e1_val[s]; end
    for (int s = ISSUE-1; s >= 0; s--)
      if (wb[s].gr_we && wb[s].gr_dst == r) begin hit = 1'b1; return wb[s].result; end
    return rf;
  endfunction

  function automatic logic fwd_br(breg_t r, logic rf, output logic hit);
    hit = 1'b0;
    for (int s = ISSUE-1; s >= 0; s--)
      if (e1[s].br_we && e1[s].br_dst == r) begin hit = 1'b1; return e1[s].bres; end
    for (int s = ISSUE-1; s >= 0; s--)
      if (wb[s].br_we && wb[s].br_dst == r) begin hit = 1'b1; return wb[s].bres; end
    return rf;
  endfunction

  logic [ISSUE-1:0][31:0] opa, opb;
  logic [ISSUE-1:0]       opbin;
  logic [31:0]            sdata_d, link_d;
  logic                   bval_d;
  logic [ISSUE-1:0][3:0]  hits;
  logic [1:0]             hits_x;

  always_comb begin
    for (int s = 0; s < ISSUE; s++) begin
      opa[s]   = dec[s].a_is_link ? d_pc + 32'd16
                                  : fwd_gr(dec[s].src1, gr_rdata[2*s], hits[s][0]);
      opb[s]   = fwd_gr(dec[s].src2, gr_rdata[2*s+1], hits[s][1]);
      if (dec[s].use_imm) opb[s] = dec[s].imm;
      opbin[s] = fwd_br(dec[s].bsrc, br_rdata[s], hits[s][2]);
      hits[s][3] = 1'b0;
      if (dec[s].a_is_link) hits[s][0] = 1'b0;
      if (dec[s].use_imm)   hits[s][1] = 1'b0;
    end
    sdata_d = fwd_gr(dec[MEM_SLOT].src3, gr_rdata[2*ISSUE], hits_x[0]);
    link_d  = fwd_gr(greg_t'(LINK_REG), gr_rdata[2*ISSUE+1], hits_x[1]);
    bval_d  = opbin[0];
  end

  // a forward that mattered: an operand the decoded syllables really use
  always_comb begin
    ev_fwd = 1'b0;
    for (int s = 0; s < ISSUE; s++)
      if (dec[s].valid && dec[s].cls != CLS_CTRL && (hits[s][0] || hits[s][1])) ev_fwd = 1'b1;
    if (dec[MEM_SLOT].valid && is_store(dec[MEM_SLOT].op) && hits_x[0]) ev_fwd = 1'b1;
    if (dec[0].valid && dec[0].op inside {OP_BR, OP_BRF} && hits[0][2]) ev_fwd = 1'b1;
    if (dec[0].valid && dec[0].op inside {OP_IGOTO, OP_ICALL, OP_RETURN} && hits_x[1]) ev_fwd = 1'b1;
    ev_fwd = ev_fwd && d_ok && en;
  end

  branch_unit u_bu (
    .valid (d_ok && dec[0].cls == CLS_CTRL),
    .op    (dec[0].op),
    .pc    (d_pc),
    .disp  (imem_rdata[20:0]),
    .bval  (bval_d),
    .link  (link_d),
    .taken (bu_taken),
    .target(bu_target),
    .stop  (bu_stop));

  assign ev_branch = bu_taken && en;
  assign halt_now  = halted || bu_stop || d_illegal || trap_mem;

  fetch #(.IMEM_AW(IMEM_AW)) u_fetch (
    .clk, .rst_n, .en,
    .redirect (bu_taken),
    .target   (bu_target),
    .halt     (halt_now),
    .imem_re, .imem_addr, .d_pc, .d_valid);

  // ---------------------------------------------------------------- E0
  logic [ISSUE-1:0][31:0] alu_res, mul_res;
  logic [ISSUE-1:0]       alu_bout;
  logic [1:0]             byte_off_e0;
  logic                   misaligned;

  for (genvar s = 0; s < ISSUE; s++) begin : g_lane
    alu u_alu (.op(e0[s].alu_op), .a(e0[s].a), .b(e0[s].b), .bin(e0[s].bin),
               .result(alu_res[s]), .bout(alu_bout[s]));
    if (s == 1 || s == 3) begin : g_mul
      mul u_mul (.op(e0[s].op), .a(e0[s].a), .b(e0[s].b), .result(mul_res[s]));
    end else begin : g_nomul
      assign mul_res[s] = '0;
    end
  end

  logic lsu_en;
  lsu #(.ADDR_W(DMEM_AW)) u_lsu (
    .valid      (e0[MEM_SLOT].valid && e0[MEM_SLOT].cls == CLS_MEM),
    .op         (e0[MEM_SLOT].op),
    .base       (e0[MEM_SLOT].a),
    .offset     (e0[MEM_SLOT].b),
    .sdata      (e0[MEM_SLOT].sdata),
    .mem_en     (lsu_en),
    .mem_we     (dmem_we),
    .mem_addr   (dmem_addr),
    .mem_wdata  (dmem_wdata),
    .byte_off   (byte_off_e0),
    .misaligned (misaligned),
    .ld_op      (e1_ld_op),
    .ld_byte_off(e1_byte_off),
    .mem_rdata  (dmem_rdata),
    .ld_data    (ld_data));

  assign dmem_en  = lsu_en && en;
  assign trap_mem = misaligned;

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted      <= 1'b0;
      trap        <= 1'b0;
      e0          <= '0;
      e1          <= '0;
      wb          <= '0;
      e1_load     <= 1'b0;
      e1_ld_op    <= OP_NOP;
      e1_byte_off <= '0;
    end else if (en) begin
      if (bu_stop || d_illegal || trap_mem) halted <= 1'b1;
      if (d_illegal || trap_mem)            trap   <= 1'b1;
      // D -> E0
      for (int s = 0; s < ISSUE; s++) begin
        e0[s].valid  <= d_ok && dec[s].valid;
        e0[s].cls    <= dec[s].cls;
        e0[s].op     <= dec[s].op;
        e0[s].alu_op <= dec[s].alu_op;
        e0[s].a      <= opa[s];
        e0[s].b      <= opb[s];
        e0[s].bin    <= opbin[s];
        e0[s].sdata  <= sdata_d;
        e0[s].gr_we  <= d_ok && dec[s].gr_we;
        e0[s].gr_dst <= dec[s].gr_dst;
        e0[s].br_we  <= d_ok && dec[s].br_we;
        e0[s].br_dst <= dec[s].br_dst;
      end
      // E0 -> E1 (a misaligned access writes no register)
      for (int s = 0; s < ISSUE; s++) begin
        e1[s].gr_we  <= e0[s].gr_we && !(s == MEM_SLOT && misaligned);
        e1[s].gr_dst <= e0[s].gr_dst;
        e1[s].result <= (e0[s].cls == CLS_MUL) ? mul_res[s] : alu_res[s];
        e1[s].br_we  <= e0[s].br_we;
        e1[s].br_dst <= e0[s].br_dst;
        e1[s].bres   <= alu_bout[s];
      end
      e1_load     <= lsu_en && is_load(e0[MEM_SLOT].op);
      e1_ld_op    <= e0[MEM_SLOT].op;
      e1_byte_off <= byte_off_e0;
      // E1 -> WB
      for (int s = 0; s < ISSUE; s++) begin
        wb[s]        <= e1[s];
        wb[s].result <= e1_val[s];
      end
    end
  end

  // done once the pipeline behind a stop or trap has drained
  logic busy;
  always_comb begin
    busy = 1'b0;
    for (int s = 0; s < ISSUE; s++)
      busy |= e0[s].valid | e1[s].gr_we | e1[s].br_we | wb[s].gr_we | wb[s].br_we;
  end
  assign done = halted && !busy;
  assign pc   = d_pc;

  // every issue slot but the memory slot must leave the data memory alone
  a_mem_slot_only : assert property (@(posedge clk) disable iff (!rst_n)
    (e0[MEM_SLOT].cls != CLS_MEM) |-> !dmem_en);

endmodule
