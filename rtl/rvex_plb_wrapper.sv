// rvex_plb_wrapper: the rho-VEX accelerator as a slave on the host's
// Processor Local Bus, with its instruction and data memories and an
// interrupt to the host.
//
// In the document's platform (Fig 5-5) a MicroBlaze host and the accelerator
// share a PLB; the wrapper links i_mem and d_mem of the rho-VEX to the bus
// and raises an interrupt when a kernel has finished (Fig 6-3). The host code
// reaches four address ranges: control, data memory, instruction memory and
// status. This module decodes a bus address within BASEADDR..BASEADDR+256 kB
// into those four 64 kB windows (offset bits 17:16):
//   0  control  +0x0 command, write only: bit0 start, bit1 stop, bit2 reset
//               +0x4 interrupt enable, bit0 (read/write)
//   1  d_mem    byte address; plb_be[3] is bits 31:24, the lowest address
//   2  i_mem    byte address; word k of an instruction is syllable k
//   3  status   +0x0 {trap, done, running} in bits 2:0, +0x4 cycles, +0x8 pc
// The interrupt is a level: done and enabled, cleared by a reset command.
//
// Bus side: a simplified, single-beat, 32-bit subset of the PLB v4.6 slave
// handshake. The master holds plb_pavalid with address, plb_rnw, byte
// enables and write data until the slave answers. The slave answers in the
// second cycle with sl_addrack together with sl_wrdack/sl_wrcomp for a write,
// or sl_rddack/sl_rdcomp and sl_rddbus for a read. An address outside the
// window gets no answer. Bursts, wider buses and the bus arbiter are not
// modelled. The window layout, the register bits and the handshake subset
// are this design's choices; the document names the ranges and the
// commands but not their encoding. The assertions' disable condition samples
// rst_n on the clock, which Verilator reports as a synchronous use of an
// asynchronous reset; the logic itself uses rst_n only asynchronously.
module rvex_plb_wrapper
  import rvex_pkg::*;
#(
  parameter logic [31:0] BASEADDR   = 32'hC000_0000,
  parameter int unsigned IMEM_DEPTH = 512,    // 8 kB
  parameter int unsigned DMEM_DEPTH = 16384   // 64 kB
) (
  input  logic        clk,
  input  logic        rst_n,
  // PLB slave
  input  logic        plb_pavalid,
  input  logic        plb_rnw,
  input  logic [31:0] plb_abus,
  input  logic [3:0]  plb_be,
  input  logic [31:0] plb_wrdbus,
  output logic        sl_addrack,
  output logic        sl_wrdack,
  output logic        sl_wrcomp,
  output logic        sl_rddack,
  output logic        sl_rdcomp,
  output logic [31:0] sl_rddbus,
  // interrupt to the host's interrupt controller
  output logic        ip2intc_irpt,
  // profiling events of the core
  output logic        ev_fwd,
  output logic        ev_branch
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  typedef enum logic [1:0] {WIN_CTRL, WIN_DMEM, WIN_IMEM, WIN_STAT} win_e;
  typedef enum logic {S_IDLE, S_ACK} state_e;

  state_e      state;
  logic        hit, req;
  win_e        win, win_q;
  logic        rnw_q;
  logic [3:0]  word_q;
  logic [17:0] off;

  assign hit = plb_abus[31:18] == BASEADDR[31:18];
  assign req = (state == S_IDLE) && plb_pavalid && hit;
  assign off = plb_abus[17:0];
  assign win = win_e'(off[17:16]);

  // system and memory ports
  logic        cmd_start, cmd_stop, cmd_reset;
  logic        running, done, trap;
  logic [31:0] cycles, pc;
  logic [31:0] h_imem_rdata, h_dmem_rdata;
  logic        irq_en;

  always_comb begin
    cmd_start = 1'b0;
    cmd_stop  = 1'b0;
    cmd_reset = 1'b0;
    if (req && !plb_rnw && win == WIN_CTRL && off[15:2] == '0) begin
      cmd_start = plb_wrdbus[0];
      cmd_stop  = plb_wrdbus[1];
      cmd_reset = plb_wrdbus[2];
    end
  end

  rvex_system #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_sys (
    .clk, .rst_n,
    .cmd_start, .cmd_stop, .cmd_reset,
    .h_imem_en   (req && win == WIN_IMEM),
    .h_imem_we   (!plb_rnw),
    .h_imem_addr (off[IAW+3:2]),
    .h_imem_wdata(plb_wrdbus),
    .h_imem_rdata,
    .h_dmem_en   (req && win == WIN_DMEM),
    .h_dmem_we   (plb_rnw ? 4'b0000 : plb_be),
    .h_dmem_addr (off[DAW+1:2]),
    .h_dmem_wdata(plb_wrdbus),
    .h_dmem_rdata,
    .running, .done, .trap, .cycles, .pc, .ev_fwd, .ev_branch);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      win_q  <= WIN_CTRL;
      rnw_q  <= 1'b0;
      word_q <= '0;
      irq_en <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          state  <= S_ACK;
          win_q  <= win;
          rnw_q  <= plb_rnw;
          word_q <= off[5:2];
          if (!plb_rnw && win == WIN_CTRL && off[15:2] == 14'd1) irq_en <= plb_wrdbus[0];
        end
        S_ACK: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sl_addrack = (state == S_ACK);
    sl_wrdack  = (state == S_ACK) && !rnw_q;
    sl_wrcomp  = (state == S_ACK) && !rnw_q;
    sl_rddack  = (state == S_ACK) && rnw_q;
    sl_rdcomp  = (state == S_ACK) && rnw_q;
    sl_rddbus  = '0;
    if (state == S_ACK && rnw_q) begin
      unique case (win_q)
        WIN_CTRL: sl_rddbus = (word_q == 4'd1) ? {31'd0, irq_en} : '0;
        WIN_DMEM: sl_rddbus = h_dmem_rdata;
        WIN_IMEM: sl_rddbus = h_imem_rdata;
        WIN_STAT: unique case (word_q)
                    4'd0:    sl_rddbus = {29'd0, trap, done, running};
                    4'd1:    sl_rddbus = cycles;
                    4'd2:    sl_rddbus = pc;
                    default: sl_rddbus = '0;
                  endcase
        default:  sl_rddbus = '0;
      endcase
    end
  end

  assign ip2intc_irpt = irq_en && done;

  // every acknowledge answers exactly one accepted request
  a_ack_after_req : assert property (@(posedge clk) disable iff (!rst_n)
    req |=> sl_addrack);
  a_no_ack_idle : assert property (@(posedge clk) disable iff (!rst_n)
    sl_addrack |=> !sl_addrack);

endmodule
