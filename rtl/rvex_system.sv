// rvex_system: the rho-VEX core with its instruction and data memories and
// the run control the host uses.
//
// The host (a MicroBlaze in the document) drives the accelerator with three
// commands: stop, reset and start. A kernel run is: stop, reset, load the
// input into the data memory, start, wait for done, read the results
// (Appendix B of the document, Fig 6-3). Reset clears the core and the cycle
// counter but keeps both memories, so the program is loaded only once. The
// core runs while running is high; stop freezes it, and it stops by itself
// when its program executes stop (done) or traps. cycles counts the cycles
// spent running, in a 32-bit counter like the one in the original system
// (what it counted there is not stated); the host
// reads it to time the kernel.
//
// Host memory ports are synchronous (data the cycle after the enable).
// Commands are single-cycle pulses; a reset takes effect on the next clock
// edge and lasts one cycle. How the commands act is this design's reading
// of the host code; the document only names them.
// Everything runs on one clock; the original system also had a half-rate
// clock signal whose use is not described, and a UART path into the data
// memory, neither of which is built here.
module rvex_system
  import rvex_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 512,    // 8 kB
  parameter int unsigned DMEM_DEPTH = 16384,  // 64 kB
  localparam int unsigned IAW = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // commands from the host
  input  logic           cmd_start,
  input  logic           cmd_stop,
  input  logic           cmd_reset,
  // host access to the instruction memory (32-bit words)
  input  logic           h_imem_en,
  input  logic           h_imem_we,
  input  logic [IAW+1:0] h_imem_addr,
  input  logic [31:0]    h_imem_wdata,
  output logic [31:0]    h_imem_rdata,
  // host access to the data memory (32-bit words)
  input  logic           h_dmem_en,
  input  logic [3:0]     h_dmem_we,
  input  logic [DAW-1:0] h_dmem_addr,
  input  logic [31:0]    h_dmem_wdata,
  output logic [31:0]    h_dmem_rdata,
  // status
  output logic           running,
  output logic           done,
  output logic           trap,
  output logic [31:0]    cycles,
  output logic [31:0]    pc,
  output logic           ev_fwd,
  output logic           ev_branch
);

  logic             core_rst_n;
  logic             imem_re;
  logic [IAW-1:0]   imem_addr;
  logic [INSTR_W-1:0] imem_rdata;
  logic             dmem_en;
  logic [3:0]       dmem_we;
  logic [DAW-1:0]   dmem_addr;
  logic [31:0]      dmem_wdata, dmem_rdata;
  logic             core_done;

  // one-cycle core reset, from a flip-flop so that it is glitch-free
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) core_rst_n <= 1'b0;
    else        core_rst_n <= !cmd_reset;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      cycles  <= '0;
    end else if (cmd_reset) begin
      running <= 1'b0;
      cycles  <= '0;
    end else begin
      if (cmd_stop || (running && core_done)) running <= 1'b0;
      else if (cmd_start && !core_done)       running <= 1'b1;
      if (running && !core_done) cycles <= cycles + 32'd1;
    end
  end

  rvex_core #(.IMEM_AW(IAW), .DMEM_AW(DAW)) u_core (
    .clk, .rst_n(core_rst_n), .en(running),
    .imem_re, .imem_addr, .imem_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .done(core_done), .trap, .pc, .ev_fwd, .ev_branch);

  i_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .re(imem_re && running), .addr(imem_addr), .rdata(imem_rdata),
    .h_en(h_imem_en), .h_we(h_imem_we), .h_addr(h_imem_addr),
    .h_wdata(h_imem_wdata), .h_rdata(h_imem_rdata));

  d_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .a_en(dmem_en), .a_we(dmem_we), .a_addr(dmem_addr), .a_wdata(dmem_wdata), .a_rdata(dmem_rdata),
    .b_en(h_dmem_en), .b_we(h_dmem_we), .b_addr(h_dmem_addr), .b_wdata(h_dmem_wdata), .b_rdata(h_dmem_rdata));

  assign done = core_done;

endmodule
