// d_mem: the data memory of the rho-VEX, 32-bit words with byte enables.
//
// The processor's data memory (Fig 5-3, Fig 5-5) is reached by the core's
// load/store unit on one port and by the host, through the bus wrapper, on
// the other: the host writes the input block and reads back the results.
// The document's memory signals are 32 bits wide with 4 write enables
// (one per byte). The default size, 64 kB, is this design's choice: the
// document's program places its stack at 0xFF00 and its data at 0x9300 and
// 0x9400, so a 64 kB space holds them.
//
// Both ports are synchronous, read-before-write, with the data valid in the
// cycle after the enable; a port whose enable is low keeps its last output.
// we[3] writes bits 31:24 (the lowest byte address, big-endian). Writes from
// both ports to the same word in one cycle are not expected; the host port
// is applied last.
module d_mem #(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic [3:0]    a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic          b_en,
  input  logic [3:0]    b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][i*8 +: 8] <= b_wdata[i*8 +: 8];
    end
  end

endmodule
