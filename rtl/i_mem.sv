// i_mem: the instruction memory of the rho-VEX.
//
// The processor is a Harvard machine with its own instruction memory
// (Fig 5-3, Fig 5-5), at most 8 kB (Sec 6-5-3), which makes 512 instructions
// of 128 bits. The core reads one whole instruction per cycle; the host
// writes the program one 32-bit word at a time over the bus (the document's
// instruction-memory write port is 32 bits wide) and can read it back.
// Host word k of instruction n (host word address 4n+k) is syllable k,
// bits 32k+31:32k of the instruction; this ordering is this design's choice.
//
// Both ports are synchronous: the address is registered on the clock edge
// and the data is valid in the next cycle. A port whose enable is low keeps
// its last output. The memory is not cleared: the host loads it before it
// starts the processor.
module i_mem #(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // core port: whole instructions
  input  logic          re,
  input  logic [AW-1:0] addr,
  output logic [127:0]  rdata,
  // host port: 32-bit words
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW+1:0] h_addr,
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata
);

  logic [127:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (h_en) begin
      if (h_we) mem[h_addr[AW+1:2]][h_addr[1:0]*32 +: 32] <= h_wdata;
      h_rdata <= mem[h_addr[AW+1:2]][h_addr[1:0]*32 +: 32];
    end
  end

endmodule
