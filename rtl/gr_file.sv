// gr_file: the general register file of the rho-VEX, 64 registers of 32 bits.
//
// Size from the document ("a 64x32 bit general purpose register file").
// Register $r0 always reads as zero and ignores writes, as in the VEX ISA.
// Reads are combinational (the decode stage reads operands in the same cycle),
// writes happen at the clock edge that ends the writeback stage. When two
// write ports name the same register in one cycle the higher-numbered port
// wins; the compiler never schedules that. The number of ports is
// parameterised: 2 reads per slot, one more for store data and one for the
// link register, and one write per slot. Registers clear on reset.
module gr_file #(
  parameter int unsigned NREG = 64,
  parameter int unsigned W    = 32,
  parameter int unsigned NRD  = 10,
  parameter int unsigned NWR  = 4,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0][W-1:0]  rdata,
  input  logic [NWR-1:0]         we,
  input  logic [NWR-1:0][AW-1:0] waddr,
  input  logic [NWR-1:0][W-1:0]  wdata
);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      for (int p = 0; p < NWR; p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++)
      rdata[r] = (raddr[r] == '0) ? '0 : regs[raddr[r]];
  end

endmodule
