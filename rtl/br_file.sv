// br_file: the branch register file of the rho-VEX, 8 registers of 1 bit.
//
// Size from the document ("a branch register file with 8x1-bit registers");
// the registers hold branch conditions, predicates and the carry of addcg.
// Reads are combinational, writes at the clock edge ending writeback; the
// higher-numbered write port wins on a clash. Registers clear on reset.
module br_file #(
  parameter int unsigned NREG = 8,
  parameter int unsigned NRD  = 5,
  parameter int unsigned NWR  = 4,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NRD-1:0][AW-1:0] raddr,
  output logic [NRD-1:0]         rdata,
  input  logic [NWR-1:0]         we,
  input  logic [NWR-1:0][AW-1:0] waddr,
  input  logic [NWR-1:0]         wdata
);

  logic [NREG-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else
      for (int p = 0; p < NWR; p++)
        if (we[p]) regs[waddr[p]] <= wdata[p];
  end

  always_comb
    for (int r = 0; r < NRD; r++) rdata[r] = regs[raddr[r]];

endmodule
