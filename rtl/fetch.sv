// fetch: program counter and fetch address generation of the rho-VEX.
//
// Fig 5-3 shows a "Fetch / Address generation" block that addresses the
// instruction memory and takes redirections from the branch unit. Each
// cycle the fetch stage sends the word address of the program counter to the
// synchronous instruction memory; the instruction comes out one cycle later,
// in the decode stage, together with its address (d_pc) and a valid flag.
// Instructions are 16 bytes, so the word address is pc[IMEM_AW+3:4].
//
// A taken branch (redirect, decided in decode) loads the target into the
// program counter and marks the instruction fetched in that same cycle as
// invalid: one bubble, the document's single-cycle branch penalty. halt
// (after stop or a trap) stops fetching and empties decode. en=0 freezes the
// stage (the host has stopped the processor). The program starts at
// RESET_PC after reset; the start address is this design's choice.
module fetch #(
  parameter int unsigned IMEM_AW  = 9,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               redirect,
  input  logic [31:0]        target,
  input  logic               halt,
  output logic               imem_re,
  output logic [IMEM_AW-1:0] imem_addr,
  output logic [31:0]        d_pc,
  output logic               d_valid
);

  logic [31:0] pc;

  assign imem_addr = pc[IMEM_AW+3:4];
  assign imem_re   = en && !halt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= RESET_PC;
      d_pc    <= RESET_PC;
      d_valid <= 1'b0;
    end else if (en) begin
      if (halt) begin
        d_valid <= 1'b0;
      end else if (redirect) begin
        pc      <= target;
        d_valid <= 1'b0;
      end else begin
        pc      <= pc + 32'd16;
        d_pc    <= pc;
        d_valid <= 1'b1;
      end
    end
  end

endmodule
