// branch_unit: the single branch unit of the rho-VEX, in issue slot 0.
//
// The document allows "only one branch unit and it must be placed in the
// first issue slot"; it works next to the decoder and steers fetch address
// generation (Fig 5-3). VEX branches have no delay slot: the instruction
// fetched behind a taken branch is flushed, the "single-cycle branch
// penalty". Conditions come from the branch registers; targets are either
// relative to the program counter or the link register ($r63), and calls
// save the return address in the link register.
//
// Combinational, in the decode stage. Inputs: the decoded control op of
// slot 0, the byte address pc of the instruction, the displacement (in
// instructions), the branch register value and the link register value, both
// already forwarded. Outputs: taken and target for the fetch stage, and stop
// when the program ends. The displacement counted from the branch itself is
// this design's choice.
module branch_unit
  import rvex_pkg::*;
(
  input  logic        valid,
  input  op_e         op,
  input  logic [31:0] pc,
  input  logic [20:0] disp,
  input  logic        bval,
  input  logic [31:0] link,
  output logic        taken,
  output logic [31:0] target,
  output logic        stop
);

  logic [31:0] rel;

  assign rel = pc + {{7{disp[20]}}, disp, 4'b0000};

  always_comb begin
    taken  = 1'b0;
    target = rel;
    stop   = 1'b0;
    if (valid) begin
      unique case (op)
        OP_GOTO, OP_CALL:              taken = 1'b1;
        OP_IGOTO, OP_ICALL, OP_RETURN: begin taken = 1'b1; target = {link[31:4], 4'b0000}; end
        OP_BR:                         taken = bval;
        OP_BRF:                        taken = !bval;
        OP_STOP:                       stop  = 1'b1;
        default:                       taken = 1'b0;
      endcase
    end
  end

endmodule
