// mul: a 16x32-bit multiplier, as in issue slots 1 and 3 of the rho-VEX.
//
// The document gives the processor "two 16x32 bit multipliers" and puts them
// in syllables 1 and 3 of the instruction (Fig 5-2). This unit multiplies a
// 32-bit (or 16-bit) operand taken from a by a 16-bit half of b, signed or
// unsigned, and keeps the low 32 bits, which covers the VEX multiply
// operations: mpyll/mpyllu (low x low), mpylh/mpylhu (low of a x high of b),
// mpyhh/mpyhhu (high x high), mpyl/mpylu (a x low of b), mpyh/mpyhu
// (a x high of b) and mpyhs ((a x signed high of b) << 16).
//
// It is combinational and sits in execute stage E0; its result is registered
// into E1 with the ALU results, so a product has the same two-instruction
// latency as any other result. The operation list follows the VEX ISA; how
// the product is formed is this design's choice.
module mul
  import rvex_pkg::*;
(
  input  op_e         op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);

  logic signed [32:0] opa;   // 33 bits: a sign-correct or zero-extended 32-bit value
  logic signed [16:0] opb;   // 17 bits: a sign-correct or zero-extended half
  logic signed [49:0] prod;

  always_comb begin
    opa = '0;
    opb = '0;
    unique case (op)
      OP_MPYLL:  begin opa = 33'($signed(a[15:0]));  opb = 17'($signed(b[15:0]));  end
      OP_MPYLLU: begin opa = {17'd0, a[15:0]};       opb = {1'b0, b[15:0]};        end
      OP_MPYLH:  begin opa = 33'($signed(a[15:0]));  opb = 17'($signed(b[31:16])); end
      OP_MPYLHU: begin opa = {17'd0, a[15:0]};       opb = {1'b0, b[31:16]};       end
      OP_MPYHH:  begin opa = 33'($signed(a[31:16])); opb = 17'($signed(b[31:16])); end
      OP_MPYHHU: begin opa = {17'd0, a[31:16]};      opb = {1'b0, b[31:16]};       end
      OP_MPYL:   begin opa = 33'($signed(a));        opb = 17'($signed(b[15:0]));  end
      OP_MPYLU:  begin opa = {1'b0, a};              opb = {1'b0, b[15:0]};        end
      OP_MPYH:   begin opa = 33'($signed(a));        opb = 17'($signed(b[31:16])); end
      OP_MPYHU:  begin opa = {1'b0, a};              opb = {1'b0, b[31:16]};       end
      OP_MPYHS:  begin opa = 33'($signed(a));        opb = 17'($signed(b[31:16])); end
      default:   begin opa = '0;                     opb = '0;                     end
    endcase
    prod   = 50'(opa) * 50'(opb);
    result = (op == OP_MPYHS) ? {prod[15:0], 16'd0} : prod[31:0];
  end

endmodule
