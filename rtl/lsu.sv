// lsu: the load/store unit of issue slot 2 of the rho-VEX.
//
// The document gives the processor one load/store unit, reached by
// syllable 2 (Fig 5-2) and placed between execute stages E0 and E1 with the
// data memory behind it (Fig 5-3). VEX is a load/store architecture whose
// accesses must be naturally aligned; a misaligned access "causes a
// nonrecoverable trap". Data is big-endian, as the host writes it (the host
// code assumes the VEX is big-endian): byte 0 of a word is bits 31:24.
//
// E0 side (combinational): address = base + offset; the word address, the
// four byte write enables and the store data moved to its byte lane go to
// the data memory, which registers them at the end of E0. A misaligned
// access raises misaligned and issues no memory access.
// E1 side (combinational): the memory's read word arrives; the byte or
// half-word selected by the address kept from E0 is extracted and sign- or
// zero-extended. Load latency is therefore two instructions, as for the
// other units. Sizes of the address are this design's choice.
module lsu
  import rvex_pkg::*;
#(
  parameter int unsigned ADDR_W = 14   // word address width of the data memory
) (
  // E0: request
  input  logic              valid,
  input  op_e               op,
  input  logic [31:0]       base,
  input  logic [31:0]       offset,
  input  logic [31:0]       sdata,
  output logic              mem_en,
  output logic [3:0]        mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [1:0]        byte_off,
  output logic              misaligned,
  // E1: load result
  input  op_e               ld_op,
  input  logic [1:0]        ld_byte_off,
  input  logic [31:0]       mem_rdata,
  output logic [31:0]       ld_data
);

  logic [31:0] addr;
  logic        is_mem;

  assign addr     = base + offset;
  assign byte_off = addr[1:0];
  assign mem_addr = addr[ADDR_W+1:2];

  always_comb begin
    is_mem = valid && (is_load(op) || is_store(op));
    unique case (op)
      OP_LDW, OP_STW:           misaligned = is_mem && (addr[1:0] != 2'b00);
      OP_LDH, OP_LDHU, OP_STH:  misaligned = is_mem && addr[0];
      default:                  misaligned = 1'b0;
    endcase
    mem_en    = is_mem && !misaligned;
    mem_we    = 4'b0000;
    mem_wdata = sdata;
    if (mem_en) begin
      unique case (op)
        OP_STW: mem_we = 4'b1111;
        OP_STH: begin
          mem_we    = addr[1] ? 4'b0011 : 4'b1100;
          mem_wdata = {sdata[15:0], sdata[15:0]};
        end
        OP_STB: begin
          mem_we    = 4'b1000 >> addr[1:0];
          mem_wdata = {4{sdata[7:0]}};
        end
        default: mem_we = 4'b0000;
      endcase
    end
  end

  logic [15:0] half;
  logic [7:0]  byte_v;

  always_comb begin
    half   = ld_byte_off[1] ? mem_rdata[15:0] : mem_rdata[31:16];
    unique case (ld_byte_off)
      2'd0: byte_v = mem_rdata[31:24];
      2'd1: byte_v = mem_rdata[23:16];
      2'd2: byte_v = mem_rdata[15:8];
      default: byte_v = mem_rdata[7:0];
    endcase
    unique case (ld_op)
      OP_LDH:  ld_data = {{16{half[15]}}, half};
      OP_LDHU: ld_data = {16'd0, half};
      OP_LDB:  ld_data = {{24{byte_v[7]}}, byte_v};
      OP_LDBU: ld_data = {24'd0, byte_v};
      default: ld_data = mem_rdata;
    endcase
  end

endmodule
