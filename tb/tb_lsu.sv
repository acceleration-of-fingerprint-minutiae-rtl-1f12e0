// tb_lsu: test of the load/store unit: address, byte enables and lane
// placement of stores, misalignment detection for every width, and
// big-endian extraction with sign or zero extension for every load.
module tb_lsu;
  import rvex_pkg::*;

  logic valid; op_e op, ld_op;
  logic [31:0] base, offset, sdata, mem_wdata, mem_rdata, ld_data;
  logic mem_en, misaligned;
  logic [3:0] mem_we;
  logic [13:0] mem_addr;
  logic [1:0] byte_off, ld_byte_off;
  lsu dut (.*);

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    op_e ops[8] = '{OP_LDW, OP_LDH, OP_LDHU, OP_LDB, OP_LDBU, OP_STW, OP_STH, OP_STB};
    int size;
    logic [31:0] addr, w;
    logic [3:0] exp_we;
    logic [7:0] by; logic [15:0] hw;
    for (int n = 0; n < 3000; n++) begin
      op = ops[n % 8];
      valid = (n % 17) != 0;
      base = $urandom & 32'hFFFF; offset = 32'($signed(9'($urandom)));
      sdata = $urandom;
      addr = base + offset;
      size = (op inside {OP_LDW, OP_STW}) ? 4 : (op inside {OP_LDH, OP_LDHU, OP_STH}) ? 2 : 1;
      #1;
      check(mem_addr == addr[15:2], "word address");
      check(misaligned == (valid && (addr % size) != 0), $sformatf("misaligned %s %h", op.name(), addr));
      check(mem_en == (valid && (addr % size) == 0), "enable");
      exp_we = 0;
      if (mem_en && is_store(op))
        for (int i = 0; i < size; i++) exp_we[3 - (addr[1:0] + i)] = 1'b1;
      check(mem_we == exp_we, $sformatf("%s byte enables %b, expected %b", op.name(), mem_we, exp_we));
      for (int i = 0; i < 4; i++)
        if (exp_we[3-i]) begin
          // byte i of the word receives byte (i - addr%4) of the stored value, most significant first
          by = sdata[8*(size-1-(i - addr[1:0])) +: 8];
          check(mem_wdata[8*(3-i) +: 8] == by, "store data lane");
        end
      // loads
      ld_op = ops[n % 5]; ld_byte_off = 2'($urandom); mem_rdata = $urandom;
      if (ld_op inside {OP_LDH, OP_LDHU}) ld_byte_off[0] = 0;
      if (ld_op == OP_LDW) ld_byte_off = 0;
      #1;
      w = mem_rdata;
      by = w[8*(3-ld_byte_off) +: 8];
      hw = ld_byte_off[1] ? w[15:0] : w[31:16];
      case (ld_op)
        OP_LDW:  check(ld_data == w, "ldw");
        OP_LDH:  check(ld_data == {{16{hw[15]}}, hw}, "ldh");
        OP_LDHU: check(ld_data == {16'd0, hw}, "ldhu");
        OP_LDB:  check(ld_data == {{24{by[7]}}, by}, "ldb");
        OP_LDBU: check(ld_data == {24'd0, by}, "ldbu");
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
