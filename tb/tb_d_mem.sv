// tb_d_mem: random test of the two-port data memory against a byte model:
// both ports write with byte enables (we[3] is bits 31:24, the lowest
// address in big-endian order), both read with one cycle latency, and a
// disabled port holds its output. Runs at the full 16384-word depth; the
// addresses used are spread over the whole range.
module tb_d_mem;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic a_en = 0, b_en = 0; logic [3:0] a_we = 0, b_we = 0;
  logic [13:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  d_mem dut (.*);

  logic [31:0] m [int];
  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] we);
    for (int i = 0; i < 4; i++) if (we[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  initial begin
    logic [31:0] ea, eb, ha, hb;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) a_en = 1; a_we = 4'hF; a_addr = 14'(i * 256 + 3); a_wdata = $urandom; m[a_addr] = a_wdata;
    end
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) b_en = 1; b_we = 4'hF; b_addr = 14'(i * 17); b_wdata = $urandom; m[b_addr] = b_wdata;
    end
    @(negedge clk) a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      ha = a_rdata; hb = b_rdata;
      a_en = 1'($urandom); b_en = 1'($urandom);
      a_addr = (n % 2) ? 14'($urandom_range(63)) * 256 + 3 : 14'($urandom_range(63)) * 17;
      b_addr = (n % 3) ? 14'($urandom_range(63)) * 17 : 14'($urandom_range(63)) * 256 + 3;
      if (a_addr == b_addr) b_en = 0;          // simultaneous writes to one word are not defined
      a_we = a_en ? 4'($urandom) : 4'h0; b_we = b_en ? 4'($urandom) : 4'h0;
      a_wdata = $urandom; b_wdata = $urandom;
      if (!m.exists(a_addr)) m[a_addr] = 'x;
      if (!m.exists(b_addr)) m[b_addr] = 'x;
      ea = m[a_addr]; eb = m[b_addr];           // read-before-write value
      if (a_en) m[a_addr] = merge(m[a_addr], a_wdata, a_we);
      if (b_en) m[b_addr] = merge(m[b_addr], b_wdata, b_we);
      @(negedge clk);
      if (a_en) begin
        if (a_we == 0) check(a_rdata === ea, $sformatf("port a read %h = %h, expected %h", a_addr, a_rdata, ea));
      end else check(a_rdata === ha, "port a held");
      if (b_en) begin
        if (b_we == 0) check(b_rdata === eb, $sformatf("port b read %h = %h, expected %h", b_addr, b_rdata, eb));
      end else check(b_rdata === hb, "port b held");
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    end
    // byte-lane order: we[3] writes the most significant byte
    @(negedge clk) a_en = 1; a_we = 4'hF; a_addr = 14'd5; a_wdata = 32'h11223344;
    @(negedge clk) a_we = 4'b1000; a_wdata = 32'hAA000000;
    @(negedge clk) a_we = 4'b0001; a_wdata = 32'h000000BB;
    @(negedge clk) a_we = 0;
    @(negedge clk) check(a_rdata == 32'hAA2233BB, "byte lanes");
    a_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
