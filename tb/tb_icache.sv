// tb_icache: runs the I-cache against the memory controller and arbiter.
// Memory is first filled with a known pattern over the bus (byte i of block
// b is b*16+i+7, mod 256), then random fetch addresses are presented with
// their physical tags until they hit, and the aligned bytes and nbytes are
// compared with the pattern. Checks that a hit returns in the cycle it is
// presented, that a line that was filled then hits, and that the miss
// sequence (BR, grant, BBSY, memory ACK) happened.
module tb_icache;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req, hit, stall, br, bg, bg_d_unused;
  logic [31:0] vaddr;
  logic [5:0] ptag;
  logic [127:0] data;
  logic [4:0] nbytes;
  bus_m_t m_ic, m_tb, m;
  bus_s_t s;
  int checks = 0, failures = 0, n_miss = 0, n_hit0 = 0;

  icache dut (.clk, .rst_n, .req, .vaddr, .ptag, .hit, .stall, .data, .nbytes,
    .br, .bg, .bus_out(m_ic), .bus_in(s));
  mem_ctrl u_mem (.clk, .rst_n, .bus_in(m), .bus_out(s));
  bus_arbiter u_arb (.clk, .rst_n, .bbsy(m.bbsy), .br_dcache(1'b0), .br_icache(br),
    .bg_dcache(bg_d_unused), .bg_icache(bg));
  assign m = m_ic | m_tb;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(int a);
    return 8'(a + 7);
  endfunction

  initial begin
    logic [127:0] blk, e;
    int a, cyc, off;
    req = 0; vaddr = 0; ptag = 0; m_tb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2048; b++) begin
      for (int i = 0; i < 16; i++) blk[8*i +: 8] = pat(b * 16 + i);
      @(negedge clk);
      m_tb.bbsy = 1; m_tb.dev_id = DEV_MEMORY; m_tb.brw = 1; m_tb.addr = 15'(b * 16); m_tb.data = blk;
      do @(posedge clk); while (!s.ack);
      @(negedge clk); m_tb = '0;
    end
    for (int n = 0; n < 600; n++) begin
      a = $urandom_range(0, 32767);
      if (n % 3 == 0) a = a & 32'h0fff;    // reuse a smaller window for hits
      @(negedge clk);
      req = 1; vaddr = 32'(a) | 32'h4000_0000; ptag = 6'(a >> 9);
      #1; cyc = 0;
      while (stall) begin @(negedge clk); cyc++; end
      if (cyc == 0) n_hit0++; else n_miss++;
      off = a % 16;
      e = '0;
      for (int i = 0; i < 16 - off; i++) e[8*i +: 8] = pat(a + i);
      checks++;
      if (data !== e) begin failures++; $display("ERR data at %h: %h exp %h", a, data, e); end
      checks++;
      if (nbytes != 5'(16 - off)) begin failures++; $display("ERR nbytes %0d", nbytes); end
      if (cyc > 0) begin
        // Present it again: a just-filled line must hit at once.
        @(negedge clk); #1;
        checks++; if (!hit) begin failures++; $display("ERR refetch missed"); end
      end
      @(negedge clk); req = 0;
    end
    $display("misses=%0d immediate hits=%0d", n_miss, n_hit0);
    checks++; if (n_miss == 0 || n_hit0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
