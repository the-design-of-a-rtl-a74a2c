// tb_dcache: runs the D-cache against the memory controller and arbiter on
// a private bus, plus a small I/O responder standing in for a device.
// Fills a 2 KB region (four times the cache, so lines conflict and dirty
// lines get evicted) with byte, word and doubleword writes, then makes
// random reads and writes of all sizes at any alignment, and compares every
// read with a byte-array copy of memory kept by the testbench. Checks that
// an aligned hit completes in the cycle it is presented and that unaligned
// accesses, dirty evictions and non-cacheable reads all happened.
module tb_dcache;
  import x86_pkg::*;
  localparam int unsigned REGION = 2048;
  logic clk = 0, rst_n = 0;
  logic req, we, nc, stall, hit, unal;
  logic [14:0] paddr;
  opsize_e size;
  logic [31:0] wdata, rdata;
  logic br, bg, bg_i_unused;
  bus_m_t m;
  bus_s_t s_mem, s_io, s;
  int checks = 0, failures = 0;
  int n_unal = 0, n_evict = 0, n_hit1 = 0, n_io = 0;
  logic [7:0] shadow [REGION];

  dcache dut (.clk, .rst_n, .req, .we, .paddr, .size, .wdata, .noncacheable(nc),
    .io_dev(DEV_KEYBOARD), .rdata, .stall, .hit, .unaligned(unal), .br, .bg, .bus_out(m), .bus_in(s));
  mem_ctrl u_mem (.clk, .rst_n, .bus_in(m), .bus_out(s_mem));
  bus_arbiter u_arb (.clk, .rst_n, .bbsy(m.bbsy), .br_dcache(br), .br_icache(1'b0),
    .bg_dcache(bg), .bg_icache(bg_i_unused));

  // I/O responder: ACK two cycles after selection, data = address byte ^ 5A.
  int io_cnt = 0;
  always_ff @(posedge clk) begin
    if (m.bbsy && m.dev_id == DEV_KEYBOARD && io_cnt < 3) io_cnt <= io_cnt + 1;
    else if (!(m.bbsy && m.dev_id == DEV_KEYBOARD)) io_cnt <= 0;
  end
  always_comb begin
    s_io.ack  = (io_cnt == 2);
    s_io.data = s_io.ack ? {120'd0, m.addr[7:0] ^ 8'h5A} : '0;
    s.ack  = s_mem.ack | s_io.ack;
    s.data = s_mem.data | s_io.data;
  end

  always @(posedge clk) if (m.dev_id == DEV_MEMORY && m.brw && s_mem.ack) n_evict++;

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nb(opsize_e z);
    return (z == SZ8) ? 1 : (z == SZ16) ? 2 : 4;
  endfunction

  task automatic access(input logic w, input int a, input opsize_e z, input logic [31:0] d,
                        output logic [31:0] r, output int cycles);
    @(negedge clk);
    req = 1; we = w; paddr = 15'(a); size = z; wdata = d; nc = 0;
    cycles = 0;
    #1;
    while (stall) begin @(negedge clk); cycles++; end
    r = rdata;
    if (unal) n_unal++;
    @(posedge clk); #1;
    req = 0;
  endtask

  initial begin
    logic [31:0] r, e, d;
    int a, cyc, n;
    opsize_e z;
    req = 0; we = 0; paddr = 0; size = SZ32; wdata = 0; nc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (a = 0; a < REGION; a += 4) begin
      d = $urandom;
      access(1'b1, a, SZ32, d, r, cyc);
      for (int k = 0; k < 4; k++) shadow[a + k] = d[8*k +: 8];
    end
    for (int i = 0; i < 4000; i++) begin
      z = opsize_e'($urandom_range(0, 2));
      n = nb(z);
      a = $urandom_range(0, REGION - n);
      if (i % 7 == 0) a = (a & ~15) | (16 - n/2 - 1) % 16;  // often straddle a line
      if (a + n > REGION) a = REGION - n;
      if ($urandom_range(0, 2) == 0) begin
        d = $urandom;
        access(1'b1, a, z, d, r, cyc);
        for (int k = 0; k < n; k++) shadow[a + k] = d[8*k +: 8];
      end else begin
        access(1'b0, a, z, 'x, r, cyc);
        e = 0;
        for (int k = 0; k < n; k++) e[8*k +: 8] = shadow[a + k];
        checks++;
        if (r !== e) begin failures++; $display("ERR read %0d size %0d: %h exp %h", a, n, r, e); end
        // An aligned access that hits must complete in the same cycle.
        if (cyc == 0 && (a % 16) + n <= 16) n_hit1++;
      end
    end
    // Back-to-back aligned read of the same word: second must hit at once.
    access(1'b0, 64, SZ32, 'x, r, cyc);
    access(1'b0, 64, SZ32, 'x, r, cyc);
    checks++; if (cyc != 0) begin failures++; $display("ERR hit took %0d cycles", cyc); end
    // Non-cacheable read from the I/O device.
    @(negedge clk); req = 1; we = 0; paddr = 15'h0023; size = SZ8; nc = 1; #1;
    cyc = 0;
    while (stall) begin @(negedge clk); cyc++; end
    checks++; if (rdata !== 32'(8'h23 ^ 8'h5A)) begin failures++; $display("ERR io read %h", rdata); end
    n_io++;
    @(posedge clk); #1; req = 0; nc = 0;
    $display("unaligned=%0d evictions=%0d same-cycle hits=%0d io=%0d", n_unal, n_evict, n_hit1, n_io);
    checks++; if (n_unal == 0 || n_evict == 0 || n_hit1 == 0 || n_io == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
