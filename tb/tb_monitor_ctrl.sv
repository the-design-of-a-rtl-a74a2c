// tb_monitor_ctrl: writes bytes to the monitor over the bus, drains them
// from the display side and checks order, ACK timing (2 cycles after the request), and that
// an overrun keeps the newest DEPTH bytes and drops the oldest.
module tb_monitor_ctrl;
  import x86_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  bus_m_t m;
  bus_s_t s;
  logic disp_valid, disp_pop, overrun;
  logic [7:0] disp_data;
  int checks = 0, failures = 0;
  logic [7:0] q [$];

  monitor_ctrl #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .bus_in(m), .bus_out(s),
    .disp_valid, .disp_data, .disp_pop, .overrun);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] b);
    int cycles = 0;
    @(negedge clk);
    m.bbsy = 1; m.dev_id = DEV_MONITOR; m.brw = 1; m.addr = '0; m.data = {120'd0, b};
    do begin @(posedge clk); #1; cycles++; end while (!s.ack && cycles < 50);
    checks++; if (cycles != 2) begin failures++; $display("ERR ack after %0d", cycles); end
    @(negedge clk); m = '0;
    q.push_back(b);
    if (q.size() > DEPTH) void'(q.pop_front());
  endtask

  task automatic drain(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      checks++;
      if (!disp_valid) begin failures++; $display("ERR empty"); end
      else begin
        logic [7:0] e = q.pop_front();
        if (disp_data !== e) begin failures++; $display("ERR byte %h exp %h", disp_data, e); end
      end
      disp_pop = 1; @(negedge clk); disp_pop = 0;
    end
  endtask

  initial begin
    m = '0; disp_pop = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); checks++; if (disp_valid) failures++;
    for (int i = 0; i < 5; i++) wr(8'($urandom));
    drain(5);
    @(negedge clk); checks++; if (disp_valid) failures++;
    // Overrun: write DEPTH+3 bytes without draining.
    for (int i = 0; i < DEPTH + 3; i++) wr(8'(8'h40 + i));
    checks++; if (!overrun) begin failures++; $display("ERR overrun not seen"); end
    drain(DEPTH);
    @(negedge clk); checks++; if (disp_valid) begin failures++; $display("ERR not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
