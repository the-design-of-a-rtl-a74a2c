// tb_mem_ctrl: acts as a bus master towards the memory controller. Writes
// blocks with random data to addresses spread over all 8 banks, reads them
// back and compares with a copy kept in the testbench, checks that the
// ACK comes LATENCY+2 cycles after the request and that requests carrying
// another device id are ignored.
module tb_mem_ctrl;
  import x86_pkg::*;
  localparam int unsigned LAT = 4;
  logic clk = 0, rst_n = 0;
  bus_m_t m;
  bus_s_t s;
  int checks = 0, failures = 0;
  logic [127:0] shadow [int];

  mem_ctrl #(.LATENCY(LAT)) dut (.clk, .rst_n, .bus_in(m), .bus_out(s));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic wr, input logic [14:0] a, input logic [127:0] d,
                      output logic [127:0] rd, output int cycles);
    @(negedge clk);
    m.bbsy = 1; m.dev_id = DEV_MEMORY; m.brw = wr; m.addr = a; m.data = d;
    cycles = 0;
    do begin
      @(posedge clk); #1; cycles++;
    end while (!s.ack && cycles < 100);
    rd = s.data;
    @(negedge clk);
    m = '0;
  endtask

  initial begin
    logic [127:0] rd, d;
    logic [14:0] a;
    int cyc;
    m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      a = 15'($urandom) & 15'h7ff0;
      if (n < 8) a = {3'(n), 12'h120};
      d = {$urandom, $urandom, $urandom, $urandom};
      xfer(1'b1, a, d, rd, cyc);
      shadow[int'(a)] = d;
      checks++; if (cyc != LAT + 2) begin failures++; $display("ERR write latency %0d", cyc); end
    end
    foreach (shadow[k]) begin
      xfer(1'b0, 15'(k) | 15'h3, 'x, rd, cyc);
      checks++;
      if (rd !== shadow[k]) begin failures++; $display("ERR read %h: %h exp %h", k, rd, shadow[k]); end
      checks++; if (cyc != LAT + 2) begin failures++; $display("ERR read latency %0d", cyc); end
    end
    // A request for the keyboard must not be answered by memory.
    @(negedge clk); m.bbsy = 1; m.dev_id = DEV_KEYBOARD; m.addr = 15'h10;
    repeat (LAT + 6) begin @(posedge clk); #1; checks++; if (s.ack) failures++; end
    @(negedge clk); m = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
