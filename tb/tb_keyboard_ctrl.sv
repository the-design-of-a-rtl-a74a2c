// tb_keyboard_ctrl: types bytes into the keyboard controller, checks that
// each raises the interrupt, reads the buffer back over the bus as a
// non-cacheable byte read and checks data, the ACK timing (2 cycles after the request) and
// that a read lowers the interrupt.
module tb_keyboard_ctrl;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_m_t m;
  bus_s_t s;
  logic kb_valid, kb_ready, irq;
  logic [7:0] kb_data;
  int checks = 0, failures = 0;
  logic [7:0] typed [256];

  keyboard_ctrl dut (.clk, .rst_n, .bus_in(m), .bus_out(s), .kb_valid, .kb_data, .kb_ready, .irq);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input logic [7:0] a, output logic [7:0] d, output int cycles);
    @(negedge clk);
    m.bbsy = 1; m.dev_id = DEV_KEYBOARD; m.brw = 0; m.addr = {7'd0, a}; m.data = '0;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!s.ack && cycles < 50);
    d = s.data[7:0];
    @(negedge clk); m = '0;
  endtask

  task automatic key(input logic [7:0] b);
    @(negedge clk);
    while (!kb_ready) @(negedge clk);
    kb_valid = 1; kb_data = b;
    @(negedge clk); kb_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d;
    int cyc;
    m = '0; kb_valid = 0; kb_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (irq) failures++;
    for (int i = 0; i < 40; i++) begin
      typed[i] = 8'($urandom);
      key(typed[i]);
      checks++; if (!irq) begin failures++; $display("ERR no irq after key %0d", i); end
      if (i % 4 == 3) begin
        for (int j = i - 3; j <= i; j++) begin
          rd(8'(j), d, cyc);
          checks++; if (d !== typed[j]) begin failures++; $display("ERR data %0d: %h exp %h", j, d, typed[j]); end
          checks++; if (cyc != 2) begin failures++; $display("ERR ack after %0d", cyc); end
        end
        checks++; if (irq) begin failures++; $display("ERR irq still high after read"); end
      end
    end
    // Memory's device id must not reach the keyboard.
    @(negedge clk); m.bbsy = 1; m.dev_id = DEV_MEMORY;
    repeat (5) begin @(posedge clk); #1; checks++; if (s.ack) failures++; end
    @(negedge clk); m = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
