// tb_bus_arbiter: drives random bus requests from the two caches, models the
// masters holding BBSY for a random time after a grant, and checks every
// grant against the arbitration rule (registered grant, D-cache priority,
// no grant while busy or while a grant is outstanding). Also checks the
// one-cycle grant latency and that each cache is granted at least once.
module tb_bus_arbiter;
  logic clk = 0, rst_n = 0;
  logic bbsy, br_d, br_i, bg_d, bg_i;
  int checks = 0, failures = 0, cycle = 0;
  int busy_left = 0;
  int nd = 0, ni = 0, nboth = 0;
  logic exp_d, exp_i;

  bus_arbiter dut (.clk, .rst_n, .bbsy, .br_dcache(br_d), .br_icache(br_i),
                   .bg_dcache(bg_d), .bg_icache(bg_i));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Masters: a grant starts a busy period (BBSY raised in the grant cycle).
  always_comb bbsy = (busy_left > 0) || bg_d || bg_i;

  initial begin
    br_d = 0; br_i = 0; exp_d = 0; exp_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Directed: both request in the same cycle; D-cache must win.
    @(negedge clk); br_d = 1; br_i = 1;
    @(posedge clk); #1;
    checks++; if (!(bg_d && !bg_i)) begin failures++; $display("ERR priority"); end
    nboth++;
    busy_left = 3;
    @(negedge clk); br_d = 0;
    // I-cache still requesting: gets the bus after the busy period ends.
    repeat (3) @(negedge clk) busy_left--;
    @(posedge clk); #1;
    checks++; if (!(bg_i && !bg_d)) begin failures++; $display("ERR icache after busy"); end
    busy_left = 2; br_i = 0;
    repeat (4) @(negedge clk) if (busy_left > 0) busy_left--;

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      br_d = ($urandom_range(0, 3) == 0);
      br_i = ($urandom_range(0, 2) == 0);
      exp_d = !bbsy && br_d && !(bg_d || bg_i);
      exp_i = !bbsy && br_i && !br_d && !(bg_d || bg_i);
      @(posedge clk); #1;
      checks++;
      if (bg_d !== exp_d || bg_i !== exp_i) begin
        failures++;
        $display("ERR cycle %0d: bg_d=%b exp %b bg_i=%b exp %b", n, bg_d, exp_d, bg_i, exp_i);
      end
      if (bg_d) nd++;
      if (bg_i) ni++;
      if (bg_d || bg_i) busy_left = $urandom_range(1, 6);
      else if (busy_left > 0) busy_left--;
    end
    checks++; if (nd == 0 || ni == 0 || nboth == 0) failures++;
    $display("grants: dcache=%0d icache=%0d", nd, ni);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
