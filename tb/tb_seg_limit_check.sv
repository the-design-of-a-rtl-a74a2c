// tb_seg_limit_check: checks the limit comparison at and around the limit
// for each access size, the wrap past 2^32, and random cases against a
// 64-bit reference.
module tb_seg_limit_check;
  logic en, gp;
  logic [31:0] offset, limit;
  logic [2:0] nbytes;
  int checks = 0, failures = 0;
  seg_limit_check dut (.en, .offset, .nbytes, .limit, .gp);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic t(input logic [31:0] o, input int n, input logic [31:0] l, input logic e_en);
    logic exp;
    en = e_en; offset = o; nbytes = 3'(n); limit = l; #1;
    exp = e_en && (64'(o) + 64'(n) - 1 > 64'(l));
    checks++;
    if (gp !== exp) begin failures++; $display("ERR o=%h n=%0d l=%h gp=%b", o, n, l, gp); end
  endtask
  initial begin
    for (int n = 1; n <= 4; n = n * 2) begin
      t(32'h0FFF - n + 1, n, 32'h0FFF, 1);
      t(32'h0FFF - n + 2, n, 32'h0FFF, 1);
      t(32'h1000, n, 32'h0FFF, 1);
      t(32'hFFFF_FFFF, n, 32'hFFFF_FFFF, 1);
    end
    t(32'h2000, 4, 32'h0FFF, 0);
    for (int i = 0; i < 5000; i++) t($urandom, $urandom_range(1, 4), $urandom, 1);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] l = $urandom;
      t(l - 32'($urandom_range(0, 5)), $urandom_range(1, 4), l, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
