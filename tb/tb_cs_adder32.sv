// tb_cs_adder32: compares the carry-select adder with the + operator on
// random and corner-case operands, both carry-in values, sum and carry out.
module tb_cs_adder32;
  logic [31:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;
  cs_adder32 dut (.a, .b, .cin, .sum(s), .cout);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [32:0] e;
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom; cin = 1'($urandom);
      if (i < 16) begin
        a = (i & 1) ? 32'hFFFF_FFFF : 32'h00FF_00FF << (i % 8);
        b = (i & 2) ? 32'h0000_0001 : 32'hFF00_FF00;
      end
      #1;
      e = {1'b0, a} + {1'b0, b} + 33'(cin);
      checks++;
      if ({cout, s} !== e) begin failures++; $display("ERR %h+%h+%b = %h exp %h", a, b, cin, {cout, s}, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
