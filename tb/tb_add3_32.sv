// tb_add3_32: compares the three-input adder with the + operator (mod 2^32)
// on random and all-ones operands.
module tb_add3_32;
  logic [31:0] a, b, c, s;
  int checks = 0, failures = 0;
  add3_32 dut (.a, .b, .c, .sum(s));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (i == 0) begin a = '1; b = '1; c = '1; end
      if (i == 1) begin a = 32'h8000_0000; b = 32'h8000_0000; c = 32'hFFFF_FFFC; end
      #1;
      checks++;
      if (s !== a + b + c) begin failures++; $display("ERR %h+%h+%h = %h", a, b, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
