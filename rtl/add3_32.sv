// add3_32: three-input 32-bit adder (sum modulo 2^32). The three operands
// are first reduced to a redundant sum/carry pair by a row of full adders
// (carry-save form), and one carry-select adder then resolves that pair.
// The design names redundant arithmetic for this adder without giving its
// cells; the carry-save reduction is this implementation's choice.
// Combinational.
module add3_32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] sum
);
  logic [31:0] s_part, c_part;
  logic        unused_cout;
  always_comb begin
    s_part = a ^ b ^ c;
    c_part = {((a[30:0] & b[30:0]) | (a[30:0] & c[30:0]) | (b[30:0] & c[30:0])), 1'b0};
  end
  cs_adder32 u_final (.a(s_part), .b(c_part), .cin(1'b0), .sum(sum), .cout(unused_cout));
endmodule
