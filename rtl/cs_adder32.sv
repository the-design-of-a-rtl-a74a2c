// cs_adder32: 32-bit two-input adder organised as a hybrid carry-select adder
// made of four 8-bit carry-lookahead blocks, the structure the processor
// uses for its fast 2-input adds. The low byte adds with the real carry-in;
// each upper byte is computed twice (carry-in 0 and 1) and the carry out of
// the byte below selects the result. Combinational; cout is the carry out of
// bit 31. The per-block structure follows the design; the ripple of the
// select carries between bytes is this implementation's own choice.
module cs_adder32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] sum,
  output logic        cout
);
  logic [3:1] csel;       // carry into bytes 1..3
  logic [7:0] s0 [1:3];
  logic [7:0] s1 [1:3];
  logic       c0 [1:3];
  logic       c1 [1:3];
  logic       cout0;

  cla8 u_b0 (.a(a[7:0]), .b(b[7:0]), .cin(cin), .sum(sum[7:0]), .cout(cout0));

  for (genvar i = 1; i < 4; i++) begin : g_byte
    cla8 u_c0 (.a(a[8*i +: 8]), .b(b[8*i +: 8]), .cin(1'b0), .sum(s0[i]), .cout(c0[i]));
    cla8 u_c1 (.a(a[8*i +: 8]), .b(b[8*i +: 8]), .cin(1'b1), .sum(s1[i]), .cout(c1[i]));
  end

  always_comb begin
    csel[1] = cout0;
    csel[2] = csel[1] ? c1[1] : c0[1];
    csel[3] = csel[2] ? c1[2] : c0[2];
    cout    = csel[3] ? c1[3] : c0[3];
  end

  for (genvar i = 1; i < 4; i++) begin : g_sel
    assign sum[8*i +: 8] = csel[i] ? s1[i] : s0[i];
  end
endmodule
