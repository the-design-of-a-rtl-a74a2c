// cla8: 8-bit carry-lookahead adder, the building block of the 32-bit
// carry-select adder. Generate/propagate terms give every carry directly
// from the carry-in; purely combinational.
module cla8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] sum,
  output logic       cout
);
  logic [7:0] g, p;
  logic [8:0] c;
  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    for (int i = 0; i < 8; i++) begin
      // c[i+1] = g[i] | p[i]g[i-1] | ... | p[i..0]cin, expanded as lookahead terms
      logic t;
      t = g[i];
      for (int j = i - 1; j >= -1; j--) begin
        logic pp;
        pp = 1'b1;
        for (int k = j + 1; k <= i; k++) pp &= p[k];
        t |= pp & ((j >= 0) ? g[j] : cin);
      end
      c[i+1] = t;
    end
    sum  = p ^ c[7:0];
    cout = c[8];
  end
endmodule
