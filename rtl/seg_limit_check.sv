// seg_limit_check: segment limit checker. Raises gp when any byte of an
// access of nbytes bytes starting at offset lies beyond the segment limit
// (offset + nbytes - 1 > limit, including a wrap past 2^32). The processor
// uses one of these in the fetch, address generation, D-cache access and
// execution stages. Combinational. That the checker compares an offset with
// a limit follows the design; counting the last byte of the access is this
// design's choice.
module seg_limit_check (
  input  logic        en,
  input  logic [31:0] offset,
  input  logic [2:0]  nbytes,
  input  logic [31:0] limit,
  output logic        gp
);
  logic [32:0] last;
  always_comb begin
    last = {1'b0, offset} + 33'(nbytes) - 33'd1;
    gp   = en && (nbytes != 0) && (last > {1'b0, limit});
  end
endmodule
