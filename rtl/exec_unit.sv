// exec_unit: the execution stage's result units and selection unit. Each
// operation has its own unit working on the two operands in parallel (ADD,
// XOR, INC, BSWAP, BTS, the shifter for ROR/SAL/SAR, MOV, XCHG and the stack
// adder), and the operation id selects one unit's result, second result
// (XCHG writes both registers) and flags. Results are in the low 8, 16 or
// 32 bits for the operand size; the writeback stage merges partial results
// into the register.
//
// Flags follow the x86 rules for these instructions: ADD writes CF OF SF ZF
// AF PF; XOR clears CF and OF and writes SF ZF PF; INC writes all but CF;
// BTS copies the selected bit into CF (bit offset taken modulo the operand
// width); ROR writes CF (and OF for a count of 1); SAL/SAR write CF SF ZF PF
// and OF (for a count of 1); a shift or rotate count of 0 writes no flag.
// The count is masked to 5 bits. flags_we says which flags the result
// writes. Combinational.
// Follows the design: the set of units and selection by operation id. The
// flag details come from the x86 instruction set, not from the design.
module exec_unit
  import x86_pkg::*;
(
  input  exop_e       op,
  input  opsize_e     size,
  input  logic [31:0] a,        // destination / r/m operand
  input  logic [31:0] b,        // source operand, immediate or count
  input  flags_t      flags_in,
  output logic [31:0] result,
  output logic [31:0] result2,
  output flags_t      flags_out,
  output flags_t      flags_we
);
  logic [5:0]  width;
  logic [31:0] mask, am, bm, msb;
  logic [4:0]  cnt;

  always_comb begin
    unique case (size)
      SZ8:     begin width = 6'd8;  mask = 32'h0000_00FF; end
      SZ16:    begin width = 6'd16; mask = 32'h0000_FFFF; end
      default: begin width = 6'd32; mask = 32'hFFFF_FFFF; end
    endcase
    msb = 32'd1 << (width - 6'd1);
    am  = a & mask;
    bm  = b & mask;
    cnt = b[4:0];
  end

  function automatic logic parity8(input logic [7:0] v);
    return ~^v;
  endfunction

  // ADD and INC (INC is ADD of 1 with CF untouched).
  logic [32:0] add_full;
  logic [31:0] add_b, add_r;
  always_comb begin
    add_b    = (op == OP_INC) ? 32'd1 : bm;
    add_full = {1'b0, am} + {1'b0, add_b};
    add_r    = add_full[31:0] & mask;
  end

  // Shifter: ROR, SAL, SAR.
  logic [31:0] sh_r;
  logic        sh_cf, sh_of;
  logic [5:0]  rc;
  always_comb begin
    logic [63:0] dbl;
    logic signed [31:0] sa;
    sh_r  = am;
    sh_cf = flags_in.cf;
    sh_of = flags_in.of_;
    rc    = 6'(cnt) % width;
    unique case (op)
      OP_ROR: begin
        dbl  = {32'd0, am} | ({32'd0, am} << width);
        sh_r = 32'(dbl >> rc) & mask;
        if (cnt != 0) begin
          sh_cf = |(sh_r & msb);
          sh_of = |(sh_r & msb) ^ |(sh_r & (msb >> 1));
        end
      end
      OP_SAL: begin
        dbl  = {32'd0, am} << cnt;
        sh_r = dbl[31:0] & mask;
        if (cnt != 0) begin
          sh_cf = |(dbl[63:0] & (64'(msb) << 1));
          sh_of = |(sh_r & msb) ^ sh_cf;
        end
      end
      OP_SAR: begin
        // sign-extend the operand to 32 bits, then shift arithmetically
        sa = (size == SZ8) ? 32'(signed'(am[7:0])) : (size == SZ16) ? 32'(signed'(am[15:0])) : signed'(am);
        sh_r = 32'(sa >>> cnt) & mask;
        if (cnt != 0) begin
          sh_cf = sa[cnt - 5'd1];
          sh_of = 1'b0;
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    logic [4:0] bit_idx;
    result    = '0;
    result2   = '0;
    flags_out = flags_in;
    flags_we  = '0;
    bit_idx   = b[4:0] & 5'(width - 6'd1);
    unique case (op)
      OP_ADD, OP_INC: begin
        result        = add_r;
        flags_out.cf  = (size == SZ32) ? add_full[32] : |(({1'b0, am} + {1'b0, add_b}) & {1'b0, msb << 1});
        flags_out.of_ = ((am & msb) == (add_b & msb)) && ((add_r & msb) != (am & msb));
        flags_out.af  = am[4] ^ add_b[4] ^ add_r[4];
        flags_we      = '{af: 1'b1, cf: op == OP_ADD, df: 1'b0, of_: 1'b1, pf: 1'b1, sf: 1'b1, zf: 1'b1};
        if (op == OP_INC) flags_out.cf = flags_in.cf;
      end
      OP_XOR: begin
        result        = (am ^ bm);
        flags_out.cf  = 1'b0;
        flags_out.of_ = 1'b0;
        flags_we      = '{af: 1'b0, cf: 1'b1, df: 1'b0, of_: 1'b1, pf: 1'b1, sf: 1'b1, zf: 1'b1};
      end
      OP_BSWAP: result = {a[7:0], a[15:8], a[23:16], a[31:24]};
      OP_BTS: begin
        result       = am | (32'd1 << bit_idx);
        flags_out.cf = am[bit_idx];
        flags_we.cf  = 1'b1;
      end
      OP_ROR: begin
        result        = sh_r;
        flags_out.cf  = sh_cf;
        flags_out.of_ = sh_of;
        flags_we.cf   = (cnt != 0);
        flags_we.of_  = (cnt != 0);
      end
      OP_SAL, OP_SAR: begin
        result        = sh_r;
        flags_out.cf  = sh_cf;
        flags_out.of_ = sh_of;
        flags_we      = '{af: 1'b0, cf: cnt != 0, df: 1'b0, of_: cnt != 0, pf: cnt != 0,
                          sf: cnt != 0, zf: cnt != 0};
      end
      OP_MOV:   result = bm;
      OP_XCHG: begin
        result  = bm;
        result2 = am;
      end
      OP_STACK: result = a + b;
      default: ;
    endcase
    // Result-derived flags shared by the arithmetic and logic units.
    if (op inside {OP_ADD, OP_INC, OP_XOR, OP_SAL, OP_SAR}) begin
      flags_out.zf = (result == 32'd0);
      flags_out.sf = |(result & msb);
      flags_out.pf = parity8(result[7:0]);
    end
  end
endmodule
