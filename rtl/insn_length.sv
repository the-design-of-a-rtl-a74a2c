// insn_length: the decode stage's instruction size logic for the
// implemented x86 subset. From the first 16 bytes of the instruction
// register it finds up to 3 prefix bytes (operand size 66, REP F3, segment
// overrides 26 2E 36 3E 64 65), the one- or two-byte (0F xx) opcode, whether
// a ModR/M byte follows, the SIB and displacement bytes that the ModR/M byte
// implies (32-bit addressing), and the immediate size (imm8, imm16, or
// imm16/imm32 by operand size; far pointers add 2 bytes). It outputs the
// size both as a binary count (to update the IR's valid-byte count) and as
// a one-hot vector (to steer the IR shift), and not_enough when the IR holds
// fewer valid bytes than the instruction needs. Prefixes, opcode and
// ModR/M are all decoded in parallel from fixed byte positions and the
// right results selected by the prefix count. known is low for an opcode
// outside the subset. Combinational.
// Follows the design: a prefix decoder over the first 3 bytes, parallel
// opcode and ModR/M decoding selected by prefix size, and the two
// encodings of the size. The opcode tables come from the instruction list
// of the subset and the x86 encoding rules.
module insn_length (
  input  logic [127:0] ir,
  input  logic [4:0]   ir_valid_bytes,
  output logic [3:0]   size,
  output logic [15:0]  size_onehot,
  output logic [1:0]   n_prefix,
  output logic         opsize16,
  output logic         rep,
  output logic         two_byte,
  output logic         has_modrm,
  output logic         known,
  output logic         not_enough
);
  logic [7:0] byte_at [16];
  always_comb for (int i = 0; i < 16; i++) byte_at[i] = ir[8*i +: 8];

  function automatic logic is_prefix(input logic [7:0] b);
    return b inside {8'h66, 8'hF3, 8'h26, 8'h2E, 8'h36, 8'h3E, 8'h64, 8'h65};
  endfunction

  // Immediate kinds: 0 none, 1 imm8, 2 imm16, 3 imm16/32 (by operand size),
  // 4 far pointer (imm16/32 + 2).
  function automatic logic [5:0] op_info(input logic [7:0] op, input logic two);
    // returns {known, modrm, imm_kind[2:0], unused}
    logic k, m;
    logic [2:0] ik;
    k = 1'b1; m = 1'b0; ik = 3'd0;
    if (!two) begin
      casez (op)
        8'h00, 8'h01, 8'h02, 8'h03, 8'h30, 8'h31, 8'h32, 8'h33,
        8'h86, 8'h87, 8'h88, 8'h89, 8'h8A, 8'h8B, 8'h8C, 8'h8E, 8'h8F,
        8'hD0, 8'hD1, 8'hD2, 8'hD3, 8'hFE, 8'hFF:            m = 1'b1;
        8'h04, 8'h34, 8'h6A, 8'h73, 8'h75, 8'hEB, 8'b1011_0???: ik = 3'd1;
        8'h05, 8'h35, 8'h68, 8'hE8, 8'hE9, 8'b1011_1???:      ik = 3'd3;
        8'h80, 8'h83, 8'hC0, 8'hC1, 8'hC6:                   begin m = 1'b1; ik = 3'd1; end
        8'h81, 8'hC7:                                        begin m = 1'b1; ik = 3'd3; end
        8'hC2, 8'hCA:                                        ik = 3'd2;
        8'h9A, 8'hEA:                                        ik = 3'd4;
        8'h06, 8'h07, 8'h0E, 8'h16, 8'h17, 8'h1E, 8'h1F,
        8'b0100_0???, 8'b0101_????, 8'b1001_0???,
        8'hA4, 8'hA5, 8'hC3, 8'hCB, 8'hCF, 8'hF4, 8'hFC, 8'hFD: ;
        default: k = 1'b0;
      endcase
    end else begin
      casez (op)
        8'h83, 8'h85:                  ik = 3'd3;
        8'hAB:                         m = 1'b1;
        8'hBA:                         begin m = 1'b1; ik = 3'd1; end
        8'b1100_1???, 8'hA0, 8'hA1, 8'hA8, 8'hA9: ;
        default: k = 1'b0;
      endcase
    end
    return {k, m, ik, 1'b0};
  endfunction

  always_comb begin
    logic [3:0] pos;
    logic [7:0] op, modrm, sib;
    logic [5:0] info;
    logic [4:0] len, mlen, ilen;
    n_prefix = 2'd0;
    if (is_prefix(byte_at[0])) begin
      n_prefix = 2'd1;
      if (is_prefix(byte_at[1])) begin
        n_prefix = 2'd2;
        if (is_prefix(byte_at[2])) n_prefix = 2'd3;
      end
    end
    opsize16 = 1'b0;
    rep      = 1'b0;
    for (int i = 0; i < 3; i++) begin
      if (i < int'(n_prefix)) begin
        if (byte_at[i] == 8'h66) opsize16 = 1'b1;
        if (byte_at[i] == 8'hF3) rep = 1'b1;
      end
    end
    pos      = 4'(n_prefix);
    two_byte = (byte_at[pos] == 8'h0F);
    op       = two_byte ? byte_at[pos + 4'd1] : byte_at[pos];
    info     = op_info(op, two_byte);
    known     = info[5];
    has_modrm = info[4];
    modrm    = byte_at[pos + (two_byte ? 4'd2 : 4'd1)];
    sib      = byte_at[pos + (two_byte ? 4'd3 : 4'd2)];
    // ModR/M, SIB and displacement bytes
    mlen = 5'd0;
    if (has_modrm) begin
      mlen = 5'd1;
      if (modrm[7:6] != 2'b11) begin
        if (modrm[2:0] == 3'b100) begin
          mlen = mlen + 5'd1;
          if (modrm[7:6] == 2'b00 && sib[2:0] == 3'b101) mlen = mlen + 5'd4;
        end
        if (modrm[7:6] == 2'b00 && modrm[2:0] == 3'b101) mlen = mlen + 5'd4;
        if (modrm[7:6] == 2'b01) mlen = mlen + 5'd1;
        if (modrm[7:6] == 2'b10) mlen = mlen + 5'd4;
      end
    end
    unique case (info[3:1])
      3'd1:    ilen = 5'd1;
      3'd2:    ilen = 5'd2;
      3'd3:    ilen = opsize16 ? 5'd2 : 5'd4;
      3'd4:    ilen = opsize16 ? 5'd4 : 5'd6;
      default: ilen = 5'd0;
    endcase
    len = 5'(n_prefix) + (two_byte ? 5'd2 : 5'd1) + mlen + ilen;
    size        = len[3:0];
    size_onehot = 16'd1 << len[3:0];
    not_enough  = (len > ir_valid_bytes);
  end
endmodule
