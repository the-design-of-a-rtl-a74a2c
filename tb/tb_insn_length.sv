// tb_insn_length: assembles random instructions of the subset - 0 to 3
// prefixes, an opcode from a table of (opcode, ModR/M?, immediate bytes),
// random ModR/M and SIB bytes with the displacement they call for, and
// the immediate - followed by random filler, and checks the decoded size
// (binary and one-hot), prefix count, operand-size and REP flags, the ModR/M
// flag and the not-enough flag for a random number of valid bytes. Also
// checks that bytes outside the subset are flagged as unknown.
module tb_insn_length;
  logic [127:0] ir;
  logic [4:0] ir_valid_bytes;
  logic [3:0] size;
  logic [15:0] size_onehot;
  logic [1:0] n_prefix;
  logic opsize16, rep, two_byte, has_modrm, known, not_enough;
  int checks = 0, failures = 0;
  insn_length dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Table entries: {two-byte, opcode, modrm, immediate code}; immediate code
  // 0 none, 1 one byte, 2 two bytes, 3 word/dword, 4 far pointer.
  typedef struct { bit two; logic [7:0] op; bit m; int imm; } ent_t;
  ent_t tab [$];
  initial begin
    // ModR/M forms without immediate
    tab.push_back('{0, 8'h00, 1, 0}); tab.push_back('{0, 8'h01, 1, 0}); tab.push_back('{0, 8'h03, 1, 0});
    tab.push_back('{0, 8'h31, 1, 0}); tab.push_back('{0, 8'h33, 1, 0}); tab.push_back('{0, 8'h87, 1, 0});
    tab.push_back('{0, 8'h89, 1, 0}); tab.push_back('{0, 8'h8B, 1, 0}); tab.push_back('{0, 8'h8E, 1, 0});
    tab.push_back('{0, 8'hD1, 1, 0}); tab.push_back('{0, 8'hD3, 1, 0}); tab.push_back('{0, 8'hFF, 1, 0});
    tab.push_back('{0, 8'h8F, 1, 0}); tab.push_back('{0, 8'hFE, 1, 0}); tab.push_back('{0, 8'h8C, 1, 0});
    // immediates only
    tab.push_back('{0, 8'h04, 0, 1}); tab.push_back('{0, 8'h05, 0, 3}); tab.push_back('{0, 8'h34, 0, 1});
    tab.push_back('{0, 8'h35, 0, 3}); tab.push_back('{0, 8'h6A, 0, 1}); tab.push_back('{0, 8'h68, 0, 3});
    tab.push_back('{0, 8'h75, 0, 1}); tab.push_back('{0, 8'h73, 0, 1}); tab.push_back('{0, 8'hEB, 0, 1});
    tab.push_back('{0, 8'hE8, 0, 3}); tab.push_back('{0, 8'hE9, 0, 3}); tab.push_back('{0, 8'hB3, 0, 1});
    tab.push_back('{0, 8'hBD, 0, 3}); tab.push_back('{0, 8'hC2, 0, 2}); tab.push_back('{0, 8'hCA, 0, 2});
    tab.push_back('{0, 8'h9A, 0, 4}); tab.push_back('{0, 8'hEA, 0, 4});
    // ModR/M with immediate
    tab.push_back('{0, 8'h80, 1, 1}); tab.push_back('{0, 8'h83, 1, 1}); tab.push_back('{0, 8'hC1, 1, 1});
    tab.push_back('{0, 8'hC6, 1, 1}); tab.push_back('{0, 8'h81, 1, 3}); tab.push_back('{0, 8'hC7, 1, 3});
    // single byte
    tab.push_back('{0, 8'h06, 0, 0}); tab.push_back('{0, 8'h1F, 0, 0}); tab.push_back('{0, 8'h42, 0, 0});
    tab.push_back('{0, 8'h47, 0, 0}); tab.push_back('{0, 8'h53, 0, 0}); tab.push_back('{0, 8'h5E, 0, 0});
    tab.push_back('{0, 8'h90, 0, 0}); tab.push_back('{0, 8'h97, 0, 0}); tab.push_back('{0, 8'hA4, 0, 0});
    tab.push_back('{0, 8'hA5, 0, 0}); tab.push_back('{0, 8'hC3, 0, 0}); tab.push_back('{0, 8'hCB, 0, 0});
    tab.push_back('{0, 8'hCF, 0, 0}); tab.push_back('{0, 8'hF4, 0, 0}); tab.push_back('{0, 8'hFC, 0, 0});
    tab.push_back('{0, 8'hFD, 0, 0});
    // two-byte opcodes
    tab.push_back('{1, 8'h83, 0, 3}); tab.push_back('{1, 8'h85, 0, 3}); tab.push_back('{1, 8'hAB, 1, 0});
    tab.push_back('{1, 8'hBA, 1, 1}); tab.push_back('{1, 8'hC8, 0, 0}); tab.push_back('{1, 8'hCD, 0, 0});
    tab.push_back('{1, 8'hA0, 0, 0}); tab.push_back('{1, 8'hA9, 0, 0});
  end

  initial begin
    logic [7:0] pre [8] = '{8'h66, 8'hF3, 8'h26, 8'h2E, 8'h36, 8'h3E, 8'h64, 8'h65};
    #1;
    for (int n = 0; n < 20000; n++) begin
      logic [7:0] b [16];
      int len, np, e_m, e_imm;
      bit o16, r;
      ent_t t;
      for (int i = 0; i < 16; i++) b[i] = 8'($urandom);
      t = tab[$urandom_range(0, tab.size() - 1)];
      np = $urandom_range(0, 3);
      o16 = 0; r = 0;
      len = 0;
      for (int i = 0; i < np; i++) begin
        b[len] = pre[$urandom_range(0, 7)];
        if (b[len] == 8'h66) o16 = 1;
        if (b[len] == 8'hF3) r = 1;
        len++;
      end
      if (t.two) begin b[len] = 8'h0F; len++; end
      b[len] = t.op; len++;
      if (t.m) begin
        logic [7:0] modrm, sib;
        modrm = 8'($urandom); sib = 8'($urandom);
        b[len] = modrm; len++;
        if (modrm[7:6] != 3) begin
          if (modrm[2:0] == 4) begin
            b[len] = sib; len++;
            if (modrm[7:6] == 0 && sib[2:0] == 5) len += 4;
          end else if (modrm[7:6] == 0 && modrm[2:0] == 5) len += 4;
          if (modrm[7:6] == 1) len += 1;
          if (modrm[7:6] == 2) len += 4;
        end
      end
      case (t.imm)
        1: len += 1;
        2: len += 2;
        3: len += o16 ? 2 : 4;
        4: len += o16 ? 4 : 6;
        default: ;
      endcase
      for (int i = 0; i < 16; i++) ir[8*i +: 8] = b[i];
      ir_valid_bytes = 5'($urandom_range(0, 16));
      #1;
      checks++;
      if (size !== 4'(len) || size_onehot !== 16'(1 << len) || n_prefix !== 2'(np) || opsize16 !== o16 ||
          rep !== r || two_byte !== t.two || has_modrm !== t.m || !known ||
          not_enough !== (len > int'(ir_valid_bytes))) begin
        failures++;
        $display("ERR op %h two=%0d np=%0d: size %0d expected %0d", t.op, t.two, np, size, len);
      end
    end
    // Opcodes outside the subset.
    for (int i = 0; i < 6; i++) begin
      logic [7:0] bad [6] = '{8'h0C, 8'h27, 8'h60, 8'hCC, 8'hF6, 8'hE4};
      ir = {120'($urandom), bad[i]};
      #1;
      checks++;
      if (known) begin failures++; $display("ERR %h taken as known", bad[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
