// tb_exec_unit: checks every execution unit against a reference written
// here with loops and signed arithmetic: results for all three operand
// sizes, the flags each operation writes, and which flags it writes.
module tb_exec_unit;
  import x86_pkg::*;
  exop_e op;
  opsize_e size;
  logic [31:0] a, b, r, r2;
  flags_t fi, fo, fwe;
  int checks = 0, failures = 0;
  int per_op [11];
  exec_unit dut (.op, .size, .a, .b, .flags_in(fi), .result(r), .result2(r2), .flags_out(fo), .flags_we(fwe));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int w_of(opsize_e z);
    return z == SZ8 ? 8 : z == SZ16 ? 16 : 32;
  endfunction

  task automatic check_one();
    int w;
    longint ua, ub, m, res, sres;
    logic [31:0] er, er2;
    flags_t ef, ewe;
    int cnt;
    w  = w_of(size);
    m  = (longint'(1) << w) - 1;
    ua = longint'(a) & m;
    ub = longint'(b) & m;
    er = 0; er2 = 0; ef = fi; ewe = '0;
    cnt = b[4:0];
    case (op)
      OP_ADD, OP_INC: begin
        longint sa, sb;
        if (op == OP_INC) ub = 1;
        res = ua + ub;
        er  = 32'(res & m);
        sa  = (ua >= (longint'(1) << (w-1))) ? ua - (longint'(1) << w) : ua;
        sb  = (ub >= (longint'(1) << (w-1))) ? ub - (longint'(1) << w) : ub;
        sres = sa + sb;
        ef.of_ = (sres >= (longint'(1) << (w-1))) || (sres < -(longint'(1) << (w-1)));
        if (op == OP_ADD) ef.cf = res > m;
        ef.af = ((ua & 15) + (ub & 15)) > 15;
        ewe = '{af:1, cf: op == OP_ADD, df:0, of_:1, pf:1, sf:1, zf:1};
      end
      OP_XOR: begin
        er = 32'((ua ^ ub) & m); ef.cf = 0; ef.of_ = 0;
        ewe = '{af:0, cf:1, df:0, of_:1, pf:1, sf:1, zf:1};
      end
      OP_BSWAP: for (int k = 0; k < 4; k++) er[8*k +: 8] = a[8*(3-k) +: 8];
      OP_BTS: begin
        int bi = int'(b[4:0]) % w;
        ef.cf = a[bi];
        er = 32'(ua) | (32'd1 << bi);
        ewe.cf = 1;
      end
      OP_ROR: begin
        logic [31:0] v = 32'(ua);
        for (int k = 0; k < cnt % w; k++) v = 32'((v >> 1) | ((v & 1) << (w - 1)));
        er = v;
        if (cnt != 0) begin
          ef.cf = v[w-1]; ef.of_ = v[w-1] ^ v[w-2];
          ewe.cf = 1; ewe.of_ = 1;
        end
      end
      OP_SAL: begin
        longint v = ua;
        logic c = fi.cf;
        for (int k = 0; k < cnt; k++) begin c = (v >> (w-1)) & 1; v = (v << 1) & m; end
        er = 32'(v);
        if (cnt != 0) begin
          ef.cf = c; ef.of_ = er[w-1] ^ c;
          ewe = '{af:0, cf:1, df:0, of_:1, pf:1, sf:1, zf:1};
        end
      end
      OP_SAR: begin
        longint v = ua;
        logic c = fi.cf;
        logic s = ua[w-1];
        for (int k = 0; k < cnt; k++) begin c = v & 1; v = (v >> 1) | (longint'(s) << (w-1)); end
        er = 32'(v);
        if (cnt != 0) begin
          ef.cf = c; ef.of_ = 0;
          ewe = '{af:0, cf:1, df:0, of_:1, pf:1, sf:1, zf:1};
        end
      end
      OP_MOV:  er = 32'(ub);
      OP_XCHG: begin er = 32'(ub); er2 = 32'(ua); end
      OP_STACK: er = a + b;
      default: ;
    endcase
    if (ewe.zf) begin
      ef.zf = (er == 0);
      ef.sf = er[w-1];
      ef.pf = ~^er[7:0];
    end
    checks++;
    per_op[op]++;
    if (r !== er || r2 !== er2 || fwe !== ewe || ((fo ^ ef) & ewe) != 0) begin
      failures++;
      $display("ERR op=%s size=%0d a=%h b=%h: r=%h exp %h r2=%h exp %h we=%b exp %b f=%b exp %b",
               op.name(), w, a, b, r, er, r2, er2, fwe, ewe, fo, ef);
    end
  endtask

  initial begin
    for (int i = 0; i < 30000; i++) begin
      op   = exop_e'($urandom_range(0, 10));
      size = opsize_e'($urandom_range(0, 2));
      if (op == OP_BSWAP) size = SZ32;
      a = $urandom; b = $urandom;
      if (i % 5 == 0) b = $urandom_range(0, 33);
      if (i % 11 == 0) a = 32'hFFFF_FFFF;
      fi = flags_t'($urandom);
      #1;
      check_one();
    end
    for (int k = 0; k < 11; k++) begin
      checks++; if (per_op[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
