// tb_x86_system: end-to-end test of the whole machine at its default sizes
// (512-byte caches, 32 KB memory, 8-entry TLB, 4-cycle memory latency).
//
// Main memory is cleared before reset, so every instruction byte pair in
// the code area reads "00 00" (ADD r/m8, r8 with ModR/M 00), a 2-byte
// instruction. The
// testbench plays the part of the decoder/micro-instruction ROM: for each
// instruction address it drives the control word of the program below,
// and for an exception it inserts the handler micro-ops (push EIP, CS and
// EFLAGS, then read the handler address from the interrupt table and jump)
// and, for IRETD, reloads EFLAGS, releases the three stack slots and jumps
// through the saved EIP. It also plays the operating system for
// page faults by loading the missing TLB entry.
//
// Program: set up the interrupt table and stack, make a dependent ADD
// chain, loop 8 times storing to addresses 512 bytes apart (D-cache misses
// and dirty evictions; Jcc taken 7 times), store then load across a line
// boundary (ordering stall, unaligned access), REP MOVS of 4 doublewords,
// two characters to the monitor, a register-only loop of 3 (taken-branch
// timing without memory stalls), a store to an unmapped page (page fault,
// handled, then retried), a direct JMP whose target is first past the CS
// limit (general protection fault; the handler raises the limit and the
// JMP is retried), and a final self-loop. A key is
// typed while the loop runs (keyboard interrupt, whose handler echoes the
// key to the monitor).
//
// Checks: final registers, the monitor output, the count of taken-branch
// bubbles (exactly 4 between accepting a direct branch and accepting its
// target, measured only where no memory stall froze the pipeline meanwhile;
// at least one such branch is required), and
// that every mechanism happened at least once: I-cache miss, D-cache stall,
// eviction, unaligned access, ordering stall, scoreboard stall, forwarding,
// taken branch, REP MOVS copies, keyboard interrupt, page fault, general
// protection fault, monitor
// output and commits.
module tb_x86_system;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;

  logic [127:0] ir_head;
  logic [4:0]   ir_valid_bytes;
  logic [31:0]  dec_eip;
  logic [3:0]   len_size;
  logic [1:0]   len_n_prefix;
  logic len_opsize16, len_rep, len_two_byte, len_has_modrm, len_known, len_not_enough, dec_stall, dec_flush;
  logic dec_valid, dec_uop_stall;
  logic [3:0] dec_op;
  logic [1:0] dec_size;
  logic dec_a_en, dec_b_en, dec_imm_en, dec_base_en, dec_index_en;
  logic [2:0] dec_a_id, dec_b_id, dec_base_id, dec_index_id, dec_seg;
  logic [31:0] dec_imm, dec_disp;
  logic [1:0] dec_scale;
  logic dec_mem_rd, dec_mem_wr, dec_push, dec_pop, dec_wr_a, dec_wr_b, dec_jmp, dec_jcc, dec_jmp_ind, dec_idt;
  logic [3:0] dec_cc;
  logic dec_rep_movs, dec_pop_eflags, dec_handler_done;
  logic [5:0][31:0] seg_base, seg_limit;
  logic [15:0] cs_sel;
  logic [31:0] idtr_base;
  logic tlb_ld_en, tlb_ld_valid, tlb_ld_present, tlb_ld_readonly, tlb_ld_noncacheable;
  logic [2:0] tlb_ld_idx, tlb_ld_pfn;
  logic [19:0] tlb_ld_vpn;
  logic [1:0] tlb_ld_dev;
  logic exc_flush, exc_stall, exc_enabled, int2;
  logic [7:0] exc_vector;
  logic [31:0] exc_saved_eip, exc_saved_eflags;
  logic [15:0] exc_saved_cs;
  logic kb_valid, kb_ready, disp_valid, disp_pop, disp_overrun;
  logic [7:0] kb_data, disp_data;
  logic [7:0][31:0] gpr;
  logic [31:0] eflags;
  logic stat_commit, stat_mem_write, stat_icache_miss, stat_dcache_stall, stat_dcache_unaligned, stat_order_stall;
  logic stat_sb_stall, stat_forward, stat_branch_taken, stat_rep_copy, stat_bus_grant, stat_evict;

  x86_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERR %s", what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    $display("ERR watchdog at EIP %h", dec_eip);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ control words
  typedef struct {
    exop_e op; opsize_e size;
    bit a_en; logic [2:0] a_id; bit b_en; logic [2:0] b_id; bit imm_en; logic [31:0] imm;
    bit base_en; logic [2:0] base_id; logic [31:0] disp;
    bit mem_rd, mem_wr, push, pop, wr_a, wr_b, jmp, jcc; logic [3:0] cc; bit jmp_ind, idt, rep, pop_eflags;
    bit iret;    // testbench decoder: expand into the IRETD micro-ops
  } cw_t;

  localparam logic [2:0] EAX = 0, ECX = 1, EDX = 2, EBX = 3, ESP = 4, EBP = 5, ESI = 6, EDI = 7;

  function automatic cw_t nop();
    cw_t c;
    c = '{op: OP_MOV, size: SZ32, default: '0};
    return c;
  endfunction
  function automatic cw_t mov_ri(logic [2:0] r, logic [31:0] v);
    cw_t c = nop(); c.a_en = 1; c.a_id = r; c.wr_a = 1; c.imm_en = 1; c.imm = v; return c;
  endfunction
  function automatic cw_t alu_rr(exop_e op, logic [2:0] d, logic [2:0] s);
    cw_t c = nop(); c.op = op; c.a_en = 1; c.a_id = d; c.wr_a = 1; c.b_en = 1; c.b_id = s; return c;
  endfunction
  function automatic cw_t alu_ri(exop_e op, logic [2:0] d, logic [31:0] v);
    cw_t c = nop(); c.op = op; c.a_en = 1; c.a_id = d; c.wr_a = 1; c.imm_en = 1; c.imm = v; return c;
  endfunction
  function automatic cw_t store_i(logic [31:0] addr, logic [31:0] v);
    cw_t c = nop(); c.mem_wr = 1; c.disp = addr; c.imm_en = 1; c.imm = v; return c;
  endfunction
  function automatic cw_t store_r(bit base_en, logic [2:0] base, logic [31:0] disp, logic [2:0] r, opsize_e sz);
    cw_t c = nop(); c.mem_wr = 1; c.base_en = base_en; c.base_id = base; c.disp = disp;
    c.b_en = 1; c.b_id = r; c.size = sz; return c;
  endfunction
  function automatic cw_t load(logic [2:0] r, logic [31:0] addr, opsize_e sz);
    cw_t c = nop(); c.op = OP_ADD; c.a_en = 1; c.a_id = r; c.wr_a = 1; c.mem_rd = 1; c.disp = addr;
    c.imm_en = 1; c.imm = 0; c.size = sz; return c;
  endfunction
  function automatic cw_t push_r(logic [2:0] r);
    cw_t c = nop(); c.push = 1; c.b_en = 1; c.b_id = r; return c;
  endfunction
  function automatic cw_t push_i(logic [31:0] v);
    cw_t c = nop(); c.push = 1; c.imm_en = 1; c.imm = v; return c;
  endfunction
  function automatic cw_t pop_r(logic [2:0] r);
    cw_t c = nop(); c.pop = 1; c.a_en = 1; c.a_id = r; c.wr_a = 1; return c;
  endfunction
  function automatic cw_t jcc(logic [3:0] cc, logic [31:0] rel);
    cw_t c = nop(); c.jcc = 1; c.cc = cc; c.imm = rel; return c;
  endfunction
  function automatic cw_t jmp(logic [31:0] rel);
    cw_t c = nop(); c.jmp = 1; c.imm = rel; return c;
  endfunction

  cw_t prog [logic [31:0]];
  logic [31:0] pc_end, cs_limit0;

  task automatic put(inout logic [31:0] pc, input cw_t c);
    prog[pc] = c;
    pc += 2;
  endtask

  initial begin
    logic [31:0] pc, loop_top, t;
    cw_t c;
    pc = 0;
    put(pc, mov_ri(EAX, 32'h100));
    put(pc, store_i(32'h3000, 32'h800));          // INT1 handler
    put(pc, store_i(32'h3000 + 14 * 8, 32'h900)); // page fault handler
    put(pc, store_i(32'h3000 + 13 * 8, 32'hA00)); // general protection handler
    put(pc, mov_ri(ESP, 32'h2800));
    put(pc, mov_ri(EDX, 32'h1000));
    put(pc, mov_ri(ECX, 8));
    put(pc, mov_ri(EBX, 0));
    put(pc, alu_rr(OP_ADD, EBX, EAX));            // EBX = 0x100
    put(pc, alu_rr(OP_ADD, EBX, EBX));            // EBX = 0x200 (depends on the previous one)
    loop_top = pc;
    put(pc, store_r(1, EDX, 0, EBX, SZ32));
    put(pc, alu_ri(OP_ADD, EDX, 32'h200));
    put(pc, alu_ri(OP_ADD, ECX, 32'hFFFF_FFFF));
    put(pc, jcc(4'h5, loop_top - (pc + 2)));      // JNE loop
    put(pc, store_i(32'h100C, 32'h1122_3344));
    put(pc, load(EBP, 32'h100E, SZ32));           // 0x0000_1122, right behind the store
    put(pc, mov_ri(ECX, 4));
    put(pc, mov_ri(ESI, 32'h1000));
    put(pc, mov_ri(EDI, 32'h2000));
    c = nop(); c.rep = 1;               // REP MOVSD
    put(pc, c);
    put(pc, load(EAX, 32'h200C, SZ32));           // copied 0x1122_3344
    put(pc, mov_ri(EAX, 32'h41));
    put(pc, store_r(0, 0, 32'h7000, EAX, SZ8));   // monitor
    put(pc, alu_ri(OP_ADD, EAX, 1));
    put(pc, store_r(0, 0, 32'h7000, EAX, SZ8));
    put(pc, mov_ri(ECX, 3));                      // register-only loop: clean branch timing
    t = pc;
    put(pc, alu_ri(OP_ADD, EBX, 0));
    put(pc, alu_ri(OP_ADD, ECX, 32'hFFFF_FFFF));
    put(pc, jcc(4'h5, t - (pc + 2)));
    put(pc, store_r(0, 0, 32'h0010_0000, EAX, SZ32)); // unmapped page
    put(pc, load(EDX, 32'h0010_0000, SZ32));      // EDX = 0x42
    put(pc, jmp(32'd2));                          // skips the next one; first past the CS limit
    put(pc, mov_ri(EDX, 32'hDEAD));
    pc_end = pc;
    put(pc, jmp(32'hFFFF_FFFE));                  // self loop
    // keyboard interrupt handler: echo the key to the monitor
    t = 32'h800;
    put(t, push_r(EAX));
    put(t, load(EAX, 32'h6000, SZ8));
    put(t, store_r(0, 0, 32'h7000, EAX, SZ8));
    put(t, pop_r(EAX));
    c = nop(); c.iret = 1;
    put(t, c);
    // page fault handler: the testbench loads the TLB, then return
    t = 32'h900;
    c = nop(); c.iret = 1;
    put(t, c);
    // general protection handler: the testbench raises the CS limit, then return
    t = 32'hA00;
    put(t, c);
    cs_limit0 = pc_end - 1;   // the JMP to pc_end faults once
  end

  // ------------------------------------------------------------ decoder model
  cw_t q [$];            // inserted micro-ops
  bit  wait_redirect = 0;
  bit  q_last_handler = 0;
  cw_t cur;
  bit  cur_valid, cur_uop;

  always_comb begin
    cur_valid = 0; cur_uop = 0; cur = nop();
    if (q.size() > 0) begin
      cur = q[0]; cur_valid = 1; cur_uop = 1;
    end else if (!wait_redirect && !len_not_enough && prog.exists(dec_eip)) begin
      cur = prog[dec_eip]; cur_valid = !cur.iret;
    end
    dec_valid    = cur_valid;
    dec_uop_stall = cur_uop;
    dec_op = 4'(cur.op); dec_size = 2'(cur.size);
    dec_a_en = cur.a_en; dec_a_id = cur.a_id; dec_b_en = cur.b_en; dec_b_id = cur.b_id;
    dec_imm_en = cur.imm_en; dec_imm = cur.imm; dec_base_en = cur.base_en; dec_base_id = cur.base_id;
    dec_index_en = 0; dec_index_id = 0; dec_scale = 0; dec_disp = cur.disp; dec_seg = 3'd3;
    dec_mem_rd = cur.mem_rd; dec_mem_wr = cur.mem_wr; dec_push = cur.push; dec_pop = cur.pop;
    dec_wr_a = cur.wr_a; dec_wr_b = cur.wr_b; dec_jmp = cur.jmp; dec_jcc = cur.jcc; dec_cc = cur.cc;
    dec_jmp_ind = cur.jmp_ind; dec_idt = cur.idt; dec_rep_movs = cur.rep; dec_pop_eflags = cur.pop_eflags;
  end

  // The TLB load port: the page table at start-up, then the page the
  // operating system maps after the page fault (to physical page 5).
  bit pf_map = 0;
  int init_idx = 0;
  always @(posedge clk) begin
    tlb_ld_en <= 0;
    if (rst_n && init_idx < 8) begin
      tlb_ld_en <= 1; tlb_ld_idx <= 3'(init_idx); tlb_ld_vpn <= 20'(init_idx); tlb_ld_pfn <= 3'(init_idx);
      tlb_ld_valid <= 1; tlb_ld_present <= 1; tlb_ld_readonly <= 0;
      tlb_ld_noncacheable <= (init_idx >= 6);
      tlb_ld_dev <= (init_idx == 6) ? 2'd2 : (init_idx == 7) ? 2'd3 : 2'd1;
      init_idx++;
    end else if (pf_map) begin
      tlb_ld_en <= 1; tlb_ld_idx <= 5; tlb_ld_vpn <= 20'h00100; tlb_ld_pfn <= 5;
      tlb_ld_valid <= 1; tlb_ld_present <= 1; tlb_ld_readonly <= 0; tlb_ld_noncacheable <= 0; tlb_ld_dev <= 2'd1;
      pf_map = 0;
    end
  end

  wire accepted = dec_valid && !dec_stall && !dec_flush && !stat_branch_taken && rst_n;
  int n_int = 0, n_pf = 0, n_iret = 0, n_gp = 0;
  bit fill_handler = 0;

  always @(posedge clk) begin
    dec_handler_done <= 0;
    if (rst_n) begin
      if (exc_flush) begin
        cw_t c;
        q.delete();
        if (exc_vector == 8'd0) n_int++;
        if (exc_vector == 8'd14) begin
          n_pf++;
          pf_map = 1;
        end
        if (exc_vector == 8'd13) begin
          n_gp++;
          seg_limit[1] <= 32'hFFFF_FFFF;
        end
        fill_handler = 1;   // the saved state is valid from the next cycle
        wait_redirect = 1;
      end else if (fill_handler) begin
        cw_t c;
        fill_handler = 0;
        q.push_back(push_i(exc_saved_eflags));
        q.push_back(push_i({16'd0, exc_saved_cs}));
        q.push_back(push_i(exc_saved_eip));
        c = nop(); c.idt = 1; c.jmp_ind = 1; c.mem_rd = 0;
        q.push_back(c);
        q_last_handler = 1;
      end else if (dec_flush || stat_branch_taken) begin
        if (dec_flush && q.size() == 0) wait_redirect = 0;
      end else if (accepted) begin
        if (q.size() > 0) begin
          void'(q.pop_front());
          if (q.size() == 0 && q_last_handler) begin dec_handler_done <= 1; q_last_handler = 0; end
        end
      end else if (!dec_stall && q.size() == 0 && !wait_redirect && !len_not_enough &&
                   prog.exists(dec_eip) && prog[dec_eip].iret) begin
        cw_t c;
        n_iret++;
        // Stack from the top: EIP, CS, EFLAGS. EFLAGS is loaded first, then
        // ESP moves past all three, and the jump through the saved EIP is
        // the last micro-op, so nothing after it is lost to its redirect.
        c = nop(); c.pop_eflags = 1; c.base_en = 1; c.base_id = ESP; c.disp = 8; q.push_back(c);
        q.push_back(alu_ri(OP_ADD, ESP, 12));
        c = nop(); c.jmp_ind = 1; c.mem_rd = 1; c.base_en = 1; c.base_id = ESP; c.disp = 32'hFFFF_FFF4;
        q.push_back(c);
        wait_redirect = 1;
      end
    end
  end

  // ------------------------------------------------------------ environment
  byte shown [$];
  always @(posedge clk) if (rst_n && disp_valid && disp_pop) shown.push_back(disp_data);
  assign disp_pop = disp_valid;

  int n_icmiss = 0, n_dcstall = 0, n_evict = 0, n_unal = 0, n_order = 0, n_sb = 0, n_fwd = 0, n_br = 0;
  int n_rep = 0, n_commit = 0;
  always @(posedge clk) if (rst_n) begin
    n_icmiss  += int'(stat_icache_miss);
    n_dcstall += int'(stat_dcache_stall);
    n_evict   += int'(stat_evict);
    n_unal    += int'(stat_dcache_unaligned);
    n_order   += int'(stat_order_stall);
    n_sb      += int'(stat_sb_stall);
    n_fwd     += int'(stat_forward);
    n_br      += int'(stat_branch_taken);
    n_rep     += int'(stat_rep_copy);
    n_commit  += int'(stat_commit);
  end

  // Taken-branch bubbles: from accepting a direct branch to accepting the
  // next micro-op, less cycles frozen by memory, ordering or I-cache stalls.
  int br_cycle = -1, frozen = 0, cyc = 0, n_bub_ok = 0, n_bub_checked = 0;
  bit br_pending = 0;
  logic [31:0] br_target;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (br_pending && (stat_dcache_stall || stat_order_stall || stat_icache_miss)) frozen++;
    if (accepted && br_pending && dec_eip == br_target) begin
      if (frozen == 0) begin
        n_bub_checked++;
        if (cyc - br_cycle - 1 == 4) n_bub_ok++;
        else $display("ERR branch at cycle %0d: %0d bubbles", br_cycle, cyc - br_cycle - 1);
      end
      br_pending = 0;
    end
    if (accepted && (dec_jmp || dec_jcc) && q.size() == 0) begin
      br_pending = 1; br_cycle = cyc; frozen = 0; br_target = dec_eip + 32'd2 + dec_imm;
    end
    // a not-taken JNE: the next instruction in sequence comes through
    if (br_pending && cyc - br_cycle > 40) br_pending = 0;
    if (exc_flush) br_pending = 0;
  end

  initial begin
    int_init();
  end

  task automatic int_init();
    seg_base = '0;
    seg_limit = {6{32'hFFFF_FFFF}};
    cs_sel = 16'h0008;
    idtr_base = 32'h3000;
    int2 = 0; kb_valid = 0; kb_data = 0;
    dec_handler_done = 0;
  endtask

  initial begin
    // main memory powers up with unknown contents; the program model above
    // assumes zero-filled memory (every instruction fetched as 2 bytes)
    foreach (dut.u_mem.bank[i, j]) dut.u_mem.bank[i][j] = '0;
    #1;
    seg_limit[1] = cs_limit0;   // CS, set once the program is built
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // type a key while the program runs
    repeat ($urandom_range(150, 250)) @(posedge clk);
    kb_data <= 8'h5A; kb_valid <= 1;
    do @(posedge clk); while (!kb_ready);
    kb_valid <= 0;
    // wait for the end of the program
    // fetch runs ahead of commit, so the end EIP must hold for a while
    // (an exception behind it would change it)
    forever begin
      bit stable;
      wait (dec_eip == pc_end && q.size() == 0);
      stable = 1;
      repeat (60) begin
        @(posedge clk);
        // the self loop's fetch runs up to two instructions past it
        if (dec_eip < pc_end || dec_eip > pc_end + 4 || q.size() != 0 || exc_flush) stable = 0;
      end
      if (stable) break;
    end

    $display("icache_miss=%0d dcache_stall=%0d evict=%0d unaligned=%0d order=%0d sb=%0d fwd=%0d branch=%0d rep=%0d int=%0d pf=%0d iret=%0d commit=%0d bubbles ok %0d/%0d",
             n_icmiss, n_dcstall, n_evict, n_unal, n_order, n_sb, n_fwd, n_br, n_rep, n_int, n_pf, n_iret, n_commit,
             n_bub_ok, n_bub_checked);
    chk(gpr[EAX] == 32'h42, $sformatf("EAX %h", gpr[EAX]));
    chk(gpr[ECX] == 32'h0, $sformatf("ECX %h", gpr[ECX]));
    chk(gpr[EDX] == 32'h42, $sformatf("EDX %h", gpr[EDX]));
    chk(gpr[EBX] == 32'h200, $sformatf("EBX %h", gpr[EBX]));
    chk(gpr[ESP] == 32'h2800, $sformatf("ESP %h", gpr[ESP]));
    chk(gpr[EBP] == 32'h1122, $sformatf("EBP %h", gpr[EBP]));
    chk(gpr[ESI] == 32'h1010, $sformatf("ESI %h", gpr[ESI]));
    chk(gpr[EDI] == 32'h2010, $sformatf("EDI %h", gpr[EDI]));
    chk(shown.size() == 3, $sformatf("%0d characters shown", shown.size()));
    if (shown.size() == 3) begin
      chk(shown[0] == 8'h41 || shown[0] == 8'h5A, "first character");
      chk(8'h41 inside {shown[0], shown[1]} && 8'h42 inside {shown[1], shown[2]} && 8'h5A inside {shown[0], shown[1], shown[2]},
          "characters A, B and the typed key");
    end
    chk(n_icmiss > 0, "no I-cache miss");
    chk(n_dcstall > 0, "no D-cache stall");
    chk(n_evict > 0, "no eviction");
    chk(n_unal > 0, "no unaligned access");
    chk(n_order > 0, "no ordering stall");
    chk(n_sb > 0, "no scoreboard stall");
    chk(n_fwd > 0, "no forwarding");
    chk(n_br >= 9, "too few taken branches");
    chk(n_rep == 4, $sformatf("REP MOVS copies %0d", n_rep));
    chk(n_int == 1, "keyboard interrupt count");
    chk(n_pf == 1, "page fault count");
    chk(n_iret == 3, "IRETD count");
    chk(n_gp == 1, "general protection (branch past the CS limit) count");
    chk(n_commit > 40, "commits");
    chk(n_bub_checked > 0 && n_bub_ok == n_bub_checked, "taken branch bubbles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
