// x86_system: the complete machine. A 7-stage pipelined processor (fetch,
// decode, register read, address generation, D-cache access, execute,
// writeback) for a subset of 32-bit x86, with separate instruction and data
// caches that share one system bus with main memory, the keyboard
// controller and the monitor controller.
//
// What is inside:
//  * Fetch: fetch_unit (32-byte instruction register, EIP / EIP+CS / VIP+CS
//    latches) reading the icache; the fetch address is translated by TLB
//    port 0. insn_length measures the instruction at the head of the IR.
//  * Decode: the micro-instruction ROM and the decoder that turns opcode
//    bits into a control word are NOT part of this design. Their output
//    arrives on the dec_* ports, one micro-op per cycle, and the stall,
//    flush and exception outputs (dec_stall, dec_flush, exc_*) go back to
//    them. dec_uop_stall says more micro-ops of the same instruction
//    follow, so the IR is not shifted yet.
//  * Register read (RR): regfile_sb with 4 read and 3 write ports and the
//    tag scoreboard; forwarding from EX and WB. An instruction leaving RR
//    invalidates the registers it will write. RR also waits while a branch
//    is further down the pipe, so nothing younger than a branch ever
//    touches the scoreboard.
//  * Address generation (AG): agu (ModR/M, stack and interrupt-table
//    addresses), rep_movs_unit (one REP MOVS iteration per cycle while the
//    front end is held), TLB ports 1-7 (page fault, write to a read-only
//    page, non-cacheable device) and seg_limit_check (segment limit).
//  * D-cache (DC): the memory read of the instruction, through mem_order,
//    which keeps reads behind older writes and gives the writeback stage's
//    write priority on the single D-cache port. Direct JMP and Jcc are
//    resolved here (flags forwarded from EX and WB), so a taken branch
//    costs 4 bubbles; a target past the CS limit raises a general
//    protection fault instead of redirecting; JMP through a register or memory (and the interrupt
//    table read) is resolved at writeback.
//  * Execute (EX): exec_unit.
//  * Writeback (WB): wb_stage (register/flag/memory writes, exception and
//    interrupt priority, flush). INT1 is the keyboard interrupt, INT2 the
//    int2 pin. The vector is latched at the flush, because the interrupt
//    table is read several micro-ops later.
//  * Memory system: icache, dcache, bus_arbiter (D-cache first), mem_ctrl
//    (32 KB main memory), keyboard_ctrl, monitor_ctrl on the OR-combined
//    bus.
//
// Stalls: a D-cache stall freezes every stage. A read held by mem_order
// freezes fetch to DC and sends a bubble into EX. A scoreboard stall, a
// branch in flight or a running REP MOVS holds fetch to RR and sends
// bubbles into AG. A flush from WB empties RR to EX, stops REP MOVS and
// clears the scoreboard.
//
// This design's choices (not given by the design it follows): the control
// word on the dec_* ports; segment bases and limits supplied as inputs
// (descriptor loading is not part of the design); the TLB loaded from the
// tlb_ld_* inputs; the interrupt-table entry is one doubleword holding the
// handler's EIP; a fetch whose page is not present simply waits; REP MOVS
// copies are not checked against the segment limit; an access crossing a
// page boundary is sent to the next physical line; the INT2 pin must be
// held until the interrupt is taken. Ports named stat_* exist only so that
// activity can be observed.
module x86_system
  import x86_pkg::*;
#(
  parameter int unsigned MEM_BYTES   = 32768,
  parameter int unsigned MEM_LATENCY = 4,
  parameter int unsigned CACHE_BYTES = 512,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned KB_DEPTH    = 256,
  parameter int unsigned MON_DEPTH   = 256,
  parameter logic [31:0] RESET_EIP    = 32'h0,
  parameter logic [31:0] RESET_EIP_CS = 32'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction register view for the decoder
  output logic [127:0]      ir_head,
  output logic [4:0]        ir_valid_bytes,
  output logic [31:0]       dec_eip,
  output logic [3:0]        len_size,
  output logic [1:0]        len_n_prefix,
  output logic              len_opsize16,
  output logic              len_rep,
  output logic              len_two_byte,
  output logic              len_has_modrm,
  output logic              len_known,
  output logic              len_not_enough,
  output logic              dec_stall,
  output logic              dec_flush,
  // control word from the decoder / micro-instruction ROM
  input  logic              dec_valid,
  input  logic              dec_uop_stall,
  input  logic [3:0]        dec_op,
  input  logic [1:0]        dec_size,
  input  logic              dec_a_en,
  input  logic [2:0]        dec_a_id,
  input  logic              dec_b_en,
  input  logic [2:0]        dec_b_id,
  input  logic              dec_imm_en,
  input  logic [31:0]       dec_imm,
  input  logic              dec_base_en,
  input  logic [2:0]        dec_base_id,
  input  logic              dec_index_en,
  input  logic [2:0]        dec_index_id,
  input  logic [1:0]        dec_scale,
  input  logic [31:0]       dec_disp,
  input  logic [2:0]        dec_seg,
  input  logic              dec_mem_rd,
  input  logic              dec_mem_wr,
  input  logic              dec_push,
  input  logic              dec_pop,
  input  logic              dec_wr_a,
  input  logic              dec_wr_b,
  input  logic              dec_jmp,
  input  logic              dec_jcc,
  input  logic [3:0]        dec_cc,
  input  logic              dec_jmp_ind,
  input  logic              dec_idt,
  input  logic              dec_rep_movs,
  input  logic              dec_pop_eflags,
  input  logic              dec_handler_done,
  // segment descriptors and page table entries
  input  logic [5:0][31:0]  seg_base,
  input  logic [5:0][31:0]  seg_limit,
  input  logic [15:0]       cs_sel,
  input  logic [31:0]       idtr_base,
  input  logic              tlb_ld_en,
  input  logic [2:0]        tlb_ld_idx,
  input  logic [19:0]       tlb_ld_vpn,
  input  logic [2:0]        tlb_ld_pfn,
  input  logic              tlb_ld_valid,
  input  logic              tlb_ld_present,
  input  logic              tlb_ld_readonly,
  input  logic              tlb_ld_noncacheable,
  input  logic [1:0]        tlb_ld_dev,
  // exception state for the decoder's handler micro-ops
  output logic              exc_flush,
  output logic [7:0]        exc_vector,
  output logic              exc_stall,
  output logic [31:0]       exc_saved_eip,
  output logic [15:0]       exc_saved_cs,
  output logic [31:0]       exc_saved_eflags,
  output logic              exc_enabled,
  input  logic              int2,
  // devices
  input  logic              kb_valid,
  input  logic [7:0]        kb_data,
  output logic              kb_ready,
  output logic              disp_valid,
  output logic [7:0]        disp_data,
  input  logic              disp_pop,
  output logic              disp_overrun,
  // architectural state and activity
  output logic [7:0][31:0]  gpr,
  output logic [31:0]       eflags,
  output logic              stat_commit,
  output logic              stat_mem_write,
  output logic              stat_icache_miss,
  output logic              stat_dcache_stall,
  output logic              stat_dcache_unaligned,
  output logic              stat_order_stall,
  output logic              stat_sb_stall,
  output logic              stat_forward,
  output logic              stat_branch_taken,
  output logic              stat_rep_copy,
  output logic              stat_bus_grant,
  output logic              stat_evict
);
  localparam logic [2:0] R_ECX = 3'd1, R_ESP = 3'd4, R_ESI = 3'd6, R_EDI = 3'd7;
  localparam logic [2:0] S_CS = 3'd1, S_SS = 3'd2, S_ES = 3'd0;

  // ---------------------------------------------------------------- types
  typedef struct packed {
    logic        valid;
    exop_e       op;
    opsize_e     size;
    logic        a_en;
    logic [2:0]  a_id;
    logic        b_en;
    logic [2:0]  b_id;
    logic        imm_en;
    logic [31:0] imm;
    logic        base_en;
    logic [2:0]  base_id;
    logic        index_en;
    logic [2:0]  index_id;
    logic [1:0]  scale;
    logic [31:0] disp;
    logic [2:0]  seg;
    logic        mem_rd;
    logic        mem_wr;
    logic        push;
    logic        pop;
    logic        wr_a;
    logic        wr_b;
    logic        jmp;
    logic        jcc;
    logic [3:0]  cc;
    logic        jmp_ind;
    logic        idt;
    logic        rep;
    logic        pop_eflags;
    logic [31:0] eip;
    logic [3:0]  len;
    logic [7:0]  tag;
  } uop_t;

  // Operands carried after register read.
  typedef struct packed {
    logic [31:0] a_raw;
    logic [31:0] b_raw;
    logic [31:0] base_raw;
    logic [31:0] index_raw;
  } opnd_t;

  // Memory side information carried after address generation.
  typedef struct packed {
    logic [14:0] rd_paddr;
    logic        rd_nc;
    dev_id_e     rd_dev;
    logic [14:0] wr_paddr;
    logic        wr_nc;
    dev_id_e     wr_dev;
    logic        pf;
    logic        gp;
    logic [31:0] stack_off;
    logic        rep_copy;
    logic [31:0] rep_ecx;
    logic [31:0] rep_esi;
    logic [31:0] rep_edi;
  } mem_t;

  function automatic logic [2:0] phys_id(input logic [2:0] id, input opsize_e sz);
    return (sz == SZ8) ? {1'b0, id[1:0]} : id;
  endfunction

  function automatic logic [31:0] extract(input logic [31:0] raw, input logic [2:0] id, input opsize_e sz);
    unique case (sz)
      SZ8:     return (id[2]) ? {24'd0, raw[15:8]} : {24'd0, raw[7:0]};
      SZ16:    return {16'd0, raw[15:0]};
      default: return raw;
    endcase
  endfunction

  function automatic logic [31:0] size_mask(input logic [31:0] v, input opsize_e sz);
    unique case (sz)
      SZ8:     return {24'd0, v[7:0]};
      SZ16:    return {16'd0, v[15:0]};
      default: return v;
    endcase
  endfunction

  function automatic logic cond(input logic [3:0] cc, input flags_t f);
    logic r;
    unique case (cc[3:1])
      3'd0: r = f.of_;
      3'd1: r = f.cf;
      3'd2: r = f.zf;
      3'd3: r = f.cf || f.zf;
      3'd4: r = f.sf;
      3'd5: r = f.pf;
      3'd6: r = f.sf != f.of_;
      default: r = f.zf || (f.sf != f.of_);
    endcase
    return r ^ cc[0];
  endfunction

  function automatic flags_t merge_flags(input flags_t base, input flags_t vals, input flags_t we);
    return (base & ~we) | (vals & we);
  endfunction

  // ---------------------------------------------------------------- signals
  bus_m_t ic_bus, dc_bus, bus_m;
  bus_s_t mem_bus, kb_bus, mon_bus, bus_s;
  logic   ic_br, ic_bg, dc_br, dc_bg;
  logic   kb_irq;

  logic         f_ic_req, f_ic_hit;
  logic [31:0]  f_ic_addr;
  logic [127:0] f_ic_data;
  logic [4:0]   f_ic_nbytes;
  logic [255:0] f_ir;
  logic         ic_stall;

  logic         redirect;
  logic [31:0]  redirect_eip;

  logic [7:0]         lk_en, lk_write, lk_nc, lk_pf, lk_gp;
  logic [7:0][31:0]   lk_vaddr;
  logic [7:0][14:0]   lk_paddr;
  dev_id_e [7:0]      lk_dev;

  uop_t  rr_q, ag_q, dc_q, ex_q, wb_q;
  opnd_t ag_o, dc_o, ex_o, wb_o;
  mem_t  dc_m, ex_m, wb_m;
  logic [31:0] ex_mdata, wb_mdata;      // data read at DC
  logic [31:0] wb_result, wb_result2;
  flags_t      wb_fvals, wb_fwe;
  logic [31:0] wb_wdata;
  logic [7:0]  tag_ctr;

  flags_t flags_q;
  logic [7:0] exc_vec_q;   // vector of the exception being handled

  // stall and flush
  logic mem_stall, dc_block, s_dc, s_ag, s_rr, sb_stall, br_stall, rep_hold;
  logic wb_flush, wb_redirect, dc_redirect, kill_young;

  // ================================================================ fetch
  logic [3:0] consumed_size;
  assign consumed_size = dec_valid ? len_size : 4'd0;

  fetch_unit #(
    .IR_BYTES(32), .LINE_BYTES(LINE_BYTES), .RESET_EIP(RESET_EIP), .RESET_EIP_CS(RESET_EIP_CS)
  ) u_fetch (
    .clk, .rst_n,
    .ic_req(f_ic_req), .ic_addr(f_ic_addr), .ic_hit(f_ic_hit), .ic_data(f_ic_data), .ic_nbytes(f_ic_nbytes),
    .ir(f_ir), .ir_valid_bytes,
    .dec_size(consumed_size), .dec_not_enough(len_not_enough), .dec_uop_stall,
    .hold(s_rr), .redirect, .redirect_eip, .redirect_eip_cs(redirect_eip + seg_base[S_CS]),
    .eip(dec_eip), .eip_cs(), .vip_cs(), .appended()
  );
  assign ir_head = f_ir[127:0];

  insn_length u_len (
    .ir(ir_head), .ir_valid_bytes,
    .size(len_size), .size_onehot(), .n_prefix(len_n_prefix), .opsize16(len_opsize16), .rep(len_rep),
    .two_byte(len_two_byte), .has_modrm(len_has_modrm), .known(len_known), .not_enough(len_not_enough)
  );

  icache #(.SIZE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n,
    .req(f_ic_req && !lk_pf[0]), .vaddr(f_ic_addr), .ptag(lk_paddr[0][BUS_ADDR_W-1:$clog2(CACHE_BYTES)]),
    .hit(f_ic_hit), .stall(ic_stall), .data(f_ic_data), .nbytes(f_ic_nbytes),
    .br(ic_br), .bg(ic_bg), .bus_out(ic_bus), .bus_in(bus_s)
  );

  // ================================================================ decode -> RR
  uop_t dec_u;
  always_comb begin
    dec_u          = '0;
    dec_u.valid    = dec_valid && !len_not_enough;
    dec_u.op       = exop_e'(dec_op);
    dec_u.size     = opsize_e'(dec_size);
    dec_u.a_en     = dec_a_en;
    dec_u.a_id     = dec_a_id;
    dec_u.b_en     = dec_b_en;
    dec_u.b_id     = dec_b_id;
    dec_u.imm_en   = dec_imm_en;
    dec_u.imm      = dec_imm;
    dec_u.base_en  = dec_base_en;
    dec_u.base_id  = dec_base_id;
    dec_u.index_en = dec_index_en;
    dec_u.index_id = dec_index_id;
    dec_u.scale    = dec_scale;
    dec_u.disp     = dec_disp;
    dec_u.seg      = dec_seg;
    dec_u.mem_rd   = dec_mem_rd;
    dec_u.mem_wr   = dec_mem_wr;
    dec_u.push     = dec_push;
    dec_u.pop      = dec_pop;
    dec_u.wr_a     = dec_wr_a;
    dec_u.wr_b     = dec_wr_b;
    dec_u.jmp      = dec_jmp;
    dec_u.jcc      = dec_jcc;
    dec_u.cc       = dec_cc;
    dec_u.jmp_ind  = dec_jmp_ind;
    dec_u.idt      = dec_idt;
    dec_u.rep      = dec_rep_movs;
    dec_u.pop_eflags = dec_pop_eflags;
    dec_u.eip      = dec_eip;
    dec_u.len      = dec_uop_stall ? 4'd0 : len_size;
  end
  assign dec_stall = s_rr;
  assign dec_flush = kill_young;

  // ================================================================ register read
  logic [3:0]       rf_rd_en;
  logic [3:0][2:0]  rf_rd_id;
  logic [3:0][31:0] rf_rd_data;
  logic [2:0]       rf_inv_en;
  logic [2:0][2:0]  rf_inv_id;
  logic             rr_issue;
  logic             fwd_ex_en;
  logic [2:0]       wb_reg_we;
  logic [2:0][2:0]  wb_reg_id;
  logic [2:0][31:0] wb_reg_value;
  logic [7:0]       rf_valid;

  always_comb begin
    rf_rd_en    = '0;
    rf_rd_id    = '0;
    rf_rd_en[0] = rr_q.valid && (rr_q.a_en || rr_q.rep);
    rf_rd_id[0] = rr_q.rep ? R_ECX : phys_id(rr_q.a_id, rr_q.size);
    rf_rd_en[1] = rr_q.valid && (rr_q.b_en || rr_q.rep);
    rf_rd_id[1] = rr_q.rep ? R_ESI : phys_id(rr_q.b_id, rr_q.size);
    rf_rd_en[2] = rr_q.valid && (rr_q.base_en || rr_q.push || rr_q.pop || rr_q.rep);
    rf_rd_id[2] = rr_q.rep ? R_EDI : (rr_q.push || rr_q.pop) ? R_ESP : rr_q.base_id;
    rf_rd_en[3] = rr_q.valid && rr_q.index_en;
    rf_rd_id[3] = rr_q.index_id;
  end

  // A branch anywhere from AG to WB blocks RR (younger work never starts).
  assign br_stall = rr_q.valid &&
                    ((ag_q.valid && (ag_q.jmp || ag_q.jcc || ag_q.jmp_ind)) ||
                     (dc_q.valid && (dc_q.jmp || dc_q.jcc || dc_q.jmp_ind)) ||
                     (ex_q.valid && ex_q.jmp_ind) || (wb_q.valid && wb_q.jmp_ind));
  assign rr_issue = rr_q.valid && !s_ag && !sb_stall && !br_stall && !kill_young;

  always_comb begin
    rf_inv_en    = '0;
    rf_inv_id    = '0;
    rf_inv_en[0] = rr_issue && rr_q.wr_a;
    rf_inv_id[0] = phys_id(rr_q.a_id, rr_q.size);
    rf_inv_en[1] = rr_issue && rr_q.wr_b;
    rf_inv_id[1] = phys_id(rr_q.b_id, rr_q.size);
    rf_inv_en[2] = rr_issue && (rr_q.push || rr_q.pop);
    rf_inv_id[2] = R_ESP;
  end

  logic [31:0] ex_result, ex_result2;
  flags_t      ex_fout, ex_fwe;

  assign fwd_ex_en = ex_q.valid && ex_q.wr_a && !ex_q.pop && !ex_q.rep && ex_q.size == SZ32 && !ex_q.mem_rd;

  regfile_sb #(.NREGS(8), .RD_PORTS(4), .WR_PORTS(3), .TAG_W(8)) u_gpr (
    .clk, .rst_n, .clear(wb_flush),
    .rd_en(rf_rd_en), .rd_id(rf_rd_id), .rd_data(rf_rd_data), .rd_ready(), .stall(sb_stall),
    .inv_en(rf_inv_en), .inv_id(rf_inv_id), .inv_tag(tag_ctr),
    .wr_en(wb_reg_we), .wr_id(wb_reg_id), .wr_data(wb_reg_value), .wr_tag(wb_q.tag),
    .fwd_ex_en, .fwd_ex_id(ex_q.a_id), .fwd_ex_tag(ex_q.tag), .fwd_ex_data(ex_result),
    .fwd_wb_en(wb_reg_we[0]), .fwd_wb_id(wb_reg_id[0]), .fwd_wb_tag(wb_q.tag), .fwd_wb_data(wb_reg_value[0]),
    .regs_out(gpr), .valid_out(rf_valid)
  );

  // ================================================================ address generation
  logic [31:0] agu_modrm_addr, agu_modrm_off, agu_modrm_high, agu_stack_addr, agu_stack_off, agu_stack_high, agu_idt;
  logic [2:0]  rep_uop;
  logic        rep_mem_valid, rep_wb_regs;
  logic [31:0] rep_rd_addr, rep_rd_high, rep_wr_addr, rep_wr_high, rep_ecx, rep_esi, rep_edi;
  logic        rep_start, seg_gp;
  logic [31:0] m_addr, m_high;
  logic [2:0]  nbytes_m1;

  agu u_agu (
    .seg_base(seg_base[ag_q.seg]), .base_val(ag_o.base_raw), .base_en(ag_q.base_en),
    .index_val(ag_o.index_raw), .index_en(ag_q.index_en), .scale_log2(ag_q.scale), .disp(ag_q.disp),
    .size(ag_q.size), .ss_base(seg_base[S_SS]), .esp(ag_o.base_raw), .is_push(ag_q.push),
    .idtr_base, .vector(exc_vec_q), .second_dword(1'b0),
    .modrm_addr(agu_modrm_addr), .modrm_offset(agu_modrm_off), .modrm_high(agu_modrm_high),
    .stack_addr(agu_stack_addr), .stack_offset(agu_stack_off), .stack_high(agu_stack_high), .idt_addr(agu_idt)
  );

  assign rep_start = ag_q.valid && ag_q.rep && rep_uop == 3'd0 && !kill_young;
  rep_movs_unit u_rep (
    .clk, .rst_n, .start(rep_start), .flush(kill_young), .adv(!s_dc),
    .ecx(ag_o.a_raw), .esi(ag_o.b_raw), .edi(ag_o.base_raw),
    .src_seg_base(seg_base[ag_q.seg]), .es_base(seg_base[S_ES]), .size(ag_q.size), .df(flags_q.df),
    .uop(rep_uop), .busy(), .rep_done(), .mem_valid(rep_mem_valid), .wb_regs(rep_wb_regs),
    .rd_addr(rep_rd_addr), .rd_high(rep_rd_high), .wr_addr(rep_wr_addr), .wr_high(rep_wr_high),
    .next_ecx(rep_ecx), .next_esi(rep_esi), .next_edi(rep_edi)
  );
  // The REP MOVS instruction stays in AG until REP_DONE has been passed.
  assign rep_hold = ag_q.valid && ag_q.rep && !(rep_uop == 3'd4);

  assign m_addr = ag_q.rep ? rep_wr_addr : ag_q.idt ? agu_idt : agu_modrm_addr;
  assign m_high = ag_q.rep ? rep_wr_high : ag_q.idt ? agu_idt + 32'd3 : agu_modrm_high;

  always_comb begin
    lk_en       = '0;
    lk_write    = '0;
    lk_vaddr    = '0;
    lk_en[0]    = f_ic_req;
    lk_vaddr[0] = f_ic_addr;
    lk_en[1]    = ag_q.valid && (ag_q.mem_rd || ag_q.mem_wr || ag_q.idt || ag_q.rep);
    lk_vaddr[1] = m_addr;
    lk_write[1] = ag_q.mem_wr || ag_q.rep;
    lk_en[2]    = lk_en[1];
    lk_vaddr[2] = m_high;
    lk_write[2] = lk_write[1];
    lk_en[3]    = ag_q.valid && (ag_q.push || ag_q.pop);
    lk_vaddr[3] = agu_stack_addr;
    lk_write[3] = ag_q.push;
    lk_en[4]    = lk_en[3];
    lk_vaddr[4] = agu_stack_high;
    lk_write[4] = ag_q.push;
    lk_en[5]    = ag_q.valid && ag_q.rep;
    lk_vaddr[5] = rep_rd_addr;
    lk_en[6]    = lk_en[5];
    lk_vaddr[6] = rep_rd_high;
    lk_en[7]    = f_ic_req;
    lk_vaddr[7] = f_ic_addr | 32'(LINE_BYTES - 1);
  end

  tlb #(.ENTRIES(8), .NPORTS(8), .PAGE_BITS(12)) u_tlb (
    .clk, .rst_n,
    .ld_en(tlb_ld_en), .ld_idx(tlb_ld_idx), .ld_vpn(tlb_ld_vpn), .ld_pfn(tlb_ld_pfn), .ld_valid(tlb_ld_valid),
    .ld_present(tlb_ld_present), .ld_readonly(tlb_ld_readonly), .ld_noncacheable(tlb_ld_noncacheable),
    .ld_dev(dev_id_e'(tlb_ld_dev)),
    .lk_en, .lk_vaddr, .lk_write, .lk_paddr, .lk_noncacheable(lk_nc), .lk_dev, .lk_pf, .lk_gp
  );

  assign nbytes_m1 = (ag_q.size == SZ8) ? 3'd1 : (ag_q.size == SZ16) ? 3'd2 : 3'd4;
  seg_limit_check u_seg (
    .en(ag_q.valid && !ag_q.rep && !ag_q.idt && (ag_q.mem_rd || ag_q.mem_wr || ag_q.push || ag_q.pop)),
    .offset((ag_q.push || ag_q.pop) ? agu_stack_off : agu_modrm_off),
    .nbytes((ag_q.push && ag_q.size == SZ8) ? 3'd4 : nbytes_m1),
    .limit((ag_q.push || ag_q.pop) ? seg_limit[S_SS] : seg_limit[ag_q.seg]),
    .gp(seg_gp)
  );

  // AG output towards DC: the instruction itself, or one REP MOVS copy.
  uop_t ag_out;
  mem_t ag_m;
  always_comb begin
    logic stk;
    stk           = ag_q.push || ag_q.pop;
    ag_out        = ag_q;
    ag_m          = '0;
    if (ag_q.rep) begin
      ag_out.valid  = ag_q.valid && rep_mem_valid && !kill_young;
      ag_out.mem_rd = 1'b1;
      ag_out.mem_wr = 1'b1;
      ag_m.rd_paddr = lk_paddr[5];
      ag_m.rd_nc    = lk_nc[5];
      ag_m.rd_dev   = lk_dev[5];
      ag_m.wr_paddr = lk_paddr[1];
      ag_m.wr_nc    = lk_nc[1];
      ag_m.wr_dev   = lk_dev[1];
      ag_m.pf       = lk_pf[5] || lk_pf[6] || lk_pf[1] || lk_pf[2];
      ag_m.gp       = lk_gp[1] || lk_gp[2];
      ag_m.rep_copy = rep_mem_valid;
      ag_m.rep_ecx  = rep_ecx;
      ag_m.rep_esi  = rep_esi;
      ag_m.rep_edi  = rep_edi;
    end else begin
      ag_out.valid  = ag_q.valid && !kill_young;
      ag_m.rd_paddr = stk ? lk_paddr[3] : lk_paddr[1];
      ag_m.rd_nc    = stk ? lk_nc[3] : lk_nc[1];
      ag_m.rd_dev   = stk ? lk_dev[3] : lk_dev[1];
      ag_m.wr_paddr = ag_m.rd_paddr;
      ag_m.wr_nc    = ag_m.rd_nc;
      ag_m.wr_dev   = ag_m.rd_dev;
      ag_m.pf       = (lk_en[1] && (lk_pf[1] || lk_pf[2])) || (stk && (lk_pf[3] || lk_pf[4]));
      ag_m.gp       = (lk_en[1] && (lk_gp[1] || lk_gp[2])) || (stk && (lk_gp[3] || lk_gp[4])) || seg_gp;
      ag_m.stack_off = ag_q.push ? agu_stack_off
                                 : ag_o.base_raw + ((ag_q.size == SZ16) ? 32'd2 : 32'd4);
    end
  end

  // ================================================================ D-cache stage
  logic        port_req, port_we, order_stall, port_stall, dc_stall_o, dc_hit, dc_unal;
  logic [31:0] port_addr, port_wdata, dc_rdata;
  opsize_e     port_size;
  logic        wb_intent, wr_busy;
  logic        dc_rd;
  flags_t      fl_wb, fl_ex;
  logic        dc_taken;
  logic [31:0] dc_target;
  logic        dc_tgt_gp;

  assign dc_rd = dc_q.mem_rd || dc_q.pop || dc_q.idt || dc_q.pop_eflags;

  mem_order u_order (
    .dc_valid(dc_q.valid), .dc_rd_mem(dc_rd), .dc_rd_addr({17'd0, dc_m.rd_paddr}),
    .dc_rd_size((dc_q.idt || dc_q.pop_eflags) ? SZ32 : dc_q.size),
    .ex_valid(ex_q.valid), .ex_wr_mem(ex_q.mem_wr || ex_q.push),
    .wb_valid(wb_q.valid), .wb_wr_mem(wb_q.mem_wr || wb_q.push), .wb_commit_wr(wb_intent),
    .wb_wr_addr({17'd0, wb_m.wr_paddr}), .wb_wr_data(wb_wdata),
    .wb_wr_size((wb_q.push && wb_q.size == SZ8) ? SZ32 : wb_q.size),
    .port_req, .port_we, .port_addr, .port_size, .port_wdata, .order_stall, .port_stall
  );

  dcache #(.SIZE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_dcache (
    .clk, .rst_n,
    .req(port_req), .we(port_we), .paddr(port_addr[14:0]), .size(port_size), .wdata(port_wdata),
    .noncacheable(port_we ? wb_m.wr_nc : dc_m.rd_nc), .io_dev(port_we ? wb_m.wr_dev : dc_m.rd_dev),
    .rdata(dc_rdata), .stall(dc_stall_o), .hit(dc_hit), .unaligned(dc_unal),
    .br(dc_br), .bg(dc_bg), .bus_out(dc_bus), .bus_in(bus_s)
  );

  assign mem_stall = dc_stall_o;
  assign dc_block  = order_stall || port_stall;
  assign s_dc      = mem_stall || (dc_q.valid && dc_block);
  assign s_ag      = s_dc || rep_hold;
  assign s_rr      = s_ag || (rr_q.valid && (sb_stall || br_stall));

  // Flags seen by the branch in DC and by the instruction in EX.
  assign fl_wb = merge_flags(flags_q, wb_fvals, wb_q.valid ? wb_fwe : '0);
  assign fl_ex = merge_flags(fl_wb, ex_fout, ex_q.valid ? ex_fwe : '0);

  assign dc_target = dc_q.eip + 32'(dc_q.len) + dc_q.imm;
  assign dc_taken  = dc_q.valid && !s_dc && (dc_q.jmp || (dc_q.jcc && cond(dc_q.cc, fl_ex)));
  // a taken branch whose target lies past the code-segment limit does not
  // redirect; it carries a general protection fault to writeback instead
  assign dc_tgt_gp = dc_taken && (dc_target > seg_limit[S_CS]);

  // ================================================================ execute
  logic [31:0] ex_a, ex_b;
  assign ex_a = (ex_q.mem_rd && !ex_q.rep) ? size_mask(ex_mdata, ex_q.size) : extract(ex_o.a_raw, ex_q.a_id, ex_q.size);
  assign ex_b = ex_q.imm_en ? ex_q.imm : extract(ex_o.b_raw, ex_q.b_id, ex_q.size);

  exec_unit u_ex (
    .op(ex_q.op), .size(ex_q.size), .a(ex_a), .b(ex_b), .flags_in(fl_wb),
    .result(ex_result), .result2(ex_result2), .flags_out(ex_fout), .flags_we(ex_fwe)
  );

  // ================================================================ writeback
  regwr_t wb_dest, wb_src, wb_base;
  flags_t wb_flag_values, wb_write_flags, saved_flags;
  logic   wb_commit, wb_exc_pending, int1_in, int2_in;

  always_comb begin
    wb_dest = '0;
    wb_src  = '0;
    wb_base = '0;
    if (wb_q.rep) begin
      wb_dest = '{en: 1'b1, id: R_ECX, size: SZ32, value: wb_m.rep_ecx, old: 32'd0};
      wb_src  = '{en: 1'b1, id: R_ESI, size: SZ32, value: wb_m.rep_esi, old: 32'd0};
      wb_base = '{en: 1'b1, id: R_EDI, size: SZ32, value: wb_m.rep_edi, old: 32'd0};
    end else begin
      wb_dest = '{en: wb_q.wr_a, id: wb_q.a_id, size: wb_q.size,
                  value: wb_q.pop ? wb_mdata : wb_result, old: wb_o.a_raw};
      wb_src  = '{en: wb_q.wr_b, id: wb_q.b_id, size: wb_q.size, value: wb_result2, old: wb_o.b_raw};
      wb_base = '{en: wb_q.push || wb_q.pop, id: R_ESP, size: SZ32, value: wb_m.stack_off, old: 32'd0};
    end
  end
  assign wb_wdata = wb_q.rep  ? wb_mdata :
                    wb_q.push ? (wb_q.imm_en ? wb_q.imm : extract(wb_o.b_raw, wb_q.b_id, wb_q.size)) :
                                wb_result;

  // The memory write goes to the port before commit is known; it is held
  // back only by a fault or interrupt, which cannot change while the write
  // is waiting because interrupts are not latched then. Interrupt lines are
  // level signals (the keyboard's stays high until its data is read), so
  // they are not latched either while interrupts are disabled, i.e. while
  // a handler runs.
  assign wb_intent = wb_q.valid && (wb_q.mem_wr || wb_q.push) && !wb_exc_pending;
  assign wr_busy   = port_we && mem_stall;
  assign int1_in   = kb_irq && !wr_busy && exc_enabled;
  assign int2_in   = int2 && !wr_busy && exc_enabled;

  wb_stage u_wb (
    .clk, .rst_n, .valid(wb_q.valid), .dcache_stall(mem_stall), .pf_exc(wb_m.pf), .gp_exc(wb_m.gp),
    .eip(wb_q.eip), .cs(cs_sel), .cur_flags(flags_q),
    .wr_mem(wb_q.mem_wr || wb_q.push), .wr_addr({17'd0, wb_m.wr_paddr}), .mem_data(wb_wdata),
    .dest(wb_dest), .src(wb_src), .base(wb_base),
    .flag_vals(wb_fvals), .flag_we(wb_fwe), .is_pop_eflags(wb_q.pop_eflags),
    .int1(int1_in), .int2(int2_in), .handler_done(dec_handler_done),
    .commit(wb_commit), .wb_wr_mem(stat_mem_write), .wb_write_address(), .wb_write_data(),
    .wb_reg_we, .wb_reg_id, .wb_reg_value,
    .wb_flag_values(wb_flag_values), .wb_write_flags(wb_write_flags),
    .flush(wb_flush), .exc_vector, .wb_exception_stall(exc_stall),
    .saved_eip(exc_saved_eip), .saved_cs(exc_saved_cs), .saved_flags, .exc_enabled, .exc_pending(wb_exc_pending)
  );

  assign wb_redirect = wb_commit && wb_q.jmp_ind;
  assign dc_redirect = dc_taken && !dc_tgt_gp;
  assign kill_young  = wb_flush || wb_redirect;
  assign redirect     = wb_redirect || (dc_redirect && !wb_flush);
  assign redirect_eip = wb_redirect ? ((wb_q.idt || wb_q.mem_rd || wb_q.pop) ? wb_mdata : wb_o.a_raw)
                                    : dc_target;
  assign exc_flush = wb_flush;

  function automatic logic [31:0] flags_to_eflags(input flags_t f);
    logic [31:0] e;
    e = 32'h0000_0002;
    e[0] = f.cf; e[2] = f.pf; e[4] = f.af; e[6] = f.zf; e[7] = f.sf; e[10] = f.df; e[11] = f.of_;
    return e;
  endfunction
  assign exc_saved_eflags = flags_to_eflags(saved_flags);
  assign eflags           = flags_to_eflags(flags_q);

  // ================================================================ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; ag_q <= '0; dc_q <= '0; ex_q <= '0; wb_q <= '0;
      ag_o <= '0; dc_o <= '0; ex_o <= '0; wb_o <= '0;
      dc_m <= '0; ex_m <= '0; wb_m <= '0;
      ex_mdata <= '0; wb_mdata <= '0; wb_result <= '0; wb_result2 <= '0;
      wb_fvals <= '0; wb_fwe <= '0;
      tag_ctr <= '0;
      flags_q <= '0;
      exc_vec_q <= '0;
    end else begin
      if (wb_flush) exc_vec_q <= exc_vector;
      // architectural flags
      flags_q <= merge_flags(flags_q, wb_flag_values, wb_write_flags);

      if (!mem_stall) begin
        // WB <- EX
        wb_q       <= kill_young ? '0 : ex_q;
        wb_o       <= ex_o;
        wb_m       <= ex_m;
        wb_mdata   <= ex_mdata;
        wb_result  <= ex_result;
        wb_result2 <= ex_result2;
        if (ex_q.pop_eflags) begin
          wb_fvals <= '{af: ex_mdata[4], cf: ex_mdata[0], df: ex_mdata[10], of_: ex_mdata[11],
                        pf: ex_mdata[2], sf: ex_mdata[7], zf: ex_mdata[6]};
          wb_fwe   <= '1;
        end else begin
          wb_fvals <= ex_fout;
          wb_fwe   <= (ex_q.rep || ex_q.push || ex_q.pop || ex_q.jmp || ex_q.jcc || ex_q.jmp_ind || ex_q.idt)
                      ? '0 : ex_fwe;
        end
        // EX <- DC (bubble while the read is held)
        if (kill_young || dc_block) ex_q <= '0;
        else begin
          ex_q     <= dc_q;
          ex_o     <= dc_o;
          ex_m     <= dc_m;
          if (dc_tgt_gp) ex_m.gp <= 1'b1;
          ex_mdata <= dc_rdata;
        end
        // DC <- AG
        if (kill_young) dc_q <= '0;
        else if (!dc_block) begin
          dc_q <= (dc_redirect) ? '0 : ag_out;
          dc_o <= ag_o;
          dc_m <= ag_m;
        end
        // AG <- RR
        if (kill_young || (dc_redirect && !dc_block)) ag_q <= '0;
        else if (!s_ag) begin
          ag_q <= rr_issue ? rr_q : '0;
          if (rr_issue) begin
            ag_o <= '{a_raw: rf_rd_data[0], b_raw: rf_rd_data[1], base_raw: rf_rd_data[2], index_raw: rf_rd_data[3]};
            ag_q.tag <= tag_ctr;
            tag_ctr  <= tag_ctr + 8'd1;
          end
        end
        // RR <- decode
        if (kill_young || (dc_redirect && !dc_block)) rr_q <= '0;
        else if (!s_rr) rr_q <= dec_u;
      end
    end
  end

  // ================================================================ bus
  bus_arbiter u_arb (
    .clk, .rst_n, .bbsy(bus_m.bbsy), .br_dcache(dc_br), .br_icache(ic_br), .bg_dcache(dc_bg), .bg_icache(ic_bg)
  );
  assign bus_m = ic_bus | dc_bus;
  assign bus_s = mem_bus | kb_bus | mon_bus;

  mem_ctrl #(.MEM_BYTES(MEM_BYTES), .LATENCY(MEM_LATENCY)) u_mem (.clk, .rst_n, .bus_in(bus_m), .bus_out(mem_bus));
  keyboard_ctrl #(.DEPTH(KB_DEPTH)) u_kb (
    .clk, .rst_n, .bus_in(bus_m), .bus_out(kb_bus), .kb_valid, .kb_data, .kb_ready, .irq(kb_irq)
  );
  monitor_ctrl #(.DEPTH(MON_DEPTH)) u_mon (
    .clk, .rst_n, .bus_in(bus_m), .bus_out(mon_bus), .disp_valid, .disp_data, .disp_pop, .overrun(disp_overrun)
  );

  // ================================================================ activity
  assign stat_commit           = wb_commit;
  assign stat_icache_miss      = ic_stall;
  assign stat_dcache_stall     = mem_stall;
  assign stat_dcache_unaligned = dc_unal && !dc_hit;
  assign stat_order_stall      = dc_q.valid && order_stall;
  assign stat_sb_stall         = rr_q.valid && sb_stall;
  always_comb begin
    stat_forward = 1'b0;
    for (int p = 0; p < 4; p++)
      if (rr_issue && rf_rd_en[p] && !rf_valid[rf_rd_id[p]]) stat_forward = 1'b1;
  end
  assign stat_branch_taken     = redirect;
  assign stat_rep_copy         = ag_q.rep && rep_mem_valid && rep_wb_regs && !s_dc;
  assign stat_bus_grant        = dc_bg || ic_bg;
  assign stat_evict            = bus_m.dev_id == DEV_MEMORY && bus_m.brw && mem_bus.ack;
endmodule
