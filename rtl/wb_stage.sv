// wb_stage: writeback stage, where all architectural state is updated.
//
// Commit: a valid instruction commits when the D-cache is not stalling and
// it carries no exception and no interrupt is to be taken. Only then do its
// memory write, its up to three register writes (destination, source, base)
// and its flag writes leave the stage. Register writes are aligned to the
// 32-bit register file: a 32-bit result is written as is, a 16-bit result
// replaces bits 15:0 of the old value, and an 8-bit result replaces bits
// 7:0 of register id (ids 0-3: AL CL DL BL) or bits 15:8 of register id-4
// (ids 4-7: AH CH DH BH).
//
// Exception handler: interrupt pins INT1/INT2 are latched when seen high.
// At a valid instruction, page fault has priority over general protection,
// which has priority over INT1, then INT2. Taking one inhibits the
// instruction's updates, saves its EIP, CS and the flags, pulses flush for
// all pipeline latches (exception_handle to the decoder) with the vector,
// and holds wb_exception_stall until the decoder reports (handler_done)
// that its micro-ops have been inserted. Further exceptions and interrupts
// are then disabled until a POP EFLAGS micro-op (the last of IRETD)
// commits (iret_done). An instruction that faults while they are disabled
// is dropped without starting a handler.
// Follows the design: the write-signal generators, alignment, priorities,
// saved state, flush and the disable-until-IRETD rule. This design's
// choices: vectors (14, 13, 0, 1), the handler_done handshake, dropping a
// faulting instruction while disabled, and exc_pending, which tells the
// memory port before commit that the instruction will not commit even if the
// D-cache does not stall (so its memory write can be held back without a
// combinational loop through the D-cache stall).
module wb_stage
  import x86_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        dcache_stall,
  input  logic        pf_exc,
  input  logic        gp_exc,
  input  logic [31:0] eip,
  input  logic [15:0] cs,
  input  flags_t      cur_flags,
  input  logic        wr_mem,
  input  logic [31:0] wr_addr,
  input  logic [31:0] mem_data,
  input  regwr_t      dest,
  input  regwr_t      src,
  input  regwr_t      base,
  input  flags_t      flag_vals,
  input  flags_t      flag_we,
  input  logic        is_pop_eflags,
  input  logic        int1,
  input  logic        int2,
  input  logic        handler_done,
  output logic        commit,
  output logic        wb_wr_mem,
  output logic [31:0] wb_write_address,
  output logic [31:0] wb_write_data,
  output logic [2:0]       wb_reg_we,
  output logic [2:0][2:0]  wb_reg_id,
  output logic [2:0][31:0] wb_reg_value,
  output flags_t      wb_flag_values,
  output flags_t      wb_write_flags,
  output logic        flush,
  output logic [7:0]  exc_vector,
  output logic        wb_exception_stall,
  output logic [31:0] saved_eip,
  output logic [15:0] saved_cs,
  output flags_t      saved_flags,
  output logic        exc_enabled,
  output logic        exc_pending
);
  logic int1_q, int2_q, in_handler, take, any_exc, no_exception;

  function automatic logic [34:0] align(input regwr_t r);
    // returns {physical id, aligned 32-bit value}
    logic [2:0]  id;
    logic [31:0] v;
    id = r.id;
    unique case (r.size)
      SZ32: v = r.value;
      SZ16: v = {r.old[31:16], r.value[15:0]};
      default: begin
        if (r.id[2]) begin
          id = {1'b0, r.id[1:0]};
          v  = {r.old[31:16], r.value[7:0], r.old[7:0]};
        end else begin
          v  = {r.old[31:8], r.value[7:0]};
        end
      end
    endcase
    return {id, v};
  endfunction

  always_comb begin
    any_exc      = pf_exc || gp_exc || (exc_enabled && (int1_q || int2_q));
    take         = valid && !dcache_stall && exc_enabled && any_exc;
    exc_pending  = any_exc;
    no_exception = !any_exc;
    commit       = valid && !dcache_stall && no_exception;

    if (pf_exc)      exc_vector = VEC_PF;
    else if (gp_exc) exc_vector = VEC_GP;
    else if (int1_q) exc_vector = VEC_INT1;
    else             exc_vector = VEC_INT2;

    wb_wr_mem        = commit && wr_mem;
    wb_write_address = wr_addr;
    wb_write_data    = mem_data;

    {wb_reg_id[0], wb_reg_value[0]} = align(dest);
    {wb_reg_id[1], wb_reg_value[1]} = align(src);
    {wb_reg_id[2], wb_reg_value[2]} = align(base);
    wb_reg_we = {base.en, src.en, dest.en} & {3{commit}};

    wb_flag_values = flag_vals;
    wb_write_flags = commit ? flag_we : '0;
    flush          = take;
    wb_exception_stall = take || in_handler;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int1_q      <= 1'b0;
      int2_q      <= 1'b0;
      in_handler  <= 1'b0;
      exc_enabled <= 1'b1;
      saved_eip   <= '0;
      saved_cs    <= '0;
      saved_flags <= '0;
    end else begin
      if (int1) int1_q <= 1'b1;
      if (int2) int2_q <= 1'b1;
      if (take) begin
        saved_eip   <= eip;
        saved_cs    <= cs;
        saved_flags <= cur_flags;
        in_handler  <= 1'b1;
        exc_enabled <= 1'b0;
        if (!pf_exc && !gp_exc) begin
          if (int1_q) int1_q <= 1'b0;
          else        int2_q <= 1'b0;
        end
      end
      if (handler_done) in_handler <= 1'b0;
      if (commit && is_pop_eflags) exc_enabled <= 1'b1;
    end
  end
endmodule
