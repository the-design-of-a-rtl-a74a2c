// rep_movs_unit: the special hardware of the address generation stage that
// runs REP MOVS one iteration per cycle, and the REP MOVS sequencer that
// the decoder follows.
//
// Datapath: on the first iteration ECX, ESI and EDI come from the register
// file; later iterations use the temporaries temp_ECX, temp_ESI and temp_EDI
// written by the previous iteration, so iterations never wait on the
// register scoreboard. Each iteration forms read address = ESI + source
// segment and write address = EDI + ES, the highest byte of each (for the
// exception checks), and the next values ECX-1, ESI+constant and
// EDI+constant, where the constant is +size or -size by the direction flag.
// A zero check on the current ECX ends the sequence (rep_done).
//
// Sequencer (state diagram of the REP MOVS hardware): normal -> REP_FIRST
// (ECX zero check) -> REP_ITER ... until the count is zero -> bubble1 ->
// bubble2 -> bubble3 -> REP_DONE -> normal. In REP_FIRST/REP_ITER a copy is
// issued (mem_valid) only if the count was not zero; that iteration also
// writes back ECX, ESI and EDI (wb_regs). busy asks the decoder to hold the
// instruction register. adv = 1 lets the sequence move on (low while the
// pipeline is stalled); flush (an exception at writeback) abandons the
// sequence.
// Follows the design: registers, adders, constant selection, zero check and
// the states. This design's choices: the advance and flush inputs and the encoding of
// the micro-op output.
module rep_movs_unit
  import x86_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        flush,
  input  logic        adv,
  input  logic [31:0] ecx,
  input  logic [31:0] esi,
  input  logic [31:0] edi,
  input  logic [31:0] src_seg_base,
  input  logic [31:0] es_base,
  input  opsize_e     size,
  input  logic        df,
  output logic [2:0]  uop,        // 0 none, 1 REP_FIRST, 2 REP_ITER, 3 bubble, 4 REP_DONE
  output logic        busy,
  output logic        rep_done,
  output logic        mem_valid,
  output logic        wb_regs,
  output logic [31:0] rd_addr,
  output logic [31:0] rd_high,
  output logic [31:0] wr_addr,
  output logic [31:0] wr_high,
  output logic [31:0] next_ecx,
  output logic [31:0] next_esi,
  output logic [31:0] next_edi
);
  typedef enum logic [2:0] {S_NORMAL, S_FIRST, S_ITER, S_B1, S_B2, S_B3, S_DONE} state_e;
  state_e state;

  logic [31:0] temp_ecx, temp_esi, temp_edi;
  logic [31:0] cur_ecx, cur_esi, cur_edi, konst, nbm1;
  logic        first;
  logic        c0, c1, c2, c3, c4, c5, c6;

  assign first   = (state == S_FIRST);
  assign cur_ecx = first ? ecx : temp_ecx;
  assign cur_esi = first ? esi : temp_esi;
  assign cur_edi = first ? edi : temp_edi;

  // Constant selection from operand mode and direction flag.
  always_comb begin
    unique case (size)
      SZ8:     begin konst = 32'd1; nbm1 = 32'd0; end
      SZ16:    begin konst = 32'd2; nbm1 = 32'd1; end
      default: begin konst = 32'd4; nbm1 = 32'd3; end
    endcase
    if (df) konst = -konst;
  end

  assign rep_done = (cur_ecx == 32'd0);

  cs_adder32 u_ecx  (.a(cur_ecx), .b(32'hFFFF_FFFF), .cin(1'b0), .sum(next_ecx), .cout(c0));
  cs_adder32 u_esi  (.a(cur_esi), .b(konst), .cin(1'b0), .sum(next_esi), .cout(c1));
  cs_adder32 u_edi  (.a(cur_edi), .b(konst), .cin(1'b0), .sum(next_edi), .cout(c2));
  cs_adder32 u_rd   (.a(cur_esi), .b(src_seg_base), .cin(1'b0), .sum(rd_addr), .cout(c3));
  cs_adder32 u_wr   (.a(cur_edi), .b(es_base), .cin(1'b0), .sum(wr_addr), .cout(c4));
  cs_adder32 u_rdhi (.a(rd_addr), .b(nbm1), .cin(1'b0), .sum(rd_high), .cout(c5));
  cs_adder32 u_wrhi (.a(wr_addr), .b(nbm1), .cin(1'b0), .sum(wr_high), .cout(c6));
  logic unused_carries;
  assign unused_carries = ^{c0, c1, c2, c3, c4, c5, c6};

  always_comb begin
    unique case (state)
      S_FIRST:           uop = 3'd1;
      S_ITER:            uop = 3'd2;
      S_B1, S_B2, S_B3:  uop = 3'd3;
      S_DONE:            uop = 3'd4;
      default:           uop = 3'd0;
    endcase
  end

  assign busy      = (state != S_NORMAL) || start;
  assign mem_valid = (state == S_FIRST || state == S_ITER) && !rep_done;
  assign wb_regs   = mem_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_NORMAL;
      temp_ecx <= '0;
      temp_esi <= '0;
      temp_edi <= '0;
    end else if (flush) begin
      state <= S_NORMAL;
    end else if (adv) begin
      unique case (state)
        S_NORMAL: if (start) state <= S_FIRST;
        S_FIRST, S_ITER: begin
          if (rep_done) state <= S_B1;
          else begin
            temp_ecx <= next_ecx;
            temp_esi <= next_esi;
            temp_edi <= next_edi;
            state    <= S_ITER;
          end
        end
        S_B1:    state <= S_B2;
        S_B2:    state <= S_B3;
        S_B3:    state <= S_DONE;
        S_DONE:  state <= S_NORMAL;
        default: state <= S_NORMAL;
      endcase
    end
  end
endmodule
