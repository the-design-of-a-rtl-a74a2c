// fetch_unit: the fetch stage's instruction register (IR) and address
// latches.
//
// The IR is a 256-bit (32-byte) buffer between fetch and decode whose byte
// 0 is the first byte of the instruction being decoded; a 5-bit register
// counts its valid bytes. The I-cache supplies up to 16 bytes per cycle,
// already aligned to the fetch address. Each cycle:
//  * New bytes are appended only if the IR held fewer than 16 valid bytes
//    at the start of the cycle (a decision on the registered count, not on
//    what the decoder consumes this cycle) and the I-cache hits.
//  * The decoder reports the size of the instruction it decoded (0-15 bytes);
//    the concatenated IR is shifted down by that many bytes, late in the
//    cycle. No shift when the decoder has too few bytes (not_enough), and
//    nothing changes at all while the decoder inserts micro-ops (uop_stall)
//    or the pipeline holds the front end (hold).
//  * valid count <= count + appended bytes - consumed bytes.
// Three address latches: EIP (address of the instruction in decode), EIP+CS
// (its linear address, kept so fetch never adds CS) and VIP+CS, the 28-bit
// line address the I-cache is read with, which runs ahead of decode and
// advances one line for each line appended. After a redirect (from the
// address generation or writeback stage) all three are reloaded, the IR is
// emptied and the first fetch uses the target's byte offset within its
// line; later fetches start at byte 0 of the next line.
// Follows the design: IR and line sizes, the 5-bit count, the half-full
// rule on stale information, the late shift, both decoder stalls, the three
// latches and redirection. This design's choices: the interface signals and
// the reset address (parameters, 0 by default).
module fetch_unit #(
  parameter int unsigned IR_BYTES   = 32,
  parameter int unsigned LINE_BYTES = 16,
  parameter logic [31:0] RESET_EIP    = 32'h0,
  parameter logic [31:0] RESET_EIP_CS = 32'h0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // I-cache
  output logic                  ic_req,
  output logic [31:0]           ic_addr,
  input  logic                  ic_hit,
  input  logic [8*LINE_BYTES-1:0] ic_data,
  input  logic [4:0]            ic_nbytes,
  // decoder
  output logic [8*IR_BYTES-1:0] ir,
  output logic [4:0]            ir_valid_bytes,
  input  logic [3:0]            dec_size,
  input  logic                  dec_not_enough,
  input  logic                  dec_uop_stall,
  input  logic                  hold,
  // redirection
  input  logic                  redirect,
  input  logic [31:0]           redirect_eip,
  input  logic [31:0]           redirect_eip_cs,
  output logic [31:0]           eip,
  output logic [31:0]           eip_cs,
  output logic [27:0]           vip_cs,
  output logic                  appended
);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);

  logic [OFF_W-1:0]      first_off;
  logic [4:0]            consumed, added;
  logic [8*IR_BYTES-1:0] concat, shifted, keep_mask;
  logic                  frozen;

  assign frozen   = hold || dec_uop_stall;
  assign ic_req   = !frozen && !redirect && (ir_valid_bytes < 5'(LINE_BYTES));
  assign ic_addr  = {vip_cs, first_off};
  assign appended = ic_req && ic_hit;
  assign added    = appended ? ic_nbytes : 5'd0;
  assign consumed = (frozen || dec_not_enough) ? 5'd0 : 5'(dec_size);

  always_comb begin
    keep_mask = ~({8*IR_BYTES{1'b1}} << (8 * ir_valid_bytes));
    concat    = ir & keep_mask;
    if (appended) concat = concat | ((8*IR_BYTES)'(ic_data) << (8 * ir_valid_bytes));
    shifted = concat >> (8 * consumed);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir             <= '0;
      ir_valid_bytes <= '0;
      eip            <= RESET_EIP;
      eip_cs         <= RESET_EIP_CS;
      vip_cs         <= RESET_EIP_CS[31:OFF_W];
      first_off      <= RESET_EIP_CS[OFF_W-1:0];
    end else if (redirect) begin
      ir             <= '0;
      ir_valid_bytes <= '0;
      eip            <= redirect_eip;
      eip_cs         <= redirect_eip_cs;
      vip_cs         <= redirect_eip_cs[31:OFF_W];
      first_off      <= redirect_eip_cs[OFF_W-1:0];
    end else if (!frozen) begin
      ir             <= shifted;
      ir_valid_bytes <= ir_valid_bytes + added - consumed;
      eip            <= eip + 32'(consumed);
      eip_cs         <= eip_cs + 32'(consumed);
      if (appended) begin
        vip_cs    <= vip_cs + 1'b1;
        first_off <= '0;
      end
    end
  end

  a_consume_le_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (!frozen && !redirect) |-> (consumed <= ir_valid_bytes + added));
endmodule
