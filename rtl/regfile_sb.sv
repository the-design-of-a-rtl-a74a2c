// regfile_sb: register file with scoreboard and forwarding, as used by the
// register read stage. NREGS 32-bit registers (8 general-purpose registers;
// the segment register file is a second instance with 6 of its 8 entries
// used), RD_PORTS read ports and WR_PORTS write ports.
//
// Scoreboard: each register has a valid bit and an 8-bit tag. An
// instruction that will write a register, when it leaves the register read
// stage, clears the valid bit and stores its own tag (inv_* ports). At
// writeback the value is always written, but the valid bit is set again
// only if the writer's tag equals the stored tag, so several writers of the
// same register can be in flight (no stall on write-after-write). A read
// port is ready when the register is valid, or when the execution or
// writeback stage holds a result for that register id with the tag the
// scoreboard is waiting for; the forwarded value is then returned (EX has
// priority as the younger). stall is high when any enabled read port is not
// ready. Reads are combinational, writes and scoreboard updates take effect
// at the clock edge; an invalidation wins over a writeback to the same
// register in the same cycle.
// Follows the design: sizes, port counts, valid bit plus tag per register,
// tag-matching rules, forwarding only from EX and WB. This design's choice:
// reset makes every register valid with value 0, and clear (used when the
// writeback stage flushes the pipeline, so that every instruction that
// invalidated a register is gone) makes every register valid again.
module regfile_sb #(
  parameter int unsigned NREGS    = 8,
  parameter int unsigned RD_PORTS = 4,
  parameter int unsigned WR_PORTS = 3,
  parameter int unsigned TAG_W    = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,   // pipeline flush: no write is outstanding any more
  // read ports
  input  logic [RD_PORTS-1:0]                    rd_en,
  input  logic [RD_PORTS-1:0][$clog2(NREGS)-1:0] rd_id,
  output logic [RD_PORTS-1:0][31:0]              rd_data,
  output logic [RD_PORTS-1:0]                    rd_ready,
  output logic                                   stall,
  // invalidation (destination registers of the instruction leaving RR)
  input  logic [WR_PORTS-1:0]                    inv_en,
  input  logic [WR_PORTS-1:0][$clog2(NREGS)-1:0] inv_id,
  input  logic [TAG_W-1:0]                       inv_tag,
  // writeback
  input  logic [WR_PORTS-1:0]                    wr_en,
  input  logic [WR_PORTS-1:0][$clog2(NREGS)-1:0] wr_id,
  input  logic [WR_PORTS-1:0][31:0]              wr_data,
  input  logic [TAG_W-1:0]                       wr_tag,
  // forwarding of the destination register from EX and WB
  input  logic                                   fwd_ex_en,
  input  logic [$clog2(NREGS)-1:0]               fwd_ex_id,
  input  logic [TAG_W-1:0]                       fwd_ex_tag,
  input  logic [31:0]                            fwd_ex_data,
  input  logic                                   fwd_wb_en,
  input  logic [$clog2(NREGS)-1:0]               fwd_wb_id,
  input  logic [TAG_W-1:0]                       fwd_wb_tag,
  input  logic [31:0]                            fwd_wb_data,
  // architectural view (for debug and tests)
  output logic [NREGS-1:0][31:0]                 regs_out,
  output logic [NREGS-1:0]                       valid_out
);
  logic [NREGS-1:0][31:0]      regs;
  logic [NREGS-1:0]            valid;
  logic [NREGS-1:0][TAG_W-1:0] tags;

  assign regs_out  = regs;
  assign valid_out = valid;

  always_comb begin
    stall = 1'b0;
    for (int p = 0; p < RD_PORTS; p++) begin
      rd_data[p]  = regs[rd_id[p]];
      rd_ready[p] = valid[rd_id[p]];
      if (!valid[rd_id[p]]) begin
        if (fwd_ex_en && fwd_ex_id == rd_id[p] && fwd_ex_tag == tags[rd_id[p]]) begin
          rd_data[p]  = fwd_ex_data;
          rd_ready[p] = 1'b1;
        end else if (fwd_wb_en && fwd_wb_id == rd_id[p] && fwd_wb_tag == tags[rd_id[p]]) begin
          rd_data[p]  = fwd_wb_data;
          rd_ready[p] = 1'b1;
        end
      end
      if (rd_en[p] && !rd_ready[p]) stall = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= '0;
      valid <= '1;
      tags  <= '0;
    end else begin
      for (int w = 0; w < WR_PORTS; w++) begin
        if (wr_en[w]) begin
          regs[wr_id[w]] <= wr_data[w];
          if (tags[wr_id[w]] == wr_tag) valid[wr_id[w]] <= 1'b1;
        end
      end
      for (int w = 0; w < WR_PORTS; w++) begin
        if (inv_en[w]) begin
          valid[inv_id[w]] <= 1'b0;
          tags[inv_id[w]]  <= inv_tag;
        end
      end
      if (clear) valid <= '1;
    end
  end
endmodule
