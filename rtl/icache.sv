// icache: 512-byte, direct-mapped instruction cache with 16-byte lines
// (32 lines), virtually indexed and physically tagged, and its controller.
// Bits 8:4 of the fetch address index the data and tag stores; the tag is
// the top 6 bits of the 15-bit physical address, supplied by the TLB
// (ptag), and a valid bit marks each line. On a hit the line is returned
// in the same cycle, shifted by the alignment logic so that the byte at the
// fetch address is byte 0; nbytes tells how many of the 16 bytes are useful.
// On a miss the controller walks the states of the I-cache state diagram:
// request the bus (BR) and wait for the grant, send the block address to
// memory while raising BBSY, hold BBSY until the memory's ACK, then write
// the received block into the cache and set its valid bit. stall is high
// from the miss until the block is written; the fetch then hits. Sizes,
// indexing, tagging and states follow the design; the port names and the
// one-cycle write state feeding the hit in the next cycle are this design's
// choices.
module icache
  import x86_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512,
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic [31:0]  vaddr,
  input  logic [BUS_ADDR_W-1-$clog2(SIZE_BYTES):0] ptag,
  output logic         hit,
  output logic         stall,
  output logic [127:0] data,
  output logic [4:0]   nbytes,
  // bus master side
  output logic         br,
  input  logic         bg,
  output bus_m_t       bus_out,
  input  bus_s_t       bus_in
);
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned TAG_W = BUS_ADDR_W - IDX_W - OFF_W;

  typedef enum logic [2:0] {S_IDLE, S_WAIT_BG, S_SEND, S_WAIT, S_WRITE} state_e;
  state_e state;

  logic [127:0]     line_mem [LINES];
  logic [TAG_W-1:0] tag_mem  [LINES];
  logic [LINES-1:0] valid;

  logic [IDX_W-1:0] idx, miss_idx;
  logic [OFF_W-1:0] off;
  logic [TAG_W-1:0] miss_tag;
  logic [127:0]     fill_q;

  assign idx = vaddr[OFF_W +: IDX_W];
  assign off = vaddr[OFF_W-1:0];
  assign hit = req && (state == S_IDLE) && valid[idx] && tag_mem[idx] == ptag;
  assign stall = req && !hit;

  // Alignment logic: the addressed byte becomes byte 0.
  assign data   = line_mem[idx] >> (8 * off);
  assign nbytes = 5'(LINE_BYTES) - 5'(off);

  assign br = (state == S_WAIT_BG);

  always_comb begin
    bus_out = '0;
    if ((state == S_WAIT_BG && bg) || state == S_SEND || state == S_WAIT) begin
      bus_out.bbsy = 1'b1;
    end
    if (state == S_SEND || state == S_WAIT) begin
      bus_out.dev_id = DEV_MEMORY;
      bus_out.brw    = 1'b0;
      bus_out.addr   = {miss_tag, miss_idx, {OFF_W{1'b0}}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      valid    <= '0;
      miss_idx <= '0;
      miss_tag <= '0;
      fill_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req && !hit) begin
          miss_idx <= idx;
          miss_tag <= ptag;
          state    <= S_WAIT_BG;
        end
        S_WAIT_BG: if (bg) state <= S_SEND;
        S_SEND:    state <= S_WAIT;
        S_WAIT: if (bus_in.ack) begin
          fill_q <= bus_in.data;
          state  <= S_WRITE;
        end
        S_WRITE: begin
          line_mem[miss_idx] <= fill_q;
          tag_mem[miss_idx]  <= miss_tag;
          valid[miss_idx]    <= 1'b1;
          state              <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
