// dcache: 512-byte, direct-mapped, write-back, write-allocate data cache
// with 16-byte lines and its controller. Indexing and tagging are those of
// the I-cache (index = address bits 8:4, tag = top 6 bits of the 15-bit
// physical address); each line also has a dirty bit.
//
// One access (read or write of 1, 2 or 4 bytes) is presented on req/we/
// paddr/size/wdata and held until stall falls; in the cycle stall is low the
// read data is valid on rdata (aligned to bit 0) and a write is performed at
// the next clock edge. An aligned hit completes in the cycle it is
// presented. An access whose bytes cross a line boundary (unaligned) is done
// as two accesses: the first line's part in the initial state, the second
// line's part in the "second access" state one cycle later.
//
// A miss walks the D-cache state diagram: bus request and grant, then, if
// the victim line is dirty, send the evicted block to memory and wait for
// its ACK, send the missing block's address and wait for ACK while holding
// BBSY, write the fetched block and return to the initial state, where the
// access is retried and now hits. A write marks the line dirty. A
// non-cacheable access (from the TLB's non-cacheable bit) skips the cache:
// after the grant the address and data go to the I/O device named by
// io_dev; the device's ACK ends it, and the access completes in the next
// cycle with the device's byte(s).
//
// Follows the design: sizes, write-back with dirty bit, the state sequence,
// unaligned handling with a second access and non-cacheable bypass. This
// design's choices: after a fill the controller always returns to the
// initial state (the diagram goes straight to the second access after the
// first line's fill), the port names and the bus encoding.
module dcache
  import x86_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 512,
  parameter int unsigned LINE_BYTES = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req,
  input  logic                  we,
  input  logic [BUS_ADDR_W-1:0] paddr,
  input  opsize_e               size,
  input  logic [31:0]           wdata,
  input  logic                  noncacheable,
  input  dev_id_e               io_dev,
  output logic [31:0]           rdata,
  output logic                  stall,
  output logic                  hit,
  output logic                  unaligned,
  // bus master side
  output logic                  br,
  input  logic                  bg,
  output bus_m_t                bus_out,
  input  bus_s_t                bus_in
);
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned TAG_W = BUS_ADDR_W - IDX_W - OFF_W;
  localparam int unsigned LINE_W = 8 * LINE_BYTES;

  typedef enum logic [3:0] {
    S_IDLE, S_SECOND,
    S_WAIT_BG, S_EVICT_SEND, S_EVICT_WAIT, S_REQ_SEND, S_REQ_WAIT, S_FILL,
    S_IO_WAIT_BG, S_IO_SEND, S_IO_WAIT
  } state_e;
  state_e state;

  logic [LINE_W-1:0] line_mem [LINES];
  logic [TAG_W-1:0]  tag_mem  [LINES];
  logic [LINES-1:0]  valid, dirty;

  // Access decomposition.
  logic [OFF_W-1:0]        off;
  logic [BUS_ADDR_W-OFF_W-1:0] line0, line1, cur_line, miss_line;
  logic [IDX_W-1:0]        cur_idx, miss_idx;
  logic [TAG_W-1:0]        cur_tag;
  logic [2:0]              nbytes;
  logic                    cur_hit, miss_dirty;
  logic [TAG_W-1:0]        victim_tag;
  logic [LINE_W-1:0]       victim_q, fill_q;
  logic [31:0]             first_part, io_rdata;
  logic                    io_done;

  always_comb begin
    unique case (size)
      SZ8:     nbytes = 3'd1;
      SZ16:    nbytes = 3'd2;
      default: nbytes = 3'd4;
    endcase
  end

  assign off       = paddr[OFF_W-1:0];
  assign line0     = paddr[BUS_ADDR_W-1:OFF_W];
  assign line1     = line0 + 1'b1;
  assign unaligned = req && !noncacheable && (5'(off) + 5'(nbytes) > 5'(LINE_BYTES));
  assign cur_line  = (state == S_SECOND) ? line1 : line0;
  assign cur_idx   = cur_line[IDX_W-1:0];
  assign cur_tag   = cur_line[BUS_ADDR_W-OFF_W-1 -: TAG_W];
  assign cur_hit   = valid[cur_idx] && tag_mem[cur_idx] == cur_tag;

  // Two-line window holding the bytes of the access, used for both the read
  // alignment and the byte-merge of writes.
  logic [2*LINE_W-1:0] window, wmask, wshift, merged;
  always_comb begin
    if (state == S_SECOND) window = {line_mem[cur_idx], {LINE_W{1'b0}}};
    else                   window = {{LINE_W{1'b0}}, line_mem[cur_idx]};
    wmask  = ((2*LINE_W)'(1) << (8 * nbytes)) - 1'b1;
    wmask  = wmask << (8 * off);
    wshift = (2*LINE_W)'(wdata) << (8 * off);
    merged = (window & ~wmask) | (wshift & wmask);
  end

  // Completion of the access in this cycle.
  logic done_now;
  always_comb begin
    done_now = 1'b0;
    if (req) begin
      unique case (state)
        S_IDLE: begin
          if (noncacheable) done_now = io_done;
          else begin
            done_now = cur_hit && !unaligned;
          end
        end
        S_SECOND: done_now = cur_hit;
        default: ;
      endcase
    end
  end
  assign hit   = req && !noncacheable && (state == S_IDLE || state == S_SECOND) && cur_hit;
  assign stall = req && !done_now;

  always_comb begin
    logic [2*LINE_W-1:0] sh;
    sh = window >> (8 * off);
    if (noncacheable)            rdata = io_rdata;
    else if (state == S_SECOND)  rdata = first_part | sh[31:0];
    else                         rdata = sh[31:0];
    unique case (size)
      SZ8:     rdata = {24'd0, rdata[7:0]};
      SZ16:    rdata = {16'd0, rdata[15:0]};
      default: ;
    endcase
  end

  assign miss_idx   = miss_line[IDX_W-1:0];
  assign miss_dirty = valid[cur_idx] && dirty[cur_idx];

  assign br = (state == S_WAIT_BG) || (state == S_IO_WAIT_BG);

  logic evicting;
  always_comb begin
    bus_out = '0;
    if (((state == S_WAIT_BG || state == S_IO_WAIT_BG) && bg) ||
        state inside {S_EVICT_SEND, S_EVICT_WAIT, S_REQ_SEND, S_REQ_WAIT, S_IO_SEND, S_IO_WAIT})
      bus_out.bbsy = 1'b1;
    unique case (state)
      S_EVICT_SEND, S_EVICT_WAIT: begin
        bus_out.dev_id = DEV_MEMORY;
        bus_out.brw    = 1'b1;
        bus_out.addr   = {victim_tag, miss_idx, {OFF_W{1'b0}}};
        bus_out.data   = victim_q;
      end
      S_REQ_SEND, S_REQ_WAIT: begin
        bus_out.dev_id = DEV_MEMORY;
        bus_out.brw    = 1'b0;
        bus_out.addr   = {miss_line, {OFF_W{1'b0}}};
      end
      S_IO_SEND, S_IO_WAIT: begin
        bus_out.dev_id = io_dev;
        bus_out.brw    = we;
        bus_out.addr   = paddr;
        bus_out.data   = {96'd0, wdata};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      valid      <= '0;
      dirty      <= '0;
      miss_line  <= '0;
      victim_tag <= '0;
      victim_q   <= '0;
      fill_q     <= '0;
      first_part <= '0;
      io_rdata   <= '0;
      io_done    <= 1'b0;
      evicting   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_SECOND: begin
          if (req && noncacheable && state == S_IDLE) begin
            if (io_done) io_done <= 1'b0;
            else         state   <= S_IO_WAIT_BG;
          end else if (req && cur_hit) begin
            if (we) begin
              line_mem[cur_idx] <= (state == S_SECOND) ? merged[2*LINE_W-1:LINE_W]
                                                       : merged[LINE_W-1:0];
              dirty[cur_idx]    <= 1'b1;
            end
            if (state == S_IDLE && unaligned) begin
              first_part <= rdata;
              state      <= S_SECOND;
            end else begin
              state <= S_IDLE;
            end
          end else if (req) begin
            // Miss on the line of this (part of the) access.
            miss_line  <= cur_line;
            victim_tag <= tag_mem[cur_idx];
            victim_q   <= line_mem[cur_idx];
            evicting   <= miss_dirty;
            state      <= S_WAIT_BG;
          end
        end
        S_WAIT_BG:    if (bg) state <= evicting ? S_EVICT_SEND : S_REQ_SEND;
        S_EVICT_SEND: state <= S_EVICT_WAIT;
        S_EVICT_WAIT: if (bus_in.ack) state <= S_REQ_SEND;
        S_REQ_SEND:   state <= S_REQ_WAIT;
        S_REQ_WAIT: if (bus_in.ack) begin
          fill_q <= bus_in.data;
          state  <= S_FILL;
        end
        S_FILL: begin
          line_mem[miss_idx] <= fill_q;
          tag_mem[miss_idx]  <= miss_line[BUS_ADDR_W-OFF_W-1 -: TAG_W];
          valid[miss_idx]    <= 1'b1;
          dirty[miss_idx]    <= 1'b0;
          state              <= S_IDLE;
        end
        S_IO_WAIT_BG: if (bg) state <= S_IO_SEND;
        S_IO_SEND:    state <= S_IO_WAIT;
        S_IO_WAIT: if (bus_in.ack) begin
          io_rdata <= bus_in.data[31:0];
          io_done  <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request must be held steady while stalled.
  a_hold_we: assert property (@(posedge clk) disable iff (!rst_n) (req && stall) |=> (!req || $stable(we)));
endmodule
