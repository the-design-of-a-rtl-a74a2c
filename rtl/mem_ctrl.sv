// mem_ctrl: memory controller and 32 KB main memory on the system bus.
// The memory is 8 banks of 128-bit words; the top 3 bits of the 15-bit byte
// address pick the bank, bits 11:4 the word, and bits 3:0 are ignored
// because every transfer is a whole 16-byte block. When the bus is busy and
// carries device id 01 the controller latches address, BRW and write data
// and loads its timer with LATENCY. The timer counts down; at zero the bank
// is read or written, and in the next cycle ACK is raised for one cycle with
// the read block on the data bus. ACK comes LATENCY+2 cycles after the
// first cycle the master's request is on the bus.
// States, the device id and the timer scheme follow the memory controller
// state diagram; the timer's value is not given and LATENCY is this
// design's choice.
module mem_ctrl
  import x86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 32768,
  parameter int unsigned LATENCY   = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  bus_m_t bus_in,
  output bus_s_t bus_out
);
  localparam int unsigned WORDS      = MEM_BYTES / 16;
  localparam int unsigned BANK_WORDS = WORDS / 8;
  localparam int unsigned ROW_W      = $clog2(BANK_WORDS);
  localparam int unsigned CNT_W      = $clog2(LATENCY + 1);

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_ACK} state_e;
  state_e state;

  logic [127:0] bank [8][BANK_WORDS];
  logic [BUS_ADDR_W-1:0] addr_q;
  logic                  brw_q;
  logic [127:0]          wdata_q, rdata_q;
  logic [CNT_W-1:0]      counter;

  logic [2:0]       bank_sel;
  logic [ROW_W-1:0] row_sel;
  assign bank_sel = addr_q[BUS_ADDR_W-1 -: 3];
  assign row_sel  = addr_q[4 +: ROW_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      counter <= CNT_W'(LATENCY);
      addr_q  <= '0;
      brw_q   <= 1'b0;
      wdata_q <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          counter <= CNT_W'(LATENCY);
          if (bus_in.bbsy && bus_in.dev_id == DEV_MEMORY) begin
            addr_q  <= bus_in.addr;
            brw_q   <= bus_in.brw;
            wdata_q <= bus_in.data;
            state   <= S_ACCESS;
          end
        end
        S_ACCESS: begin
          if (counter == 0) begin
            if (brw_q) bank[bank_sel][row_sel] <= wdata_q;
            else       rdata_q <= bank[bank_sel][row_sel];
            state <= S_ACK;
          end else begin
            counter <= counter - 1'b1;
          end
        end
        S_ACK:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_out.ack  = (state == S_ACK);
    bus_out.data = (state == S_ACK) ? rdata_q : '0;
  end
endmodule
