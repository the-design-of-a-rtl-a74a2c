// keyboard_ctrl: keyboard controller on the system bus (device id 10).
// Bytes typed on the keyboard are stored in a 256-entry, 8-bit buffer at a
// wrapping write pointer; each new byte raises the controller's interrupt
// line, which stays high until the processor reads the buffer. The processor
// reads with a non-cacheable access: the low 8 bits of the bus address pick
// the buffer entry, which comes back in bits 7:0 of the data bus with ACK.
// ACK comes two cycles after the request appears (buffer access, then ACK). Keyboard input
// is taken only in the idle state (kb_ready); a bus request wins over input
// arriving in the same cycle. Buffer size, device id, the interrupt rule and
// the states follow the design; the write pointer, kb_ready and that
// priority are this design's choices. Bus writes to the keyboard are
// acknowledged and ignored.
module keyboard_ctrl
  import x86_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_m_t     bus_in,
  output bus_s_t     bus_out,
  input  logic       kb_valid,
  input  logic [7:0] kb_data,
  output logic       kb_ready,
  output logic       irq
);
  localparam int unsigned PTR_W = $clog2(DEPTH);
  typedef enum logic [1:0] {S_IDLE, S_SEND_INT, S_ACCESS, S_ACK} state_e;
  state_e state;

  logic [7:0]       buffer [DEPTH];
  logic [PTR_W-1:0] wptr, raddr;
  logic             rd_q;
  logic [7:0]       rdata_q;
  logic             sel;

  assign sel      = bus_in.bbsy && bus_in.dev_id == DEV_KEYBOARD;
  assign kb_ready = (state == S_IDLE) && !sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wptr    <= '0;
      raddr   <= '0;
      rd_q    <= 1'b0;
      rdata_q <= '0;
      irq     <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (sel) begin
            raddr <= bus_in.addr[PTR_W-1:0];
            rd_q  <= !bus_in.brw;
            state <= S_ACCESS;
          end else if (kb_valid) begin
            buffer[wptr] <= kb_data;
            wptr         <= wptr + 1'b1;
            state        <= S_SEND_INT;
          end
        end
        S_SEND_INT: begin
          irq   <= 1'b1;
          state <= S_IDLE;
        end
        S_ACCESS: begin
          rdata_q <= buffer[raddr];
          if (rd_q) irq <= 1'b0;
          state <= S_ACK;
        end
        S_ACK:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_out.ack  = (state == S_ACK);
    bus_out.data = (state == S_ACK) ? {120'd0, rdata_q} : '0;
  end
endmodule
