// monitor_ctrl: monitor controller on the system bus (device id 11). Each
// bus write to the monitor puts byte 7:0 of the data bus into a circular
// buffer; when the buffer is full the oldest byte is dropped to make room
// (the processor may overrun the monitor). The display side takes bytes in
// order through disp_valid/disp_data/disp_pop. ACK comes two cycles after
// the request appears (buffer write, then ACK). The device id, the buffering and the
// overrun rule follow the design; the buffer depth (256 bytes, the same as
// the keyboard's), ignoring the bus address and the display-side port are
// this design's choices.
module monitor_ctrl
  import x86_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  bus_m_t     bus_in,
  output bus_s_t     bus_out,
  output logic       disp_valid,
  output logic [7:0] disp_data,
  input  logic       disp_pop,
  output logic       overrun
);
  localparam int unsigned PTR_W = $clog2(DEPTH);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_ACK} state_e;
  state_e state;

  logic [7:0]       buffer [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic [PTR_W:0]   count;
  logic [7:0]       byte_q;
  logic             wr_q;
  logic             do_write, do_pop;

  assign do_write   = (state == S_WRITE) && wr_q;
  assign do_pop     = disp_pop && (count != 0);
  assign disp_valid = (count != 0);
  assign disp_data  = buffer[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wptr    <= '0;
      rptr    <= '0;
      count   <= '0;
      byte_q  <= '0;
      wr_q    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (bus_in.bbsy && bus_in.dev_id == DEV_MONITOR) begin
          byte_q <= bus_in.data[7:0];
          wr_q   <= bus_in.brw;
          state  <= S_WRITE;
        end
        S_WRITE: state <= S_ACK;
        S_ACK:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase

      if (do_write) begin
        buffer[wptr] <= byte_q;
        wptr         <= wptr + 1'b1;
      end
      // A write into a full buffer discards the oldest byte.
      if (do_write && !do_pop && count == (PTR_W+1)'(DEPTH)) begin
        rptr    <= rptr + 1'b1;
        overrun <= 1'b1;
      end else if (do_pop) begin
        rptr  <= rptr + 1'b1;
        count <= count - 1'b1;
        if (do_write) count <= count;
      end else if (do_write) begin
        count <= count + 1'b1;
      end
    end
  end

  always_comb begin
    bus_out.ack  = (state == S_ACK);
    bus_out.data = '0;
  end
endmodule
