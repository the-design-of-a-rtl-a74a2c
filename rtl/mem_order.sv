// mem_order: control of the D-cache's single port and load/store ordering in
// the D-cache access stage. The cache RAM can do one read or one write per
// cycle, so the two users are multiplexed: a committed store from the
// writeback stage always gets the port (writes have priority), and the
// D-cache access stage's read gets it otherwise. The read stage must stall
// when it needs the port and a store has it, and, for memory ordering, when
// it reads memory while an older instruction in the execution or writeback
// stage will write memory (conservative: no address comparison).
// Combinational. Follows the design; the signal names are this design's.
module mem_order
  import x86_pkg::*;
(
  input  logic        dc_valid,
  input  logic        dc_rd_mem,
  input  logic [31:0] dc_rd_addr,
  input  opsize_e     dc_rd_size,
  input  logic        ex_valid,
  input  logic        ex_wr_mem,
  input  logic        wb_valid,
  input  logic        wb_wr_mem,
  input  logic        wb_commit_wr,
  input  logic [31:0] wb_wr_addr,
  input  logic [31:0] wb_wr_data,
  input  opsize_e     wb_wr_size,
  output logic        port_req,
  output logic        port_we,
  output logic [31:0] port_addr,
  output opsize_e     port_size,
  output logic [31:0] port_wdata,
  output logic        order_stall,
  output logic        port_stall
);
  always_comb begin
    order_stall = dc_valid && dc_rd_mem &&
                  ((ex_valid && ex_wr_mem) || (wb_valid && wb_wr_mem));
    port_we    = wb_commit_wr;
    port_req   = wb_commit_wr || (dc_valid && dc_rd_mem && !order_stall);
    port_addr  = wb_commit_wr ? wb_wr_addr : dc_rd_addr;
    port_size  = wb_commit_wr ? wb_wr_size : dc_rd_size;
    port_wdata = wb_wr_data;
    port_stall = dc_valid && dc_rd_mem && wb_commit_wr;
  end
endmodule
