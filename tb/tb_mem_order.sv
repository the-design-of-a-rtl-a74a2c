// tb_mem_order: exhaustive check of the port multiplexing and the ordering
// stall over all combinations of the control inputs.
module tb_mem_order;
  import x86_pkg::*;
  logic dc_valid, dc_rd_mem, ex_valid, ex_wr_mem, wb_valid, wb_wr_mem, wb_commit_wr;
  logic [31:0] dc_rd_addr, wb_wr_addr, wb_wr_data, port_addr, port_wdata;
  opsize_e dc_rd_size, wb_wr_size, port_size;
  logic port_req, port_we, order_stall, port_stall;
  int checks = 0, failures = 0;
  mem_order dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic e_order, e_req;
    dc_rd_addr = 32'h1234; wb_wr_addr = 32'h5678; wb_wr_data = 32'hCAFE;
    dc_rd_size = SZ8; wb_wr_size = SZ32;
    for (int v = 0; v < 128; v++) begin
      {dc_valid, dc_rd_mem, ex_valid, ex_wr_mem, wb_valid, wb_wr_mem, wb_commit_wr} = 7'(v);
      #1;
      e_order = dc_valid & dc_rd_mem & ((ex_valid & ex_wr_mem) | (wb_valid & wb_wr_mem));
      e_req   = wb_commit_wr | (dc_valid & dc_rd_mem & ~e_order);
      checks++;
      if (order_stall !== e_order || port_req !== e_req || port_we !== wb_commit_wr ||
          port_addr !== (wb_commit_wr ? 32'h5678 : 32'h1234) ||
          port_size !== (wb_commit_wr ? SZ32 : SZ8) ||
          port_stall !== (dc_valid & dc_rd_mem & wb_commit_wr)) begin
        failures++; $display("ERR case %b", 7'(v));
      end
    end
    checks++; if (port_wdata !== 32'hCAFE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
