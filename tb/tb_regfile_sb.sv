// tb_regfile_sb: exercises the scoreboard: invalidation makes a read stall,
// a forward from EX or WB with the matching id and tag releases it, a
// writeback with a stale tag (write-after-write) writes the value but keeps
// the register invalid until the youngest writer arrives, and random
// writes/reads against a reference model of values, valid bits and tags.
module tb_regfile_sb;
  logic clk = 0, rst_n = 0;
  logic clear = 0;
  logic [3:0] rd_en, rd_ready;
  logic [3:0][2:0] rd_id;
  logic [3:0][31:0] rd_data;
  logic stall;
  logic [2:0] inv_en, wr_en;
  logic [2:0][2:0] inv_id, wr_id;
  logic [2:0][31:0] wr_data;
  logic [7:0] inv_tag, wr_tag, fwd_ex_tag, fwd_wb_tag;
  logic fwd_ex_en, fwd_wb_en;
  logic [2:0] fwd_ex_id, fwd_wb_id;
  logic [31:0] fwd_ex_data, fwd_wb_data;
  logic [7:0][31:0] regs_out;
  logic [7:0] valid_out;
  int checks = 0, failures = 0, n_fwd = 0, n_waw = 0, n_stall = 0;

  regfile_sb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mv [8];
  logic        mvalid [8];
  logic [7:0]  mtag [8];

  task automatic idle_inputs();
    rd_en = 0; inv_en = 0; wr_en = 0; fwd_ex_en = 0; fwd_wb_en = 0;
    rd_id = '0; inv_id = '0; wr_id = '0; wr_data = '0; inv_tag = 0; wr_tag = 0;
    fwd_ex_id = 0; fwd_wb_id = 0; fwd_ex_tag = 0; fwd_wb_tag = 0; fwd_ex_data = 0; fwd_wb_data = 0;
  endtask

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERR %s", what); end
  endtask

  initial begin
    idle_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin mv[i] = 0; mvalid[i] = 1; mtag[i] = 0; end
    // Directed: write EAX=5, invalidate EAX with tag 7, read stalls.
    @(negedge clk); wr_en = 3'b001; wr_id[0] = 0; wr_data[0] = 5; wr_tag = 0;
    @(negedge clk); idle_inputs(); inv_en = 3'b001; inv_id[0] = 0; inv_tag = 8'd7;
    @(negedge clk); idle_inputs(); rd_en = 4'b0001; rd_id[0] = 0; #1;
    chk(stall && !rd_ready[0], "read of invalidated reg must stall"); n_stall++;
    // Forward from EX with wrong tag: still stalls; right tag: released.
    fwd_ex_en = 1; fwd_ex_id = 0; fwd_ex_tag = 8'd6; fwd_ex_data = 32'hAAAA; #1;
    chk(stall, "wrong-tag forward must not release");
    fwd_ex_tag = 8'd7; #1;
    chk(!stall && rd_data[0] == 32'hAAAA, "EX forward"); n_fwd++;
    fwd_ex_en = 0; fwd_wb_en = 1; fwd_wb_id = 0; fwd_wb_tag = 8'd7; fwd_wb_data = 32'hBBBB; #1;
    chk(!stall && rd_data[0] == 32'hBBBB, "WB forward"); n_fwd++;
    // WAW: second writer tag 9 invalidates again; writeback of tag 7 keeps it invalid.
    @(negedge clk); idle_inputs(); inv_en = 3'b001; inv_id[0] = 0; inv_tag = 8'd9;
    @(negedge clk); idle_inputs(); wr_en = 3'b001; wr_id[0] = 0; wr_data[0] = 32'h77; wr_tag = 8'd7;
    @(negedge clk); idle_inputs(); rd_en = 4'b0001; rd_id[0] = 0; #1;
    chk(stall && regs_out[0] == 32'h77, "older writer writes value, reg stays invalid"); n_waw++;
    @(negedge clk); idle_inputs(); wr_en = 3'b001; wr_id[0] = 0; wr_data[0] = 32'h99; wr_tag = 8'd9;
    @(negedge clk); idle_inputs(); rd_en = 4'b0001; rd_id[0] = 0; #1;
    chk(!stall && rd_data[0] == 32'h99, "youngest writer revalidates");
    mv[0] = 32'h99;
    // Random: model-based.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk); idle_inputs();
      for (int w = 0; w < 3; w++) begin
        wr_en[w] = $urandom_range(0, 2) == 0;
        wr_id[w] = 3'((w * 3 + n) % 8);
        wr_data[w] = $urandom;
      end
      wr_tag = 8'($urandom_range(0, 3));
      inv_en[0] = $urandom_range(0, 3) == 0; inv_id[0] = 3'($urandom); inv_tag = 8'($urandom_range(0, 3));
      for (int p = 0; p < 4; p++) begin rd_en[p] = 1; rd_id[p] = 3'($urandom); end
      #1;
      for (int p = 0; p < 4; p++) begin
        chk(rd_ready[p] == mvalid[rd_id[p]], "ready vs model");
        if (mvalid[rd_id[p]]) chk(rd_data[p] == mv[rd_id[p]], "data vs model");
      end
      @(posedge clk);
      for (int w = 0; w < 3; w++) if (wr_en[w]) begin
        mv[wr_id[w]] = wr_data[w];
        if (mtag[wr_id[w]] == wr_tag) mvalid[wr_id[w]] = 1;
      end
      if (inv_en[0]) begin mvalid[inv_id[0]] = 0; mtag[inv_id[0]] = inv_tag; end
    end
    chk(n_fwd > 0 && n_waw > 0 && n_stall > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
