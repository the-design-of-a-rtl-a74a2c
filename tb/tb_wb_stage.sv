// tb_wb_stage: checks register write alignment for every size and register
// id (including AH..BH), that writes are gated by valid, no exception and no
// D-cache stall, the exception priority PF > GP > INT1 > INT2 with flush,
// vector and saved EIP/CS/flags, that exceptions stay disabled until a POP
// EFLAGS commits, and that wb_exception_stall lasts until handler_done.
module tb_wb_stage;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, dcache_stall, pf_exc, gp_exc, wr_mem, is_pop_eflags, int1, int2, handler_done;
  logic [31:0] eip, wr_addr, mem_data;
  logic [15:0] cs;
  flags_t cur_flags, flag_vals, flag_we;
  regwr_t dest, src, base;
  logic commit, wb_wr_mem, flush, wb_exception_stall, exc_enabled, exc_pending;
  logic [31:0] wb_write_address, wb_write_data, saved_eip;
  logic [2:0] wb_reg_we;
  logic [2:0][2:0] wb_reg_id;
  logic [2:0][31:0] wb_reg_value;
  flags_t wb_flag_values, wb_write_flags, saved_flags;
  logic [7:0] exc_vector;
  logic [15:0] saved_cs;
  int checks = 0, failures = 0, n_exc = 0, n_int = 0;

  wb_stage dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("ERR %s", what); end
  endtask

  task automatic quiet();
    valid = 0; dcache_stall = 0; pf_exc = 0; gp_exc = 0; wr_mem = 0; is_pop_eflags = 0;
    int1 = 0; int2 = 0; handler_done = 0; eip = 0; wr_addr = 0; mem_data = 0; cs = 0;
    cur_flags = '0; flag_vals = '0; flag_we = '0; dest = '0; src = '0; base = '0;
  endtask

  function automatic logic [34:0] ref_align(regwr_t r);
    logic [31:0] v;
    logic [2:0] id;
    id = r.id; v = r.old;
    if (r.size == SZ32) v = r.value;
    else if (r.size == SZ16) v[15:0] = r.value[15:0];
    else if (r.id < 4) v[7:0] = r.value[7:0];
    else begin id = r.id - 4; v[15:8] = r.value[7:0]; end
    return {id, v};
  endfunction

  initial begin
    quiet();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Alignment, random.
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); quiet();
      valid = 1;
      dest = '{en: 1, id: 3'($urandom), size: opsize_e'($urandom_range(0, 2)), value: $urandom, old: $urandom};
      src  = '{en: 1, id: 3'($urandom), size: opsize_e'($urandom_range(0, 2)), value: $urandom, old: $urandom};
      base = '{en: 1, id: 3'($urandom), size: SZ32, value: $urandom, old: $urandom};
      wr_mem = 1; wr_addr = $urandom; mem_data = $urandom; flag_we = flags_t'($urandom); flag_vals = flags_t'($urandom);
      dcache_stall = (n % 5 == 0);
      #1;
      chk({wb_reg_id[0], wb_reg_value[0]} == ref_align(dest), "dest align");
      chk({wb_reg_id[1], wb_reg_value[1]} == ref_align(src), "src align");
      chk({wb_reg_id[2], wb_reg_value[2]} == ref_align(base), "base align");
      chk(wb_reg_we == (dcache_stall ? 3'b000 : 3'b111), "reg write gating");
      chk(wb_wr_mem == !dcache_stall && wb_write_address == wr_addr && wb_write_data == mem_data, "mem write");
      chk(wb_write_flags == (dcache_stall ? '0 : flag_we), "flag write gating");
      chk(!flush, "no flush");
    end
    // Priority: all four at once -> PF, then disabled.
    @(negedge clk); quiet();
    int1 = 1; int2 = 1;
    @(negedge clk); quiet();
    valid = 1; pf_exc = 1; gp_exc = 1; eip = 32'h1234; cs = 16'h8; cur_flags = 7'h55; dest.en = 1; wr_mem = 1;
    #1;
    chk(flush && exc_vector == 8'd14, "PF first");
    chk(wb_reg_we == 0 && !wb_wr_mem && !commit, "excepting instruction inhibited");
    chk(wb_exception_stall, "exception stall with flush");
    n_exc++;
    @(posedge clk); #1;
    chk(saved_eip == 32'h1234 && saved_cs == 16'h8 && saved_flags == 7'h55, "saved state");
    chk(!exc_enabled, "disabled after taking");
    @(negedge clk); quiet(); valid = 1; #1;
    chk(!flush && commit, "interrupt held off while disabled");
    chk(wb_exception_stall, "stall until handler_done");
    handler_done = 1;
    @(negedge clk); quiet(); #1;
    chk(!wb_exception_stall, "stall released");
    // IRET: POP EFLAGS re-enables.
    @(negedge clk); quiet(); valid = 1; is_pop_eflags = 1;
    @(negedge clk); quiet(); #1;
    chk(exc_enabled, "enabled after POP EFLAGS");
    valid = 1; gp_exc = 1; #1;
    chk(flush && exc_vector == 8'd13, "GP next");
    @(negedge clk); quiet(); handler_done = 1; valid = 1; is_pop_eflags = 1;
    @(negedge clk); quiet(); valid = 1; #1;
    chk(flush && exc_vector == 8'd0, "INT1 before INT2"); n_int++;
    @(negedge clk); quiet(); handler_done = 1; valid = 1; is_pop_eflags = 1;
    @(negedge clk); quiet(); valid = 1; #1;
    chk(flush && exc_vector == 8'd1, "INT2 last"); n_int++;
    @(negedge clk); quiet(); handler_done = 1; valid = 1; is_pop_eflags = 1;
    @(negedge clk); quiet(); valid = 1; #1;
    chk(!flush && commit, "nothing pending");
    chk(n_exc > 0 && n_int > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
