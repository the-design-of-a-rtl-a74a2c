// tb_rep_movs_unit: starts REP MOVS sequences with random counts (including
// zero), element sizes, direction flag and segment bases, with the advance
// input randomly held low. Checks the addresses of every copied element, the
// register values written back, the number of copies (= ECX) and the number
// of advancing cycles: one per iteration plus one final zero check, then
// three bubbles and REP_DONE (N + 1 + 4 cycles in all).
module tb_rep_movs_unit;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, adv, df;
  logic flush = 0;
  logic [31:0] ecx, esi, edi, src_seg_base, es_base;
  opsize_e size;
  logic [2:0] uop;
  logic busy, rep_done, mem_valid, wb_regs;
  logic [31:0] rd_addr, rd_high, wr_addr, wr_high, next_ecx, next_esi, next_edi;
  int checks = 0, failures = 0;
  rep_movs_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    start = 0; adv = 1; df = 0; ecx = 0; esi = 0; edi = 0; src_seg_base = 0; es_base = 0; size = SZ8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int n, copies, cyc, bubbles, dones;
      logic [31:0] s, d, step, nb;
      n = (t % 10 == 0) ? 0 : $urandom_range(1, 25);
      size = opsize_e'($urandom_range(0, 2));
      nb = (size == SZ8) ? 1 : (size == SZ16) ? 2 : 4;
      df = 1'($urandom);
      step = df ? -nb : nb;
      ecx = n; esi = $urandom; edi = $urandom; src_seg_base = $urandom; es_base = $urandom;
      s = esi; d = edi;
      copies = 0; cyc = 0; bubbles = 0; dones = 0;
      @(negedge clk);
      start = 1; adv = 1;
      @(negedge clk);
      start = 0;
      // Register inputs change after the first iteration (they are only held
      // while REP_FIRST waits); the unit must use its temporaries.
      while (uop != 3'd0) begin
        adv = ($urandom_range(0, 3) != 0);
        #1;
        if (uop == 3'd1 || uop == 3'd2) begin
          checks++;
          if (mem_valid !== (copies != n) || rep_done !== (copies == n)) begin
            failures++; $display("ERR copy %0d of %0d mem_valid=%b", copies, n, mem_valid);
          end
          if (mem_valid) begin
            checks++;
            if (rd_addr !== src_seg_base + s || wr_addr !== es_base + d ||
                rd_high !== src_seg_base + s + nb - 1 || wr_high !== es_base + d + nb - 1 ||
                next_ecx !== n - copies - 1 || next_esi !== s + step || next_edi !== d + step || !wb_regs) begin
              failures++; $display("ERR addresses at copy %0d", copies);
            end
          end
        end
        if (adv) begin
          cyc++;
          if (uop == 3'd3) bubbles++;
          if (uop == 3'd4) dones++;
          if (mem_valid) begin copies++; s = s + step; d = d + step; end
        end
        checks++;
        if (!busy) begin failures++; $display("ERR busy low in sequence"); end
        @(negedge clk);
        if (uop != 3'd1) begin ecx = $urandom; esi = $urandom; edi = $urandom; end
        if (cyc > 100) break;
      end
      checks++;
      if (copies != n || cyc != n + 1 + 4 || bubbles != 3 || dones != 1) begin
        failures++; $display("ERR n=%0d copies=%0d cycles=%0d bubbles=%0d", n, copies, cyc, bubbles);
      end
      adv = 1;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
