// tb_tlb: loads the 8 entries (6 cacheable pages, one non-cacheable page for
// the keyboard and one for the monitor, one page not present, one
// read-only) and looks up random addresses on all 8 ports at once,
// checking translation, page fault, protection fault and the non-cacheable
// device against a table kept here.
module tb_tlb;
  import x86_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ld_en, ld_valid, ld_present, ld_readonly, ld_noncacheable;
  logic [2:0] ld_idx;
  logic [19:0] ld_vpn;
  logic [2:0] ld_pfn;
  dev_id_e ld_dev;
  logic [7:0] lk_en, lk_write, lk_nc, lk_pf, lk_gp;
  logic [7:0][31:0] lk_vaddr;
  logic [7:0][14:0] lk_paddr;
  dev_id_e [7:0] lk_dev;
  int checks = 0, failures = 0;

  tlb dut (.clk, .rst_n, .ld_en, .ld_idx, .ld_vpn, .ld_pfn, .ld_valid, .ld_present, .ld_readonly,
    .ld_noncacheable, .ld_dev, .lk_en, .lk_vaddr, .lk_write, .lk_paddr, .lk_noncacheable(lk_nc),
    .lk_dev, .lk_pf, .lk_gp);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] vpns [8] = '{20'h00000, 20'h00001, 20'h00002, 20'h00003, 20'h00400, 20'h12345, 20'hF0000, 20'hF0001};
  logic [2:0]  pfns [8] = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd0, 3'd0};
  bit present [8] = '{1, 1, 1, 1, 1, 0, 1, 1};
  bit ro      [8] = '{0, 0, 0, 1, 0, 0, 0, 0};
  bit nc      [8] = '{0, 0, 0, 0, 0, 0, 1, 1};
  dev_id_e dv [8] = '{DEV_MEMORY, DEV_MEMORY, DEV_MEMORY, DEV_MEMORY, DEV_MEMORY, DEV_MEMORY, DEV_KEYBOARD, DEV_MONITOR};

  initial begin
    ld_en = 0; ld_idx = 0; ld_vpn = 0; ld_pfn = 0; ld_valid = 0; ld_present = 0; ld_readonly = 0;
    ld_noncacheable = 0; ld_dev = DEV_NONE; lk_en = 0; lk_write = 0; lk_vaddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Before loading, every lookup faults.
    @(negedge clk); lk_en = '1; #1;
    checks++; if (lk_pf != 8'hFF) failures++;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      ld_en = 1; ld_idx = 3'(i); ld_vpn = vpns[i]; ld_pfn = pfns[i]; ld_valid = 1;
      ld_present = present[i]; ld_readonly = ro[i]; ld_noncacheable = nc[i]; ld_dev = dv[i];
    end
    @(negedge clk); ld_en = 0;
    for (int n = 0; n < 2000; n++) begin
      int e [8];
      @(negedge clk);
      for (int p = 0; p < 8; p++) begin
        e[p] = $urandom_range(0, 8);   // 8 = an unmapped page
        lk_vaddr[p] = (e[p] == 8) ? {20'hABCDE, 12'($urandom)} : {vpns[e[p]], 12'($urandom)};
        lk_write[p] = 1'($urandom);
        lk_en[p] = 1;
      end
      #1;
      for (int p = 0; p < 8; p++) begin
        bit epf, egp;
        epf = (e[p] == 8) || !present[e[p]];
        egp = !epf && ro[e[p]] && lk_write[p];
        checks++;
        if (lk_pf[p] !== epf || lk_gp[p] !== egp) begin
          failures++; $display("ERR port %0d entry %0d pf=%b gp=%b", p, e[p], lk_pf[p], lk_gp[p]);
        end
        if (!epf) begin
          checks++;
          if (lk_paddr[p] !== {pfns[e[p]], lk_vaddr[p][11:0]} || lk_nc[p] !== nc[e[p]] ||
              (nc[e[p]] && lk_dev[p] !== dv[e[p]])) begin
            failures++; $display("ERR port %0d translation %h", p, lk_paddr[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
