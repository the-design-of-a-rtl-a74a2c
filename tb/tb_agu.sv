// tb_agu: compares every address the AGU produces with sums computed here:
// ModR/M address, offset and highest address for random base/index/scale/
// displacement (with base and index enabled or not), stack address and
// highest address for POP and 16/32-bit PUSH, and the interrupt table
// address for both doublewords of random vectors.
module tb_agu;
  import x86_pkg::*;
  logic [31:0] seg_base, base_val, index_val, disp, ss_base, esp, idtr_base;
  logic base_en, index_en, is_push, second_dword;
  logic [1:0] scale_log2;
  logic [7:0] vector;
  opsize_e size;
  logic [31:0] modrm_addr, modrm_offset, modrm_high, stack_addr, stack_offset, stack_high, idt_addr;
  int checks = 0, failures = 0;
  agu dut (.*);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [31:0] off, k, nb;
    for (int i = 0; i < 10000; i++) begin
      seg_base = $urandom; base_val = $urandom; index_val = $urandom; disp = $urandom;
      base_en = 1'($urandom); index_en = 1'($urandom); scale_log2 = 2'($urandom);
      size = opsize_e'($urandom_range(0, 2));
      ss_base = $urandom; esp = $urandom; is_push = 1'($urandom);
      idtr_base = $urandom; vector = 8'($urandom); second_dword = 1'($urandom);
      #1;
      nb  = (size == SZ8) ? 1 : (size == SZ16) ? 2 : 4;
      off = (base_en ? base_val : 0) + disp + (index_en ? index_val * (32'd1 << scale_log2) : 0);
      k   = is_push ? -nb : 0;
      if (is_push && size == SZ8) k = -4;
      checks++;
      if (modrm_offset !== off || modrm_addr !== seg_base + off || modrm_high !== seg_base + off + nb - 1) begin
        failures++; $display("ERR modrm %h %h %h", modrm_addr, modrm_offset, modrm_high);
      end
      checks++;
      if (stack_addr !== ss_base + esp + k || stack_offset !== esp + k || stack_high !== ss_base + esp + k + nb - 1) begin
        failures++; $display("ERR stack %h", stack_addr);
      end
      checks++;
      if (idt_addr !== idtr_base + vector * 8 + (second_dword ? 4 : 0)) begin
        failures++; $display("ERR idt %h", idt_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
