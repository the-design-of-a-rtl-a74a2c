// agu: address generation stage arithmetic.
//  * ModR/M/SIB address: segment base + base register + displacement +
//    scaled index, built from three 2-input adders (segment + scaled index,
//    base + displacement, then their sum), as in the stage's block diagram.
//  * ModR/M offset (base + displacement + scaled index, without the segment)
//    from the 3-input offset adder, for the segment limit check; and the
//    highest ModR/M address (address + access size - 1) for page checks.
//  * Stack address: stack segment base + ESP + a constant chosen by the
//    operation (0 for a POP, -2 for a 16-bit PUSH, -4 for a 32-bit PUSH) on
//    the 3-input stack adder, and the highest stack address touched.
//  * Interrupt table address: IDTR base + 8 * vector + (0 for the first
//    doubleword, 4 for the second), used by the LIDT1/LIDT2 micro-ops.
// Combinational. The adder structure, the stack constants and the 0/4 IDTR
// constant follow the design; 8-byte descriptor entries and the scale
// encoding (log2 of 1, 2, 4 or 8) are this design's choices.
module agu
  import x86_pkg::*;
(
  input  logic [31:0] seg_base,
  input  logic [31:0] base_val,
  input  logic        base_en,
  input  logic [31:0] index_val,
  input  logic        index_en,
  input  logic [1:0]  scale_log2,
  input  logic [31:0] disp,
  input  opsize_e     size,
  // stack
  input  logic [31:0] ss_base,
  input  logic [31:0] esp,
  input  logic        is_push,
  // interrupt table
  input  logic [31:0] idtr_base,
  input  logic [7:0]  vector,
  input  logic        second_dword,
  output logic [31:0] modrm_addr,
  output logic [31:0] modrm_offset,
  output logic [31:0] modrm_high,
  output logic [31:0] stack_addr,
  output logic [31:0] stack_offset,
  output logic [31:0] stack_high,
  output logic [31:0] idt_addr
);
  logic [31:0] b, x, seg_plus_idx, base_plus_disp, nbm1, stack_const, idt_const;
  logic        c0, c1, c2, c3, c4, c5;

  always_comb begin
    b    = base_en  ? base_val : 32'd0;
    x    = index_en ? (index_val << scale_log2) : 32'd0;
    nbm1 = (size == SZ8) ? 32'd0 : (size == SZ16) ? 32'd1 : 32'd3;
    if (!is_push)          stack_const = 32'd0;
    else if (size == SZ16) stack_const = 32'hFFFF_FFFE;
    else                   stack_const = 32'hFFFF_FFFC;
    idt_const = {21'd0, vector, 3'd0} + (second_dword ? 32'd4 : 32'd0);
  end

  cs_adder32 u_seg_idx   (.a(seg_base), .b(x),    .cin(1'b0), .sum(seg_plus_idx),   .cout(c0));
  cs_adder32 u_base_disp (.a(b),        .b(disp), .cin(1'b0), .sum(base_plus_disp), .cout(c1));
  cs_adder32 u_modrm     (.a(seg_plus_idx), .b(base_plus_disp), .cin(1'b0), .sum(modrm_addr), .cout(c2));
  add3_32    u_offset    (.a(b), .b(disp), .c(x), .sum(modrm_offset));
  cs_adder32 u_modrm_hi  (.a(modrm_addr), .b(nbm1), .cin(1'b0), .sum(modrm_high), .cout(c3));
  add3_32    u_stack     (.a(ss_base), .b(esp), .c(stack_const), .sum(stack_addr));
  cs_adder32 u_stack_off (.a(esp), .b(stack_const), .cin(1'b0), .sum(stack_offset), .cout(c4));
  add3_32    u_stack_hi  (.a(ss_base), .b(esp), .c(stack_const + nbm1), .sum(stack_high));
  cs_adder32 u_idtr      (.a(idtr_base), .b(idt_const), .cin(1'b0), .sum(idt_addr), .cout(c5));

  // Carries out of 32-bit address arithmetic wrap, as in x86 address sums.
  logic unused_carries;
  assign unused_carries = ^{c0, c1, c2, c3, c4, c5};
endmodule
