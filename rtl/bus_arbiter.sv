// bus_arbiter: centralised, synchronous arbiter for the system bus. Only the
// I-cache and the D-cache can master the bus. A grant is registered: at a
// clock edge where the bus is not busy and no grant is outstanding, a
// requesting D-cache is granted, and the I-cache is granted only if the
// D-cache is not requesting (D-cache priority). A grant lasts one cycle;
// the granted cache raises BBSY in that same cycle and holds it until its
// transaction ends, which keeps further grants off. The structure (two
// AND terms into two flip-flops, fed back through a NOR of both grants)
// follows the arbitration schematic; reset clearing both grants is this
// design's choice.
module bus_arbiter (
  input  logic clk,
  input  logic rst_n,
  input  logic bbsy,
  input  logic br_dcache,
  input  logic br_icache,
  output logic bg_dcache,
  output logic bg_icache
);
  logic none_granted;
  assign none_granted = ~(bg_dcache | bg_icache);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bg_dcache <= 1'b0;
      bg_icache <= 1'b0;
    end else begin
      bg_dcache <= ~bbsy & br_dcache & none_granted;
      bg_icache <= ~bbsy & br_icache & ~br_dcache & none_granted;
    end
  end

  // Never two masters at once.
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) !(bg_dcache && bg_icache));
endmodule
