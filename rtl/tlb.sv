// tlb: 8-entry, fully associative translation buffer with NPORTS lookup
// ports (8 in the design: the fetch, data, stack, REP MOVS and high/low
// addresses all checked in parallel). Each entry holds a virtual page number,
// a physical frame number and the bits valid, present, read-only,
// non-cacheable and a 2-bit device id (the device an uncached page maps
// to). A lookup that matches no valid entry, or matches one whose present
// bit is clear, raises pf (page fault); a write to a read-only page raises
// gp. The physical address is the frame number joined with the page offset.
// Entries are loaded through a write port, one per cycle. Combinational
// lookup, registered entries.
// Follows the design: 8 entries, 8 ports, the entry bits, and its use of 6
// entries for memory and 2 non-cacheable entries for keyboard and monitor
// (that split is made by what software loads). This design's choices: 4 KB
// pages (so a 3-bit frame number covers the 32 KB memory), full
// associativity and the load port.
module tlb
  import x86_pkg::*;
#(
  parameter int unsigned ENTRIES   = 8,
  parameter int unsigned NPORTS    = 8,
  parameter int unsigned PAGE_BITS = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // load port
  input  logic                      ld_en,
  input  logic [$clog2(ENTRIES)-1:0] ld_idx,
  input  logic [31-PAGE_BITS:0]     ld_vpn,
  input  logic [BUS_ADDR_W-1-PAGE_BITS:0] ld_pfn,
  input  logic                      ld_valid,
  input  logic                      ld_present,
  input  logic                      ld_readonly,
  input  logic                      ld_noncacheable,
  input  dev_id_e                   ld_dev,
  // lookup ports
  input  logic [NPORTS-1:0]         lk_en,
  input  logic [NPORTS-1:0][31:0]   lk_vaddr,
  input  logic [NPORTS-1:0]         lk_write,
  output logic [NPORTS-1:0][BUS_ADDR_W-1:0] lk_paddr,
  output logic [NPORTS-1:0]         lk_noncacheable,
  output dev_id_e [NPORTS-1:0]      lk_dev,
  output logic [NPORTS-1:0]         lk_pf,
  output logic [NPORTS-1:0]         lk_gp
);
  localparam int unsigned VPN_W = 32 - PAGE_BITS;
  localparam int unsigned PFN_W = BUS_ADDR_W - PAGE_BITS;

  typedef struct packed {
    logic             valid;
    logic             present;
    logic             readonly;
    logic             noncacheable;
    dev_id_e          dev;
    logic [VPN_W-1:0] vpn;
    logic [PFN_W-1:0] pfn;
  } entry_t;

  entry_t ent [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else if (ld_en) begin
      ent[ld_idx] <= '{valid: ld_valid, present: ld_present, readonly: ld_readonly,
                       noncacheable: ld_noncacheable, dev: ld_dev, vpn: ld_vpn, pfn: ld_pfn};
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      entry_t e;
      logic   found;
      e     = '0;
      found = 1'b0;
      for (int i = 0; i < ENTRIES; i++) begin
        if (ent[i].valid && ent[i].vpn == lk_vaddr[p][31:PAGE_BITS]) begin
          e     = ent[i];
          found = 1'b1;
        end
      end
      lk_paddr[p]        = {e.pfn, lk_vaddr[p][PAGE_BITS-1:0]};
      lk_noncacheable[p] = e.noncacheable;
      lk_dev[p]          = e.noncacheable ? e.dev : DEV_MEMORY;
      lk_pf[p]           = lk_en[p] && !(found && e.present);
      lk_gp[p]           = lk_en[p] && found && e.present && e.readonly && lk_write[p];
    end
  end
endmodule
