// tlb: fully associative translation look-aside buffer of the MMU.
//
// ENTRIES entries (64 for instructions, 128 for data), each mapping one
// 4 KiB virtual page of one address space (ASID) to a physical page. A
// lookup compares the virtual page number and the current ASID with every
// entry at once (combinational) and gives hit and the physical address.
// On a miss, software or the memory system's page table walker installs
// the translation through the write port: an entry already holding the
// same page and ASID is overwritten, otherwise the first free entry is used, otherwise a
// round-robin victim: the first entry that is not wired at or after the
// replacement pointer. If every entry is wired the write is dropped. Wired entries are
// never replaced and survive inv_all, which removes every other entry (for
// example after an address-space switch).
// Timing: lookup combinational; a write or inv_all takes effect at the next
// clock edge. Reset empties the TLB.
// The two sizes, full associativity, ASIDs and wired entries follow the
// description; the page size, ASID width and the replacement rule are this
// design's choices. The walk itself is outside this module.
module tlb
  import soc_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,  // a power of two
  parameter int unsigned PAGE_W  = 12,   // log2 of the page size
  parameter int unsigned ASID_W  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // lookup
  input  logic [ADDR_W-1:0]         vaddr,
  input  logic [ASID_W-1:0]         asid,
  output logic                      hit,
  output logic [ADDR_W-1:0]         paddr,
  // refill / maintenance
  input  logic                      wr_en,
  input  logic [ADDR_W-PAGE_W-1:0]  wr_vpn,
  input  logic [ASID_W-1:0]         wr_asid,
  input  logic [ADDR_W-PAGE_W-1:0]  wr_ppn,
  input  logic                      wr_wired,
  input  logic                      inv_all
);

  localparam int unsigned PN_W = ADDR_W - PAGE_W;
  localparam int unsigned IW   = $clog2(ENTRIES);

  typedef struct packed {
    logic              valid;
    logic              wired;
    logic [PN_W-1:0]   vpn;
    logic [ASID_W-1:0] asid;
    logic [PN_W-1:0]   ppn;
  } entry_t;

  entry_t        ent [ENTRIES];
  logic [IW-1:0] rr;

  // lookup
  always_comb begin
    hit   = 1'b0;
    paddr = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].valid && ent[i].vpn == vaddr[ADDR_W-1:PAGE_W] && ent[i].asid == asid) begin
        hit   = 1'b1;
        paddr = {ent[i].ppn, vaddr[PAGE_W-1:0]};
      end
  end

  // choice of the entry a write goes to
  logic          same_f, free_f, rr_ok;
  logic [IW-1:0] same_i, free_i, rr_i, wr_i;

  always_comb begin
    same_f = 1'b0; same_i = '0;
    free_f = 1'b0; free_i = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (ent[i].valid && ent[i].vpn == wr_vpn && ent[i].asid == wr_asid) begin
        same_f = 1'b1; same_i = IW'(i);
      end
      if (!ent[i].valid) begin
        free_f = 1'b1; free_i = IW'(i);
      end
    end
    rr_ok = 1'b0; rr_i = rr;
    for (int k = 0; k < ENTRIES; k++)
      if (!rr_ok && !ent[IW'(rr + IW'(k))].wired) begin
        rr_ok = 1'b1; rr_i = IW'(rr + IW'(k));
      end
    wr_i  = same_f ? same_i : (free_f ? free_i : rr_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      rr <= '0;
    end else begin
      if (inv_all) begin
        for (int i = 0; i < ENTRIES; i++)
          if (!ent[i].wired) ent[i].valid <= 1'b0;
      end else if (wr_en && (same_f || free_f || rr_ok)) begin
        ent[wr_i] <= '{valid: 1'b1, wired: wr_wired, vpn: wr_vpn, asid: wr_asid, ppn: wr_ppn};
      end
      // the round-robin pointer moves past each replaced entry
      if (!inv_all && wr_en && !same_f && !free_f && rr_ok)
        rr <= rr_i + 1'b1;
    end
  end

endmodule
