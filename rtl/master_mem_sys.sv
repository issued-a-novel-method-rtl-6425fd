// master_mem_sys: memory system of the master processor.
//
// Connects the master processor's instruction-fetch port and data port to
// its bus interface (master port 0 of the system bus):
//
//   fetch --> I-TLB (64) --+                     +--> L1 I-cache 16 KiB, 2-way --+
//                          +--> region protection|                               +--> L2 256 KiB 4-way --> bus
//   data  --> D-TLB (128) -+                     +--> L1 D-cache 16 KiB, 2-way --> write buffer (16) --+
//
// With mmu_en set, virtual addresses are translated by the TLBs (4 KiB
// pages, current ASID). On a TLB miss with ptw_en clear, the access is
// answered one cycle later with err and *_tlb_miss and reaches no cache, so
// that software can refill the TLB through the tlb_wr_* port and retry.
// With ptw_en set the TLB refills itself (auto-refill): a walker reads the
// page table entry, uncached, through the L1 data cache port from
//   ptw_base + 8 * VPN            (one-level linear table of 64-bit entries)
// where an entry holds bit 0 valid, bit 1 wired and bits [31:12] the
// physical page number. A valid entry is written into the TLB of the side
// that missed, with the current ASID, and the held access then proceeds; an
// invalid entry, or an error reading it, is answered with err and
// *_tlb_miss. A data-side miss is walked before a fetch-side one; a fetch
// walk starts only while no data access is requested. With mmu_en clear, addresses are
// physical. The region protection unit gives each physical address the
// access mode of its 512 MiB region (bypass, write-through, write-back with
// or without allocate); bypassed accesses pass through both cache levels
// as single words, so the shared memory, the arbitration register and the
// mailbox are reached uncached when their region is set to bypass. The L2
// applies the same region policy as the L1s (the attributes travel with
// every request), so a write-through store reaches the bus.
//
// Timing: an L1 hit answers one cycle after valid; an L2 hit adds ten cycles
// plus the L1 line fill; a bus access adds the bus transfer per word. The
// processor ports hold valid and the request until a one-cycle ready.
// Sizes, ways, line sizes, latencies, the write buffer and the TLB sizes
// follow the description; the joining of the two L1 caches onto the L2
// (data first), the TLB-miss answer, the page table format of the
// auto-refill and the configuration ports are this design's choices.
module master_mem_sys
  import soc_pkg::*;
#(
  parameter int unsigned L1I_BYTES   = 16 * 1024,
  parameter int unsigned L1D_BYTES   = 16 * 1024,
  parameter int unsigned L1_WAYS     = 2,
  parameter int unsigned L1_LINE     = 32,
  parameter int unsigned L1_LAT      = 1,
  parameter int unsigned L2_BYTES    = 256 * 1024,
  parameter int unsigned L2_WAYS     = 4,
  parameter int unsigned L2_LINE     = 64,
  parameter int unsigned L2_LAT      = 10,
  parameter int unsigned WBUF_DEPTH  = 16,
  parameter int unsigned ITLB_ENTRIES = 64,
  parameter int unsigned DTLB_ENTRIES = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction fetch port
  input  logic              if_valid,
  input  logic [ADDR_W-1:0] if_addr,
  input  logic              if_lock,
  input  logic              if_unlock,
  output logic              if_ready,
  output logic              if_err,
  output logic              if_tlb_miss,
  output logic [DATA_W-1:0] if_rdata,
  // data port
  input  logic              d_valid,
  input  logic              d_we,
  input  logic [ADDR_W-1:0] d_addr,
  input  logic [DATA_W-1:0] d_wdata,
  input  logic [BE_W-1:0]   d_be,
  input  logic              d_lock,
  input  logic              d_unlock,
  output logic              d_ready,
  output logic              d_err,
  output logic              d_tlb_miss,
  output logic [DATA_W-1:0] d_rdata,
  // MMU control
  input  logic              mmu_en,
  input  logic [7:0]        asid,
  input  logic              tlb_wr_en,
  input  logic              tlb_wr_dside,   // 0: I-TLB, 1: D-TLB
  input  logic [19:0]       tlb_wr_vpn,
  input  logic [7:0]        tlb_wr_asid,
  input  logic [19:0]       tlb_wr_ppn,
  input  logic              tlb_wr_wired,
  input  logic              tlb_inv_all,
  input  logic              ptw_en,         // hardware TLB refill
  input  logic [ADDR_W-1:0] ptw_base,       // page table base (physical)
  input  logic              rp_cfg_we,
  input  logic [2:0]        rp_cfg_region,
  input  region_mode_e      rp_cfg_mode,
  // bus interface (master port 0)
  output logic              b_valid,
  output logic              b_we,
  output logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_wdata,
  output logic [BE_W-1:0]   b_be,
  input  logic              b_ready,
  input  logic              b_err,
  input  logic [DATA_W-1:0] b_rdata,
  // status
  output logic [$clog2(WBUF_DEPTH+1)-1:0] wbuf_fill
);

  // ---------------- address translation ----------------
  logic              itlb_hit, dtlb_hit;
  logic [ADDR_W-1:0] itlb_pa, dtlb_pa, i_pa, d_pa;

  // TLB write: from software, or from the walker (which takes precedence)
  logic              w_wr, w_side;
  logic [19:0]       w_vpn, t_vpn, t_ppn;
  logic [7:0]        t_asid;
  logic              t_wired;
  logic [DATA_W-1:0] dc_rdata;

  assign t_vpn   = w_wr ? w_vpn : tlb_wr_vpn;
  assign t_asid  = w_wr ? asid : tlb_wr_asid;
  assign t_ppn   = w_wr ? dc_rdata[31:12] : tlb_wr_ppn;
  assign t_wired = w_wr ? dc_rdata[1] : tlb_wr_wired;

  tlb #(.ENTRIES(ITLB_ENTRIES)) u_itlb (
    .clk, .rst_n, .vaddr(if_addr), .asid, .hit(itlb_hit), .paddr(itlb_pa),
    .wr_en(w_wr ? !w_side : (tlb_wr_en && !tlb_wr_dside)), .wr_vpn(t_vpn), .wr_asid(t_asid),
    .wr_ppn(t_ppn), .wr_wired(t_wired), .inv_all(tlb_inv_all)
  );
  tlb #(.ENTRIES(DTLB_ENTRIES)) u_dtlb (
    .clk, .rst_n, .vaddr(d_addr), .asid, .hit(dtlb_hit), .paddr(dtlb_pa),
    .wr_en(w_wr ? w_side : (tlb_wr_en && tlb_wr_dside)), .wr_vpn(t_vpn), .wr_asid(t_asid),
    .wr_ppn(t_ppn), .wr_wired(t_wired), .inv_all(tlb_inv_all)
  );

  logic i_ok, d_ok, i_miss_q, d_miss_q;
  assign i_pa = mmu_en ? itlb_pa : if_addr;
  assign d_pa = mmu_en ? dtlb_pa : d_addr;
  assign i_ok = !mmu_en || itlb_hit;
  assign d_ok = !mmu_en || dtlb_hit;

  // ---------------- page table walker (auto-refill) ----------------
  typedef enum logic [1:0] {W_IDLE, W_READ, W_FAULT} wstate_e;
  wstate_e           ws;
  logic              walking, w_ok, w_fault, dc_ready, dc_err;
  logic [ADDR_W-1:0] w_addr;

  assign walking = (ws == W_READ);
  assign w_addr  = ptw_base + {9'b0, w_vpn, 3'b000};
  assign w_ok    = walking && dc_ready && !dc_err && dc_rdata[0];
  assign w_fault = walking && dc_ready && !w_ok;
  assign w_wr    = w_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws     <= W_IDLE;
      w_side <= 1'b0;
      w_vpn  <= '0;
    end else begin
      unique case (ws)
        W_IDLE: if (mmu_en && ptw_en) begin
          if (d_valid && !dtlb_hit) begin
            ws <= W_READ; w_side <= 1'b1; w_vpn <= d_addr[31:12];
          end else if (if_valid && !itlb_hit && !d_valid) begin
            ws <= W_READ; w_side <= 1'b0; w_vpn <= if_addr[31:12];
          end
        end
        W_READ:  if (dc_ready) ws <= w_ok ? W_IDLE : W_FAULT;
        default: ws <= W_IDLE;    // W_FAULT: the miss answer is out
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_miss_q <= 1'b0;
      d_miss_q <= 1'b0;
    end else if (ptw_en) begin
      i_miss_q <= w_fault && !w_side;
      d_miss_q <= w_fault && w_side;
    end else begin
      i_miss_q <= if_valid && !i_ok && !i_miss_q;
      d_miss_q <= d_valid && !d_ok && !d_miss_q;
    end
  end

  // ---------------- region protection ----------------
  mem_attr_t [1:0]    rp_attr;
  region_mode_e [1:0] rp_mode;
  region_mode_e [NREGIONS-1:0] rp_modes;

  region_prot #(.NPORTS(2)) u_rp (
    .clk, .rst_n, .cfg_we(rp_cfg_we), .cfg_region(rp_cfg_region), .cfg_mode(rp_cfg_mode),
    .modes(rp_modes), .addr({d_pa, i_pa}), .mode(rp_mode), .attr(rp_attr)
  );

  // ---------------- L1 caches ----------------
  logic              ic_ready, ic_err;
  logic [DATA_W-1:0] ic_rdata;

  logic [1:0]             x_valid, x_we, x_ready;
  mem_attr_t [1:0]        x_attr;
  logic [1:0][ADDR_W-1:0] x_addr;
  logic [1:0][DATA_W-1:0] x_wdata;
  logic [1:0][BE_W-1:0]   x_be;
  logic                   x_err;
  logic [DATA_W-1:0]      x_rdata;

  // L1D downstream, into the write buffer
  logic              wd_valid, wd_we, wd_ready, wd_err;
  mem_attr_t         wd_attr;
  logic [ADDR_W-1:0] wd_addr;
  logic [DATA_W-1:0] wd_wdata, wd_rdata;
  logic [BE_W-1:0]   wd_be;

  cache #(.SIZE_BYTES(L1I_BYTES), .WAYS(L1_WAYS), .LINE_BYTES(L1_LINE), .HIT_LAT(L1_LAT)) u_l1i (
    .clk, .rst_n,
    .up_valid(if_valid && i_ok), .up_we(1'b0), .up_addr(i_pa), .up_wdata('0), .up_be('1),
    .up_attr(rp_attr[0]), .up_lock(if_lock), .up_unlock(if_unlock),
    .up_ready(ic_ready), .up_err(ic_err), .up_rdata(ic_rdata),
    .dn_valid(x_valid[0]), .dn_we(x_we[0]), .dn_addr(x_addr[0]), .dn_wdata(x_wdata[0]),
    .dn_be(x_be[0]), .dn_attr(x_attr[0]),
    .dn_ready(x_ready[0]), .dn_err(x_err), .dn_rdata(x_rdata)
  );

  cache #(.SIZE_BYTES(L1D_BYTES), .WAYS(L1_WAYS), .LINE_BYTES(L1_LINE), .HIT_LAT(L1_LAT)) u_l1d (
    .clk, .rst_n,
    .up_valid(walking || (d_valid && d_ok)), .up_we(!walking && d_we),
    .up_addr(walking ? w_addr : d_pa), .up_wdata(d_wdata), .up_be(walking ? '1 : d_be),
    .up_attr(walking ? mem_attr_t'('0) : rp_attr[1]),
    .up_lock(!walking && d_lock), .up_unlock(!walking && d_unlock),
    .up_ready(dc_ready), .up_err(dc_err), .up_rdata(dc_rdata),
    .dn_valid(wd_valid), .dn_we(wd_we), .dn_addr(wd_addr), .dn_wdata(wd_wdata),
    .dn_be(wd_be), .dn_attr(wd_attr),
    .dn_ready(wd_ready), .dn_err(wd_err), .dn_rdata(wd_rdata)
  );

  write_buf #(.DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .up_valid(wd_valid), .up_we(wd_we), .up_addr(wd_addr), .up_wdata(wd_wdata), .up_be(wd_be),
    .up_attr(wd_attr), .up_ready(wd_ready), .up_err(wd_err), .up_rdata(wd_rdata),
    .dn_valid(x_valid[1]), .dn_we(x_we[1]), .dn_addr(x_addr[1]), .dn_wdata(x_wdata[1]),
    .dn_be(x_be[1]), .dn_attr(x_attr[1]),
    .dn_ready(x_ready[1]), .dn_err(x_err), .dn_rdata(x_rdata),
    .fill(wbuf_fill)
  );

  // ---------------- L2 ----------------
  logic              l2_valid, l2_we, l2_ready, l2_err;
  mem_attr_t         l2_attr, l2_dn_attr;
  logic [ADDR_W-1:0] l2_addr;
  logic [DATA_W-1:0] l2_wdata, l2_rdata;
  logic [BE_W-1:0]   l2_be;

  port_mux2 u_mux (
    .clk, .rst_n,
    .p_valid(x_valid), .p_we(x_we), .p_addr(x_addr), .p_wdata(x_wdata), .p_be(x_be),
    .p_attr(x_attr), .p_ready(x_ready), .p_err(x_err), .p_rdata(x_rdata),
    .dn_valid(l2_valid), .dn_we(l2_we), .dn_addr(l2_addr), .dn_wdata(l2_wdata),
    .dn_be(l2_be), .dn_attr(l2_attr),
    .dn_ready(l2_ready), .dn_err(l2_err), .dn_rdata(l2_rdata)
  );

  cache #(.SIZE_BYTES(L2_BYTES), .WAYS(L2_WAYS), .LINE_BYTES(L2_LINE), .HIT_LAT(L2_LAT)) u_l2 (
    .clk, .rst_n,
    .up_valid(l2_valid), .up_we(l2_we), .up_addr(l2_addr), .up_wdata(l2_wdata), .up_be(l2_be),
    .up_attr(l2_attr),
    .up_lock(1'b0), .up_unlock(1'b0),
    .up_ready(l2_ready), .up_err(l2_err), .up_rdata(l2_rdata),
    .dn_valid(b_valid), .dn_we(b_we), .dn_addr(b_addr), .dn_wdata(b_wdata),
    .dn_be(b_be), .dn_attr(l2_dn_attr),
    .dn_ready(b_ready), .dn_err(b_err), .dn_rdata(b_rdata)
  );

  // ---------------- processor-side answers ----------------
  assign if_ready    = ic_ready || i_miss_q;
  assign if_err      = (ic_ready && ic_err) || i_miss_q;
  assign if_tlb_miss = i_miss_q;
  assign if_rdata    = ic_rdata;
  assign d_ready     = (dc_ready && !walking) || d_miss_q;
  assign d_err       = (dc_ready && !walking && dc_err) || d_miss_q;
  assign d_tlb_miss  = d_miss_q;
  assign d_rdata     = dc_rdata;

endmodule
