// tb_master_mem_sys: self-checking test of the master processor's memory
// system at its default sizes (16 KiB L1s, 256 KiB L2, 16-entry write
// buffer, 64/128-entry TLBs).
//
// A bus model behind port 0 answers after two cycles. The test checks:
// uncached (bypass) accesses reach the bus word by word; L1 hit latency of
// one cycle; an L1+L2 miss fills a 64-byte L2 line and a 32-byte L1 line;
// an L1 miss that hits in L2 takes the L2 latency and no bus transfer;
// write-through stores pass the write buffer; write-back data appears on the
// bus only when evicted from both levels; a TLB miss is reported and, after
// a refill, the translated address is used; with auto-refill on, the walker
// reads the page table entry from memory for data and fetch misses, an
// invalid entry is reported as a TLB miss, and a wired entry survives
// invalidate-all while others do not; random data traffic in three
// regions with different modes always reads the last value written.
module tb_master_mem_sys;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic if_valid = 0, if_lock = 0, if_unlock = 0;
  logic [31:0] if_addr = '0;
  logic if_ready, if_err, if_tlb_miss;
  logic [63:0] if_rdata;
  logic d_valid = 0, d_we = 0, d_lock = 0, d_unlock = 0;
  logic [31:0] d_addr = '0;
  logic [63:0] d_wdata = '0, d_rdata;
  logic [7:0]  d_be = '1;
  logic d_ready, d_err, d_tlb_miss;
  logic mmu_en = 0;
  logic [7:0] asid = 8'd5;
  logic tlb_wr_en = 0, tlb_wr_dside = 0, tlb_wr_wired = 0, tlb_inv_all = 0;
  logic [19:0] tlb_wr_vpn = '0, tlb_wr_ppn = '0;
  logic [7:0]  tlb_wr_asid = '0;
  logic ptw_en = 0;
  logic [31:0] ptw_base = 32'h0010_0000;
  logic rp_cfg_we = 0;
  logic [2:0] rp_cfg_region = '0;
  region_mode_e rp_cfg_mode = RM_BYPASS;
  logic b_valid, b_we, b_ready;
  logic [31:0] b_addr;
  logic [63:0] b_wdata, b_rdata;
  logic [7:0]  b_be;
  logic [4:0]  wbuf_fill;
  int checks = 0, failures = 0;

  master_mem_sys dut (.*, .b_err(1'b0));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // bus model
  logic [63:0] mem [int unsigned];
  function automatic logic [63:0] init_word(input logic [31:0] a);
    return {a, ~a};
  endfunction
  function automatic logic [63:0] mword(input logic [31:0] a);
    return mem.exists(a >> 3) ? mem[a >> 3] : init_word({a[31:3], 3'b0});
  endfunction
  int bw = 0, nbus = 0, max_fill = 0;
  logic [31:0] last_baddr;
  assign b_ready = b_valid && bw == 2;
  assign b_rdata = mword(b_addr);
  always @(posedge clk) begin
    if (int'(wbuf_fill) > max_fill) max_fill = wbuf_fill;
    if (b_ready) begin
      bw <= 0; nbus <= nbus + 1; last_baddr <= b_addr;
      if (b_we) begin
        logic [63:0] w;
        w = mword(b_addr);
        for (int k = 0; k < 8; k++) if (b_be[k]) w[8*k +: 8] = b_wdata[8*k +: 8];
        mem[b_addr >> 3] = w;
      end
    end else if (b_valid) bw <= bw + 1;
  end

  logic [63:0] ref_m [int unsigned];
  function automatic logic [63:0] ref_word(input logic [31:0] a);
    return ref_m.exists(a >> 3) ? ref_m[a >> 3] : init_word({a[31:3], 3'b0});
  endfunction

  task automatic dacc(input logic w, input logic [31:0] a, input logic [63:0] d,
                      output logic [63:0] rd, output int cyc, output int nb, output logic e);
    int n0;
    @(posedge clk); #1;
    n0 = nbus;
    d_valid = 1; d_we = w; d_addr = a; d_wdata = d; d_be = '1;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!d_ready);
    rd = d_rdata; e = d_err;
    @(posedge clk); #1;
    d_valid = 0;
    nb = nbus - n0;
  endtask

  task automatic dref(input logic w, input logic [31:0] a, input logic [63:0] d,
                      output int cyc, output int nb);
    logic [63:0] rd; logic e;
    dacc(w, a, d, rd, cyc, nb, e);
    chk(!e, $sformatf("no error at %h", a));
    if (w) ref_m[a >> 3] = d;
    else chk(rd == ref_word(a), $sformatf("read %h got %h expected %h", a, rd, ref_word(a)));
  endtask

  task automatic fetch(input logic [31:0] a, output logic [63:0] rd, output int cyc,
                       output int nb, output logic e, output logic tm);
    int n0;
    @(posedge clk); #1;
    n0 = nbus;
    if_valid = 1; if_addr = a;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!if_ready);
    rd = if_rdata; e = if_err; tm = if_tlb_miss;
    @(posedge clk); #1;
    if_valid = 0;
    nb = nbus - n0;
  endtask

  task automatic set_region(input int r, input region_mode_e m);
    @(posedge clk); #1; rp_cfg_we = 1; rp_cfg_region = 3'(r); rp_cfg_mode = m;
    @(posedge clk); #1; rp_cfg_we = 0;
  endtask

  initial begin
    logic [63:0] rd; logic e, tm;
    int cyc, nb, l2miss_cyc;
    #12 rst_n = 1;

    // everything is bypass after reset
    dref(0, 32'h0000_2000, '0, cyc, nb);
    chk(nb == 1, "bypass read: one bus word");
    dref(0, 32'h0000_2000, '0, cyc, nb);
    chk(nb == 1, "bypass read again: not cached");

    // region 0 write-back allocate, region 2 write-through, region 1 bypass
    set_region(0, RM_WB_ALLOC);
    set_region(2, RM_WT);
    set_region(3, RM_WB_ALLOC);

    // L1 + L2 miss: one 64-byte L2 line = 8 bus words
    dref(0, 32'h0000_4000, '0, l2miss_cyc, nb);
    chk(nb == 8, $sformatf("L2 fill of 8 words (%0d)", nb));
    dref(0, 32'h0000_4008, '0, cyc, nb);
    chk(nb == 0 && cyc == 1, $sformatf("L1 hit in one cycle (%0d)", cyc));
    // other half of the L2 line: L1 miss, L2 hit (10 cycles per word)
    dref(0, 32'h0000_4020, '0, cyc, nb);
    chk(nb == 0 && cyc > 10 && cyc < l2miss_cyc, $sformatf("L1 miss, L2 hit (%0d cycles, L2 miss %0d)", cyc, l2miss_cyc));

    // instruction fetch from region 3 (write-back allocate) through L1I
    fetch(32'h6000_0000, rd, cyc, nb, e, tm);
    chk(!e && rd == init_word(32'h6000_0000) && nb == 8, "fetch miss fills from the bus");
    fetch(32'h6000_0018, rd, cyc, nb, e, tm);
    chk(!e && rd == init_word(32'h6000_0018) && nb == 0 && cyc == 1, "fetch hit in one cycle");

    // write-through store: reaches the bus through the write buffer
    dref(0, 32'h4000_0100, '0, cyc, nb);
    dref(1, 32'h4000_0100, 64'h1234_5678, cyc, nb);
    repeat (40) @(posedge clk);
    chk(mword(32'h4000_0100) == 64'h1234_5678, "write-through store on the bus");
    // a burst of write-through stores fills the write buffer
    for (int i = 0; i < 12; i++) dref(1, 32'h4000_0100, 64'(i), cyc, nb);
    chk(max_fill > 1, $sformatf("write buffer held %0d stores", max_fill));
    repeat (200) @(posedge clk);
    chk(mword(32'h4000_0100) == 64'(11), "last write-through value on the bus");

    // write-back store: not on the bus until evicted from L1 and L2
    dref(1, 32'h0000_4000, 64'hD1D1, cyc, nb);
    chk(nb == 0 && mword(32'h0000_4000) != 64'hD1D1, "write-back store stays in L1");
    // same L1 set: stride 8 KiB; same L2 set: stride 64 KiB
    for (int k = 1; k <= 5; k++) dref(0, 32'h0000_4000 + 32'(k) * 32'h1_0000, '0, cyc, nb);
    repeat (50) @(posedge clk);
    chk(mword(32'h0000_4000) == 64'hD1D1, "dirty data written back after eviction");
    dref(0, 32'h0000_4000, '0, cyc, nb);

    // MMU: miss, refill, translated access
    mmu_en = 1;
    dacc(0, 32'h1234_5010, '0, rd, cyc, nb, e);
    chk(e && d_tlb_miss == 0 && nb == 0, "TLB miss answered with error");
    @(posedge clk); #1;
    tlb_wr_en = 1; tlb_wr_dside = 1; tlb_wr_vpn = 20'h12345; tlb_wr_asid = 8'd5; tlb_wr_ppn = 20'h00007;
    @(posedge clk); #1; tlb_wr_en = 0;
    // the data must be that of the physical address 0x0000_7010
    dacc(0, 32'h1234_5010, '0, rd, cyc, nb, e);
    chk(!e && rd == ref_word(32'h0000_7010), "translated to physical page 7");
    fetch(32'h1234_5010, rd, cyc, nb, e, tm);
    chk(e && tm, "I-TLB miss reported on fetch");

    // auto-refill: the walker reads the entry from the page table
    ptw_en = 1;
    mem[(32'h0010_0000 + 32'h000A_BCDE * 8) >> 3] = 64'h0000_9001;   // valid, page 9
    mem[(32'h0010_0000 + 32'h000A_BCDF * 8) >> 3] = 64'h0000_A003;   // valid, wired, page 10
    mem[(32'h0010_0000 + 32'h000A_BCE0 * 8) >> 3] = 64'h0000_B000;   // not valid
    dacc(0, 32'hABCD_E018, '0, rd, cyc, nb, e);
    chk(!e && rd == ref_word(32'h0000_9018), "data access after hardware refill");
    chk(nb >= 1, "page table entry read from memory");
    dacc(0, 32'hABCD_E020, '0, rd, cyc, nb, e);
    chk(!e && rd == ref_word(32'h0000_9020) && nb <= 1, "refilled entry hits");
    fetch(32'hABCD_F040, rd, cyc, nb, e, tm);
    chk(!e && !tm && rd == ref_word(32'h0000_A040), "fetch after hardware refill");
    fetch(32'hABCE_0000, rd, cyc, nb, e, tm);
    chk(e && tm, "invalid page table entry reported as TLB miss");
    dacc(0, 32'hABCE_0008, '0, rd, cyc, nb, e);
    chk(e, "invalid entry on the data side answers err");
    // the wired entry survives invalidate-all, the other does not
    @(posedge clk); #1; tlb_inv_all = 1; @(posedge clk); #1; tlb_inv_all = 0;
    mem[(32'h0010_0000 + 32'h000A_BCDE * 8) >> 3] = 64'h0000_0000;
    dacc(0, 32'hABCD_E018, '0, rd, cyc, nb, e);
    chk(e, "non-wired entry gone after invalidate-all");
    fetch(32'hABCD_F048, rd, cyc, nb, e, tm);
    chk(!e && rd == ref_word(32'h0000_A048) && nb == 0, "wired entry kept, hit without a walk");
    ptw_en = 0;
    mmu_en = 0;

    // random traffic in three regions
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] a;
      int g;
      g = $urandom_range(0, 2);
      a = (g == 0 ? 32'h0001_0000 : (g == 1 ? 32'h2001_0000 : 32'h4001_0000))
          + 32'($urandom_range(0, 15)) * 32'h2000 + 32'($urandom_range(0, 7)) * 8;
      if ($urandom_range(0, 2) == 0) dref(1, a, {$urandom, $urandom}, cyc, nb);
      else dref(0, a, '0, cyc, nb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
