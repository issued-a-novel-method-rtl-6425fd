// tb_soc_top: end-to-end test of the dual-core system bus at its default size.
//
// The test plays the processors and optional components on their bus-master
// ports and models the off-chip memory and an I/O device on the two slave
// ports. It runs one complete inter-processor job and then exercises every
// mechanism of the bus subsystem, counting how often each happened:
//   job          master fills a buffer in shared memory and mails its address;
//                the slave, woken by its interrupt, sums the buffer, writes
//                the result back and mails a reply; the master checks it
//   contention   master and slave request in the same cycle, under PT codes
//                that favour either one (slave first for 0000, master first
//                for 0100), plus a reserved code that must act as 0000
//   sync         cycle-count arbitration lets the component that is behind
//                in time win against the fixed priority
//   optional     DMA copies shared memory while the processors run; USB writes
//                to the I/O device port
//   external     the master reads the reset vector word from the off-chip port
//   mbox_full    a send to a full mailbox is refused
//   latency      an uncontended shared-memory read by the slave ends in the
//                third cycle
//   cached       the master fetches the reset vector through its L1
//                instruction cache and L2 (line fill, then one-cycle hits)
//   writeback    the master's write-back data in system RAM leaves through
//                the off-chip port only when the line is evicted
//   tlb          with the MMU on, a TLB miss is reported, refilled and the
//                access retried with the translated address; then, with
//                auto-refill on, a miss is refilled by the hardware walker
//                from a page table in shared memory
//   local        the slave processor runs from its local instruction RAM and
//                data RAMs, loaded by the loader port
//   intc         the slave's interrupt controller raises the waiting mail at
//                its level, lets a higher-level outside source win and
//                reports it in its CLAIM register
// The master processor reaches the bus through its memory system; at reset
// every region is bypass, so its shared-memory, mailbox and register
// accesses are uncached. All parameters are at their defaults (16 MiB
// shared memory, 16 KiB L1s, 256 KiB L2, full-size TLBs and local memories).
module tb_soc_top;
  import soc_pkg::*;

  localparam int N = NCOMP;

  logic clk = 0, rst_n = 0;
  logic [N-1:1]              m_valid, m_we;
  logic [N-1:0]              m_gnt, m_done;
  logic [N-1:1][ADDR_W-1:0]  m_addr;
  logic [N-1:1][DATA_W-1:0]  m_wdata;
  logic [N-1:1][BE_W-1:0]    m_be;
  logic [N-1:1][CYC_W-1:0]   m_cyc;
  // master processor ports
  logic              cpu_if_valid = 0, cpu_if_lock = 0, cpu_if_unlock = 0;
  logic [31:0]       cpu_if_addr = '0;
  logic              cpu_if_ready, cpu_if_err, cpu_if_tlb_miss;
  logic [63:0]       cpu_if_rdata;
  logic              cpu_d_valid = 0, cpu_d_we = 0, cpu_d_lock = 0, cpu_d_unlock = 0;
  logic [31:0]       cpu_d_addr = '0;
  logic [63:0]       cpu_d_wdata = '0, cpu_d_rdata;
  logic [7:0]        cpu_d_be = '1;
  logic              cpu_d_ready, cpu_d_err, cpu_d_tlb_miss;
  logic [31:0]       cpu_cyc = '0;
  logic              cpu_mmu_en = 0;
  logic [7:0]        cpu_asid = 8'd1;
  logic              cpu_tlb_wr_en = 0, cpu_tlb_wr_dside = 0, cpu_tlb_wr_wired = 0, cpu_tlb_inv_all = 0;
  logic [19:0]       cpu_tlb_wr_vpn = '0, cpu_tlb_wr_ppn = '0;
  logic [7:0]        cpu_tlb_wr_asid = '0;
  logic              cpu_ptw_en = 0;
  logic [31:0]       cpu_ptw_base = 32'h0080_0000;
  logic              cpu_rp_cfg_we = 0;
  logic [2:0]        cpu_rp_cfg_region = '0;
  region_mode_e      cpu_rp_cfg_mode = RM_BYPASS;
  logic [4:0]        cpu_wbuf_fill;
  // slave processor local memories
  logic              sl_i_valid = 0, sl_d_valid = 0, sl_d_we = 0, sl_ld_we = 0;
  logic [31:0]       sl_i_addr = '0, sl_d_addr = '0, sl_ld_addr = '0;
  logic [63:0]       sl_d_wdata = '0, sl_ld_wdata = '0, sl_i_rdata, sl_d_rdata;
  logic [7:0]        sl_d_be = '1;
  logic              sl_i_ready, sl_i_err, sl_d_ready, sl_d_err;
  logic                      m_err;
  logic [DATA_W-1:0]         m_rdata;
  logic                      irq_to_master, irq_to_slave;
  logic [31:1]               irq_src = '0;
  logic                      sl_irq_valid;
  logic [2:0]                sl_irq_level;
  logic [4:0]                sl_irq_id;
  logic [31:0]               sl_irq_vector;
  logic                      ext_valid, ext_we, ext_ready, ext_err;
  logic [ADDR_W-1:0]         ext_addr;
  logic [DATA_W-1:0]         ext_wdata, ext_rdata;
  logic [BE_W-1:0]           ext_be;
  logic                      io_valid, io_we, io_ready, io_err;
  logic [ADDR_W-1:0]         io_addr;
  logic [DATA_W-1:0]         io_wdata, io_rdata;
  logic [BE_W-1:0]           io_be;
  logic [31:0]               arb_value;

  soc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_job = 0, n_contend_slave = 0, n_contend_master = 0, n_reserved = 0,
      n_sync = 0, n_dma = 0, n_usb = 0, n_ext = 0, n_mbox_full = 0, n_irq_m = 0,
      n_irq_s = 0, n_latency = 0, n_cached = 0, n_writeback = 0, n_tlb = 0, n_local = 0, n_intc = 0,
      n_ext_words = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic report();
    $display("job=%0d contend_slave=%0d contend_master=%0d reserved=%0d sync=%0d dma=%0d usb=%0d ext=%0d mbox_full=%0d irq_m=%0d irq_s=%0d latency=%0d cached=%0d writeback=%0d tlb=%0d local=%0d intc=%0d",
             n_job, n_contend_slave, n_contend_master, n_reserved, n_sync, n_dma, n_usb,
             n_ext, n_mbox_full, n_irq_m, n_irq_s, n_latency, n_cached, n_writeback, n_tlb, n_local, n_intc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  // off-chip memory model: answers after 3 cycles, word = f(address)
  int ext_wait = 0;
  assign ext_ready = ext_valid && ext_wait == 3;
  assign ext_err   = 1'b0;
  logic [63:0] ext_mem [int unsigned];
  assign ext_rdata = ext_mem.exists(ext_addr >> 3) ? ext_mem[ext_addr >> 3] : {ext_addr, ~ext_addr};
  always @(posedge clk) begin
    ext_wait <= (ext_valid && !ext_ready) ? ext_wait + 1 : 0;
    if (ext_ready) n_ext_words++;
    if (ext_ready && ext_we) ext_mem[ext_addr >> 3] = ext_wdata;
  end

  // I/O device model: a 64-bit register, answers after 1 cycle
  logic [63:0] io_reg = '0;
  int io_wait = 0;
  assign io_ready = io_valid && io_wait == 1;
  assign io_err   = 1'b0;
  assign io_rdata = io_reg;
  always @(posedge clk) begin
    io_wait <= (io_valid && !io_ready) ? io_wait + 1 : 0;
    if (io_ready && io_we) io_reg <= io_wdata;
  end

  // one transfer by component i; cyc = posedges from request to done.
  // Component 0, the master processor, goes through its data port.
  task automatic xfer(input int i, input logic we, input logic [31:0] a,
                      input logic [63:0] wd, output logic [63:0] rd,
                      output logic err, output int cyc);
    cyc = 0;
    if (i == C_MASTER) begin
      cpu_d_we = we; cpu_d_addr = a; cpu_d_wdata = wd; cpu_d_be = 8'hFF;
      cpu_d_valid = 1'b1;
      forever begin
        @(posedge clk); cyc++;
        @(negedge clk);
        if (cpu_d_ready) break;
      end
      rd = cpu_d_rdata; err = cpu_d_err;
      @(posedge clk); #1;
      cpu_d_valid = 1'b0;
    end else begin
      m_we[i] = we; m_addr[i] = a; m_wdata[i] = wd; m_be[i] = 8'hFF;
      m_valid[i] = 1'b1;
      forever begin
        @(posedge clk); cyc++;
        @(negedge clk);
        if (m_done[i]) break;
      end
      rd = m_rdata; err = m_err;
      @(posedge clk); #1;
      m_valid[i] = 1'b0;
    end
  endtask

  task automatic fetch(input logic [31:0] a, output logic [63:0] rd, output logic err,
                       output logic tm, output int cyc);
    cpu_if_addr = a; cpu_if_valid = 1'b1;
    cyc = 0;
    forever begin
      @(posedge clk); cyc++;
      @(negedge clk);
      if (cpu_if_ready) break;
    end
    rd = cpu_if_rdata; err = cpu_if_err; tm = cpu_if_tlb_miss;
    @(posedge clk); #1;
    cpu_if_valid = 1'b0;
  endtask

  task automatic set_region(input int r, input region_mode_e m);
    @(posedge clk); #1; cpu_rp_cfg_we = 1; cpu_rp_cfg_region = 3'(r); cpu_rp_cfg_mode = m;
    @(posedge clk); #1; cpu_rp_cfg_we = 0;
  endtask

  task automatic wr(input int i, input logic [31:0] a, input logic [63:0] wd);
    logic [63:0] rd; logic err; int c;
    xfer(i, 1, a, wd, rd, err, c);
    chk(!err, $sformatf("write %h by %0d", a, i));
  endtask

  task automatic rdw(input int i, input logic [31:0] a, output logic [63:0] rd);
    logic err; int c;
    xfer(i, 0, a, '0, rd, err, c);
    chk(!err, $sformatf("read %h by %0d", a, i));
  endtask

  localparam logic [31:0] BUF = 32'h0010_0000, RES = 32'h00F0_0000;
  localparam logic [31:0] SEND = MBOX_BASE, RECV = MBOX_BASE + 8, STAT = MBOX_BASE + 16;
  localparam int WORDS = 32;

  // master processor side of the job
  task automatic master_job();
    logic [63:0] sum, rd;
    sum = '0;
    for (int k = 0; k < WORDS; k++) begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      sum += w;
      wr(C_MASTER, BUF + 8 * k, w);
    end
    wr(C_MASTER, SEND, {32'(WORDS), BUF});
    while (!irq_to_master) @(posedge clk);
    n_irq_m++;
    #1;
    rdw(C_MASTER, RECV, rd);
    chk(rd == {32'hD0E, RES}, "reply message");
    rdw(C_MASTER, RES, rd);
    chk(rd == sum, "slave's sum of the buffer");
    if (rd == sum) n_job++;
  endtask

  // slave processor side of the job
  task automatic slave_job();
    logic [63:0] msg, rd, sum;
    while (!irq_to_slave) @(posedge clk);
    n_irq_s++;
    #1;
    rdw(C_SLAVE, RECV, msg);
    chk(msg[63:32] == WORDS && msg[31:0] == BUF, "job message");
    sum = '0;
    for (int k = 0; k < int'(msg[63:32]); k++) begin
      rdw(C_SLAVE, msg[31:0] + 8 * k, rd);
      sum += rd;
    end
    wr(C_SLAVE, RES, sum);
    wr(C_SLAVE, SEND, {32'hD0E, RES});
  endtask

  // DMA copies a region of shared memory meanwhile
  task automatic dma_copy();
    logic [63:0] rd;
    for (int k = 0; k < 16; k++) wr(C_DMA, 32'h0030_0000 + 8 * k, 64'hC0DE_0000 + k);
    for (int k = 0; k < 16; k++) begin
      rdw(C_DMA, 32'h0030_0000 + 8 * k, rd);
      wr(C_DMA, 32'h0040_0000 + 8 * k, rd);
    end
    for (int k = 0; k < 16; k++) begin
      rdw(C_DMA, 32'h0040_0000 + 8 * k, rd);
      chk(rd == 64'hC0DE_0000 + k, "DMA copy");
      if (rd == 64'hC0DE_0000 + k) n_dma++;
    end
  endtask

  // master and slave requests reach the bus in the same cycle (the slave
  // raises its request as soon as the master's memory system puts the
  // master's on the bus); returns who was served first
  task automatic race(output int first);
    logic [63:0] r1, r2; logic e1, e2; int c1, c2;
    int t_m, t_s;
    fork
      begin xfer(C_MASTER, 0, BUF, '0, r1, e1, c1); t_m = $time; end
      begin
        wait (dut.u_mms.b_valid);
        #1;
        xfer(C_SLAVE, 0, BUF + 8, '0, r2, e2, c2);
        t_s = $time;
      end
    join
    first = (t_m < t_s) ? C_MASTER : C_SLAVE;
    chk(t_m != t_s, "one transfer at a time");
  endtask

  initial begin
    logic [63:0] rd, w; logic err; int c, first;
    m_valid = '0; m_we = '0; m_addr = '0; m_wdata = '0; m_be = '0; m_cyc = '0;
    #22 rst_n = 1;
    @(posedge clk); #1;

    // slave processor: program loaded into its local memories, then run
    begin
      logic [63:0] w;
      for (int k = 0; k < 8; k++) begin
        @(posedge clk); #1; sl_ld_we = 1; sl_ld_addr = 32'h4000_0000 + 32'(8 * k);
        sl_ld_wdata = 64'hF00D_0000 + 64'(k);
      end
      @(posedge clk); #1; sl_ld_we = 0;
      for (int k = 0; k < 8; k++) begin
        sl_i_valid = 1; sl_i_addr = 32'h4000_0000 + 32'(8 * k);
        @(posedge clk); #1;
        chk(sl_i_ready && !sl_i_err && sl_i_rdata == 64'hF00D_0000 + 64'(k), "slave local fetch");
        @(posedge clk); #1; sl_i_valid = 0;
        w = sl_i_rdata;
        sl_d_valid = 1; sl_d_we = 1; sl_d_addr = 32'h3FFC_0000 + 32'(8 * k); sl_d_wdata = ~w;
        @(posedge clk); #1; chk(sl_d_ready && !sl_d_err, "slave local store");
        @(posedge clk); #1; sl_d_valid = 0;
        sl_d_we = 0;
        sl_d_valid = 1;
        @(posedge clk); #1;
        chk(sl_d_ready && sl_d_rdata == ~w, "slave local load");
        if (sl_d_rdata == ~w) n_local++;
        @(posedge clk); #1; sl_d_valid = 0;
      end
    end

    // arbitration register resets to 0
    rdw(C_MASTER, ARBREG_ADDR, rd);
    chk(rd == 0 && arb_value == 0, "arbitration register reset value");

    // uncontended latency: request, grant, ready -> third cycle
    xfer(C_SLAVE, 0, BUF, '0, rd, err, c);
    chk(c == 2, $sformatf("shared memory read latency %0d", c));
    if (c == 2) n_latency++;

    // the job, with the DMA running alongside
    fork
      master_job();
      slave_job();
      dma_copy();
    join

    // USB writes the I/O device, slave reads a word off-chip
    wr(C_USB, 32'h7000_0000, 64'h0123_4567_89AB_CDEF);
    chk(io_reg == 64'h0123_4567_89AB_CDEF, "I/O device written");
    rdw(C_USB, 32'h7000_0000, rd);
    chk(rd == 64'h0123_4567_89AB_CDEF, "I/O device read");
    if (rd == 64'h0123_4567_89AB_CDEF) n_usb++;
    xfer(C_SLAVE, 0, 32'h5000_0000, '0, rd, err, c);
    chk(rd == {32'h5000_0000, ~32'h5000_0000} && c == 4, "off-chip word in four cycles");
    if (rd == {32'h5000_0000, ~32'h5000_0000}) n_ext++;

    // contention under PT = 0000: slave first
    race(first);
    chk(first == C_SLAVE, "PT=0000 serves slave first");
    if (first == C_SLAVE) n_contend_slave++;
    // PT = 0100: master first
    wr(C_MASTER, ARBREG_ADDR, 64'h4);
    chk(arb_value == 32'h4, "PT written");
    race(first);
    chk(first == C_MASTER, "PT=0100 serves master first");
    if (first == C_MASTER) n_contend_master++;
    // reserved code 1100 acts like 0000
    wr(C_SLAVE, ARBREG_ADDR, 64'hC);
    race(first);
    chk(first == C_SLAVE, "reserved PT acts as 0000");
    if (first == C_SLAVE) n_reserved++;
    // cycle-count arbitration: PT=0000 would favour the slave, but the
    // master is behind in time
    wr(C_MASTER, ARBREG_ADDR, 64'h10);
    cpu_cyc = 100; m_cyc[C_SLAVE] = 500;
    race(first);
    chk(first == C_MASTER, "smallest cycle count first");
    if (first == C_MASTER) n_sync++;
    cpu_cyc = 900;
    race(first);
    chk(first == C_SLAVE, "smallest cycle count first, other way");
    if (first == C_SLAVE) n_sync++;
    wr(C_MASTER, ARBREG_ADDR, 64'h0);

    // fill the master -> slave mailbox until it refuses
    for (int k = 0; k < 8; k++) begin
      xfer(C_MASTER, 1, SEND, 64'(k), rd, err, c);
      if (err) begin n_mbox_full++; break; end
    end
    chk(n_mbox_full == 1, "mailbox refuses when full");
    rdw(C_SLAVE, STAT, rd);
    chk(rd[0] && rd[15:8] == 4, "slave sees four waiting messages");

    // slave interrupt controller: the waiting mail raises level 3, then an
    // outside source at level 5 takes over
    chk(!sl_irq_valid, "no slave interrupt before it is enabled");
    wr(C_SLAVE, INTC_BASE + 8 * 3, 64'h5000_0003);   // source 0 level 3, source 7 level 5
    wr(C_SLAVE, INTC_BASE + 8 * 1, 64'h81);          // enable sources 0 and 7
    chk(sl_irq_valid && sl_irq_level == 3 && sl_irq_id == 0 && sl_irq_vector == 32'h6000_01C0,
        "mailbox interrupt through the controller, L3 vector");
    if (sl_irq_valid && sl_irq_id == 0) n_intc++;
    irq_src[7] = 1'b1;
    #1;
    chk(sl_irq_valid && sl_irq_level == 5 && sl_irq_id == 7 && sl_irq_vector == 32'h6000_0240,
        "higher level source wins, L5 vector");
    rdw(C_SLAVE, INTC_BASE + 8 * 7, rd);
    chk(rd[31:0] == {1'b1, 12'h0, 3'd5, 11'h0, 5'd7}, "CLAIM register");
    if (rd[31:0] == {1'b1, 12'h0, 3'd5, 11'h0, 5'd7}) n_intc++;
    irq_src[7] = 1'b0;
    wr(C_SLAVE, INTC_BASE + 8 * 1, 64'h0);

    // master memory system: reset vector fetched through L1I and L2
    set_region(2, RM_WB_ALLOC);        // 0x4000_0000 - 0x5FFF_FFFF
    set_region(3, RM_WB_ALLOC);        // 0x6000_0000 - 0x7FFF_FFFF
    begin
      logic tm; int w0;
      w0 = n_ext_words;
      fetch(32'h5000_0000, rd, err, tm, c);
      chk(!err && rd == {32'h5000_0000, ~32'h5000_0000}, "reset vector fetched");
      chk(n_ext_words - w0 == 8, "one 64-byte L2 line from off-chip");
      fetch(32'h5000_0008, rd, err, tm, c);
      chk(!err && c == 1 && rd == {32'h5000_0008, ~32'h5000_0008}, "L1 instruction hit in one cycle");
      if (c == 1) n_cached++;
      // write-back data in system RAM reaches off-chip memory on eviction
      xfer(C_MASTER, 1, 32'h6000_1000, 64'hACE0_0001, rd, err, c);
      repeat (30) @(posedge clk);
      chk(!ext_mem.exists(32'h6000_1000 >> 3), "write-back data held in the caches");
      for (int k = 1; k <= 5; k++) xfer(C_MASTER, 0, 32'h6000_1000 + 32'(k) * 32'h1_0000, '0, rd, err, c);
      repeat (30) @(posedge clk);
      chk(ext_mem.exists(32'h6000_1000 >> 3) && ext_mem[32'h6000_1000 >> 3] == 64'hACE0_0001,
          "evicted line written off-chip");
      if (ext_mem.exists(32'h6000_1000 >> 3)) n_writeback++;
      xfer(C_MASTER, 0, 32'h6000_1000, '0, rd, err, c);
      chk(rd == 64'hACE0_0001, "write-back data read back");
      // MMU: virtual page 0x80000 -> physical page of the shared buffer
      cpu_mmu_en = 1;
      xfer(C_MASTER, 0, 32'h8000_0000, '0, rd, err, c);
      chk(err && c <= 2, "D-TLB miss reported");
      @(posedge clk); #1;
      cpu_tlb_wr_en = 1; cpu_tlb_wr_dside = 1; cpu_tlb_wr_vpn = 20'h80000; cpu_tlb_wr_asid = 8'd1;
      cpu_tlb_wr_ppn = BUF[31:12];
      @(posedge clk); #1; cpu_tlb_wr_en = 0;
      xfer(C_MASTER, 0, 32'h8000_0000, '0, rd, err, c);
      chk(!err && rd != 0, "translated access");
      xfer(C_SLAVE, 0, BUF, '0, w, err, c);
      chk(rd == w, "translated address reaches the shared buffer");
      if (!err && rd == w) n_tlb++;
      // auto-refill from a page table in shared memory: page 0x90000 -> BUF
      wr(C_SLAVE, 32'h0080_0000 + 32'h0009_0000 * 8, {32'h0, BUF[31:12], 12'h001});
      cpu_ptw_en = 1;
      xfer(C_MASTER, 0, 32'h9000_0000 + {20'h0, BUF[11:0]}, '0, rd, err, c);
      chk(!err && rd == w, "hardware TLB refill from the shared-memory page table");
      if (!err && rd == w) n_tlb++;
      cpu_ptw_en = 0;
      cpu_mmu_en = 0;
    end

    repeat (5) @(posedge clk);
    chk(n_job > 0, "job completed");
    chk(n_cached > 0 && n_writeback > 0 && n_tlb == 2 && n_local == 8, "master memory system and slave local memories");
    chk(n_contend_slave > 0 && n_contend_master > 0, "contention both ways");
    chk(n_reserved > 0, "reserved code");
    chk(n_sync == 2, "cycle-count arbitration");
    chk(n_dma == 16 && n_usb > 0 && n_ext > 0, "optional components and ports");
    chk(n_irq_m > 0 && n_irq_s > 0, "mailbox interrupts");
    chk(n_intc == 2, "slave interrupt controller");
    chk(n_latency > 0, "latency");
    report();
    $finish;
  end
endmodule
