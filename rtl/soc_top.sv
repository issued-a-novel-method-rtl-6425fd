// soc_top: system-bus subsystem of the configurable dual-core multimedia SoC.
//
// A master processor (ARM ISA, running the operating system) and a slave
// processor (configurable DSP core with video and audio engines) share one
// 64-bit multiplexed system bus with up to eight optional components (USB,
// Ethernet and DMA controllers, five reserved positions). The processor
// cores and optional components are outside this module. The master
// processor connects through its memory system (TLBs, region protection,
// L1 instruction and data caches, write buffer, L2 cache), which drives bus
// master port 0; its fetch, data and MMU control ports are brought out
// (cpu_*). The slave processor's local instruction/data RAMs and ROMs are
// here with their ports brought out (sl_*); its bus interface is master port
// 1. Components 1..9 (1 slave, 2 USB, 3 Ethernet, 4 DMA, 5..9 reserved) have
// bus-master ports m_*[1..9].
//
// Inside: the shared bus with its central parallel arbiter, the programmable
// arbitration register (0x0100_0000, reset 0) that sets the priority code,
// the address decoder, the 16 MiB shared memory the processors communicate
// through, and a bi-directional mailbox with one interrupt line per
// processor, and the slave processor's 32-input interrupt controller
// (0x0100_2000; source 0 is the mailbox's slave interrupt, sources 1..31 are
// inputs irq_src[31:1]; the winning level, source and vector leave as
// sl_irq_*). Addresses in 0x5000_0000 - 0x6FFF_FFFF leave on the off-chip
// memory port (flash / system ROM / system RAM); all other unmapped
// addresses leave on the I/O device port. Both ports are bus slaves: the
// request is held until the outside answers with *_ready.
//
// Interface per master i: m_valid[i] with m_we/m_addr/m_wdata/m_be held until
// m_done[i]; m_cyc[i] is the component's cycle count, used when cycle-count
// arbitration is on (cpu_cyc for the master processor). m_rdata / m_err are
// valid with m_done. m_gnt and m_done cover all ten components. A transfer takes
// one arbitration cycle plus the slave's latency (one cycle for the shared
// memory, register and mailbox), i.e. three cycles from request to done on
// an idle bus, and the bus is idle for one cycle between transfers.
module soc_top
  import soc_pkg::*;
#(
  parameter int unsigned SHMEM_SIZE = SHMEM_BYTES,
  parameter int unsigned MBOX_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // master processor: instruction fetch, data and MMU control
  input  logic                          cpu_if_valid,
  input  logic [ADDR_W-1:0]             cpu_if_addr,
  input  logic                          cpu_if_lock,
  input  logic                          cpu_if_unlock,
  output logic                          cpu_if_ready,
  output logic                          cpu_if_err,
  output logic                          cpu_if_tlb_miss,
  output logic [DATA_W-1:0]             cpu_if_rdata,
  input  logic                          cpu_d_valid,
  input  logic                          cpu_d_we,
  input  logic [ADDR_W-1:0]             cpu_d_addr,
  input  logic [DATA_W-1:0]             cpu_d_wdata,
  input  logic [BE_W-1:0]               cpu_d_be,
  input  logic                          cpu_d_lock,
  input  logic                          cpu_d_unlock,
  output logic                          cpu_d_ready,
  output logic                          cpu_d_err,
  output logic                          cpu_d_tlb_miss,
  output logic [DATA_W-1:0]             cpu_d_rdata,
  input  logic [CYC_W-1:0]              cpu_cyc,
  input  logic                          cpu_mmu_en,
  input  logic [7:0]                    cpu_asid,
  input  logic                          cpu_tlb_wr_en,
  input  logic                          cpu_tlb_wr_dside,
  input  logic [19:0]                   cpu_tlb_wr_vpn,
  input  logic [7:0]                    cpu_tlb_wr_asid,
  input  logic [19:0]                   cpu_tlb_wr_ppn,
  input  logic                          cpu_tlb_wr_wired,
  input  logic                          cpu_tlb_inv_all,
  input  logic                          cpu_ptw_en,
  input  logic [ADDR_W-1:0]             cpu_ptw_base,
  input  logic                          cpu_rp_cfg_we,
  input  logic [2:0]                    cpu_rp_cfg_region,
  input  region_mode_e                  cpu_rp_cfg_mode,
  output logic [4:0]                    cpu_wbuf_fill,
  // slave processor local memories
  input  logic                          sl_i_valid,
  input  logic [ADDR_W-1:0]             sl_i_addr,
  output logic                          sl_i_ready,
  output logic                          sl_i_err,
  output logic [DATA_W-1:0]             sl_i_rdata,
  input  logic                          sl_d_valid,
  input  logic                          sl_d_we,
  input  logic [ADDR_W-1:0]             sl_d_addr,
  input  logic [DATA_W-1:0]             sl_d_wdata,
  input  logic [BE_W-1:0]               sl_d_be,
  output logic                          sl_d_ready,
  output logic                          sl_d_err,
  output logic [DATA_W-1:0]             sl_d_rdata,
  input  logic                          sl_ld_we,
  input  logic [ADDR_W-1:0]             sl_ld_addr,
  input  logic [DATA_W-1:0]             sl_ld_wdata,
  // bus masters 1..9 (slave processor and optional components)
  input  logic [NCOMP-1:1]              m_valid,
  input  logic [NCOMP-1:1]              m_we,
  input  logic [NCOMP-1:1][ADDR_W-1:0]  m_addr,
  input  logic [NCOMP-1:1][DATA_W-1:0]  m_wdata,
  input  logic [NCOMP-1:1][BE_W-1:0]    m_be,
  input  logic [NCOMP-1:1][CYC_W-1:0]   m_cyc,
  output logic [NCOMP-1:0]              m_gnt,
  output logic [NCOMP-1:0]              m_done,
  output logic                          m_err,
  output logic [DATA_W-1:0]             m_rdata,
  // interrupts from the mailbox
  output logic                          irq_to_master,
  output logic                          irq_to_slave,
  // slave processor interrupt controller
  input  logic [31:1]                   irq_src,
  output logic                          sl_irq_valid,
  output logic [2:0]                    sl_irq_level,
  output logic [4:0]                    sl_irq_id,
  output logic [31:0]                   sl_irq_vector,
  // off-chip memory port
  output logic                          ext_valid,
  output logic                          ext_we,
  output logic [ADDR_W-1:0]             ext_addr,
  output logic [DATA_W-1:0]             ext_wdata,
  output logic [BE_W-1:0]               ext_be,
  input  logic                          ext_ready,
  input  logic                          ext_err,
  input  logic [DATA_W-1:0]             ext_rdata,
  // I/O device port
  output logic                          io_valid,
  output logic                          io_we,
  output logic [ADDR_W-1:0]             io_addr,
  output logic [DATA_W-1:0]             io_wdata,
  output logic [BE_W-1:0]               io_be,
  input  logic                          io_ready,
  input  logic                          io_err,
  input  logic [DATA_W-1:0]             io_rdata,
  // arbitration register contents
  output logic [31:0]                   arb_value
);

  bus_req_t [NCOMP-1:0] m_req;
  bus_req_t             bus_req;
  bus_req_t [NSLV-1:0]  s_req;
  bus_rsp_t [NSLV-1:0]  s_rsp;
  slave_e               s_sel;
  logic [ID_W-1:0]      owner;
  logic [3:0]           pt;
  logic                 sync_en;

  // master processor memory system on bus port 0
  logic              b0_valid, b0_we;
  logic [ADDR_W-1:0] b0_addr;
  logic [DATA_W-1:0] b0_wdata;
  logic [BE_W-1:0]   b0_be;
  logic [NCOMP-1:0][CYC_W-1:0] all_cyc;

  master_mem_sys u_mms (
    .clk, .rst_n,
    .if_valid(cpu_if_valid), .if_addr(cpu_if_addr), .if_lock(cpu_if_lock), .if_unlock(cpu_if_unlock),
    .if_ready(cpu_if_ready), .if_err(cpu_if_err), .if_tlb_miss(cpu_if_tlb_miss), .if_rdata(cpu_if_rdata),
    .d_valid(cpu_d_valid), .d_we(cpu_d_we), .d_addr(cpu_d_addr), .d_wdata(cpu_d_wdata), .d_be(cpu_d_be),
    .d_lock(cpu_d_lock), .d_unlock(cpu_d_unlock),
    .d_ready(cpu_d_ready), .d_err(cpu_d_err), .d_tlb_miss(cpu_d_tlb_miss), .d_rdata(cpu_d_rdata),
    .mmu_en(cpu_mmu_en), .asid(cpu_asid),
    .tlb_wr_en(cpu_tlb_wr_en), .tlb_wr_dside(cpu_tlb_wr_dside), .tlb_wr_vpn(cpu_tlb_wr_vpn),
    .tlb_wr_asid(cpu_tlb_wr_asid), .tlb_wr_ppn(cpu_tlb_wr_ppn), .tlb_wr_wired(cpu_tlb_wr_wired),
    .tlb_inv_all(cpu_tlb_inv_all), .ptw_en(cpu_ptw_en), .ptw_base(cpu_ptw_base),
    .rp_cfg_we(cpu_rp_cfg_we), .rp_cfg_region(cpu_rp_cfg_region), .rp_cfg_mode(cpu_rp_cfg_mode),
    .b_valid(b0_valid), .b_we(b0_we), .b_addr(b0_addr), .b_wdata(b0_wdata), .b_be(b0_be),
    .b_ready(m_done[C_MASTER]), .b_err(m_err), .b_rdata(m_rdata),
    .wbuf_fill(cpu_wbuf_fill)
  );

  // slave processor local memories
  slave_local_mem u_slm (
    .clk, .rst_n,
    .i_valid(sl_i_valid), .i_addr(sl_i_addr), .i_ready(sl_i_ready), .i_err(sl_i_err), .i_rdata(sl_i_rdata),
    .d_valid(sl_d_valid), .d_we(sl_d_we), .d_addr(sl_d_addr), .d_wdata(sl_d_wdata), .d_be(sl_d_be),
    .d_ready(sl_d_ready), .d_err(sl_d_err), .d_rdata(sl_d_rdata),
    .ld_we(sl_ld_we), .ld_addr(sl_ld_addr), .ld_wdata(sl_ld_wdata)
  );

  always_comb begin
    m_req[C_MASTER] = '{valid: b0_valid, we: b0_we, addr: b0_addr, wdata: b0_wdata,
                        be: b0_be, src: ID_W'(C_MASTER)};
    all_cyc[C_MASTER] = cpu_cyc;
    for (int i = 1; i < NCOMP; i++) begin
      m_req[i].valid = m_valid[i];
      m_req[i].we    = m_we[i];
      m_req[i].addr  = m_addr[i];
      m_req[i].wdata = m_wdata[i];
      m_req[i].be    = m_be[i];
      m_req[i].src   = ID_W'(i);
      all_cyc[i]     = m_cyc[i];
    end
  end

  shared_bus #(.N(NCOMP), .NS(NSLV)) u_bus (
    .clk, .rst_n,
    .m_req, .m_cyc(all_cyc), .m_gnt, .m_done, .m_err, .m_rdata,
    .pt, .sync_en,
    .bus_req, .owner, .s_sel,
    .s_req, .s_rsp
  );

  addr_decoder u_dec (.addr(bus_req.addr), .sel(s_sel));

  shared_mem #(.BYTES(SHMEM_SIZE)) u_shmem (
    .clk, .rst_n, .req(s_req[S_SHMEM]), .rsp(s_rsp[S_SHMEM])
  );

  arb_reg u_arbreg (
    .clk, .rst_n, .req(s_req[S_ARBREG]), .rsp(s_rsp[S_ARBREG]),
    .pt, .sync_en, .value(arb_value)
  );

  mailbox #(.DEPTH(MBOX_DEPTH)) u_mbox (
    .clk, .rst_n, .req(s_req[S_MBOX]), .rsp(s_rsp[S_MBOX]),
    .irq_to_master, .irq_to_slave
  );

  intc u_intc (
    .clk, .rst_n, .req(s_req[S_INTC]), .rsp(s_rsp[S_INTC]),
    .src({irq_src, irq_to_slave}),
    .irq_valid(sl_irq_valid), .irq_level(sl_irq_level), .irq_id(sl_irq_id),
    .irq_vector(sl_irq_vector)
  );

  assign ext_valid = s_req[S_EXTMEM].valid;
  assign ext_we    = s_req[S_EXTMEM].we;
  assign ext_addr  = s_req[S_EXTMEM].addr;
  assign ext_wdata = s_req[S_EXTMEM].wdata;
  assign ext_be    = s_req[S_EXTMEM].be;
  assign s_rsp[S_EXTMEM] = '{ready: ext_ready, err: ext_err, rdata: ext_rdata};

  assign io_valid  = s_req[S_IODEV].valid;
  assign io_we     = s_req[S_IODEV].we;
  assign io_addr   = s_req[S_IODEV].addr;
  assign io_wdata  = s_req[S_IODEV].wdata;
  assign io_be     = s_req[S_IODEV].be;
  assign s_rsp[S_IODEV] = '{ready: io_ready, err: io_err, rdata: io_rdata};

endmodule
