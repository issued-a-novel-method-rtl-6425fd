// soc_pkg: types and constants shared by the system-bus subsystem of the
// dual-core multimedia SoC (a master processor, a slave processor and up to
// eight optional bus components sharing one 64-bit multiplexed bus).
//
// The number of bus components (ten), their roles, the 64-bit data width, the
// 32-bit address space, the arbitration register address 0x0100_0000 and its
// reset value 0 follow the design description. The request/response bundle,
// the placement of the shared memory below the arbitration register, the
// mailbox address and the catch-all I/O region are choices of this design.
// The eight 512 MiB regions and their access modes (bypass, allocate, no
// allocate, write-back, write-through) follow the description; the 2-bit
// encoding of the modes is this design's.
package soc_pkg;

  localparam int unsigned NCOMP   = 10;   // processing components on the bus
  localparam int unsigned ADDR_W  = 32;
  localparam int unsigned DATA_W  = 64;
  localparam int unsigned BE_W    = DATA_W / 8;
  localparam int unsigned CYC_W   = 32;   // width of a component's cycle count
  localparam int unsigned ID_W    = $clog2(NCOMP);

  // Component numbering (order of the component list of the arbitration table)
  localparam int unsigned C_MASTER = 0;   // Processor_1, master processor
  localparam int unsigned C_SLAVE  = 1;   // Processor_2, slave processor
  localparam int unsigned C_USB    = 2;   // I/O device 1 (optional)
  localparam int unsigned C_ETH    = 3;   // I/O device 2 (optional)
  localparam int unsigned C_DMA    = 4;   // I/O device 3 (optional)
  localparam int unsigned C_RES1   = 5;   // reserved components 1..5 are 5..9

  // Memory map
  localparam logic [ADDR_W-1:0] SHMEM_BASE  = 32'h0000_0000;
  localparam int unsigned       SHMEM_BYTES = 16 * 1024 * 1024;
  localparam logic [ADDR_W-1:0] ARBREG_ADDR = 32'h0100_0000;
  localparam logic [ADDR_W-1:0] MBOX_BASE   = 32'h0100_1000;
  localparam logic [ADDR_W-1:0] INTC_BASE   = 32'h0100_2000;
  localparam logic [ADDR_W-1:0] EXT_BASE    = 32'h5000_0000; // System ROM / System RAM
  localparam logic [ADDR_W-1:0] EXT_LAST    = 32'h6FFF_FFFF;

  // Arbitration register fields
  localparam int unsigned ARB_PT_LSB   = 0;   // priority code PT, bits [3:0]
  localparam int unsigned ARB_SYNC_BIT = 4;   // cycle-count arbitration enable

  // Slaves of the system bus
  typedef enum logic [2:0] {
    S_SHMEM  = 3'd0,
    S_ARBREG = 3'd1,
    S_MBOX   = 3'd2,
    S_EXTMEM = 3'd3,
    S_IODEV  = 3'd4,
    S_INTC   = 3'd5
  } slave_e;
  localparam int unsigned NSLV = 6;

  // One bus request, as a component drives it and as a slave receives it.
  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [BE_W-1:0]   be;
    logic [ID_W-1:0]   src;    // issuing component (filled in by the bus)
  } bus_req_t;

  // A slave's response: ready ends the transfer, rdata is valid with it.
  typedef struct packed {
    logic              ready;
    logic              err;
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  // Access modes of a 512 MiB memory region (memory management unit)
  typedef enum logic [1:0] {
    RM_BYPASS     = 2'd0,  // not cached
    RM_WT         = 2'd1,  // cached, write-through, no allocate on write
    RM_WB_ALLOC   = 2'd2,  // cached, write-back, allocate on write miss
    RM_WB_NOALLOC = 2'd3   // cached, write-back, no allocate on write miss
  } region_mode_e;
  localparam int unsigned NREGIONS = 8;

  // Cache attributes of one access, derived from its region's mode
  typedef struct packed {
    logic cacheable;
    logic write_back;   // 0: write-through
    logic write_alloc;
  } mem_attr_t;

  // Byte-enable merge of a write into a stored word.
  function automatic logic [DATA_W-1:0] be_merge(input logic [DATA_W-1:0] old_w,
                                                 input logic [DATA_W-1:0] new_w,
                                                 input logic [BE_W-1:0]   be);
    logic [DATA_W-1:0] r;
    for (int b = 0; b < BE_W; b++)
      r[8*b +: 8] = be[b] ? new_w[8*b +: 8] : old_w[8*b +: 8];
    return r;
  endfunction

endpackage
