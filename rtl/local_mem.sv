// local_mem: processor-local instruction or data memory (RAM or ROM).
//
// A single-port memory of BYTES bytes organised as 64-bit words, next to a
// processor core: Inst-RAM and Data-RAM are 128 KiB, Inst-ROM and Data-ROM
// 256 KiB. Every access takes one cycle: a request whose valid is first seen
// in cycle t is answered with ready (and read data) in cycle t+1. The core
// port obeys READ_ONLY: a ROM refuses core writes with err and keeps its
// contents. The loader port (ld_we, ld_addr, ld_wdata) writes whole words at
// any time and is how a program image is placed in a ROM or RAM before the
// core runs; it has priority over a core write in the same cycle.
// Address bits below the word and above the memory size are ignored, so the
// memory answers for any base the address map places it at.
// Sizes, the 64-bit width and the one-cycle latency follow the description;
// the loader port, byte enables and the ROM error answer are this design's.
module local_mem
  import soc_pkg::*;
#(
  parameter int unsigned BYTES     = 128 * 1024,
  parameter bit          READ_ONLY = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // core port
  input  logic              valid,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [BE_W-1:0]   be,
  output logic              ready,
  output logic              err,
  output logic [DATA_W-1:0] rdata,
  // loader port
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_wdata
);

  localparam int unsigned WORDS = BYTES / BE_W;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [AW-1:0]     widx, lidx;
  logic              start, core_wr;

  assign widx    = addr[3 +: AW];
  assign lidx    = ld_addr[3 +: AW];
  assign start   = valid && !ready;
  assign core_wr = start && we && !READ_ONLY && !(ld_we && lidx == widx);

  always_ff @(posedge clk) begin
    if (ld_we) mem[lidx] <= ld_wdata;
    if (core_wr)
      for (int b = 0; b < BE_W; b++)
        if (be[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
    if (start && !we) rdata <= mem[widx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= 1'b0;
      err   <= 1'b0;
    end else begin
      ready <= start;
      if (start) err <= we && READ_ONLY;
    end
  end

endmodule
