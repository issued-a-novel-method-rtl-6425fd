// slave_local_mem: local memories of the slave (multimedia) processor.
//
// Five single-cycle 64-bit local memories on two processor ports, placed in
// the slave processor's own address space (they are not on the system bus):
//   instruction port: Inst-RAM0 128 KiB at 0x4000_0000
//                     Inst-ROM  256 KiB at 0x4004_0000
//   data port:        Data-RAM0 128 KiB at 0x3FFE_0000
//                     Data-RAM1 128 KiB at 0x3FFC_0000
//                     Data-ROM  256 KiB at 0x3FF4_0000
// An access outside these windows is answered in one cycle with err (the
// processor sends such accesses to its bus interface instead). ROMs refuse
// processor writes with err. The loader port writes whole words into any of
// the five memories, by the same addresses; it is how a program image is
// placed before the processor starts.
// Timing: ready one cycle after valid; request held until ready.
// Sizes, width, latency and the Data-RAM0/Data-RAM1/RAM0 base addresses
// follow the description; the ROM bases and the out-of-window answer are
// this design's.
module slave_local_mem
  import soc_pkg::*;
#(
  parameter int unsigned IRAM_BYTES = 128 * 1024,
  parameter int unsigned IROM_BYTES = 256 * 1024,
  parameter int unsigned DRAM_BYTES = 128 * 1024,
  parameter int unsigned DROM_BYTES = 256 * 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction port
  input  logic              i_valid,
  input  logic [ADDR_W-1:0] i_addr,
  output logic              i_ready,
  output logic              i_err,
  output logic [DATA_W-1:0] i_rdata,
  // data port
  input  logic              d_valid,
  input  logic              d_we,
  input  logic [ADDR_W-1:0] d_addr,
  input  logic [DATA_W-1:0] d_wdata,
  input  logic [BE_W-1:0]   d_be,
  output logic              d_ready,
  output logic              d_err,
  output logic [DATA_W-1:0] d_rdata,
  // loader port
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  logic [DATA_W-1:0] ld_wdata
);

  localparam logic [ADDR_W-1:0] IRAM_BASE  = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] IROM_BASE  = 32'h4004_0000;
  localparam logic [ADDR_W-1:0] DRAM0_BASE = 32'h3FFE_0000;
  localparam logic [ADDR_W-1:0] DRAM1_BASE = 32'h3FFC_0000;
  localparam logic [ADDR_W-1:0] DROM_BASE  = 32'h3FF4_0000;

  function automatic logic in_win(input logic [ADDR_W-1:0] a, input logic [ADDR_W-1:0] base,
                                  input int unsigned bytes);
    return a >= base && a < base + ADDR_W'(bytes);
  endfunction

  // memory index: 0 IRAM, 1 IROM, 2 DRAM0, 3 DRAM1, 4 DROM
  logic [4:0] i_hit, d_hit, l_hit;
  always_comb begin
    i_hit = {1'b0, 1'b0, 1'b0, in_win(i_addr, IROM_BASE, IROM_BYTES), in_win(i_addr, IRAM_BASE, IRAM_BYTES)};
    d_hit = {in_win(d_addr, DROM_BASE, DROM_BYTES), in_win(d_addr, DRAM1_BASE, DRAM_BYTES),
             in_win(d_addr, DRAM0_BASE, DRAM_BYTES), 1'b0, 1'b0};
    l_hit = {in_win(ld_addr, DROM_BASE, DROM_BYTES), in_win(ld_addr, DRAM1_BASE, DRAM_BYTES),
             in_win(ld_addr, DRAM0_BASE, DRAM_BYTES), in_win(ld_addr, IROM_BASE, IROM_BYTES),
             in_win(ld_addr, IRAM_BASE, IRAM_BYTES)};
  end

  logic [4:0]             m_valid, m_ready, m_err;
  logic [4:0][DATA_W-1:0] m_rdata;

  assign m_valid[1:0] = {2{i_valid}} & i_hit[1:0];
  assign m_valid[4:2] = {3{d_valid}} & d_hit[4:2];

  local_mem #(.BYTES(IRAM_BYTES), .READ_ONLY(1'b0)) u_iram (
    .clk, .rst_n, .valid(m_valid[0]), .we(1'b0), .addr(i_addr), .wdata('0), .be('0),
    .ready(m_ready[0]), .err(m_err[0]), .rdata(m_rdata[0]),
    .ld_we(ld_we && l_hit[0]), .ld_addr, .ld_wdata);
  local_mem #(.BYTES(IROM_BYTES), .READ_ONLY(1'b1)) u_irom (
    .clk, .rst_n, .valid(m_valid[1]), .we(1'b0), .addr(i_addr), .wdata('0), .be('0),
    .ready(m_ready[1]), .err(m_err[1]), .rdata(m_rdata[1]),
    .ld_we(ld_we && l_hit[1]), .ld_addr, .ld_wdata);
  local_mem #(.BYTES(DRAM_BYTES), .READ_ONLY(1'b0)) u_dram0 (
    .clk, .rst_n, .valid(m_valid[2]), .we(d_we), .addr(d_addr), .wdata(d_wdata), .be(d_be),
    .ready(m_ready[2]), .err(m_err[2]), .rdata(m_rdata[2]),
    .ld_we(ld_we && l_hit[2]), .ld_addr, .ld_wdata);
  local_mem #(.BYTES(DRAM_BYTES), .READ_ONLY(1'b0)) u_dram1 (
    .clk, .rst_n, .valid(m_valid[3]), .we(d_we), .addr(d_addr), .wdata(d_wdata), .be(d_be),
    .ready(m_ready[3]), .err(m_err[3]), .rdata(m_rdata[3]),
    .ld_we(ld_we && l_hit[3]), .ld_addr, .ld_wdata);
  local_mem #(.BYTES(DROM_BYTES), .READ_ONLY(1'b1)) u_drom (
    .clk, .rst_n, .valid(m_valid[4]), .we(d_we), .addr(d_addr), .wdata(d_wdata), .be(d_be),
    .ready(m_ready[4]), .err(m_err[4]), .rdata(m_rdata[4]),
    .ld_we(ld_we && l_hit[4]), .ld_addr, .ld_wdata);

  // out-of-window answers
  logic i_none_q, d_none_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_none_q <= 1'b0;
      d_none_q <= 1'b0;
    end else begin
      i_none_q <= i_valid && (i_hit == '0) && !i_none_q;
      d_none_q <= d_valid && (d_hit == '0) && !d_none_q;
    end
  end

  always_comb begin
    i_ready = i_none_q;
    i_err   = i_none_q;
    i_rdata = '0;
    for (int m = 0; m < 2; m++)
      if (m_ready[m]) begin
        i_ready = 1'b1; i_err = m_err[m]; i_rdata = m_rdata[m];
      end
    d_ready = d_none_q;
    d_err   = d_none_q;
    d_rdata = '0;
    for (int m = 2; m < 5; m++)
      if (m_ready[m]) begin
        d_ready = 1'b1; d_err = m_err[m]; d_rdata = m_rdata[m];
      end
  end

endmodule
