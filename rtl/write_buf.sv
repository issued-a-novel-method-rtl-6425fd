// write_buf: write buffer between the L1 data cache and the L2 cache.
//
// Holds up to DEPTH (16) word writes so that write-through stores and
// dirty-line write-backs do not wait for the next level. A cacheable write
// is accepted and answered one cycle after up_valid when a slot is free (it
// waits while the buffer is full). Buffered writes drain to the downstream
// port in order, one at a time. A read, and an uncached (bypass) write,
// waits until the buffer is empty and is then passed straight through, so
// it sees every earlier write, and an uncached write to a device register
// or mailbox takes effect before it is answered and returns its error.
// Interface: same valid/ready handshake on both sides; the cache
// attributes travel with each access.
// The 16 entries follow the description; in-order draining, the
// drain-before-read rule and passing uncached writes through are this
// design's choices.
module write_buf
  import soc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              up_valid,
  input  logic              up_we,
  input  logic [ADDR_W-1:0] up_addr,
  input  logic [DATA_W-1:0] up_wdata,
  input  logic [BE_W-1:0]   up_be,
  input  mem_attr_t         up_attr,
  output logic              up_ready,
  output logic              up_err,
  output logic [DATA_W-1:0] up_rdata,
  output logic              dn_valid,
  output logic              dn_we,
  output logic [ADDR_W-1:0] dn_addr,
  output logic [DATA_W-1:0] dn_wdata,
  output logic [BE_W-1:0]   dn_be,
  output mem_attr_t         dn_attr,
  input  logic              dn_ready,
  input  logic              dn_err,
  input  logic [DATA_W-1:0] dn_rdata,
  output logic [$clog2(DEPTH+1)-1:0] fill
);

  localparam int unsigned EW = ADDR_W + DATA_W + BE_W + $bits(mem_attr_t);

  logic [EW-1:0] head;
  logic          empty, full, push, pop, wr_ready_q, rd_fwd, posted;

  assign posted = up_we && up_attr.cacheable;
  assign push   = up_valid && posted && !wr_ready_q && !full;
  assign pop  = !empty && dn_ready;

  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push, .din({up_addr, up_wdata, up_be, up_attr}),
    .pop, .dout(head), .empty, .full, .count(fill)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ready_q <= 1'b0;
    else        wr_ready_q <= push;
  end

  assign rd_fwd = up_valid && !posted && empty;

  always_comb begin
    if (!empty) begin
      dn_valid = 1'b1;
      dn_we    = 1'b1;
      {dn_addr, dn_wdata, dn_be, dn_attr} = head;
    end else begin
      dn_valid     = rd_fwd;
      dn_we        = up_we;
      dn_addr      = up_addr;
      dn_wdata     = up_wdata;
      dn_be        = up_be;
      dn_attr      = up_attr;
    end
  end

  assign up_ready = wr_ready_q || (rd_fwd && dn_ready);
  assign up_err   = rd_fwd && dn_err;
  assign up_rdata = dn_rdata;

endmodule
