// shared_mem: the shared memory of the dual-core system, a system-bus slave.
//
// Both processors and the optional components exchange data through this
// memory. It is 16 MiB (BYTES) organised as 64-bit words (the bus width),
// with byte-enabled writes. One access takes one cycle: a transfer whose
// valid is first seen in cycle t is answered with ready (and, for a read,
// rdata) in cycle t+1. Address bits [2:0] select a byte lane and are ignored;
// the word index wraps modulo the memory size. Contents are not reset.
// The 16 MiB size follows the description, which lists it as the shared
// memory's size; the word organisation, byte enables and timing are this
// design's choices.
module shared_mem
  import soc_pkg::*;
#(
  parameter int unsigned BYTES = SHMEM_BYTES
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp
);

  localparam int unsigned WORDS = BYTES / BE_W;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [DATA_W-1:0] rdata_q;
  logic              ready_q;
  logic [AW-1:0]     widx;

  assign widx = req.addr[3 +: AW];

  always_ff @(posedge clk) begin
    if (req.valid && !ready_q) begin
      if (req.we) begin
        for (int b = 0; b < BE_W; b++)
          if (req.be[b]) mem[widx][8*b +: 8] <= req.wdata[8*b +: 8];
      end else begin
        rdata_q <= mem[widx];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready_q <= 1'b0;
    else        ready_q <= req.valid && !ready_q;
  end

  always_comb begin
    rsp.ready = ready_q;
    rsp.err   = 1'b0;
    rsp.rdata = rdata_q;
  end

endmodule
