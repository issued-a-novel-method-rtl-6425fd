// arb_reg: the 32-bit programmable arbitration register, a system-bus slave.
//
// The register sits at physical address 0x0100_0000, is 32 bits wide and
// resets to 0 (PT = 0000: master processor lowest, slave processor at
// priority position 1). Bits [3:0] hold the priority code PT read by the
// central arbiter; bit 4 enables arbitration by smallest cycle count. Bits
// [31:5] are stored and read back but drive nothing.
//
// Bus side: the register occupies the low 32 bits of the 64-bit data bus
// (byte enables 3..0); the upper half reads as zero and is ignored on writes.
// Any address the decoder routes here reaches the register. A transfer is
// answered one cycle after valid is first seen (ready for one cycle), a
// written value is in effect from the cycle after ready.
// Width, address and reset value follow the description; the field layout
// and the bus timing are this design's choices.
module arb_reg
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  output logic [3:0]  pt,
  output logic        sync_en,
  output logic [31:0] value
);

  logic [31:0] r;
  logic        ready_q;
  logic [63:0] merged;

  assign merged = be_merge({32'h0, r}, req.wdata, req.be);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r       <= 32'h0000_0000;
      ready_q <= 1'b0;
    end else begin
      ready_q <= req.valid && !ready_q;
      if (req.valid && !ready_q && req.we)
        r <= merged[31:0];
    end
  end

  always_comb begin
    rsp.ready = ready_q;
    rsp.err   = 1'b0;
    rsp.rdata = {32'h0, r};
  end

  assign pt      = r[ARB_PT_LSB +: 4];
  assign sync_en = r[ARB_SYNC_BIT];
  assign value   = r;

endmodule
