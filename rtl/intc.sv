// intc: 32-input interrupt controller of the slave processor, a system-bus
// slave.
//
// Each of the 32 sources has an enable bit, a type (level or rising edge)
// and a priority level: 1 to 5 are the interrupt levels L1 (lowest) to L5,
// 6 is the non-maskable interrupt (taken even when not enabled), 0 and 7
// never interrupt. A level source is pending while its input is high; an
// edge source is latched on a rising input and stays pending until software
// clears it. Among the pending, taking sources the highest level wins, and
// the lowest source number breaks ties. The controller presents the winner
// to the core as irq_valid, irq_level, irq_id and the address of the
// exception vector for that level:
//   L1 0x6000_0340  L2 0x6000_0180  L3 0x6000_01C0  L4 0x6000_0200
//   L5 0x6000_0240  NMI 0x6000_02C0
//
// Registers: 32 bits each, in the low half of a 64-bit word (byte enables
// 3..0), at word offsets of the window:
//   0 PEND   read: pending sources; write: 1 bits clear edge latches
//   1 ENABLE read/write, reset 0
//   2 EDGE   read/write, reset 0 (1 = rising edge, 0 = level)
//   3-6 LEVEL0-3  read/write, reset 0; LEVELk bits [4j+2:4j] are the level
//          of source 8k+j
//   7 CLAIM  read: [31] valid, [18:16] level, [4:0] source of the winner
// Any other offset in the window answers err.
// Timing: a transfer is answered one cycle after valid is first seen. The
// outputs are combinational from the registered state: an input change
// shows one cycle later for an edge source (latched at the clock edge) and
// at once for a level source.
// The 32 interrupts, the five levels, the NMI and the vector addresses
// follow the description; the register layout, the edge/level choice per
// source and the tie rule are this design's.
module intc
  import soc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bus_req_t    req,
  output bus_rsp_t    rsp,
  input  logic [31:0] src,
  output logic        irq_valid,
  output logic [2:0]  irq_level,
  output logic [4:0]  irq_id,
  output logic [31:0] irq_vector
);

  logic [31:0]      enable, edge_t, latch, src_q, pending;
  logic [3:0][31:0] level;
  logic             ready_q, err_q;
  logic [31:0]      rd_q;
  logic [2:0]       off;
  logic             off_ok, start;
  logic [31:0]      cur, wr_val, claim;

  assign off    = req.addr[5:3];
  assign off_ok = (req.addr[11:6] == '0);
  assign start  = req.valid && !ready_q;

  function automatic logic [2:0] lvl_of(input logic [3:0][31:0] lv, input int i);
    return lv[i / 8][4 * (i % 8) +: 3];
  endfunction

  assign pending = (edge_t & latch) | (~edge_t & src);

  // winner: highest level, then lowest source number
  always_comb begin
    logic [2:0] l;
    irq_valid = 1'b0;
    irq_level = '0;
    irq_id    = '0;
    for (int i = 0; i < 32; i++) begin
      l = lvl_of(level, i);
      if (pending[i] && ((l == 3'd6) || (enable[i] && l >= 3'd1 && l <= 3'd5)) &&
          (!irq_valid || l > irq_level)) begin
        irq_valid = 1'b1;
        irq_level = l;
        irq_id    = 5'(i);
      end
    end
    unique case (irq_level)
      3'd1:    irq_vector = 32'h6000_0340;
      3'd2:    irq_vector = 32'h6000_0180;
      3'd3:    irq_vector = 32'h6000_01C0;
      3'd4:    irq_vector = 32'h6000_0200;
      3'd5:    irq_vector = 32'h6000_0240;
      3'd6:    irq_vector = 32'h6000_02C0;
      default: irq_vector = 32'h0;
    endcase
  end

  assign claim = {irq_valid, 12'h0, irq_level, 11'h0, irq_id};

  always_comb begin
    unique case (off)
      3'd0:    cur = pending;
      3'd1:    cur = enable;
      3'd2:    cur = edge_t;
      3'd3:    cur = level[0];
      3'd4:    cur = level[1];
      3'd5:    cur = level[2];
      3'd6:    cur = level[3];
      default: cur = claim;
    endcase
  end

  // PEND writes carry clear bits, so merge them into zeros, not into PEND
  logic [63:0] merged;
  assign merged = be_merge((off == 3'd0) ? 64'h0 : {32'h0, cur}, req.wdata, req.be);
  assign wr_val = merged[31:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable  <= '0;
      edge_t  <= '0;
      level   <= '0;
      latch   <= '0;
      src_q   <= '0;
      ready_q <= 1'b0;
      err_q   <= 1'b0;
      rd_q    <= '0;
    end else begin
      src_q   <= src;
      ready_q <= start;
      if (start) begin
        err_q <= !off_ok;
        rd_q  <= cur;
      end
      latch <= (latch & ~((start && req.we && off_ok && off == 3'd0) ? wr_val : 32'h0))
               | (src & ~src_q);
      if (start && req.we && off_ok)
        unique case (off)
          3'd1: enable   <= wr_val;
          3'd2: edge_t   <= wr_val;
          3'd3: level[0] <= wr_val;
          3'd4: level[1] <= wr_val;
          3'd5: level[2] <= wr_val;
          3'd6: level[3] <= wr_val;
          default: ;
        endcase
    end
  end

  always_comb begin
    rsp.ready = ready_q;
    rsp.err   = err_q;
    rsp.rdata = {32'h0, rd_q};
  end

endmodule
