// central_arbiter: central parallel arbitration of the shared system bus.
//
// All ten components present their requests at once and one winner is picked
// in the same cycle (purely combinational). The order follows the 4-bit
// priority code PT of the arbitration register, six priority positions with
// position 0 highest:
//   PT = 0ss : master processor at position 5 (lowest), slave at position 1+ss
//   PT = 1ss : master processor at position 0 (highest), slave at position 1+ss
//   PT = 1xxx (bit 3 set): reserved codes
// The four positions left free in each row ("optional" positions) are taken by
// the optional components in list order: USB, Ethernet, DMA, reserved 1.
// Reserved components 2..5 have no position in the table; here they rank below
// position 5 in list order. A reserved code (PT[3]=1) arbitrates as PT=0000.
//
// With sync_en set, the request whose cycle count is smallest wins, the
// priority order only breaking ties. This is the communication-based
// synchronisation of the description (the component that is furthest behind
// in time is served first).
//
// Interface: req[i] and cyc[i] per component; gnt one-hot, gnt_id its index,
// gnt_any when any request is present. Timing: combinational, no state.
// The six-position table follows the description; the placing of the optional
// and extra reserved components, the handling of reserved codes and the
// sync_en switch are this design's choices.
module central_arbiter
  import soc_pkg::*;
#(
  parameter int unsigned N = NCOMP
) (
  input  logic [N-1:0]            req,
  input  logic [N-1:0][CYC_W-1:0] cyc,
  input  logic [3:0]              pt,
  input  logic                    sync_en,
  output logic [N-1:0]            gnt,
  output logic [$clog2(N)-1:0]    gnt_id,
  output logic                    gnt_any
);

  localparam int unsigned IW = $clog2(N);

  // order[r] = component at priority rank r (rank 0 highest)
  logic [N-1:0][IW-1:0] order;

  always_comb begin : build_order
    logic [2:0] code;
    int unsigned m_pos, s_pos, k;
    code  = pt[3] ? 3'b000 : pt[2:0];
    m_pos = code[2] ? 0 : 5;
    s_pos = 1 + int'(code[1:0]);
    k     = C_USB;
    for (int unsigned r = 0; r < N; r++) begin
      if (r < 6) begin
        if (r == m_pos)      order[r] = IW'(C_MASTER);
        else if (r == s_pos) order[r] = IW'(C_SLAVE);
        else begin
          order[r] = IW'(k);
          k++;
        end
      end else begin
        order[r] = IW'(r);  // reserved components 2..5 rank 6..9
      end
    end
  end

  always_comb begin : pick
    logic             found;
    logic [IW-1:0]    best;
    logic [CYC_W-1:0] best_cyc;
    found    = 1'b0;
    best     = '0;
    best_cyc = '0;
    for (int unsigned r = 0; r < N; r++) begin
      if (req[order[r]]) begin
        if (!found || (sync_en && cyc[order[r]] < best_cyc)) begin
          best     = order[r];
          best_cyc = cyc[order[r]];
        end
        found = 1'b1;
      end
    end
    gnt_any = found;
    gnt_id  = best;
    gnt     = found ? (N'(1) << best) : '0;
  end

endmodule
