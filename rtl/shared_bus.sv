// shared_bus: the multiplexed (not three-state) 64-bit system bus.
//
// Up to N bus masters (the processing components) request the bus by raising
// their valid with a complete request (write flag, address, data, byte
// enables) and their current cycle count. Slaves never request; they only
// answer. When the bus is idle the central arbiter picks one requester; the
// bus then belongs to it until the addressed slave answers with ready:
//   cycle t    : idle, requests present -> owner chosen
//   cycle t+1..: owner's request forwarded, valid only to the selected slave
//   ready cycle: m_done[owner] (with rdata / err), bus idle again next cycle
// A master must hold its request unchanged until its m_done. m_gnt[i] is high
// while master i owns the bus. The muxed transfer is also given out (bus_req)
// so that an address decoder can choose the slave (s_sel).
// The master-slave organisation, the central arbitration, the 64-bit width
// and the multiplexed bus follow the description; the handshake and the
// one-transfer-per-grant rule are this design's choices.
module shared_bus
  import soc_pkg::*;
#(
  parameter int unsigned N  = NCOMP,
  parameter int unsigned NS = NSLV
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // masters
  input  bus_req_t [N-1:0]         m_req,
  input  logic [N-1:0][CYC_W-1:0]  m_cyc,
  output logic [N-1:0]             m_gnt,
  output logic [N-1:0]             m_done,
  output logic                     m_err,
  output logic [DATA_W-1:0]        m_rdata,
  // arbitration setting
  input  logic [3:0]               pt,
  input  logic                     sync_en,
  // transfer in progress and its decoded slave
  output bus_req_t                 bus_req,
  output logic [$clog2(N)-1:0]     owner,
  input  slave_e                   s_sel,
  // slaves
  output bus_req_t [NS-1:0]        s_req,
  input  bus_rsp_t [NS-1:0]        s_rsp
);

  localparam int unsigned IW = $clog2(N);

  logic [N-1:0]  req_v;
  logic [N-1:0]  arb_gnt;
  logic [IW-1:0] arb_id;
  logic          arb_any;
  logic          busy;
  bus_rsp_t      cur_rsp;

  for (genvar i = 0; i < N; i++) begin : g_v
    assign req_v[i] = m_req[i].valid;
  end

  central_arbiter #(.N(N)) u_arb (
    .req(req_v), .cyc(m_cyc), .pt(pt), .sync_en(sync_en),
    .gnt(arb_gnt), .gnt_id(arb_id), .gnt_any(arb_any)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
    end else if (!busy) begin
      if (arb_any) begin
        busy  <= 1'b1;
        owner <= arb_id;
      end
    end else if (cur_rsp.ready) begin
      busy <= 1'b0;
    end
  end

  always_comb begin
    bus_req       = m_req[owner];
    bus_req.valid = busy;
    bus_req.src   = owner;
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      s_req[s]       = bus_req;
      s_req[s].valid = busy && (int'(s_sel) == s);
    end
  end

  assign cur_rsp = s_rsp[s_sel];
  assign m_rdata = cur_rsp.rdata;
  assign m_err   = cur_rsp.err;

  always_comb begin
    m_gnt  = '0;
    m_done = '0;
    if (busy) begin
      m_gnt[owner]  = 1'b1;
      m_done[owner] = cur_rsp.ready;
    end
  end

  // The owner keeps its request up, unchanged, until the transfer ends.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> m_req[owner].valid)
    else $error("bus owner dropped its request before done");
  a_hold_addr: assert property (@(posedge clk) disable iff (!rst_n)
    busy && !cur_rsp.ready |=> $stable(m_req[owner].addr))
    else $error("bus owner changed its address during a transfer");
  a_onehot_done: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(m_done));

endmodule
