// mailbox: bi-directional mailbox between the master and the slave processor.
//
// Two message queues of DEPTH 64-bit entries, one per direction:
// master -> slave and slave -> master. A component sends by writing the SEND
// word and waits for a message by polling STATUS or by its interrupt line;
// it takes the oldest message by reading RECV. Which queue an access reaches
// is given by the issuing component (req.src), so both processors use the
// same addresses. Word offsets (address bits [4:3]):
//   0 SEND   write: queue wdata towards the other processor (err if full)
//   1 RECV   read : pop the oldest incoming message (err and 0 if empty)
//   2 STATUS read : [0] incoming not empty, [1] outgoing full,
//                   [15:8] incoming count, [23:16] outgoing count
// Accesses from other components, or of other kinds, answer with err.
// irq_to_master / irq_to_slave are high while that processor has a message.
// Timing: ready one cycle after valid is first seen; a pushed message is
// visible from the cycle after ready.
// The two directions and the send / wait services follow the description;
// queue depth, register layout and interrupt lines are this design's choices.
module mailbox
  import soc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  output logic     irq_to_master,
  output logic     irq_to_slave
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  // queue 0: master -> slave, queue 1: slave -> master
  logic [1:0]              push, pop, empty, full;
  logic [1:0][DATA_W-1:0]  dout;
  logic [1:0][CW-1:0]      count;

  for (genvar q = 0; q < 2; q++) begin : g_q
    sync_fifo #(.W(DATA_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(push[q]), .din(req.wdata), .pop(pop[q]),
      .dout(dout[q]), .empty(empty[q]), .full(full[q]), .count(count[q])
    );
  end

  logic              start, ready_q, err_d, err_q;
  logic              is_m, is_s;
  logic              out_q, in_q;      // outgoing / incoming queue index
  logic [1:0]        off;
  logic [DATA_W-1:0] rdata_d, rdata_q;

  assign start = req.valid && !ready_q;
  assign is_m  = (req.src == ID_W'(C_MASTER));
  assign is_s  = (req.src == ID_W'(C_SLAVE));
  assign out_q = is_s;                 // master sends on 0, slave on 1
  assign in_q  = is_m;                 // master receives on 1, slave on 0
  assign off   = req.addr[4:3];

  always_comb begin
    push    = '0;
    pop     = '0;
    err_d   = 1'b0;
    rdata_d = '0;
    if (start) begin
      if (!(is_m || is_s)) begin
        err_d = 1'b1;
      end else begin
        unique case ({off, req.we})
          {2'd0, 1'b1}: begin
            if (full[out_q]) err_d = 1'b1;
            else             push[out_q] = 1'b1;
          end
          {2'd1, 1'b0}: begin
            if (empty[in_q]) err_d = 1'b1;
            else begin
              pop[in_q] = 1'b1;
              rdata_d   = dout[in_q];
            end
          end
          {2'd2, 1'b0}: begin
            rdata_d[0]     = !empty[in_q];
            rdata_d[1]     = full[out_q];
            rdata_d[15:8]  = 8'(count[in_q]);
            rdata_d[23:16] = 8'(count[out_q]);
          end
          default: err_d = 1'b1;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_q <= 1'b0;
      err_q   <= 1'b0;
      rdata_q <= '0;
    end else begin
      ready_q <= start;
      if (start) begin
        err_q   <= err_d;
        rdata_q <= rdata_d;
      end
    end
  end

  always_comb begin
    rsp.ready = ready_q;
    rsp.err   = err_q;
    rsp.rdata = rdata_q;
  end

  assign irq_to_slave  = !empty[0];
  assign irq_to_master = !empty[1];

endmodule
