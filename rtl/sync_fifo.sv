// sync_fifo: small synchronous first-in first-out queue (helper).
//
// DEPTH entries of W bits. push writes din when not full; pop removes the
// head when not empty; both may happen in the same cycle. dout shows the head
// entry combinationally. count is the number of entries held. Reset empties
// the queue; the storage itself is not reset.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  store [DEPTH];
  logic [PW-1:0] rd_p, wr_p;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = store[rd_p];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) store[wr_p] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p  <= '0;
      wr_p  <= '0;
      count <= '0;
    end else begin
      if (do_push) wr_p <= inc(wr_p);
      if (do_pop)  rd_p <= inc(rd_p);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

endmodule
