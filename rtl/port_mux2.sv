// port_mux2: two-to-one request multiplexer in front of a shared cache port.
//
// Joins the instruction side (port a) and the data side (port b) of the
// master processor's memory system onto the unified L2 cache. When both
// request at once, the data side goes first; the chosen port keeps the
// downstream port until its transfer ends with dn_ready, and the choice is
// made again in the next cycle. Port choice is combinational while idle, so
// a lone request costs no extra cycle. The fixed data-first order is this
// design's choice.
module port_mux2
  import soc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]              p_valid,
  input  logic [1:0]              p_we,
  input  logic [1:0][ADDR_W-1:0]  p_addr,
  input  logic [1:0][DATA_W-1:0]  p_wdata,
  input  logic [1:0][BE_W-1:0]    p_be,
  input  mem_attr_t [1:0]         p_attr,
  output logic [1:0]              p_ready,
  output logic                    p_err,
  output logic [DATA_W-1:0]       p_rdata,
  output logic              dn_valid,
  output logic              dn_we,
  output logic [ADDR_W-1:0] dn_addr,
  output logic [DATA_W-1:0] dn_wdata,
  output logic [BE_W-1:0]   dn_be,
  output mem_attr_t         dn_attr,
  input  logic              dn_ready,
  input  logic              dn_err,
  input  logic [DATA_W-1:0] dn_rdata
);

  logic locked, lock_sel, sel;

  assign sel = locked ? lock_sel : p_valid[1];   // port 1 (data) first

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_sel <= 1'b0;
    end else if (dn_valid && dn_ready) begin
      locked <= 1'b0;
    end else if (dn_valid) begin
      locked   <= 1'b1;
      lock_sel <= sel;
    end
  end

  always_comb begin
    dn_valid     = p_valid[sel];
    dn_we        = p_we[sel];
    dn_addr      = p_addr[sel];
    dn_wdata     = p_wdata[sel];
    dn_be        = p_be[sel];
    dn_attr      = p_attr[sel];
    p_ready      = '0;
    p_ready[sel] = dn_ready;
  end

  assign p_err   = dn_err;
  assign p_rdata = dn_rdata;

endmodule
