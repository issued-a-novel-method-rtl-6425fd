// tb_write_buf: self-checking test of the 16-entry write buffer.
//
// The downstream model is slow (4 cycles per transfer) and can be held off,
// so the buffer fills. Checks: writes are answered in one cycle while there
// is room, a seventeenth write waits for a free slot, writes leave in order
// with their data, and a read waits until every earlier write has drained
// and then sees the newest data.
module tb_write_buf;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic up_valid = 0, up_we = 0;
  mem_attr_t up_attr = '{cacheable: 1'b1, write_back: 1'b0, write_alloc: 1'b0};
  mem_attr_t dn_attr;
  logic [31:0] up_addr = '0;
  logic [63:0] up_wdata = '0, up_rdata;
  logic [7:0]  up_be = '1;
  logic up_ready, up_err;
  logic dn_valid, dn_we, dn_ready;
  logic [31:0] dn_addr;
  logic [63:0] dn_wdata, dn_rdata;
  logic [7:0]  dn_be;
  logic [4:0]  fill;
  int checks = 0, failures = 0;

  write_buf dut (.*, .dn_err(1'b0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // downstream: memory, 4 cycles per transfer, can be stalled
  logic [63:0] mem [int unsigned];
  logic [31:0] order [$];
  bit hold = 1;
  int wt = 0;
  assign dn_ready = dn_valid && !hold && wt == 3;
  assign dn_rdata = mem.exists(dn_addr) ? mem[dn_addr] : '0;
  always @(posedge clk) begin
    if (dn_ready) begin
      wt <= 0;
      if (dn_we) begin mem[dn_addr] = dn_wdata; order.push_back(dn_addr); end
    end else if (dn_valid && !hold) wt <= wt + 1;
  end

  task automatic acc(input logic w, input logic [31:0] a, input logic [63:0] d,
                     output int cyc, output logic [63:0] rd);
    @(posedge clk); #1;
    up_valid = 1; up_we = w; up_addr = a; up_wdata = d;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!up_ready);
    rd = up_rdata;
    @(posedge clk); #1;
    up_valid = 0;
  endtask

  initial begin
    int cyc; logic [63:0] rd;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      acc(1, 32'h100 + 32'(i) * 8, 64'(i) + 64'h1000, cyc, rd);
      chk(cyc == 1, "buffered write answered in one cycle");
    end
    chk(fill == 16, "buffer full");
    fork
      begin acc(1, 32'h100, 64'h2222, cyc, rd); end
      begin repeat (10) @(posedge clk); hold = 0; end
    join
    chk(cyc > 10, "write waits while full");
    // read of an address written twice: must wait for the drain
    acc(0, 32'h100, '0, cyc, rd);
    chk(rd == 64'h2222, "read sees the newest write");
    chk(fill == 0, "buffer drained before the read");
    chk(order.size() == 17, "all writes left");
    for (int i = 0; i < 16; i++) chk(order[i] == 32'h100 + 32'(i) * 8, "writes leave in order");
    chk(mem[32'h108] == 64'h1001, "data kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
