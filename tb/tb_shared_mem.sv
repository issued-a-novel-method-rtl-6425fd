// tb_shared_mem: self-checking test of the shared memory at its full 16 MiB.
//
// Random byte-enabled writes across the whole address range, kept in a
// reference associative array, then read back; every access must be answered
// exactly one cycle after valid.
module tb_shared_mem;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [63:0] model [int unsigned];

  shared_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic xfer(input logic we, input logic [31:0] a, input logic [63:0] wd,
                      input logic [7:0] be, output logic [63:0] rd);
    req.valid = 1; req.we = we; req.addr = a; req.wdata = wd; req.be = be; req.src = '0;
    @(posedge clk); #1;
    chk(rsp.ready == 1'b1, "ready one cycle after valid");
    rd = rsp.rdata;
    @(posedge clk); #1;
    req.valid = 0;
    chk(rsp.ready == 1'b0, "ready is a single pulse");
  endtask

  initial begin
    logic [31:0] addrs [64];
    logic [63:0] rd, wd, m;
    logic [7:0] be;
    int unsigned w;
    req = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    addrs[0] = 32'h0; addrs[1] = 32'h00FF_FFF8; addrs[2] = 32'h0080_0000;
    for (int i = 3; i < 64; i++) addrs[i] = {8'h0, 24'($urandom)} & 32'h00FF_FFF8;
    // full writes first
    foreach (addrs[i]) begin
      wd = {$urandom, $urandom};
      xfer(1, addrs[i], wd, 8'hFF, rd);
      model[addrs[i] >> 3] = wd;
    end
    // partial writes on top
    for (int t = 0; t < 200; t++) begin
      int i;
      i  = $urandom_range(0, 63);
      wd = {$urandom, $urandom};
      be = 8'($urandom);
      xfer(1, addrs[i] | 32'($urandom_range(0, 7)), wd, be, rd);
      w = addrs[i] >> 3;
      m = model[w];
      for (int b = 0; b < 8; b++) if (be[b]) m[8*b +: 8] = wd[8*b +: 8];
      model[w] = m;
    end
    foreach (addrs[i]) begin
      xfer(0, addrs[i], '0, 8'hFF, rd);
      chk(rd == model[addrs[i] >> 3], $sformatf("read %h", addrs[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
