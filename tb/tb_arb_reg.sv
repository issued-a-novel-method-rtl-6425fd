// tb_arb_reg: self-checking test of the programmable arbitration register.
//
// Checks the reset value 0, the one-cycle answer, byte-enabled writes of the
// low 32 bits, that the upper data half is ignored, and that the priority
// code and the cycle-count enable follow bits [3:0] and 4.
module tb_arb_reg;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic [3:0]  pt;
  logic        sync_en;
  logic [31:0] value;
  int checks = 0, failures = 0;
  logic [31:0] model;

  arb_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One transfer; checks that ready comes exactly one cycle after valid.
  task automatic xfer(input logic we, input logic [63:0] wd, input logic [7:0] be,
                      output logic [63:0] rd);
    int lat;
    req.valid = 1; req.we = we; req.addr = ARBREG_ADDR; req.wdata = wd; req.be = be;
    req.src = '0;
    lat = 0;
    @(posedge clk); #1;
    while (!rsp.ready) begin lat++; @(posedge clk); #1; end
    chk(lat == 0, "ready one cycle after valid");
    rd = rsp.rdata;
    @(posedge clk); #1;
    req.valid = 0;
  endtask

  initial begin
    logic [63:0] rd;
    logic [63:0] wd;
    logic [7:0]  be;
    req = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    chk(value == 32'h0 && pt == 4'h0 && !sync_en, "reset value 0");
    xfer(0, '0, 8'hFF, rd);
    chk(rd == 64'h0, "reads 0 after reset");
    model = 32'h0;
    for (int t = 0; t < 200; t++) begin
      wd = {$urandom, $urandom};
      be = 8'($urandom);
      xfer(1, wd, be, rd);
      for (int b = 0; b < 4; b++) if (be[b]) model[8*b +: 8] = wd[8*b +: 8];
      chk(value == model, "write merges by byte enable");
      chk(pt == model[3:0] && sync_en == model[4], "fields follow bits");
      xfer(0, '0, 8'hFF, rd);
      chk(rd == {32'h0, model}, "read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
