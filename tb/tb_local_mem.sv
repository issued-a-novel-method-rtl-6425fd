// tb_local_mem: self-checking test of the local memory, as a 128 KiB RAM and
// as a 256 KiB ROM.
//
// Checks the one-cycle answer, byte-enabled writes and read-back on the RAM,
// that the ROM refuses processor writes with err and keeps its contents,
// and that the loader port fills both.
module tb_local_mem;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [1:0]       valid = '0, we = '0, ready, err, ld_we = '0;
  logic [1:0][31:0] addr, ld_addr;
  logic [1:0][63:0] wdata, rdata, ld_wdata;
  logic [1:0][7:0]  be;

  local_mem #(.BYTES(128 * 1024), .READ_ONLY(1'b0)) u_ram (
    .clk, .rst_n, .valid(valid[0]), .we(we[0]), .addr(addr[0]), .wdata(wdata[0]), .be(be[0]),
    .ready(ready[0]), .err(err[0]), .rdata(rdata[0]),
    .ld_we(ld_we[0]), .ld_addr(ld_addr[0]), .ld_wdata(ld_wdata[0]));
  local_mem #(.BYTES(256 * 1024), .READ_ONLY(1'b1)) u_rom (
    .clk, .rst_n, .valid(valid[1]), .we(we[1]), .addr(addr[1]), .wdata(wdata[1]), .be(be[1]),
    .ready(ready[1]), .err(err[1]), .rdata(rdata[1]),
    .ld_we(ld_we[1]), .ld_addr(ld_addr[1]), .ld_wdata(ld_wdata[1]));

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
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic acc(input int m, input logic w, input logic [31:0] a, input logic [63:0] d,
                     input logic [7:0] b, output logic [63:0] rd, output logic e);
    @(posedge clk); #1;
    valid[m] = 1; we[m] = w; addr[m] = a; wdata[m] = d; be[m] = b;
    @(posedge clk); #1;
    chk(ready[m], "ready one cycle after valid");
    rd = rdata[m]; e = err[m];
    @(posedge clk); #1;
    valid[m] = 0;
  endtask

  task automatic load(input int m, input logic [31:0] a, input logic [63:0] d);
    @(posedge clk); #1;
    ld_we[m] = 1; ld_addr[m] = a; ld_wdata[m] = d;
    @(posedge clk); #1;
    ld_we[m] = 0;
  endtask

  logic [63:0] ram_m [int unsigned];

  initial begin
    logic [63:0] rd, w; logic e;
    logic [31:0] a;
    addr = '0; wdata = '0; be = '0; ld_addr = '0; ld_wdata = '0;
    #12 rst_n = 1;
    // RAM: loader, then byte writes through the core port
    for (int i = 0; i < 32; i++) begin
      a = 32'h3FFE_0000 + 32'(i) * 32'h1000 + 32'h18;
      w = {$urandom, $urandom};
      load(0, a, w);
      ram_m[a[16:3]] = w;
    end
    for (int t = 0; t < 100; t++) begin
      int i; logic [7:0] b;
      i = $urandom_range(0, 31);
      a = 32'h3FFE_0000 + 32'(i) * 32'h1000 + 32'h18;
      w = {$urandom, $urandom}; b = 8'($urandom);
      acc(0, 1, a, w, b, rd, e);
      chk(!e, "RAM write accepted");
      for (int k = 0; k < 8; k++) if (b[k]) ram_m[a[16:3]][8*k +: 8] = w[8*k +: 8];
      acc(0, 0, a, '0, '1, rd, e);
      chk(!e && rd == ram_m[a[16:3]], "RAM read back");
    end
    // top word of the 128 KiB RAM
    load(0, 32'h3FFF_FFF8, 64'hFEED);
    acc(0, 0, 32'h3FFF_FFF8, '0, '1, rd, e);
    chk(rd == 64'hFEED, "last RAM word");
    // ROM: loaded contents, writes refused
    for (int i = 0; i < 16; i++) load(1, 32'h4004_0000 + 32'(i) * 32'h4000, 64'hC0FFEE00 + 64'(i));
    for (int i = 0; i < 16; i++) begin
      acc(1, 1, 32'h4004_0000 + 32'(i) * 32'h4000, 64'h0BAD, '1, rd, e);
      chk(e, "ROM write refused");
      acc(1, 0, 32'h4004_0000 + 32'(i) * 32'h4000, '0, '1, rd, e);
      chk(!e && rd == 64'hC0FFEE00 + 64'(i), "ROM keeps contents");
    end
    load(1, 32'h4007_FFF8, 64'hABCD);
    acc(1, 0, 32'h4007_FFF8, '0, '1, rd, e);
    chk(rd == 64'hABCD, "last ROM word of 256 KiB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
