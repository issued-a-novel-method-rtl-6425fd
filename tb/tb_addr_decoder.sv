// tb_addr_decoder: self-checking test of the system-bus address decoder.
//
// Checks every region boundary of the memory map and random addresses
// against a region table written out in the test.
module tb_addr_decoder;
  import soc_pkg::*;

  logic [31:0] addr;
  slave_e      sel;
  int checks = 0, failures = 0;
  logic clk = 0;

  addr_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic slave_e expect_sel(input logic [31:0] a);
    if (a <= 32'h00FF_FFFF)                      return S_SHMEM;
    if (a >= 32'h0100_0000 && a <= 32'h0100_0FFF) return S_ARBREG;
    if (a >= 32'h0100_1000 && a <= 32'h0100_1FFF) return S_MBOX;
    if (a >= 32'h0100_2000 && a <= 32'h0100_2FFF) return S_INTC;
    if (a >= 32'h5000_0000 && a <= 32'h6FFF_FFFF) return S_EXTMEM;
    return S_IODEV;
  endfunction

  task automatic try(input logic [31:0] a);
    addr = a; #1;
    checks++;
    if (sel != expect_sel(a)) begin
      failures++;
      $display("FAIL addr %h -> %0d, expected %0d", a, sel, expect_sel(a));
    end
  endtask

  logic [31:0] edges [] = '{
    32'h0000_0000, 32'h00FF_FFF8, 32'h00FF_FFFF, 32'h0100_0000, 32'h0100_0FFF,
    32'h0100_1000, 32'h0100_1FFF, 32'h0100_2000, 32'h3FFE_0000, 32'h3FFF_FFFF,
    32'h4000_0000, 32'h4FFF_FFFF, 32'h5000_0000, 32'h6000_03C0, 32'h6FFF_FFFF, 32'h7000_0000,
    32'hFFFF_FFFF };

  initial begin
    foreach (edges[i]) try(edges[i]);
    // spot checks of the fixed addresses
    addr = 32'h0100_0000; #1; checks++; if (sel != S_ARBREG) failures++;
    addr = 32'h5000_0000; #1; checks++; if (sel != S_EXTMEM) failures++;
    for (int t = 0; t < 3000; t++) begin
      try($urandom);
      try({8'h01, 12'h0, 12'($urandom)});
      try({8'h00, 24'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
