// tb_tlb: self-checking test of the fully associative TLB (128 entries).
//
// Checks translation of installed pages, ASID separation, overwriting an
// existing mapping, filling every entry, round-robin replacement that never
// touches wired entries, and inv_all keeping only wired entries. A reference
// list of installed mappings gives the expected results.
module tb_tlb;
  localparam int E = 128;

  logic clk = 0, rst_n = 0;
  logic [31:0] vaddr, paddr;
  logic [7:0]  asid, wr_asid;
  logic        hit, wr_en = 0, wr_wired = 0, inv_all = 0;
  logic [19:0] wr_vpn, wr_ppn;
  int checks = 0, failures = 0;

  tlb #(.ENTRIES(E)) dut (.*);

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

  task automatic put(input logic [19:0] v, input logic [7:0] a, input logic [19:0] p, input logic w);
    @(posedge clk); #1;
    wr_en = 1; wr_vpn = v; wr_asid = a; wr_ppn = p; wr_wired = w;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  task automatic look(input logic [31:0] va, input logic [7:0] a, output logic h, output logic [31:0] pa);
    vaddr = va; asid = a; #1;
    h = hit; pa = paddr;
  endtask

  function automatic logic [19:0] ppn_of(input int i);
    return 20'(32'h8_0000 + i * 7);
  endfunction

  initial begin
    logic h; logic [31:0] pa;
    int present;
    vaddr = 0; asid = 0; wr_vpn = 0; wr_ppn = 0; wr_asid = 0;
    #12 rst_n = 1;
    look(32'h1234_5678, 0, h, pa);
    chk(!h, "empty after reset");
    // two wired entries
    put(20'h00001, 8'd1, 20'hAAAAA, 1);
    put(20'h00002, 8'd1, 20'hBBBBB, 1);
    look(32'h0000_1ABC, 1, h, pa);
    chk(h && pa == 32'hAAAA_AABC, "wired translation");
    look(32'h0000_1ABC, 2, h, pa);
    chk(!h, "other ASID misses");
    // fill the remaining entries
    for (int i = 0; i < E - 2; i++) put(20'(32'h10000 + i), 8'd3, ppn_of(i), 0);
    present = 0;
    for (int i = 0; i < E - 2; i++) begin
      look({20'(32'h10000 + i), 12'h345}, 3, h, pa);
      chk(h && pa == {ppn_of(i), 12'h345}, "filled entry translates");
    end
    // overwrite an existing mapping: no entry is lost
    put(20'h10005, 8'd3, 20'h12345, 0);
    look(32'h1000_5FFF, 3, h, pa);
    chk(h && pa == 32'h1234_5FFF, "mapping overwritten in place");
    look(32'h1000_6000, 3, h, pa);
    chk(h, "neighbour kept");
    // 40 new pages replace 40 old ones, never the wired ones
    for (int i = 0; i < 40; i++) put(20'(32'h20000 + i), 8'd3, 20'(i), 0);
    for (int i = 0; i < 40; i++) begin
      look({20'(32'h20000 + i), 12'h0}, 3, h, pa);
      chk(h && pa == {20'(i), 12'h0}, "new page present");
    end
    present = 0;
    for (int i = 0; i < E - 2; i++) begin
      look({20'(32'h10000 + i), 12'h0}, 3, h, pa);
      if (h) present++;
    end
    chk(present == E - 2 - 40, $sformatf("exactly 40 old pages replaced (%0d left)", present));
    look(32'h0000_1000, 1, h, pa);
    chk(h && pa == 32'hAAAA_A000, "wired entry 1 survives replacement");
    look(32'h0000_2000, 1, h, pa);
    chk(h && pa == 32'hBBBB_B000, "wired entry 2 survives replacement");
    // invalidate all but wired
    @(posedge clk); #1 inv_all = 1;
    @(posedge clk); #1 inv_all = 0;
    look(32'h2000_0000, 3, h, pa);
    chk(!h, "inv_all removes ordinary entries");
    look(32'h0000_2000, 1, h, pa);
    chk(h, "inv_all keeps wired entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
