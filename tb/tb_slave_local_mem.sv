// tb_slave_local_mem: self-checking test of the slave processor's local
// memories at their full sizes.
//
// Loads a word into each of the five memories by its base address and
// reads it back through the matching port, checks the window edges, that
// the ROMs refuse writes, that the data RAMs take processor writes, and that
// addresses outside every window answer with err.
module tb_slave_local_mem;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic i_valid = 0, d_valid = 0, d_we = 0, ld_we = 0;
  logic [31:0] i_addr = '0, d_addr = '0, ld_addr = '0;
  logic [63:0] d_wdata = '0, ld_wdata = '0, i_rdata, d_rdata;
  logic [7:0]  d_be = '1;
  logic i_ready, i_err, d_ready, d_err;
  int checks = 0, failures = 0;

  slave_local_mem dut (.*);

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

  task automatic load(input logic [31:0] a, input logic [63:0] d);
    @(posedge clk); #1; ld_we = 1; ld_addr = a; ld_wdata = d;
    @(posedge clk); #1; ld_we = 0;
  endtask

  task automatic ifetch(input logic [31:0] a, output logic [63:0] rd, output logic e);
    @(posedge clk); #1; i_valid = 1; i_addr = a;
    @(posedge clk); #1; chk(i_ready, "instruction port answers in one cycle");
    rd = i_rdata; e = i_err;
    @(posedge clk); #1; i_valid = 0;
  endtask

  task automatic dacc(input logic w, input logic [31:0] a, input logic [63:0] d,
                      output logic [63:0] rd, output logic e);
    @(posedge clk); #1; d_valid = 1; d_we = w; d_addr = a; d_wdata = d;
    @(posedge clk); #1; chk(d_ready, "data port answers in one cycle");
    rd = d_rdata; e = d_err;
    @(posedge clk); #1; d_valid = 0;
  endtask

  initial begin
    logic [63:0] rd; logic e;
    #12 rst_n = 1;
    // Inst-RAM0 0x4000_0000 (128 KiB), Inst-ROM 0x4004_0000 (256 KiB)
    load(32'h4000_0000, 64'h1111); load(32'h4001_FFF8, 64'h1112);
    load(32'h4004_0000, 64'h2221); load(32'h4007_FFF8, 64'h2222);
    // Data-RAM0 0x3FFE_0000, Data-RAM1 0x3FFC_0000, Data-ROM 0x3FF4_0000
    load(32'h3FFE_0000, 64'h3331); load(32'h3FFF_FFF8, 64'h3332);
    load(32'h3FFC_0000, 64'h4441); load(32'h3FFD_FFF8, 64'h4442);
    load(32'h3FF4_0000, 64'h5551); load(32'h3FF7_FFF8, 64'h5552);
    ifetch(32'h4000_0000, rd, e); chk(!e && rd == 64'h1111, "Inst-RAM0 first word");
    ifetch(32'h4001_FFF8, rd, e); chk(!e && rd == 64'h1112, "Inst-RAM0 last word");
    ifetch(32'h4004_0000, rd, e); chk(!e && rd == 64'h2221, "Inst-ROM first word");
    ifetch(32'h4007_FFF8, rd, e); chk(!e && rd == 64'h2222, "Inst-ROM last word");
    ifetch(32'h4002_0000, rd, e); chk(e, "gap after Inst-RAM0");
    ifetch(32'h3FFE_0000, rd, e); chk(e, "data RAM not on the instruction port");
    dacc(0, 32'h3FFE_0000, '0, rd, e); chk(!e && rd == 64'h3331, "Data-RAM0 first word");
    dacc(0, 32'h3FFF_FFF8, '0, rd, e); chk(!e && rd == 64'h3332, "Data-RAM0 last word");
    dacc(0, 32'h3FFC_0000, '0, rd, e); chk(!e && rd == 64'h4441, "Data-RAM1 first word");
    dacc(0, 32'h3FFD_FFF8, '0, rd, e); chk(!e && rd == 64'h4442, "Data-RAM1 last word");
    dacc(0, 32'h3FF4_0000, '0, rd, e); chk(!e && rd == 64'h5551, "Data-ROM first word");
    dacc(0, 32'h3FF7_FFF8, '0, rd, e); chk(!e && rd == 64'h5552, "Data-ROM last word");
    dacc(0, 32'h3FF8_0000, '0, rd, e); chk(e, "gap after Data-ROM");
    dacc(0, 32'h4000_0000, '0, rd, e); chk(e, "Inst-RAM not on the data port");
    dacc(1, 32'h3FF4_0000, 64'hBAD, rd, e); chk(e, "Data-ROM refuses writes");
    dacc(0, 32'h3FF4_0000, '0, rd, e); chk(rd == 64'h5551, "Data-ROM unchanged");
    dacc(1, 32'h3FFC_0100, 64'hABCD, rd, e); chk(!e, "Data-RAM1 write");
    dacc(1, 32'h3FFE_0100, 64'h1234, rd, e); chk(!e, "Data-RAM0 write");
    dacc(0, 32'h3FFC_0100, '0, rd, e); chk(rd == 64'hABCD, "Data-RAM1 read back");
    dacc(0, 32'h3FFE_0100, '0, rd, e); chk(rd == 64'h1234, "Data-RAM0 read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
