// tb_region_prot: self-checking test of the eight-region protection unit.
//
// Checks that every region is bypass after reset, that each region's mode
// can be set independently, that bits [31:29] pick the region on both
// lookup ports, and the attributes of each mode.
module tb_region_prot;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [2:0] cfg_region = '0;
  region_mode_e cfg_mode = RM_BYPASS;
  region_mode_e [NREGIONS-1:0] modes;
  logic [1:0][ADDR_W-1:0] addr;
  region_mode_e [1:0] mode;
  mem_attr_t [1:0] attr;
  int checks = 0, failures = 0;
  region_mode_e model [NREGIONS];

  region_prot dut (.*);

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

  function automatic mem_attr_t exp_attr(input region_mode_e m);
    case (m)
      RM_BYPASS:     return 3'b000;
      RM_WT:         return 3'b100;
      RM_WB_ALLOC:   return 3'b111;
      default:       return 3'b110;
    endcase
  endfunction

  task automatic probe();
    for (int t = 0; t < 64; t++) begin
      addr[0] = $urandom; addr[1] = $urandom; #1;
      for (int p = 0; p < 2; p++) begin
        chk(mode[p] == model[addr[p][31:29]], "mode of region");
        chk(attr[p] == exp_attr(model[addr[p][31:29]]), "attributes of mode");
      end
    end
  endtask

  initial begin
    addr = '0;
    for (int r = 0; r < NREGIONS; r++) model[r] = RM_BYPASS;
    #12 rst_n = 1;
    @(posedge clk); #1;
    for (int r = 0; r < NREGIONS; r++) chk(modes[r] == RM_BYPASS, "bypass after reset");
    probe();
    for (int t = 0; t < 40; t++) begin
      @(posedge clk); #1;
      cfg_we = 1; cfg_region = 3'($urandom); cfg_mode = region_mode_e'(2'($urandom));
      model[cfg_region] = cfg_mode;
      @(posedge clk); #1;
      cfg_we = 0;
      probe();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
