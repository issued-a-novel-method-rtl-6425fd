// region_prot: region protection of the memory management unit.
//
// The 4 GiB physical space is split into eight equal 512 MiB regions,
// selected by address bits [31:29]. Each region has a programmable access
// mode: bypass (uncached), write-through, write-back with allocate, or
// write-back without allocate on a write miss. The unit turns the mode of the
// region an address falls in into the cache attributes of that access.
//
// Interface: cfg_we writes cfg_mode into region cfg_region (one cycle);
// modes reads all eight back. NPORTS addresses are looked up at once
// (instruction fetch and data); addr -> attr and mode are combinational. At
// reset every region is bypass, so nothing is cached until software sets the
// modes. The eight regions and the mode names follow the description; the
// encoding, the reset value and the configuration port are this design's.
module region_prot
  import soc_pkg::*;
#(
  parameter int unsigned NPORTS = 2   // lookups served at once (fetch, data)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               cfg_we,
  input  logic [2:0]                         cfg_region,
  input  region_mode_e                       cfg_mode,
  output region_mode_e [NREGIONS-1:0]        modes,
  input  logic [NPORTS-1:0][ADDR_W-1:0]     addr,
  output region_mode_e [NPORTS-1:0]         mode,
  output mem_attr_t [NPORTS-1:0]            attr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGIONS; r++) modes[r] <= RM_BYPASS;
    end else if (cfg_we) begin
      modes[cfg_region] <= cfg_mode;
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      mode[p] = modes[addr[p][31:29]];
      unique case (mode[p])
        RM_BYPASS:     attr[p] = '{cacheable: 1'b0, write_back: 1'b0, write_alloc: 1'b0};
        RM_WT:         attr[p] = '{cacheable: 1'b1, write_back: 1'b0, write_alloc: 1'b0};
        RM_WB_ALLOC:   attr[p] = '{cacheable: 1'b1, write_back: 1'b1, write_alloc: 1'b1};
        RM_WB_NOALLOC: attr[p] = '{cacheable: 1'b1, write_back: 1'b1, write_alloc: 1'b0};
        default:       attr[p] = '0;
      endcase
    end
  end

endmodule
