// cache_check: self-checking test environment for one cache configuration.
//
// Drives a cache with random reads and writes over a small pool of
// addresses chosen to collide in a few sets, with a fixed attribute per
// address group (write-back allocate, write-back no-allocate, write-through,
// bypass). A downstream memory model answers after a random latency. The
// expected read data is the last value written to each address, kept in a
// reference array. Directed parts check the hit latency, the LRU victim
// choice, per-line locking, that write-through and bypass writes reach the
// next level at once and that write-back data reaches it only on eviction.
// Reports its counts when done.
module cache_check
  import soc_pkg::*;
#(
  parameter int unsigned SIZE = 16 * 1024,
  parameter int unsigned WAYS = 2,
  parameter int unsigned LINE = 32,
  parameter int unsigned LAT  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   checks,
  output int   failures
);

  localparam int unsigned SETS   = SIZE / (LINE * WAYS);
  localparam int unsigned STRIDE = SETS * LINE;       // same set, next tag

  logic              up_valid = 0, up_we = 0, up_lock = 0, up_unlock = 0;
  logic [ADDR_W-1:0] up_addr = '0;
  logic [DATA_W-1:0] up_wdata = '0;
  logic [BE_W-1:0]   up_be = '0;
  mem_attr_t         up_attr = '0;
  logic              up_ready, up_err;
  logic [DATA_W-1:0] up_rdata;
  logic              dn_valid, dn_we;
  mem_attr_t         dn_attr;
  logic [ADDR_W-1:0] dn_addr;
  logic [DATA_W-1:0] dn_wdata;
  logic [BE_W-1:0]   dn_be;
  logic              dn_ready;
  logic [DATA_W-1:0] dn_rdata;

  cache #(.SIZE_BYTES(SIZE), .WAYS(WAYS), .LINE_BYTES(LINE), .HIT_LAT(LAT)) dut (
    .clk, .rst_n, .up_valid, .up_we, .up_addr, .up_wdata, .up_be, .up_attr, .up_lock,
    .up_unlock, .up_ready, .up_err, .up_rdata, .dn_valid, .dn_we, .dn_addr, .dn_wdata,
    .dn_be, .dn_attr, .dn_ready, .dn_err(1'b0), .dn_rdata);

  // downstream memory: word-addressed, initial word = f(address)
  logic [63:0] dmem [int unsigned];
  int dn_wait = 0, dn_lat = 0, dn_count = 0;
  function automatic logic [63:0] init_word(input logic [31:0] a);
    return {a, a ^ 32'h5A5A_5A5A};
  endfunction
  function automatic logic [63:0] dn_word(input logic [31:0] a);
    return dmem.exists(a >> 3) ? dmem[a >> 3] : init_word({a[31:3], 3'b0});
  endfunction
  assign dn_ready = dn_valid && dn_wait == dn_lat;
  assign dn_rdata = dn_word(dn_addr);
  always @(posedge clk) begin
    if (dn_ready) begin
      dn_wait <= 0;
      dn_lat  <= $urandom_range(0, 2);
      dn_count <= dn_count + 1;
      if (dn_we) begin
        logic [63:0] w;
        w = dn_word(dn_addr);
        for (int b = 0; b < 8; b++) if (dn_be[b]) w[8*b +: 8] = dn_wdata[8*b +: 8];
        dmem[dn_addr >> 3] = w;
      end
    end else if (dn_valid) dn_wait <= dn_wait + 1;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL [%0d-way] %s @%0t", WAYS, what, $time); end
  endtask

  // reference: value each processor-visible word must read
  logic [63:0] ref_m [int unsigned];
  function automatic logic [63:0] ref_word(input logic [31:0] a);
    return ref_m.exists(a >> 3) ? ref_m[a >> 3] : init_word({a[31:3], 3'b0});
  endfunction

  // attribute by address group (bits 27:26)
  function automatic mem_attr_t attr_of(input logic [31:0] a);
    unique case (a[27:26])
      2'd0: return '{cacheable: 1, write_back: 1, write_alloc: 1};
      2'd1: return '{cacheable: 1, write_back: 1, write_alloc: 0};
      2'd2: return '{cacheable: 1, write_back: 0, write_alloc: 0};
      default: return '{cacheable: 0, write_back: 0, write_alloc: 0};
    endcase
  endfunction

  // one access; returns cycles from valid to ready and downstream transfers
  task automatic acc(input logic we, input logic [31:0] a, input logic [63:0] wd,
                     input logic [7:0] be, input logic lk, input logic ul,
                     output logic [63:0] rd, output int cyc, output int dn);
    int d0;
    @(posedge clk); #1;
    d0 = dn_count;
    up_valid = 1; up_we = we; up_addr = a; up_wdata = wd; up_be = be;
    up_attr = attr_of(a); up_lock = lk; up_unlock = ul;
    cyc = 0;
    do begin @(posedge clk); cyc++; #1; end while (!up_ready);
    rd = up_rdata;
    dn = dn_count - d0;
    @(posedge clk); #1;
    up_valid = 0; up_lock = 0; up_unlock = 0;
    if (we) begin
      logic [63:0] w;
      w = ref_word(a);
      for (int b = 0; b < 8; b++) if (be[b]) w[8*b +: 8] = wd[8*b +: 8];
      ref_m[a >> 3] = w;
    end else begin
      chk(rd == ref_word(a), $sformatf("read %h: %h, expected %h", a, rd, ref_word(a)));
    end
  endtask

  int n_hits = 0, n_miss = 0, n_evict = 0;

  initial begin
    logic [63:0] rd;
    int cyc, dn;
    logic [31:0] base, pool [32];
    checks = 0; failures = 0; done = 0;
    @(posedge rst_n);
    base = 32'h0000_1000;

    // hit latency
    acc(0, base, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == LINE / 8, $sformatf("miss fills one line (%0d words)", dn));
    acc(0, base + 8, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == 0 && cyc == LAT, $sformatf("hit in %0d cycles (got %0d, %0d transfers)", LAT, cyc, dn));

    // LRU: touch ways 0..WAYS-1 of one set, re-touch all but 'base+STRIDE',
    // then a new tag must evict exactly that one
    for (int w = 1; w < WAYS; w++) acc(0, base + w * STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    acc(0, base, '0, '1, 0, 0, rd, cyc, dn);
    for (int w = 2; w < WAYS; w++) acc(0, base + w * STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    acc(0, base + WAYS * STRIDE, '0, '1, 0, 0, rd, cyc, dn);      // evicts base+STRIDE
    acc(0, base, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == 0, "most recently used line kept");
    acc(0, base + STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn != 0, "least recently used line replaced");

    // write-back: a write hit stays in the cache until the line is evicted
    acc(1, base, 64'hB0B0_0000_0000_0001, '1, 0, 0, rd, cyc, dn);
    chk(dn == 0 && dn_word(base) != 64'hB0B0_0000_0000_0001, "write-back hit not sent on");
    for (int w = 1; w <= WAYS; w++) acc(0, base + w * STRIDE + 64, '0, '1, 0, 0, rd, cyc, dn);
    for (int w = 1; w <= WAYS; w++) acc(0, base + w * STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn_word(base) == 64'hB0B0_0000_0000_0001, "dirty line written back on eviction");
    n_evict++;

    // write-through and bypass writes reach the next level at once
    acc(0, 32'h0800_2000, '0, '1, 0, 0, rd, cyc, dn);
    acc(1, 32'h0800_2000, 64'h7777, '1, 0, 0, rd, cyc, dn);
    chk(dn == 1 && dn_word(32'h0800_2000) == 64'h7777, "write-through hit sent on");
    acc(1, 32'h0C00_3000, 64'h8888, '1, 0, 0, rd, cyc, dn);
    chk(dn == 1 && dn_word(32'h0C00_3000) == 64'h8888, "bypass write sent on");
    acc(0, 32'h0C00_3000, '0, '1, 0, 0, rd, cyc, dn);
    acc(0, 32'h0C00_3000, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == 1, "bypass read never cached");
    acc(1, 32'h0400_5000, 64'h9999, '1, 0, 0, rd, cyc, dn);
    chk(dn == 1, "write miss without allocate sent on");
    acc(0, 32'h0400_5000, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == LINE / 8, "read after no-allocate write misses");

    // locking: lock one line, then stream WAYS+1 other tags through its set
    base = 32'h0000_0400;
    acc(0, base, '0, '1, 1, 0, rd, cyc, dn);
    for (int w = 1; w <= WAYS + 1; w++) acc(0, base + w * STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    acc(0, base, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn == 0, "locked line not replaced");
    acc(0, base, '0, '1, 0, 1, rd, cyc, dn);                        // unlock
    for (int w = 1; w <= WAYS + 1; w++) acc(0, base + w * STRIDE, '0, '1, 0, 0, rd, cyc, dn);
    acc(0, base, '0, '1, 0, 0, rd, cyc, dn);
    chk(dn != 0, "unlocked line replaced again");

    // random traffic over colliding addresses of all four groups
    for (int i = 0; i < 32; i++)
      pool[i] = {4'h0, 2'(i % 4), 26'(32'h3000 + (i / 4) % 4 * STRIDE + (i / 16) * 8 + (i % 2) * LINE)};
    for (int t = 0; t < 1500; t++) begin
      logic [31:0] a;
      a = pool[$urandom_range(0, 31)];
      if ($urandom_range(0, 2) == 0)
        acc(1, a, {$urandom, $urandom}, 8'($urandom), 0, 0, rd, cyc, dn);
      else
        acc(0, a, '0, '1, 0, 0, rd, cyc, dn);
      if (dn == 0) n_hits++; else n_miss++;
    end
    chk(n_hits > 100 && n_miss > 100, $sformatf("hits %0d and misses %0d both seen", n_hits, n_miss));
    $display("cache %0d-way %0dB lines: hits=%0d misses=%0d", WAYS, LINE, n_hits, n_miss);
    done = 1;
  end
endmodule
