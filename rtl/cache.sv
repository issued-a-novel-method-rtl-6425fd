// cache: set-associative cache with LRU replacement and per-line locking.
//
// One module serves as L1 instruction cache, L1 data cache and the unified
// L2 cache of the master processor; size, ways, line size and hit latency
// are parameters. Each access carries cache attributes (from the region
// protection unit):
//   not cacheable : passed downstream as a single word (bypass)
//   write-through : a write hit updates the line and is also sent downstream;
//                   the line never becomes dirty
//   write-back    : a write hit only marks the line dirty
//   write_alloc=0 : a write miss goes downstream without filling a line
// A miss that allocates picks a victim (a free way, else the least recently
// used way that is not locked), writes it back word by word if dirty, fills
// the new line word by word over the 64-bit downstream port, then completes
// as a hit. An access with up_lock set locks its line after the access (a
// locked line is never replaced); up_unlock on a hit unlocks it. If every
// way of the set is locked, a missing access is passed downstream.
//
// After reset the cache spends one cycle per set clearing its line states
// (INIT) before it accepts the first access.
// Timing: a hit answers HIT_LAT cycles after up_valid is first seen (ready
// for one cycle); a miss adds the write-back and fill transfers plus one
// cycle. Both ports use the same handshake: valid and the request are held
// until a one-cycle ready.
// Sizes, ways, line sizes, LRU, per-line locking, the write policies and the
// latencies follow the description; the lock interface, word-by-word line
// transfers and the handling of a fully locked set are this design's. There
// is no flush or invalidate operation. Every downstream transfer carries
// attributes (dn_attr): those of the access, except that a dirty-line
// write-back is marked write-back (only write-back lines can be dirty), so a
// next-level cache applies the same region policy.
module cache
  import soc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16 * 1024,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned HIT_LAT    = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream (processor side)
  input  logic              up_valid,
  input  logic              up_we,
  input  logic [ADDR_W-1:0] up_addr,
  input  logic [DATA_W-1:0] up_wdata,
  input  logic [BE_W-1:0]   up_be,
  input  mem_attr_t         up_attr,
  input  logic              up_lock,
  input  logic              up_unlock,
  output logic              up_ready,
  output logic              up_err,
  output logic [DATA_W-1:0] up_rdata,
  // downstream (next level)
  output logic              dn_valid,
  output logic              dn_we,
  output logic [ADDR_W-1:0] dn_addr,
  output logic [DATA_W-1:0] dn_wdata,
  output logic [BE_W-1:0]   dn_be,
  output mem_attr_t         dn_attr,
  input  logic              dn_ready,
  input  logic              dn_err,
  input  logic [DATA_W-1:0] dn_rdata
);

  localparam int unsigned WPL  = LINE_BYTES / BE_W;           // words per line
  localparam int unsigned SETS = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned OB   = $clog2(LINE_BYTES);
  localparam int unsigned WB   = $clog2(WPL);
  localparam int unsigned SB   = $clog2(SETS);
  localparam int unsigned TW   = ADDR_W - OB - SB;
  localparam int unsigned AGW  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WYW  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned LW   = $clog2(HIT_LAT + 1);

  typedef enum logic [2:0] {INIT, IDLE, WAIT, LOOK, SINGLE, WBACK, FILL, DONE} state_e;

  state_e state;

  // per-way line state; one word per set holds every way of that set
  typedef struct packed {
    logic [TW-1:0]  tag;
    logic           v;
    logic           d;
    logic           l;
    logic [AGW-1:0] age;      // 0 = most recently used
  } way_t;

  way_t [WAYS-1:0]   meta  [SETS];
  logic [DATA_W-1:0] dmem  [WAYS * SETS * WPL];
  way_t [WAYS-1:0]   cur, nxt;
  logic              meta_we;
  logic [SB-1:0]     icnt;

  logic [SB-1:0]  set_i;
  logic [TW-1:0]  tag_i;
  logic [WB-1:0]  word_i;
  logic [WB-1:0]  cnt;
  logic [LW-1:0]  wcnt;
  logic [WYW-1:0] vic;
  logic [DATA_W-1:0] rdata_q;
  logic              err_q;

  assign set_i  = up_addr[OB +: SB];
  assign tag_i  = up_addr[ADDR_W-1 -: TW];
  assign word_i = up_addr[3 +: WB];

  function automatic int unsigned didx(input logic [WYW-1:0] w, input logic [SB-1:0] s,
                                       input logic [WB-1:0] k);
    return (int'(w) * SETS + int'(s)) * WPL + int'(k);
  endfunction

  // hit detection and victim choice for the current request
  logic           hit, vic_ok;
  logic [WYW-1:0] hit_w, vic_w;

  assign cur = meta[set_i];

  always_comb begin
    logic [AGW-1:0] best_age;
    logic           have_free;
    hit = 1'b0; hit_w = '0;
    vic_ok = 1'b0; vic_w = '0; best_age = '0; have_free = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (cur[w].v && cur[w].tag == tag_i) begin
        hit = 1'b1; hit_w = WYW'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (!cur[w].v && !have_free) begin
        have_free = 1'b1; vic_ok = 1'b1; vic_w = WYW'(w);
      end
    end
    if (!have_free)
      for (int w = 0; w < WAYS; w++)
        if (!cur[w].l && (!vic_ok || cur[w].age > best_age)) begin
          vic_ok = 1'b1; vic_w = WYW'(w); best_age = cur[w].age;
        end
  end

  logic eval;
  assign eval = (state == IDLE && up_valid && HIT_LAT == 1) ||
                (state == WAIT && wcnt == '0) || (state == LOOK);

  logic [DATA_W-1:0] hit_word;
  assign hit_word = dmem[didx(hit_w, set_i, word_i)];

  // line-state update for the current set
  always_comb begin
    nxt     = cur;
    meta_we = 1'b0;
    if (eval && up_attr.cacheable && hit) begin
      meta_we = 1'b1;
      for (int w = 0; w < WAYS; w++)
        if (WYW'(w) == hit_w) nxt[w].age = '0;
        else if (cur[w].age < cur[hit_w].age) nxt[w].age = cur[w].age + 1'b1;
      if (up_lock)        nxt[hit_w].l = 1'b1;
      else if (up_unlock) nxt[hit_w].l = 1'b0;
      if (up_we && up_attr.write_back) nxt[hit_w].d = 1'b1;
    end
    if (state == FILL && dn_ready && cnt == WB'(WPL - 1)) begin
      meta_we      = 1'b1;
      nxt[vic].tag = tag_i;
      nxt[vic].v   = 1'b1;
      nxt[vic].d   = 1'b0;
      nxt[vic].l   = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT;
      icnt  <= '0;
      cnt   <= '0;
      wcnt  <= '0;
      vic   <= '0;
      err_q <= 1'b0;
    end else begin
      if (eval) begin
        err_q <= 1'b0;
        if (!up_attr.cacheable) begin
          state <= SINGLE;
        end else if (hit) begin
          if (up_we && !up_attr.write_back) state <= SINGLE;   // write-through
          else                              state <= DONE;
        end else if ((up_we && !up_attr.write_alloc) || !vic_ok) begin
          state <= SINGLE;
        end else begin
          vic <= vic_w;
          cnt <= '0;
          state <= (cur[vic_w].v && cur[vic_w].d) ? WBACK : FILL;
        end
      end else begin
        unique case (state)
          INIT: begin
            icnt <= icnt + 1'b1;
            if (icnt == SB'(SETS - 1)) state <= IDLE;
          end
          IDLE: if (up_valid) begin
            state <= WAIT;
            wcnt  <= LW'(HIT_LAT - 2);
          end
          WAIT: wcnt <= wcnt - 1'b1;
          SINGLE: if (dn_ready) begin
            err_q <= dn_err;
            state <= DONE;
          end
          WBACK: if (dn_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == WB'(WPL - 1)) state <= FILL;
          end
          FILL: if (dn_ready) begin
            cnt <= cnt + 1'b1;
            if (cnt == WB'(WPL - 1)) state <= LOOK;
          end
          DONE: state <= IDLE;
          default: state <= IDLE;
        endcase
      end
    end
  end

  // line-state, data arrays (not reset; the line states are cleared by the
  // INIT sweep, one set per cycle, after reset)
  always_ff @(posedge clk) begin
    if (state == INIT) begin
      for (int w = 0; w < WAYS; w++)
        meta[icnt][w] <= '{tag: '0, v: 1'b0, d: 1'b0, l: 1'b0, age: AGW'(w)};
    end else if (meta_we) begin
      meta[set_i] <= nxt;
    end
  end

  always_ff @(posedge clk) begin
    if (state == FILL && dn_ready) dmem[didx(vic, set_i, cnt)] <= dn_rdata;
    if (eval && up_attr.cacheable && hit) begin
      if (up_we) begin
        for (int b = 0; b < BE_W; b++)
          if (up_be[b]) dmem[didx(hit_w, set_i, word_i)][8*b +: 8] <= up_wdata[8*b +: 8];
      end else begin
        rdata_q <= hit_word;
      end
    end
    if (state == SINGLE && dn_ready) rdata_q <= dn_rdata;
  end

  // downstream port
  always_comb begin
    dn_valid     = 1'b0;
    dn_we        = 1'b0;
    dn_addr      = up_addr;
    dn_wdata     = up_wdata;
    dn_be        = up_be;
    dn_attr      = up_attr;
    unique case (state)
      SINGLE: begin
        dn_valid     = 1'b1;
        dn_we        = up_we;
      end
      WBACK: begin
        dn_valid = 1'b1;
        dn_we    = 1'b1;
        dn_addr  = {cur[vic].tag, set_i, cnt, 3'b000};
        dn_wdata = dmem[didx(vic, set_i, cnt)];
        dn_be    = '1;
        dn_attr  = '{cacheable: 1'b1, write_back: 1'b1, write_alloc: 1'b1};
      end
      FILL: begin
        dn_valid = 1'b1;
        dn_addr  = {tag_i, set_i, cnt, 3'b000};
        dn_be    = '1;
      end
      default: ;
    endcase
  end

  assign up_ready = (state == DONE);
  assign up_err   = err_q;
  assign up_rdata = rdata_q;

endmodule
