// tb_shared_bus: self-checking test of the multiplexed system bus.
//
// Ten bus masters issue random reads and writes; five slave models answer
// after a random latency of 0..3 extra cycles with data derived from the
// address. The test checks every arbitration decision against a reference
// built from the priority table, that only the selected slave sees valid,
// that data, error and done reach the owner, the one-transfer-per-grant
// timing (grant in the cycle after a request on an idle bus, done in the
// slave's ready cycle, one idle cycle after each transfer), and
// runs with several priority codes and with cycle-count arbitration.
module tb_shared_bus;
  import soc_pkg::*;

  localparam int N = NCOMP, NS = NSLV;

  logic clk = 0, rst_n = 0;
  bus_req_t [N-1:0]         m_req;
  logic [N-1:0][CYC_W-1:0]  m_cyc;
  logic [N-1:0]             m_gnt, m_done;
  logic                     m_err;
  logic [DATA_W-1:0]        m_rdata;
  logic [3:0]               pt;
  logic                     sync_en;
  bus_req_t                 bus_req;
  logic [$clog2(N)-1:0]     owner;
  slave_e                   s_sel;
  bus_req_t [NS-1:0]        s_req;
  bus_rsp_t [NS-1:0]        s_rsp;

  int checks = 0, failures = 0;
  int done_cnt [N];
  int contended = 0, sync_overrides = 0;
  bit stop_masters = 0;

  shared_bus dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // slave choice made by the test, not by the design's decoder
  assign s_sel = slave_e'(3'(bus_req.addr[30:28] % 3'd5));

  function automatic logic [63:0] sdata(input int s, input logic [31:0] a);
    return {a ^ 32'hA5A5_0000, 32'(s) * 32'h0101_0101};
  endfunction

  // slave models
  int lat [NS], waited [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      s_rsp[s].ready = s_req[s].valid && (waited[s] == lat[s]);
      s_rsp[s].err   = s_req[s].addr[3];
      s_rsp[s].rdata = sdata(s, s_req[s].addr);
    end
  always @(posedge clk)
    for (int s = 0; s < NS; s++)
      if (s_rsp[s].ready) begin waited[s] <= 0; lat[s] <= $urandom_range(0, 3); end
      else if (s_req[s].valid) waited[s] <= waited[s] + 1;

  // reference arbitration from the table
  string table_rows [8] = '{
    "OSOOOM", "OOSOOM", "OOOSOM", "OOOOSM",
    "MSOOOO", "MOSOOO", "MOOSOO", "MOOOSO" };
  function automatic int ref_winner(input logic [N-1:0] r);
    int ord [N]; int k, best; string row;
    row = table_rows[pt[3] ? 0 : int'(pt[2:0])];
    k = 2;
    for (int p = 0; p < 6; p++)
      if (row[p] == "M") ord[p] = 0; else if (row[p] == "S") ord[p] = 1;
      else begin ord[p] = k; k++; end
    for (int p = 6; p < N; p++) ord[p] = p;
    best = -1;
    for (int p = 0; p < N; p++)
      if (r[ord[p]]) begin
        if (best < 0) best = ord[p];
        else if (sync_en && m_cyc[ord[p]] < m_cyc[best]) best = ord[p];
      end
    return best;
  endfunction

  // arbitration monitor: sampled at the falling edge
  int exp_owner = -1;
  logic prev_done = 0;
  always @(negedge clk) if (rst_n) begin
    logic [N-1:0] v;
    // one idle cycle after every transfer, then arbitration again
    if (prev_done) chk(m_gnt == '0, "bus idle for one cycle after done");
    prev_done = (m_done != '0);
    for (int i = 0; i < N; i++) v[i] = m_req[i].valid;
    if (exp_owner >= 0) begin
      chk(m_gnt == (N'(1) << exp_owner), $sformatf("grant to %0d, got %b", exp_owner, m_gnt));
      exp_owner = -1;
    end
    if (m_gnt == '0 && v != '0) begin
      exp_owner = ref_winner(v);
      if ($countones(v) > 1) contended++;
      if (sync_en && $countones(v) > 1) begin
        bit save; int fixed;
        save = sync_en; sync_en = 0; fixed = ref_winner(v); sync_en = save;
        if (fixed != exp_owner) sync_overrides++;
      end
    end
    // only the selected slave sees the transfer
    for (int s = 0; s < NS; s++)
      if (s_req[s].valid) begin
        chk(m_gnt != '0 && int'(s_sel) == s, "valid only to the selected slave");
        chk(s_req[s].src == owner && s_req[s].addr == m_req[owner].addr, "slave sees owner's request");
      end
  end

  // bus masters
  for (genvar i = 0; i < N; i++) begin : g_m
    initial begin
      m_req[i] = '0;
      m_cyc[i] = '0;
      @(posedge rst_n);
      while (!stop_masters) begin
        int sl;
        logic [31:0] a;
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1;
        if (stop_masters) break;
        a = $urandom;
        m_req[i].valid = 1;
        m_req[i].we    = $urandom_range(0, 1);
        m_req[i].addr  = a;
        m_req[i].wdata = {$urandom, $urandom};
        m_req[i].be    = 8'hFF;
        m_req[i].src   = '0;
        m_cyc[i]       = m_cyc[i] + $urandom_range(0, 20);
        sl = int'(a[30:28] % 3'd5);
        forever begin
          @(negedge clk);
          if (m_done[i]) break;
        end
        chk(m_rdata == sdata(sl, a), $sformatf("master %0d rdata", i));
        chk(m_err == a[3], "err forwarded");
        done_cnt[i]++;
        @(posedge clk); #1;
        m_req[i].valid = 0;
      end
    end
  end

  initial begin
    pt = 4'b0000; sync_en = 0;
    for (int s = 0; s < NS; s++) begin lat[s] = 0; waited[s] = 0; end
    #22 rst_n = 1;
    repeat (3000) @(posedge clk);
    #1 pt = 4'b0100;
    repeat (3000) @(posedge clk);
    #1 pt = 4'b0011;
    repeat (3000) @(posedge clk);
    #1 pt = 4'b0110; sync_en = 1;
    repeat (3000) @(posedge clk);
    #1 pt = 4'b1010; sync_en = 0;
    repeat (2000) @(posedge clk);
    stop_masters = 1;
    repeat (200) @(posedge clk);
    for (int i = 0; i < N; i++) chk(done_cnt[i] > 0, $sformatf("master %0d was served", i));
    chk(contended > 0, "contention happened");
    chk(sync_overrides > 0, "cycle count overrode fixed priority");
    $display("contended=%0d sync_overrides=%0d", contended, sync_overrides);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
