// tb_central_arbiter: self-checking test of the central parallel arbiter.
//
// The expected winner comes from the priority table written out row by row
// (M = master, S = slave, O = optional position) rather than from the
// arbiter's own formula. Directed cases check the master/slave order of each
// row; random cases cover all 16 codes, random request sets and, with
// cycle-count arbitration on, random cycle counts with forced ties.
module tb_central_arbiter;
  import soc_pkg::*;

  localparam int N = NCOMP;

  logic [N-1:0]            req;
  logic [N-1:0][CYC_W-1:0] cyc;
  logic [3:0]              pt;
  logic                    sync_en;
  logic [N-1:0]            gnt;
  logic [$clog2(N)-1:0]    gnt_id;
  logic                    gnt_any;
  int checks = 0, failures = 0;
  logic clk = 0;

  central_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Priority table, position 0 (highest) first.
  string table_rows [8] = '{
    "OSOOOM", "OOSOOM", "OOOSOM", "OOOOSM",
    "MSOOOO", "MOSOOO", "MOOSOO", "MOOOSO" };

  function automatic void ref_order(input logic [3:0] code, output int ord [N]);
    string row;
    int k;
    row = table_rows[code[3] ? 0 : int'(code[2:0])];
    k = C_USB;
    for (int p = 0; p < 6; p++) begin
      if (row[p] == "M")      ord[p] = C_MASTER;
      else if (row[p] == "S") ord[p] = C_SLAVE;
      else begin ord[p] = k; k++; end
    end
    for (int p = 6; p < N; p++) ord[p] = p;
  endfunction

  function automatic int ref_winner(input logic [N-1:0] r, input logic [N-1:0][CYC_W-1:0] c,
                                    input logic [3:0] code, input logic s);
    int ord [N];
    int best;
    best = -1;
    ref_order(code, ord);
    for (int p = 0; p < N; p++)
      if (r[ord[p]]) begin
        if (best < 0) best = ord[p];
        else if (s && c[ord[p]] < c[best]) best = ord[p];
      end
    return best;
  endfunction

  task automatic check(input string what);
    int exp;
    #1;
    exp = ref_winner(req, cyc, pt, sync_en);
    checks++;
    if (exp < 0) begin
      if (gnt_any || gnt != '0) begin
        failures++;
        $display("FAIL %s: grant with no request", what);
      end
    end else if (!gnt_any || int'(gnt_id) != exp || gnt != (N'(1) << exp)) begin
      failures++;
      $display("FAIL %s: pt=%b sync=%0b req=%b got id=%0d gnt=%b exp %0d",
               what, pt, sync_en, req, gnt_id, gnt, exp);
    end
  endtask

  initial begin
    cyc = '0; sync_en = 0; req = '0; pt = '0;
    check("idle");
    // Master against slave in every row: slave wins in rows 0000-0011,
    // master wins in rows 0100-0111, reserved codes behave like 0000.
    for (int c = 0; c < 16; c++) begin
      pt = 4'(c);
      req = '0; req[C_MASTER] = 1; req[C_SLAVE] = 1;
      #1;
      checks++;
      if (int'(gnt_id) != ((c >= 4 && c < 8) ? C_MASTER : C_SLAVE)) begin
        failures++;
        $display("FAIL directed pt=%b winner %0d", pt, gnt_id);
      end
      check("directed");
      // all requesting
      req = '1; check("all");
    end
    // Row 0010 is O O O S O M: USB, Ethernet, DMA, slave, reserved 1, master
    pt = 4'b0010; req = '0; req[C_SLAVE] = 1; req[C_RES1] = 1; #1;
    checks++;
    if (int'(gnt_id) != C_SLAVE) begin failures++; $display("FAIL slave vs res1"); end
    req[C_DMA] = 1; #1;
    checks++;
    if (int'(gnt_id) != C_DMA) begin failures++; $display("FAIL dma vs slave in 0010"); end
    // random
    for (int t = 0; t < 4000; t++) begin
      pt      = 4'($urandom);
      req     = N'($urandom);
      sync_en = t[0];
      for (int i = 0; i < N; i++) cyc[i] = CYC_W'($urandom_range(0, 7));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
