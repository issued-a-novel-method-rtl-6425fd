// tb_intc: self-checking testbench of the interrupt controller.
//
// A reference model keeps its own copy of the ENABLE, EDGE and LEVEL
// registers and of the edge latches, updated at the same clock edges as the
// controller (register writes take effect at the first edge a transfer is
// seen; edges are latched from the previous cycle's input). Every cycle the
// outputs irq_valid, irq_level, irq_id and irq_vector are compared with the
// model, so the priority rule (highest level, then lowest source), the NMI
// taken without enable, levels 0 and 7 never taken, edge latching and
// write-1-to-clear are checked under random traffic. Directed parts check
// the reset values, register read-back, the CLAIM register, the vector of
// each level and err for an offset outside the register block.
// The sources are driven and the bus requests are changed 1 ns after the
// rising clock edge; a watchdog ends a hung run.
module tb_intc;
  import soc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bus_req_t    req;
  bus_rsp_t    rsp;
  logic [31:0] src;
  logic        irq_valid;
  logic [2:0]  irq_level;
  logic [4:0]  irq_id;
  logic [31:0] irq_vector;

  intc dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #2_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // reference model
  logic [31:0]      m_en, m_edge, m_latch, m_src_q;
  logic [3:0][31:0] m_lvl;

  function automatic logic [31:0] vec_of(input logic [2:0] l);
    case (l)
      3'd1: return 32'h6000_0340;
      3'd2: return 32'h6000_0180;
      3'd3: return 32'h6000_01C0;
      3'd4: return 32'h6000_0200;
      3'd5: return 32'h6000_0240;
      3'd6: return 32'h6000_02C0;
      default: return 32'h0;
    endcase
  endfunction

  task automatic model_out(output logic v, output logic [2:0] lv, output logic [4:0] id);
    logic [31:0] pend;
    logic [2:0]  l;
    pend = (m_edge & m_latch) | (~m_edge & src);
    v = 0; lv = 0; id = 0;
    for (int i = 31; i >= 0; i--) begin
      l = m_lvl[i / 8][4 * (i % 8) +: 3];
      if (pend[i] && (l == 6 || (m_en[i] && l >= 1 && l <= 5)) && (!v || l >= lv)) begin
        v = 1; lv = l; id = 5'(i);
      end
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      m_en = '0; m_edge = '0; m_latch = '0; m_src_q = '0; m_lvl = '0;
    end else begin
      logic [31:0] clr, w;
      clr = '0;
      if (req.valid && !rsp.ready && req.we && req.addr[11:6] == 0) begin
        w = req.wdata[31:0];
        for (int b = 0; b < 4; b++) if (!req.be[b]) w[8*b +: 8] = 8'h00;
        case (req.addr[5:3])
          3'd0: clr = w;
          3'd1: for (int b = 0; b < 4; b++) if (req.be[b]) m_en[8*b +: 8] = req.wdata[8*b +: 8];
          3'd2: for (int b = 0; b < 4; b++) if (req.be[b]) m_edge[8*b +: 8] = req.wdata[8*b +: 8];
          3'd3, 3'd4, 3'd5, 3'd6:
            for (int b = 0; b < 4; b++)
              if (req.be[b]) m_lvl[req.addr[5:3] - 3][8*b +: 8] = req.wdata[8*b +: 8];
          default: ;
        endcase
      end
      m_latch = (m_latch & ~clr) | (src & ~m_src_q);
      m_src_q = src;
    end
  end

  always @(negedge clk) if (rst_n) begin
    logic v; logic [2:0] lv; logic [4:0] id;
    model_out(v, lv, id);
    chk(irq_valid == v && irq_level == lv && (!v || irq_id == id) && irq_vector == vec_of(lv),
        $sformatf("outputs v=%0d l=%0d id=%0d, model v=%0d l=%0d id=%0d", irq_valid, irq_level, irq_id, v, lv, id));
  end

  task automatic xfer(input logic we, input int off, input logic [31:0] wd, input logic [7:0] be,
                      output logic [31:0] rd, output logic err);
    req.valid = 1; req.we = we; req.addr = 32'h0100_2000 + 32'(off * 8);
    req.wdata = {32'hDEAD_BEEF, wd}; req.be = be; req.src = '0;
    do @(posedge clk); while (!rsp.ready);
    rd = rsp.rdata[31:0]; err = rsp.err;
    chk(rsp.rdata[63:32] == 0, "upper half reads zero");
    #1 req.valid = 0;
  endtask

  task automatic wr(input int off, input logic [31:0] v);
    logic [31:0] rd; logic e;
    xfer(1, off, v, 8'hFF, rd, e);
  endtask

  task automatic rd(input int off, output logic [31:0] v);
    logic e;
    xfer(0, off, '0, 8'hFF, v, e);
  endtask

  initial begin
    logic [31:0] r; logic e;
    req = '0; src = '0;
    #22 rst_n = 1;
    @(posedge clk); #1;

    // reset values
    for (int k = 0; k < 7; k++) begin rd(k, r); chk(r == 0, "reset value zero"); end
    rd(7, r); chk(r == 0, "no interrupt after reset");
    // read-back with byte enables
    wr(1, 32'hFFFF_FFFF);
    xfer(1, 1, 32'h1234_5678, 8'b0000_0101, r, e);
    rd(1, r); chk(r == 32'hFF34_FF78, "ENABLE byte enables");
    // out-of-window offset answers err
    req.valid = 1; req.we = 0; req.addr = 32'h0100_2040; req.be = '1;
    do @(posedge clk); while (!rsp.ready);
    chk(rsp.err, "offset outside the block answers err");
    #1 req.valid = 0;

    // every level in turn on source 5 (level type), and its vector
    wr(1, 32'hFFFF_FFFF); wr(2, 0);
    src = 32'h20;
    for (int l = 0; l < 8; l++) begin
      wr(3, 32'(l) << 20);
      @(negedge clk);
      chk(irq_valid == (l >= 1 && l <= 6) && (!irq_valid || irq_id == 5), $sformatf("level %0d taken", l));
      rd(7, r);
      chk(r == ((l >= 1 && l <= 6) ? {1'b1, 12'h0, 3'(l), 11'h0, 5'd5} : 32'h0), "CLAIM");
    end
    // NMI ignores ENABLE, other levels need it
    wr(1, 0); wr(3, 32'h6 << 20); @(negedge clk); chk(irq_valid && irq_level == 6, "NMI without enable");
    wr(3, 32'h5 << 20); @(negedge clk); chk(!irq_valid, "disabled source not taken");
    // edge source: latched, held after the input falls, cleared by W1C
    wr(1, 32'h20); wr(2, 32'h20); wr(0, 32'h20);
    src = 0; @(posedge clk); #1; wr(0, 32'h20);
    src = 32'h20; @(posedge clk); #1; src = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); chk(irq_valid && irq_id == 5, "edge held after input falls");
    #1 wr(0, 32'h20); @(negedge clk); chk(!irq_valid, "edge cleared");

    // random traffic against the model
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      if ($urandom_range(0, 3) == 0) src = $urandom;
      else if ($urandom_range(0, 1) == 0) src[$urandom_range(0, 31)] ^= 1'b1;
      case ($urandom_range(0, 9))
        0: wr(1, $urandom);
        1: wr(2, $urandom);
        2, 3: wr(3 + $urandom_range(0, 3), $urandom);
        4: wr(0, $urandom);
        5: xfer(1, $urandom_range(0, 7), $urandom, 8'($urandom), r, e);
        6: rd(7, r);
        default: ;
      endcase
    end

    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
