// tb_mailbox: self-checking test of the bi-directional mailbox.
//
// The master and the slave processor exchange messages in both directions;
// the test checks message order, the interrupt lines, the status word, the
// error answer for sending to a full queue and receiving from an empty one,
// and that other components are refused.
module tb_mailbox;
  import soc_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 0, rst_n = 0;
  bus_req_t req;
  bus_rsp_t rsp;
  logic irq_to_master, irq_to_slave;
  int checks = 0, failures = 0;

  mailbox #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [31:0] SEND = MBOX_BASE, RECV = MBOX_BASE + 8, STAT = MBOX_BASE + 16;

  task automatic xfer(input int src, input logic we, input logic [31:0] a,
                      input logic [63:0] wd, output logic [63:0] rd, output logic err);
    req.valid = 1; req.we = we; req.addr = a; req.wdata = wd; req.be = 8'hFF;
    req.src = ID_W'(src);
    @(posedge clk); #1;
    chk(rsp.ready, "ready one cycle after valid");
    rd = rsp.rdata; err = rsp.err;
    @(posedge clk); #1;
    req.valid = 0;
  endtask

  initial begin
    logic [63:0] rd, msg [DEPTH];
    logic err;
    req = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    chk(!irq_to_master && !irq_to_slave, "no interrupt after reset");
    xfer(C_SLAVE, 0, RECV, '0, rd, err);
    chk(err && rd == 0, "receive from empty queue is an error");
    // master -> slave, fill the queue
    for (int i = 0; i < DEPTH; i++) begin
      msg[i] = {$urandom, $urandom};
      xfer(C_MASTER, 1, SEND, msg[i], rd, err);
      chk(!err, "send accepted");
      chk(irq_to_slave && !irq_to_master, "slave interrupt");
    end
    xfer(C_MASTER, 1, SEND, 64'hDEAD, rd, err);
    chk(err, "send to full queue is an error");
    xfer(C_MASTER, 0, STAT, '0, rd, err);
    chk(!err && rd[1] && !rd[0] && rd[23:16] == DEPTH && rd[15:8] == 0, "master status full");
    xfer(C_SLAVE, 0, STAT, '0, rd, err);
    chk(!err && rd[0] && !rd[1] && rd[15:8] == DEPTH, "slave status has messages");
    xfer(C_MASTER, 0, RECV, '0, rd, err);
    chk(err, "master has nothing incoming");
    for (int i = 0; i < DEPTH; i++) begin
      xfer(C_SLAVE, 0, RECV, '0, rd, err);
      chk(!err && rd == msg[i], $sformatf("slave receives message %0d in order", i));
    end
    chk(!irq_to_slave, "slave interrupt clears");
    // slave -> master
    for (int i = 0; i < 3; i++) begin
      msg[i] = {$urandom, $urandom};
      xfer(C_SLAVE, 1, SEND, msg[i], rd, err);
      chk(!err && irq_to_master && !irq_to_slave, "master interrupt");
    end
    // interleave: master sends one while slave's messages wait
    xfer(C_MASTER, 1, SEND, 64'h1234, rd, err);
    for (int i = 0; i < 3; i++) begin
      xfer(C_MASTER, 0, RECV, '0, rd, err);
      chk(!err && rd == msg[i], "master receives in order");
    end
    chk(!irq_to_master, "master interrupt clears");
    xfer(C_SLAVE, 0, RECV, '0, rd, err);
    chk(!err && rd == 64'h1234, "slave receives interleaved message");
    // other components are refused
    xfer(C_DMA, 1, SEND, 64'h5, rd, err);
    chk(err && !irq_to_slave && !irq_to_master, "DMA refused");
    xfer(C_MASTER, 1, STAT, 64'h5, rd, err);
    chk(err, "write to STATUS refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
