// addr_decoder: system-bus address decoder.
//
// Maps the 32-bit address of the transfer in progress to the slave that
// answers it (combinational):
//   0x0000_0000 - 0x00FF_FFFF  shared memory (16 MiB)
//   0x0100_0000 - 0x0100_0FFF  arbitration register (at 0x0100_0000)
//   0x0100_1000 - 0x0100_1FFF  mailbox
//   0x0100_2000 - 0x0100_2FFF  interrupt controller of the slave processor
//   0x5000_0000 - 0x6FFF_FFFF  off-chip memory port (system ROM and reset
//                              vector at 0x5000_0000, system RAM and the
//                              exception vectors at 0x6000_0000)
//   anything else              I/O device port
// The processors' local memories (0x3FF4_0000 - 0x4007_FFFF) never reach
// the system bus. The arbitration register address and the system ROM /
// system RAM bases follow the description. Placing the shared memory directly below the
// register, the mailbox and interrupt controller windows, the region sizes and sending all other
// addresses to the I/O port are this design's choices.
module addr_decoder
  import soc_pkg::*;
(
  input  logic [ADDR_W-1:0] addr,
  output slave_e            sel
);

  always_comb begin
    if (addr < SHMEM_BASE + ADDR_W'(SHMEM_BYTES))
      sel = S_SHMEM;
    else if (addr[31:12] == ARBREG_ADDR[31:12])
      sel = S_ARBREG;
    else if (addr[31:12] == MBOX_BASE[31:12])
      sel = S_MBOX;
    else if (addr[31:12] == INTC_BASE[31:12])
      sel = S_INTC;
    else if (addr >= EXT_BASE && addr <= EXT_LAST)
      sel = S_EXTMEM;
    else
      sel = S_IODEV;
  end

endmodule
