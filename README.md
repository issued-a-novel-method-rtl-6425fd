# Dual-core multimedia SoC: shared bus with programmable central arbitration

This is the hardware around two processor cores in a multimedia system-on-chip:
- A **master processor** (ARM instruction set, runs the operating system).
- A **slave processor** (a configurable DSP-style core for audio and video).

Both cores, plus up to eight optional components (USB, Ethernet, DMA and five reserved slots), share one 64-bit system bus. They talk to each other through a shared memory and a mailbox.

The bus is granted by a **central parallel arbiter**: all ten requests are compared in the same cycle. The order is set by a software-writable **arbitration register**. A second mode serves whichever component is furthest behind in time, by its cycle count. That mode keeps two cores that are simulated or run at different speeds in step.

The processor cores are not included. Everything they attach to is:
- the master's memory system: TLBs, region protection, L1 instruction and data caches, write buffer and unified L2;
- the slave's local memories;
- the bus, arbiter, register, shared memory and mailbox;
- the slave's 32-input interrupt controller;
- the ports to off-chip memory and I/O.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017), one module or package per file in `rtl/`. The testbenches are in `tb/`.

## Block diagram

```
 cpu_if_* cpu_d_*                 sl_i_* sl_d_*  (slave core)     m_*[1..9]
    |        |                          |                    (slave bus I/F,
 I-TLB    D-TLB                    slave_local_mem            USB, ETH, DMA,
    \      /                      (I-RAM, I-ROM, D-RAM0/1,     reserved)
  region_prot                      D-ROM)                         |
    |      |                                                      |
  L1 I$   L1 D$ -- write_buf                                      |
    \      /                                                      |
    port_mux2 -- L2 $ -- bus port 0 ------------------------------+
                                                                  |
                          shared_bus + central_arbiter (10 masters)
                                       | addr_decoder
     +-------------+------------+------+------+-------------+-------------+
  shared_mem     arb_reg      mailbox      intc         ext_* port      io_* port
  16 MiB        0x0100_0000   0x0100_1000  0x0100_2000  (system ROM/    (I/O devices)
                                           -> sl_irq_*   RAM, flash)
```

## Bus components and arbitration

| index | component   | index | component  |
|-------|-------------|-------|------------|
| 0     | master      | 5     | reserved 1 |
| 1     | slave       | 6-9   | reserved 2-5 |
| 2     | USB         |       |            |
| 3     | Ethernet    |       |            |
| 4     | DMA         |       |            |

### Priority mode

The register's 4-bit priority code PT (bits [3:0]) selects one of six priority positions, 0 being the highest. The code places the two processors, and the four optional components fill the remaining positions in index order (USB, Ethernet, DMA, reserved 1):

| PT         | master position | slave position |
|------------|-----------------|----------------|
| `0 0 s s`  | 5 (lowest)      | 1 + ss         |
| `0 1 s s`  | 0 (highest)     | 1 + ss         |
| `1 x x x`  | reserved: behaves as `0000` | |

Example: with PT = `0000` the order is slave, USB, Ethernet, DMA, reserved 1, master. With PT = `0110` it is master, USB, Ethernet, slave, DMA, reserved 1. Reserved 2-5 always come after position 5, in index order.

### Cycle-count mode

When register bit 4 is set, the requester with the smallest cycle count (`m_cyc`, 32 bits) wins. Ties are broken by the priority order above. In this mode round-robin behaviour falls out on its own: a component that has just been served has moved ahead in time.

`central_arbiter` is purely combinational. `shared_bus` keeps the grant until the transfer ends.

## Bus protocol and timing

A master raises `valid` with `we`, `addr`, `wdata` and `be`, and holds them until its `m_done` pulse. `m_err` and `m_rdata` are valid in that cycle.

Each transfer takes these cycles:
1. **Arbitration.** The bus is free and the requests are sampled. The winner's grant (`m_gnt`) is registered.
2. **Transfer.** The owner's request is sent to the decoded slave. Every slave answers with a one-cycle `ready` one cycle after it sees `valid`.
3. **Done.** The bus is released, and one idle cycle follows before the next arbitration.

An uncontended shared-memory, register or mailbox access is therefore done in its third cycle. An off-chip access is done in its fourth cycle when the external device answers after one wait cycle. The external and I/O ports use the same valid/ready handshake and may take any number of cycles. The bus has no bursts and no split transfers.

## Address map

| range                     | target |
|---------------------------|--------|
| `0x0000_0000-0x00FF_FFFF` | shared memory, 16 MiB, 64-bit words, byte enables |
| `0x0100_0000-0x0100_0FFF` | arbitration register (32 bits, reset 0) |
| `0x0100_1000-0x0100_1FFF` | mailbox |
| `0x0100_2000-0x0100_2FFF` | slave interrupt controller |
| `0x5000_0000-0x6FFF_FFFF` | off-chip memory port (system ROM and reset vector at `0x5000_0000`, system RAM and exception vectors at `0x6000_0000`) |
| anything else             | I/O device port |

The arbitration register is in the low 32 bits of the 64-bit word. Byte enables 3..0 select its bytes. Bits [31:5] are stored but have no effect.

### Slave processor local memories

These are private to the slave and not on the bus:

| memory    | base          | size    |
|-----------|---------------|---------|
| Inst-RAM0 | `0x4000_0000` | 128 KiB |
| Inst-ROM  | `0x4004_0000` | 256 KiB |
| Data-RAM0 | `0x3FFE_0000` | 128 KiB |
| Data-RAM1 | `0x3FFC_0000` | 128 KiB |
| Data-ROM  | `0x3FF4_0000` | 256 KiB |

All are 64 bits wide with a one-cycle access (`ready` the cycle after `valid`). A core write to a ROM answers `err`. The loader port (`sl_ld_*`) writes any of them, ROMs included. An address outside the memories of a port answers `err`.

## Mailbox

The mailbox has two queues of four 64-bit messages each: master→slave and slave→master. Component 0 (master) and component 1 (slave) use the same offsets. The queue is chosen by who is asking.

| word offset | read                     | write |
|-------------|--------------------------|-------|
| 0 `SEND`    | -                        | push a message to the other side; `err` if full |
| 1 `RECV`    | pop a message for me; `err` if empty | - |
| 2 `STATUS`  | bit 0: message waiting for me; bit 1: my outgoing queue full; [15:8]: incoming count; [23:16]: outgoing count | - |

`irq_to_master` and `irq_to_slave` are high while a message waits for that side. Any other component gets `err`.

"Waiting" for a message means polling STATUS or the interrupt, not a stalled read. A stalled read would block the single bus that the sender needs.

## Slave interrupt controller (`intc`)

The controller has 32 sources:
- Source 0 is the mailbox's interrupt to the slave.
- Sources 1-31 are the top's `irq_src` inputs.

Each source has an enable bit, a type (level, or rising edge latched until cleared) and a level:

| level | meaning |
|-------|---------|
| 1-5   | interrupt levels L1-L5 |
| 6     | NMI, taken even when the source is not enabled |
| 0, 7  | never taken |

Among the pending sources that can be taken, the highest level wins and the lowest source number breaks ties. The winner goes to the core combinationally as `sl_irq_valid`, `sl_irq_level`, `sl_irq_id` and `sl_irq_vector`.

| level | vector |
|-------|--------|
| L1 | `0x6000_0340` |
| L2 | `0x6000_0180` |
| L3 | `0x6000_01C0` |
| L4 | `0x6000_0200` |
| L5 | `0x6000_0240` |
| NMI | `0x6000_02C0` |

The registers are 32 bits each, in the low half of a 64-bit word. They are answered in one cycle:

| word offset | register |
|-------------|----------|
| 0 | `PEND`: read pending sources; write 1s to clear edge latches |
| 1 | `ENABLE` |
| 2 | `EDGE`: 1 = edge |
| 3-6 | `LEVEL0-3`: a 4-bit field per source, of which the low 3 bits are used; source 8k+j is at bits [4j+2:4j] of `LEVELk` |
| 7 | `CLAIM`: [31] valid, [18:16] level, [4:0] source |

Any other offset in the window answers `err`.

## Master processor memory system (`master_mem_sys`)

The fetch port (`cpu_if_*`) and data port (`cpu_d_*`) use the same valid/ready handshake.

**Translation.** With `cpu_mmu_en` set, a fetch goes through the 64-entry I-TLB and a data access through the 128-entry D-TLB:
- Both TLBs are fully associative, with 4 KiB pages and 8-bit ASIDs.
- A wired entry is never replaced and survives `cpu_tlb_inv_all`.
- **Software refill** (`cpu_ptw_en` clear): on a miss the access is answered one cycle later with `err` and `*_tlb_miss`. Software then writes the entry (`cpu_tlb_wr_*`) and retries.
- **Hardware refill** (`cpu_ptw_en` set): a walker reads the entry, uncached, through the L1 data port. The table is one level and linear:
  - The entry's address is `cpu_ptw_base + 8 * VPN`.
  - The entry is 64 bits: bit 0 valid, bit 1 wired, [31:12] physical page.

  A valid entry is written into the TLB of the side that missed, with the current ASID, and the held access then completes. An invalid entry is answered with `err` and `*_tlb_miss`. Data-side misses are walked first, and a fetch walk starts only while no data access is requested.

**Region protection.** The physical address's 512 MiB region (`addr[31:29]`) gives the access mode:

| mode | value | behaviour |
|------|-------|-----------|
| bypass | 0 | uncached; all regions at reset |
| write-through | 1 | |
| write-back, allocate | 2 | |
| write-back, no allocate | 3 | |

The mode becomes the attributes `{cacheable, write_back, write_alloc}` that travel with the access through every level.

**Caches.** One parameterised `cache` module is used for both levels:

| level | size    | ways | line | hit latency |
|-------|---------|------|------|-------------|
| L1I   | 16 KiB  | 2    | 32 B | 1 cycle     |
| L1D   | 16 KiB  | 2    | 32 B | 1 cycle     |
| L2    | 256 KiB | 4    | 64 B | 10 cycles   |

- Replacement is LRU, using per-set age counters.
- A line is locked with `*_lock` and unlocked with `*_unlock`. A locked line is never evicted, and if every way of a set is locked a miss is served uncached.
- A miss writes back a dirty victim and fills the line one 64-bit word at a time, then completes as a hit.
- A write-back from L1 reaches L2 marked write-back, so L2 follows the same region policy.
- After reset each cache spends one cycle per set clearing its line states (256 cycles for an L1, 1024 for the L2). Accesses wait until it is done.

**Write buffer.** The 16-entry buffer between L1D and L2 posts cacheable writes (write-through data and write-backs) and drains them in order. A read, or an uncached write, first waits for the buffer to empty and then goes through. So a device or mailbox write has taken effect, and returned its error, when it is answered.

**L2 arbitration.** The two L1 sides share the L2 through `port_mux2`. The data side goes first, and the chosen side is held until its access is answered. The L2 drives bus port 0.

## Files

| file | contents |
|------|----------|
| `soc_pkg.sv` | widths, component numbers, address map, bus request/response structs, region modes |
| `central_arbiter.sv`, `arb_reg.sv`, `shared_bus.sv`, `addr_decoder.sv` | bus and arbitration |
| `shared_mem.sv`, `mailbox.sv`, `sync_fifo.sv` | communication |
| `intc.sv` | slave interrupt controller |
| `tlb.sv`, `region_prot.sv`, `cache.sv`, `write_buf.sv`, `port_mux2.sv`, `master_mem_sys.sv` | master memory system |
| `local_mem.sv`, `slave_local_mem.sv` | slave local memories |
| `soc_top.sv` | top level |

Every block has a self-checking testbench `tb/tb_<block>.sv` (`tb_cache` also uses `cache_check.sv`). Each prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

`tb_soc_top` runs the whole chip at its default sizes. It loads and runs code in the slave's local memories, does an uncontended transfer, and contends master against slave under several PT codes and the cycle-count mode. It also has USB and DMA traffic, an off-chip access, a full mailbox with interrupts both ways, a cached reset-vector fetch, a dirty-line eviction to off-chip memory, a TLB miss with software refill, and a hardware refill from a page table in shared memory. It also raises mailbox and outside interrupts through the slave's controller. It counts each mechanism.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/soc_pkg.sv tb/tb_soc_top.sv \
          --top-module tb_soc_top -o sim
./obj_dir/sim
```

For any other block, replace `tb_soc_top` with `tb_<block>`. `soc_top` takes the parameters `SHMEM_SIZE` (bytes, default 16 MiB) and `MBOX_DEPTH` (default 4). The cache, TLB and local-memory sizes are parameters of `master_mem_sys`, `cache`, `tlb` and `local_mem`.

## Where this design makes its own choices

The source description gives sizes, the memory map, the priority table and the mailbox's role, but not the circuits. These were chosen here:

- **Bus and slave details:**
  - the bus handshake and its three-cycle timing;
  - the one-cycle latency of the shared memory, register and mailbox;
  - the decoder windows other than the register address;
  - the I/O port catching every unmapped address.
- **Arbitration:**
  - how the optional components fill the "optional" priority positions;
  - reserved codes acting as `0000`;
  - bit 4 as the cycle-count mode switch.
- **Mailbox:** all of its registers, its depth, its error answers and its interrupts.
- **Interrupt controller:** its register layout and address, the tie rule, per-source edge/level type, and wiring the mailbox to source 0.
- **Shared memory:** built as RAM. It is listed as ROM, but it must be written to carry messages.
- **Slave local memories:** the ROM base addresses, and building one of each memory (two data RAMs).
- **Region protection:** the four access modes combining bypass, write-through, write-back, allocate and no-allocate.
- **Caches and write buffer:**
  - line locking in the L2 as well as the L1;
  - word-by-word line transfers;
  - data-side priority at the L2;
  - posting only cacheable writes;
  - the line-state clearing sweep after reset.
- **TLB:** page size, ASID width, round-robin replacement, the page-table format of the hardware refill, and keeping a software refill path.

## Not included

- The processor cores themselves, and their video and audio engines.
- The JTAG debug port.
- The USB, Ethernet and DMA devices (only their bus-master ports).
- The off-chip flash and I/O devices (only their ports).
- The software services for allocating and freeing shared memory.
- Protection rings and page attributes in the TLB: the description only names them, without their meaning.
