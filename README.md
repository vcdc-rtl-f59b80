# VCDC — a hardware I/O virtualization controller for NoC many-core systems

In a virtualized system, an I/O request from an application normally passes
through the guest OS driver stack, a virtual machine monitor and a second
driver before it reaches the device. That path costs CPU time. It also makes
the moment an I/O operation happens hard to predict. The VCDC (Virtualized
Complicated Device Controller) puts the monitor and the low-level drivers into
hardware, next to the devices. A guest sends a short, high-level request over
the network-on-chip (NoC), for example "show 'A' at (2,1)" or "send this
Ethernet packet". The VCDC turns the request into the operations the physical
device needs. It shares the device among all CPUs under a fixed arbitration
policy and sends the answer back to the CPU that asked.

This repository holds synthesizable SystemVerilog for that controller. It
includes three device paths:

* **Ethernet**: full path down to the AXI buses of an Ethernet MAC subsystem.
  Each CPU gets its own IP address.
* **VGA**: virtualization only. Each VM is given its own section of one screen.
* **SPI NOR flash**: full path down to the SPI pins. A guest reads a whole
  address range with one request, or writes one byte.

## Structure

```
            NoC (32-bit flits + cpu/dev/last sideband)
                 |                      ^
        +--------v----------------------+--------+
        |          hw_manager                    |
        |  in FIFO -> demux(dev) -> per-VMM FIFOs |
        |  per-VMM FIFOs -> RR sched/mux -> out   |
        +-----+------------------+----------------+------+
              | dev 0            | dev 1          | dev 2
      +-------v--------+ +-------v-------+ +------v---------+
      | io_vmm (ETH)   | | io_vmm (VGA)  | | io_vmm (FLASH) |
      |  virt_eth      | |  virt_vga     | |  virt_flash    |
      +-------+--------+ +-------+-------+ +------+---------+
              |                  |                |
      +-------v--------+  vga_ins / vga_rsp +-----v----------+
      | lld_eth        |  (VGA driver and   | lld_flash      |
      +--+---------+---+   controller are   |  spi_master    |
   AXI-Lite|       |AXI-Stream  not part    +-----+----------+
        TEMAC   AXI Ethernet    of this RTL)      | SCK CS# MOSI MISO
        buffer (outside)                     SPI NOR flash (outside)
```

| file | what it is |
|---|---|
| `rtl/vcdc_pkg.sv` | flit type, opcodes, device numbers, frame word positions |
| `rtl/vcdc_top.sv` | the controller: hardware manager, three I/O VMMs, Ethernet and flash drivers |
| `rtl/hw_manager.sv` | NoC-side request router and response merger |
| `rtl/io_vmm.sv` | generic I/O VMM shell: per-CPU FIFO groups, Scheduler_1/2, hosts one virtualization module |
| `rtl/virt_eth.sv` | Ethernet virtualization (source-IP rewrite, whole-frame return by destination IP) |
| `rtl/virt_vga.sv` | VGA virtualization (screen sections) |
| `rtl/lld_eth.sv` | Ethernet low layer driver: function select, mutex, AXI-Lite and AXI-Stream |
| `rtl/virt_flash.sv` | flash virtualization (range read split into 4-byte reads, one-byte write) |
| `rtl/lld_flash.sv` | flash low layer driver: read and write functions, mutex, status polling |
| `rtl/spi_master.sv` | SPI controller, mode 0, up to 5 bytes out and 4 bytes in per transaction |
| `rtl/sched.sv` | message-granular arbiter, round robin or fixed priority |
| `rtl/sync_fifo.sv` | valid/ready FIFO used everywhere |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/eth_sub_model.sv` | behavioural Ethernet subsystem (register file + frame loop-back) |
| `tb/eth_frame_pkg.sv` | builds Ethernet/IPv4 test frames |
| `tb/spi_flash_model.sv` | behavioural SPI NOR flash (READ, WREN, PP, RDSR, busy time) |

## Messages and flits

The NoC carries 32-bit packets. Everything inside the VCDC is a stream of
`vcdc_pkg::flit_t`, one 32-bit word plus sideband fields:

| field | bits | meaning |
|---|---|---|
| `cpu` | 8 | requesting CPU for a request; destination CPU for a response |
| `dev` | 4 | I/O VMM the message belongs to (0 Ethernet, 1 VGA, 2 flash) |
| `last` | 1 | final flit of a message |
| `data` | 32 | payload word |

The sideband is assumed to come from the NoC packet header: the source or
destination node and the end-of-packet mark. Message formats (opcode in
`data[31:24]` of the first flit):

| message | flits |
|---|---|
| VGA display | character, x, y (three flits, e.g. 0x41, 2, 1) |
| `OP_ETH_CTRL_WR` | header, register address, data → answer `RSP_ETH_CTRL_WR{bresp}` |
| `OP_ETH_CTRL_RD` | header, register address → answer `RSP_ETH_CTRL_RD{rresp}`, data |
| `OP_ETH_TX` | header{byte length[15:0]}, frame words, first byte in bits [31:24] |
| received frame, to CPU | header `RSP_ETH_RX{length}`, frame words |
| received frame, driver → VMM | header `RSP_ETH_RX`, frame words, trailer{byte count} |
| `OP_FL_READ` | header, start address, end address (inclusive) → answer: ceil(n/4) flits, bytes from bit 31 down |
| `OP_FL_WRITE` | header, address, data byte → answer `RSP_FL_WRITE` |
| `INS_FL_RD`, VMM → driver | header{final[16], n-1[1:0]}, address |
| `INS_FL_WR`, VMM → driver | header, address, data byte |

**The one rule a user must respect:** the flits of one message must arrive
back to back on `noc_in`. Flits from different CPUs must not be mixed within a
message. A wormhole NoC does this for a single packet. The schedulers hand a
path to one CPU for a whole message. If messages were interleaved, a granted
CPU could wait for flits that sit behind another CPU's flits in a shared FIFO.

## Request and response paths

**Hardware manager.** Request flits enter one input FIFO. The `dev` field at
its head steers a demultiplexer into the FIFO of that I/O VMM. Flits for a
device that does not exist are dropped. On the way back, each VMM has an input
FIFO. A round-robin scheduler picks one whole message at a time and moves it
into the single output FIFO towards the NoC.

**I/O VMM.** All VMMs share one shell, and only the virtualization module
differs. A request passes through these stages:

1. A communication FIFO.
2. A demultiplexer on `cpu` into that CPU's request FIFO.
3. Scheduler_1, which picks the CPU whose request is served next.
4. The virtualization module.
5. A communication FIFO to the low layer driver.

Answers travel the mirror path: a communication FIFO, the virtualization
module, the CPU's response FIFO, then Scheduler_2, then a communication FIFO
to the hardware manager. Each CPU owns one request/response FIFO pair, and
`NUM_CPUS` sets how many pairs exist. The VMM scales with the CPU count this
way. Flits for a CPU without a FIFO pair are dropped.

**Scheduling.** `sched` grants one requester and holds the grant until the
flit with `last` has moved. The `policy` input of `vcdc_top` selects the
policy of both VMM schedulers at run time:

* `SCHED_FP`: the lowest CPU index wins, so CPU 0 has the highest priority.
* `SCHED_RR`: the search starts just after the CPU served last.

CPU index `i` is meant to be mesh node `(i mod 4, i div 4)` of a 4-wide mesh.
The hardware manager's response scheduler is always round robin.

**Low layer driver (`lld_eth`).** The opcode of the instruction at the head of
the input FIFO selects one of three hardware functions:

* AXI-Lite write to the TEMAC.
* AXI-Lite read from the TEMAC.
* AXI-Stream transmit to the AXI Ethernet buffer. `tkeep` of the last word
  comes from the byte length in the header.

The function state register is the mutex. No new instruction leaves the
FIFO until the running function has finished, so the controller sees
instructions in the order the VMM sent them. Received frames are wrapped as
header / words / trailer and share the output FIFO with the register answers.
A frame that has started keeps the output FIFO until its trailer.

## Ethernet virtualization

All CPUs send through one MAC, so the VCDC gives each CPU its own address. On
transmit, the last byte of the source IPv4 address is replaced by the CPU id:
`src_ip = (src_ip & 0xFFFFFF00) | cpu`. The byte position is fixed: frame byte
29, which is word 7, bits [23:16]. This assumes an untagged Ethernet II frame
with a 20-byte IPv4 header. Frames with a VLAN tag or IP options are rewritten
at the wrong place. The IPv4 header checksum is **not** updated. A receiver
that checks it will drop rewritten packets unless the checksum is fixed
downstream (for example by MAC checksum offload) or the guest fills it in for
the final address.

On receive, `virt_eth` stores the whole frame in its Ethernet buffer
(`ETH_BUF_WORDS` = 512 words, so a 1518-byte frame fits). When the trailer
arrives, it sends the frame to the CPU named by the last byte of the
destination IP address (frame byte 33). Register answers from the driver
already carry their CPU and are passed straight through.

The buffer is single: capture and emission of a frame do not overlap. On the
receive side, each 1 KB frame therefore occupies the path for about two frame
times (~515 cycles). This is the throughput limit seen in the loop-back
numbers below.

## VGA virtualization

The screen is divided into four sections along the second coordinate, one per
VM. `virt_vga` adds `100 * (cpu mod 4)` to the third flit (y) of each display
request. VM 3's (0,0) therefore becomes (0,300). CPUs beyond the fourth share
sections modulo 4. Coordinates are not clipped. The resulting instructions
appear on the `vga_ins_*` ports. A VGA driver and controller must be attached
there; neither is part of this RTL.

## SPI flash virtualization

All CPUs share one flash; addresses are not translated or protected. A
guest's range read is one request of three flits. `virt_flash` splits it into
read instructions of up to four bytes each and marks the last one `final`.
While it generates these it accepts no other request, so one CPU's read is
never interleaved with another's. An end address below the start reads one
byte. A one-byte write becomes one write instruction.

`lld_flash` runs one function per instruction:

* **Read:** one SPI READ (0x03) with a 24-bit address and 1 to 4 data bytes.
  The answer is one flit with `last` equal to `final`, so the CPU gets one
  message per request.
* **Write:** WREN (0x06), PAGE PROGRAM (0x02) of one byte, then READ STATUS
  (0x05) until the write-in-progress bit clears. Then one `RSP_FL_WRITE`
  answer is sent.

No sector erase is done; a byte that was not erased only loses bits. SCK is
`clk / (2*SPI_HALF)`, 50 MHz at a 100 MHz clock. A transaction of B bytes
takes `16*SPI_HALF*B + 2` cycles.

## Timing

All blocks use one clock domain with an active-low asynchronous reset.
Pointers and state are reset; FIFO storage and the frame buffer are not. With
no back-pressure:

* `hw_manager` adds 2 cycles per direction.
* `io_vmm` adds 3 cycles per direction, plus the frame store time on Ethernet
  receive.
* `virt_vga` and the `virt_eth` transmit path are combinational.
* Every path moves one flit per cycle.

Measured in `tb_vcdc_top`, at default size, with a loop-back Ethernet model
(20-cycle turnaround) and a NoC output that stalls 1 cycle in 8. The numbers
are cycles from the first request flit until the CPU has its 1 KB packet back:

| active CPUs | first CPU | last CPU |
|---|---|---|
| 1 | 839 | 839 |
| 4 | 845 | 2454 |
| 8 | 845 | 4637 |
| 16 | 839 | 8954 |

Each additional CPU adds about 540 cycles, limited by the single receive
buffer. The answers leave in the order the requests arrived. The NoC has a
single input channel, and a 1 KB request cannot wait whole in a 4-deep FIFO.
As a result, fixed priority and round robin give the same order for
back-to-back packets. The policies differ when several short requests are
waiting at once, and `tb_vcdc_top` checks both orders with queued VGA
requests.

Flash range reads in the same test (SCK = clk/2, reads issued back to back):

| bytes per read | 1 CPU | slowest of 9 CPUs |
|---|---|---|
| 1 | 100 | 790 |
| 4 | 148 | 1220 |
| 64 | 2158 | 19310 |
| 256 | 8590 | 77198 |

The flash is one shared device, so the slowest of 9 waits for all 9 reads.
A 1-byte read costs 4 flits on the NoC: 3 request flits and 1 answer flit.

With 4 CPUs writing one byte per request, each sending its next write as soon
as the previous one is answered, round robin shares the flash evenly: 34, 34,
34 and 33 bytes in 60,000 cycles. In this test the model is busy for 300
cycles per programmed byte. The rate therefore depends on the flash's program
time, not on the controller.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CPUS` | 16 | `vcdc_top`, `io_vmm` | number of per-CPU FIFO groups |
| `FIFO_DEPTH` | 4 | all | depth of every FIFO (power of two) |
| `ETH_BUF_WORDS` | 512 | `vcdc_top`, `io_vmm`, `virt_eth` | receive frame buffer |
| `VGA_SECTION_OFFSET` / `SECTION_OFFSET` | 100 | `io_vmm`, `virt_vga` | section height |
| `VGA_SECTIONS` / `NUM_SECTIONS` | 4 | `io_vmm`, `virt_vga` | number of sections |
| `KIND` | `VIRT_ETH` | `io_vmm` | which virtualization module: `VIRT_ETH`, `VIRT_VGA` or `VIRT_FLASH` |
| `SPI_HALF` / `HALF` | 1 | `vcdc_top`, `lld_flash`, `spi_master` | SCK half period in clock cycles |

To add a device:

1. Write a virtualization module with the same eight stream ports as
   `virt_vga`.
2. Add a `virt_kind_e` value and a branch in the `generate` of `io_vmm`.
3. Give it a `dev` number and instantiate another `io_vmm` in the top.

## Departures and limits

Some parts of the full controller are not here:

* **Devices:** UART and DMA VMMs with their drivers.
* **Flash chip:** the flash itself is outside; the testbenches use a model.
* **VGA:** the VGA driver and controller.
* **Memory:** the memory access module towards DDR.
* **Timing-accurate I/O:** the programmable timing-accurate GPIO command
  processor.
* **Scheduling:** customised scheduling policies.

Their interfaces and behaviour are not defined well enough to build.

Some choices are this design's own rather than taken from an outside
specification:

* FIFO depths, the valid/ready handshake and the message formats.
* Dropping unknown devices and CPUs.
* The receive trailer.
* Round-robin start after reset: CPU 0.
* The flash instruction set, the 4-byte split of range reads and the SPI
  command sequence.

Known differences in behaviour:

* The worst 1-byte flash read with 9 CPUs takes about 790 cycles here, about
  twice the worst case reported for the original controller (about 400). Every
  read here is a full 40-bit SPI transaction at SCK = clk/2, and the nine
  reads are served one after another.
* A 10-byte read is one request here (3 + 3 flits on the NoC), not ten
  one-byte requests.
* Flash write throughput over one second is not measured. It depends on the
  flash's program time, which the model sets.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vcdc_pkg.sv tb/eth_frame_pkg.sv tb/tb_vcdc_top.sv --top-module tb_vcdc_top
./obj_dir/Vtb_vcdc_top
```

Replace `tb_vcdc_top` with any other `tb_*` to test one block. The end-to-end
test runs the top at its default parameters and needs a few seconds. It
covers:

* register write/read and an error answer;
* dropped messages;
* VGA section mapping under both policies;
* 1 KB loop-back from 1, 4, 8 and 16 CPUs under both policies;
* flash range reads of 1, 4, 64 and 256 bytes from 1 and 9 CPUs;
* one-byte flash writes from 4 CPUs, read back afterwards;
* NoC flits per operation from 1, 4 and 10 CPUs (3 per VGA pixel, 4 per
  1-byte flash read);
* write throughput from 4 CPUs writing continuously.

It prints the response times and a count of each mechanism it exercised.

The block testbenches cover the pieces in isolation:

* FIFO order and full flag;
* arbitration order and grant holding;
* routing and round-robin merging in the hardware manager;
* per-CPU FIFOs and both schedulers in the VMM;
* the IP rewrite and whole-frame return;
* AXI-Lite and AXI-Stream behaviour of the driver;
* splitting of flash range reads, and the flash write sequence with status
  polling;
* SPI transaction data and cycle counts.
