# KIMS link interface: FIFO message links for a cluster of PC/ATs

KIMS is a message-passing multicomputer built from ordinary PC/AT machines.
Every machine (a *computing element*, CE) gets up to four identical
extension cards. Each card carries four bidirectional, byte-wide links, so a
CE has up to 16. Each direction of a link is buffered by a 2048-byte FIFO.
The host sees all 16 links, on whichever card they sit, through one small
block of I/O registers:

* a 16-bit **mask** selects the links an access applies to;
* one **link register** port moves the data;
* two 16-bit **status** registers show which links have data waiting and
  which outgoing buffers are full.

Because a write goes to every selected link at once, multicast costs a
single I/O instruction. The same port can be served by polling, by
interrupts, or by the PC's DMA controller, with flow control in hardware.

This RTL describes the card logic, the wiring of four cards inside one CE,
and a two-CE system. The original card was built from six small PALs,
74-series buffers and latches, and IDT7203 FIFOs. Here those parts become
synchronous SystemVerilog blocks that keep the same equations and signal
names.

## Register map

The block sits at I/O base `BASE` (default `140h`):

| offset | write                          | read                     |
|--------|--------------------------------|--------------------------|
| +0     | mask, 16 bit (bit i = link i)  | –                        |
| +2     | control, 8 bit (low 4 used)    | fifo-empty, 16 bit       |
| +4     | reset: clears all link FIFOs   | fifo-full, 16 bit        |
| +6/+7  | link register: send one byte   | link register: receive one byte |

Control bits: b0 `DIR` (1 = DMA reads from the link, 0 = DMA writes to it),
b1 `DMA` (enable DRQ3), b2 `DAV` (enable the data-arrived interrupt, IRQ11),
b3 `WARN` (enable the illegal-access interrupt, IRQ10). Status bits are
active low: fifo-empty bit i = 0 means link i has no incoming data, and
fifo-full bit i = 0 means link i's outgoing FIFO is full.

A DMA cycle on channel 3 (AEN high, DACK3 low) addresses the link register
whatever the address.

## How one register is spread over four cards

This is the least obvious part of the design. A card holds only four of the
16 mask bits and four of the 16 status bits: card *i* owns nibble *i*. The
processor bus is 16 bits wide, the card's internal bus `cd` 8 bits. Four
nibble transceivers connect them:

* DBF0 connects processor bits 3..0 to `cd[3:0]`;
* DBF1 connects processor bits 7..4 to `cd[7:4]`;
* DBF2 connects processor bits 11..8 to `cd[3:0]`;
* DBF3 connects processor bits 15..12 to `cd[7:4]`.

`kims_data_bus_if` enables them as follows:

* **Mask, fifo-empty, fifo-full:** card *i* enables only DBF*i*. For a mask
  write, a nibble multiplexer picks the nibble from `cd`: the low one on
  cards 0 and 2, the high one on cards 1 and 3. For a status read, the card
  puts its four flags on both halves of `cd`, so DBF*i* finds them wherever
  it looks. Four cards together therefore read or write one 16-bit word.
* **Control and link write:** every card enables DBF0 and DBF1, so all cards
  see the low byte. The control register is duplicated on every card.
* **Link read:** only the card that holds the one selected link drives the
  low byte.

## Deciding who may read: the PREV/NEXT chain and the shared lines

A read must come from exactly one link, but no card sees the whole mask. The
cards are chained instead (`kims_node`):

* `prev` into card *i* says "some link is selected on cards 0..i-1". Card 0's
  `prev` is tied inactive.
* `next_n` out of card *i* is low when a link is selected on card *i* or
  below.
* A card finds a read illegal (`tmpillrd_n` low) when it has two selected
  links itself, or has one while `prev` is set.

Three open-collector lines are shared by all cards and are modelled as a
wired AND:

* `ILLRD`: a read is illegal now, either because of more than one selection
  or because a selected incoming FIFO is empty.
* `ILLWR`: a selected outgoing FIFO is full.
* `DAV`: a selected link has data.

Card 0 turns these lines into the CE's outputs:

* `DRQ3 = DMA & (DIR ? !ILLRD : !ILLWR)`. The request drops when the FIFO
  runs empty or full and comes back when it can move data again, so the DMA
  controller can be programmed once for a whole message of any length.
* `WARN` (IRQ10) is set by a link access made while the matching illegal
  line is active, and stays set until the next general-register access.
* `DAV` (IRQ11) is the `DAV` line itself, gated by its enable bit.

Note the exact rule for link reads, taken from the card's equations: each
card suppresses its own read when it sees a conflict. If two links are
selected on **different** cards, the lowest such card still performs the
read, while `ILLRD` flags the error through WARN and blocks DMA. Only with
both links on the same card is the read fully suppressed.

## Links and cables

The FIFO for a direction sits on the sending card. One side of a cable
(`link_wire_t`) carries:

* the head byte of the sender's FIFO;
* that FIFO's empty flag;
* a read request into the other side's FIFO.

A link write pushes `cd` into the FIFO of every selected link; a full FIFO
ignores the push, and WARN reports it. A link read asserts the read request
towards the selected remote FIFO and puts the incoming byte on `cd` in the
same cycle.

## Timing model

The original card is asynchronous bus logic. This model uses one clock
(`clk`), and every bus cycle (I/O read, I/O write or DMA cycle) lasts exactly
one clock:

* Strobes (`iord_n`, `iowr_n`) and address are held for that clock.
* Decoding, bus steering, status and read data are combinational within the
  cycle.
* Registers, FIFO pointers and the WARN flag change at the clock edge that
  ends the cycle.
* A strobe held low for k clocks acts as k accesses.
* Both CEs of `kims_system` share the clock.

One consequence: flags are sampled before the FIFO changes, so the last valid
read of a FIFO (or write into it) does not raise WARN. On the asynchronous
card, the flag changed while the access was still in progress and raised a
false WARN.

## Modules

| file | what it is |
|------|------------|
| `kims_pkg.sv` | base address, register offsets, `ctrl_t`, `link_wire_t` |
| `kims_addr_decode.sv` | address decoder: `gen_n` (BASE..BASE+5), `link_n` (BASE+6/7 or DACK3) |
| `kims_data_bus_if.sv` | DBF0..3 enables, bus steering, mask nibble multiplexer |
| `kims_gen_regs.sv` | register strobes, CNTRL and MASK latches, status buffers, FIFO reset |
| `kims_link_fifo.sv` | 2048 x 8 first-word-fall-through FIFO with active-low flags |
| `kims_link_if.sv` | four links: read/write strobes, FIFOs, cable signals |
| `kims_dma_int_ctrl.sv` | chain logic, local illegal/new-data detection, DRQ, WARN, DAV |
| `kims_card.sv` | one card (card number from `sw`) |
| `kims_node.sv` | up to four cards of one CE, shared lines, bus merge (`NUM_CARDS`) |
| `kims_system.sv` | top: two CEs joined on link 0; links 1..15 and both host buses as ports |

Parameters: `BASE` (default `16'h0140`), `NUM_CARDS` (4) and `DEPTH` (2048).
The defaults are the original configuration. A full `kims_system` contains
32 FIFOs, 512 Kbit of storage in all.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. It
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl rtl/kims_pkg.sv \
    tb/tb_kims_system.sv --top-module tb_kims_system
./obj_dir/Vtb_kims_system
```

* `tb_kims_system` runs the full-size system end to end. CE 1 sends a
  partial sum by polling. CE 0 multicasts to link 0 and an external link.
  The testbench then fills a FIFO and drains it empty by interrupt-driven
  transfer, with WARN flagging the full write and the empty read. A
  5000-byte DMA transfer stalls on both a full and an empty FIFO. The DAV
  interrupt and the reset register are also exercised. A back-to-back DMA
  burst must fill an empty FIFO in exactly 2048 bus cycles, one byte per
  cycle with no wait state. The testbench counts
  each of these mechanisms and fails if one never happened.
* `tb_kims_matmul` runs the two-CE matrix multiplication workload. CE 1
  computes half of C = A·B and ships its N·N bytes to CE 0 by DMA
  (N = 10, 50, 100) or by polling (N = 10), and the testbench checks the
  assembled product. For N of 50 and above, the block is bigger than one
  FIFO.
* The unit testbenches compare against reference models written from the
  register and routing rules above. Some of them shrink `DEPTH` so that full
  FIFOs are reached quickly.

Concurrent assertions check the bus rules: at most one incoming link on
`cd`, never two sources on `cd`, no two cards driving the same data nibble,
and no FIFO overfill.

## Where this RTL departs from, or fills gaps in, the original card

* **Control select:** the control-register select that steers the low
  processor byte onto `cd` is active only without a read strobe. The
  control register (write) and the fifo-empty register (read) share offset
  +2. Without this qualification, every card would drive the low byte during
  a fifo-empty read.
* **Reset:** CNTRL and MASK are cleared by the bus reset. The original
  latches had no clear; the reset register clears only the FIFOs.
* **General-register range:** general registers answer at BASE..BASE+5 and
  the link register at BASE+6/+7. Address bit A0 is not decoded.
* **WARN flag:** WARN is a flip-flop that sets at the end of the offending
  cycle. The original PAL latch asserted during the cycle.
* **Tri-state outputs:** the tri-state DRQ and IRQ outputs are plain
  outputs that read low when disabled. Tri-state and open-collector buses
  are split into directed signals and merged with OR/AND.
* **FIFO:** the FIFO is a synchronous stand-in for the asynchronous
  2048 x 9 part; the ninth bit is not used.
* **Not covered:**
  * the 8-bit PC/XT variant (at most two cards, no IRQ10/11);
  * the proposed ALE-sampled WARN correction;
  * the host computers, their DMA and interrupt controllers, and the C
    message-passing library (`rfork`, `bread`, `dwrite`, ...), which the
    testbenches emulate at bus level.
* **Rates:** the throughputs reported for the real machine (about 60 KB/s
  polled, 110 KB/s interrupt-driven, 1 MB/s DMA on a 16 MHz 80386SX) are
  set by host software and bus timing. This model does not reproduce them.
