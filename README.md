# Multi-level packet buffer for gigabit switching

A gigabit switch or router that inspects packets has to store them, and
where it stores them decides its throughput. Small on-chip RAMs are fast and
dual-ported but too small for whole traffic bursts; an external SRAM is large
but is a single shared resource, so a controller that keeps everything there
can move only one packet at a time, either in or out.

This design splits the storage into levels so that most traffic never
contends for the external memory:

```
 MAC rx (8 bit) ─► receive buffer ─┐                       ┌─► send buffer ─► MAC tx (8 bit)
      one per port, block RAM      │      scheduler        │   one per port, block RAM
                                   ├─► receiving ctrl ─┐   │
                                   │                   │   │
                      header buffer (first 128 bytes of every packet, dual port)
                      ZBT SRAM (bytes 129 and up, shared through a lock)
                                   │                   │   │
                                   │   function module ◄───┤ (decides the export ports)
                                   └──────────────── sending ctrl
```

* Each port has a **receive buffer** and a **send buffer** in block RAM that
  hold whole packets, widening the MAC's 8-bit bytes to 32-bit words.
* A central **scheduler** moves packets from receive buffers to send
  buffers. It has a receiving controller and a sending controller that work
  at the same time.
* The first 128 bytes of each packet, which is all a filtering or routing
  function looks at, go into an on-chip **header buffer**. It is dual-ported,
  so one controller can write a header while the other reads one.
* Only the part of a packet beyond 128 bytes goes to the external **ZBT
  SRAM**. The two controllers take turns on it through a lock. When the
  sending side holds the lock, the receiving side keeps working on packets
  short enough to need no SRAM.
* A **function module** (here an address-learning router) looks at each
  stored header and returns the set of export ports.

Everything runs in one 125 MHz clock domain: an 8-bit MAC at 125 MHz is one
gigabit per second. Reset is synchronous and active high.

## How a packet moves

1. The MAC delivers bytes on `mac_rx_valid/data/last`. The receive buffer
   packs them into words and commits the packet when the last byte arrives
   (`rx_commit`). It drops the packet instead (`rx_drop`) if it does not fit,
   or is longer than 1518 or shorter than 14 bytes.
2. The receiving controller picks a receive buffer (rules below), takes a free
   header slot and copies the packet at one word per clock. Words 0–31 go to
   the header slot; words 32 and up go to the slot's region of the SRAM. On
   the way it keeps the destination and source MAC addresses.
3. It hands {slot, arrival port, length, addresses} to the function module.
   The module returns {slot, port mask, length}, and that answer is queued
   for the sending controller.
4. For each port in the mask, lowest first, the sending controller waits
   until that send buffer has room for the whole packet. It then copies the
   words from the header slot and, beyond 128 bytes, from the SRAM. After the
   last copy it frees the header slot. An empty mask (a filtered packet)
   frees the slot at once.
5. The send buffer unpacks words into bytes for the MAC
   (`mac_tx_valid/data/last`, with `mac_tx_ready` as back-pressure).

## Buffer word format

Receive buffers, send buffers and the header buffer share one layout. A
packet is one descriptor word followed by `ceil(len/4)` data words:

| word | contents |
|------|----------|
| descriptor | bits 15:0 = length in bytes, bits 31:16 = 0 (receive and send buffers only) |
| data k | bytes 4k … 4k+3, first byte in bits 7:0 |

The unused bytes of a packet's last word are wasted, rather than packing the
next packet into them. That costs at most three bytes per packet and keeps
every packet word-aligned for the 32-bit side:

* a 65-byte packet takes 1 + 17 = 18 words, so 69 of 72 bytes are used
  (95.8 %);
* averaged over lengths 64–67, the use is 97.9 %.

Real traffic wastes less.

## Receiving controller: which buffer, and what to do when the SRAM is taken

`rx_priority_arbiter` chooses among the receive buffers that have a packet
waiting:

1. A **full** buffer comes first. Full means it has less room than one
   maximum-length packet plus its descriptor, so the next packet would be
   dropped. If several are full they are served round-robin.
2. Otherwise the buffer with the **least free space** is chosen. Buffers
   whose free space is within `TOL` words (32 words, one header) of the least
   count as equal and are served round-robin.

The round-robin pointer starts after the last port served.

`rx_ctrl` then works in three states:

* **IDLE.** The arbiter picks a packet, and a header slot must be free.
  * A packet of at most 128 bytes starts at once, since it lives entirely in
    the header buffer.
  * A longer packet raises the SRAM lock request in the same clock. If the
    lock is granted it starts.
  * If the lock is refused, the controller asks the arbiter again, this time
    only among buffers whose head packet is small. If there is one, it takes
    it (a **bypass**). If not, it waits and retries every clock.
  * Event outputs: `ev_rx_big`, `ev_rx_bypass`, `ev_rx_lock_wait`,
    `ev_rx_full_pick`.
* **COPY.** It pops one word per clock. The words come back a clock later and
  are written to the header slot or the SRAM. A packet of W words takes
  W + 3 clocks from the decision to the next IDLE. The SRAM lock is held
  until the last word is written.
* **DONE.** It offers the request to the function module (valid/ready) and
  returns to IDLE.

The SRAM region of slot *s* is fixed: word *k* ≥ 32 of the packet is at
`s * ZBT_SLOT_WORDS + (k − 32)`. With 512 words per slot, the longest frame
fits (380 words, 348 of them beyond the header).

## Sending controller and the SRAM lock

`tx_ctrl` takes the queued answers in order. For each export port it:

1. Waits in `T_WAIT` until the port's send buffer has room for the
   descriptor plus all data words (`ev_tx_space_wait`).
2. For a packet longer than 128 bytes, requests the SRAM lock, but only once
   there is room. A full send buffer therefore never keeps the receiving side
   out of the SRAM. Waiting for the lock shows as `ev_tx_lock_wait`.
3. Issues one read per clock:
   * header words from the header buffer, which returns them one clock later;
   * tail words from the SRAM, which returns them `ZBT_LAT + 2` = 4 clocks
     later.

   Because the SRAM reads follow the header reads and take longer, the words
   arrive in order and go straight into the send buffer.

The lock (`zbt_controller`) works as follows:

* `gnt` is combinational from `req` and the registered owner.
* A free lock goes to the sending side when both ask.
* The owner keeps the lock as long as it holds `req`.
* The lock becomes free one clock after the owner drops `req`.
* Only the owner's commands reach the pins.

Favouring the sending side frees header slots and buffer space sooner. The
bypass described above keeps the receiving side busy meanwhile.

A packet with several export ports (a flood) is copied to the ports one after
another. The header slot stays busy until the last copy is done.

The sending side has no bypass of its own: it keeps packets in the order the
function module answered. A long packet at the head of its queue waits while
the receiving side holds the lock. That wait is at most one packet, because
the receiving side releases the lock after every packet.

## ZBT SRAM interface

The top brings out a single-data-rate pipelined ZBT (no-bus-turnaround)
SRAM bus:

* `zbt_cs_n`, `zbt_we_n`, `zbt_addr`;
* the bidirectional data bus as `zbt_dq_o`, `zbt_dq_oe` and `zbt_dq_i`, to
  be joined at the pad.

Timing:

* A command is on the pins for one clock.
* Write data is driven to be sampled `ZBT_LAT` (2) edges after the address.
* Read data is captured `ZBT_LAT` edges after the address.
* Reads and writes can follow each other on every clock with no idle cycles.

The default is 18 address bits (256 K × 32 bits, 1 MB).

## Function module: address route

`address_route` is a small learning bridge:

* **Table.** 16 entries, searched in parallel.
* **Learning.** The source address of every packet is entered or refreshed
  with its arrival port. Entries are replaced round-robin when the table is
  full. Group source addresses are ignored.
* **Result.**
  * A known destination on another port goes to that port only.
  * A destination on the arrival port is filtered: the mask is empty.
  * An unknown, multicast or broadcast destination goes to every port except
    the arrival port.

It answers one clock after accepting a request. Any other function with the
same request/answer handshake can replace it, for example a filter or a
state inspector. A packet then costs its time only once, because the
scheduler hands over just the header fields.

## Top level and parameters

`gbuf_top` instantiates one `rx_buffer` and one `tx_buffer` per port, plus
`header_buffer`, `zbt_controller`, `address_route` and `scheduler`. The
scheduler contains `rx_ctrl`, `tx_ctrl`, the slot allocator and a
`sync_fifo` for the answers.

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | ports |
| `BUF_WORDS` | 1024 | words in each receive and each send buffer (4 KB); the two are kept equal |
| `SLOTS` | 64 | header buffer slots (packets between receive and send) |
| `ZBT_AW` | 18 | SRAM word address width |
| `ZBT_SLOT_WORDS` | 512 | SRAM words reserved per slot |
| `ZBT_LAT` | 2 | SRAM pipeline latency |
| `ROUTE_ENTRIES` | 16 | learned addresses |
| `TOL` | 32 | "almost equal" free space in the receive priority rule, in words |

Shared constants are in `gbuf_pkg`: 32-bit words, 16-bit lengths, 128-byte
headers, and a frame length limit of 14–1518 bytes.

Besides the data ports, the top has these outputs for observation:

* per-port `rx_commit` and `rx_drop` pulses;
* the scheduler's event pulses: `ev_rx_big`, `ev_rx_bypass`,
  `ev_rx_lock_wait`, `ev_rx_full_pick`, `ev_tx_sent`, `ev_tx_space_wait`,
  `ev_tx_lock_wait`, `ev_tx_filtered` and `ev_slots_empty`;
* `ev_route_hit` from the router.

At the defaults, synthesis infers about 330 Kbit of RAM. That is a fifth of
the block RAM of a mid-size FPGA of the Virtex-II generation.

## Throughput

At full load with minimum-size (64-byte) packets, each port delivers one
packet every 84 clocks: 64 bytes plus preamble and inter-frame gap. Per
packet:

* the receiving controller needs 19 clocks;
* the sending controller needs about 21.

Four ports therefore use nearly the whole budget on the sending side.
In simulation at the defaults, four ports each sent 200 back-to-back 64-byte
packets: 16,800 clocks of offered traffic. Everything was delivered within
17,155 clocks with no drops.

Long packets hit a different limit: the external SRAM. Every byte beyond
the header is written to the SRAM once and read back once, through one
32-bit port. That port carries 4 Gb/s at 125 MHz.

Four ports sending maximum-size frames back to back produce 8 Gb/s of SRAM
traffic:

* each 1518-byte frame has a 348-word tail, which costs 696 SRAM clocks;
* each port offers one such frame every 1538 clocks.

So only about 55 % of such a load can pass, and the receive buffers drop the
rest whole. In simulation at the defaults, 54 of 96 back-to-back maximum-size
frames were delivered, with the SRAM busy 87 % of the time. Mixed traffic
with a realistic share of short packets does not reach this limit. A
sustained all-long-frame load would need a 64-bit SRAM or two SRAMs.

With more ports, or a 156.25 MHz ten-gigabit datapath, the structure needs
a wider internal word, wider SRAM and a faster scheduler. The send side and
the SRAM would be the first limits.

## Limits and departures

* **MAC interface.** The MAC side is a plain byte stream (valid/data/last,
  one byte per clock) with no bus protocol. The receive side has no
  back-pressure, so a packet that does not fit is dropped. The 32-bit bus
  between the buffers and the rest is point-to-point word ports, not a
  shared WISHBONE bus.
* **Not included.** The MAC, the PHY and a PCI host interface are outside
  the design. Only one function module, address routing, is implemented.
  The state-inspection and rule-matching modules that such a platform would
  also carry are not, since their function is not defined here.
* **Own choices.** These are choices of this implementation:
  * the descriptor format and the drop rules;
  * the meaning of "full" and the tolerance for "almost equal" free space;
  * the slot count, fixed SRAM regions and SRAM size;
  * the learning-bridge behaviour of the router;
  * copying flooded packets port by port.
* **Timing.** Timing closure at 125 MHz has not been checked on a real
  device.
* **SRAM model.** `tb/zbt_sram_model.sv` is a behavioural model of the SRAM
  for simulation only. It checks that write data arrives on time.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`; a watchdog
stops it if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_rx_buffer` | byte packing, word counts (18 words for 65 bytes, 17 for 64), drops on overflow, too long, too short |
| `tb_tx_buffer` | unpacking, full rate without bubbles, random MAC stalls |
| `tb_header_buffer` | simultaneous write and read on both ports |
| `tb_zbt_controller` | lock rules, 4-clock read latency, back-to-back mixed accesses, bus timing against the SRAM model |
| `tb_rx_priority_arbiter` | full-first, least-free-space, tolerance and polling against a reference model |
| `tb_rx_ctrl` | selection, header/SRAM split, bypass while the SRAM is locked, addresses handed over |
| `tb_tx_ctrl` | port order, word order from both sources, waits for room and lock, slot release, filtering |
| `tb_address_route` | learning, filtering, flooding, replacement, one-clock answer |
| `tb_scheduler` | real buffers, SRAM and model function module with random delays; slots run out, lock contention, full load |
| `tb_gbuf_top` | whole design at default parameters: learning, mixed lengths with stalls, full load with 64-byte packets, full load with maximum-size frames (SRAM-bound), a jammed port, bad frames; byte-exact delivery and per-port order; every event must occur |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/gbuf_pkg.sv tb/tb_gbuf_top.sv \
          --top-module tb_gbuf_top -Mdir obj_gbuf_top
./obj_gbuf_top/Vtb_gbuf_top +verilator+rand+reset+2 +verilator+seed+1
```

Replace `gbuf_top` with another block's name to run its testbench. The
end-to-end test runs in under a second.
