# Multi-ported memories from two-ported FPGA block RAM

FPGA block RAMs offer at most two ports, yet register files, shared buffers and
multi-issue datapaths often want several writes and several reads in the same
clock cycle. This RTL builds a 32-word by 8-bit memory with more ports in five
ways, each trading storage, logic, clock rate and how freely the ports may
share data:

| organisation | ports | storage (default) | ports see each other's data? |
|---|---|---|---|
| replication (`rep_mem`) | 1 write, 4 read | 4 copies x 32 x 8 | yes, but only one writer |
| banking (`bank_mem`) | 4 private write/read pairs | 4 banks x 8 x 8 | no, each port owns a quarter |
| multipumping (`mpump_mem`) | 4 write, 4 read | 1 x 32 x 8 | yes, at a quarter of the clock rate |
| live value table (`lvt_mem`) | 4 write, 4 read | 4 banks x 4 copies x 32 x 8, plus a 32 x 2-bit table | yes, at full rate |
| XOR (`xor_mem`) | 2 write, 1 read | 2 banks x 2 copies x 32 x 8 | yes, at full rate, no table or output mux |

The live value table (LVT) and XOR memories are the true multi-ported designs:
every port works in every cycle and any port can read what any other wrote.
The other three are the conventional baselines. All five sit side by side in
`mpmem_top`, sharing only `clk` and `rst`.

## The common building block

`bram_sdp` models one simple dual-port block RAM: one write port, one read port,
registered read data (one cycle latency), contents zero after configuration.
A parameter selects what a read returns when it hits the address being written
in the same cycle: the old word (`WRITE_FIRST = 0`, read-first) or the new one
(`WRITE_FIRST = 1`, write-first). Every other module is built only from this
primitive, multiplexers and registers, so it maps onto real block RAM.

## Replication and banking

`rep_mem` gives each read port its own full copy of the memory and wires the one
write port to every copy. All copies stay identical, so every read port can read
any address. Storage grows with the number of read ports, and there can be only
one write port.

`bank_mem` divides the 32 words into four 8-word banks, one per port. Port *k*
writes and reads bank *k* only, with a 3-bit address local to that bank. This
gives four writes and four reads per cycle with no extra storage, but a port can
never read what another port wrote: it is four small memories, not one memory.

## Multipumping

`mpump_mem` keeps a single 32 x 8 memory and serves the four ports one after
another, running four internal cycles for each external cycle. Its `clk` is the
internal clock; a phase counter (cleared by `rst`) decides which port is
served. In phase 0 `accept` is high and all port inputs are sampled on that
rising edge:

- port 1 (index 0) goes to the memory directly in phase 0;
- ports 2 to 4 are held in registers and applied in phases 1 to 3 through the
  input multiplexer;
- the word read in phase *p* returns one cycle later and a demultiplexer puts it
  in port *p*'s holding register;
- when port 4's word arrives, all four results are loaded into `rdata` at once
  and `rvalid` pulses.

So `rvalid` rises four rising edges after the sampling edge, and a new request
can be taken every four cycles. Because port *p* is served in phase *p*, a port's
read sees the writes of lower-numbered ports from the same request but not its
own; on equal write addresses the highest port is written last and wins. The
cost of this design is its clock: the memory must run four times faster than
the ports.

## Live value table memory

`lvt_mem` gives every write port its own bank, and each bank is a replicated
memory (`rep_mem`) with one copy per read port. A write goes only to its
port's bank, so four writes never compete for a block RAM port. The difficulty
is on the read side: the newest word of an address may be in any bank. The live
value table (`lvt_table`) solves this. It has one 2-bit entry per address,
holding the number of the bank that wrote the address last. It is small enough
to build from flip-flops, so it can itself have four write and four read ports.

```
 write port k ──► bank k (4 copies) ──┐
              └─► LVT[addr] := k       ├─► 4:1 mux per read port ──► rdata[r]
 read port r  ──► all banks, LVT ─────┘        (select = LVT[raddr[r]])
```

Read port *r* reads its address in all four banks and in the table on the same
edge. One cycle later the table's output selects the live bank's word. Table
and bank reads have the same one-cycle latency, so the select and the data line
up without extra registers.

Timing: a write is visible to reads issued from the next cycle on; a read in
the same cycle as a write to that address returns the previous word. If several
ports write one address in one cycle, the table records the highest-numbered
port, so its word is the one kept.

## XOR memory

`xor_mem` reaches the same result with no table and no output multiplexer.
Write port *k* owns bank *k*. Instead of the plain data, bank *k* stores the data
XORed with what every other bank holds at that address:

```
write d via port k:  bank_k[a] := d ^ (XOR over j != k of bank_j[a])
read:                rdata     := XOR over all k of bank_k[a]  =  d
```

All the other banks' terms appear twice in the read and cancel, leaving the last
word written. For the default two-write, one-read memory, with banks A (port 0)
and B (port 1): if port 1 writes 81h to address 01h (B[01] = 81h, since A[01] is 0)
and port 0 then writes 09h there, A[01] becomes 09h ^ 81h = 88h, and a read
returns 88h ^ 81h = 09h.

Each bank must be read at the other ports' write addresses as well as at the
read addresses, so every bank consists of identical copies sharing one write
port: one copy per other write port, plus one per read port (A and A', B and B'
in the two-port case). The module is parameterised for any `NW` writes and `NR`
reads.

Because block RAM reads are registered, a write takes two cycles. In the
request cycle the other banks are read at the write address. On the next edge
the encoded word is written. This creates a hazard: port *j* may write an
address in the cycle right after port *k* wrote it, and port *j* needs bank *k*'s
new word. The copies are therefore write-first: the word committed on an edge
is what every read sampled on that edge returns. The same property makes a
write visible to reads issued from the cycle after the request, the same timing
as the LVT memory. Two ports writing one address in the same cycle would
corrupt the encoding, so only the highest-numbered port's write is performed.
`rst` cancels a pending write and blocks bank writes while high, because the
pipeline register would otherwise start with a random write.

## Interfaces and timing summary

All memories are synchronous to the rising edge of `clk`. Multi-port buses are
packed arrays indexed by port, e.g. `waddr[p]`. Address width is `$clog2(DEPTH)`;
for `bank_mem` it is `$clog2(DEPTH/NB)`.

| module | write → visible to reads | read latency | notes |
|---|---|---|---|
| `rep_mem`, `bank_mem` | next cycle | 1 cycle | read-first on a same-cycle collision |
| `lvt_mem` | next cycle | 1 cycle | highest write port wins a collision |
| `xor_mem` | next cycle | 1 cycle | write completes one cycle after the request; highest port wins |
| `mpump_mem` | ports ordered inside one request | 4 edges after sampling, `rvalid` | one request per 4 cycles, `accept` |

Defaults (`mpmem_pkg`): `MEM_DEPTH = 32`, `MEM_WIDTH = 8`, `MEM_PORTS = 4`,
`XOR_NW = 2`, `XOR_NR = 1`. All are module parameters and can be changed;
`bank_mem` needs `DEPTH` to be a multiple of `NB`.

## Source of the design and own choices

The five organisations, their sizes (32 x 8 words, four ports, four 8 x 8 banks,
a 2W/1R XOR memory) and their structure (replicated copies, private banks, the
input multiplexer, holding registers and output demultiplexer of the pumped
memory, banks plus table plus output multiplexers for the LVT, banks with
copies and XOR on write and read) follow published descriptions of these
techniques, and the XOR worked example above is checked by the testbench.

The following are this design's own choices, where the description gives no
detail:

- one-cycle registered reads everywhere, and zero contents at start-up;
- read-first behaviour of plain banks; write-first copies in the XOR memory;
- the highest-numbered port wins same-address writes in the LVT, XOR and
  multipumped memories;
- the multipumped memory's single-clock phase scheme, its port order, and its
  output register that presents all four results together;
- the LVT built from flip-flops with registered reads;
- the two-cycle XOR write and the `rst` input of `xor_mem` and `mpump_mem`;
- bank-local addresses for `bank_mem`;
- the generalisation of the XOR memory to `NW` writes and `NR` reads.

Nothing here has been placed and routed, so there are no clock-rate or area
figures. The synthesizable RTL infers memories as arrays; the memory bit counts
(1024 for replication, 256 for banking and multipumping, 4096 + 64 for the LVT
memory, 1024 for the XOR memory) follow directly from the structure.

## Verification

Every module has a self-checking testbench in `tb/` that compares the outputs
each cycle with a reference model of an ideal memory. Each ends with a
`TB_RESULT checks=N failures=M` line, and a watchdog stops it if it hangs.

- `bram_sdp_tb`: both collision modes, random traffic.
- `rep_mem_tb`, `bank_mem_tb`: zero start, fill and read-back, random traffic.
  Four ports write one local address with different data to show the banks are
  independent.
- `lvt_table_tb`, `lvt_mem_tb`: random traffic over a small address range, so
  same-cycle collisions and reads right after writes are frequent. Every bank
  must be selected by the table.
- `mpump_mem_tb`: a request on every `accept`, junk on the inputs in between.
  Checks the results, the latency (4 edges) and the accept spacing (4 cycles).
- `xor_mem_tb`: the 09h/81h example, including the bank contents (88h in
  bank A). Then random traffic on a 2W/1R and a 3W/2R instance, counting
  back-to-back cross-port writes, same-cycle collisions and reads right after
  a write.
- `mpmem_top_tb`: all five memories at the default sizes for 4000 cycles. It
  counts each mechanism above, and a mechanism that never occurs is a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mpmem_pkg.sv tb/mpmem_top_tb.sv \
          --top-module mpmem_top_tb -Mdir obj_top
./obj_top/Vmpmem_top_tb
```

Replace `mpmem_top_tb` by any other testbench name. All testbenches run in well
under a second.
