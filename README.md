# Virtual Socket platform with a Virtual Memory Extension

A reference program written in C is a sequential program that works on one flat
memory. To move one of its functions into hardware, you would normally also
have to work out which data that hardware needs, copy the data to the FPGA
board's memory, and copy the results back. This platform removes that work.
An HDL module plugged into the platform issues **virtual addresses of the host
program's own memory space**. The platform translates them into addresses of a
small card-local memory. A page the module touches that is not yet on the card
causes an interrupt; the host software copies the page in, and the module's
transfer carries on by itself. The hardware function can therefore replace the C
function one for one. It always sees the same data as the software, and
because every transfer passes through one place, transfers can be counted
(profiled) before anyone designs a dedicated memory architecture for the module.

This RTL implements the card side of that system, as described for the
Virtual Socket platform (a PC plus a PCMCIA FPGA card) and its Virtual
Memory Extension:

- 32 sockets for HDL modules, each with 16 parameter registers, a start pulse
  and a done report;
- the socket protocol: request/acknowledge, transfer parameters, data, and
  release/acknowledge;
- the Virtual Memory Controller (VMC) and the Window Memory Unit (WMU, a TLB);
- a local memory of 32 pages of 2 kB;
- an interrupt controller and a transfer profiler;
- a plain register bus for the host.

The host software (the page-fault service and the `Start_module()` call), the
PC, the PCMCIA bus interface and the user modules are not hardware of this
design. The end-to-end testbench models them.

## Block structure

```
vs_platform                    top: host register bus, MODE register, read-back
 ├─ vs_module_ctrl             32 x 16 parameter registers, start pulses, done bits
 ├─ vs_socket_ctrl             socket protocol, routes the owner to the VMC
 │   └─ vs_rr_arbiter          round-robin choice among requesting modules
 ├─ vs_vmc                     walks a transfer word by word, translates, accesses memory
 ├─ vs_wmu                     32-entry TLB, miss latch, dirty bits
 ├─ vs_local_memory            16384 x 32-bit dual-port RAM (port A host, port B modules)
 ├─ vs_irq_ctrl                interrupt sources: WMU miss, module done
 └─ vs_profiler                seven transfer counters and a 64-record request trace
vs_pkg                         sizes, socket structs sock_req_t / sock_rsp_t, prof_ev_t
```

Only one module uses the memory path at a time. The socket controller grants
whole *sessions*, and the VMC serves the owner of the current session.

## The socket protocol

Each socket is a pair of structs. `sock_req_t` is driven by the module and
`sock_rsp_t` by the platform. A session has the seven steps of the original
protocol. Read and write sessions differ only in the data phase.

| step | who | signals | convention |
|---|---|---|---|
| 1 | module | `rd_req` or `wr_req` | level, held until `req_ack` |
| 2 | platform | `req_ack` | one-cycle pulse; the socket now belongs to this module |
| 3 | module | `mem_rd` (read session) or `mem_wr` (write session), with `id`, `addr` (byte address), `count` (words) | one-cycle strobe, at the earliest the cycle after `req_ack` |
| 4–5 read | platform | `in_valid` + `rd_data` | one pulse per word, in address order |
| 4–5 write | module / platform | `out_valid` + `wr_data` from the module, `wr_ack` from the platform | the word is taken in a cycle where both `out_valid` and `wr_ack` are high |
| 6 | module | `rel_req` | level, held until `rel_ack` |
| 7 | platform | `rel_ack` | one-cycle pulse, given only after the last word has gone through |

Steps 3 to 5 may repeat within one session. A read session forwards only
`mem_rd` strobes and a write session only `mem_wr`; the other kind is flagged
by an assertion. `start` (from the host) and `done` (a one-cycle pulse from the
module when its task is over) are outside the sessions.

Timing, with all pages present: the first read word arrives two cycles after
the `mem_rd` strobe, and after that one word arrives every cycle. Writes go
at one word per cycle. When a page is missing, the data phase pauses, for as
long as the host needs to bring the page in. The module does nothing special.
It waits for `in_valid` or `wr_ack` as usual.

In the original description the acknowledge of step 2 already implies that the
data are in local memory. Here the address only arrives in step 3, after that
acknowledge. So in this design `req_ack` only grants the socket, and the
waiting for pages happens inside the data phase. A module sees the same
sequence of events either way.

The original description also uses the name "output valid" for two different
write signals: the module's step-3 request, and the platform's step-4 signal
for each word it has written. This design keeps the two apart:

- `mem_wr` starts a write transfer;
- `out_valid` marks each write word that the module offers;
- `wr_ack` is the platform's answer for each word it has written.

## Address translation and page faults

Addresses are 32-bit byte addresses, and data moves as aligned 32-bit words. A
2 kB page gives an 11-bit offset and a 21-bit virtual page number (VPN).

**WMU.** The TLB has one entry per local page: 32 entries, fully associative.
Entry *i* maps its VPN to local page *i*. The lookup is combinational. Each
entry has a valid bit and a dirty bit. The WMU sets the dirty bit when a module
writes through the entry. When a lookup misses, the WMU does three things:

- it latches the VPN in `miss_vpn`;
- it sets `miss_pending`;
- it raises interrupt source 0.

The miss is reported only once. Any host write to a TLB entry clears
`miss_pending`. If the page is still missing after that, the next lookup
reports it again.

**VMC.** The VMC walks a transfer one word at a time and translates every word.
So a transfer may cross any number of page boundaries, and pages can be
fetched in the middle of a transfer. On a miss the VMC holds its place and
retries every cycle until the lookup hits.

**Explicit mode.** Set MODE bit 0 to 0 to turn translation off. The address of a
module is then a byte address into the 64 kB local memory and wraps around at
its end. This mode is the original Virtual Socket without virtual memory: the
host copies data in and out itself.

**What the host software must do on a miss interrupt** (the testbench does
exactly this):

1. Read `MISS` to get the VPN. Write 1 to bit 0 of `IRQ_STATUS` to clear the interrupt.
2. Choose a victim page *p*. Read TLB entry *p*. If it is valid and dirty,
   copy the page's 512 words from local memory back to the host at
   `{vpn, offset}`.
3. Copy the 512 words of the wanted page into local page *p*.
4. Write TLB entry *p* = `{valid=1, vpn}`. The stalled transfer resumes on the next cycle.

When the call ends, the host writes back every valid dirty page. Which page to
replace is up to the host software. The hardware keeps no usage order.

## Host register map

The host bus is word-addressed and synchronous:

- a write is `host_cs` and `host_we` high for one cycle;
- a read is `host_cs` alone, and the data is on `host_rdata` with `host_rvalid` one cycle later.

| `host_addr` | register |
|---|---|
| `1xxx xxxx xxxx xxxx` | local memory word `x` (page = x[13:9], word in page = x[8:0]) |
| `01.. ..mm mmmp ppp` | parameter `p` of module `m` |
| `0x0000` | MODE: bit 0 virtual mode (reset 1), bit 1 profiler enable (reset 0) |
| `0x0001` | START: write a module number to pulse its `start` |
| `0x0002` | DONE: one bit per module; write ones to clear |
| `0x0003` | IRQ_STATUS: bit 0 WMU miss, bit 1 module done; write ones to clear |
| `0x0004` | IRQ_ENABLE |
| `0x0005` | MISS: bit 31 miss pending, bits 20:0 faulting VPN |
| `0x0006` | PROF_CLR: any write zeroes the counters and empties the trace |
| `0x0007` | STATUS: bit 31 a session is open, low bits owning module |
| `0x0008`–`0x000E` | profiler: read transfers, write transfers, words read, words written, misses, stall cycles, trace records lost |
| `0x0010` | TRACE_LEVEL: records waiting in the trace |
| `0x0011` | TRACE_ADDR: first address of the oldest trace record |
| `0x0012` | TRACE_INFO: `{valid[31], write[30], id[20:16], count[15:0]}` of the oldest record; reading it removes the record (read TRACE_ADDR first) |
| `0x0040`–`0x005F` | TLB entry *p*: write `{valid[31], vpn[20:0]}`; read `{valid[31], dirty[30], vpn}`. A write clears the dirty bit and the pending miss |

Interrupt source 1 stays set while any DONE bit is set. To end a call, clear
DONE first, then clear IRQ_STATUS bit 1. `host_irq` is a level: it is high
while an enabled status bit is set.

A typical call mirrors the C sequence `Platform_Init(); VMW_Init();` →
parameters → `Start_module()` → `VMW_Stop(); Platform_Stop();`:

1. Write MODE and IRQ_ENABLE.
2. Write the module's parameters.
3. Write the module's number to START.
4. Serve interrupts until its DONE bit is set.
5. Write back the dirty pages.

## Profiling

`vs_profiler` works only while MODE bit 1 is set. It counts:

- read transfers and write transfers (strobes with a nonzero count);
- words read and words written;
- WMU misses, which equal the number of pages the host had to fetch;
- cycles that a transfer spent waiting for a page;
- trace records lost.

The counters are 32 bits wide and stop at their maximum value.

The profiler also keeps a trace. Every transfer request goes into a 64-entry
FIFO as one record: its direction, module id, word count and first address.
The host reads the records out. When the FIFO is full, new records are dropped
and counted, so a host that wants the full access pattern must drain the trace
while the module runs.

Counters and trace show how a module uses memory while it still runs against
the host's virtual memory.
This information is the input for designing the module's own local memory or
cache later. That later memory is application-specific, and this design does
not include it.

## What follows the original description and what is this design's choice

Taken from the original description:

- 32 HDL module sockets;
- 16 parameters per module;
- a local memory of 32 pages of 2 kB;
- the split of the Virtual Memory Extension into a VMC, which takes address,
  count and strobe from the module, and a TLB-based WMU that interrupts the
  host on an unknown address;
- the virtual and explicit modes;
- the seven protocol steps;
- profiling of the transfers.

Chosen here, because the description does not give them:

- all widths: 32-bit data, parameters and virtual addresses; 16-bit word counts;
- the TLB organisation (one fully associative entry per page), the dirty bits
  and the miss-retry scheme;
- the exact signalling of the socket protocol (levels, pulses, the one-cycle
  gaps) and round-robin sharing between modules;
- the start/done mechanism and the interrupt sources;
- the host bus and its register map. The real card talks to the PC over its
  PCMCIA interface, which is not modelled;
- the set of profiler counters, and the trace format and depth;
- a synchronous dual-port local memory (with one cycle of read latency) and the
  asynchronous active-low reset `rst_n`.

The original WMU was taken from earlier work. Only its function is known, so
`vs_wmu` is a functional equivalent, not a copy of its internals.

## Simulation

Each testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. A watchdog stops any run that hangs. Example
with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/vs_pkg.sv tb/tb_vs_platform.sv \
          --top-module tb_vs_platform -o sim && obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_vs_platform` | Whole platform at default size. Sockets 0, 5 and 7 hold behavioural user modules (`tb_vs_user_module`: read P2 words at P0, add P3, write them to P1). Module 0 streams 10240 words in and out, 40 pages against 32 local pages, so pages are evicted and written back. Module 5 competes for the socket with a vector that crosses a page boundary. Module 7 then runs in explicit mode. All results, the profiler counts and the first 64 trace records are compared with the reference. About 47 000 cycles for the virtual-mode call, about 12 s in total. |
| `tb_vs_vmc` | VMC with a WMU and memory: explicit reads at one word per cycle; virtual reads and writes that cross pages and miss; dirty bits |
| `tb_vs_wmu` | misses, single interrupt, fill, hits on all 32 entries, dirty bits, invalidation |
| `tb_vs_socket_ctrl` | four modules at once, round-robin order, responses only to the owner, release only after the last word |
| `tb_vs_local_memory`, `tb_vs_module_ctrl`, `tb_vs_irq_ctrl`, `tb_vs_profiler` | the individual blocks |

All of these pass. The RTL passes Verilator's lint and the slang front end
without errors. The remaining lint notes are about unused struct fields and
package constants.

## Limits

- Only one session is open at a time. Modules wait for the socket, even when
  another module is only waiting for a page fault.
- A transfer stalled on a missing page holds the socket until the host serves
  the miss, so the host software must serve misses for the call to finish.
- Changing MODE while a transfer is running is not guarded.
- Addresses are word-aligned: the two low address bits are ignored, and there
  are no byte enables.
