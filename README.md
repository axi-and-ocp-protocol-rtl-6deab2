# AXI-to-OCP bridge

A processor-side subsystem that speaks AMBA 3 AXI has to reach a peripheral
core that speaks OCP (Open Core Protocol), and the two sides run on clocks that
have nothing to do with each other. This bridge sits between them: it is an
AXI *slave* towards the AXI master and an OCP *master* towards the OCP slave.
In between, an asynchronous FIFO carries every transfer from the AXI clock
domain into the OCP clock domain, and a second one carries read data back.

```
            ACLK domain          |            Clk (OCP) domain
                                 |
 AXI   AW,W,B,AR,R  +-----------+ |  request FIFO  +------------+  MCmd, MAddr, MData
master <----------> | axi_slave |-+--------------->| ocp_master | ------------------->  OCP
                    |           |<+----------------|            | <-------------------  slave
                    +-----------+ |  reply FIFO    +------------+  SCmdAccept, SDataAccept,
                                 |                                 SResp, SData
```

The AXI slave and the OCP master never see each other's protocol. They talk
only through a small local interface to the FIFOs: push/full on one side,
pop/empty with the head word visible on the other. Either protocol port can be
replaced without touching the other one, which is the point of the split.

## How a transfer moves

Every AXI data beat becomes one single-word OCP transfer.

**Write burst.** `axi_slave` takes the write address (AWID, AWADDR, AWLEN,
AWSIZE, AWBURST), then takes one beat per cycle on W while the request FIFO
has room. For each beat it pushes a request `{is_read=0, address, data}`. It
works out the beat address itself from the burst start address with the AXI
rules for FIXED, INCR and WRAP bursts. After WLAST it answers on B with the
burst's ID. In the OCP domain, `ocp_master` pops each request and drives
`MCmd=Write` with MAddr and MData until the slave raises SCmdAccept. It keeps
MData on the bus until SDataAccept, which may come in the same cycle or later.

**Read burst.** `axi_slave` takes the read address and pushes one
`{is_read=1, address}` request per beat. `ocp_master` drives `MCmd=Read` until
SCmdAccept, then waits for SResp. The response may arrive in the accept cycle
or any number of cycles later. It pushes `{SData, response}` into the reply
FIFO. `axi_slave` presents the reply FIFO's head on R, with RLAST on beat
ARLEN+1.

Writes are **posted**: BRESP is returned as soon as the last beat is in the
request FIFO, not when the OCP slave has accepted it. Read and write requests
share one FIFO and the AXI port serves one transaction at a time, so OCP
transfers happen in the order the AXI master issued them. A read that follows
a write therefore always sees that write's data.

## The clock-domain crossing (async_fifo)

This is the part that needs the most care. The FIFO is split into the parts
below:

| module      | clock domain       | job |
|-------------|--------------------|-----|
| `fifo_mem`  | write: wclk; read: combinational | dual-port RAM, 2^ADDR_W words |
| `fifo_ptr`  | one instance per domain | binary + Gray pointer, registered full (write side) or empty (read side) flag |
| `fifo_cmp`  | inside each `fifo_ptr` | compares a Gray pointer with the other side's synchronized one |
| `ptr_sync`  | destination domain | two flip-flops, nothing else; used once per direction |
| `async_fifo`| both               | instantiates and connects the above |

Pointers are ADDR_W+1 bits wide, one bit more than the RAM address, so a full
FIFO (writer one lap ahead) can be told from an empty one (pointers equal).
Each pointer is kept as a binary count, whose low bits address the RAM, and as
its Gray code `b ^ (b >> 1)`. Only the Gray code crosses the boundary. Gray
code changes one bit per step, so a synchronizer that samples it mid-change
sees either the old or the new value, never a mix. With the default 5 address
bits, the first four writes move the write pointer through binary 1, 2, 3, 4,
which is Gray 01, 03, 02, 06.

- **empty** (read domain): the next read pointer equals the synchronized
  write pointer.
- **full** (write domain): the next write pointer has its two top bits
  inverted against the synchronized read pointer and all other bits equal.

Both flags are registered and computed from the *next* pointer. So they are
valid in the same cycle as the pointer, and the FIFO never over- or
under-runs. The synchronized pointer lags, so both flags are pessimistic. A
word written into an empty FIFO becomes readable 2 to 3 read-clock edges
later. A freed slot takes as long to show on the write side. Nothing here
assumes a relation between the two clocks. Each domain has its own
asynchronous active-low reset, and the two must be asserted together.

The read port is first-word fall-through: `rdata` shows the oldest word
whenever `rempty` is low, and `rinc` removes it.

## AXI port details (axi_slave)

- AXI3 signal widths: 4-bit AxLEN (1 to 16 beats), 3-bit AxSIZE, 2-bit AxBURST
  and AxLOCK, 4-bit AxCACHE, and `ID_W`-bit IDs (default 4). Data and address
  are 32 bits.
- AWREADY and ARREADY are high only while the port is idle. If both address
  channels are valid, the write goes first.
- Byte strobes: the OCP interface used here has no byte enables, so a partial
  word cannot be written. A beat with all four strobes set is forwarded. A beat
  with no strobe set is dropped silently. A beat with some strobes set is
  dropped, and the burst ends with BRESP = SLVERR.
- A WLAST that does not fall on beat AWLEN+1 also gives SLVERR. The burst still
  ends at WLAST.
- The reserved burst type is treated as INCR. Lock and cache attributes are
  accepted and ignored.
- Assertions check that B and R hold steady while valid and not ready, and
  that the request FIFO is never written while full.

## OCP port details (ocp_master)

- MCmd codes: 0 Idle, 1 Write, 2 Read. The other OCP commands (ReadExclusive,
  ReadLinked, WriteNonPost, WriteConditional, Broadcast) are in the package's
  enum but are never issued.
- All signals change and are sampled on the rising edge of `Clk`. One transfer
  is outstanding at a time. A transfer takes at least two `Clk` cycles: one to
  load the request from the FIFO, one to present the command. So an OCP slave
  that accepts everything at once sees one transfer every two cycles.
- SResp DVA becomes AXI OKAY. FAIL and ERR become SLVERR.
- A read is started only when the reply FIFO has room. The basic OCP interface
  cannot hold off a response, so this keeps a response from being lost.
- `MReset_n` passes the OCP-domain reset to the slave. The OCP clock is an
  input, shared with the slave.
- An assertion checks that a command stays unchanged until it is accepted.

## Parameters

| where | parameter | default | meaning |
|-------|-----------|---------|---------|
| `axi_ocp_bridge` | `ID_W` | 4 | AXI ID width |
| `axi_ocp_bridge` | `FIFO_ADDR_W` | 5 | log2 of the depth of both FIFOs (32 entries) |
| `async_fifo`, `fifo_mem` | `DATA_W`, `ADDR_W` | 32, 5 | word width, log2 depth when used alone |
| `bridge_pkg` | `ADDR_W`, `DATA_W` | 32, 32 | bus widths on both sides |

In the bridge, a request FIFO word is 65 bits (read flag, address, data) and a
reply word is 34 bits (data, AXI response). With 32 entries, a whole 16-beat
burst fits in the request FIFO.

## What follows the source design and what is added

The source design gives the three-part structure (AXI slave, FIFO, OCP master,
joined by a local interface). It gives the AXI write-channel signal list, the
OCP signal list, and the FIFO's split into memory, pointers, two synchronizers
and a comparator. Its FIFO examples use 32-bit words, 32 entries and 6-bit
pointers, stepping through the binary and Gray values quoted above. Its OCP
example shows a 3-bit MCmd taking the values 1, 2 and 0, and a 2-bit SResp of
1 with returned read data. Those values agree with the standard OCP codes used
here (Write, Read, Idle and DVA). The following choices are this design's own:

- **The reply FIFO and the read path.** The source's bridge diagram shows only
  the forward direction, but it lists the AXI read channels and the OCP SData
  and SResp signals, and shows an OCP read. Read data comes back through a
  second `async_fifo` instance.
- **Two independent clocks.** One sentence of the source describes the bridge
  as running on a synchronized clock. Its FIFO is explicitly asynchronous, and
  its diagram names separate AXI and OCP clocks. The asynchronous reading is
  the one built.
- **Only one AXI transaction at a time.** There is no interleaving of several
  outstanding transactions and no out-of-order completion. AXI allows both,
  and the source mentions them as AXI features, but the bridge does not use
  them.
- **Posted writes, the strobe rule, the SLVERR cases, and the meaning of
  SDataAccept.** The signal list has no separate write-data-valid, so MData is
  treated as valid from the command until SDataAccept.
- **Widths.** Two-stage synchronizers, AXI3 widths and 4-bit IDs.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it shows |
|-----------|---------------|
| `tb_fifo_mem` | every address written and read back; no write without `wen` |
| `tb_ptr_sync` | output equals the input of two edges before |
| `tb_fifo_cmp` | all 32x32 pointer pairs (4 address bits) against counts |
| `tb_fifo_ptr` | both pointer kinds against a count model, with full and empty reached |
| `tb_async_fifo` | 10 ns / 13 ns clocks: latency of one word, exactly 32 words to full, drain order, 3000 cycles of random traffic |
| `tb_fifo_pointer_walk` | four words through the FIFO: pointers step 1,2,3,4 and Gray 1,3,2,6 |
| `tb_axi_slave` | FIXED/INCR/WRAP addresses, one beat per cycle, strobes, early WLAST, read replies, write priority |
| `tb_ocp_master` | 16 writes in 32 cycles with a ready slave; 300 random reads and writes against a stalling slave; error mapping; reads held while the reply FIFO is full |
| `tb_bridge_write_read` | the whole bridge: four-beat write, then a read of 0x5555_1111; the OCP command sequence is checked |
| `tb_axi_ocp_bridge` | the whole bridge at default parameters. AXI at 10 ns, OCP at 13 ns. 80 random bursts, request FIFO driven full by a slave that refuses commands, error reads, partial strobe, final memory compare, then 40 more bursts with the OCP clock at 5 ns (faster than the AXI clock). It also counts that every mechanism happened: FIFO full, command stall, data stall, same-cycle and late responses, OCP error, each burst type |

`tb/ocp_slave_model.sv` is a behavioural OCP slave: a memory with random
accept delays and response latency. Its addresses `0xF???_????` answer ERR.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/bridge_pkg.sv tb/tb_axi_ocp_bridge.sv --top-module tb_axi_ocp_bridge -o sim
./obj_dir/sim
```

Swap in any other testbench name. Every testbench finishes in a few seconds.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/bridge_pkg.sv rtl/<module>.sv`.
The only lint warnings left are SYNCASYNCNET: the reset is used asynchronously
by the flip-flops and synchronously by the assertions' `disable iff`. There
are also unused-parameter notes from the shared package.

## Limits to keep in mind

- There are no byte enables towards OCP. Sub-word writes are refused with
  SLVERR, not merged.
- Narrow AXI beats (AxSIZE below 2) with all strobes set are forwarded as
  whole 32-bit words at byte addresses. A strict AXI master will not produce
  them.
- Throughput is at most one OCP transfer per two `Clk` cycles. A read burst
  also pays for the FIFO crossing in both directions.
- The two resets must overlap. There is no reset synchronizer inside the
  bridge.
