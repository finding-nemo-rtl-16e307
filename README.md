# NEMO: programmable memory telemetry inside the memory controller

An operating system that manages tiered or shared memory needs to know which
pages are hot, which tenant uses how much bandwidth, or which base pages of a
huge page are touched. Page-table access bits are expensive to scan and
hardware sampling is imprecise. NEMO moves that bookkeeping into the memory
controller: every request header the controller sees is also handed, off the
data path, to a small set of **telemetry pipelines**. Each pipeline runs one
rule the OS has installed:

1. **match**: is this request of interest, and which counter does its
   physical address belong to?
2. **update**: apply a one-cycle operator (`+ - >> << ^`) to that 64-bit
   counter, with a constant or the request's data as operand;
3. **notify**: compare the new value with a threshold (`== >= > < <=`) and
   raise an interrupt if the predicate holds.

The counters live in on-chip SRAM. The OS reads them with ordinary 64-byte
loads from a reserved address window, the **telemetry region**. A read can
also reset or decay the counters it returns. Only associative and commutative
operators are allowed. So each channel, and each controller, can keep its own
partial counters, and software adds them up in any order.

The engine never stalls or delays a memory request. Each pipeline accepts one
request per memory channel per clock.

This repository holds synthesizable SystemVerilog for the engine of one memory
controller (`rtl/`) and a self-checking testbench for every module (`tb/`).

## Top level: `nemo_top`

| Parameter    | Default | Meaning |
|--------------|---------|---------|
| `ADDR_W`     | 35      | Device address width. The controller advertises 32 GiB for 16 GiB of DRAM. |
| `NUM_CH`     | 2       | Memory channels. A request's channel is cache-line address bit 0, i.e. address bit 6. |
| `NUM_PIPES`  | 8       | Telemetry pipelines. |
| `TT_ENTRIES` | 8192    | Translation-table entries per channel per pipeline. |
| `NUM_STATES` | 8192    | 64-bit counters per channel per pipeline. |
| `TAG_W`      | 8       | Tag carried from a telemetry load to its response. |

At the defaults, each pipeline holds per channel:

- a 8192 × 14-bit translation table (one valid bit and a 13-bit base index);
- a 1024 × 512-bit state SRAM.

Across 8 pipelines and 2 channels that is about 10.2 Mbit of SRAM.

Ports (each per channel unless noted):

- `req_valid`, `req_write`, `req_addr`, `req_data` (low 64 bits), `req_tag`: the request header tap. One header per channel per cycle.
- `dram_valid`: the request goes on to DRAM. It is low for requests to the telemetry region.
- `rsp_valid`, `rsp_tag`, `rsp_data[511:0]`: the answer to a load from the telemetry region.
- `mmio_req`, `mmio_we`, `mmio_addr[15:0]`, `mmio_wdata`, `mmio_rvalid`, `mmio_rdata` (shared): configuration. `mmio_addr[15:7]` selects the pipeline and `[6:3]` the register.
- `irq[NUM_PIPES]` (shared): one interrupt line per pipeline, so software knows which telemetry fired.
- `ready` (shared): the clear sweep after reset has finished. Monitored requests are counted only from then on, 8192 cycles after reset at the defaults.

Inside the top:

- one `nemo_req_tap` per channel sorts the traffic;
- every pipeline receives every ordinary request of every channel;
- a registered multiplexer picks the responding pipeline's line for each channel.

A system with several memory controllers instantiates one `nemo_top` per
controller.

## The telemetry region

The upper half of the advertised address range (address bit 34 set) is not
backed by DRAM. Requests there are handled as follows.

**Loads** return 512 bits: eight consecutive 64-bit counters. The byte offset
inside the region is laid out like this:

```
cache line  cl   = offset >> 6
pipeline    p    = cl / (NUM_CH * NUM_STATES/8)       (128 KiB per pipeline)
channel     c    = cl % NUM_CH                        (same interleave as DRAM)
state line  n    = (cl / NUM_CH) % (NUM_STATES/8)
counters         = channel c's states 8n .. 8n+7, state 8n+k in bits [64k+63:64k]
```

A load arrives on the channel its address selects, which is also the channel
whose counters it names. The response comes 5 cycles after the load. Some
loads name no counter:

- the address names a pipeline at or above `NUM_PIPES`;
- the load arrives on a channel other than the one its cache line belongs to.

Such a load still gets a response at the same latency, with all-zero data.

**Stores** to the region are dropped.

Each channel keeps its own counters for the requests it carries. A state
index therefore has `NUM_CH` partial counts, one per channel. Software reads
all of them and combines them with the rule's operator, for example by adding
counts.

## A pipeline's rule: the match stage

`nemo_key_extract` works on the request header. In order:

- **Filter:** the pipeline must be enabled. It must also be tracking the
  request's type (reads, writes or both).
- **Range prefilter:** the request passes only if `range_lo <= addr < range_hi`.
- **Key:** `key = ((addr - key_sub) & pri_mask) >> pri_shift`. The mask and
  shift choose a power-of-two *primary region*, for example a 2 MiB huge page
  or a tenant's 4 GiB slice. The subtraction lets a region start at a base
  that is not aligned. With `key_sub = 0` the key is a plain mask-and-shift.
- **Offset:** `offset = (addr & sec_mask) >> sec_shift` picks a *sub-region*
  inside the primary region, for example the 4 KiB base page within a 2 MiB
  page. With `sec_mask = 0` every sub-region shares one counter.

A key that does not fit in 13 bits is dropped. So is an offset that does not
fit in the state array.

`nemo_xlat_table` then looks the key up, and `nemo_match_map` finishes the
match:

- an invalid entry drops the request (its region is not tracked);
- otherwise `idx = base + offset`;
- a sum beyond the last counter drops the request.

The table indirection is what makes the engine flexible:

- **many-to-one:** many regions can share one counter, for example all pages
  of a tenant;
- **one-to-one:** a region can get its own counter;
- **one-to-many:** a region can get a block of `2^k` counters, one per
  sub-region;
- **dynamic:** the OS can add or remove regions at run time with one MMIO
  write each.

Worked example:

- Address `0x448A615B80` is split with a 20-bit key mask at bit 20, giving key `0x448A6`.
- An 8-bit offset at bit 12 gives offset `0x15`.
- The table maps `0x448A6` to base `0x10`.
- The request therefore updates counter `0x25`.

The key-extraction testbench runs this example with a 20-bit key. The
channel testbench runs it too, with a small table: `key_sub = 0x4480000000`
brings the key down to `0xA6`.

## Update, forwarding and the read side effect

The state SRAM has one cycle of read latency and one of write latency, and a
request arrives every cycle. So the line read for request *i* can be stale:
request *i-1* may be writing the same line in that very cycle.

`nemo_update_unit` keeps the last line it wrote, together with that line's
address. When the next op addresses the same line, it uses the kept copy in
place of the SRAM data. This forwarding is enough because the SRAM is
read-first and the write happens one cycle after the read. A run of updates
to one counter therefore counts every request, with no stall.

Operands and operators:

- The operand is the configured constant, or, if `CTRL.opd_data` is set, a
  field of the request. `OPD_FIELD` chooses the source word (the address, or
  the low 64 bits of the data), a right shift and a width. A width of 0 keeps
  all 64 bits. The field is cut in S1, so it travels down the pipeline in
  place of the data.
- `+` and `-` wrap modulo 2^64.
- `>>` and `<<` use the operand's low 6 bits as the shift amount.

A telemetry load uses the same port and the same cycle slot. It:

- returns the line as it was before the load;
- writes the line back with the **read side effect** applied to all eight
  counters;
- can be forwarded to, and forwarded from, exactly like an update.

The read side effect is any update operator, or `SET`, which resets the
counters to a configured value. A typical use is "halve on read" for decaying
hotness, or "reset to 0" for per-interval bandwidth.

## Notify

`nemo_trigger` compares every new state value with `ntf_operand` using the
configured predicate. CMP_NONE switches the check off. When the predicate
holds, the channel's sticky bit in `IRQ` is set. The pipeline's `irq` line is
the OR of its channels' bits. Software clears a bit by writing 1 to it.

Each channel compares its own counter, so a threshold applies to one
channel's share of the traffic. With addresses interleaved finely across
channels the shares are close, so an interrupt is a hint. Software should
re-read the merged counters before acting on it.

## Pipeline timing

Every channel slice (`nemo_channel`) is a four-stage pipeline with initiation
interval 1:

| Cycle after input | Stage | Work |
|---|---|---|
| 1 | S1 | filter, range check, key and offset; translation-table read issued |
| 2 | S2 | drop on miss, `idx = base + offset`; state line read issued |
| 3 | S3 | update or telemetry read, forwarding, write back |
| 4 | S4 | predicate; response registered |

For a load that enters `nemo_top` in cycle 0:

- `rsp_valid` is high in cycle 5, because the top adds one register for the
  pipeline multiplexer;
- for an update whose new value meets the predicate, the channel raises its
  notify pulse in cycle 5;
- the sticky bit in `IRQ`, and with it the pipeline's `irq` line, is set
  from cycle 6.

## MMIO registers

Each pipeline has a 128-byte window at `mmio_addr = pipe * 128`. All registers
are 64 bits wide. A read returns data 2 cycles after the request, at the top
level. A read from a pipeline that does not exist returns 0.

| Byte offset | Name | Contents |
|---|---|---|
| 0x00 | CTRL | [0] enable, [1] track reads, [2] track writes, [3] operand from the request field chosen by OPD_FIELD |
| 0x08 | RANGE_LO | inclusive lower address bound |
| 0x10 | RANGE_HI | exclusive upper bound (reset: all ones) |
| 0x18 | KEY_SUB | subtracted before the primary mask |
| 0x20 | PRI_MASK | primary mask |
| 0x28 | PRI_SHIFT | [5:0] |
| 0x30 | SEC_MASK | secondary (offset) mask |
| 0x38 | SEC_SHIFT | [5:0] |
| 0x40 | OPS | [2:0] update op, [10:8] predicate, [18:16] read side effect |
| 0x48 | UPD_OPERAND | update constant |
| 0x50 | NTF_OPERAND | threshold |
| 0x58 | RD_OPERAND | operand of the read side effect |
| 0x60 | TT_WRITE | write only: [63:32] key, [16] valid, [15:0] base. Writes all channels' tables at once. Valid = 0 removes the entry. |
| 0x68 | IRQ | per-channel sticky interrupt bits, write 1 to clear |
| 0x70 | STATUS | [0] tables cleared after reset |
| 0x78 | OPD_FIELD | operand field: [0] from address (else data), [13:8] right shift, [21:16] width (0 = 64) |

Encodings (`nemo_pkg`):

- Update operators: NOP=0, ADD=1, SUB=2, SHR=3, SHL=4, XOR=5, SET=6.
- Predicates: NONE=0, EQ=1, GE=2, GT=3, LT=4, LE=5.

After reset a pipeline is disabled, its range covers everything, all
operators are NOP, and the operand field is the whole data word.

A register write takes effect from the next cycle. Change a rule only while
no requests for that pipeline are in flight. Otherwise requests already in the
pipeline see a mix of the old and new rule.

## Files

| File | Module |
|---|---|
| `rtl/nemo_pkg.sv` | operator encodings, rule record `cfg_t`, register map, `apply_op` / `compare` |
| `rtl/nemo_top.sv` | engine of one memory controller |
| `rtl/nemo_req_tap.sv` | per-channel split of DRAM traffic from telemetry loads, region decode |
| `rtl/nemo_pipeline.sv` | one telemetry pipeline: registers and one slice per channel |
| `rtl/nemo_pipe_csr.sv` | MMIO registers, table-write pulse, sticky interrupts |
| `rtl/nemo_channel.sv` | per-channel match-update-notify slice |
| `rtl/nemo_key_extract.sv` | filter, range prefilter, key and offset |
| `rtl/nemo_xlat_table.sv` | translation table |
| `rtl/nemo_match_map.sv` | drop on miss, base + offset |
| `rtl/nemo_update_unit.sv` | read-modify-write with forwarding, telemetry read and side effect |
| `rtl/nemo_trigger.sv` | notify predicate |
| `rtl/nemo_sdp_ram.sv` | simple dual-port SRAM with clear sweep (tables and counters) |

`tb/tb_<module>.sv` tests each module. `tb/nemo_tb_pkg.sv` holds the
reference models they share. Each testbench:

- compares against a model written separately from the RTL;
- checks latencies in cycles;
- has a watchdog;
- prints `TB_RESULT checks=N failures=M` at the end.

`tb_nemo_top` runs the full-size engine with all default parameters. It:

- installs eight different rules;
- streams random traffic on both channels, including back-to-back hits to one
  counter;
- reads the telemetry region while the traffic runs;
- checks every response, every interrupt and all counters against a model.

The rules it installs:

- hot huge-page counting;
- per-4 KiB-page counting inside tracked huge pages;
- per-tenant access counting with a cap interrupt;
- others covering every operator and predicate, with operands from the data
  and from an address field.

It also counts how often each mechanism occurred and fails if any never did:

- updates;
- forwarded updates;
- filtered, out-of-range and unmapped requests;
- interrupts;
- telemetry reads with a side effect;
- null reads and dropped region stores;
- removed table entries.

It runs about 34,000 cycles, which takes well under a minute with Verilator.

`tb_nemo_workloads` runs the three operating-system use cases at full size,
with both channels busy every cycle:

- **Hot-set tracking.** Every 2 MiB huge page of 16 GiB gets its own counter,
  so the translation table is full with 8192 entries. A skewed access pattern
  is run, and the hot set moves half-way through.
- **Huge-page split candidates.** Seven more pipelines each count 16 huge
  pages at 4 KiB granularity. Between intervals they are re-pointed to the
  next 112 huge pages.
- **Per-tenant bandwidth.** All huge pages are mapped onto two tenant
  counters, with an interrupt at a cap. The interrupt must rise exactly
  6 cycles after the access that reaches the cap.

After every interval each counter is read back and compared with a model.

To simulate with plain Verilator, for example the top:

```
verilator --binary --timing -Wall -Wno-fatal --top-module tb_nemo_top \
    rtl/nemo_pkg.sv tb/nemo_tb_pkg.sv rtl/*.sv tb/tb_nemo_top.sv
./obj_dir/Vtb_nemo_top
```

Other testbenches work the same way with their own top module. The unit
testbenches of the channel and the pipeline override the sizes to 256 entries
and 256 counters, to keep runs short.

## Departures and open points

- **Key derivation** is subtract, then mask, then shift. This covers both a
  plain mask-and-shift key and a "subtract and shift" key.
- **Notifications** are implemented in hardware as interrupts.
- **Telemetry reads are fully pipelined**: one per channel per cycle, taking
  the same slot as a monitored request. Ordinary traffic does not compete for
  that slot, because a telemetry load replaces a DRAM request on its channel.
- **SRAM banks have fixed owners.** Each channel of each pipeline owns a fixed
  8192-counter array and its own copy of the translation table. There is no
  run-time assignment of SRAM banks to channels or pipelines. A rule that
  needs more counters must be split across pipelines.
- **The operand field** is a slice of the address or of the low 64 bits of the
  data beat. Other request fields are not tapped.
- **Chained pipelines** (for example count-min sketches with a hash in the
  match stage) are not built.
- **Chosen by this design, not fixed by the architecture:**
  - the register map and encodings;
  - the layout of the telemetry region;
  - zero data for loads that name no counter;
  - the tag width;
  - the clear sweep after reset and the `ready` signal;
  - the exclusive upper range bound;
  - dropping on overflow of the key, offset or index.
- **Untested:** whether the design meets timing at 400 MHz, the clock of the
  FPGA prototype. The 64-bit range compare and the subtraction in S1 are the
  likely long paths, along with the 512-bit forwarding multiplexer in S3.
