# Real-time analyzer for the ETMv4 data trace stream

An ARM CoreSight ETMv4 trace unit can report every data access a processor
makes, but it splits each access in two. The *address* travels in a P1
element. The *value* travels in a P2 element, often several packets later.
Many packets also leave out information that the receiver has to rebuild
from state it keeps across packets. Software decoders do this offline, and
only for a few seconds of trace.

This RTL does the pairing in hardware, at stream rate. It sits behind an
ETMv4 trace decoder that delivers up to two decoded packets per clock. For
every P2 element it outputs the pair (data transfer address, data transfer
value), up to two pairs per clock, together with the latest trace timestamp.
It never stalls.

The architecture follows a published design for an ETMv4 data trace
analyzer: a P1 packet analyzer, a P2 packet analyzer, a global parameter
updater, a timestamp analyzer, and a P1/P2 combiner built around two
key-indexed look-up tables. That design does not give the bit-level ETMv4
packet encodings (they are ARM's), so this RTL uses a simplified format
table of its own. See "What is the design's own" below before using it on
real trace.

## How P1 and P2 elements find each other

Every element carries keys:

* A **P1 element** (an address) has a *left-hand key* and a *right-hand key*.
  The left-hand key ties it to the instruction that made the access. All
  P1 elements of one multi-word access share the same left-hand key, and
  each has an *index* (0, 1, 2, ...) within that run.
* A **P2 element** (a value) has only a left-hand key. This key equals the
  right-hand key of its P1 element.

Keys are small counters. They wrap at `p1_left_key_max` and
`p1_right_key_max`, two limits that each ETMv4 implementation chooses.

The combiner keeps two tables:

| table | indexed by        | holds                               | size               |
|-------|-------------------|-------------------------------------|--------------------|
| LUT0  | P1 left-hand key  | latest address given for that key   | `P1_LEFT_KEY_MAX`  |
| LUT1  | P1 right-hand key | `{p1_index, p1_left_key}`           | `P1_RIGHT_KEY_MAX` |

When a P1 element arrives, LUT1 is written at its right-hand key. If the
element carries an address, LUT0 is also written at its left-hand key.

When a P2 element with key `k` arrives, the combiner does a two-step walk:

1. Read `LUT1[k]` to get `{index, left_key}`.
2. Read `LUT0[left_key]` to get the base address.

The output address is `base + index * ACCESS_BYTES`. For example, a P1
format 1 packet gives address `0xFF300FE4` with left key `0x10`. A following
P1 format 5 packet adds two more elements, with indexes 1 and 2 and no
address of their own. The P2 elements that match those indexes come out as
`0xFF300FE8` and `0xFF300FEC`.

## Pipeline and timing

```
pkt_i[0..1] -+-> p1_packet_analyzer --+
             +-> p2_packet_analyzer --+--> global_param_updater ==elems==> p1_p2_combiner --> pair_o[0..1]
             +---------------------------------^                           (LUT0, LUT1)      timestamp_o
             +-> timestamp_analyzer ------------- timestamp, enable --------------^          en_o
```

* **Clock 0.** The packets arrive. The two packet analyzers are purely
  combinational and extract what each packet itself says.
* **Clock 1.** The global parameter updater has registered the elements of
  clock 0. The timestamp analyzer has registered the new timestamp. The
  combiner reads both tables combinationally and writes them at the clock
  edge.
* **Clock 2.** The pairs are on `pair_o`, with `en_o = {timestamp enabled,
  pair 1 valid, pair 0 valid}`.

The latency is exactly two clocks. The throughput is two packets every
clock. There is no ready signal.

## The global parameter updater

This is the hardest part of the design. It owns the state that all packets
share:

* `address_regs[0:2]`, the three most recent addresses, newest first
* `p1_left_key`
* `p1_right_key`
* `p2_left_key`
* `p1_index`

A **trace info** packet sets all of these to zero, and also clears the
timestamp. Packets that arrive before the first trace info packet are
ignored.

The updater handles the two lanes in stream order. It numbers the resulting
elements into five P1 slots and two P2 slots per clock:

* **P1 elements.** The first element of a packet may get a new left-hand
  key. Depending on the format, that key is explicit in the packet, the
  previous key + 1, or unchanged. If the packet brings a new address or key,
  the first element restarts the index at 0. Every element takes the running
  right-hand key and index, and both then advance by one.
* **Addresses.** An address in the payload replaces the low bytes of
  `address_regs[0]` and is pushed onto the address history. Formats that
  carry no address bytes read one of the three registers instead.
* **P2 elements.** A P2 packet of format 5 or 6 first adds up to four P1
  elements, exactly as a P1 format 5 packet would. Then it adds one P2
  element (format 5) or two (format 6). Each P2 element takes the running
  P2 left-hand key, or the explicit key for format 2, which then advances
  by one.
* **Key wrap.** Left-hand keys wrap at `P1_LEFT_KEY_MAX`. Right-hand keys
  and P2 keys wrap at `P1_RIGHT_KEY_MAX`.

The updater also produces a 7-bit `p1_p2_status`:
`{case[1:0], p1_cnt[2:0], p2_cnt[1:0]}`. The case field is one of:

* none
* a single packet
* two packets, the first a P1: (P1,P1) or (P1,P2)
* two packets, the first a P2: (P2,P1) or (P2,P2)

A decoder delivers two packets in one clock only when both have no payload.
Assertions check three rules that follow from this:

* a clock never holds more than five P1 elements
* a clock never holds more than two P2 elements
* P2 formats 5 and 6 always arrive alone

### Same-clock ordering in the combiner

The tables are written at the clock edge. A P2 element can still depend on
a P1 element from the same clock, for example in a (P1,P2) pair, or in a
P2 format 5 packet with inferred P1 elements. So both table lookups forward
from the P1 slots of the current clock, and the newest matching slot wins.

The exception is a clock whose status says that the P2 packet came first.
Its P2 elements must see the tables as they were before that clock, so
there is no forwarding.

When several table writes hit the same entry in one clock, the newest
element wins. This matches processing the packets one by one.

## Interface

The decoded-packet type `etm_pkg::dec_pkt_t`, one per lane:

| field     | width | meaning                                                     |
|-----------|-------|-------------------------------------------------------------|
| `valid`   | 1     | lane holds a packet                                         |
| `kind`    | 3     | `PK_ASYNC`, `PK_TRACE_INFO`, `PK_TIMESTAMP`, `PK_P1`, `PK_P2`, `PK_OTHER` |
| `fmt`     | 3     | format 1..7 (P1) or 1..6 (P2)                               |
| `header`  | 8     | raw header byte                                             |
| `plen`    | 5     | payload length in bytes, 0..16                              |
| `payload` | 128   | payload byte *k* in bits `[8k+7:8k]`                        |

Each output pair (`etm_pkg::pair_t`) holds:

* a 32-bit address
* a 64-bit value
* the P1 left-hand key and the P1 index it came from

### Top-level parameters (`etm_data_trace_analyzer`)

| parameter          | default | meaning                                                   |
|--------------------|---------|-----------------------------------------------------------|
| `P1_LEFT_KEY_MAX`  | 32      | LUT0 entries and left-key wrap (power of two, ≤ 256)      |
| `P1_RIGHT_KEY_MAX` | 32      | LUT1 entries and right-key wrap (power of two, ≤ 256)     |
| `ACCESS_BYTES`     | 4       | address step between consecutive P1 indexes               |

### Fixed widths (`etm_pkg`)

These widths follow the published block diagram:

* keys and indexes: 8 bits
* address registers, data values and timestamp: 64 bits
* output addresses: 32 bits
* element slots per clock: five P1, two P2

## What is the design's own

These parts follow the published architecture:

* the block structure
* the two-table pairing scheme
* the global parameters and their reset on trace info
* the special cases (P1 format 5, P2 formats 5 and 6, zero-payload pairs in
  one clock)
* the field widths
* the two worked traces, which the RTL reproduces exactly

These parts are choices of this RTL:

* **Packet encodings.** Each format is described by a small property table
  in `etm_pkg` (`p1_fmt_props`, `p2_fmt_props`):

  | format | P1                                       | P2                                             |
  |--------|------------------------------------------|------------------------------------------------|
  | 1      | explicit key (payload byte 0) + address bytes | data from payload                         |
  | 2      | key + 1, address register `header[1:0]`  | explicit key (byte 0) + data                   |
  | 3      | key + 1, address bytes                   | no payload, data 0                             |
  | 4      | same key, address bytes                  | data from payload                              |
  | 5      | same key, `header[1:0]+1` elements, no address | `header[2:0]` (≤ 4) inferred P1 + one value |
  | 6      | key + 1, address register, `header[1:0]+1` elements | same as 5, but two values (bytes 0..7, 8..15) |
  | 7      | explicit key, address register           | —                                              |

  Real ETMv4 packets have different bit layouts. P1 format 1 also has
  sixteen modes, and they are not modelled. To analyze real trace, replace
  the two packet analyzers and the property functions. The updater and the
  combiner only see the extracted fields.
* **Key and index update rules.** These are described above.
* **`ACCESS_BYTES = 4`.** It is read from the example addresses.
* **The meaning of the status and enable bits.**
* **The timestamp rule.** The payload bytes of a timestamp packet replace
  the low-order bytes of the held value.
* **Register-based tables** with combinational reads. The published
  analyzer uses no block RAM.
* **One address write per P1 slot.** The published block diagram shows a
  single address input to LUT0.
* **Extra outputs.** The P1 key and index on each output pair are extra.

### Known limits

* A P2 element whose key was never written still produces a pair, from the
  reset contents of the tables (zero).
* Trace info does not clear the tables.
* The indexes are 8 bits wide and wrap.

## Files

`rtl/`:

* `etm_pkg.sv`: types, widths and format tables
* `etm_data_trace_analyzer.sv`: the top
* `p1_packet_analyzer.sv`, `p2_packet_analyzer.sv`: per-lane field extraction
* `global_param_updater.sv`: global parameters, element numbering, `p1_p2_status`
* `timestamp_analyzer.sv`: latest timestamp
* `p1_p2_combiner.sv`: LUT0/LUT1 walk and output registers
* `key_lut.sv`: multi-port key-indexed table, used for LUT0 and LUT1

`tb/`:

* `etm_ref_pkg.sv`: a packet-at-a-time software reference model, packet
  builders and a synthetic trace generator
* `tb_etm_data_trace_analyzer.sv`: end-to-end test at the default
  parameters. It runs 20,000 clocks of a random trace. The trace is cut
  into sections that each start with A-Sync and trace info, and holds
  single variable-payload packets, zero-payload pairs and idle clocks. The
  test compares every output with the model, two clocks later. It also
  counts each mechanism and fails if one never happened: every format, all
  four pair combinations, four-element P1 format 5, inferred P1 elements,
  same-clock forwarding, key wrap, dropped pre-sync packets, timestamp
  updates and clocks with two output pairs.
* `tb_worked_examples.sv`: the two worked traces, with
  `P1_RIGHT_KEY_MAX = 2` so that keys wrap as printed. It checks the element
  fields, the pairs, and the two-clock latency.
* `tb_p1_packet_analyzer.sv`, `tb_p2_packet_analyzer.sv`,
  `tb_global_param_updater.sv`, `tb_timestamp_analyzer.sv`,
  `tb_p1_p2_combiner.sv`, `tb_key_lut.sv`: one test per block, each against
  an independent expectation.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if it hangs.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/etm_pkg.sv tb/etm_ref_pkg.sv tb/tb_etm_data_trace_analyzer.sv \
    --top-module tb_etm_data_trace_analyzer -o sim
./obj_dir/sim
```

Replace the testbench file and top module name to run another test.

To lint the RTL alone:

```sh
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/etm_pkg.sv rtl/etm_data_trace_analyzer.sv
```

All tests run in well under a second.

After synthesis, the top has about 3,700 flip-flop bits. 2,560 of them are
the two 32-entry tables, which an FPGA would place in LUT RAM. The
published analyzer reports far fewer registers, so treat this RTL as a
functional model of the architecture, not as a size-matched copy. Its clock
rate has not been measured. To sustain a 1 Gbit/s trace port, the analyzer
needs one byte per clock at 125 MHz. It accepts two packets per clock.
