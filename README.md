# Streaming heap sorter for timestamped records

A data-concentrating node in an acquisition system receives records from
several sources. Each record carries a timestamp, and the merged stream is
almost, but not exactly, in time order. This design puts such a stream back
in order on the fly. It keeps the most recent records in a binary min-heap
and, for every record that arrives, emits the oldest of "the new record and
everything stored". The heap has `2^NM - 1` slots. A record that is overtaken
by at most that many later records therefore comes out in its right place.

The defaults are 11 layers (2047 records), 16-bit timestamps and a 32-bit
payload. The sorter takes a new record every 3 clock cycles and gives one
record back for each record it takes.

## Wrap-around time

Timestamps are 16-bit counters, so a long stream wraps around many times. To
order two stamps, the design looks at their modular difference, not their
raw values (`ts_compare`):

- `a < b` when bit 15 of `(a - b) mod 2^16` is set;
- `a <= b` when bit 15 of `(b - a) mod 2^16` is clear.

This is a correct ordering as long as all records in the sorter at one time
span less than half a timestamp period (32768 ticks). No sorting key has to
be widened, and a stream can run forever.

## The heap and its layers

Layer `s` of the heap holds `2^s` records. Layer 0 is a single register,
which is the top and always holds the oldest stored record. Within layer `s`,
the two children of slot `j` of layer `s-1` are slots `j` (left, L) and
`j + 2^(s-1)` (right, R). This indexing lets every layer have a memory of its
own, sized exactly. All layers can then be accessed in the same clock cycle.

```
 in ──► [top controller]──► out          layer 0: top register
               │ replaced top goes out, new record T sifts down
               ▼
        [node ctrl 1] reads L,R of layer 1, writes layer 0
               ▼
        [node ctrl 2] reads L,R of layer 2, writes layer 1
               ▼  ...
        [node ctrl NM] writes layer NM-1 (leaves)
```

**Top controller** (`heap_top_ctrl`). It compares the incoming record with
the top:

- **Bypass.** If the input is older than or equal to the top, nothing stored
  is older than it. It goes straight to the output, and the heap is left
  alone.
- **Replace.** Otherwise the top goes to the output. The input becomes the
  record T that must find its place, starting at the top slot.

**Node controller of layer s** (`heap_node_ctrl`). It receives T and the slot
`offs` of layer `s-1` that T is to fill. The old content of that slot has
already moved up. The controller reads the slot's two children L and R and
takes one of three actions:

| condition            | action                                              |
|----------------------|-----------------------------------------------------|
| T <= L and T <= R    | write T into the slot; the sift-down ends           |
| L < T and L <= R     | move L up into the slot; continue at L's position   |
| R < T (and R < L)    | move R up into the slot; continue at R's position   |

The last controller (layer NM) has no children. It always writes T. With
wrap-around order, a case where none of the three conditions holds is only
possible for records more than half a period apart. In that case T is written
and the sift-down ends, so that no record is lost.

**Layer memories** (`heap_layer_mem`, layers 1..NM-1). Each has two read
ports, for L and R, and one write port. Node controller `s` reads layer `s`,
and node controller `s+1` writes it.

## Pipeline timing (the part to read carefully)

A sift-down moves down one layer every two cycles:

| cycle after acceptance | what happens for record k                        |
|------------------------|--------------------------------------------------|
| 0                      | top controller decides bypass/replace            |
| 1                      | output register valid; node 1 presents addresses |
| 2                      | node 1 compares and writes the top register      |
| 2s-1, 2s               | node s: child addresses, then compare + write    |
| 2NM-1                  | node NM writes the leaf                          |

Successive records are accepted 3 cycles apart. Record k+1 therefore runs
through the layers 3 cycles behind record k, and several sift-downs are in
flight at once. Each layer is read by at most one sift-down and written by at
most one sift-down in any cycle. The result must equal processing the records
strictly one after another. Two cases need care:

- Record k writes layer `s` (from node `s+1`) in cycle `2s+2`. Record k+1
  reads layer `s` (at node `s`) in cycle `3 + 2s - 1 = 2s+2`, which is the
  same cycle. The layer memories are therefore **write-first**: a read of the
  address being written returns the new record. Without this forwarding,
  record k+1 would see a stale child.
- Record k writes the top register in cycle 2. Record k+1 compares against
  the top in cycle 3 at the earliest, so it already sees the new top.

For the same reason the interval `II` must be at least 3. The top controller
reports an error at elaboration for anything smaller. The output is taken
from the top at acceptance time, so it is ready after 1 cycle, long before
the sift-down ends.

## Interfaces

`heap_sorter` (top) has these ports:

| port        | dir | width | meaning                                                    |
|-------------|-----|-------|------------------------------------------------------------|
| `clk`       | in  | 1     | clock                                                      |
| `rst`       | in  | 1     | synchronous, active high                                   |
| `busy`      | out | 1     | memories are being cleared after reset                     |
| `in_valid`  | in  | 1     | input record offered                                       |
| `in_ready`  | out | 1     | input taken in a cycle with `in_valid && in_ready`         |
| `in_data`   | in  | 48    | `sort_rec_t`: `key[47:32]`, `payload[31:0]`                |
| `out_valid` | out | 1     | output record available                                    |
| `out_ready` | in  | 1     | output consumed in a cycle with `out_valid && out_ready`   |
| `out_data`  | out | 48    | `sort_rec_t`                                               |

`in_ready` is low in three cases: while `busy` is high, for 2 cycles after
each accepted record, and while an output record waits with `out_ready` low.
Backpressure on the output thus stalls the input without disturbing
sift-downs that are still in flight. An assertion checks that a waiting
output record stays unchanged.

The record type and the node decision enum are in `heap_sort_pkg`. The key
and payload widths are package parameters there.

## Start-up and end of stream

After reset, every layer memory writes zero records into all of its slots,
one slot per cycle. This takes `2^(NM-1)` cycles (1024 cycles at the
default), and `busy` stays high meanwhile. The heap then holds 2047 all-zero
records. As long as incoming stamps are "newer" than 0 (within half a period
of it), these zeros are the first 2047 records to come out. A consumer that
cares should drop them or start its stamps accordingly.

Records still in the heap when the stream ends are pushed out by feeding
newer records. There is no separate flush command.

## Parameters

| parameter | default | where        | meaning                                   |
|-----------|---------|--------------|-------------------------------------------|
| `NM`      | 11      | `heap_sorter`| number of layers; capacity `2^NM - 1`     |
| `II`      | 3       | `heap_sorter`| cycles between accepted records (>= 3)    |
| `KEY_W`   | 16      | package      | timestamp width                           |
| `PAY_W`   | 32      | package      | payload width                             |

At the defaults the layer memories hold 2046 × 48 = 98,208 bits. Only the
top and the pipeline registers are flip-flops (about 1.3 k bits).

## How far it follows its source, and where it departs

The design reproduces a published streaming heap sorter in its final
configuration. That configuration has one memory per layer, wrap-around
comparison and a new record every 3 cycles. The following come from that
source: the heap indexing, the three-case node decision (with its tie
rules), the bit-test comparisons, the record format, NM = 11 and II = 3.

These are this design's own choices:

- The two-cycle stage and the write-first layer memories.
- The valid/ready handshake and the registered output. The source used
  a minimal valid/acknowledge handshake and reports a fixed latency of 11
  cycles. This design has 1 cycle from acceptance to output.
- The clear-after-reset sequence. The source starts from zero-initialised
  memory, which this sequence reproduces.
- Writing T when none of the three node conditions holds. The source writes
  nothing in that case.

Capacity: the source's text says 11 layers should sort a disorder of up to
4095 records. Its code, however, stores only 2^11 - 1 = 2047 records with
11 layers. This design follows the code. For 4095, set `NM = 12`.

Not included: a variant that splits each layer into separate L and R
memories, which gave no speed gain, and a faster hand-written sorter with
"bypass" channels between layers reaching one record every 2 cycles. This
design implements neither.

## Verification

Each module has a self-checking testbench in `tb/`, ending with a
`TB_RESULT checks=N failures=M` line:

- `tb_ts_compare` checks corner cases and 40 k random pairs against a
  reference based on folding the signed difference.
- `tb_heap_layer_mem` checks the clear length, zero contents after the
  clear, writes ignored while busy, and random traffic on all three ports
  against an array model, including same-cycle read/write.
- `tb_heap_node_ctrl` runs an inner stage and the last stage against an
  independent decision model. It checks addresses, parent writes,
  hand-off timing, and that each case occurs. A directed part checks the
  fallback for a cyclic wrap-around order.
- `tb_heap_top_ctrl` checks the handshake, the 3-cycle interval,
  backpressure, bypass/replace and the hand-off against a cycle-level
  model.
- `tb_heap_sorter` is the end-to-end test at the default size (no
  parameter overrides). It feeds 204,800 records in blocks of 2048 that
  are randomly permuted, so the disorder stays within capacity. Timestamps
  wrap several times, and the run includes phases with backpressure and
  input gaps. Every output is compared with a sequential model of the
  heap. The testbench also checks that 2047 zero records come out first,
  that the whole in-capacity stream comes out in order, the 1-cycle
  latency and the exact 3-cycle interval. A final 8192-record part with a
  disorder of 4095 must come out unsorted, as the capacity bound predicts.
  The testbench counts the mechanisms (bypass, replace, stop/left/right in
  every layer, forwarding in every layer where it can occur, stalls,
  wrap) and fails if one never happens. It runs in well under a second.

To run one of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/heap_sort_pkg.sv rtl/ts_compare.sv rtl/heap_layer_mem.sv \
  rtl/heap_node_ctrl.sv rtl/heap_top_ctrl.sv rtl/heap_sorter.sv \
  tb/tb_heap_sorter.sv --top-module tb_heap_sorter
./obj_dir/Vtb_heap_sorter
```

For a unit testbench, pass only the package, the module under test and
whatever it instantiates (`ts_compare` for the controllers).

What the tests do not cover: timing closure on a real FPGA. It is unknown
whether the compare-mux-forward path, from a layer's read data through the
node decision into the write-first bypass of the layer above, closes at a
given clock. If it does not, the usual fix is to register the write and
widen the bypass.
