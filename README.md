# Near-data processing accelerator for key-value store blocks

A smart SSD can answer a `SCAN` with a value predicate far faster if the data
is filtered next to the storage instead of being shipped to the host. This
RTL is the FPGA side of such a device: processing elements (PEs) that take one
data block of a key-value store (up to 32 KB, staged from Flash into the DRAM
of a Zynq-7000 processing system), keep only the records that satisfy a chain
of predicates, reshape each kept record into a smaller output record, and write
the result back to DRAM. The ARM cores of the SoC program each PE through a
small register file and poll it for completion.

The design follows the accelerator template of *A Framework for the Automatic
Generation of FPGA-based Near-Data Processing Accelerators in Smart Storage
Systems* (nKV on the Cosmos+ OpenSSD platform). In that framework a generator
specialises the template for the record formats of an application. Here the
specialisation is written by hand in one package, `rtl/ndp_pkg.sv`, for the
framework's own example: records `Point3D {uint32_t x, y, z}` are filtered and
projected to `Point2D {x = y, y = z}`. Everything else is generic over that
package.

## Structure

```
ndp_accel_array            NUM_PE = 2 PEs side by side, ports brought out as arrays
└─ ndp_pe                  one accelerator
   ├─ ctrl_regfile         AXI4-Lite registers, START/BUSY, counters
   ├─ load_unit            AXI4 read bursts      ──┐
   ├─ input_tuple_buffer   words -> tuples         │
   ├─ filter_unit x NUM_STAGES  (compare_unit)     │  valid/ready stream,
   ├─ data_transform       input -> output record  │  FIFOs between units
   ├─ output_tuple_buffer  tuples -> words         │
   └─ store_unit           AXI4 write bursts     ──┘  (256-word FIFO)
sync_fifo                  FIFO used between all stream units
ndp_pkg                    record formats, types, register map
```

One PE has two external ports: an AXI4-Lite slave for control (32-bit data)
and one AXI4 master with 64-bit data to DRAM. The load unit uses only the read
channels of that master and the store unit only the write channels, so they
share it without arbitration. The master has no ID, LOCK, CACHE, PROT or
QOS signals; when connecting it to a port that needs them, tie them off (ID 0,
normal non-cacheable access). In the SoC, the platform's AXI interconnect, the
ARM cores, the DRAM, the NVMe core and the Flash controllers attach to these
ports; they are not part of this RTL.

## How a block flows through a PE

1. Firmware writes `LOAD_ADDR`, `LOAD_BYTES`, `STORE_ADDR` and the filter
   registers, then writes 1 to `START`. `BUSY` goes high.
2. The **load unit** clips the length to 32 KB and to whole 64-bit words, then
   issues INCR read bursts of at most 16 beats, never across a 4 KB page. Each
   returned beat goes straight into the pipeline. If the pipeline stalls, the
   load unit lowers `rready`, so the data waits in the interconnect.
3. The **input tuple buffer** appends each word above the bits it already holds
   and cuts out a tuple as soon as `IN_BITS` (96) bits are present. A 96-bit
   record therefore takes one and a half words. The buffer emits two tuples
   every three words.
4. Each **filter stage** takes one tuple per cycle. It selects one field
   (`FILTER_COL_i`) and compares it with `FILTER_VAL_i` under operator
   `FILTER_OP_i`. A tuple that passes goes into the stage's output FIFO, which
   is the next stage's input. A chain of stages therefore evaluates the AND of
   its predicates. A range scan needs two stages.
5. The **data transform** builds the output record from the input fields.
6. The **output tuple buffer** lays each output record out in memory order and
   packs records densely into 64-bit words.
7. The **store unit** queues the words in a 256 × 64-bit FIFO, which is the
   PE's one block RAM. It writes a 16-beat burst whenever 16 words are waiting,
   and writes the remainder once the stream has ended. Only the result is
   written, never a whole block.
8. When the last write response has arrived and the last word of the block
   has been read, `BUSY` drops. (With large records, up to one record's worth
   of words after the last whole record may still be arriving when the result
   is complete.) `RESULT_BYTES`,
   `TUPLES_IN`, `TUPLES_OUT` and `CYCLE_COUNTER` describe the run.

### Marking the end of a block

This is the least obvious part of the pipeline. A filter may drop any tuple,
including the last one, yet the output side must learn that the block is over
so that it can flush its last partial word and report completion. Every stream
item therefore carries two flags besides the tuple:

- `last` marks the final tuple of the block;
- `empty` means the item carries no tuple.

A filter never drops an item marked `last`. If that tuple fails the
predicate, the filter forwards it with `empty` set. Later stages pass empty
items through without comparing them. The output buffer does not store them,
but it does react to their `last` flag. A block too short to hold one whole
tuple (for example `LOAD_BYTES` = 8) yields a single `last`+`empty` item from
the input buffer. Bits after the last whole tuple of the loaded range are read
and discarded.

## Record formats and the tuple representation

`ndp_pkg` describes both records of the default format. Bit 0 is the lowest
bit of the record's first byte, and bytes are little-endian as on the Zynq ARM
cores.

| constant | meaning | value here |
|---|---|---|
| `IN_BITS`, `N_IN` | input record size, number of fields a predicate can test | 96, 3 |
| `IN_OFS[i]`, `IN_W[i]`, `IN_TYPE[i]` | bit offset, width and type of input field i | 0/32/64, 32, `FT_UINT` |
| `ELEM_W` | width every testable field is padded to (the widest such field) | 32 |
| `PF_OFS`, `PF_W` | the string postfix inside the input record (0 = none) | 0, 0 |
| `OUT_BITS`, `N_OUT` | output record size and field count | 64, 2 |
| `OUT_OFS[j]`, `OUT_W[j]` | placement of output field j | 0/32, 32 |
| `OUT_SRC[j]` | which input field feeds output field j | 1, 2 |
| `OUT_HAS_PF`, `OUT_PF_OFS` | whether and where the output keeps the postfix | no |

Inside the pipeline a tuple is a vector of `N_IN` padded fields
(`tuple_t.elem`) plus a postfix vector. Unsigned fields are zero-extended and
signed fields sign-extended, so one comparator width serves every field. Long
strings are handled by splitting them: the first bytes (the *prefix*) are
declared as an ordinary testable field, and the rest (the *postfix*) travels
untested in the postfix vector. The postfix can be copied to the output or
dropped. The transform table `OUT_SRC` covers three cases: identical formats,
a projection that keeps a subset of fields, and an explicit user mapping.

These constants form the default of one parameter, `FMT` (type
`ndp_pkg::fmt_t`), which every format-dependent module takes. The struct holds
the record sizes, the offset, width and type of each input field, the postfix
position and width, and the offset, width and source of each output field (up
to `MAX_FIELDS` = 64 fields). To build a PE for another pair of records, pass
a different `FMT` to `ndp_pe` or `ndp_accel_array`; `ndp_pe` builds the stream
item types from it and hands them to the units. `tb/tb_ndp_pe_formats.sv`
shows three such formats written as functions:

- a 256-bit record `{uint32_t a, b, c, d; char s[16]}` whose string has a
  4-byte prefix. Five fields can be tested, and the 12-byte postfix is carried
  through to the output;
- a 160-bit record with signed, 8-bit, 16-bit and float fields, projected to
  a 48-bit output record;
- a 192-bit record with a `double`, an `int64_t` and narrower fields, all
  padded to 64 bits, projected to a 96-bit output record.

`tb/tb_ndp_size_sweep.sv` builds ten more from one function of the record
size: records of 64 to 1024 bits, either all testable fields ("Full") or with
a string taking the second half ("Half").

Fields may be up to 64 bits wide (`elem_w` ≤ 64). With `elem_w` above 32, each
filter stage gets a fourth register for the upper word of its compare value,
and the stage stride grows from 12 to 16 bytes (see the register map).

## Predicates

`compare_unit` implements the standard operator set:

| `FILTER_OP` | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|
| predicate | nop (always true) | `=` | `≠` | `>` | `≥` | `<` | `≤` |

Code 7 also acts as nop. The type of the selected field decides how values
are ordered:

- **unsigned** and **two's-complement** fields compare as integers;
- **IEEE 754** fields (binary32 for `ELEM_W` = 32, binary64 for 64) compare as
  numbers. Each sign-magnitude code is mapped to a key that sorts like the
  number. `+0` equals `-0`. A NaN operand is unordered, so only `≠` (and nop)
  holds.

## Register map

32-bit registers at byte addresses on the AXI4-Lite port. The addresses of
START, BUSY, FILTER_OP_0 and CYCLE_COUNTER are those of the original generated
software header for a one-stage PE; the others were chosen for this RTL.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | START | W | write 1 (bit 0) to start; ignored while busy |
| 4 | BUSY | R | 1 from START until the result is written and the block fully read |
| 8 | LOAD_ADDR | RW | DRAM byte address of the input (aligned down to 8) |
| 12 | LOAD_BYTES | RW | bytes to read; clipped to 32768 and to whole words |
| 16 | STORE_ADDR | RW | DRAM byte address of the result (aligned down to 8) |
| 20 | RESULT_BYTES | R | bytes of output records written (TUPLES_OUT × OUT_BITS/8) |
| 24 | TUPLES_IN | R | records read from the block |
| 28 | TUPLES_OUT | R | records that passed all filters |
| 32–48 | – | – | unused, read 0 |
| 52 + 12i | FILTER_COL_i | RW | field tested by stage i |
| 56 + 12i | FILTER_VAL_i | RW | compare value of stage i |
| 60 + 12i | FILTER_OP_i | RW | operator of stage i (reset: nop) |
| 52 + 12·NUM_STAGES | CYCLE_COUNTER | R | clock cycles of the last run (64 for one stage) |

For formats with fields wider than 32 bits the stage stride is 16:
FILTER_COL_i at 52 + 16i, FILTER_VAL_i (low word) at 56 + 16i,
FILTER_VAL_HI_i at 60 + 16i, FILTER_OP_i at 64 + 16i, and CYCLE_COUNTER at
52 + 16·NUM_STAGES.

The result is stored densely. The final word is padded with zeros and written
in full, so up to 7 bytes after the result may be overwritten with zeros.
Filter registers must not change while BUSY is set.

## Timing and throughput

- Filter stages, the transform and the output buffer each take one tuple per
  clock cycle, and their FIFOs are two entries deep.
- A PE is therefore limited by its 64-bit memory port: one word per cycle. A
  full 32 KB block (4096 words, 2730 Point3D records) completes in about
  4120 cycles against a memory that never stalls. That is 41 µs at the 100 MHz
  clock of the platform.
- Each additional filter stage adds one cycle of latency and no throughput
  cost.
- Every unit has a synchronous, active-low reset (`rst_n`), and `START` clears
  all stream state.

## Parameters

| module | parameter | default | |
|---|---|---|---|
| `ndp_accel_array` | `NUM_PE` | 2 | number of PEs (the platform figure shows two) |
| `ndp_accel_array`, `ndp_pe` | `FMT` | `FMT_DEFAULT` | record formats (Point3D → Point2D) |
| | `NUM_STAGES` | 1 | filter stages per PE (1–5 evaluated in the original work) |
| | `STORE_DEPTH` | 256 | store FIFO words |
| | `AXIL_ADDR_W` | 8 | control address bits (enough for 5 stages) |
| `ndp_pkg` | `BLOCK_BYTES`, `MAX_BURST`, `BUS_W` | 32768, 16, 64 | |

## Simulation

Testbenches are in `tb/` and each prints `TB_RESULT checks=N failures=M`.
`tb/axi_mem_model.sv` is a behavioural DRAM with AXI4 slave ports that stalls
its handshakes at random. To build and run one, for example the end-to-end
test of the array:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ndp_accel_array \
  -y rtl -y tb +libext+.sv -Irtl rtl/ndp_pkg.sv tb/tb_ndp_accel_array.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ndp_accel_array` | both PEs at their default parameters, running concurrently. PE 0 processes a full 32 KB block at one word per cycle; PE 1 processes a partial and a full block against a stalling memory. Results are compared word by word with a reference model. Each mechanism is counted and must occur: filter drops, read back-pressure, 4 KB burst cuts, the empty end marker, and both PEs busy. |
| `tb_ndp_pe` | one PE with two stages: range scan, full block, nothing passing, a block shorter than one record, a length above 32 KB, an equality search |
| `tb_ndp_multistage` | five chained stages with random predicates over blocks of 4–24 KB |
| `tb_ndp_size_sweep` | ten PEs for records of 64, 128, 256, 512 and 1024 bits, each in a Full variant (uint32_t and uint8_t fields, all testable) and a Half variant (the second half is a string with a 4-byte prefix), two stages each |
| `tb_ndp_pe_formats` | three PEs built for other formats (above): a 256-bit string-prefix record through five stages, a 160-bit mixed-type record through three stages, and a 192-bit record with 64-bit fields through two stages. The bit-level reference model reads only the format description. |
| `tb_filter_unit`, `tb_compare_unit` | every operator on every field type, including edge values; end-marker rules; one tuple per cycle |
| `tb_input_tuple_buffer`, `tb_output_tuple_buffer`, `tb_data_transform` | packing and unpacking against bit-level models |
| `tb_load_unit`, `tb_store_unit` | burst limits, the 4 KB rule, exact data, `done` only after the last write response |
| `tb_ctrl_regfile`, `tb_sync_fifo` | register map, strobes, START suppression, cycle counter; FIFO order and flags |

`ndp_pe_env` is the shared environment behind `tb_ndp_pe` and
`tb_ndp_multistage`; `ndp_fmt_env` is the format-generic one behind
`tb_ndp_pe_formats` and `tb_ndp_size_sweep`.

## Where this RTL departs from, or goes beyond, the original description

- **Formats by parameter, not by generator.** The original framework
  generates the PE from C struct declarations. Here the format is the `FMT`
  parameter, and its description is written by hand; the default is the
  Point3D → Point2D example. The evaluated systems used PEs for
  publication-graph records: one "paper" PE and seven "reference" PEs. Those
  record layouts are not published, so those PEs cannot be reproduced. The
  64–1024-bit formats of the original size sweep give only their sizes; the
  field mix used in `tb_ndp_size_sweep` is this design's choice.
- **Stream protocol, block-end marking, burst policy, FIFO depths, register
  addresses other than START/BUSY/FILTER_OP_0/CYCLE_COUNTER, and reset
  behaviour** are this design's own choices; the original leaves them open.
- **The BRAM.** The original reports one block RAM per generated PE without
  saying what it holds. Here it is the store unit's word FIFO.
- **Floating-point ordering.** Single and double precision fields are said to
  be supported, but their comparison is not described. The ordering above
  (+0 = −0, NaN unordered) is this design's choice.
- **Custom compare operators.** The original generator lets users add
  operators; this RTL has the fixed standard set.
- **Not included:** the host-side software interface (a generated C header
  with register macros and filter functions), the ARM firmware, and the
  platform IP of the Cosmos+ OpenSSD (NVMe core, Tiger4 Flash controllers,
  AXI interconnect).
- **Not checked here:** FPGA resource use. The original compares slice counts
  against hand-written PEs. No vendor synthesis was run for this RTL.
