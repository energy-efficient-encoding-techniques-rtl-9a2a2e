# Frequent-value encoding for an off-chip data bus (FV-MSB-LSB)

Driving a long off-chip bus costs energy on every line that changes level,
and the load on those lines is far larger than anything inside the chip.
This design puts a small codec at each end of a processor-to-memory data bus
so that the bus toggles fewer lines for the same data. It is an RTL
implementation of the FV-MSB-LSB scheme and its relatives, FV-i and
FV-i-MSB-j, described by D. C. Suresh et al. in "Energy-Efficient Encoding
Techniques for Off-Chip Data Buses".

The scheme rests on three ideas:

* **Replicated value tables.** Both ends remember values that recently
  crossed the bus. When a value comes up again, the sender transmits only
  the position of its table entry as a one-hot word. The receiver looks the
  value up in its own copy of the table.
* **Partial values.** Whole 32-bit values repeat less often than their
  halves do: pointers share high bits, and small constants share low bits.
  So besides the table of whole values (FV), there is a table of the top 20
  bits (MSB) and a table of the low 12 bits (LSB). Either portion, or both,
  can be sent as a code while the rest goes as is.
* **An XOR correlator.** The word placed on the bus is the code XOR the
  previous bus word. A line therefore toggles only where the code has a 1,
  and a one-hot code costs a single transition.

Only one extra pin is needed: the *encode* line, which says whether the word
on the bus is a code or plain data. Everything else has to be worked out
from the shape of the word. This is the subtle part of the design, covered
in the next section.

## How a word is coded

The 32 data lines split into an MSB field (lines 31..12) and an LSB field
(lines 11..0). A table whose field is *n* lines wide can use *m* of those
lines as "internal control lines". It then holds (n-m)·2^m entries. Entry
*e* is sent as a 1 on line m + (e mod (n-m)), plus the number e div (n-m) on
the lowest *m* lines of the field. In the main configuration no table uses
control lines, so the FV table has 32 entries, the MSB table 20 and the LSB
table 12.

The sender (`enc_select`) chooses the code in this order:

| table hits              | word sent (before the XOR)                      | condition                                    |
|-------------------------|-------------------------------------------------|----------------------------------------------|
| FV                      | one-hot code of the FV entry                    | always                                       |
| MSB and LSB             | MSB code in lines 31..12, LSB code in 11..0     | always                                       |
| MSB only                | MSB code, low 12 bits as is                     | low portion has at least two 1s              |
| LSB only                | high 20 bits as is, LSB code                    | high portion has at least two 1s             |
| none, or condition fails| the data, encode line low                       |                                              |

The conditions keep every encoded word unambiguous. For example, an MSB code
above a low portion of zero would be a single 1 in 32 lines, which is
exactly what a whole-value code looks like. An MSB code above a one-hot low
portion would look like a code of both portions. Such words are sent
unencoded, even though a table hit, and are flagged as `suppressed`.

The receiver (`dec_select`, through `code_classifier`) reads an encoded word
in a fixed order:

1. exactly one 1 above the FV control lines: a whole-value code;
2. both fields hold a code: a code of both portions;
3. the MSB field holds a code: MSB code, low portion as received;
4. the LSB field holds a code: LSB code, high portion as received.

The sender also runs each candidate word through the same classifier and
sends it only if it reads back as the kind it was built as. In the main
configuration this never changes the outcome. It matters for the variants
with control lines. Take FV-i-MSB-j with a control line at bit 0: the
paper's rule is "low portion nonzero", and it would let through an MSB code
whose only low 1 sits on bit 0. The receiver would take that word for a
whole-value code. The check sends such words unencoded.

Worked examples from the main configuration, with codes before the XOR:

| data       | FV  | MSB | LSB | encode | word       |
|------------|-----|-----|-----|--------|------------|
| 0xF048EFFF | hit (entry 30) | | | 1 | 0x40000000 |
| 0xF048E4CE | miss | hit (19) | hit (11) | 1 | 0x80000800 |
| 0xF048E000 | miss | hit | miss | 0 | 0xF048E000 (low portion zero) |
| 0xF048E777 | miss | hit (19) | miss | 1 | 0x80000777 |
| 0x8542E71F | miss | miss | hit (1) | 1 | 0x8542E002 |
| 0x100004CE | miss | miss | hit | 0 | 0x100004CE (high portion one-hot) |

## Keeping both ends in step

The receiver can decode only if its tables match the sender's entry for
entry. The design keeps them equal like this:

* **One update rule for both ends.** After every transfer, both ends search
  each table with their portion of the data value. On a hit the entry is
  marked as used; on a miss the portion is written over that table's victim.
  The receiver searches with the value it has just decoded. All three tables
  are updated on every transfer, also when the FV table hits.
* **Ageing by transfer count.** Each entry carries a 3-bit age: a reference
  bit above a 2-bit timestamp. A touch sets the reference bit; a newly
  written entry restarts at 3'b100. Every 16 transfers all ages shift right
  by one. The victim is the entry with the smallest age, with empty entries
  first and the lowest index winning ties (`age_timestamps`). The period is
  counted in bus transfers rather than clock cycles, so both ends shift at
  the same point in the data stream.
* **One direction at a time.** A codec cannot send in the cycle it is
  receiving (`tx_ready` is low), so a change of bus direction costs one
  turnaround cycle. Otherwise an end could encode with a table that has not
  yet absorbed the word arriving at that moment.

One codec handles both directions. Reads and writes both train the same
tables at each end.

## The top level, `fvbus_link_top`

The top level holds a processor-side codec and a memory-side codec, and the
bus between them.

| port | dir | meaning |
|------|-----|---------|
| `cpu_wr_valid/ready/data` | in/out/in | processor writes (valid/ready handshake) |
| `cpu_rd_valid/data` | out | read data delivered to the processor |
| `mem_wr_valid/data` | out | write data delivered to memory |
| `mem_rd_valid/ready/data` | in/out/in | memory returns read data |
| `bus_data[31:0]`, `bus_enc` | out | the off-chip lines: data and encode |
| `bus_valid`, `bus_dir`, `bus_kind`, `bus_suppressed`, `age_tick` | out | observation only |

Timing: a word accepted in cycle *t* is on the bus in *t+1* and comes out at
the far end in *t+2*, one cycle per codec. One word crosses per cycle. When
both ends offer a word in the same cycle, a one-bit round-robin arbiter
picks one. The bus lines hold their last value while idle. Reset
(`rst_n`, asynchronous, active low) empties all tables and clears the bus
word to zero.

## Scheme configurations

`fvbus_codec` (and the top) take the scheme as parameters:

| scheme | FV_M | MSB_EN | MSB_W | MSB_M | LSB_EN | tables |
|--------|------|--------|-------|-------|--------|--------|
| FV-MSB-LSB (default) | 0 | 1 | 20 | 0 | 1 | FV 32, MSB 20, LSB 12 |
| FV-0 | 0 | 0 | – | – | 0 | FV 32 |
| FV-1 | 1 | 0 | – | – | 0 | FV 62 |
| FV-2 | 2 | 0 | – | – | 0 | FV 120 |
| FV-1-MSB-2 | 0 | 1 | 20 | 1 | 0 | FV 32, MSB 38 |
| FV-2-MSB-2 | 1 | 1 | 19 | 1 | 0 | FV 62, MSB 36 |

The paper names FV-i after the number of control lines, but FV-i-MSB-j after
the factor by which each table grows. The parameters always count control
lines. `W` sets the bus width (up to 64), and `LSB_M` gives the LSB table
control lines (0 in every published configuration). `AGE_PERIOD` (16) sets
the ageing period.

## Files

| file | contents |
|------|----------|
| `rtl/fvbus_pkg.sv` | code kinds, index type, field helper functions |
| `rtl/value_table.sv` | one table: associative search, read by index, insert on miss |
| `rtl/age_timestamps.sv` | ages and victim choice of one table |
| `rtl/bus_correlator.sv` | XOR correlator / decorrelator, last bus word |
| `rtl/code_classifier.sv` | what an encoded word means |
| `rtl/enc_select.sv` | sender's choice of code |
| `rtl/dec_select.sv` | receiver's reconstruction of the value |
| `rtl/fvbus_codec.sv` | one end: tables, selection logic, correlator |
| `rtl/fvbus_link_top.sv` | both ends, arbiter, bus |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fvbus_codec_variants.sv`, `tb/codec_pair_stream.sv` | the five other schemes and FV-MSB-LSB with 2-, 12- and 29-bit MSB portions, each as a sending/receiving pair |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. A
watchdog stops it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/fvbus_pkg.sv tb/tb_fvbus_link_top.sv --top-module tb_fvbus_link_top
./obj_dir/Vtb_fvbus_link_top
```

Replace the testbench name to run the others. `tb_fvbus_link_top` runs the
top at its default parameters. It sends 4000 writes and 4000 reads with
value locality, often from both ends at once. It checks every word and its
two-cycle latency. It also counts each mechanism and fails if one never
happened: each code kind, suppressed hits, FV evictions, ageing shifts,
arbitration and turnaround stalls. On its generated streams the bus toggles
14 to 18% fewer lines than the raw data, depending on the random seed. That figure reflects the synthetic
data only. It says nothing about the 53% average the paper reports for
benchmark traces, which are not part of this package.

`tb_enc_select` and `tb_dec_select` check the worked examples above. They
also check the matching examples for FV-2-MSB-2 with a 20-bit MSB field
(0x40000000, 0x800004CE, 0x00000005, 0x00003789), which this bus layout
reproduces bit for bit.

## How far it follows the paper, and where it departs

Taken from the paper: the three table types and their widths (32, 20 and
12 bits), the sizing (n-m)·2^m with control lines in the low lines of a
field, the priority of FV hits, the rules for sending partial hits, the XOR
correlator, one encode line, the 2-bit timestamp with a reference bit
shifted every 16 periods with least-timestamp replacement, and one cycle of
delay per codec.

Choices of this design, where the paper is silent or cannot be followed
literally:

* The tables are registers with comparators. The paper builds them from
  custom CAM cells, whose circuit (and energy figures) has no RTL
  counterpart here.
* The receiving end searches its tables with the decoded value to update
  them. The paper says the receiver performs no search for an unencoded
  word. But then its MSB and LSB tables could not tell a hit from a miss,
  and would drift from the sender's.
* The classifier check on each candidate code (see above) goes beyond the
  paper's rules. It only ever turns an encoding into a plain transfer.
* These details are this design's own: the order in which the receiver
  classifies words, the handshakes, the arbiter, the turnaround cycle, the
  reset state, counting the ageing period in transfers, sending the encode
  line as a level (not through the correlator), and updating the MSB and LSB
  tables on FV hits.
* There is no energy or power model. Switching can be measured on
  `bus_data`/`bus_enc` in simulation.
