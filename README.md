# Temporal Crosstalk Shielding (TCS) bus code

On a long on-chip bus the delay of a wire depends on what its two neighbours
do in the same cycle. With `tau = R_T * C_L` (wire resistance times ground
capacitance) and `lambda = C_I / C_L` (coupling over ground capacitance), a
wire that switches while both neighbours switch the other way needs
`tau * (1 + 4*lambda)` (crosstalk class 6); one opposite neighbour and one
quiet neighbour gives `tau * (1 + 3*lambda)` (class 5). An uncoded bus has to
be clocked for class 6.

TCS removes classes 5 and 6 altogether, using time rather than extra wires:

* every 4-bit block of the data word is sent as **two 3-bit codes in two
  consecutive bus cycles**, so a 32-bit word needs only 24 wires, which can be
  spread out over the same routing width (lower `lambda`);
* the code is chosen so that the change from a word's first to its second
  transmission never has two adjacent wires switching in opposite
  directions;
* the only place where such a switch can still happen is between the second
  transmission of one word and the first transmission of the next. A
  **Crosstalk Class Analyzer** predicts it, and in that case the sender puts
  an all-zero word, the **Crosstalk Identification Vector (CIV)**, on the bus
  for one cycle in between. Falling into zero and rising out of zero never
  switches neighbours in opposite directions.

The bus can then be clocked at the class-4 delay `tau' * (1 + 2*lambda')`, and
a word costs 2 bus cycles, or 3 when a CIV is needed.

## The code

| data | first | second |   | data | first | second |
|------|-------|--------|---|------|-------|--------|
| 0000 | 001 | 001 |   | 1000 | 100 | 100 |
| 0001 | 001 | 011 |   | 1001 | 100 | 110 |
| 0010 | 001 | 101 |   | 1010 | 110 | 000 |
| 0011 | 001 | 111 |   | 1011 | 110 | 110 |
| 0100 | 011 | 001 |   | 1100 | 111 | 001 |
| 0101 | 011 | 011 |   | 1101 | 111 | 011 |
| 0110 | 011 | 111 |   | 1110 | 111 | 101 |
| 0111 | 100 | 000 |   | 1111 | 111 | 111 |

Properties the rest of the design relies on:

1. Inside a block, first -> second code only rises or only falls, and the
   LSB never changes. So between the two transmissions of a word no wire pair
   switches in opposite directions, inside a group or across the border of
   two groups.
2. No first code is `000`. An all-zero bus word can therefore never be the
   first transmission of a word, which lets the receiver recognise the CIV.
   (Second codes can be `000`: the word `0x7A7A7A7A` has an all-zero second
   transmission.)
3. The `{MSB, LSB}` pair of the first code has only three values, `01` for
   blocks 0-6, `10` for 7-11 and `11` for 12-15.

Block `i` of the word (bits `4i+3:4i`) goes to wires `3i+2:3i`, MSB of the
code on the higher wire.

## The Crosstalk Class Analyzer

The analyzer sees the word waiting in the sender latch at the same time as
the encoder does, and answers one question: if this word's first
transmission replaces the second transmission now on the bus, will any pair
of adjacent wires switch in opposite directions? It has two parts that run in
parallel:

* **Middle-bit unit** (`middle_bit_xt_unit`). It stores the previous data
  word in its original 4-bit form. For every block it looks up a 16x16 table,
  row = new block, column = previous block. An entry is 1 when, on that
  block's three wires, the middle wire would switch against one of its two
  neighbours (36 of the 256 entries). The table is computed from the code
  table at elaboration time, not typed in.
* **Boundary-bit unit** (`boundary_bit_xt_unit`). It maps every new block to
  its class (`01`/`10`/`11`, the MSB/LSB pair of its first code) and
  compares it with the MSB/LSB pairs of the groups on the bus. At every
  border it checks the two wires that meet there, the LSB wire of one group
  and the MSB wire of the next, for opposite switching.

The two checks together cover every adjacent wire pair of the bus exactly
once. A wire can only reach class 5 or 6 when at least one neighbour
switches against it, so "no opposite switching on adjacent wires" is
sufficient. It is also a little conservative: it flags a few class-4
patterns as well. For random data and one six-wire window, 31.9% of
transitions are flagged, against 21.2% that are strictly class 5/6 on the
inner wires.

Why the middle unit needs the middle wire against *either* neighbour, and
not only the middle wire's own class: when the bus goes from code `001` to
code `110` on a group, MSB and middle rise and the LSB falls. The middle wire
sees class 4, but the LSB wire sees class 5 if the next group's MSB stays
still. The boundary unit cannot see that pattern because it only looks at
the MSB/LSB pairs.

After a zero vector has been sent the stored previous word is no longer on
the bus. The middle unit keeps a valid flag, cleared when a zero vector goes
out and set when a new word's first code goes out. While the flag is clear
it never fires. The boundary unit reads the bus directly and needs no flag.

## Bus protocol, cycle by cycle

The sequencer `tcs_tx_ctrl` tracks what the bus register holds: zero, a
first code word, or a second code word.

| bus holds | word waiting | analyzer | next bus value | latch |
|-----------|--------------|----------|----------------|-------|
| first     | -            | -        | second code word | - |
| second    | yes          | clear    | first code word of new word | word taken |
| second    | yes          | crosstalk | **zero (CIV)** | word held one more cycle |
| second    | no           | -        | zero (idle)    | - |
| zero      | yes          | (ignored) | first code word of new word | word taken |
| zero      | no           | -        | zero (idle)    | - |

Steady supply of words A, B, C, with a CIV needed before B. The table shows
the values after each rising edge:

| after edge | 1 | 2 | 3 | 4 | 5 | 6 |
|------------|---|---|---|---|---|---|
| `bus_tx`   | A first | A second | 0 (CIV) | B first | B second | C first |
| `rcv_valid`/`rcv_data` | - | - | A | - | - | B |

* A word spends one cycle in the sender latch, two when a CIV goes first.
* Its first code word is on the bus one edge after it enters the latch (two
  with a CIV). The receiver latch shows the word two edges after its first
  code word went out.
* Throughput: one word per 2 bus cycles, per 3 when a CIV is needed.
* With nothing to send, the bus carries the zero vector. The receiver only
  tells data from filler by "not all-zero", so holding the last word on the
  bus would look like a new first transmission.

## Receiver

`tcs_decoder` keeps a *decode bit*:

* bit clear, bus all-zero: a CIV or idle cycle. It is discarded.
* bit clear, bus non-zero: a first transmission. It is stored and the bit is
  set.
* bit set: the bus holds the second transmission, even if it is all-zero. The
  stored and current words are decoded block by block, and `valid` is high
  for that cycle. The bit is cleared.

A 6-bit pattern that is no code word decodes to 0 and raises `code_err`.
Only a corrupted bus can produce one. `receiver_latch` registers the result
for the receiver.

## Wires and clock period

The coded bus has 3n/4 wires in the routing width of the n-wire bus, so the
spacing grows to `s'` from `n*w + (n-1)*s = (3n/4)*w + (3n/4 - 1)*s'`. For
n = 32 and w = s = 237 nm (90 nm node) this gives s' = 402 nm. For the
10 mm global bus at the two nodes:

| | 90 nm uncoded | 90 nm coded | 65 nm uncoded | 65 nm coded |
|---|---|---|---|---|
| R (Ohm/mm) | 187 | 187 | 423 | 423 |
| C_L (fF/mm) | 27.260 | 36.287 | 22.127 | 29.330 |
| C_I (fF/mm) | 91.943 | 55.909 | 70.159 | 42.711 |
| lambda = C_I/C_L | 3.37 | 1.54 | 3.17 | 1.46 |
| bus cycle | class 6: 7.39 ns | class 4: 2.77 ns | class 6: 12.81 ns | class 4: 4.85 ns |

Two coded cycles plus a 0.4 ns codec delay (5.94 ns and 10.11 ns) are shorter
than one uncoded cycle. The gain depends on how often a CIV is needed: with
CIV fraction `c`, a word costs `(2 + c) * T4 + 0.4 ns`. At 90 nm the coded
bus stops gaining once `c` exceeds about 0.52.

## Files

| file | contents |
|------|----------|
| `rtl/tcs_pkg.sv` | code table, inverse, class and opposite-switching helpers, 16x16 table generator |
| `rtl/sender_latch.sv` | one-word input latch, valid/ready |
| `rtl/tcs_encoder.sv` | combinational encoder, N bits -> two 3N/4-bit words |
| `rtl/middle_bit_xt_unit.sv` | stored previous word + 16x16 table per block |
| `rtl/boundary_bit_xt_unit.sv` | class of each new block against the MSB/LSB pairs on the bus |
| `rtl/crosstalk_class_analyzer.sv` | both units, OR of their flags |
| `rtl/tcs_tx_ctrl.sv` | sequencer: first / second / CIV / idle |
| `rtl/civ_driver.sv` | bus register: first word, held second word or zero |
| `rtl/tcs_decoder.sv` | decode bit, first-word store, inverse table |
| `rtl/receiver_latch.sv` | output register |
| `rtl/tcs_bus_top.sv` | the complete link |

`tcs_bus_top` has one parameter, `N` (data width, default 32, a multiple of 4
and at least 8). Its ports:

* `snd_valid`, `snd_data[N]` and `snd_ready`: sender side, a word is taken
  at a rising edge with both valid and ready high.
* `bus_tx[3N/4]` and `bus_rx[3N/4]`: the encoded bus out to the wires and
  back from them. Connect them directly for a working link.
* `rcv_valid` and `rcv_data[N]`: a one-cycle pulse per received word. The
  receiver cannot stall the link.
* `civ_sent`, `xt_mid`, `xt_bnd` and `dec_err`: status, for observation.

Reset is asynchronous and active low. It empties the latches, clears the
decode bit and puts the zero vector on the bus. All logic is synthesizable.
An assertion in the top checks that `bus_tx` never switches adjacent wires in
opposite directions.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The testbench files use plain delays, so
pass a timescale:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/tcs_pkg.sv tb/tcs_ref_pkg.sv tb/tb_tcs_bus_top.sv --top-module tb_tcs_bus_top
./obj_dir/Vtb_tcs_bus_top
```

* `tb/tcs_ref_pkg.sv` is the reference model. It has its own copy of the
  code table and computes the crosstalk class of every wire from the delay
  formula above.
* Each module has its own testbench, `tb/tb_<module>.sv`. The analyzer test
  checks that the two units together flag exactly the transitions that have
  opposite switching anywhere on the bus, and that nothing of class 5/6 goes
  unflagged.
* `tb/tb_tcs_bus_top.sv` runs the link at its default size (N = 32). It sends
  back-to-back random words, sparse words with idle gaps, an address-like
  stream and words with all-zero second transmissions. It checks:
  * order, data and latency of every word;
  * spacing of 2 or 3 cycles, 3 exactly when a CIV was sent;
  * no class 5/6 transition on the coded bus.

  It also checks that each mechanism happens at least once: a CIV, a flag
  from only the middle unit, a flag from only the boundary unit, an idle
  zero, a discarded zero, a stall and a zero second transmission.
* `tb/tb_tcs_ctv.sv` builds the encoder and the analyzer at N = 8, which is
  exactly one six-wire window of two blocks. It runs all 16^4 pairs of
  consecutive words and checks the two transitions inside each word and the
  analyzer flag between the words. 31.90% of the pairs need a CIV; 21.21%
  would be strictly class 5/6.
* `tb/tb_tcs_bus_timing.sv` puts the behavioural wire model
  `tb/bus_wire_model.sv` between `bus_tx` and `bus_rx`. The model uses the
  per-class delays and the wire figures above. The testbench clocks the link
  at the class-4 delay (plus 20 ps) at both nodes, and checks that every word
  still arrives and that the coded bus never exceeds that delay. The same
  words on an uncoded 32-wire model do reach class 6.

Results with synthetic traffic (no benchmark traces are included):

| stream | CIV fraction | cycles/word | 90 nm time per word vs uncoded | 65 nm |
|--------|--------------|-------------|------|------|
| address-like (sequential, 1 in 8 jumps) | 0.10 | 2.10 | 6.19 vs 7.39 ns (-16%) | -17% |
| data-like (small ints, pointers, random) | 0.60 | 2.60 | 7.60 vs 7.39 ns (+3%) | +1.5% |
| fully random 32-bit words | 0.83 | 2.83 | slower | slower |

Address traffic benefits clearly. For data traffic the result depends on how
often neighbouring words collide.

## Departures and limits

* The crosstalk test is "adjacent wires switching in opposite directions",
  as explained above. This is slightly stricter than class 5/6, so a few more
  CIVs are sent than a class-exact test would send.
* The valid flag of the middle-bit unit is this design's own addition. So
  are the idle zero vector, the valid/ready handshake at the sender, the
  registered receiver output and the pipeline timing.
* The wires themselves, the sender (a processor datapath) and the receiver
  (an L1 cache) are outside the RTL. The wire behaviour exists only as the
  behavioural model in `tb/`.
* Peak power is not modelled. Neither is the benchmark evaluation on
  processor traces.
