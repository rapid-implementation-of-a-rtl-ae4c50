# Systolic DNA/ASCII sequence comparator

This design computes the edit distance between two character sequences on a
linear systolic array of several hundred small processing elements (PEs).
The edit distance is the cheapest way to turn a source sequence into a target
sequence by deleting, inserting and substituting characters. Molecular
biologists use it as an "evolutionary distance" between DNA sequences. The
array is laid out as 32 FPGA-sized stages in a chain. A host streams both
sequences in through an input FIFO. The full distance comes back through an
output FIFO after about one pass of the data across the array.

The default build is the long DNA array: 746 PEs, each sequence up to 373
bases, with wildcard bases. Three smaller versions, two of them with 7-bit
ASCII characters, are parameter settings of the same RTL.

## What is computed

For source `s1..sm` and target `t1..tn`, the table `d(i,j)` holds the
distance between the prefixes `s1..si` and `t1..tj`:

```
d(0,0) = 0,  d(i,0) = i,  d(0,j) = j
d(i,j) = min( d(i-1,j) + 1,              delete s_i
              d(i,j-1) + 1,              insert t_j
              d(i-1,j-1) + c(s_i,t_j) )  substitute, c = 0 on a match, 2 otherwise
```

The answer is `d(m,n)`. For example, `TGCTAAGC` against `AGACTAGG` gives 6.

**DNA characters** are 4-bit codes: A=0001, C=0010, G=0100, T=1000. The
wildcards are R=0101 (A or G), Y=1010 (C or T) and N=1111 (any). Two codes
match when they share a set bit, so a wildcard matches each base it stands
for. **ASCII characters** are 7 bits and match when they are equal. In both
modes the all-zero code is the *null* filler character.

## Keeping only two bits per distance

With these costs, two neighbouring table entries always differ by exactly 1.
Every step adds 1, or adds 0 or 2, so `d(i,j)` has the parity of `i+j`, and
the difference between neighbours is at most 1. So a PE needs only `d mod 4`.
If the PE's stored value is `d = d(i-1,j-1)`, the two incoming values are
each `d-1` or `d+1`. The new entry is then one of two values:

* `d`, if the characters match or either incoming value is `d-1` (mod 4);
* `d+2` otherwise.

`dist_fsm` is exactly this 2-bit state machine. The full value is rebuilt
only at the output end.

## How the two streams cross the array

The source characters enter at the left end and move right. The target
characters enter at the right end and move left. Each character carries a
2-bit *travelling distance*, which starts as its first-column or first-row
value (`i` or `j`).

When `s_i` and `t_j` meet in a PE:

* the left neighbour has just produced `d(i,j-1)`, where `s_i` met `t_{j-1}`;
* the right neighbour has just produced `d(i-1,j)`, where `t_j` met
  `s_{i-1}`;
* the PE itself holds `d(i-1,j-1)`, because every entry on one diagonal
  `j-i` is computed by the same PE, one per clock.

The PE replaces its stored value with `d(i,j)`. It then hands this value to
both neighbours as the new travelling distance of both characters. A source
character leaves the right end carrying its last-column value `d(i,n)`. A
target character leaves the left end carrying its last-row value `d(m,j)`.

**Null characters make the array self-initialising.** When a real character
meets a null, the PE copies the real character's travelling distance. When
two nulls meet, it copies the source's distance. Before `s_1` reaches the PE
of diagonal `k > 0`, that PE is loaded with `d(0,k)` by the target `t_k`
meeting a leading null. Negative diagonals are loaded the same way from the
source side. The diagonal-0 PE is loaded with 0 by the two leading nulls.
The same rules make nulls transparent inside a stream. A null in the middle
of a sequence only shifts which PE handles which diagonal, so idle clocks
and filler words anywhere in a comparison do no harm. This is why no PE
ever needs a separate initialisation step.

## Two-phase clocking

This is the least obvious part of the RTL. Every PE has a *phase*:

| phase | characters captured on | distance updated on |
|-------|------------------------|---------------------|
| 0     | rising edge            | falling edge        |
| 1     | falling edge           | rising edge         |

PE number `p` of the whole array has phase `p mod 2`. As a result:

* A character moves one PE per half clock.
* Consecutive characters of a stream are two PEs apart.
* Every PE computes one table entry per clock.
* A PE's update on its falling (or rising) edge reads neighbour distances
  that were written half a clock earlier, and that belong to exactly the
  character pair it has just captured.

The stages (`pe_chain`) are given the parity of their first PE's global
index, so phases keep alternating across stage boundaries even when a stage
has an odd number of PEs (13 on X0 and X31 in the default build).

The array ends need the same timing. `stream_launch` re-times a stream that
changes once per rising edge so that it looks as if it came from a PE of the
right phase: first the character, then the distance half a clock later.
`stream_sink` does the reverse at the output end, for the rising-edge
counter logic. Their phase is chosen from the parity of the total PE count.

## Feeding and collecting (X0 and X31)

`seq_feeder` sits on the first stage and reads one FIFO word per clock. Each
word holds one source and one target character. The feeder counts real
characters to make their first-column and first-row distances. It sends the
source character into the array, and the target character over the
wrap-around path to the last stage. If the FIFO is empty, it injects a null
pair.

`distance_counter` sits on the last stage and rebuilds the result:

1. It counts the real target characters entering, which sets it to
   `d(0,n) = n`.
2. For each real source character leaving the array, it steps +1 or -1,
   depending on whether the character's 2-bit distance is one above or one
   below the counter's low two bits.
3. The END flag and the source length `m` arrive over the wrap-around path.
   Once `m` source characters have left, the counter holds `d(m,n)`. It
   writes this value to the output FIFO and clears itself.

`step_err` latches a step that is neither +1 nor -1. In practice this means
a sequence was too long, or two comparisons overlapped. `res_lost` latches a
result that was dropped because the output FIFO was full.

## Host protocol

Input word (36 bits, `nac_pkg::fifo_word_t`):

| field        | bits            | meaning                                      |
|--------------|-----------------|----------------------------------------------|
| `data[7:0]`  | low CHAR_W used | source character, 0 = none                   |
| `data[15:8]` | low CHAR_W used | target character, 0 = none                   |
| `ctrl[0]`    |                 | END: last word of this comparison            |

Word `k` carries `s_k` and `t_k`. The shorter sequence is padded with
nulls. The result word has `data` = distance and `ctrl` = `0001`.

Rules the host must keep:

* **Length.** Each sequence may be at most `N/2` characters, where `N` is
  the total PE count (373 by default). Idle clocks or null words inside a
  comparison count towards this limit. The tests confirm that one more
  character gives wrong results and raises `step_err`.
* **Drain.** After the END word, leave at least `N/2 + 2` clocks before the
  first word of the next comparison. These can be idle clocks (an empty
  FIFO) or null words. Otherwise the last source characters of one
  comparison would meet the targets of the next.
* A result appears about `N/2 + max(m,n)` clocks after the comparison's
  first word is read.

## Array versions

| version     | MODE         | PE_FIRST / PE_MID / PE_LAST | PEs | longest sequences |
|-------------|--------------|-----------------------------|-----|-------------------|
| DNA long    | `MODE_DNA`   | 13 / 24 / 13 (default)      | 746 | 373               |
| DNA short   | `MODE_DNA`   | 4 / 8 / 4                   | 248 | 124               |
| ASCII short | `MODE_ASCII` | 8 / 8 / 8                   | 256 | 128               |
| ASCII long  | `MODE_ASCII` | 9 / 16 / 9                  | 498 | 249               |

`PE_MID` applies to each of the 30 inner stages. `N_STAGES` (32) and
`FIFO_DEPTH` (512) are also parameters.

## Performance

Each PE does one cell update per clock. A comparison of two `N/2`-long
sequences takes about `N` clocks, so the array's peak useful rate is about
`N/4` cell updates per clock. The full-size simulation of a 373 × 373
comparison took 751 clocks, which is 185 updates per clock, or 185 million
cell updates per second at a 1 MHz word rate. That is the rate the board's
FIFOs can sustain.

With the drain gap, a batch of 100 comparisons of 100-base sequences takes
47,900 clocks (0.048 s at 1 MHz) on the 746-PE array. A 248-PE array would
need about 226 clocks per comparison (0.023 s). The 200 clocks per
comparison (0.020 s) quoted for this benchmark on the original machine
imply a scheduling that this RTL does not reproduce.

## Modules

| file                    | role                                                          |
|-------------------------|---------------------------------------------------------------|
| `nac_pkg.sv`            | types, DNA codes, word layout                                 |
| `char_comparator.sv`    | holds the two characters, gives SrcNull / TgtNull / Match     |
| `dist_fsm.sv`           | 2-bit distance state machine                                  |
| `nac_pe.sv`             | one PE = comparator + FSM                                     |
| `pe_chain.sv`           | one stage: a row of PEs with alternating phases               |
| `stream_launch.sv`      | re-times a stream into the first PE at either end             |
| `stream_sink.sv`        | collects the stream leaving the right end                     |
| `seq_feeder.sv`         | X0: FIFO unpacking, initial distances, wrap-around path       |
| `distance_counter.sv`   | X31: up/down counter, result write                            |
| `splash_fifo.sv`        | input / output FIFO (first word falls through)                |
| `splash_nac.sv`         | top: FIFOs, feeder, 32 stages, counter                        |

The top also brings out the target stream leaving the left end
(`row_chr_o`, `row_dst_o`), which carries the last table row mod 4.

## Simulating

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nac_pkg.sv tb/tb_nac_ref.sv tb/tb_splash_nac_full.sv \
  --top-module tb_splash_nac_full -o sim
./obj_dir/sim
```

Verilator finds the other modules by name through `-Irtl -Itb`.

| testbench                   | what it runs                                                                       |
|-----------------------------|------------------------------------------------------------------------------------|
| `tb_splash_nac_full`        | default 746-PE array: the 8-base example, a 373 × 373 comparison with its latency and peak update rate, 100 × (100 × 100) benchmark |
| `tb_splash_nac`             | 14-PE DNA and 9-PE ASCII arrays, 80 random comparisons; every mechanism is counted |
| `tb_splash_nac_versions`    | the DNA short, ASCII short and ASCII long arrays at full size                      |
| `tb_char_comparator` … `tb_splash_fifo` | one per module                                                         |

`tb_nac_ref.sv` is the reference: a plain full-width dynamic program.
`tb_nac_harness.sv` is the reusable stimulus and checking harness.

## Where this RTL departs from the original machine, and what is its own

Taken from the original design:

* the counter-flowing streams, and the first stage sending the target stream
  to the last stage over the wrap-around path;
* mod-4 distances;
* the DNA codes and wildcards;
* the SrcNull / TgtNull / Match interface between comparator and FSM, and
  the null rules of the FSM;
* two-phase clocking with alternating PEs;
* the per-stage PE counts of the four versions;
* a result up/down counter on the last stage;
* 32+4-bit FIFO words.

Own choices:

* the word layout, the END flag, and the END/length handshake to the
  counter;
* the counter's start value, taken from the count of entering targets;
* the null code 0 and ASCII equality matching;
* the FIFO depth and first-word-fall-through interface;
* asynchronous active-low reset;
* injecting nulls when the FIFO is empty;
* the boundary re-timing stages;
* the error flags.

The FSM update is written from the recurrence, not as the original's
per-gate logic equations.

Not modelled:

* The FPGA devices. The PEs are plain RTL, not CLB configurations.
* The SRAMs beside each stage. The comparator does not use them.
* The VME/VSB bus interfaces, the staging memory and the host. The FIFO
  host ports stand in for them.
* The original's 68-bit stage-to-stage buses. The links here carry only
  the characters and 2-bit distances, and each signal has one direction.
* A separate input and output clock domain for the FIFOs. Everything runs
  on one clock.
