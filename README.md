# Soft-error-tolerant 8T SRAM with SECDED self-refresh

Radiation and shrinking geometries make SRAM cells flip on their own: a
particle strike inverts one stored bit (a single event upset, SEU), and with
dense arrays sometimes two. Such *soft* errors damage no hardware; they only
matter if the corrupted word is read before it is rewritten. This design
protects every stored word with an (8,4) single-error-correcting,
double-error-detecting (SECDED) extended Hamming code and adds a
**self-refresh** controller that keeps reading the memory in the background,
repairs any word with one flipped bit and reports words with two. A word
therefore only becomes unreadable if two upsets hit it within one refresh
sweep.

The memory is built on 8T SRAM cells. Their read port is decoupled from the
storage node, so the constant background reads of the refresh can never
disturb a cell, and reads and writes use separate ports.

Next to the memory sits a small combinational channel: encoder, an XOR noise
mask, decoder. It shows the code's three cases (no error, one error
corrected, two errors flagged) on plain input and output pins.

## The (8,4) SECDED code

A 4-bit data word `D4 D3 D2 D1` (`D1` in bit 0) gets three Hamming parity
bits and one overall parity bit.

| bit of the stored word | 7  | 6  | 5  | 4  | 3  | 2  | 1  | 0  |
|------------------------|----|----|----|----|----|----|----|----|
| Hamming position       | -  | 7  | 6  | 5  | 4  | 3  | 2  | 1  |
| content                | d7 | D4 | D3 | D2 | P4 | D1 | P2 | P1 |

    P1 = D1 ^ D2 ^ D4        (checks positions 1,3,5,7)
    P2 = D1 ^ D3 ^ D4        (checks positions 2,3,6,7)
    P4 = D2 ^ D3 ^ D4        (checks positions 4,5,6,7)
    d7 = XOR of bits 6..0    (even parity of the whole word)

Example: data `0101` gives the Hamming word `0101101` (position 7 on the
left) and `d7 = 0`, so the stored byte is `0x2D`.

On reading, three check bits are recomputed over the received word, each
including its parity bit:

    C1 = b1 ^ b3 ^ b5 ^ b7,   C2 = b2 ^ b3 ^ b6 ^ b7,   C3 = b4 ^ b5 ^ b6 ^ b7

The syndrome `sh = {C3,C2,C1}` is the position of a single flipped bit. A
3-to-8 decoder turns it into a one-hot word; line 0 means "no error", and
lines 1 to 7 are XORed onto bits 1 to 7 to invert the faulty one. The overall
parity check `sp` (XOR of all 8 received bits) tells an odd number of flips
from an even one, and the two checks together decide:

| sh    | sp | meaning                              | action                     | flag            |
|-------|----|--------------------------------------|----------------------------|-----------------|
| 0     | 0  | no error                             | none                       | -               |
| 0     | 1  | the overall parity bit d7 flipped    | d7 inverted; data is good  | `parity_err`    |
| not 0 | 1  | one Hamming bit flipped              | bit `sh` inverted          | `single_err`    |
| not 0 | 0  | two bits flipped                     | **none**: passed on as read | `double_err`    |

With two flipped bits the syndrome points at a wrong position. Rather than
apply it, the decoder leaves the word as received. For example, `0101` with
positions 6 and 7 flipped reads back as `1001`, flagged as a double error.
Three flipped bits look exactly like one, so they get "corrected" to the
wrong word. No SECDED code can avoid that.

The code is built from small combinational blocks: `parity_generator` (XOR
of a word), `hamming74_encoder`, `decoder_3to8`, `hamming74_decoder`, and
`secded_encoder` / `secded_decoder` on top of them. The decoder has three
flag outputs and also a 2-bit `err_kind_t` (`ERR_NONE`, `ERR_PARITY`,
`ERR_SINGLE`, `ERR_DOUBLE`) from `secded_pkg`.

## Self-refresh

`self_refresh_controller` scrubs the array. It steps through the words, one
every `INTERVAL` cycles (default 64; 16 words, so one sweep takes 1024
cycles). For each word it:

1. **READ**: asks for the array's read port and waits until it is granted;
2. **CHECK**: decodes the word that arrives in the next cycle with its own
   SECDED decoder;
3. **WRITE** (single or parity-bit error only): asks for the write port and
   writes the corrected word back once it is granted.

A word with a double error is not written back, because the decoder cannot
know the right value. Instead the controller pulses `double_err_o`, counts
the error and reports its address. Software then has to rewrite that word.

**Sharing the array with the user.** The controller uses the same two array
ports as the user, and the user always wins:

* the refresh read is issued only in a cycle with no user read (`rd_gnt_i`);
* the write-back is issued only in a cycle with no user write (`wr_gnt_i`);
* if the user writes the word being refreshed after the refresh read it,
  the pending write-back is **dropped** (`dropped_o`). Otherwise the old
  corrected value would overwrite the user's new data. An assertion
  (`a_no_stale_writeback`) checks that a write-back never targets a word the
  user writes in the same cycle.

**Timing.** The interval timer runs freely, so the refresh reads of
successive words start exactly `INTERVAL` cycles apart whenever nothing
stalls them. Stalls only delay the next word. A clean word occupies the
controller for 2 cycles and a repaired one for 3, plus any stall cycles.
`INTERVAL` must be at least 3; elaboration stops with an error otherwise.
`sweep_done_o` pulses when the last word has been checked.

Status outputs are `corrected_o`, `parity_fix_o`, `double_err_o`,
`dropped_o` (one-cycle pulses), `event_addr_o`, `event_syn_o`, and the
counters `corrected_cnt_o` and `double_cnt_o`.

## The 8T SRAM array (behavioural model)

`sram_8t_cell` and `sram_8t_array` are **behavioural models**: they stand
for a transistor-level cell and a custom macro, and are meant for
simulation, not synthesis.

* **Cell.** It has a 6T storage core written through `BL`/`BLB` while the
  write word line `WWL` is high, and a separate 2-transistor read stack. With
  the read word line `RWL` high, the stack discharges the precharged read bit
  line if Q = 0, so the read bit line shows Q directly. The model stores on
  the rising edge of `WWL`, and only if `BL` and `BLB` differ: with both
  precharged high, a word-line pulse changes nothing. An extra input `seu`
  flips Q on a rising edge. It stands for a particle strike and is not a pin
  of a real cell. Q is not reset, just as real SRAM powers up at random.
* **Array.** `DEPTH` x `WIDTH` cells (default 16 x 8, one SECDED word per
  row), with row decoders, bit-line drivers and a precharged read bit line
  per column (any selected cell holding 0 pulls it low).
  * Write: the request is registered at a rising edge. The bit lines are then
    driven and the row's `WWL` is pulsed during the low half of that cycle.
  * Read: the address is registered and the row's `RWL` is held for the next
    cycle, in which `rdata_o` is valid. Outside a read, `rdata_o` shows the
    precharged value (all ones).
  * A read in the cycle right after a write to the same row returns the new
    word.

  Reads and writes to different rows can happen in the same cycle.

## Top level: `ecc_sram_top`

Parameters are `DEPTH = 16`, `REFRESH_INTERVAL = 64` and `CNT_W = 16`.

| port group                                   | function |
|----------------------------------------------|----------|
| `wr_en_i`, `wr_addr_i`, `wr_data_i[3:0]`     | user write: the data is encoded and stored |
| `rd_en_i`, `rd_addr_i`                       | user read request |
| `rd_valid_o`, `rd_data_o[3:0]`, `rd_single_err_o`, `rd_parity_err_o`, `rd_double_err_o` | decoded word and its error kind, one cycle after `rd_en_i` |
| `seu_i[DEPTH][8]`                            | upset injection, one strike input per stored bit |
| `refresh_en_i`, `rf_*`                       | self-refresh enable and status, plus `rf_rd_stall_o` / `rf_wr_stall_o` (a refresh access waiting for the user) |
| `ch_data_i`, `ch_noise_i[7:0]`, `ch_*`       | channel demonstration: clean, noisy and corrected codewords, decoded data, syndrome, flags |

A user read corrects the data it returns, but it does **not** repair the
array. Only the self-refresh writes corrected words back. Reset `rst_n` is
asynchronous and active low. It clears the controller and the array
periphery, but not the stored bits.

The three flags are sometimes labelled `1bit_error` (`single_err`),
`parity_error` (`parity_err`) and `2bit_error` (`double_err`).

## Files

`rtl/` holds one unit per file:

* `secded_pkg.sv`: widths, the `data_t`/`code_t`/`syn_t` types and `err_kind_t`.
* The code: `parity_generator.sv`, `hamming74_encoder.sv`, `decoder_3to8.sv`,
  `hamming74_decoder.sv`, `secded_encoder.sv`, `secded_decoder.sv`,
  `secded_codec.sv`.
* The memory: `sram_8t_cell.sv` and `sram_8t_array.sv` (behavioural),
  `self_refresh_controller.sv`, and `ecc_sram_top.sv` (the top).

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`) and
`secded_ref_pkg.sv`. That package is a reference model of the code written
independently of the RTL: it encodes from the definition of the Hamming code
and decodes by searching for the nearest of the 16 codewords.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert -Irtl \
      rtl/secded_pkg.sv tb/secded_ref_pkg.sv rtl/*.sv tb/ecc_sram_top_tb.sv \
      --top-module ecc_sram_top_tb -o sim
    ./obj_dir/sim

Replace the testbench file and `--top-module` to run another one. For a
lint pass on a module, use `verilator --lint-only -Wall rtl/secded_pkg.sv
rtl/*.sv --top-module <module>`. Its only warnings are for outputs that are
deliberately left unconnected.

## What the testbenches show

* **Code blocks.** Exhaustive runs against the reference model:
  * every data word through both encoders, with minimum codeword distances
    of 3 and 4;
  * every codeword with each single bit flipped through the Hamming decoder;
  * all 256 possible received bytes through the SECDED decoder (16 clean, 16
    parity-bit errors, 112 single errors, 112 double errors);
  * the channel demonstration sequence: 16 words clean, with one flipped bit
    and with two flipped bits, a parity-bit error, three flipped bits, and
    the `0101` example.
* **Cell and array.** Writes, holds and reads, upset flips, simultaneous read
  and write, and read-after-write.
* **Controller.** Run on an 8-word memory model. It repairs single and
  parity-bit errors and leaves a double error in place and reports it. Reads
  are spaced exactly `INTERVAL` apart. Under random port contention it
  stalls but still repairs every word, and it drops a write-back after a
  colliding user write.
* **Top.** `ecc_sram_top_tb` runs at the default size. It fills the memory,
  injects single, parity-bit and double upsets, checks what user reads see,
  lets one refresh sweep run against random user reads, and then forces a
  dropped write-back and a stalled write-back. Each mechanism (read stall,
  write stall, drop, repair, parity repair, double-error report, sweep, all
  user-read and channel error kinds) must occur at least once.

* **Workload.** `ecc_sram_workload_tb` runs the code's evaluation sequence
  through the memory instead of the bare codec. All 16 data words are
  stored, then every word gets, in turn, no upset, one Hamming-bit upset, a
  parity-bit upset, two upsets and three upsets. User reads and a full
  refresh sweep must match the reference model after each round: single and
  parity upsets are repaired, double upsets are reported and left in place,
  and triple upsets are miscorrected into another valid word.

Each testbench has also been run against a deliberately broken copy of its
module, and each reports failures there.

## Where this design makes its own choices

The code, its bit order, the decode table, the 8T cell's behaviour and the
idea of scrubbing by periodic read, check and write-back are the core of the
design. The following are choices made here and can be changed freely:

* The array depth is 16 words.
* The refresh rate is one word every 64 cycles, scanned in ascending order.
* The user has priority over the refresh, and a write-back is dropped after
  a colliding user write.
* A double-error word is passed on uncorrected.
* User reads do not write corrected data back.
* The noise mask is 8 bits wide, over the whole stored word.
* The array ports are synchronous and the cell carries an upset-injection
  pin.
* The status counters and pulses are additions for observing the refresh.

Not built:

* the board-level wrapper of an FPGA demonstration (switch and LED mapping);
* an extended code that also corrects two *adjacent* flipped bits
  (SEC-DED-DAEC). It would be the natural next step against multi-cell
  upsets, but it is not part of this design.

Not verified: the 8T behavioural models capture the logic function and the
write and read sequencing only. They say nothing about noise margins, timing
or power.
