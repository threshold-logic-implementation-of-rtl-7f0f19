# Threshold-logic building blocks of a modular computer

In 1970 RCA studied whether parts of NASA's Modular Computer, a machine
built from a small set of LSI "characters", could be made smaller and
faster with threshold gates in place of TTL NAND gates. A threshold
gate outputs 1 when the weighted sum of its inputs reaches a threshold,
and its complement output is always available. The study designed four
pieces of the machine with such gates:

- the **L1 general-logic character**: an 8-bit slice of a 32-bit
  rotate/shift/complement unit that moves data by 1 to 31 places in one
  pass, plus an L register with an incrementer;
- an **8-bit parity circuit** made of five threshold gates;
- the **configuration assignment unit (CAU)** logic: the switch that
  connects computer modules, one bit path of the search mode logic, and
  the 8-stage up/down idle-time counter;
- a preliminary **L2 arithmetic character**: a threshold-gate full adder
  with mode controls, an 8-bit adder with carry look-ahead gates, and its
  registers. Four L2 characters form a 32-bit adder.

This repository describes each of these pieces in synthesizable
SystemVerilog. It models their logic function, not their current-switch
circuits. Where a piece is itself a threshold function (the parity
circuit, the adders, the incrementer), the RTL builds it from a generic
weighted threshold gate with the weights and thresholds of the original
design. Where the original used threshold gates as switches or AND-OR
logic, the RTL says what the logic does. The top module, `mc_tl_top`,
places the four pieces side by side. They do not connect to each other,
because in the machine they belong to different units.

## The L1 word: a 32-bit shift in one pass

This is the largest and least obvious part. Four L1 characters
(`l1_character`) make a 32-bit word (`l1_word`). Each character's C
inputs give its byte position: C=0 holds bits 0-7 and C=3 holds bits
24-31.

### Operation and count

| m | LS | count `d` | operation                           |
|---|----|-----------|-------------------------------------|
| 1 | x  | n         | rotate left by n                    |
| 0 | 1  | n         | shift left by n, zero fill          |
| 0 | 0  | n > 0     | shift right by n, zero fill         |
| 0 | 0  | 0         | complement: output bus = ~input bus |

The count is the five lines `d = {d0,d1,d2,d3,d4}`, with d0 the most
significant. `d0,d1` give whole bytes (B) and `d2..d4` give bits (b), so
n = 8B + b. There is no rotate right: a rotate right by n is a rotate
left by 32-n. A shift right by 0 would do nothing, so that code is used
for the complement.

### Two rotations and two masks

The datapath only rotates left. A shift right is a left rotation by the
two's complement of the count, 32-n, followed by masking.

1. **1st rotate** (`l1_rotate1`, 0-7 bits). Each of the 8 output bits
   is a one-of-eight switch over a 15-bit window. The window is the
   character's own input bus IB plus **IR+**, the upper seven bits of
   the input bus of the character one position below. The character
   sends its own `IB[7:1]` upward on **IR-**. Together the four 1st
   rotates turn the 32-bit word left by the bit count.
2. **2nd rotate** (`l1_rotate2`, 0-3 bytes). Each character picks one
   of four 8-bit buses. RI1 is its own 1st-rotate output. RI2, RI3 and
   RI4 are the 1st-rotate outputs of the characters one, two and three
   positions below. Select line k therefore rotates the word by k
   bytes.
3. **Bit mask**. In a shift, the bits rotated in from the other end of
   the word must become zeros. Only one character holds a partly
   cleared byte: the character at position 0, before the byte
   rotation. `l1_bit_mask` enables blanking there. It blanks from the
   LSB upward on a shift left and from the MSB downward on a shift
   right. The bit decoder's seven thermometer lines
   (`l1_bit_decoder`) say how many bits to blank: b in either
   direction.
4. **Byte mask**. `l1_byte_mask` blanks whole output bytes. On a shift
   left it blanks output positions p < B. On a shift right it blanks
   positions with p + B ≥ 4. These are exactly the condition pairs of
   the original mask generator (C0 with B≠0, C1 with B2 or B3, and so
   on).
5. **Complement**. With count 0, m=0 and LS=0, the 1st rotate selects
   rotation 0, and all masks and all byte selects are 0. The 2nd rotate
   then gates the complement of RI1 (that is, of IB) onto the output
   bus. That idle state of the byte switch is the only hardware the
   complement needs.

For a shift right by n = 8B + b, the 1st rotate select lines
(`l1_rot1_select`) map bit line k to select line (8-k) mod 8. The byte
select (`l1_byte_select`) uses the byte part of 32-n, which is
(4 - B - [b≠0]) mod 4. That formula needs to know whether b is zero, so
the byte select also takes the bit decoder's line 0. This input is this
design's own addition. Without it, right shifts by whole bytes would be
one byte off.

Worked example, shift right by 11 (B=1, b=3): the 1st rotate turns left
by 5, the 2nd rotate by 2 bytes, a total of 21 = 32-11. The character at
position 0 blanks its top 3 bits, and output byte 3 is blanked whole.
The zeroed bits are therefore 21..31.

### L register and incrementer

Each character has an 8-bit L register (`l1_lreg_incr`). It loads from
the output bus when `l_dest` is high at a clock edge, and `reset_l_n`
(active low) clears it. Each incrementer stage has two threshold gates:

- a (1,1; T=2) gate for the carry;
- a (1,1,2; T=3) gate fed by the L bit, the carry and the inverted
  carry, which gives their exclusive-or.

The carry ripples through the stage, and in the word it ripples on
through all four characters. There is no look-ahead. The output lines
follow the original control table:

| l_select | incr_select | output           |
|----------|-------------|------------------|
| 0        | 1           | L + carry_in     |
| 1        | 0           | L                |
| 1        | 1           | 0                |
| 0        | 0           | 0 (design choice) |

### Timing

The rotate, shift and mask path is purely combinational: any count
takes one pass. The original circuit quotes about 30 ns through the
character, or 45 ns including an L register and incrementer cycle. Only
the L register is clocked.

## Parity from five gates (`parity8`)

Four gates each see all eight inputs with weight 1, with thresholds 2,
4, 6 and 8. Their inverted outputs enter a fifth gate with weight 2.
That gate also sees the eight inputs and has threshold 9. With s inputs
high, the fifth gate's sum is s + 2·(number of even thresholds above s).
This sum is 9 for odd s and 8 for even s, so the output is the odd
parity, the XOR of the inputs.

## CAU logic

- `cau_switch`: connects one of `N_IN` module outputs (CUiQ) to the
  output bus. Each input's control line is the OR of two bits of the
  configuration selection register (CSR), such as CSR1+CSR2. The circuit
  is drawn with two inputs, but three are used in practice, so
  `N_IN = 3` by default.
- `cau_sml`: one bit path of the search mode logic. A one-of-four switch
  (K1..K4 select X1..X4) feeds a storage register, which has CLOCK and
  RESET. The storage register feeds the CSR, a master-slave flip-flop
  with CLOCK, SET and RESET. The CSR lags the storage register by one
  transfer.
- `cau_updown_counter`: the 8-stage idle-time counter. Every stage's
  master clock is inhibited unless one of these holds:
  - counting up and all lower stages are 1;
  - counting down and all lower stages are 0.

  All stages are enabled in parallel and change on the same clock.
  `carry_out` (look-ahead) and `cascade_in` let counters be chained.
  Set and reset act on all stages, and reset wins. Asserting up and down
  together holds the count.

## L2 arithmetic

`l2_full_adder` has two gates:

- a majority gate (1,1,1; T=2) gives the carry Co;
- a gate over A, B, C and the inverted carry (weight 2, T=3) gives the
  sum.

K1 is OR'ed into B and K2 into the carry input:

| K1 | K2 | carry in | function                                  |
|----|----|----------|-------------------------------------------|
| 0  | 0  | 0        | add                                       |
| 0  | 0  | 1        | subtract, when ~B is loaded into B        |
| 0  | 1  | x        | ~(A xor B); A xor B when ~A is loaded     |
| 1  | 1  | x        | sum = A (transfer A)                      |

`l2_adder8` chains eight cells. It adds four look-ahead threshold gates,
one per bit pair:

carry(2j+2) = [2·A(2j+1) + 2·B(2j+1) + A(2j) + B(2j) + carry(2j) ≥ 4].

Even cells take their carry from a look-ahead gate and odd cells from
the cell below. The source says only that four look-ahead gates exist;
grouping them by bit pairs is this design's choice.

`l2_character` combines the adder with two 8-bit storage registers, A
and B (`l2_storage_register`: data, transfer, no set or reset). Both
registers load from one data bus.

`l2_word` chains four characters into a 32-bit adder. Each character's
C8 is the carry in of the next, so the carry crosses the characters one
byte at a time; inside a byte the look-ahead gates apply. The original
design puts the carry-in to bit 32 delay at about 142 ns. It mentions
byte-parallel look-ahead across characters only as an option if that
delay is too long, and it is not built here.

## Primitives

- `tl_threshold_gate`: weighted threshold gate with parameters `N`,
  `T` and packed 4-bit `WEIGHTS`, and true and complement outputs.
- `tl_switch`: the double-level switch. Data sit on the upper
  switches and controls on the lower ones. The output is the data input
  whose control is high, and 0 if none is.
- `tl_gateable_ff`: the gateable flip-flop with set and reset.
- `tl_pkg`: the L1 operation type and its decoding from m and LS.

## How far this follows the original, and where it departs

These parts follow the original circuits closely:

- block structure and bus widths of the L1 character;
- the C position table;
- the mask-generator condition pairs;
- the incrementer's output table;
- the parity and full-adder gate weights and thresholds;
- the adder control table;
- the counter's inhibit rule.

These are this design's own choices:

- **Clocking.** The original storage elements are latches, gated by
  their own clock lines, and master-slave pairs. Here every storage
  element is an edge-triggered register on one clock `clk`, and the
  original clock lines (L DEST, TRANSFER, storage CLOCK, CSR CLOCK)
  become load enables. Set and reset are synchronous.
- **L1 wiring between characters.** IR+ comes from the character
  below, RI2..RI4 come from the characters 1..3 positions below, and the
  incrementer carry passes between characters. The numbering of the
  d lines is also a choice.
- **Byte select for right shifts** uses the extra bit-count-zero input,
  as described above.
- **The untabulated incrementer control 0/0** gives 0.
- **CAU controls.** The CAU switch takes each input's control as an
  already-OR'ed CSR line. Several active controls OR their inputs.
- **Look-ahead gate grouping** in the L2 adder.
- **L2 bussing** (a single data bus), byte-by-byte carry between L2
  characters, and the counter's cascade ports.

Not modelled:

- the analog level shifters between TTL and threshold levels;
- the G1 register-storage character and the CAU inhibit logic beyond
  the counter, which are only named;
- the control, memory and I/O units;
- the alternative parity circuits (full-adder based, and minimum delay).

## Simulating

Each module `X` in `rtl/` has a self-checking testbench `tb/X_tb.sv`.
The testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. `tb/l1_ref_pkg.sv` is a word-level reference for
the L1 operations. The checks cover:

- exhaustive input spaces where they are small: parity, the adder cell,
  the 8-bit adder over all operands, and the decoders;
- every count and operation of the L1 word on random data.

`tb/mc_tl_top_tb.sv` runs the whole top at its default parameters. Each
clock it applies a random operation to every piece and checks the result
against its model. It also counts each mechanism (rotate, both shifts,
complement, bit and byte masking, L load, increment, carry and reset,
each switch input, SML transfer, set and reset, counter wrap in both
directions, and the four 32-bit L2 functions). It fails if any mechanism never
happens.

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tl_pkg.sv tb/l1_ref_pkg.sv rtl/*.sv tb/mc_tl_top_tb.sv \
  --top-module mc_tl_top_tb -Mdir obj -o sim
./obj/sim
```

Replace `mc_tl_top_tb` with any other `*_tb` to run that block's test.
Every testbench finishes in well under a second.
