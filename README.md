# RFID tag sequence generator

A small, low-power digital block for a passive RFID tag. When the tag's PLL
has locked onto the reader's carrier it raises **enable**; the generator then
waits a tag-specific delay and sends a fixed 64-bit identification word
**twice** (128 bits, so the reader can check one copy against the other),
framed by a **transmit-enable** output, and finally switches itself back into a
low-power idle state. The delay exists because many tags near each other see
the carrier at the same moment and would otherwise all answer at once on the
same band: giving each tag a different delay, in whole transmission slots,
spreads their answers out in time.

Everything a tag is programmed with — the delay and the identification word —
sits in one 8 x 8 mask ROM. Word 1 of the ROM is the delay code; the same
64 ROM bits, word 1 included, are what gets transmitted.

## Numbers at a glance

| Quantity | Value |
|---|---|
| Input clock `fc` | 625 kHz (1.6 us per bit) |
| Bits per transmission | 128 (the 64 ROM bits, twice) |
| Transmission time | 128 x 1.6 us = 204.8 us, one `fc/128` period |
| Delay | code x 204.8 us, code = ROM word 1, 0..255 |
| Default delay code | `01000000` (column 1 first) = 2, i.e. 409.6 us |
| First bit sent | ROM word 2, column 2 |
| Worst-case cycle for 256 tags | 256 x 204.8 us = 52.4 ms (about 18-19 reads/s) |

## How a cycle runs

All logic runs on the single 625 kHz clock. Counting the first clock cycle in
Active mode as cycle 0 and calling the delay code `v`:

1. **Passive.** Only the mode control (`power_supply`) is really doing
   anything. The column and word selectors both point at position 1, so the
   ROM's column lines carry word 1 — the delay code — and the delay block's
   code register follows them.
2. **Power-up.** The clock edge that sees `enable` high after it was low
   switches the rail on (`active` = 1). The divider and the delay counter
   start from zero.
3. **Delay.** The 8-bit delay counter advances once per 128 cycles (one
   `fc/128` period). `tx_en` is the comparison *counter == code*, so it rises
   in cycle `128*v`. With `v = 0` it is high in cycle 0.
4. **Transmission, cycles `128*v` .. `128*v+127`.** The code register stops
   following the column lines (other words now pass over them), so `tx_en`
   stays high for exactly one `fc/128` period. `seq_out` in transmission cycle
   `k` is

       ROM[word 2 + (k/8 mod 8)][column 2 + (k mod 8)]     (positions wrap 8 -> 1)

   i.e. word 2 columns 2..8 then column 1, then word 3 the same way, ...,
   ending with word 1; after 64 bits the pattern repeats.
5. **Power-down.** On the clock edge that ends that `fc/128` period the rail
   goes off, the counter moves on anyway, and `tx_en` falls. The generator is
   back in Passive mode.

A new cycle needs a new *rising* edge of `enable`; holding it high does not
restart the generator. Dropping `enable` at any point in Active mode switches
the rail off at the next edge and abandons the cycle (a partial transmission
is cut off). The intended use is an `enable` that stays high for the whole
cycle — e.g. a 500 Hz square wave leaves 1 ms, against the 614.4 us the
default program needs.

## The selection trick: why transmission starts at word 2, column 2

The ROM is addressed by two one-hot **ring shift registers** rather than a
binary address: a column ring that moves every clock and a word ring that
moves every eighth clock (at `fc/8`). Before transmission both rings are
held with position 1 set. That is what puts word 1 on the column lines during
the delay, and it is why the sequence does not start at word 1, column 1: the
rings' first move coincides with the start of transmission, so the first
position actually *used* is 2 on both rings. Since both rings then move in
lockstep — the word ring moves exactly when the column ring leaves column 1 —
each word is read as columns 2..8 followed by column 1 of the *same* word.

In `shift_register` this is modelled by a stored ring `q` that is held at
position 1 while `en` is low and rotates on `step` while `en` is high, and an
output that is tied to position 1 while `en` is low and shows `q` rotated by
one while `en` is high. The output is therefore one position ahead of the
stored ring during transmission, which gives "position 2 first" with no extra
cycle of latency.

## The delay comparator and why it latches

The delay code comes straight off the ROM column lines of whichever word is
selected. During the delay that is word 1, but as soon as transmission starts
the word ring moves and the column lines carry identification data. If the
comparator kept looking at them, `tx_en` would drop one bit into the
transmission. `delay_block` therefore copies the column lines into a register
every cycle while `tx_en` is low and freezes it while `tx_en` is high.

The delay code's bit order is fixed by the default program: `01000000`, read
from column 1 upward, must mean 409.6 us = 2 x 204.8 us, so **column 1 is the
least significant bit** of the code.

## Modules

| File | Role |
|---|---|
| `rtl/seq_gen_pkg.sv` | Sizes, default ROM contents, the Passive/Active `mode_e` type |
| `rtl/seq_gen_top.sv` | Chip top: wires the blocks below; `ROM_DATA` parameter |
| `rtl/power_supply.sv` | Mode control: rail on at an `enable` rising edge, off at the end of transmission or when `enable` falls |
| `rtl/clock_div.sv` | 7-stage divider: `fc/8` and `fc/128` levels and end-of-period enables `fc1_tick`, `fc2_tick` |
| `rtl/delay_block.sv` | 8-bit counter of `fc/128` periods, latched code, equality -> `tx_en` |
| `rtl/shift_register.sv` | One-hot ring selector, used twice (columns, words) |
| `rtl/rom.sv` | 8 x 8 ROM, one-hot word/column select, column lines out |
| `rtl/test_cells.sv` | Stand-alone test D and T flip-flops on their own pins |
| `rtl/dlatch.sv`, `rtl/dff.sv`, `rtl/tff.sv` | D latch; master-slave D flip-flop made of two latches; T flip-flop made of the D flip-flop |

Top-level ports: `clk` (625 kHz), `rst_n`, `enable`, `seq_out`, `tx_en`,
`active`, and the test pins `test_clk`, `test_d`, `test_t`, `test_dff_q`,
`test_tff_q`.

### Programming a tag

`ROM_DATA` is a 64-bit parameter; bit `8*w + c` is ROM word `w+1`, column
`c+1`. Bits `[7:0]` are therefore the delay code (bit 0 = column 1). To
program a transmit-order bit string `s[0..63]`, put `s[k]` at word
`1 + ((k/8 + 1) mod 8)`, column `1 + ((k + 1) mod 8)` — equivalently, the
last eight bits sent are word 1 in the order columns 2..8, 1.

The default program transmits

    0100100001010101010100100101101001100101 0000000000000000 10000000

The first 40 bits are the identification value the design is specified
with; the value of ROM words 7 and 8 (the 16 zeros) is not specified and is a
placeholder; the last 8 bits are the delay code `01000000` in transmit order.

## Where this RTL departs from the transistor-level circuit

The original is a full-custom CMOS circuit with ripple clocks and power
gating. This RTL keeps its behaviour at the clock-cycle level but is written
as ordinary synchronous logic:

* **One clock.** The original clocks the word ring with `fc/8` (inverted), the
  delay counter with `fc/128`, and samples the end of transmission with a
  delayed, inverted `fc/128` on a negative-edge flip-flop. Here every register
  is on `clk` and those blocks step on one-cycle enables from `clock_div`.
  The divider is a synchronous counter, not a chain of toggle flip-flops.
* **Exact slot timing.** Delay and transmission are exact multiples of 128
  cycles from the first Active cycle. The original's edge alignments differ
  by fractions of a slot; its power-down happens on an `fc/128` falling edge
  after `tx_en` drops, here on the edge that ends transmission.
* **Power gating as logic.** The switched supply is the signal `rail`
  (brought out as `active`); blocks behind it are held at their reset values
  while it is low, which is what the original's pull-downs and initialisation
  circuits achieve. No current or power behaviour is modelled.
* **Reset.** An asynchronous active-low `rst_n` is added. The original has no
  reset pin and relies on the always-powered parts.
* **Enable** is taken to be synchronous to `clk` (both come from the PLL);
  there is no synchroniser. Add one if it is not, and expect one or two extra
  cycles of delay.
* **Output buffers** (two-inverter pad drivers) are not represented; the top
  drives its outputs directly.
* The PLL and the mixer/modulator that surround this block on the tag are
  outside it: `clk` and `enable` come from the PLL, and `seq_out`/`tx_en` go
  to the modulator.

The primitive cells `dlatch`, `dff` and `tff` follow the original's
construction (latch -> master-slave flip-flop -> toggle flip-flop) and are used
only in the test structures. Lint and synthesis report the T flip-flop's
feedback as a loop through latches; the two latches are never transparent at
the same time, so in operation it is not a combinational loop. The datapath
itself uses inferred edge-triggered registers.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With plain Verilator, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv --top-module tb_seq_gen_top \
      rtl/seq_gen_pkg.sv tb/tb_seq_gen_top.sv
    ./obj_dir/Vtb_seq_gen_top

| Testbench | What it covers |
|---|---|
| `tb_seq_gen_top` | Whole chip at default parameters with a 500 Hz `enable`: 409.6 us delay, 204.8 us `tx_en`, the 128 bits against the expected string, rail on for 384 cycles, no restart while `enable` is held, abort in the delay and in the transmission, repeatability, test cells |
| `tb_seq_gen_delays` | Four tags with other ROM programs, delay codes 0, 1, 37 and 255: start cycle, length and all 128 bits |
| `tb_clock_div`, `tb_shift_register`, `tb_rom`, `tb_delay_block`, `tb_power_supply` | Each block against a cycle-level model |
| `tb_dlatch`, `tb_dff`, `tb_tff`, `tb_test_cells` | The primitive cells and the test structures |

All of them finish in well under a second of simulation time. `-Wno-fatal`
is needed because Verilator reports the latch-based test T flip-flop as a
combinational loop (UNOPTFLAT); it simulates correctly.
