# Keypad game controller on an FPGA

A 4x4 membrane-style switch matrix becomes a game controller for a PC. The
FPGA scans the keypad. It turns the key that is held into an ASCII character
(by default `w`, `a`, `s` or `d`, the movement keys of many games) and sends
that character again and again over a UART line at 19200 baud. On the PC, a
serial-to-keyboard redirection program turns each received character into a
key press. A USB-to-serial bridge carries the line into the PC. No processor
is involved: the path from switch to serial bit is a few dozen flip-flops.

```
 keypad ──kpr/kpc──► kp_scanner ─► kp_decode ─► frame_buffer ═╪═► uart_tx ──tx──► USB bridge ─► PC
  4x4 matrix          1 MHz clock domain                      │   19200 Hz bit-clock domain
```

The design is written in SystemVerilog (IEEE 1800-2017). All of it is
synthesizable except a behavioural model of the PLL. It follows a small FPGA student project for an Altera DE0-Nano
board (Cyclone IV EP4CE22F17C6). Where that project left things open or
unsafe, this RTL makes its own choices. They are listed under "What is the
original design's, and what is not".

## From key press to character

1. **Scan.** `kp_scanner` drives one column line low at a time, `kpc` =
   `0111 → 1011 → 1101 → 1110 → 0111 …`, one step per 1 MHz clock. So the
   whole keypad is looked at every 4 µs. The rows `kpr` have pull-ups. A
   closed switch on the driven column pulls its row low.
2. **Suspend.** While any row reads low, the scan stops on that column.
   `kpc` and `kpr` together now name exactly one crossing of the matrix.
3. **Look up.** `kp_decode` is combinational. It converts the low row and the
   low column into a key number `row*4 + col`, reads the character from the
   `KEYMAP` parameter, and outputs a complete 10-bit UART word. The word
   goes to the temporary buffer.
4. **Cross clocks.** `frame_buffer` registers the word at 1 MHz. It then
   hands the word to the 19200 Hz bit-clock domain (see below).
5. **Send.** `uart_tx` runs without pause. Every 11 bit periods it loads the
   word and shifts it out LSB first.

When the key is released, the rows go high again and the scan moves on. The
decoder then outputs the standby word, and the line falls silent.

### The word format and the standby trick

The decoder emits a word that is already framed: `{stop=1, data[7:0], start=0}`.
Bit 0 is sent first. With the default table:

| key (printed legend) | row (kpr low) | column (kpc low) | char | 10-bit word     |
|----------------------|---------------|------------------|------|-----------------|
| 2 / ↑                | kpr[3] (top)  | kpc[2]           | `w` 0x77 | `1_01110111_0` |
| 4 / ←                | kpr[2]        | kpc[3] (left)    | `a` 0x61 | `1_01100001_0` |
| 5                    | kpr[2]        | kpc[2]           | `s` 0x73 | `1_01110011_0` |
| 6 / →                | kpr[2]        | kpc[1]           | `d` 0x64 | `1_01100100_0` |

All other cases give the all-ones word:
- any other key;
- two or more rows low;
- no key at all.

The all-ones word has no start bit. When the transmitter shifts it out, the
line simply stays high, so "nothing pressed" needs no separate idle state
or valid flag. The transmitter always sends, and standby is just a word
that looks like an idle line. `kphit` (brought out as `ct[0]`) is high
whenever any row is low, including for unassigned keys.

To give other keys a character, change `KEYMAP` (package `gc_pkg`, type
`keymap_t`, index `row*4 + col`, row 3 = top, col 3 = left). An entry of
`8'h00` means "unassigned".

## Two clock domains and the temporary buffer

The board's 50 MHz oscillator feeds a PLL, which makes two clocks:

| clock | use | PLL setting | frequency |
|-------|-----|-------------|-----------|
| `clk` | keypad scan, decode | 50 MHz × 1 / 50 | 1 MHz |
| `bclk` | UART bit clock | 50 MHz × 1 / 2604 | 19201.2 Hz (0.006 % above 19200) |

The controller core `game_controller` takes `clk` and `bclk` as inputs. The
board-level top `game_controller_board` connects it to the PLL (see "Board
top and PLL model" below).

Both clocks come from one oscillator, but 2604 is not a multiple of 50. So a
`bclk` edge lands at a different place in the `clk` period each time, and
can fall as close as two oscillator cycles (40 ns) to a `clk` edge. The
core does not rely on that relationship. It treats the two clocks as
unrelated, so it also works with a bit clock from any other source.

In the original project, the decoder output went straight into the
transmitter on the other clock. A 10-bit word that changes just as `bclk`
samples it can be caught half old and half new. `frame_buffer` prevents
this:

- `src`: the decoded word, registered on `clk`.
- `s1`, `s2`: a two-flop synchroniser for each bit, on `bclk`.
- `s3`: the previous value of `s2`.
- `q`: takes `s2` only when `s2 == s3`, that is, when two successive
  synchronised samples agree.

`src` changes at most once per key press or release, thousands of bit
periods apart. A torn sample can therefore last one `bclk` sample at most,
and the agreement test rejects it. The cost is latency: `q` follows a change
of `src` on the fourth `bclk` edge after it, which is about 210 µs. The
testbench `tb_frame_buffer` checks this exact count.

`reset_n` (a push button) goes through one `reset_sync` in each domain. Each
reset synchroniser asserts at once and releases on the second edge of its
own clock. Reset puts the scan on the left column and fills all buffers
with the standby word, so the line comes out of reset idle.

## Transmitter timing

`uart_tx` counts 0 … 10 on `bclk`:

| counter value during cycle | what the closing `bclk` edge does |
|---|---|
| 10 | load `frame` into the output buffer; line driven high |
| 0 … 9 | drive buffer bit [count] onto `tx` |

The line therefore carries, per 11 bit periods:

`1 (gap) | start 0 | d0 … d7 | stop 1`

This is 8N1 at 19200 baud with one extra stop bit, and any 8N1 receiver
accepts it. A held key gives 1745 characters per second. A new key appears
on the line within about 20 bit periods (≈1 ms) of the press:
- up to 1 µs to reach `src`;
- 4 bit periods through the buffer;
- up to 11 bit periods waiting for the next load;
- 1 gap bit.

There is no handshake and no flow control.

## Board connections

These are the pins of the original DE0-Nano build:

| signal | FPGA pin | keypad / board |
|--------|----------|----------------|
| `kpr[3]` … `kpr[0]` | D5, A6, D6, C6 | keypad pins k0 … k3 (rows top to bottom); weak pull-ups on |
| `kpc[0]` … `kpc[3]` | E6, D8, F8, E9 | keypad pins k4 … k7 (columns right to left) |
| `TX` | J14 | to the RX input of the USB-serial bridge |
| `reset_n` | J15 | push button |
| `CLOCK_50` (PLL input) | R8 | 50 MHz oscillator |
| `ct[0]` … `ct[3]` | A12, C11, E11, C9 | indicators (`ct[0]` = key down) |

## Board top and PLL model

`game_controller_board` is the top level, with the board's port names:
`CLOCK_50`, `reset_n`, `kpr`, `kpc`, `ct` and `TX`. It contains the PLL
`pll` and the core `game_controller`.

Its reset wiring follows the original build:
- the PLL's `areset` is tied inactive;
- its `locked` output is left unused;
- the push button resets the core directly.

`rtl/pll.sv` is a **behavioural model** of the vendor PLL, with the vendor
part's ports (`areset`, `inclk0`, `c0`, `c1`, `locked`):
- two counters divide `inclk0` by `CLK0_DIVIDE_BY` = 50 and
  `CLK1_DIVIDE_BY` = 2604, each output high for half its period;
- both outputs change in the same process, so a rising edge they share
  happens in the same simulation step, as with phase-aligned PLL outputs;
- `locked` rises after `LOCK_CYCLES` = 1000 input cycles;
- an `initial` block gives the power-up state (unlocked, outputs low).

Do not synthesize the model for a real board. Replace it with the
generated vendor PLL of the same name, with these settings: multiply 1 and
divide 50 for c0, multiply 1 and divide 2604 for c1, 50 % duty, zero phase,
20000 ps input period. Clocks made by fabric counters are no substitute on
silicon.

## What is the original design's, and what is not

Taken from the original project:
- the block structure;
- the 1 MHz / 19200 Hz clocks and PLL ratios;
- the column scan order and reset column;
- suspending the scan while a row is low;
- the key table and word encoding;
- standby as all ones;
- the free-running 11-bit-period transmitter;
- the pins.

This design's own choices:
- **Baud rate.** One passage of the project's write-up calls the bit clock
  9600 Hz. Its serial settings, its PLL divider (2604) and the host
  program's settings all say 19200, and 19200 is used.
- **Word format.** The write-up also describes the word as start bit "1",
  7 data bits and a parity bit. The listed serial settings and the actual
  codes are 8N1 with a start bit of 0, and that is what is built.
- **Suspend timing.** The scan decides whether to hold in the same clock
  edge that would move the column. The original registered that decision a
  cycle earlier, through blocking assignments in two processes, which is a
  simulation race.
- **Clock-domain crossing and reset synchronisers.** Both are new (see
  above).
- **Key table as a parameter.** The original hard-coded it.
- **Load slot.** The line is driven high explicitly during the load slot.

Known limits, shared with the original:
- **No row synchroniser.** `kpr` is sampled directly by the 1 MHz clock.
  The only effect of a metastable sample is to keep or move the column
  for one clock.
- **No debouncing.** The transmitter repeats the current key as long as it
  is held, so contact bounce only shortens or lengthens the burst slightly.
- **Two keys in different columns.** The scan stops on whichever column it
  reaches first, so the key found first wins.

Not built as logic:
- the PLL, which is analog; it is modelled (see below);
- the keypad itself;
- the USB-serial bridge (a microcontroller's UART);
- the PC software.

## Files

| file | contents |
|------|----------|
| `rtl/gc_pkg.sv` | widths, word type, key table type and default W/A/S/D table, framing helpers |
| `rtl/game_controller_board.sv` | board-level top: PLL and core |
| `rtl/pll.sv` | behavioural model of the vendor PLL |
| `rtl/game_controller.sv` | controller core |
| `rtl/kp_scanner.sv` | column scanner with suspend |
| `rtl/kp_decode.sv` | key lookup and word framing |
| `rtl/frame_buffer.sv` | temporary buffer and clock-domain crossing |
| `rtl/uart_tx.sv` | free-running transmitter |
| `rtl/reset_sync.sv` | reset synchroniser |
| `tb/keypad_model.sv` | behavioural switch matrix with row pull-ups |
| `tb/uart_monitor.sv` | behavioural UART receiver |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end test |

Assertions in the RTL check two things:
- the column select is always one-cold;
- the transmitter's counter stays in range.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends any run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gc_pkg.sv tb/tb_game_controller_board.sv --top-module tb_game_controller_board
./obj_dir/Vtb_game_controller_board
```

Use the same command with `tb_game_controller`, `tb_pll`, `tb_kp_scanner`,
`tb_kp_decode`, `tb_frame_buffer` or `tb_uart_tx` to test one part alone.
Every run takes well under a second.

| testbench | what it checks |
|---|---|
| `tb_kp_decode` | all 256 `kpr`/`kpc` pairs against the literal 10-bit words; `kphit` |
| `tb_kp_scanner` | reset column, scan order, one-cold; each of the 16 keys is found within 4 clocks, held while pressed, and the scan resumes on release |
| `tb_frame_buffer` | reset to standby; for 40 words, exactly four `bclk` edges of latency and no intermediate value |
| `tb_uart_tx` | standby keeps the line high; the line matches each word bit by bit; the receiver model decodes `w a s d`; start bits exactly 11 bit periods apart |
| `tb_pll` | power-up unlocked; lock after 1000 cycles; c0 period 50 and c1 period 2604 input cycles at 50 % duty; `areset` drops lock |
| `tb_game_controller` | see below |
| `tb_game_controller_board` | the whole board from the 50 MHz oscillator, with every parameter at its default; see below |

`tb_game_controller` runs the whole controller at the real 1 MHz and
19200 Hz clocks with the default table, about 32 ms of simulated time. It
checks:
- each of `w`, `a`, `s`, `d` while held;
- first-character latency;
- spacing between characters;
- silence after release;
- an unassigned key and two keys in one column (both standby);
- reset while a key is held.

It also counts the mechanisms it exercised: scan wrap-around, scan suspend,
each character, standby with a key down, and reset.

`tb_game_controller_board` repeats the key sequence on the complete board,
starting from the 50 MHz oscillator. Its receiver model knows only the
nominal 19200 baud and samples in mid-bit. It also checks:
- the scan steps every 50 oscillator cycles;
- successive characters are exactly 11 × 2604 oscillator cycles apart.
