# Four-function calculator front end for a soft-processor system

This is the hand-written logic of a small special-purpose calculator on a
Cyclone III board (Terasic DE0). The calculator adds, subtracts, multiplies
and divides two 10-bit unsigned numbers. The arithmetic is done in software
by a Nios II soft processor. Everything between the processor and the user is
plain logic:

* ten slide switches enter an operand or an operation code;
* three push buttons save an operand, start a calculation, or clear;
* four seven-segment indicators show the saved operand, the result, or
  `----` when the calculation failed or overflowed.

The logic and the processor talk through one 32-bit parallel I/O word (an
Altera PIO called `pio_0` in the processor system). This RTL covers the logic
side of that word. The processor, its memory, the PIO, the JTAG UART and the
system ID peripheral are vendor IP and are not part of it. The processor's
half of the word is brought out as a top-level port, so the logic can be
wired to any processor or state machine that speaks the same handshake.

## Structure

```
calc_top
├── debouncer        x3   one per push button
├── alu_control_unit      switches/buttons -> requests on the I/O word -> display choice
└── seg7_driver           16-bit value or "----" -> four indicators
    └── seg7_lut     x4   one hex digit -> seven segments
calc_pkg                  shared widths, the I/O word structs, operation codes
```

The unit names follow the original system: a "Debouncer", an
"ALU_CONTROL_UNIT" and a "SEG7_DRIVER" built from four "SEG7_LUT" decoders.
The original gives what each unit does. How each one does it is this
design's own.

## The I/O word to the processor

The 32-bit word carries these fields, most significant first. The field
names and their order are the original allocation. The direction of each
bit and the meaning given to `s_ctrl0`/`s_ctrl1` are choices made here.

| bits    | field             | driven by | meaning here                                    |
|---------|-------------------|-----------|-------------------------------------------------|
| 31:16   | `Result`          | processor | result of the last operation                    |
| 15      | `s_done`          | processor | calculation answered                            |
| 14      | `s_operand_saved` | processor | operand stored; with `s_done`, means **error**  |
| 13      | `s_save_operand`  | logic     | request: store `Data_in` as an operand          |
| 12      | `s_reset`         | logic     | clear button held: forget operands, drop flags  |
| 11      | `s_ctrl0`         | logic     | request: run the operation coded in `Data_in`   |
| 10      | `s_ctrl1`         | logic     | which operand is being saved (0 first, 1 second)|
| 9:0     | `Data_in`         | logic     | switch value latched at the button press        |

In RTL the word is two packed structs, `calc_pkg::to_cpu_t` (bits 13..0) and
`calc_pkg::from_cpu_t` (bits 31..14). `calc_pkg::pio_word()` puts them back
together in the order above.

### Handshakes

Both transactions are four-phase request/acknowledge. This fits a processor
that polls the port at its own pace.

**Save operand.** On a debounced press of button 0, the switch value is
latched onto `Data_in` and `s_ctrl1` is set to the operand index. Then
`s_save_operand` is raised. It stays high until the processor raises
`s_operand_saved`. The saved value is then put on the display, the operand
index flips (first → second → first …), and the request drops. The unit then
waits for `s_operand_saved` to drop before it accepts another button.

**Calculate.** On a press of button 1, the switch value is latched onto
`Data_in` as the operation code and `s_ctrl0` is raised. When `s_done`
rises, the next clock edge shows `Result` on the display. If
`s_operand_saved` is high at the same moment, the edge shows `----`
instead. The unit then waits for the processor to drop both flags.

| `Data_in`      | operation       |
|----------------|-----------------|
| 0              | first + second  |
| 1              | first − second  |
| 2              | first × second  |
| 3              | first ÷ second (integer) |
| anything else  | unknown: the processor ignores it |

**Errors.** The word has no separate error bit, so an error is signalled by
raising `s_done` and `s_operand_saved` together. The processor should do this
for a result that does not fit the 16-bit field, a negative difference, and a
division by zero.

**Timeout.** No answer to a request may arrive within `TIMEOUT_CYCLES`
clocks (1 s at 50 MHz by default). This happens with an unknown operation
code, or with a processor that has stopped. The unit then withdraws the
request and shows `----`. The acknowledge may also fail to drop within the
same time. Then the unit shows `----` and returns to idle as well.

**Clear.** While button 2 is held, `s_reset` is high and the unit stays idle.
Holding the button also sets the display to `0000` and makes the next save
go to the first operand. Clear overrides any transaction in progress.

Button presses that arrive during a transaction are ignored. Two assertions
in `alu_control_unit` check the rules. At most one request is raised at a
time. `Data_in` and `s_ctrl1` do not change while a request is raised.

### What the processor program must do

The testbenches use `tb/nios_calc_model.sv` as the contract. It polls the
word every `POLL_CYCLES` clocks and takes the first of these actions that
applies:

1. `s_reset` is high: clear both operands and all flags.
2. `s_save_operand` is high and not yet acknowledged: store `Data_in` in
   operand `s_ctrl1` and raise `s_operand_saved`.
3. `s_ctrl0` is high and not yet answered, with a known code: compute, write
   `Result`, and raise `s_done`. Also raise `s_operand_saved` if the
   operation failed.
4. Both requests are low: drop both flags.

A real Nios II program written to these rules works with this logic
unchanged.

## Using the calculator

1. Set the first operand (0–1023) on the switches and press button 0. The
   display shows the operand.
2. Set the second operand and press button 0. The display shows it.
3. Set an operation code (0–3) and press button 1. The display shows the
   result.

Further codes can be run on the same operands by repeating step 3.

The display is **hexadecimal**. Each indicator shows one nibble, and the
rightmost indicator shows bits 3:0. For example, 831 appears as `033F` and
831 + 275 = 1106 appears as `0452`. 831 × 275 = 228525 does not fit in
16 bits, so it shows `----`. The original system also prints results on a
PC console through the processor's JTAG UART. That path belongs to the
processor and is not in this RTL.

## Buttons and debouncing

`debouncer` handles one button. A two-flop synchronizer comes first. After
it, a counter runs while the synchronized input differs from the accepted
level. The counter restarts whenever the input bounces back. When the input
has differed for `DEBOUNCE_CYCLES` consecutive clocks, the new level is
accepted. On an accepted press, the unit also gives a one-clock pulse.

A clean press acts 2 + `DEBOUNCE_CYCLES` clocks after it reaches the pin. A
bounce shorter than `DEBOUNCE_CYCLES` never gets through. The default is
500 000 clocks, which is 10 ms at the board's 50 MHz clock. Buttons are
active low, as on the DE0.

## Display

`seg7_driver` splits the 16-bit value into four nibbles and decodes each with
a `seg7_lut` (hex digits 0–9, A, b, C, d, E, F). The `dash` input replaces
all four digits with a middle bar. Segment outputs are active low, with
bit 0 as segment a and bit 6 as segment g. Each digit has a decimal-point
output, but the calculator does not use them, so they stay dark.

## Parameters

| parameter         | default    | where          | meaning                          |
|-------------------|------------|----------------|----------------------------------|
| `DEBOUNCE_CYCLES` | 500 000    | `calc_top`, `debouncer` | stable time before a button level is accepted |
| `TIMEOUT_CYCLES`  | 50 000 000 | `calc_top`, `alu_control_unit` | longest wait for the processor |
| `DATA_W`          | 10         | `calc_pkg`     | switches / `Data_in`             |
| `RESULT_W`        | 16         | `calc_pkg`     | `Result` field, displayed digits × 4 |

The widths 10 and 16, the four indicators and the three buttons match the
original system. The two cycle counts are chosen here for a 50 MHz clock.

## How far it follows the original, and where it departs

These parts follow the original:

* the units and their jobs;
* the field names and positions in the 32-bit word;
* ten switches, three buttons and four indicators;
* the save–save–calculate user sequence;
* `----` for a failure or an overflow;
* the four-instance decoder with nibble *i* on indicator *i*.

These are choices made here, where the original gives no detail:

* the direction of every bit of the word;
* the four-phase handshakes;
* the meanings of `s_ctrl0` and `s_ctrl1`;
* the numbering of the operation codes;
* signalling an error with both flags raised together;
* the timeout;
* the third button acting as clear;
* a hexadecimal display;
* the debounce method and its time;
* the `busy` and `events` outputs (one-clock pulses: operand saved, result
  shown, error, timeout), added for status lamps and testing.

These lint warnings are expected:

* `calc_top` leaves unused the press pulse of the clear button and the
  levels of the other two buttons;
* `DIGITS`, `BUTTONS` and `SEG_DASH` are unused by some of the modules that
  import the package.

## Simulation

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each has a watchdog that ends the run with a failure if the run hangs. They
run with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_calc_top \
  -y rtl -y tb +libext+.sv rtl/calc_pkg.sv tb/seg7_ref_pkg.sv tb/tb_calc_top.sv
./obj_dir/Vtb_calc_top
```

| testbench             | what it covers |
|-----------------------|----------------|
| `tb_seg7_lut`         | all 16 digits against segment lists written from the digit shapes (`tb/seg7_ref_pkg.sv`) |
| `tb_seg7_driver`      | directed and 200 random values, dash override, decimal points |
| `tb_debouncer`        | exact latency 2 + N, clean and bouncing presses/releases, one pulse per press, short glitches rejected |
| `tb_alu_control_unit` | 831 and 275 through all four operations; divide by zero; presses while busy; unknown code and silent processor timing out; clear; 40 random operand/operation sets against a reference; result shown one clock after `s_done` |
| `tb_calc_top`         | the whole front end with bouncing buttons and the processor model, with the display decoded from the segments; counts each mechanism (bounce filtered, save, result, error `----`, ignored press, timeout, clear) and fails if any never happened |
| `tb_calc_top_full`    | one complete save–save–add on `calc_top` at its default parameters (10 ms debounce, 1 s timeout); reads `0452` back; checks the 500 003-clock button-to-request latency. It runs in a few seconds. |

The testbenches other than `tb_calc_top_full` shorten the debounce and
timeout times through parameters. `tb/nios_calc_model.sv` is a behavioural
stand-in for the processor and its program. It is not synthesizable.
