# A pattern-matching Gomoku player in hardware

This is a Gomoku (five-in-a-row) player for a 16x16 board. It plays white against a host PC,
which plays black. The player has no search tree and no evaluation function. Its whole strategy
is an ordered list of 5x5 **patterns** held in an external 8K x 8 SRAM. Each pattern says what a
5x5 patch of the board must look like, and which square of that patch to play if it does. For
every black move, the player slides a 5x5 window over its own copy of the board. It tries the
patterns in memory order. The first pattern that matches somewhere on the board gives the move.

The logic stays small and fixed, and all the strategy is in the data. The PC can rewrite the
pattern memory between moves, so it can change how the player plays without touching the logic.

The design was built on a board with several small FPGAs, and the RTL keeps that partition:

| chip | blocks | job |
|------|--------|-----|
| R1 | `pc_interface` | PC register port, latches of the latest black and white moves |
| X1 | `main_fsm`, `board_storage`, `board_window`, `address_counter`, `translator` | control, board copy, window selection, move arithmetic |
| R2 | `sram_controller`, `pattern_store`, `line_comparator` | pattern loading and row comparison |
| X1–R2 | `browspot_bus` | one 10-bit bus shared by the window row and the move spot |

`gomoku_player` is the top. It runs every block on one clock.

## Square codes

Board squares and pattern squares use one 2-bit code `{msb, lsb}` (`gomoku_pkg::square_e`):

| code | board | pattern |
|------|-------|---------|
| 00 | blank | must be blank |
| 01 | black | must be black |
| 10 | white | must be white |
| 11 | – | don't care |

Because both use the same code, a pattern square matches a board square when the two are
equal or when the pattern square is 11. That is all `line_comparator` does, five squares at a
time.

Coordinates are 8 bits, `{x[3:0], y[3:0]}` (`coord_t`). X is the column and Y is the row. A spot
inside the window is 6 bits, `{x[2:0], y[2:0]}` (`spot_t`).

## The pattern memory

One pattern takes 11 bytes, and patterns lie back to back from address 0:

| byte | content |
|------|---------|
| 2r (r = 0..4) | low bit of the five squares of pattern row r; square p in bit 3+p |
| 2r+1 | high bit of the same five squares, same bit places |
| 10 | spot: X in bits 7..5, Y in bits 4..2 |

Bits 2..0 of a row byte and bits 1..0 of the spot byte are unused. Square 0 sits in the lowest
used bit. Written out as binary text, a row therefore looks mirrored compared with the board.

Example: the pattern row `. O X . .` has the squares 11 10 01 11 11. Its low-bit byte is
`11101000`, and its high-bit byte is `11011000`.

The PC compiles the pattern file. Each pattern is stored in all eight orientations (four
rotations, with and without a mirror), and duplicate orientations are dropped. The order of the
patterns is their priority. The last pattern should match any board; a single blank square with
everything else "don't care" does. An 8 KB memory holds 744 patterns (`N_PATTERNS`); after the
744th the pattern pointer wraps to 0.

## Finding a move

The search has two loops. Each pattern is tried at all window positions before the next one is
loaded:

```
on black_ready falling:
    write the black move into the board
    pattern pointer := 0
    repeat:
        load the next pattern (11 SRAM reads)
        for window origin (x, y) in raster order, x and y from 0 to 11:
            row := 0
            while row < 5 and window row `row` matches pattern row `row`: row += 1
            if row == 5: move := origin + spot; go to done
done:
    latch the move, write it into the board as white, raise white_ready
```

Rows are compared one at a time. The board returns one full row per read, and the window picks
five squares out of it. The comparison of a window position stops at its first mismatching row.

### Timing

All counts are in cycles of the one clock.

- Loading a pattern takes 35 cycles: one cycle to start it, then three cycles per byte, then a
  one-cycle `done`.
- A matching row takes 2 cycles: COMPARE, then NEXT_ROW.
- A mismatch takes 2 cycles: COMPARE, then NEXT_POS, or NEXT_PAT at the last position.

So the time from the clock edge that lowers `black_ready` to the edge that raises `white_ready`
is

```
5 + sum over patterns tried of ( 35 + sum over positions scanned of (2*m + 2*[m<5]) )
```

where `m` is the number of leading rows that match at a position. Try a pattern that misses
everywhere on a typical board: most positions fail in the first row, so the pattern costs about
35 + 144*2 ≈ 320 to 400 cycles. In the end-to-end test, a move takes 1,000 to 23,000 cycles with
files of 17 and 35 patterns. At 34 MHz that is under a millisecond.

## Blocks

**`board_storage`** has one 16-word x 2-bit RAM per board column. All sixteen share the row
address. A read returns a whole row as two 16-bit planes, `row_lsb` and `row_msb`, with
column i at bit i. The read is combinational, like FPGA LUT RAM. A write changes one square.
Two 3-to-8 decoders turn the column number into a single write enable: `col[3]` picks the
decoder (`decoder3to8`). The RAM has a single port, so the row address is muxed in the top:

- the black move's Y in STORE_BLACK;
- the white move's Y in PUT_WHITE;
- the window row being compared at all other times.

Reset clears the board.

**`board_window`** picks columns x..x+4 from both planes and gives `brow = {msb[4:0], lsb[4:0]}`.

**`address_counter`** holds the window origin and steps it in raster order. `pos_last` marks
(11,11). It also gives the board row to read, `origin.y + row_idx`.

**`pattern_store`** holds 50 pattern bits and the 6-bit spot. A store counter places incoming
bytes. The row counter (`row_idx`, the "window counter") selects the pattern row shown to the
comparator. Once `row_idx` reaches 5, the store reads as all don't care.

**`sram_controller`** encodes its states by hand, so that every SRAM control pin is a state bit.
The pins then cannot glitch, and no decode logic is needed:

| state | code `{done, latch, oe, ce, pads}` |
|-------|------|
| IDLE | 00000 |
| ADDR | 00011 |
| READ | 00111 |
| LATCH | 01111 |
| DONE | 10000 |

In IDLE the pads are released: `pads_oe = 0`, and chip enable and output enable are inactive.
While the player is waiting, the PC owns the SRAM pins and may rewrite the patterns. `sram_we_n`
is tied high because the player only reads. An assertion checks that the SRAM is never enabled
while the pads are released.

**`main_fsm`** is a one-hot Moore machine with these states:

- WAIT
- STORE_BLACK: writes the black move and clears the pattern pointer, the window position and the
  row counter
- LOAD, LOAD_WAIT
- COMPARE, NEXT_ROW, NEXT_POS
- NEXT_PAT: clears the window and loads the next pattern
- SPOT: `busc` high; the translated move is latched
- PUT_WHITE
- DONE: `white_ready` stays high until the PC raises `black_ready` again

An assertion checks that the state stays one-hot.

**`browspot_bus`** is the shared bus between X1 and R2. There are not enough wires between the
two chips for both the 10-bit window row and the 6-bit spot, so both use one bus:

- with `busc` low, X1 drives the window row;
- in SPOT, `busc` is high and R2 drives the spot onto the low six wires.

Inside one design this is a multiplexer. The comparator reads the bus, and so does the
translator.

**`translator`** adds the spot to the window origin. The translated move goes into a register in
X1, and PUT_WHITE writes it into the board one cycle later. Without that register, the board
address would depend on the board's own output within a single cycle, which is a combinational
loop.

**`pc_interface`** is a small synchronous register port:

| addr | read | write |
|------|------|-------|
| 0 | black move `{x,y}` | black move |
| 1 | `{.., white_ready, black_ready}` | bit 0: `black_ready` |
| 2 | latest white move `{x,y}` | – |

A turn goes like this:

1. The PC writes the black move.
2. It clears `black_ready`.
3. It waits for `white_ready`.
4. It reads address 2.
5. It sets `black_ready`, which ends the turn.

`black_ready` comes out of reset high.

## Departures and own choices

The original design defines the partition, the board RAM organisation, the window, the
comparator rule, the pattern encoding, the hand-assigned SRAM states, the shared bus and the
one-hot Moore control. The following are this design's own choices:

- **The PC bus.** The original sat behind a PC expansion bus whose bus cycle is not described.
  `pc_interface` stands in for it with a generic register port.
- **SRAM read timing.** Three clocks per byte. Adjust `sram_controller` to the real part.
- **Loop order.** Patterns are the outer loop and positions the inner loop, so file order is
  priority. The pattern pointer restarts at 0 on every move.
- **Handshake.** `white_ready` is held until `black_ready` returns.
- **Spot byte layout.** X in bits 7..5 and Y in bits 4..2, 0-based, added to the window origin.
- **Board clearing.** The board is cleared by reset. The original board RAM started blank at
  power-up.
- **Single clock.** One clock for everything. The original chips had separate limits of about
  34 MHz (X1) and 62 MHz (R2), so one clock of 34 MHz or less suits both.
- **No-match case.** Nothing handles a search that matches no pattern. If the file has no
  catch-all pattern, the search loops over the patterns forever.

## Simulating

Each module is in `rtl/<name>.sv`, and `rtl/gomoku_pkg.sv` holds the shared types. Each block
has a self-checking testbench `tb/tb_<block>.sv`. The testbenches print
`TB_RESULT checks=N failures=M`. `tb/sram_model.sv` is a behavioural 8K x 8 SRAM used only by
the testbenches.

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gomoku_player \
    -y rtl -y tb +libext+.sv -Irtl rtl/gomoku_pkg.sv tb/tb_gomoku_player.sv -o sim
./obj_dir/sim
```

`tb_gomoku_player` runs the design at its default parameters and acts as the PC:

- It compiles pattern files in SystemVerilog, with rotations, mirrors and de-duplication.
- It writes them into the SRAM model through the released pins.
- It plays three games of 24 black moves on random empty squares.
- It changes the pattern file halfway through the first game.

A reference player in the testbench predicts every white move and the exact cycle count of every
search. The testbench checks both, and it compares the full board at the end of each game. It
also requires that each of these happens at least once:

- a pattern that matches nowhere, followed by the next pattern being loaded;
- a partial match;
- a spot sent over the shared bus;
- a pattern rewrite by the PC.

`tb_gomoku_long_game` plays one long game, 92 moves each, the longest game reported for the
original player. It uses a file of 35 seed patterns, which the testbench generates at random,
plus catch-all patterns that cover every square.

The unit testbenches compare against references written independently of the RTL:

- `board_storage`: random writes, every row read back;
- `board_window`: every window position;
- `line_comparator`: random rows biased towards matches;
- `translator`: exhaustive over origins and spots;
- `address_counter`: the full scan order and the wrap;
- `pattern_store`: random patterns and byte gaps;
- `sram_controller`: byte order, the 34-cycle load, pad release, pointer wrap;
- `main_fsm`: the output sequence cycle by cycle;
- `pc_interface`: the register map;
- `browspot_bus`.
