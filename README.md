# Thruster driver module, synchronous SystemVerilog

A satellite's attitude and orbit control electronics fire small thrusters through a *thruster
driver module*. That module sits on the I/O bus of the bus-management processor. It turns
register writes into thruster drive lines and timed pulse commands. It also collects serial
telemetry, thruster on-time history and data-ready flags for the processor to read back.

Older versions of this module were asynchronous: processor strobes and command bits clocked the
interface logic directly. This design follows the paper *Design of Thruster Driver Module using
Synchronous Design Technique in VHDL*. Everything runs on **one 1 MHz clock**. Every
asynchronous event is first turned into a one-clock pulse by a small three-flip-flop
synchroniser, and only that pulse is used. The RTL here is a new SystemVerilog implementation of
that architecture. Where the paper gives the function of a part but not its details (register
map, bit layouts, polarities), this implementation makes its own choices. They are marked below.

## Block overview

```
            ia, m_ion, io_dis, rdn ──► io_decoder ──► csn[24:0], rden1
                               wrn ──► sync_edge (falling) ──► wr_stb
 inbus ─┬─► output_port ──► l1cmd, l2cmd ──► cmd_gen (2 x monogen) ──► bmu_cmd[7:0]
        │                  ctrl (modes, clock select, rdinh, his_mon_lp, dt_clr)
        │                  spare_out[58:0]
        └─► tdi (direct latch, timer, 16 x psc) ──► thr_out[15:0], thr_en, thr_ored_sts
 clk ──► clk_mode_gen ──► 1 kHz..125 Hz, 20/40 kHz, mode  (enables inside, square waves out)
 sdig_ch[17:0], e2_clk, e2_mode ──► sdci ──► 18 words ─┐
 thr_sts[15:0] ──► 2-FF sync ──► thm ──► 8 words ──────┼─► input_port (31:1) ──► dout
 dt_rdy[5:0] ──► data_ready_if ──► 6 flags ────────────┘
```

`tdm_top` wires all of these blocks together. Each block is its own module in `rtl/`.
`tdm_pkg` holds the sizes, the register map and the shared types.

## The trigger synchroniser (`sync_edge`)

This is the paper's core technique, and its timing is the least obvious part of the design.
Three D flip-flops form a chain:

| stage | samples on | input |
|-------|------------|-------|
| q1 | falling clock edge | trigger |
| q2 | rising clock edge | q1 |
| q3 | falling clock edge | q2 |

So q3 is q1 delayed by exactly one clock period. The output is `~q1 & q3` for a falling-edge
detector and `q1 & ~q3` for a rising-edge detector. The pulse is therefore exactly one period
long. It starts and ends on *falling* clock edges, so logic clocked on the rising edge sees it
high at exactly one edge. The delay from the trigger edge to that rising edge is between half a
period and two periods.

The paper feeds this pulse to the interface logic as its clock. Here it is used as a
**clock enable** instead, so all logic stays on the one 1 MHz clock.

The module uses six synchronisers:
- one on the processor's `wrn`, for its falling edge;
- one on bit 9 of each link command (two in all), for its falling edge;
- one on the history latch request `his_mon_lp`, for its falling edge;
- one each on the external serial clock and mode, for their rising edges.

## Processor interface

An I/O cycle is one with `io_dis` = 0 and `m_ion` = 0. Address 0100H + k, for k = 0..24, pulls
`csn[k]` low. A write happens on the synchronised falling edge of `wrn`: the register whose chip
select is low takes `inbus`. **Address and data must stay valid for 3 µs after `wrn` falls.**
Reads are combinational. While `rdn` is low on 0100H..011EH, `dout_en` is high and `dout`
carries the addressed word.

Writes (the register map is this implementation's choice):

| address | register |
|---------|----------|
| 0100H | direct thruster word |
| 0101H / 0102H | link 1 / link 2 command word (12 bits) |
| 0103H | control word, see below |
| 0104H..0107H | spare outputs 15:0, 31:16, 47:32, 58:48 |
| 0108H | thruster timer, in ms |
| 0109H..0118H | serial-mode word of thruster 0..15 |

Control word, 0103H:

| bits | field | meaning |
|------|-------|---------|
| 0 | rdinh | enables the serial digital channel interface |
| 1 | thr_timer_en | picks timer mode (1) or serial mode (0) when sel_thr = 0 |
| 2 | sel_thr | picks direct mode |
| 4:3 | clk_sel | 1 kHz, 2 ms, 4 ms or 8 ms |
| 5 | his_mon_lp | a falling edge latches the history counters |
| 6 | sdc_src_sel | external serial clock/mode pair |
| 12:7 | dt_clr | clears data-ready latches |

Reads (the 31 inputs of the read multiplexer):

| address | word |
|---------|------|
| 0100H..0111H | serial digital channel words 0..17 |
| 0112H..0119H | thruster history words, two thrusters per word |
| 011AH | thruster status |
| 011BH, 011DH, 011EH | spare inputs 15:0, 31:16, 35:32 |
| 011CH | status word |

The status word at 011CH holds, from the top bit down: `thr_ored_sts`, `thr_en`, the eight
pulse commands and the six data-ready latches.

The paper gives the chip-select range as 0100H–0118H and also shows a 31:1 read multiplexer.
The chip selects cover the first range. The read decode reaches 011EH so that all 31 read words
have an address.

## Thruster driver interface (`tdi`, `psc`)

There are three modes. The chosen 16-bit word is registered once and drives `thr_out`.

- **Direct** (`sel_thr` = 1). The word written at 0100H drives the thrusters as it stands.
- **Timer** (`sel_thr` = 0, `thr_timer_en` = 1). Writing *d* to 0108H starts a 16-bit counter
  on the 1 kHz enable. While it runs, `thr_en` is high and the direct word is ANDed with it.
  The free-running 1 kHz clock makes the on-time *d*−1 to *d* ms. Writing 0 stops the timer.
- **Serial** (`sel_thr` = 0, `thr_timer_en` = 0). Each thruster has its own parallel-to-serial
  converter, loaded from 0109H + i. A converter is a 16-bit shift register plus an output
  flip-flop (17 bits in all). On each enable of the selected clock it shifts out the most
  significant bit, with zeros following. So 9F15H on thruster 0 gives 1,0,0,1,1,1,1,1,...

`thr_ored_sts` is the OR of the 16 drive lines.

## Pulse commands (`cmd_gen`, `monogen`)

Each link's 12-bit command word is laid out as follows:

| bits | use |
|------|-----|
| 11:10 | width: 16, 64, 128 or 256 ms |
| 9 | start bit; its falling edge fires the pulse |
| 8:3 | must be zero for the command to be issued |
| 2:0 | selects one of eight commands |

An 8-bit counter on the 1 kHz enable times the pulse. A 3-to-8 decoder then turns it into one
of eight commands. The two links are ORed, because either BMU link may stand in for the other.

`bmu_cmd` bits 0..7 are BMU1Blk1On, BMU1Blk2On, BMU2Blk1On, BMU2Blk2On, and then the same four
for Off. To fire a command, write the word with bit 9 set, then the same word with bit 9 clear.
Reading bits 8:3 as a "must be zero" qualifier is an interpretation of the paper's block
diagram.

## Serial digital channels (`sdci`)

There are 18 serial lines. Each is shifted, first bit into the most significant bit, on the 40
kHz shift clock. The mode pulse comes once every 16 shift clocks and copies each 16-bit register
to the channel's read word. Shifting and copying happen only while `rdinh` is 1.

The clock and mode can be the module's own (the `clk_40k` and `mode` outputs, sent to the
subsystem) or an external pair on `e2_clk`/`e2_mode`. The external pair is brought onto the
clock by rising-edge synchronisers. A subsystem should change its data on the falling edge of
the clock it receives. The data is sampled one 1 MHz clock after the rising edge.

## Thruster history (`thm`)

Sixteen 8-bit counters count enables of the selected clock while their thruster's status line
is high. The counters wrap at 255. The falling edge of `his_mon_lp` copies the counters into
eight 16-bit words, {thruster 2k, thruster 2k+1}, and restarts them in the same cycle, so no
count is lost. Software makes the edge by writing bit 5 of the control word high and then low.

## Data-ready qualifier (`data_ready_if`)

Each of the six data-ready lines passes a two-flip-flop synchroniser. A pulse that stays high
for 188 µs (the paper specifies 187.5 µs) sets its latch. Anything shorter is taken as a glitch.
The latch holds until software sets the matching `dt_clr` bit, and stays clear while that bit
is 1.

## Clocks (`clk_mode_gen`)

All rates come from counters on the 1 MHz clock:
- 40 kHz: divide by 25, 12 clocks high and 13 low;
- 20 kHz: a toggle on the 40 kHz enable;
- 1 kHz: divide by 1000;
- 500, 250 and 125 Hz: a 3-bit counter on the 1 kHz enable;
- mode: high during every 16th period of 40 kHz.

Each rate is available as a registered square wave, for the outputs, and as a one-cycle enable,
for internal logic. The enable coincides with the rising edge of the square wave. `CLK_HZ`
(default 1 000 000) sets the divisors.

## Departures and own choices

- The synchronised pulses are used as clock enables, not as clocks.
- The register map, the control and status layouts and the clock-select code order are this
  implementation's own.
- The polarities of `io_dis`, `m_ion`, `rden1`, `por` and the data-ready inputs are this
  implementation's own.
- The history counters clear in the latch cycle. The paper's block diagram shows a delay chain
  before the clear.
- The data-ready width is counted in 1 MHz clocks, not as 1.5 periods of an 8 kHz clock.
- The thruster timer always counts 1 kHz.
- The serial-mode load uses the same synchronised write strobe as every other register. The
  paper synchronises it to 40 kHz.
- The original module routes its 87 inputs and 96 outputs through a pin router whose mapping
  is not published. Here every functional signal is a separate top-level port.
- Not modelled: the processor, the thruster power drivers and that pin router.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`). It compares the block
against values computed inside the testbench, has a watchdog, and prints
`TB_RESULT checks=N failures=M`.

`tb_tdm_top` runs the whole module at its default sizes, driven only through its pins, in
about 0.37 s of simulated time:
- bus writes and reads;
- all three thruster modes, with 000EH in timer mode and 9F15H in serial mode;
- a full 256 ms and a 16 ms command;
- serial frames on all 18 channels from both clock sources, and a frame with `rdinh` off;
- a history window;
- data-ready qualify, reject and clear;
- the spare lines and the outgoing clock periods.

It counts each of these mechanisms and fails if one never happens.

Run one testbench with Verilator 5:

```
verilator --binary --timing -y rtl rtl/tdm_pkg.sv tb/tb_tdm_top.sv \
          --top-module tb_tdm_top -Mdir obj && obj/Vtb_tdm_top
```

Use `--top-module tb_<block>` with `tb/tb_<block>.sv` for a single block. `-y rtl` lets
Verilator find each module in the file of the same name. Add `--assert` to check the concurrent
assertions in `sync_edge`, `monogen`, `output_port` and `tdi`: one-clock sync pulses, pulses
started only by a start edge, one chip select per write, and the timer gating.

The RTL is plain synthesizable SystemVerilog. It uses one clock, with both of its edges inside `sync_edge`, and
an asynchronous active-high power-on reset.
