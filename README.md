# FASTBUS segment ancillary logic

A FASTBUS segment (a crate backplane or a cable) carries many masters and
slaves, but a few jobs belong to no module in particular: timing the
arbitration for bus mastership, telling modules when an address is
geographical (a slot address), answering the handshakes of a broadcast on
behalf of all slaves, halting the segment, and recognising a bus reset. One
unit per segment, the *ancillary logic*, does these jobs. This repository holds
a synchronous SystemVerilog implementation of that unit in the configuration
of a 15 m differential-ECL cable segment module, with the timing of a 19-inch
crate segment available through parameters.

The logic falls into two sections:

| Section | Module | Job |
|---|---|---|
| Arbitration Timing Control (ATC), `atc_section` | `atc_ctrl` | AG and MSP flip-flops, timers TM1, ATAK, TM2 |
| | `arb_inhibit` | AI flip-flop, timer TM3 (assured access) |
| | `run_halt` | run/halt switch, BH line, AK hold while halted |
| | `sys_handshake` | AK/DK of broadcasts, delays dTA/dTD, NWT timer TM4 |
| Geographical Address Control (GAC), `gac_section` | `eg_gen` | EG line, dTAS |
| | `gac_slave` | the unit's own CSR slave at address 255 |
| common | `power_on_clear`, `rb_integrator` | PWR CLR, RB integration, segment clear |
| | `anc_timer` | the interval timer used for every delay |
| | `anc_pkg` | cycle counts, MS and SS codes |
| top | `anc_cable_segment` | both sections, PWR CLR and RB integration, AK/DK ORed onto one driver each |

The two section modules correspond to the two boards of a crate segment
unit; the cable segment module holds both on one board.

## Signal conventions

All bus lines are shown as *asserted = 1*. The unit sees every line as its
receiver delivers it, which on FASTBUS is already the wired-OR of all
drivers, the unit's own included; every line the unit asserts leaves as a
separate driver output (`*_o`). A testbench or a board wrapper forms the
wired-OR (`ak_line = ak_o | others`). `x(u)` and `x(d)` mean the rising and
falling transitions of line `x`, `x*` means "not x".

The unit is synchronous to one clock (`anc_pkg::CLK_NS` = 10 ns). The
original ancillary logic is asynchronous ECL with analog delay lines and
one-shots; here every delay is a cycle count (see *Timing*), and every
"flip-flop" follows the rules of the FASTBUS logic diagrams: set and reset
together change nothing, clear wins over both. Each timer runs while its
enable is held, asserts its output at the end of the interval and restarts
whenever the enable drops or the clear is asserted (`anc_timer`).

## The arbitration cycle

Masters that want the bus assert AR and put their arbitration level on the
six AL lines; the wired-OR resolution of the levels happens among the masters.
The ancillary logic only *times* the cycle, with two flip-flops:

1. **Start.** `SET AG = AR . GK* . MSP* . HALT*`. A request is pending, the
   previous winner has dropped GK, no earlier cycle is still pending and the
   segment is not halted. AG is driven onto the bus and starts TM1
   (arbitration time, >= 440 ns on the cable).
2. **Resolution.** At the end of TM1 the AL lines are examined. `AL = 0` is an
   error (a request with no level): AG is cleared and the cycle is abandoned.
   Otherwise MSP (mastership pending) is set; AL now holds the winner.
3. **Hand-over.** The winner may not take the bus while the current master
   still holds its AS/AK lock. AG therefore stays up until AK has been low
   for ATAK (>= 130 ns bus clean-up). AG(d) tells the winner to assert GK,
   and TM2 starts.
4. **End.** GK(u) from the winner clears MSP; with MSP low, the next cycle may
   start as soon as the winner drops GK again. If GK never comes, TM2
   (>= 830 ns) clears MSP.

So an arbitration for the *next* master overlaps the transfers of the current
one: the levels are resolved while the current master works, and only the
hand-over waits for the bus to be released.

**Assured access (AI).** AG(u) also sets AI. Masters that follow the assured
access rules do not raise a new AR while AI is up, so every master that was
waiting when the cycle started is served before anybody may request again; a
high-priority master cannot starve a low-priority one. AI stays up until AR
has been low without a break for TM3 (two bus delays).

## Broadcasts and the WAIT chain

In a broadcast (MS = 2 or 3 at AS(u)) no single slave answers, so the
ancillary logic of every segment reached answers for all its slaves
(`sys_handshake`):

* AK follows AS, each transition delayed by dTA (680..730 ns on the cable),
  long enough for the slowest slave to latch the address;
* DK follows DS, each transition delayed by dTD (2180..2380 ns);
* both also wait for the NWT timer TM4: WT must have been low for two bus
  delays.

A broadcast may travel through segment interconnects to further segments.
Each interconnect on the path holds WT on its segment while the broadcast
propagates. On the last segment of a branch no WT is seen, so its ancillary
logic answers after dTA/dTD; the interconnects there release WT, the segment
one step closer to the master sees WT drop, waits TM4 and answers, and so the
acknowledgement ripples back to the master. A delay restarts after every
transition of AK or DK.

An optional *fast reset* (`FAST_DK_RST = 1`, off by default) lets DK fall as
soon as DS falls, without dTD and TM4, in data cycles that are not block
transfers (MS /= 1 at DS(u)). Block transfers always keep the full delay on
both edges.

## Geographical addresses and EG

A geographical address selects a module by its slot. `eg_gen` recognises two
formats:

| format | AD<31:8> | AD<7:0> |
|---|---|---|
| local | all zero | slot, not FF |
| global | GP in the top `GP_W` bits, zeros below | slot, not FF |

GP is the segment base address held in CSR#3 of the unit's own slave. For a
geographical address in data or CSR space (MS = 0 or 1), EG rises dTAS after
AS(u) (<= 60 ns) and drops as soon as a module answers with AK, or at AS(d).
AD<7:0> = FF is never geographical: address 255 belongs to the ancillary
logic itself.

## The unit's own slave (address 255)

`gac_slave` is a minimal FASTBUS slave. It is selected by a CSR-space
(MS = 1) address `{GP, 0.., FF}` or `000000FF`, answers AK until AS(d), and
then serves data cycles:

| data cycle | MS | RD | action |
|---|---|---|---|
| secondary address write | 2 | 0 | NTA <= AD<1:0> (values other than 0 and 3 answered with SS = 6) |
| secondary address read | 2 | 1 | AD <= NTA |
| random read, NTA = 0 | 0 | 1 | AD <= CSR#0 = {ID, 0000} |
| random write, NTA = 0 | 0 | 0 | rejected, SS = 6 |
| random read/write, NTA = 3 | 0 | x | CSR#3 (GP) |
| random, NTA = 1 or 2 | 0 | x | rejected, SS = 6 |
| any other MS | 1, 3 (4..7 with MS<2>) | x | rejected, SS = 6 |

MS and RD are captured in an input register at DS(u). DS is delayed by dTDS
to an internal DS1 that enables decoding, writes and the read drivers; DK
follows DS1 after dTDK (together 420 ns, within the 1000 ns allowed), and
falls one cycle after DS(d). With the defaults the ID is 0014 (CSR#0 reads
0014_0000) and CSR#3 is 8 bits wide.

## Halt, reset and power-on clear

The run/halt switch (`halt_sw = 1` is HALT) first blocks new arbitration
cycles. Once the cycle in progress is over (AG and MSP low) and the current
master has released the bus (AS and AK low), BH is asserted and the unit holds
AK, so no master can start a transfer. RUN releases both.

RB is accepted only when held for the integration time tRB (200..300 ns on
the cable); shorter pulses are ignored. An accepted RB clears the unit only
while the segment is not halted. The common clear of all sections is

    SEG_CLR = PWR_CLR + integral(RB) . BH*

PWR CLR comes from `power_on_clear`: asserted while the external power-good
input `por_n` is low and for 16 cycles after it rises.

## Timing: nanoseconds to clock cycles

The defaults (10 ns clock, 15 m cable) are chosen so that each delay,
including one or two cycles of register latency, lands inside its window.
The crate values sit in `anc_pkg` as `CRT_*`.

| delay | meaning | cable window | cycles | crate window | cycles |
|---|---|---|---|---|---|
| ATAK | AK low before AG(d) | >= 130 ns | 13 | >= 40 ns | 4 |
| TM1 | arbitration time | >= 440 ns | 44 | >= 120 ns | 12 |
| TM2 | GK(u) timeout | >= 830 ns | 83 | >= 650 ns | 65 |
| TM3 | AR low before AI(d) | >= 180 ns | 18 | >= 30 ns | 3 |
| TM4 | WT low before AK/DK | >= 180 ns | 18 | >= 30 ns | 3 |
| dTA | broadcast AK delay | 680..730 ns | 70 | 500..550 ns | 52 |
| dTD | broadcast DK delay | 2180..2380 ns | 228 | 2000..2200 ns | 210 |
| tRB | RB integration | 200..300 ns | 25 | 100..150 ns | 12 |
| dTAS | EG / slave address decode | <= 60 ns | 4 | <= 60 ns | 4 |
| dTDS + dTDK | slave DK after DS(u) | <= 1000 ns | 20 + 20 | <= 1000 ns | 20 + 20 |

With another clock, divide each window by the period and keep the result
inside it, with the latency in mind.

## Top-level interface (`anc_cable_segment`)

* `clk`, `por_n` (power good), `halt_sw`.
* Received lines: `as_i ak_i ds_i dk_i ar_i gk_i al_i[5:0] wt_i rb_i ms_i[1:0]
  rd_i ad_i[31:0]`. `ms_i` has `MS_W` lines: 2 on the cable unit, which
  does not use MS<2>, 3 on a crate unit.
* Drivers: `ag_o ai_o bh_o eg_o ak_o dk_o ss_o[2:0] ad_o[31:0] ad_oe`.
* Monitoring (not bus lines): `pwr_clr seg_clr rb_int msp bc ega gac_sel gp`
  and one-cycle event pulses `ev_grant ev_al_err ev_tm2_to ev_fast_rst`, plus
  the level `ev_wt_hold` (an acknowledgement is due but WT holds it).

Parameters: `GP_W` (1..24), `MS_W` (2 or 3), `MODULE_ID`, the cycle counts
`T_*`, and `FAST_DK_RST`. A crate segment unit is the same top with the
`CRT_*` counts, `GP_W = 12` and `MS_W = 3`.

## Choices made here

These points are not fixed by the FASTBUS ancillary logic rules and were
decided for this implementation:

* synchronous design with a 10 ns clock; a two-stage synchroniser on
  `halt_sw` and `por_n` (the other lines are assumed synchronous to `clk`);
* the exact gating of the ATC timers (TM1 by AG . MSP*, ATAK by AG . MSP . AK*,
  TM2 by MSP . AG*) follows the described sequence, not a published equation;
* the placement of GP in the address (top `GP_W` bits) and of CSR#3 in the
  data word (low bits);
* a secondary address write of an invalid NTA value stores it (and answers
  SS = 6), exactly as the load equation reads; later random cycles are then
  rejected until a valid NTA is written;
* the slave's DK(d) one cycle after DS(d); NTA cleared together with CSR#3;
* broadcast recognised by MS = 2/3, block transfer by MS = 1 (FASTBUS codes);
* AL is 6 bits wide; the module ID is 0014 in CSR#0<31:16>.

Not part of the RTL: the differential ECL drivers and receivers and the
active 100-ohm line terminators (an op-amp controlled current source keeping
8 mA in each 56-ohm termination resistor) are analog circuits.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb_anc_cable_segment` runs the whole unit
at its default parameters: power-on, two masters arbitrating (with the second
arbitration overlapping the first master's accesses to the unit's slave),
CSR#0/NTA/CSR#3 accesses and an SS = 6 rejection, a broadcast whose AK and
DK are held by WT, a global geographical address with EG, an AL = 0 error, a
TM2 timeout, halt and run, and RB pulses while halted, too short, and valid.
It counts each of these mechanisms and fails if one never occurred, and it
checks dTA, dTD, TM2 and the EG delay in nanoseconds against the windows
above. `tb_anc_timing` measures every delay of the timing table on two
instances of the top, one with the cable defaults and one in the crate
configuration, and checks that only the crate unit decodes MS<2>.

Run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/anc_pkg.sv tb/tb_anc_cable_segment.sv --top-module tb_anc_cable_segment
    ./obj_dir/Vtb_anc_cable_segment

Replace the testbench name to run another one. Each finishes in well under a
second.
