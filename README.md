# On-chip IJTAG access to temperature health monitors

Temperature speeds up ageing and makes intermittent resistive faults more
likely, so a dependable chip wants to read its own temperature monitors while
it is in the field. Those monitors are normally reached through an IEEE 1687
(IJTAG) scan network behind a JTAG TAP, and the TAP is normally driven by
software on an external PC that produces the TMS and TDI bit streams. In the
field there is no PC.

This design keeps those bit streams on chip. The TMS and TDI vectors that the
software would have sent are generated once at design time. They are stored in
two small memories inside an **IJTAG controller**, and a simple state machine
plays them into the TAP, one bit per clock of the system clock. The bits that
come back from the network, among them the temperature readings, go into a
third memory for the operating system to read. A mode pin, `test_en`, keeps
the classic path open: with `test_en = 0` the TAP is driven from the
`tms`/`tdi` pins as usual.

The case study behind this RTL has three temperature monitors. Each sits behind
one segment insertion bit (SIB) and one 11-bit test data register (TDR). Each
has a 10-bit successive-approximation ADC that needs 11 clock cycles per
reading. The stored programme is 79 TMS bits long. It opens the SIB of monitor
0, switches the monitor on, waits for the conversion, then captures the reading
and shifts it out.

## Block diagram

```
                 ijtag_system_top
 +------------------------------------------------+
 | ijtag_controller                                |
 |  MEMORY-3 vec_mem (TMS) --TMS_2--+              |
 |  pin tms ---------------TMS_1--[mux test_en]--+ |
 |  MEMORY-2 vec_mem (TDI) --TDI_2--+            | |
 |  pin tdi ---------------TDI_1--[mux test_en]--+-+--> tap_ctrl --SEL/CE/SE/UE/RST--+
 |  ctrl_logic (plays vectors, logs responses)   | |     | di              ^ do       |
 |  MEMORY-1 resp_mem  <------- do --------------+ |     v                 |          |
 +------------------------------------------------+   ijtag_network (gateway)         |
   tdo <-- TAP serial out                              SIB-0 -> SIB-1 -> SIB-2 -> do   |
                                                        |        |        |            |
                                                      TDR-0    TDR-1    TDR-2  <-------+
                                                        |        |        |
                                                      temp_    temp_    temp_
                                                      monitor0 monitor1 monitor2
```

Files, bottom up (`rtl/`):

| module | what it is |
|---|---|
| `ijtag_pkg` | sizes, TAP state enum, the `scan_ctrl_t` bundle, and `build_vector()`, which computes the default programme |
| `tap_ctrl` | IEEE 1149.1 TAP state machine and decode of the IJTAG enables |
| `sib` | segment insertion bit, multiplexer after the segment |
| `tdr` | 11-bit instrument register: shift, capture and update |
| `ijtag_network` | three SIB + TDR pairs in a chain |
| `sar_adc` | SAR register logic of the monitor's ADC (synthesizable) |
| `tm_frontend` | **behavioural model** of the bridge, amplifier, filter, sample-and-hold, DAC and comparator |
| `temp_monitor` | one monitor: `tm_frontend` + `sar_adc` (a model, because it contains the front end) |
| `vec_mem` | vector memory with an output shift register (MEMORY-2 and MEMORY-3) |
| `resp_mem` | response memory with an input shift register (MEMORY-1) |
| `ctrl_logic` | state machine that plays the vectors |
| `ijtag_controller` | memories + control logic + mode multiplexers + TAP |
| `ijtag_system_top` | controller + network + three monitors |

## The scan chain and where each bit goes

This section matters most if you want to write your own vectors.

Every register in the network acts on the **rising** edge of `tck` in the
cycle when the matching TAP enable is high. These are CaptureEn in
Capture-DR, ShiftEn in Shift-DR and UpdateEn in Update-DR. In IEEE 1149.1
the update happens on the falling edge. Here it uses the same rising edge,
so the whole network runs on one edge of the system clock.

Chain order from the TAP's data output to its data input:

```
di -> SIB-0.cell [-> TDR-0 bit10 ... bit0] -> SIB-1.cell [-> TDR-1 ...] -> SIB-2.cell [-> TDR-2 ...] -> do
```

A TDR in brackets is in the chain only while its SIB is open. With every SIB
closed the chain is 3 bits long. Each open SIB adds 11 bits. Inside a TDR,
data enters at bit 10 and leaves from bit 0. The first bit shifted in
therefore ends up furthest along the chain, in the SIB-2 cell.

**SIB** (`sib`). It has a shift/capture cell and an update cell `U`.
- `U = 0` (closed): SO is the cell, so the TDR is bypassed.
- `U = 1` (open): SO is the TDR's return, and the TDR's SelectEn is enabled
  (`toSEL = SEL & U`).
- Capture loads the cell with `U`, so a read-back shows which SIBs are open.
- Update copies the cell into `U`.
- Test-Logic-Reset closes every SIB.

**TDR bit map** (`tdr`, `ijtag_system_top`). 11 bits:

| bit | update part (drives the monitor) | capture input (from the monitor) |
|---|---|---|
| 10 | monitor enable `EN` | 0 |
| 9..0 | unused | 10-bit reading, bit 9 = MSB |

### The default 79-bit programme

`ijtag_pkg::build_vector(tm, sel_tdi)` builds the TMS stream
(`sel_tdi = 0`) or the TDI stream (`sel_tdi = 1`) for monitor `tm`. Bit *i*
is applied at clock *i*. A DR scan of *n* bits that starts and ends in
Run-Test/Idle costs *n* + 5 TMS bits: 1 to Select-DR, 0 to Capture-DR,
0 to Shift-DR, then *n* shift bits (the last one with TMS = 1), then 1 to
Update-DR and 0 back to Run-Test/Idle.

| clocks | TMS | TDI | effect |
|---|---|---|---|
| 0-4 | 1 1 1 1 1 | 0 | TAP to Test-Logic-Reset, all SIBs closed |
| 5 | 0 | 0 | Run-Test/Idle |
| 6-13 | scan of 3 | `0 0 1` (in time order) | SIB-*tm* opens; for monitor 0 this is the `001` pattern |
| 14-32 | scan of 14 | enable bit and SIB bit last | TDR-*tm* bit 10 = 1: the monitor starts converting |
| 33-59 | 27 x 0 | 0 | wait in Run-Test/Idle (the ADC needs 11 cycles) |
| 60-78 | scan of 14 | zeros | capture the reading, shift it out; the update turns the monitor off and closes the SIB |

Total: 5 + 1 + 8 + 19 + 27 + 19 = 79. In general the length is the TAP moves,
plus the SIB bits, plus the TDR bits.

During the last scan the network returns, in this order:
1. the SIB cells behind the monitor (`2 - tm` bits);
2. the reading, LSB first;
3. the TDR's bit 10 (0);
4. the SIB cell of the monitor (1);
5. the SIB cells in front of it.

The response memory logs every bit that leaves the network in Shift-DR during a
run: 3 + 14 + 14 = 31 bits. The reading of monitor `tm` is therefore at bit
`17 + (2 - tm)` onwards, LSB first. For monitor 0 that is bits 19..28 of the
response memory, word 2 bits 3..7 and word 3 bits 0..4. `ijtag_pkg` defines
`LAST_SCAN_START` (17) and `read_offset(tm)` for this.

## ONchip and OFFchip modes

| `test_en` | TAP TMS | TAP TDI | who drives |
|---|---|---|---|
| 0 | `tms` pin | `tdi` pin | external JTAG master (OFFchip) |
| 1 | MEMORY-3 bit (`tms_2_o`) | MEMORY-2 bit (`tdi_2_o`) | `ctrl_logic` (ONchip) |

`tdo` always shows the TAP's serial output, in both modes.

A run (`ctrl_logic`) starts on the rising edge of `test_en`. While `test_en`
stays high and the controller is idle, a one-cycle `start_i` pulse starts
another run. Timing from the start condition:
- cycle 1: both vector memories reload their first word and the response
  memory is cleared;
- cycles 2..80: the 79 vector bits, one per clock;
- cycle 81: the last partial response word is written;
- cycle 82: `done_o` pulses.

`busy_o` is high from cycle 1 to cycle 81. Outside a run the controller drives
TMS low, so the TAP waits in Run-Test/Idle. Dropping `test_en` aborts a run.
The next external access should start with five TMS ones, as any JTAG
session does.

**Loading other vectors.** `vec_wr_en`, `vec_wr_sel` (0 = TMS memory,
1 = TDI memory), `vec_wr_addr` and `vec_wr_data` write one 8-bit word. Stream
bit *i* is word *i*/8, bit *i*%8. Reset restores the default programme.
The end-to-end testbench reloads the memories with
`build_vector(2, ...)` to read monitor 2 instead of monitor 0.

**Reading results.** `resp_rd_addr` selects a word, and `resp_rd_data` returns
it combinationally. `resp_nbits_o` counts the bits logged, and
`resp_overflow_o` is set if a programme returns more than 32 bits.

## The temperature monitor

**Digital part (`sar_adc`, synthesizable).** When `EN` is first seen high, the
ADC spends one clock sampling (`sample_o`). It then spends one clock per bit,
MSB first. Each clock it puts the trial code on `dac_o`, and the comparator
decides whether to keep the bit. `data_o` shows only bits already decided, so
they rise one clock after another, bit 9 first. `valid_o` rises exactly
11 clocks after `EN`. The word is held while `EN` stays high. `EN` low turns
the monitor off and clears `data_o` to zero. Each rising edge of `EN` gives
one conversion.

**Analog part (`tm_frontend`, behavioural model, not synthesizable).** It
uses a Wheatstone bridge. R2 and R3 have a high temperature coefficient
`TC_HI`, and R1 and R4 a low one `TC_LO`. For a temperature rise dT the
differential output, relative to the supply, is

```
v_b = (1 + dT*TC2)/(2 + dT*TC1 + dT*TC2) - (1 + dT*TC4)/(2 + dT*TC3 + dT*TC4)
```

It is zero at dT = 0 and grows almost linearly. The model then applies:
- the amplifier gain `GAIN`;
- a one-pole filter, `ALPHA = 1`, which passes a constant temperature
  unchanged;
- a sample-and-hold;
- an ideal 10-bit DAC with full scale `VREF`, and a comparator.

The constants are this design's assumptions: `TC_HI = 0.004 /K`, `TC_LO = 0`,
`VS = 1.1 V`, `GAIN = 5`, `VREF = 1.1 V`. With them, full scale is near
dT = 129 K, and dT = 117.69 K (`temp_i = 11769`) gives the word
`1111001111`. `temp_i` is the temperature rise in units of 0.01 K. Replace
this module with the real macro's interface when you integrate one. Its
digital contract is only `sample_i`, `dac_i` and `cmp_o`.

## Clock and reset

There is one clock, `tck`. It is also the system clock and the clock of the
monitors' ADCs, so the network and the instruments share one clock domain.
`rst_n` is asynchronous and active low. It resets the TAP (acting as TRST),
the network, the monitors and the control logic. It also reloads the default
programme into the vector memories.

## Departures and additions

- **Clock edge.** Capture, shift and update all use the rising edge (see
  above). Retiming TDO to the falling edge for an external tester is left to
  the pad ring.
- **No instruction register.** The network is the only data register. The
  TAP's IR-side enables are top-level outputs, and `ir_so_i` is what TDO shows
  in Shift-IR.
- **TDO multiplexer.** The controller's TDO always shows the TAP output. It
  has no separate path from the memories to TDO.
- **Vector contents.** The published case study gives the length of its TMS
  vector (79 bits) and the sequence of events. The exact TAP walk above (reset
  first, 27 idle cycles) is this design's reconstruction, which reaches the
  same length. The TDI vector is assumed to be the same length as the TMS
  vector.
- **Response memory contents.** The response memory keeps every bit shifted
  out during a run, not only the reading. This is the simplest rule that puts
  the reading at a fixed address.
- **`start_i`.** This input is an addition, so that software can take repeated
  readings without toggling `test_en`.
- **Sizes of your own choosing.** The memory word width (8), the response
  capacity (32 bits) and the monitor constants are choices of this design.
- **Reading all monitors.** The default programme reads one monitor. Reading
  all three in one programme needs a 3-bit scan, then a 36-bit scan with all
  SIBs open, the wait, and another 36-bit scan: 6 + 8 + 41 + 27 + 41 = 123
  TMS bits. That is more than the 79-bit memory holds. Raise `LEN` on the top
  for that.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ijtag_pkg.sv \
    tb/ijtag_system_top_tb.sv --top-module ijtag_system_top_tb -Mdir obj
./obj/Vijtag_system_top_tb
```

For another testbench, replace the testbench file and top name. The `-y rtl`
option lets Verilator find the other modules by name. `--assert` turns on the
assertions in the RTL:
- at most one TAP capture, shift or update enable is active at a time;
- a TDR never sees capture and shift together;
- the SAR samples for a single cycle;
- the control logic stops a run one cycle after `test_en` drops, and pulses
  `done_o` right after the flush.

What the testbenches check:

- `ijtag_system_top_tb` runs the whole system at its default sizes.
  - It makes an ONchip run on monitor 0 and checks `1111001111` on `tdo` and
    in the response memory.
  - As an external JTAG master, it reads monitor 1 over the pins in OFFchip
    mode.
  - It reloads the memories with the programme for monitor 2 and reruns twice,
    via `test_en` and via `start_i`.
  - It checks that each conversion takes 11 cycles, and counts each mechanism:
    mode switches, SIB opening and closing, conversions, reload and restart.
- `ijtag_controller_tb` follows the TAP through the stored programme. It checks
  the scan lengths (3, 14, 14) and the TDI bits of each scan, and that the
  response memory equals the bits shifted out. It also checks that OFFchip
  mode routes the pins.
- `ijtag_network_tb` measures the chain length for all eight SIB settings
  (3 + 11 per open SIB) and repeats the access sequence of monitor 0 with
  direct scan controls.
- `tap_ctrl_tb` compares the TAP against a table of the 1149.1 state diagram
  over a random TMS stream.
- `sar_adc_tb` checks the result, the 11-cycle latency and the MSB-first
  appearance of bits against an ideal comparator.
- `tm_frontend_tb` and `temp_monitor_tb` work out the expected codes from the
  bridge equation.
- The memory, SIB, TDR and control-logic testbenches cover their handshakes and
  corner cases: overflow, flush of a partial word, pauses, and abort.

## Changing it

- **More or fewer monitors:** `N` on `ijtag_network` and `ijtag_system_top`.
  The package constant `N_TM` is what `build_vector` uses, so change both
  together.
- **Longer programmes:** `LEN` on the top, or `VEC_LEN` in the package for the
  default programme. `IDLE_CYC` is derived from `VEC_LEN`, so a longer
  `VEC_LEN` only lengthens the wait.
- **A different instrument:** keep the TDR interface (`inst_di_i` /
  `inst_do_o`) and replace `temp_monitor` in the generate loop of
  `ijtag_system_top`.
- **Synthesis:** everything except `tm_frontend`, and therefore
  `temp_monitor` and `ijtag_system_top`, is synthesizable. `ijtag_controller`
  with `ijtag_network` is the synthesizable core: about 330 word-level cells
  and 330 flip-flops at the default sizes.
