# Module maintenance controller: a boundary-scan test-bus master and a scannable test chip

A host computer that wants to test the boards or chips of a system through an IEEE 1149.1
(JTAG) test bus should not have to toggle TMS and TCK bit by bit in software. This design puts
that work in hardware. The **Test Channel** sits on the host's I/O bus. The host writes a
mode, a few counts and a data word. The Test Channel then drives the test bus by itself: it
steps the slaves' TAP controllers with TMS, shifts patterns out on TDO, collects responses from
TDI, can compress those responses into a signature, and sets status bits and an interrupt
when it is done.

A small target chip, **App1**, is included to exercise it. App1 is a one-bit full adder that
feeds its sum and carry back into itself through a two-bit register. Around that adder sit a
complete 1149.1 interface: TAP controller, 3-bit instruction register, 3-cell boundary-scan
register and bypass. An **8-to-16-bit bus adapter** connects an 8-bit PC-style I/O bus to the
Test Channel's 16-bit host port. `mmc_top` wires the three parts into one test ring:
Test Channel TDO → App1 TDI, and App1 TDO → Test Channel TDI.

## Test Channel

### Host port and register map

The host port has a 4-bit address PA, a 16-bit data bus PD, and the strobes /CS, /WR and /RD.
A write is captured on the rising edge of /WR. It is then synchronised to CLK and takes effect
on the second CLK rising edge after /WR rises. Writes are ignored while TEST is high.

| PA | write | meaning |
|----|-------|---------|
| 0 | CR | CR[2:0] mode, CR3 interrupt enable, CR4 EN1 (TMS1 follows TMS0), CR5 TT (hold /RST low) |
| 1 | CNR | 4-bit chunk length: a chunk is CNR+2 bits |
| 2 | STR | 6-bit TMS sequence for STBUS, played from bit 5 down |
| 4 | TC | 12-bit major count |
| 5 | TxR | 16-bit transmit register |
| 6 | RxR | 16-bit receive register (a seed for signature analysis) |
| 8 | SYNR | PD0 sets FEN, the "go" flag; writing 0 stops the operation |
| 9 | SR clear | clears the status bits whose PD bits are 1 |
| 10 | SOFTRS | soft reset: back to the idle state, SR/TxR/RxR cleared |

A read returns `{RxR[15:4], PA1 ? RxR[3:0] : SR[3:0]}`. So reading at PA=0 gives the status
in the low nibble, and reading at PA=6 gives all of RxR.

Status bits: SR0 = EV0, SR1 = EV1 (external events), SR2 = SCTC (a chunk ended), SR3 = TCTC
(the operation ended). They are sticky and stay set until the host clears them.
IRQ = CR3 · (SR3·/TEST + EV0 + EV1).

### Operation modes

| CR[2:0] | mode | what the bus sees |
|---|---|---|
| 0 | DTUR | Shift TxR out and TDI into RxR: TC = s−2 shifts s bits |
| 1 | DTCR | As DTUR, but RxR compresses TDI into a signature |
| 2 | PTUR | TxR generates pseudo-random patterns; TDO returns TDI one CLK later |
| 3 | PTCR | TxR generates patterns and RxR compresses: TC = t−1 gives t vectors of CNR+2 bits |
| 4 | INS | Walks the slaves to Shift-IR and shifts TxR in: TC = s−2 for s bits |
| 5 | RTEST | Holds the slaves in Run-Test/Idle for TC+1 cycles |
| 6 | STBUS | Plays the STR sequence on TMS for TC+1 cycles |
| 7 | RSBUS | Holds TMS high for TC+1 cycles, so every slave reaches Test-Logic-Reset |

The pattern generator and signature register both use x^16+x^5+x^3+x^2+1, in the form where
the XOR gates sit inside the register. Starting from seed R and shifting in n bits of stream S,
the signature is (R·x^n + S·x^16) mod p.

### The controller and its counting rules

This is the hardest part to follow. The controller is a 23-state machine, S0 to S22.
- S0 is reset.
- S1 waits for FEN (set by a SYNR write) while SR3 is clear.
- Each mode then runs through its own chain of states. The chain drives TMS so that the
  slaves go Select-DR, Capture-DR, Shift-DR. After that the controller shifts in S4/S5.
- The controller stops in S9 when the operation ends or FEN is cleared, and returns the
  slaves to Run-Test/Idle.

Two counters drive it:
- **SC** (4 bits) counts the bits within a chunk. It reloads from CNR.
- **TC** (12 bits) counts chunks, or whole operations.

Both counters give a terminal count on the decrement that passes zero (a borrow). So a load of
k means k+1 events. Together with the two bits spent entering and leaving the shift state,
this gives the load rules in the table above.

When SC runs out in the middle of an operation:
- SR2 is set.
- The last bit moves the slaves to Exit1-DR (S6).
- The controller holds them in Pause-DR (S7) until the host clears SR2.
- It then resumes through Exit2-DR (S8).

This lets the host exchange a fresh TxR word and read RxR between chunks.

SR3 is visible during the last counting cycle, through the modelled asynchronous preset. A
host that polls SR3 should therefore wait a few CLK cycles before reading RxR.

### Outputs and scan

TDO is retimed on the falling edge of CLK. TMS0 goes to the bus, and TMS1 copies it when EN1
is set. /RST pulses low on a soft reset, and stays low while TT is set.

With TEST high, the registers CR, CNR, STR, the TDI input cell, SR, FEN, TxR and RxR form one
60-cell internal scan chain from SI to SO. In that mode AENG shows the synchroniser, and
PS[4:0], DTUR, SCTC, SR3 and SR2 are brought out for observation.

## App1

App1 has these parts:
- A **TAP controller** using the usual state codes D,C,B,A: Test-Logic-Reset = 1111,
  Run-Test/Idle = 1100, Shift-DR = 0010.
- A **3-bit IR**, which captures 1,0,ST. IR0 IR1 IR2 decode as:
  - 000 EXTEST
  - 001 INTEST
  - 010 SAMPLE
  - 011 SCANFB
  - 1xx BYPASS

  IR2 is shifted first, so a Test Channel INS operation loads TxR with `{IR2,IR1,IR0,13'b0}`.
  Test-Logic-Reset selects BYPASS.
- A **boundary-scan register**. Shift order is TDI → DIN cell → SUM cell → CO cell → TDO.
  - The DIN cell sits between the DIN pin and the adder input PD.
  - The SUM and CO cells sit between the adder outputs NSUM/NCO and the pins SUM/CO.
  - Each cell captures its own multiplexer output.
- A **feedback register FB** holding PSUM and PCO. Its shift order is PSUM then PCO, so the
  first bit shifted ends in PCO.
  - Under SCANFB it is loaded at Update-DR.
  - Under EXTEST it holds its value.
  - Under INTEST, SAMPLE and BYPASS it takes NSUM/NCO on every clock, so the adder
    accumulates.

A full-adder test goes like this:
1. Load INTEST to drive PD from the boundary register.
2. Load SCANFB to set PSUM/PCO.
3. Read SUM and CO directly on the pins.

TDO changes on the falling edge of TCK in Shift-IR/Shift-DR and is held high elsewhere.

## Bus adapter

PC-style 8-bit cycles (HA[3:0], HD[7:0], /PIOR, /PIOW, /POR) are turned into 16-bit Test
Channel accesses:
- **Writes:** write the high byte to address F, then write the low byte to the register's
  address. The second write issues the 16-bit write.
- **Reads:** read the register's address to get the low byte, then read address F to get the
  high byte, which was latched by the first read.

/CS is decoded from HA alone, so /CS is settled before the strobe edge.

## Departures from the original description

- In S6 the controller drives TMS=1. The original state table lists TMS=0 there. That value
  would leave the slaves shifting while the controller waits in S7. It cannot be right,
  because the pause is meant to park them in Pause-DR.
- TDO carries the TxR serial output, or in PTUR the delayed TDI. One passage of the original
  says this selection takes RxR; another says TxR. TxR is the one consistent with the modes.
- The read select between SR and RxR[3:0] is wired to PA1. The original does not say which
  line drives it.
- In STBUS mode, TMS shows STR bit 5 also while the controller waits in S1. Start STR
  sequences with 0, or load STR before selecting STBUS.
- The Test Channel PD bus is split into input, output and output-enable. App1 TDO is two-state
  (held high) rather than tri-state.
- Terminal counts are borrow style; the original gives no cycle-level definition.
- For App1 states outside Capture/Shift/Update, the original gives no control values. Here the
  register enables are off and the FB hold/load choice follows the instruction, as described
  above.
- Counter widths are as in the prototype (TC 12, SC 4). The original notes that a full version
  would have 22 and 12 bits. `mmc_top` has parameters TC_W, SC_W and STR_W.
- The programmable polynomial registers PA/PB are not present; the polynomial is fixed.

## Files

- `rtl/tc_pkg.sv` and `rtl/app1_pkg.sv`: shared types.
- Test Channel:
  - `tc_host_if` (synchroniser, decoder, FEN)
  - `tc_cr`
  - `tc_fsm`
  - `tc_cnters` (CNR, SC, TC)
  - `tc_tmsbl` (STR, TMS, /RST)
  - `tc_xr2` (TxR, RxR)
  - `tc_sr`
  - `tc_irq`
  - `tc_circ` (TDO)
  - `tc_m8x4` (read mux)
  - `tc_bscell`
  - `test_channel`
- App1:
  - `app1_tap`
  - `app1_ir`
  - `app1_apol` (control decode)
  - `app1_core` (adder, BSR, FB, bypass)
  - `app1`
- `bus_adapter` and the top, `mmc_top`.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each prints a count of
  failures and ends with `$finish`.
- `tb/tb_mmc_top.sv` drives the whole system through the 8-bit bus. It covers:
  - all eight modes, chunk pauses and the interrupt;
  - soft reset and the scan chain;
  - all App1 instructions;
  - the 8-vector full-adder test;
  - the IR status check (101).

## Simulating

With Verilator 5 (the `--timing` flag is needed for the testbenches' delays):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/tc_pkg.sv rtl/app1_pkg.sv rtl/*.sv tb/tb_mmc_top.sv --top-module tb_mmc_top
./obj_dir/Vtb_mmc_top
```

For a single block, replace `tb_mmc_top` with that block's testbench. A run ends with a
`failures=0` style summary. A watchdog in each testbench stops a hung run.
