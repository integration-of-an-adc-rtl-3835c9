# XADC controller for a Wishbone RISC-V SoC

A soft RISC-V core on an Artix-7 FPGA can measure voltages with the FPGA's own
XADC, the dual 12-bit, 1 MSPS analog-to-digital converter built into every
7-series device. The XADC is reached through its Dynamic Reconfiguration Port
(DRP), a small 16-bit register bus with its own enable/ready handshake. This
RTL turns that port into a memory-mapped Wishbone peripheral: a C program on
the core writes a channel address and a start bit, waits for the conversion,
and reads the result, and it can also rewrite any XADC configuration register
at run time instead of rebuilding the bitstream.

The reference system is the RVfpga SoC on a Nexys A7 board (SweRV EH1
RV32IMC core, AXI-to-Wishbone bridge, Wishbone interconnect, UART). The
peripheral sits at 0x8000_1600. Four auxiliary XADC inputs (VAUX2, 3, 10, 11)
are on the board's XADC Pmod header. VAUX3's result lands in XADC status
register 13h.

## What is in the RTL

| file | what it is |
|---|---|
| `rtl/xadc_wb_pkg.sv` | register offsets, the DRP command type, the mV-to-code helper |
| `rtl/chipxadc.sv` | the XADC controller: a Wishbone slave and DRP master |
| `rtl/wb_adder.sv` | a demo Wishbone slave, used to bring up the bus before the XADC |
| `rtl/rvfpga_xadc_top.sv` | top: both slaves, each with its own Wishbone port, and the XADC pins |
| `tb/xadc_model.sv` | behavioural model of the XADC's digital side (simulation only) |
| `tb/wb_master_bfm.sv` | Wishbone master for the testbenches (single, BLOCK and READ-MODIFY-WRITE cycles) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

The core, bridge, interconnect, UART and XADC primitive are not part of this
RTL. In the top, the XADC controller and the demo adder each have their own
Wishbone slave port, for connection to the SoC interconnect. The interconnect
passes the low 8 address bits to the slave. In the reference system both
slaves use the same base address, so they go in separate builds. The XADC
primitive (`XADC`, or the `xadc_wiz` wizard wrapper in Vivado) is instantiated
next to the top. Connect the top's `xadc_*` ports to its `DADDR`, `DI`, `DEN`,
`DWE`, `DO`, `DRDY`, `CONVST`, `BUSY` and `EOC` pins, and use `clk_i` as
`DCLK`. The analog pins go from the package straight to the primitive. The
primitive must be set up for DRP access and event-driven timing (conversions
start on `CONVST`).

## The XADC controller's registers

All registers are 32 bits wide at byte offsets in the peripheral's window. A
write always replaces the whole word; `sel_i` is ignored.

| offset | name | write | read |
|---|---|---|---|
| 00h | ADR | DRP address for the next command (bits 6:0 kept) | ADR |
| 04h | DATA | DRP write data (bits 15:0 kept) | last word the XADC returned on DO |
| 08h | STATUS | bit 0 := dat[0] | bit 0: the conversion started through CTRL has finished |
| 0Ch | CTRL | 1 starts one conversion | 1 until the XADC reports BUSY, then 0 |
| 10h | TEST | ignored | always 2 |
| 14h | RW | 1 = DRP read, 2 = DRP write, others = nothing | pending command; 0 when done |

XADC addresses 00h-3Fh are read-only status registers that hold results.
Addresses 40h and up are the configuration, sequencer and alarm registers. A
result word holds the 12-bit code in bits [15:4]. In unipolar mode the full
scale is 1 V, so `mV = (DATA >> 4) * 1000 / 4096`. The on-chip temperature
sensor (register 00h) converts as `T = code * 503.975 / 4096 - 273.15` °C.

### Reading an input from software

```
ADR  <- 13h        // VAUX3 result register
CTRL <- 1          // one event-driven conversion
poll STATUS until 1
RW   <- 1          // DRP read of ADR
poll RW until 0
mV = (DATA >> 4) * 1000 / 4096
```

To change a configuration register, write ADR, then DATA, then `RW <- 2`, and
poll RW until it reads 0. The original firmware waits with fixed delay loops
instead of polling. That also works: a command completes within a few clocks,
plus the time of any conversion still running.

## How a conversion and a DRP access run

The controller has two small state machines. They share the XADC's BUSY
signal.

**Conversion.** Writing 1 to CTRL raises `CONVST` on the next clock and clears
the STATUS flag. `CONVST` stays high until the XADC raises `BUSY`, which it
does one DCLK after seeing the rising `CONVST`. Holding `CONVST` until `BUSY`
proves the start was seen, even if `CONVST` must be resynchronised. At that
point `CONVST` drops and CTRL clears itself. When the XADC pulses `EOC`, the
STATUS flag is set. With the XADC defaults used by the model (ADCCLK = DCLK/4,
22 ADCCLK of conversion, EOC 16 DCLK after BUSY falls), a conversion takes
about 105 clocks from `CONVST`.

**DRP access.** A read or write command in RW waits until `BUSY` is low. It
then drives `DEN` high for exactly one clock, together with `DWE` for a write,
with ADR on `DADDR` and DATA on `DI`. It waits for `DRDY`, then clears RW.
Whenever `DRDY` is high, `DO` is copied into the DATA read-back register. After
a write, this register therefore holds whatever the XADC returned on DO. Only
one access is in flight at a time. A write to RW is ignored while one is
running.

Both rules come from how the XADC is used here. `DEN` must be a single-clock
pulse, and no DRP access starts during a conversion. A DRP read queued while a
conversion runs is held until `BUSY` falls. `EOC` comes 16 clocks later, so
such a read returns the previous result. For the new result, wait for STATUS
before issuing the read.

**Wishbone timing.** Both slaves acknowledge one clock after the request.
`ack_o` is a registered `cyc & stb` that drops for a clock after each
acknowledge, so every single read or write takes two clock edges. Read data
is registered from the address every clock and is valid while `ack_o` is high.
A write is taken once, on the first edge of the access. Because the
acknowledge depends only on `cyc & stb`, the slaves also serve Wishbone
BLOCK cycles (CYC held over several STB phases) and READ-MODIFY-WRITE
cycles. Neither slave ever signals an error or a retry. `rst_i` is synchronous and active high, and
resets every register to 0.

## The demo adder

`wb_adder` was the first peripheral added to the SoC, to see single read and
write cycles on the bus. It has three 32-bit registers: A at 00h, B at 04h and
C at 08h. Reads return sums, each computed a different way:

| offset | read |
|---|---|
| 00h | A + B |
| 04h | A + B, from a separate adder |
| 08h | C + (A + B) |
| other | 0000_00FFh |

After `A <- 50` and `B <- 60`, a read of C returns 110.

## Where this RTL departs from the original design

- The XADC primitive is outside the controller. The original controller
  instantiates the vendor wizard inside itself. Here the DRP and status pins
  are ports, so the logic is vendor-independent and testable with a model.
- CONVST is held until BUSY, as the original's description says. Its code
  instead waits for EOC.
- CTRL clears itself once the conversion starts. The original clears a
  misspelled register, which would leave CTRL at 1.
- STATUS is a done flag with a defined lifetime. It is set at EOC, cleared at
  the next start, and writable, so software can also clear it.
- RW issues exactly one DRP access and returns to 0 on DRDY. In the original,
  RW keeps its value, and its shift-register pulse generator only fires when
  BUSY changes.
- ADR and DATA keep only the DRP's 7 and 16 bits. The original stores 32 bits.
- RW reads back its pending command, so software can poll it. This read-back
  is this design's addition.
- Writes are taken once per access rather than on every cycle of the strobe.
  The result is the same for a held write.
- `wb_adder` also resets C, which the original only initialises.

## Simulating

There are no tool-specific files. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/xadc_wb_pkg.sv \
    tb/tb_rvfpga_xadc_top.sv --top-module tb_rvfpga_xadc_top -o sim
./obj_dir/sim
```

Use `tb_chipxadc` or `tb_wb_adder` as the top module to test a single block.
Every testbench ends with `TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_wb_adder`**: the bring-up program, 40 random register sets checked
  against all three read sums, Wishbone BLOCK write/read and
  READ-MODIFY-WRITE cycles, unmapped offsets, reset, ACK latency and pulse
  width.
- **`tb_chipxadc`**: the controller against the XADC model. It covers the
  firmware's sequence and the exact clock counts from CTRL to CONVST and from
  CONVST to EOC. It also covers random configuration-register traffic, the
  read-only status range, a command held back by BUSY, and the ignored
  command 3, and a BLOCK READ of all six registers. It checks that DEN is
  never wider than one clock and never comes during BUSY.
- **`tb_rvfpga_xadc_top`**: the whole top with no parameter overrides. It
  runs the adder and the XADC firmware side by side on two bus masters. It
  sweeps 0-999 mV through the converter and reads the temperature sensor. It
  counts each mechanism: conversions, CTRL self-clears, done flags, DRP reads
  and writes, BUSY holding a DRP command, and acknowledges. Any mechanism that
  never happened is a failure.

`tb/xadc_model.sv` covers only what the controller uses: single-channel
event-driven conversions of the channel in register 40h bits [4:0], DRP reads
and writes with a fixed latency, and read-only status registers. It does not
model the sequencer, averaging, alarms, continuous mode or JTAG. Its timing
parameters are the XADC defaults described above. The testbench sets the
analog inputs with `set_input(channel, code)`.

## How far to trust it

The controller and the adder are small and fully synchronous. Verilator's
lint reports only unused names: `sel_i`, and package constants that one
module or the other does not use. Both pass their testbenches, and
each testbench fails when one mechanism of its block is broken. The XADC side
has only been checked against the model above, not against the Xilinx
simulation model or hardware. Check two points on a real XADC:

- whether DRP accesses really need to wait for BUSY to be low; the XADC
  itself allows DRP traffic during conversions;
- the DRDY latency.

The controller's behaviour does not depend on either of these values.
