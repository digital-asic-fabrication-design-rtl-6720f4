# Test-chip user area: redundant access to a set of test peripherals

This is the user area of a small multi-project test chip in a Caravel-style harness. A RISC-V management SoC sits next to it and talks to it over a wishbone bus. The chip is built to measure what an open-source process can do. It has a few small test peripherals:

- a bus counter;
- a 1024-tap FIR filter for voice noise removal;
- four AND gates from four standard-cell libraries.

The main idea is that no single broken path should block testing:

- **Two register paths.** Every register can be reached from the management SoC over wishbone. It can also be reached from outside the chip through a 4-wire "backdoor" SPI slave on its own pins.
- **Clock fallbacks.** Each peripheral clock can come from the harness clock or from an external clock pin. It can be gated off per peripheral. Two hardware pins can force every clock on whatever the registers say.

```
 management SoC ──wishbone──┐                     ┌── wishbone_test  (PCLK[0])
                            ├── user_regbus ──────┼── dsp_noise_filter (PCLK[1]) ──► irq
 SPI pins ── backdoor_spi ──┘                     └── clock_module ──► PCLK[2:0]
                                                        ▲ harness clk, ext clk,
                                                        │ gate/clock override pins
 A, B, SW[1:0] pins ── std_cell_test ── C pin
```

The top module is `user_area_top`.

## Register space

Both masters see the same space. An address is 7 bits, `{REGISTER[3:0], MODULE[2:0]}`, and every register is 32 bits.

On wishbone:

- the access must fall in the window `0x30xx_xxxx`;
- `MODULE = adr[4:2]` and `REGISTER = adr[8:5]`, so the word address is `0x3000_0000 + REGISTER*32 + MODULE*4`;
- other addresses are acknowledged, read as 0 and ignore writes;
- byte selects are ignored.

| MODULE | peripheral | reg | name | access |
|---|---|---|---|---|
| 0 | clock module | 0 | GATE | R/W. Bit i = 1 stops PCLK[i]. Resets to 0, so all clocks run. |
| | | 1 | SELECT | R/W. Bit i = 1 takes PCLK[i] from the external clock. Resets to 0. |
| | | 2 | STATUS | R. [2:0] effective enables, [6:4] effective selects, [8] gate-override pin, [9] clock-override pin. |
| 1 | wishbone test | 0 | COUNT | W sets the counter. R returns its current value. |
| | | 1 | STATUS | R. [0] a load is still crossing to the counter clock. |
| 2 | DSP filter | 0 | SAMPLE | W. New input sample [15:0]; starts one output. |
| | | 1 | COEF_ADDR | R/W. Coefficient write pointer. |
| | | 2 | COEF_DATA | W. Stores a coefficient [15:0] at the pointer, then increments the pointer. |
| | | 3 | RESULT | R. Last filter output (32 bits). |
| | | 4 | STATUS | R: [0] ready, [1] done, [2] dropped. W: clears [2]. |

`user_regbus` joins the two masters:

- A wishbone read is acknowledged one SYSCLK cycle after `stb & cyc`.
- A wishbone write becomes a one-cycle write strobe to the peripheral and is acknowledged the same way.
- The wishbone write is held off, with its acknowledge delayed, in two cases:
  - while the peripheral says it is busy (its own clock-domain crossing is in flight, or the filter is running);
  - in a cycle where the SPI slave delivers a write.
- An SPI write cannot wait: it always goes out in the cycle it arrives. If the peripheral is busy, the write is lost. The DSP flags this in STATUS[2].
- The SPI read port is a plain multiplexer on the SPI address.

## Backdoor SPI

Pins:

- `BCLK`: SPI clock from the master;
- `SS`: active low select; high resets the slave;
- `MOSI`, `MISO`.

A transaction is 40 bits, most significant bit first:

```
 SS ‾‾\_________________________________________________________/‾‾‾
 MOSI   R A6 A5 A4 A3 A2 A1 A0 | D31 ........................ D0
 MISO   (don't care)           | Q31 ........................ Q0
        command byte           ^ wait ≥ 4 SYSCLK   last bit ^ wait ≥ 4 SYSCLK, then SS high
```

The command byte starts with the read flag (`R`: 1 = read, 0 = write), followed by the 7-bit address.

Edge rules:

- MOSI is sampled on the rising edge of BCLK.
- MISO changes after each rising edge; the master samples it on the falling edge.

The system side runs on SYSCLK, which has no relation to BCLK. Only two single-bit flags cross between the clocks:

- Two `spi_shift_in` registers receive the bits: 8 bits for the command and 32 for the data.
- Each register is reset to the value 1. That lone 1 is a marker: after exactly 8 (or 32) shifts it reaches the register's top bit.
- The marker of the command register enables the data register, and the marker of the data register stops it.
- Each marker crosses into SYSCLK through three flops: two against metastability and a third for edge detection.
- Because the address and data registers stop shifting, they stay constant until SS rises. The system side can use them once the marker has arrived.

The marker outcomes are:

- **Write.** `o_DOUT_VALID = DFF1 & ~DFF2 & ~READ` is high for exactly one SYSCLK cycle, two to four SYSCLK edges after the last data bit (depending on where the last BCLK edge falls). The master must keep SS low for four SYSCLK periods after the last bit, or the write is lost.
- **Read.** The address goes out to the register multiplexer as soon as the command byte is in. Once the address marker has crossed, the `spi_shift_out` register loads the selected word on the next BCLK edge. This is why the master must pause at least four SYSCLK periods between the 8th and 9th BCLK edges.
- The word is shifted out during writes as well; the master ignores it then.

## Clock module

Each `PCLK[i]` (i = 0..2) has its own chain:

1. a 2:1 clock mux: harness clock or external clock pin;
2. a latch-based clock gate: the enable is latched while the clock is low, so no glitches occur.

GATE and SELECT give one bit per clock.

While the **gate-override** pin is high:

- every gate is open;
- every mux follows the **clock-override** pin instead of SELECT (1 = external clock).

SYSCLK is the harness clock, untouched. The register bus and the SPI slave therefore stay reachable whatever is programmed.

Clock uses:

- PCLK[0] clocks the wishbone test counter.
- PCLK[1] clocks the filter core.
- PCLK[2] goes out on a pin.

Change a SELECT bit only while that clock is gated off: the mux itself is not glitch-free.

## Wishbone test counter

The 32-bit counter runs on PCLK[0], wraps around, and is set and read over the bus:

- **Set.** The written value crosses to PCLK[0] through a toggle handshake (`cdc_handshake`). STATUS[0] is high while it is in flight, and further wishbone writes are held off.
- **Read.** The counter keeps a Gray-coded copy. That copy is synchronised into SYSCLK by two flops and converted back to binary, so a read lags the counter by 2–3 SYSCLK cycles.

## DSP: voice road-noise filter

The filter is a time-domain Wiener filter applied as a direct convolution, with one output per input sample:

    y[n] = Σ_{k=0}^{TAPS-1} h[k] · x[n−k]     (16-bit signed inputs, 32-bit wrapping sum)

Its parts:

- **Two memories** of TAPS × 16 bits (`dsp_sample_mem`): a circular sample memory and a coefficient memory.
- **Two counters** (`dsp_addr_counters`):
  - The *up* counter is the write pointer of the circular buffer. A new sample overwrites the oldest one and the pointer steps on, so it then points at the new oldest sample. The convolution then walks upward from there, wrapping around, to the newest sample.
  - The *down* counter walks the coefficients from h[TAPS−1] to h[0].
  - The oldest sample is therefore multiplied with the last coefficient, and the newest with the first.
- **N_MULT multipliers and a 32-bit accumulator** (`dsp_mac`).
  - With more than one multiplier, both memories are split into N_MULT interleaved banks (word i sits in bank i mod N_MULT), so each clock reads N_MULT consecutive words.
  - The circular start point need not be a multiple of N_MULT. The sample banks are therefore read at two neighbouring rows, and the lanes are rotated (`o_rot`) so that lane j always pairs the right sample with the right coefficient.

Use of the filter:

1. Write COEF_ADDR = 0, then TAPS coefficients to COEF_DATA.
2. Write TAPS samples to fill the sample memory. Their outputs are meaningless.
3. From then on, each SAMPLE write produces one output. When it is ready, STATUS.done and the `dsp_irq_o` output rise and RESULT holds y[n]. Both fall on the next SAMPLE write.

The core runs on PCLK[1], and the registers run on SYSCLK:

- Commands (sample or coefficient) go in through one toggle handshake.
- Results come back through another.
- One output takes TAPS/N_MULT + 3 core clocks, plus 2–3 clocks per crossing.
- During that time the DSP reports busy, so wishbone writes wait and SPI writes are dropped and flagged.

## Standard-cell test

There are four 2-input AND gates (`std_and2`, tagged hd, hs, ms, hdll) with shared A and B pins. A 4:1 mux on SW[1:0] picks one gate onto pin C. There are no registers and no bus access. The block exists to compare the propagation delay of the four libraries. Binding each instance to a cell of its library is done at synthesis; the RTL only names the library in the `LIB` parameter.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| user_area_top | DSP_TAPS | 1024 | filter length, size of both memories |
| user_area_top | DSP_N_MULT | 1 | multipliers; must divide DSP_TAPS |
| dsp_noise_filter | SAMPLE_W, ACC_W | 16, 32 | |
| clock_module | N_PCLK | 3 | |
| spi_shift_in/out | DATA_WIDTH | 32 | |

## Where this implementation makes its own choices

These points are fixed here, where the original design left them open or described them inconsistently:

- **Command byte.** The read flag is the first bit on MOSI; the address follows, MSB first. A prose description sends the address first. The schematic numbering puts the flag in bit 7 of the 8-bit register, which is the first bit shifted in. The schematic was followed.
- **Write strobe.** `o_DOUT_VALID` fires only for writes (read flag 0). One example table shows it with the read flag at 1.
- **MISO start.** The shift-out register is started by the synchronised marker as a level, on BCLK. It is not an asynchronous pulse.
- **Clock assignment.** The wishbone test counter runs on PCLK[0] and the filter on PCLK[1], as in the block diagram. A text description swaps the two.
- **Clock override.** The clock-override pin acts only while the gate-override pin is high.
- **Register map, wishbone window, arbitration and busy handling** are all this implementation's.
- **Filter details.** These are also this implementation's:
  - number formats: signed, with a wrapping 32-bit sum;
  - result format: the full sum, not rescaled;
  - the default of one multiplier;
  - the clock-domain handshakes.
- **Standard-cell libraries.** hs and ms are assumed as the two libraries besides hd and hdll.
- **Not included.** A custom hand-drawn cell test was planned, but its function was never defined, so it is absent. The management SoC and pad frame belong to the harness and are outside this RTL.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/asic_pkg.sv tb/tb_user_area_top.sv \
    $(ls rtl/*.sv | grep -v asic_pkg) --top-module tb_user_area_top -Mdir obj
obj/Vtb_user_area_top +verilator+rand+reset+2
```

`+verilator+rand+reset+2` starts every unreset flop at a random value. Everything the design reads is reset, except the contents of the two filter memories. Those are filled before use.

| testbench | what it covers |
|---|---|
| tb_user_area_top | Whole chip with a 32-tap, 4-multiplier filter. Covers counter set and read over both buses, a wishbone stall, gating, external clock, gate and clock overrides on PCLK2 (edges counted), filter outputs against a reference convolution, the interrupt, an SPI write dropped while the filter clock is gated off, and the standard-cell mux. Counts each of these mechanisms and fails if one never happened. |
| tb_user_area_full | Whole chip at default sizes (1024 taps, one multiplier): loads 1024 coefficients, streams 1030 samples, checks outputs and time per output. Runs in about a second. |
| tb_dsp_noise_filter | 64 taps, 1 and 4 multipliers side by side, unrelated clocks; results, irq, timing, drop flag |
| tb_backdoor_spi | Random writes and reads at random SPI speeds; strobe width and position, aborted transaction |
| tb_user_regbus | Decoding, stalls, SPI/wishbone clash |
| others | One per block: shift registers, memories, counters, MAC, clock module, counter, standard-cell test |

## Limits

- The clock mux is a plain combinational mux. Switching a running clock can glitch; gate the clock first.
- Reads of the wishbone test counter right after a load may return a mix of old and new value for 2–3 cycles.
- The design has no sample-rate timing: the filter takes TAPS/N_MULT + a few clocks per output. Whether that keeps up with a given audio rate depends on the PCLK frequency chosen.
- The filter memories are written as arrays. On silicon they would be SRAM macros or be synthesised to flops.
