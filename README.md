# Audio SoC platform with a pseudo-random reverberation coprocessor

This design is a small audio system-on-chip. An 8051 microcontroller controls a set of AMBA peripherals. Audio enters and leaves through I2S.

The part that is more than glue is a hardware early-reflection reverberator. The early reflections of a room are modelled by a very long FIR filter whose taps are a sparse pseudo-random pattern of +1, 0 and −1, so the filter needs:
- no multiplier, because a tap only adds, subtracts or skips a sample;
- no cycle for a zero tap, because the hardware searches ahead for the next non-zero tap.

A 1024-tap stereo filter therefore finishes in well under one sample period at a 40 MHz clock.

Beside the platform are three blocks of the LASP24, a 24-bit audio DSP meant to sit on the same bus:
- the matrix address generator;
- the vector address generator;
- the interrupt/DMA controller.

The DSP's datapath and pipeline are not part of this RTL. The 8051 core and the DSP board are not either. They connect at top-level ports:
- the 8051 external bus and its INT0#/INT1#;
- a second SSRAM port for the DSP.

## Platform structure

```
8051 bus --> wrap8051 (AHB master) --> ahb_decoder
                                         |-- ssram_ctrl   0x0000-0x7FFF  (port B: DSP side)
                                         '-- apb_bridge   0x8000-0xFFFF, 4 KB per slot
                                               |-- uart_apb    0x8000   irq 1
                                               |-- gpio_apb    0x9000   irq 0
                                               |-- i2s_apb     0xA000   irq 2  (group 0)
                                               |-- intc_apb    0xB000   -> INT0#, INT1#
                                               |-- reverb_fir  0xC000
                                               |-- i2s_apb     0xD000   irq 3  (group 1)
                                               '-- i2s_apb     0xE000   irq 4  (group 2)
i2s_clkgen (18.432 MHz mclk) --> SCK 3.072 MHz, WS 48 kHz --> all three I2S groups, pins
i2s_apb group 0 stream ------------------------------------> reverb_fir stream input
```

There is one bus clock, `hclk` (40 MHz intended), for both AHB and APB. The I2S serial logic runs on SCK.

All types shared by the bus blocks are packed structs in `soc_pkg`:
- `ahb_m2s_t` and `ahb_s2m_t`;
- `apb_req_t`;
- the address map constants.

Every peripheral register is one byte wide and sits at a word-aligned offset. This suits the 8051, which can only make byte accesses.

### Bus timing

| transfer | AHB wait states | why |
|---|---|---|
| SSRAM write | 0 | written in the data phase |
| SSRAM read | 1 | the RAM is synchronous, so the data comes one clock after the address |
| any APB register | 2 | the bridge runs SETUP, then ACCESS, while holding HREADY low |

The AHB decoder registers which slave owns the data phase. It updates that choice only when HREADY is high. A slave's response is therefore routed correctly during its wait states even while the master already shows the next address.

### 8051 wrapper (`wrap8051`)

The 8051 bus is the classic multiplexed MOVX bus, handled as follows:
- P0 is sampled on every bus clock while ALE is high. The last sample is the low address byte. This replaces the external address latch of a classic 8051 system.
- RD# and WR# pass through two-flop synchronisers.
- A falling WR# starts one AHB byte write.
- A falling RD# starts one AHB byte read. The read data is driven on P0 until RD# rises.

A register read through the APB bridge takes about 10 bus clocks, including synchronisation. That is 250 ns, well inside the 500 ns RD# pulse of a 12 MHz 8051.

## Early-reflection reverberator (`reverb_fir`)

### The filter

Each stereo input frame x(j) is written at index j of two input circular buffers, XL and XR, of 2500 samples each.

The output is

    y(j) = − Σ_i [ h(2i)·(xL(j − D − 2i) >>> 5) + h(2i+1)·(xR(j − D − 2i) >>> 5) ],   i = 0 .. ORDER−1

Here h ∈ {−1, 0, +1} and D is the first-reflection delay (register DEL2). The input is scaled down by 32 before it is accumulated, so that a full sum fits the 20-bit two's-complement adders. The result is saturated to 16 bits.

The 1024 coefficients are split between two MAC units that run in parallel:
- the left unit uses the even coefficients h(2i) on the left buffer;
- the right unit uses the odd coefficients h(2i+1) on the right buffer.

Tap i of a unit reads the sample DEL2 + 2i frames back, wrapping at 2500. The two units' sums are added for the final result. ORDER sets how many taps each unit uses, from 1 to 512.

### Pipeline and zero skipping

Each MAC unit has two stages:
- **Stage 1:** a priority search over the unit's coefficient bits finds the next non-zero tap and reads the sample for it.
- **Stage 2:** that sample is added to or subtracted from the accumulator.

Both stages are busy every clock, so a unit with n non-zero taps needs n clocks.

The controller has five states, in this order: IDLE, GEN, SEARCH, MAC and STORE. STORE writes the result to the output circular buffer and makes it available:
- in the ER register;
- as a one-clock `out_valid` strobe.

A result is ready `max(nL, nR) + 4` clocks after its sample pair is accepted. nL and nR are the non-zero taps of the left and right units. The worst case is 516 clocks, or 12.9 µs at 40 MHz. One frame lasts 907 clocks at 44.1 kHz and 833 clocks at 48 kHz.

A sample pair that arrives while the filter is busy is dropped and sets OVERRUN.

### Coefficient generator

Coefficients can be written one at a time over the bus (CIDX/CVAL), or generated in hardware. The generator is a 16-bit Fibonacci LFSR with polynomial x^16 + x^14 + x^13 + x^11 + 1. For each coefficient it produces one value r:
- r < DENS gives −1;
- r > 0xFFFF − DENS gives +1;
- any other r gives 0.

The density of non-zero taps is therefore about 2·DENS/65536. Writing GEN fills all 1024 coefficients, one per clock.

### Registers (base 0xC000)

| offset | name | meaning |
|---|---|---|
| 0x00 | CTRL | bit0 GEN: start generation (clears itself); bit1 RUN: accept stream samples |
| 0x04 | STAT | bit0 BUSY, bit1 DONE (write 1 to clear), bit2 GEN busy, bit3 OVERRUN (write 1 to clear) |
| 0x08/0x0C | DENS | density threshold |
| 0x10/0x14 | SEED | LFSR seed |
| 0x18/0x1C | ORDER | taps per MAC unit, clamped to 512 |
| 0x20/0x24 | DEL2 | first-reflection delay in frames, clamped to 2500 − 1024 |
| 0x28–0x34 | XL, XR | sample pair written over the bus; writing the high byte of XR submits it |
| 0x38/0x3C | ER | last result |
| 0x40/0x44 | CIDX | coefficient index |
| 0x48 | CVAL | bit0 non-zero, bit1 negative; a write advances CIDX |
| 0x4C/0x50 | Y | output buffer entry at CIDX |

Sixteen-bit values are written low byte first. Y can read entries 0–1023 only, because CIDX is 10 bits wide.

## I2S (`i2s_clkgen`, `i2s_apb`, `i2s_tx`, `i2s_rx`)

### Clocks and framing

`i2s_clkgen` divides the 18.432 MHz master clock by 6. This gives SCK = 3.072 MHz, which is 64·fs. WS changes on the falling SCK edge every 32 SCK periods, giving 48 kHz.

Each 32-bit channel slot carries a 16-bit two's-complement sample, MSB first. The sample starts one SCK period after the WS change, and the rest of the slot is zero.

### Receiver and transmitter

Both follow the classic structure. WS goes through two flip-flops, and the XOR of their outputs is a pulse WSP that marks each channel change. WSP then drives each side:
- In the receiver, WSP restarts a bit counter. The counter admits 16 bits into a shift register, then stores the word as left or right.
- In the transmitter, WSP loads the next word into a shift register that runs on the falling SCK edge.

### Bus side

The receiver toggles a flag after each right-channel word. The bus side synchronises that toggle and copies the completed pair into RXL and RXR. The copy also has these effects:
- it sets READY, which raises the interrupt if enabled;
- it emits the pair as a one-clock stream into the reverberator.

Registers:
- 0x00–0x0C: TXL and TXR, low and high bytes;
- 0x10–0x1C: RXL and RXR;
- 0x20: STAT. bit0 is READY (write 1 to clear) and bit1 is the interrupt enable.

Three I2S groups are built. They share SCK and WS, and each has its own data pins, registers and interrupt. Only group 0 streams into the reverberator.

## Interrupts (`intc_apb`)

The 8051 has two interrupt pins, and the controller gathers 16 requests onto them:
- Each input is either level-triggered or rising-edge-triggered. It also has an enable bit and a routing bit that selects INT0# or INT1#.
- Priority is fixed, and a lower input number wins. GPIO (input 0) therefore wins over UART (1), which wins over the I2S groups (2, 3, 4).
- Inputs 5–15 are brought out for further devices.
- The VEC register returns the highest-priority active input. Its bit 7 says whether any input is active.

Registers, each split into a low byte and a high byte:
- MODE: 0x00/0x04
- EN: 0x08/0x0C
- PEND: 0x10/0x14
- ROUTE: 0x18/0x1C
- VEC: 0x20

## UART, GPIO and SSRAM

### UART (`uart_apb`)

The frame is 8E1: one start bit, 8 data bits LSB first, an even parity bit and one stop bit. The default rate is 9600 b/s.

A 16× oversampling tick comes from a divisor register, DIVL/DIVH. The reset value is 260 for a 40 MHz clock, which gives a rate error of 0.16%.

The receive interrupt `int_n` is active low. It is held inactive while the UART is selected on the APB, so the 8051's read of DATA is not interrupted by the UART's own interrupt.

Registers:
- DATA: 0x00
- LCR: 0x04. bit0 enables the receiver and bit1 the transmitter.
- LSR: 0x08. bits are RX_READY, TX_BUSY, parity error and framing error.
- DIVL/DIVH: 0x0C/0x10

### GPIO (`gpio_apb`)

The port has 24 pins. Each pin has an output latch, a direction bit, a synchronised input, an input-change interrupt enable and a flag. An input change shows in IN three clocks later.

A register is a group of bytes. Byte k of group g is at g·0x20 + k·4. The groups are OUT, DIR, IN, IE and IFLG.

### SSRAM (`ssram_ctrl`)

The SSRAM is 2048 × 32 bits, or 64 Kbit, with true dual ports:
- Port A is the AHB slave. It supports byte, halfword and word writes.
- Port B is a plain synchronous port for the DSP. Its read data comes one clock after the address.

If both ports write the same word in the same clock, AHB wins.

## LASP24 blocks

### Matrix addressing (`lasp_matrix_agu`)

The matrix sits in bank RAM0, up to 16 × 16 elements. The address of element (X, Y) is the 8-bit value {X, Y}, with X in the high nibble.

A 4-bit code in the instruction chooses how the address is formed from the auxiliary registers AR0 and AR1. AR0L and AR1L are their low nibbles.

| code | address | code | address |
|---|---|---|---|
| 0000 | AR0 | 1000 | [AR0L−AR1L, AR0L] |
| 0001 | AR1 | 1001 | [AR1L+1, AR0L+1] |
| 0010 | AR0+AR1 | 1010 | undefined |
| 0011 | [1111, AR0L] | 1011 | undefined |
| 0100 | [AR1L+1, AR0L] | 1100 | [0000, AR0L] |
| 0101 | [1110, AR0L−AR1L] | 1101 | [1110, AR0L] |
| 0110 | [1110, AR0L+1] | 1110 | undefined |
| 0111 | [AR0L+1, AR0L+1] | 1111 | [0001, AR0L] |

Nibble sums wrap modulo 16. An undefined code returns `valid = 0`. The block is combinational.

### Vector addressing (`lasp_vector_agu`)

This block decodes the vector-mode instruction format:

| bits | field |
|---|---|
| 23..19 | opcode |
| 18..16 | mode, 011 = vector |
| 13..12 | FIL addressing mode |
| 11..10 | EXT addressing mode |
| 9..8 | RAM0 addressing mode |
| 7..6 | RAM1 addressing mode |
| 5..4 | VC bank select |
| 3..2 | VA bank select |
| 1..0 | VB bank select |

For each instruction it produces five addresses: filter memory, external memory, RAM0, RAM1 and window ROM. It also produces the three bank selects.

AR0 and AR1 are 10 bits wide, so they can index 512-element vectors. The filter and external base registers are 14 bits wide.

### Interrupt and DMA (`lasp_irq_ctrl`)

A request flag is set by the rising edge of the peripheral's active-low request and cleared by the acknowledge. A seven-state machine serves it, S0 to S6:

| state | action |
|---|---|
| S0 | wait for an instruction boundary |
| S1 | DMA: the bus is granted |
| S2 | save PC |
| S3 | acknowledge, clearing the flag |
| S4 | fetch the vector |
| S5 | run the service routine |
| S6 | resume |

If DMA and an interrupt are both pending at an instruction boundary, DMA is served first.

## Where this RTL departs from the source design

Choices where the source says nothing:
- all register maps;
- the address map;
- the bus wait states;
- the GPIO change interrupt;
- the LFSR polynomial;
- the even/odd coefficient split;
- output saturation.

Taps per MAC unit:
- The source gives both "at most 256" and "512" convolutions per unit.
- ORDER resets to 512, so that all 1024 coefficients are used.
- Writing 256 to ORDER gives the smaller configuration.

UART clocking:
- The source gives the UART a separate bit-stream clock.
- Here the bus clock is used, with a divisor.

I2S receiver:
- The source's receiver uses a 32-bit counter on the falling SCK edge and stores the word at count 17.
- Here the counter runs on the rising edge and is only as wide as needed.
- It latches the same 16 bits.

Size of the control logic:
- The source's 8051 wrapper has a 40-state machine. The wrapper here uses 6 states, because it only needs to turn one MOVX strobe into one AHB transfer.
- The source's interrupt controller is very small, 8 registers. Here each input has its own mode, enable and routing bit, so the controller is larger but serves the same purpose.

Scope:
- The auxiliary registers of the vector address generator are 10 bits wide. The source calls them 8-bit, but also works on 512-element vectors.
- The reverberator's late-reverberation part (comb and all-pass filters) is not built. In the source it runs as DSP software, not as hardware.
- The 8051 core, the LASP24 core (pipeline, floating-point unit, gated-clock arithmetic unit) and the DSP evaluation board are not included.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.

Packages must come first on the command line:

```
verilator --binary -j 0 -Wno-fatal --top-module tb_soc_top \
    rtl/soc_pkg.sv rtl/lasp_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_soc_top.sv
./obj_dir/Vtb_soc_top
```

Replace `tb_soc_top` with any other testbench name to run that test.

Uninitialised state takes random values, so everything that is read is reset.

`tb_soc_top` runs the whole platform at its default sizes. It uses:
- an 8051 bus model doing MOVX cycles;
- an I2S codec model;
- a UART line model;
- a DSP-side SSRAM master;
- LASP24 stimuli.

The testbench counts each mechanism and fails any that never happened:
- SSRAM and APB wait states;
- shared-memory traffic between the two SSRAM ports;
- GPIO, UART and I2S interrupts and their priority;
- I2S receive and transmit;
- exact reverberator results against a reference model;
- zero skipping;
- coefficient generation;
- overrun;
- the undefined matrix codes;
- invalid vector instructions;
- the DSP's DMA and interrupt service.

`tb_reverb_fir` runs the reverberator at full size (2500-entry buffers, 1024 coefficients) against a bit-exact software model. It covers random coefficients, delays and orders, and checks the latency formula on every result.

`tb_reverb_workload` streams 20,282 mono samples through the reverberator at the real 44.1 kHz frame rate: one frame every 907 clocks at 40 MHz. The coefficients are generated in hardware for 14,400 non-zero taps per second. The test checks three things:
- every result matches the model;
- every result is ready within its frame, with about 190 clocks needed against 907 available;
- no frame is dropped.

It takes about a minute in verilator.
