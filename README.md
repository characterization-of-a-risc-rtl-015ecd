# A RISC-V microcontroller that counts its own upsets

This is a small RV32I system-on-chip for SRAM-based logic exposed to radiation. Neutrons flip bits in flip-flops and block RAM. The SoC has two jobs:

- mask those flips where it can;
- report every flip it sees, so that a radiation test can tell what went wrong.

Most of the state sits behind a single-error-correcting, double-error-detecting (SECDED) Hamming code:

- the program counter;
- the 31 general registers;
- the whole data memory.

The ALU and the control unit are built three times, and a majority voter sits behind them.

Two run-time controls make the chip useful as a test vehicle:

- **Hardening switch.** One CSR can turn correction on or off for each protected part, so one build can run with hardening off, processor-only, memory-only, or both.
- **Error counters.** Ten counters record every single error, double error and voter disagreement. The counters survive a watchdog reset, so the software can print them after a hang.

The program lives in on-chip flash and executes directly from it over the bus. At start-up it copies its data sections into the protected data memory.

```
                 +-------------------- rv_core ---------------------+
                 |  PC (39-bit SECDED)   regfile (39-bit SECDED x31) |
                 |  control x3 -> voter  ALU x3 -> voter   CSRs      |
                 +-----+---------------------------+-----------------+
          instruction  |                     data  |
                       |                     +-----+------+  addr[31:30]==0
                       |                     |  dmem_mux  |----------------> dmem_secded (32 KiB, 39-bit words)
                       |                     +-----+------+
                       v                           v  otherwise
                 +-------------------- axil_master (AXI4-lite) -----+
                 +------------------ axil_interconnect -------------+
                    |0x4000_0000          |0x4000_0100         |0x6000_0000
                axil_uart             axil_wdt            axil_apb_bridge --> APB3 port (on-chip flash)
                                          | wdt_rst
   por_rst_n ------------------------> reset_ctrl --> SoC reset, reset cause
```

## The core: a multi-cycle RV32I with a grant handshake

`rv_core` takes several cycles per instruction, controlled by a three-state machine:

| State | What happens |
|---|---|
| `S_FETCH` | Raises `imem_req` with the PC on `imem_addr` and waits. The instruction arrives on `imem_rdata` in the cycle `imem_gnt` is high. |
| `S_EXEC` | Decodes, runs the ALU and writes back, in one cycle. |
| `S_MEM` | Loads and stores only. Holds `dmem_req` with stable address, byte enables and data until `dmem_gnt`. A load takes its data from that same cycle. |

The core is a plain request/grant master: it keeps a request, address and data stable until the grant. Any memory or bus can therefore stall it for as long as it needs. A one-cycle grant on both ports gives:

- 2 cycles per ALU instruction;
- 3 cycles per load or store.

In the SoC the fetch goes through the bus and the APB3 bridge, so it dominates.

**Instruction set**
- All of RV32I.
- CSR instructions (`csrrw/s/c` and their immediate forms).
- Simple user-level traps:
  - `ecall` traps with cause 8, `ebreak` with cause 3, and an unknown or illegal encoding with cause 2.
  - A trap saves the PC in `uepc`, writes `ucause` and jumps to `utvec`.
  - `uret` jumps back to `uepc`.
- `fence` does nothing.
- There are no interrupts.
- Misaligned accesses are not trapped: the low address bits only select bytes within the addressed word.

## SECDED words

Every protected 32-bit value is stored as a 39-bit code word (`soc_pkg::secded_encode`):

| Bit | Content |
|---|---|
| 0 | Parity over the whole word |
| 1, 2, 4, 8, 16, 32 | Hamming check bits |
| Other 32 positions from 3 to 38 | Data bits in ascending order (position 3 = d0, 5 = d1, 6 = d2, 7 = d3, 9 = d4, ...) |

The decoder (`secded_dec`) forms the syndrome from the six check bits and compares it with the overall parity:

| Syndrome | Overall parity | Verdict | Flag |
|---|---|---|---|
| 0 | right | no error | none |
| any | wrong | single error at position *syndrome* (0 = the parity bit) | `err_single` |
| ≠ 0 | right | double error | `err_double` |
| > 38 | wrong | not a single error, so reported as double | `err_double` |

Rules that apply to every decoder:
- **The flags are always produced.** The `correct_en` input decides only whether the data output is repaired. With correction off, the error still reaches the counters.
- **A double error is never corrected.** The data passes through unchanged.

Where the decoders sit:
- **PC (`hamming_reg`).** Decoded on every read. The core writes back the corrected value plus 4 (or the jump target) on every instruction, so a single flip in the PC is scrubbed on the next update.
- **Register file (`rv_regfile`).** Holds the code words in flip-flops and has a decoder on each of the two read ports. A corrected read is not written back; a later write of that register clears the error.
- **Data memory (`dmem_secded`).** Writes the encoded word.
  - A full-word store takes one cycle.
  - A byte or halfword store is a read-modify-write. The old word is read, decoded (and corrected if enabled), merged with the new bytes and re-encoded, so the store takes one extra cycle.
  - A read grants one cycle after the request and returns the decoder flags with the data.

## Triple modular redundancy

The ALU (`rv_alu`) and the control unit (`rv_control`) each exist three times.

**ALU.** Each copy computes the 32-bit result and the branch decision. A 33-bit `tmr_voter` takes the bitwise majority of the three.

**Control unit.** Each copy holds its own state register and its own decoder. The voter compares the full control bundle, including the next state. With control correction on, every copy loads the voted next state, so a copy that was upset falls back in step on the next cycle.

Correction off does not stop detection: the voter passes copy 0 unchanged and still raises `mismatch`.

## Hardening configuration and error counters

**Hardening configuration, CSR 0x800** (read/write, reset value `0x1F`, every protection on)

| Bit | Correction enable for |
|---|---|
| 0 | PC decoder |
| 1 | Both register-file decoders |
| 2 | Data-memory decoder |
| 3 | ALU voter |
| 4 | Control voter |

"Processor hardening" means bits 0, 1, 3 and 4; "memory hardening" means bit 2. Software writes this register first, at start-up.

**Error counters, CSRs 0xCC0–0xCC9** (read-only, 32 bits, wrapping)

| CSR | Counts | When it counts |
|---|---|---|
| 0xCC0 / 0xCC1 | PC single / double | once per PC update |
| 0xCC2 / 0xCC3 | data memory single / double | with the grant of a data-memory access |
| 0xCC4 / 0xCC5 | register port rs1 single / double | in the execute cycle, only if the instruction reads rs1 |
| 0xCC6 / 0xCC7 | register port rs2 single / double | same, for rs2 |
| 0xCC8 | control voter disagreement | every cycle it occurs |
| 0xCC9 | ALU voter disagreement | every cycle the ALU result is used |

Counting rules:
- **Only sampled reads are counted.** A flip in a register is counted each time an instruction reads that register, not when the flip happens. A flip in a register that nobody reads is never counted.
- **Persistent faults count every cycle.** A voter disagreement that lasts several cycles adds one per cycle.
- **Only power-on reset clears the counters.** A watchdog reset leaves them as they were.

**Other CSRs**

| CSR | Meaning |
|---|---|
| 0xCCA | Reset cause: 1 if the last reset came from the watchdog, 0 after power-on |
| 0xC00 / 0xC80 | 64-bit cycle counter (`cycle` / `cycleh`) |
| 0x000–0x044 | User trap registers (`ustatus`, `uie`, `utvec`, `uscratch`, `uepc`, `ucause`, `utval`, `uip`) |
| 0xF11–0xF14 | Machine information (`mvendorid`, `marchid`, `mimpid` = 2, `mhartid`) |

## Bus, memory map and peripherals

**Memory map**

| Address | Target |
|---|---|
| `addr[31:30] == 0`, i.e. 0x00000000–0x3FFFFFFF | data memory, 8192 × 39 bit, aliased every 32 KiB |
| 0x40000000–0x400000FF | UART |
| 0x40000100–0x400001FF | watchdog |
| 0x60000000–0x6FFFFFFF | APB3 bridge to the flash; the reset vector is 0x60000000 |
| anything else on the bus | DECERR, read data 0 |

**Bus path**
- `dmem_mux` sends each data access either to the data memory or to the bus. It returns whichever grant arrives. Error flags come only from the memory side.
- `axil_master` carries both the instruction fetches and the bus data accesses. It runs one AXI4-lite transaction at a time. When both ports wait, the data port goes first, because the core only issues a data access while its fetch is finished.
- Bus error responses (DECERR, SLVERR) do not reach the core. The access simply completes, and a failed read returns whatever the slave drove (0 for DECERR).
- The AXI4-lite request and response are the packed structs `axil_req_t` and `axil_rsp_t` from `soc_pkg`.

**UART (`axil_uart`)**: 8N1, baud rate = clock / DIV, default DIV 434 (115200 baud at 50 MHz).

| Offset | Register |
|---|---|
| 0x0 | TX. A write is held (the bus waits) while a character is still being sent, so software never loses one. |
| 0x4 | STATUS: bit 0 = transmitting, bit 1 = received byte waiting |
| 0x8 | RXDATA. Reading it clears bit 1. |
| 0xC | DIV |

**Watchdog (`axil_wdt`)**: enabled after reset and counts down from 500,000,000 (10 s at 50 MHz). Reaching zero requests a reset of the whole SoC.

| Offset | Register |
|---|---|
| 0x0 | LOAD. Writing sets the count, which kicks the dog. Software forces a reset by writing a small value. |
| 0x4 | CTRL: bit 0 = enable |
| 0x8 | COUNT |

**APB3 bridge (`axil_apb_bridge`)**
- Each AXI access becomes one APB3 transfer: a SETUP cycle, then ACCESS cycles until `pready`.
- `pslverr` becomes SLVERR.
- APB3 has no byte strobes, so a write is always a whole word.
- The flash itself is not part of the RTL. Its APB3 port is brought out of `riscv_soc` as the `apb_*` signals.

**Reset (`reset_ctrl`)**
- `por_rst_n` resets everything asynchronously.
- A watchdog request resets everything except the error counters and the reset-cause flag.
- The SoC reset is released 17 clock edges after the power-on reset rises or after the edge that saw the request.

## Departures and choices

What is specified, and what is filled in:
- **Given:** the architecture (figure of blocks, bus, addresses of the three peripherals), the hardening techniques, the ten counters, the configuration CSR, the watchdog behaviour and the 50 MHz clock.
- **Chosen here:** the details listed below.

**Encodings and addresses**
- CSR addresses 0x800 and 0xCC0–0xCCA, and the layout of the configuration bits.
- The SECDED bit layout.
- The register maps of the UART and the watchdog.
- The data-memory address window and its 32 KiB size. The size is inferred from the block-RAM count of the reference build: 16 RAM18K blocks for 32-bit words and 20 for 39-bit words, in 2K×9 mode, both hold 8192 words.
- The reset vector.

**Behaviour**
- The trap behaviour of `ecall`/`ebreak`/illegal instructions.
- The exact cycle in which each counter counts.
- The read-modify-write for partial stores.
- The reset stretch.

**Build**
- The hardening is always built in and is only switched at run time. The reference system also had separate unhardened builds, which were smaller and faster; here "no hardening" only disables correction.

**Not part of this design**
- The on-chip flash.
- The application software: start-up copy and CRC-32 check, benchmark, printing of the counters.

## Using the RTL

Blocks, in `rtl/`:

| Block | Files |
|---|---|
| Package | `soc_pkg.sv` |
| Core | `rv_core.sv`, with `rv_control`, `rv_alu`, `tmr_voter`, `rv_regfile`, `hamming_reg`, `rv_csr`, `secded_enc`, `secded_dec` |
| Memory side | `dmem_secded.sv`, `dmem_mux.sv` |
| Bus | `axil_master.sv`, `axil_interconnect.sv`, `axil_regif.sv` (AXI4-lite to a simple register port, shared by UART and watchdog) |
| Peripherals | `axil_uart.sv`, `axil_wdt.sv`, `axil_apb_bridge.sv`, `reset_ctrl.sv` |
| Top | `riscv_soc.sv` |

Top-level parameters:
- `DMEM_WORDS` (8192)
- `WDT_TIMEOUT` (500,000,000 cycles)
- `UART_DIV` (434)
- `RESET_VECTOR` (0x60000000)

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints `TB_RESULT checks=N failures=M`.

Testbench helpers:
- `rv_asm_pkg.sv`: encodes RV32I instructions, so programs are written in SystemVerilog.
- `flash_apb_model.sv`: a behavioural APB3 flash with random wait states that refuses writes.
- `axil_tb_slave.sv`: an AXI4-lite memory slave with random delays.
- `axil_tasks.svh`: bus read/write tasks.

Build any testbench with Verilator 5, e.g. the whole SoC:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/soc_pkg.sv tb/tb_riscv_soc.sv --top-module tb_riscv_soc --Mdir obj -o sim
obj/sim
```

`tb_riscv_soc` runs the SoC at its default parameters. The program, placed in the flash model, does the following in order:

1. Boots from flash, copies its data into the data memory and checks a CRC-32.
2. Runs a vector sum while the testbench flips bits in:
   - the data memory (single and double errors);
   - the register file;
   - the PC;
   - one control copy and one ALU copy.
3. Repeats part of the run with correction off.
4. Provokes a DECERR and an APB SLVERR.
5. Lets the watchdog expire.
6. After the restart, checks the reset cause and that the counters survived.
7. Forces a second watchdog reset.

The testbench checks the characters the UART sends. It counts each mechanism and fails if any never occurred:

- bus fetches;
- memory reads and writes;
- read-modify-writes;
- DECERR and SLVERR;
- watchdog resets;
- every counter.

`tb_harden_campaign` replays the sequence of a radiation test, at default parameters. It runs the same program four times, in this order:

1. processor and memory hardening;
2. memory only;
3. none;
4. processor only.

Each run selects its configuration from the reset cause and a run number kept in data memory. It ends with a forced watchdog reset. In every run the testbench upsets one stored data word and one register. The UART line then shows which upset each configuration masked, together with the counters accumulating across resets.

`tb_rv_core` tests the core alone against a memory with random grant delays. It covers every instruction class, traps, CSRs and fault injection on each protected part.
