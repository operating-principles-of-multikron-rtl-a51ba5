# MultiKron_vc: virtual performance counters for multiprocessor nodes

A parallel machine is easiest to tune when it can count events in hardware:
cache misses, cycles spent waiting for a lock, messages sent, passes through a
piece of code. A chip can hold only a few dozen counters, while an experiment
may want thousands. The MultiKron_vc handles this the way virtual memory
handles pages. The chip holds 64 physical counters in 4 banks of 16. Inactive
banks sit in a dedicated SRAM next to the chip, and software swaps banks in
and out with single commands. A 12-bit "home address" names each bank in the
SRAM, so 4096 banks × 16 = 65,536 virtual counters can be reached. Unlike
virtual memory, the paging is explicit: software decides when a bank is
stored, loaded or swapped.

This repository is a synthesizable SystemVerilog model of that chip: the
processor interface, the counters and their source selection, the shadow
registers, the Timestamp, the control registers and the SRAM bank sequencer.
It follows the published description of the NIST MultiKron_vc. Where that
description is silent (cycle counts, encodings of internal words, reset
details), this design makes its own choices. They are listed under
[Design choices](#design-choices-and-departures).

## Structure

```
multikron_vc                     top: pins, address dispatch, read mux
 ├─ mkvc_cpu_if                  READB/WRITEB/STARTB/HOLDB/ACKB handshake
 ├─ mkvc_decoder                 12-bit address -> access class, bank, index
 ├─ mkvc_csr                     Control and Status Register
 ├─ mkvc_hi_reg                  High Order 32-bit register (32-bit CPUs)
 ├─ mkvc_input_sync              Timestamp clock and X[15:0] into Node clock domain
 ├─ mkvc_timestamp               56-bit Timestamp, TSclk/10 and TSclk/100 ticks
 ├─ mkvc_bank_regs               home address + valid bit per bank
 ├─ mkvc_sram_ctrl               STORE / LOAD / SWAP sequencer and SRAM strobes
 └─ mkvc_counter_bank ×4         16 counters, shadows, Enable/Config fields
mkvc_pkg                         widths, field codes, access enum, SRAM word type
```

Everything is clocked by the Node clock. RESETB is asynchronous. The
Timestamp clock and the external event pins are sampled, not used as clocks.
The Timestamp clock must therefore be no faster than a third of the Node
clock. For example, the intended operating point is a 50 MHz Node clock with a
10 MHz Timestamp clock.

## Addressing the chip

The chip is memory mapped. The processor's address splits into three fields:

- The 2-bit byte offset, which is always zero.
- A 12-bit word address AC[11:0], which the chip decodes.
- The higher bits, which external logic decodes into the strobes.

The 12-bit address is `{cmd[3:0], b[3:0], n[3:0]}`. Here `b` is a bank and `n`
is a counter or a bank operation. Only banks 0–3 exist. Any access to b ≥ 4,
and any undefined address, reads as all ones and ignores writes.

| address | read | write |
|---|---|---|
| `000` | – | software reset (Timestamp keeps running) |
| `001` | CSR | CSR |
| `002` | Timestamp (56 bits) | load Timestamp, test mode only |
| `003` | – | Timestamp + 1, test mode only |
| `007` | High Order register | High Order register |
| `1bn` | counter n, 32 bits, **with copy** | counter n, 32 bits |
| `2bn` | n even: counters n+1:n as 64 bits; n odd: counter n. **With copy** | same widths |
| `3b0` | – | clear all counters of bank b |
| `3b1` | – | invalidate bank b |
| `3b2` | bank register b: `{ones, valid, home[11:0]}` | home address; sets valid |
| `3b3` | Enable register (16 × 4 bits) | Enable register |
| `3b4` | Configuration register (16 × 4 bits) | Configuration register |
| `4bn` | shadow of counter n, **no copy** | software increment of counter n |
| `5b1` | – | STORE bank b to its home, if valid |
| `5b2` | – | LOAD bank b from home `data[11:0]` |
| `5b3` | – | SWAP: STORE bank b, then LOAD it from `data[11:0]` |

Read bits that an item does not use return 1. For example, a 32-bit counter
reads as `FFFFFFFF_cccccccc`.

## Counting sources and the control fields

Each counter has a 4-bit Configuration field and a 4-bit Enable field. A bank
packs the sixteen fields of each kind into one 64-bit register. **Writing 0
into a field leaves it unchanged.** As a result, two experimenters can share a
bank without knowing each other's settings: each writes only its own nibbles.

| cfg | source |
|---|---|
| `0001`–`0011` | rising edges of X[n] |
| `0100`–`0110` | software increment (write to `4bn`) |
| `0111` | odd n: upper half of a 64-bit counter; even n: software increment |
| `1000` / `1001` / `1010` / `1011` | TSclk / Node clock / TSclk÷10 / TSclk÷100, counted only while X[n] is high |
| `1100` / `1101` / `1110` / `1111` | TSclk / Node clock / TSclk÷10 / TSclk÷100 (reset default `1111`) |

| en (low 2 bits) | action |
|---|---|
| `00` | no change |
| `01` | disable (reset default) |
| `10` | enable |
| `11` | clear to zero and enable |

External pin X[n] serves counter n of every bank. A 64-bit counter is an
even/odd pair whose odd member is set to `0111`. The odd counter then adds one
whenever the even counter wraps from `FFFFFFFF` to zero. Clearing and enabling
the even counter also clears the odd one. Counters wrap silently.

A stop-watch is a clock source that is switched on and off through the Enable
register. For hardware events, the gated codes `10xx` use X[n] as the switch
instead.

## Shadow registers: reading a bank at one instant

Every counter has a shadow register. A read through `1bn` or `2bn` copies all
sixteen counters of bank b into their shadows in the same clock, and returns
the addressed counter. A read through `4bn` returns a shadow without copying.
To sample a whole bank at one instant, read any counter through `1bn` and the
other fifteen through `4bn`. The counters keep counting throughout.

## Paging counter banks through the SRAM

This is the core mechanism of the design. It is implemented in
`mkvc_sram_ctrl`, with `mkvc_bank_regs` and the word port of
`mkvc_counter_bank`.

**Bank registers.** Each active bank has a bank register holding its 12-bit
home address and a valid bit. Writing the register (`3b2`, or the new address
of a LOAD/SWAP) sets valid. Only `3b1` clears it, apart from the resets. A
STORE of an invalid bank does nothing. So does the store half of a SWAP, which
then only loads. A kernel can therefore mark a bank as scratch, and it will
never overwrite SRAM.

**SRAM word and address.** The SRAM is 64K × 40 bits, asynchronous, and
accessed only by the chip. A word holds one counter together with its two
fields: `{cfg[3:0], en[3:0], count[31:0]}`. A bank occupies 16 consecutive
words at `{home[11:0], i[3:0]}`. A 4-bit word counter walks `i` from 15 down to
0. The home part of the address stays fixed for the whole command.

**STORE** (3 Node clocks per word, 4 with the SRAM wait state):

| clock | AM | M (data) | MEM_R_WB | MEM_OEB | CE1B / CE2H |
|---|---|---|---|---|---|
| setup | `{home,i}` | captured from counter i | 1 | 1 | 0 / 1 |
| pulse (×2 with wait) | `{home,i}` | driven | **0** | 1 | 0 / 1 |
| hold | `{home,i}` | driven | 1 (SRAM latches on this rise) | 1 | 0 / 1 |

Address and data stay in place across the rising edge of MEM_R_WB, so the
SRAM sees hold time as well as setup time. Each word is taken from the live
counter as its write begins. The bank keeps counting during a STORE and is
not changed by it.

**LOAD** (2 clocks per word, 3 with the wait state). One clock first writes
the new home address into the bank register and sets valid. Then MEM_OEB goes
low, MEM_R_WB stays high, and only the address changes. Each word is
presented for one clock (two with the wait state) and captured at the end of
the next clock. The captured count and both fields replace counter i.

**SWAP** is a STORE to the current home, followed by a LOAD from the new home
into the same bank.

The processor's ACKB for these three commands comes only after the last word.
A write to `5bX` therefore returns when the bank has actually moved.

Typical use: the kernel keeps one bank resident for itself. At each context
switch it SWAPs a second bank for the incoming process's bank, reading the
outgoing home from `3b2` into its process table. Process code stores or swaps
its own two banks as it enters different regions.

## Processor handshake

- **Start.** An access starts at the first Node clock edge at which
  `(READB low or WRITEB low) and STARTB low` holds after it did not. The
  processor may pulse READB/WRITEB with STARTB tied low, or hold the strobe
  and pulse STARTB. STARTB held high blocks all accesses. READB/WRITEB (or
  STARTB) must go inactive again before ACKB.
- **Sampling.** Address and data are sampled at the start edge. With the CPU
  wait state they are sampled one clock later, which gives slow address
  decoding an extra cycle.
- **ACKB.** ACKB goes low at the second clock edge after the start (the third
  with the CPU wait state). It stays low for one clock, or for as long as
  HOLDB is low. Read data is driven (`d_oe`) exactly while ACKB is low.
- **Wait-state bits.** Both wait states are CSR bits 13 (CPU) and 12 (SRAM).
  They copy the WCPU and WMEM pins while RESETB is low or during a software
  reset.
- **32-bit mode.** Write 1 to CSR bit 14 to select 32-bit mode, or 1 to bit 15
  to select 64-bit mode. Writing 0 changes nothing. In 32-bit mode:
  - Write bits 63:32 come from the High Order register (`007`). The processor
    writes that register first, then the item.
  - Every read copies bits 63:32 of its result into the High Order register,
    so the upper half is fetched with a second read.
  - The two halves are not atomic: another processor or an interrupt can
    interleave.
- **OE.** The OE pin low turns off both data drivers (`d_oe`, `m_oe`). The
  other outputs are left to the pad ring.

The bidirectional pins D[63:0] and M[39:0] appear as separate in, out and
output-enable ports, ready for a pad wrapper.

## Timestamp, resets, test mode

The 56-bit Timestamp counts Timestamp clock edges. At 10 MHz it wraps after
about 228 years. Only RESETB clears it. Chips that share the reset and the
Timestamp clock therefore stay synchronized, even when one of them does a
software reset.

A software reset (write `000`) clears the following:
- counters and shadows;
- the control fields, back to `1111`/disabled;
- bank registers and valid bits;
- the CSR mode, back to 64-bit;
- the High Order register;
- the SRAM sequencer.

It also resamples the wait-state pins.

With TESTB low, the hardware sources stop counting, and so does the
Timestamp. The processor can then load the Timestamp (`002`) and step it
(`003`). Counters can still be written, and a write to `4bn` steps counter n
whatever its source or Enable field.

## Design choices and departures

The published description fixes the register map, the field codes, the
widths, the SRAM organisation and the command semantics. The following are
this design's own choices:

- **Cycle counts.** All of them are this design's: the ACK latency, the
  clocks per SRAM word, and one extra clock per wait state.
- **When bank transfers acknowledge.** STORE/LOAD/SWAP acknowledge at the end
  of the transfer. The chip's register map has no busy flag, so waiting for
  ACKB is the only completion signal.
- **Bank register read layout.** The valid flag reads at bit 12.
- **SRAM word layout.** The word is `{cfg, en, count}`.
- **CSR bit conflict.** The original text places the wait-state flags in two
  inconsistent ways. This design uses the register table's positions: bit 12
  for the SRAM wait state, bit 13 for the CPU wait state.
- **Access widths.** `1bn` is always 32 bits. The even-64/odd-32 rule applies
  to `2bn` only. `4bn` returns 32 bits.
- **64-bit pairs.**
  - The odd half of a pair ignores its own Enable field.
  - Clear-and-enable of the even half clears both halves.
  - Outside test mode, a software increment needs the counter to be enabled.
- **Test mode.** Test mode also stops the Timestamp.
- **High Order register.** A read of `007` does not copy into the register
  itself.
- **Synchronizers.** The synchronizers (two flip-flops plus an edge detector)
  are this design's. They add two to three Node clocks of latency to external
  and Timestamp edges.
- **SRAM strobes.** MEM_R_WB and the other strobes are decoded from the
  sequencer's registered state. A silicon implementation would drive them
  from dedicated flip-flops to rule out glitches.

## Not included

- **The SRAM.** It is commercial parts. `tb/mkvc_sram_model.sv` is a
  behavioural stand-in for simulation.
- **The pad ring, package pinout and multi-chip module.**
- **The SBus board.**

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops at a watchdog. For example, the
end-to-end test at full size:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
  rtl/mkvc_pkg.sv tb/tb_multikron_vc.sv --top-module tb_multikron_vc
./obj_dir/Vtb_multikron_vc
```

Replace the testbench name to run another one.

| testbench | what it checks |
|---|---|
| `tb_multikron_vc` | The whole chip through its pins, at the default size with the SRAM model. It makes every mechanism happen at least once and fails if one never does: copy/no-copy reads, software increment, 64-bit carry, wrap, external edge and gated counting, TSclk÷10/÷100, zero-field no-ops, clear, invalidate, STORE/LOAD/SWAP, skipped STORE, 32-bit mode, HOLDB, STARTB, OE, CPU and SRAM wait states, software reset, test mode. It also checks ACK latencies. |
| `tb_mkvc_workload_paging` | Context switching between several processes with SWAP. Virtual counters accumulate across many swaps and are checked against expected totals. It also sweeps all 4096 home addresses. |
| `tb_mkvc_counter_bank` | A reference model, compared every clock over 20,000 random clocks of sources and operations. |
| `tb_mkvc_sram_ctrl` | Transfer contents, skipped STOREs and command lengths, with and without the wait state. |
| `tb_mkvc_cpu_if` | Handshake timing, HOLDB, STARTB, the wait state. |
| others | The decoder (exhaustive), CSR, High Order register, Timestamp and prescalers, synchronizers, bank registers. |

The top's only parameter is `NBANK` (4). The address map has room for 16
banks, and the decoder, bank registers and sequencer follow `NBANK`. The
counter count per bank (16) and all widths are fixed by the address map and
the SRAM word, and live in `mkvc_pkg`.
