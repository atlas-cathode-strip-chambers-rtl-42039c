# CSC ROD readout logic

This is synthesizable SystemVerilog for the digital data path of a readout driver (ROD) for the
ATLAS Cathode Strip Chambers. There is one ROD per pair of chambers. It receives the digitised
strip data of both chambers and spreads it over ten sparsification processors (SPUs), five per
chamber. It then gathers each chamber's reduced data in a per-chamber processor (RPU) and sends
one event fragment per Level-1 trigger to the readout link (ROL). The data is moved by the
*Data Exchange* (DX), a set of three FPGAs driven by an instruction stream from the host
processor (HPU). The DX is the core of this code, and most of this text is about it.

Around the DX sit a few smaller units of the same board and its transition module:

- the input buffers of the SPUs;
- the FIFOs between the processors and the DX;
- the SCA cell manager, which decides which analogue storage cells hold a triggered sample and
  when they are read;
- the TTC trigger recorder;
- the power-up sequencer;
- the laser-safety supervisor of the optical links.

The DSPs, SDRAM, VME interface, clock synthesis, analogue power parts, optical transceivers and
the S-LINK card are not logic written here. Their signals are ports of the top module.

## Structure

```
csc_rod_top
 ├─ per half (A, B):
 │   ├─ 5 × xb_input_buffer      interconnect (SCLK, 25 bit) → SPU DSP, 1K × 32
 │   ├─ 5 × async_fifo           SPU EMIF output, DPU_CLK → DX_CLK, 1K × 33
 │   ├─ async_fifo               RPU EMIF input,  DX_CLK → DPU_CLK, 512 × 33
 │   └─ async_fifo               RPU EMIF output, DPU_CLK → DX_CLK, 512 × 33
 ├─ data_exchange
 │   ├─ dxf (A), dxf (B)         front FPGAs, 1 kW front FIFO each (DX_CLK → DXINT_CLK)
 │   ├─ dxb                      back FPGA: internal bus, 1 kW back FIFO (DXINT_CLK → DCLK)
 │   └─ async_fifo               Host FIFO 16K words (DXINT_CLK → HPU_CLK)
 ├─ sca_controller
 ├─ ttc_trigger_info             (uses sync_fifo)
 ├─ power_sequencer
 └─ laser_safety
```

`csc_rod_pkg` holds the shared types: the tagged DX word, the instruction format, the SCA
readout request and the trigger record. Every clock domain has its own active-low asynchronous
reset. The clock names follow the board: SCLK 60 MHz, DPU_CLK 30 MHz, DX_CLK 40 MHz,
DXINT_CLK 50 MHz, DCLK 40 MHz and HPU_CLK 30 MHz.

## How the DX builds an event

Each half-ROD has a front-end bus joining its six processors (SPU0–SPU4 and the RPU) to a
front FPGA (`dxf`). Both fronts feed one internal bus into the back FPGA (`dxb`). The back FPGA
writes the S-LINK and can copy any word into the Host FIFO, which the HPU reads back.

For every trigger the HPU sends 23 instruction words:

1. On both sides, *run front sequence*: SPU0..SPU4 → RPU. Each front collects the sparsified
   data of its five SPUs into its RPU (typically 4·15 + 45 = 105 words).
2. On side A, *write*: the beginning-of-fragment control word `0xB0F00000` and the 9-word ROD
   leader go towards the back end.
3. On both sides, *run front sequence*: RPU → back end. Each RPU's reduced data (typically 75
   words) goes into its front FIFO.
4. On side A, *write*: a command word that releases the internal bus to B.
5. On side B, *write*: the 4-word trailer, the end-of-fragment control word `0xE0F00000`, and a
   command word that returns the bus to A.

The fragment that reaches the ROL is therefore 1 + 8 + 75 + 75 + 3 + 1 = 163 words. The A
half's words come out before the B half's, even though both RPUs ran at the same time.

### Instruction words

The instruction format is defined by this design (`csc_rod_pkg`). Bits [31:28] hold the opcode
and bits [27:26] a side mask (bit 0 = A, bit 1 = B).

- **`OP_SEQ`**
  - [25:20]: a mask of source processors, served in ascending index.
  - [19]: set when the destination is the back end.
  - [18:16]: the destination processor index, used when [19] is clear.
  - [17]: to-host flag, used when [19] is set.
  - [16]: to-ROL flag, used when [19] is set.
- **`OP_WRITE`**
  - [25:24]: the kind of the words that follow (data, S-LINK control or command).
  - [17:16]: the to-host and to-ROL flags.
  - [11:0]: the count N of words that follow in the stream.

The helper functions `instr_seq` and `instr_write` build these words.

Both fronts see every instruction word. The stream advances only when both fronts are ready
(`instr_ready = &f_ready`). A word addressed to both sides therefore costs one slot, and a
front that is not addressed still consumes the word and, for `OP_WRITE`, the N payload words.
Each front takes a new instruction only when it is idle. The HPU can therefore queue a sequence
on one half and a write on the other, and they cannot overtake each other.

### End of a processor's data

A front must know when one source has delivered all of its event. Every word on a front-end
bus carries a `last` bit. This is the 33rd bit of the EMIF FIFOs, set by the DSP on its final
word of the event. A sequence serves a source until its `last` word and then moves to the next
source in the mask. When the destination is a processor, the front marks `last` only on the
final word of the final source. That is how the RPU sees one complete event from five SPUs.

### Tagged words and the internal-bus handover

Words going towards the back end are 36 bits wide in the front FIFO: `to_host`, `to_back`, a
2-bit kind, and 32 data bits. The back FPGA owns a single ownership bit, and after reset half A
owns the bus. It reads only the owner's FIFO. A command word equal to `CMD_RELEASE_BUS` flips
the owner and is not forwarded. Every other word goes to the Host FIFO (34 bits: kind and data)
and/or the back FIFO (33 bits: S-LINK control flag and data), depending on its tags.

The handover needs no handshake between the fronts. Half B may fill its front FIFO at any
time, but its words stay there until A's release command has passed. The back FIFO crosses to
DCLK. The S-LINK side is a valid/ready pair with a control flag, so a not-ready link simply
holds words in the back FIFO.

### Rates

- The front-end bus moves one word per DX_CLK (40 MW/s per half).
- The internal bus moves one word per DXINT_CLK (50 MW/s).
- The ROL side moves one word per DCLK (40 MW/s).

At 100 kHz trigger rate, the per-trigger counts above need 18 MW/s per front-end bus, 16.3 MW/s
to the ROL and 2.3 MW/s of instructions. The end-to-end test checks that 105 words reach each
RPU within 110 DX_CLK cycles.

## SCA cell management

Each chamber channel stores its samples in a 144-cell switched-capacitor array (SCA). About 70
cells cover the trigger latency, and at most about 32 cells wait for digitisation.
`sca_controller` works as follows:

- **Write pointer.** On each `sample_en` it advances a write pointer over the ring of 144
  cells. It skips cells that are reserved for readout, so a pending sample is never
  overwritten. A history memory remembers which cell each sample went to.
- **Reservation.** On `l1a` it queues a request for `n_ts` consecutive timeslices, starting
  LATENCY samples back. The request queue is 4 deep; a full queue counts `l1_overrun` and
  raises `fault`. One timeslice is handled per clock. A timeslice that is already reserved by
  an earlier, overlapping trigger is not queued again (`shared_ts` counts these), so each cell
  is digitised exactly once.
- **First-timeslice flag.** It is stored per cell and read when the cell leaves the readout
  queue. The flag marks where each trigger's data begins, even when the first timeslice is
  shared.
- **Readout queue.** It holds up to MAX_PENDING = 32 timeslices. Each entry goes out as
  `ro_valid`/`ro_ts` (cell address and first flag) until `ro_ready`. `ro_done` frees the cell
  for writing.
- **Fault.** `fault` is set when a new trigger would need more cells than remain outside the
  latency pipeline (reserved + LATENCY + n_ts > 144).

The serial control stream that carries these decisions to the chamber electronics is not
modelled; its format is not given in the material this design follows.

## Smaller units

- **`xb_input_buffer`.** 25-bit interconnect words arrive on SCLK. The unit zero-extends them
  to 32 bits and buffers them 1K deep for the DSP, which reads on its own clock. The
  interconnect cannot be stalled, so words arriving while the buffer is full are dropped and
  counted. The next stored word carries bit 31 so that software sees the gap. The exact
  reformatting is this design's choice.
- **`ttc_trigger_info`.** It keeps a 12-bit BCID (reset by BCR, wrapping at 3564), a 24-bit
  L1ID (reset by ECR), and a free-running time counter. For each L1A it stores a record of
  {type, L1ID, BCID, time} in a 64-deep FIFO for the HPU; `lost` counts overflows. The field
  widths and the orbit length are ATLAS conventions rather than the source's numbers.
- **`power_sequencer`.** Nothing is switched on until the RCC enables power and both backplane
  voltages (5 V, 3.3 V) are good. The supplies then come up in the order A (DSP core) →
  B (2.5 V) → C (DSP 3.3 V), each waiting for the previous good signal. `penb_surge` keeps the
  two extra surge switches on VB enabled for SURGE_CYCLES and then drops them. A missing good
  signal after TIMEOUT_CYCLES, or a supply that fails later, turns everything off and latches
  `fault` until the RCC enable is withdrawn. The order, the timeout and the latching are this
  design's choices.
- **`laser_safety`.** `tx_disable` starts asserted. It is asserted whenever the rack-door
  interlock is absent, and latched when more than MAX_LOSSES loss-of-lock events happen within
  WINDOW_CYCLES. A `clear` re-enables the transmitters only with the interlock present.
  `fill_req[i]` asks link i's serializer to send fill frames while that link is unlocked. The
  threshold and window lengths are assumed values.
- **`async_fifo`.** Every clock crossing uses this FIFO: Gray-coded pointers, two-flop
  synchronisers and a first-word fall-through read port. Its assertions (no write when full, no
  read when empty) sample the handshake in each domain. Verilator notes that these assertions
  use an asynchronous reset net; that warning is expected.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/csc_rod_pkg.sv tb/tb_csc_rod_top.sv --top-module tb_csc_rod_top
./obj_dir/Vtb_csc_rod_top
```

Replace the testbench name to run another one. `tb_csc_rod_top` runs the whole ROD at its
default sizes and finishes in about a second:

- it feeds raw events into all ten SPU input buffers;
- it models the SPU and RPU software as queues that sparsify and forward the data;
- it sends the 23-word instruction stream for two triggers;
- it applies random back-pressure on the S-LINK;
- it checks every word of both 163-word fragments and the Host FIFO capture.

At the same time it exercises the SCA manager (overlapping triggers that share timeslices), the
TTC recorder, the power sequencer and the laser-safety supervisor. It counts how often each
mechanism happened (bus handovers, S-LINK stalls, host captures, shared timeslices, trigger
records, fill requests) and fails if any count is zero.

Two more testbenches run the trigger rates at default sizes:

- `tb_dx_trigger_rate` sends 40 events through the Data Exchange at 100 kHz, with sparsified
  sizes varied around the typical ones. It checks every ROL word, and checks that each
  fragment is complete within the 10 µs trigger period. The largest time from trigger to
  end-of-fragment is 332 DX_CLK cycles (8.3 µs).
- `tb_sca_trigger_rate` drives the SCA manager with random triggers of four timeslices each.
  The readout engine takes 2 µs per timeslice. The test runs three phases:
  - under the fewer-than-8-in-80 µs rule at 87 kHz, which is the most that rule allows;
  - under the relaxed fewer-than-10 rule at 106 kHz;
  - a tight burst of nine triggers, which must raise `fault`.

The block testbenches use smaller FIFO depths and shorter timers where that shortens the run.
The simulations run with two-state logic and random initial values, so every register is reset
before it is read.

## Departures and open points

- The DX instruction encoding, the `last` bit framing of processor data and the
  release-command payload are this design's own. The source gives only what each instruction
  does and how many words it costs.
- The EMIF FIFOs are 33 bits wide (data + last) instead of 32. The Host FIFO is 34 bits
  (kind + data) instead of 32.
- The SPUs never receive data from the DX here; only the RPUs do.
- The SCA control stream to the chambers, the G-Link frame formats, the interconnect FPGA's
  CTM side, DPU Control, the VME interface and the several small CPLDs are not implemented.
  Their functions are named without enough detail to build them.
- The power order, the timeouts, the laser-safety threshold and window, and the TTC field widths
  are reasonable choices, not given values.
- Under a tight burst of 9 triggers of 4 timeslices each, which the relaxed 10-in-80 µs trigger
  rule of a system test allows, the SCA manager would exceed its 32 pending timeslices and
  raise `fault`. The rule of fewer than 8 triggers in 80 µs always fits. That rule, read literally, also caps
  the average trigger rate at 87.5 kHz.
