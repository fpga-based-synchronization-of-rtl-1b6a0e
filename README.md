# Synchronizing a frequency-coded QKD link by sideband interference

In frequency-coded quantum key distribution, the transmitter (Alice) and the
receiver (Bob) each phase-modulate the same optical carrier with an RF signal.
The first sideband of the light that reaches Bob's detector is bright when the
two RF phases agree and dark when they are opposite. Key bits are encoded as
RF phases, so the two RF signals have to line up to a small fraction of an RF
period (400 ps at 2.5 GHz). They also have to line up symbol for symbol, so
that Alice's first qubit meets Bob's first basis choice.

This RTL makes the interferometer do the synchronizing itself:

* Both ends produce the RF signal digitally. A 10 Gb/s serial transceiver
  (GTX) outputs a square wave, and its 64-bit parallel word is computed every
  clock. The phase, the carrier frequency, the symbol rate and a time offset
  are all set in logic.
* Bob aligns the two waveforms in three steps, each coarser than the one
  before. Step 1 shifts the clock phase in 12.6 ps steps, step 2 shifts by
  whole RF cycles and step 3 by whole symbols. Each step watches the detected
  interference for a distinctive shape.
* When the waveforms are aligned, a pilot pattern and two state machines move
  both ends from synchronization to quantum transmission at the same instant.
  They switch on a wrap of a shared 35-bit time base.

All of the FPGA logic of both ends is here. The serial transceivers, the clock
manager, the optics and the host software are outside this RTL. Their signals
are ports of the top level.

## The waveform generator (`waveform_modulator`)

This is the core of the design and the part that takes most explaining.

**Time base.** `step_counter` counts 100 ps bit slots of the 10 Gb/s line. It
advances by 64 every 156.25 MHz clock, because one clock carries one 64-bit
word. It is 35 bits wide and wraps every 2^29 clocks, which is 2^35 × 100 ps,
about 3.44 s.

**One value per slot.** The offset `shift_val` (ShiftVal, in slots) is added to
the count to give `base`. Lane *i* of the output word gets the value
`base + i`. Lane 0 is the first bit on the line. All 64 lanes are computed in
parallel.

**Carrier.** Bit *N* of a slot counter toggles every 2^N slots. Taking bit
`log_fd` of each lane's value therefore gives a square wave of
5 GHz / 2^log_fd: `log_fd = 1` gives 2.5 GHz and `log_fd = 0` gives 5 GHz.

**Symbols.** The 8 bits `value[log_bps+7 : log_bps]` address a 256-bit
pattern, so each pattern bit lasts 2^log_bps slots and the pattern repeats
every 256 × 2^log_bps slots.

| `log_bps` | slots per symbol | symbol rate | pattern period |
|---|---|---|---|
| 5 | 32 | 312.5 Msymbol/s | 819.2 ns |
| 12 | 4096 | 2.441 Msymbol/s | 104.9 µs (enough for about 21 km of fiber) |

**Pattern memories.** Every lane reads its own copy of the 256 × 1 pattern
memory (`pattern_ram`), so all 64 lanes can look up their symbols in the same
clock. The contents are whichever of four patterns the state machine selects:
all zeroes, qubits, pilot or sync. They follow the selector without a load
cycle. The read is combinational, which maps onto look-up tables rather than
flip-flops. Patterns are sent most significant bit first, so a pattern
written `256'hB38E...` starts 1, 0, 1, 1.

**BPSK.** Each lane's pattern bit is XORed with its carrier bit, so a 1 inverts
the carrier. `carrier_en = 0` replaces the carrier with zeroes, which leaves
the bare pattern bits.

**Shifting.** Adding 1 to `shift_val` delays nothing. It moves the whole
waveform, carrier and data together, by one 100 ps slot relative to the time
base. Adding 4 moves it by one 2.5 GHz cycle and adding 32 by one
312.5 Msymbol/s symbol.

The output word is combinational from the counter register and the controls.
Apart from the counter, the generator has no flip-flops.

## The three-step alignment

Bob's node (`bob_node`) gives the host two controls:

* `phase_shift_ctrl` issues single steps to the dynamic phase-shift port of
  the clock manager (`psen`, `psincdec`, `psdone`). This moves the phase of
  the clock Bob sends to Alice by one resolution step, 12.6 ps on the intended
  device. One step is outstanding at a time, and `phase_steps` keeps the
  signed net count.
* `shift_val_reg` holds Bob's ShiftVal. The host loads it or adds a step to
  it.

During synchronization both ends send the same 256-bit sync pattern. Bob
complements every second bit (the mask `{128{2'b01}}`, which turns 0xB38E
into 0xE6DB). When the two ends are aligned, the detected output therefore
alternates bright and dark symbol by symbol. The host then runs:

1. **Phase matching.** Step the clock phase while the interference amplitude
   grows, and stop at the maximum. The residual error is at most one 12.6 ps
   step, which costs about 0.5 % of visibility at 2.5 GHz.
2. **Symbol boundaries.** Add 4 to ShiftVal, one RF cycle, until no pulse
   shorter than a symbol appears in the detected output.
3. **Frame.** Add 32 to ShiftVal, one symbol, until the output is a clean
   alternating square wave. At 312.5 Msymbol/s that wave is 156.25 MHz.

The host then sends `sync_achieved` to both ends.

## Crossover to quantum transmission

Alice cannot simply switch to qubits, because Bob would not know where they
start. The switch is therefore made on wraps of the time base:

```
Alice (alice_fsm)                        Bob (bob_fsm)
SYNC  --sync_achieved--> ARMED           SYNC  --sync_achieved-->  ARMED
ARMED --count wraps to 0--> PILOT        ARMED --pilot_detected--> XOVR
PILOT --one pattern period--> XOVR       XOVR  --count wraps to 0--> Q
XOVR  --count wraps to 0--> Q            Q     --sync_request-->   SYNC
Q     --sync_request--> SYNC
```

* Alice sends the 256-bit pilot once, starting at count 0, and then sends
  zeroes until the next wrap. That wait is the crossover (XOVR). It gives the
  optics time to attenuate the laser and to switch the detector to
  single-photon mode.
* While armed, Bob sends zeroes, so his detected output follows Alice's pilot.
  `pilot_detector` shifts one sample per received symbol into a 16-bit
  register. It compares all 16 bits with a programmable signature and raises
  `pilot_detected` on a full match.
* Bob then waits for his own wrap. Both ends enter Q on the word whose count
  is 0, and send their qubit and basis registers. The detected output is then
  the XNOR of the two, symbol by symbol. For example, registers starting
  0x8461 and 0x2E9E give 0x5500.

The state machines test `count + 64`, the value after the current clock. A
state therefore changes on exactly the word at which its condition holds: the
pilot's first word is the word with count 0, and it lasts 256 << `log_bps`
slots.

## Modules

```
qkd_sync_top                 both FPGA designs side by side
├─ alice_node                transmitter
│  ├─ alice_fsm
│  └─ waveform_modulator
│     ├─ step_counter
│     └─ pattern_ram × 64
└─ bob_node                  receiver
   ├─ shift_val_reg
   ├─ phase_shift_ctrl
   ├─ waveform_modulator (as above)
   ├─ pilot_detector
   └─ bob_fsm
qkd_pkg                      default sizes, state and pattern-select enums
```

Parameters (defaults): `LANES = 64`, `COUNT_W = 35`, `PAT_LEN = 256`,
`SIG_W = 16`, `LOG_W = 6` (width of `log_fd` and `log_bps`) and `PH_W = 16`
(width of the phase-step count). Every register has a synchronous,
active-high reset.

### Top-level ports

| group | ports |
|---|---|
| transmitter | `a_clk` (the clock received from Bob), `a_rst`, `a_shift_val`, `a_qubit_pattern`, `a_pilot_pattern` → `a_gtx_data[63:0]`, `a_count`, `a_state` |
| receiver | `b_clk`, `b_rst`, `b_shift_load`/`b_shift_load_val`/`b_shift_inc`/`b_shift_step`, `b_ps_step_req`/`b_ps_step_inc`, `b_qubit_pattern`, `b_pilot_signature`, `b_cin` (detector) → `b_gtx_data[63:0]`, `b_count`, `b_shift_val`, `b_phase_steps`, `b_ps_busy`, `b_ps_step_done`, `b_pilot_detected`, `b_state`, `b_cin_mon` |
| clock manager | `b_psen`, `b_psincdec` out; `b_psdone` in |
| shared | `log_fd`, `log_bps`, `carrier_en`, `sync_pattern`, `sync_achieved`, `sync_request` |

The two ends run on different clocks and share no logic. Only the host
signals (`log_*`, `carrier_en`, `sync_pattern`, `sync_achieved`,
`sync_request`) fan out to both, and they are meant to be static or
slow-changing. In a real system each end sits in its own FPGA.

## Design choices not fixed by the method

These choices are this design's own. Change them if your system differs.

* **Bit order.** Lane 0 is the first bit on the line, and patterns are sent
  most significant bit first.
* **Pattern memories.** They follow the pattern selector combinationally; there
  is no write port. Loading a pattern takes no cycles, at the cost of a 256:1
  multiplexer per lane.
* **Carrier gating.** It is a separate input (`carrier_en`), not tied to a
  state.
* **Patterns per state.** Alice sends sync in SYNC and ARMED, the pilot in
  PILOT, zeroes in XOVR and qubits in Q. Bob sends his sync in SYNC, zeroes
  in ARMED and XOVR, and basis bits in Q.
* **Pilot sampling.** The pilot detector samples once per symbol. The strobe
  fires when the symbol index of lane 0, `(count + shift_val) >> log_bps`,
  changes. For symbols shorter than one 64-slot word, this is every clock,
  which sees every other symbol at 312.5 Msymbol/s. Choose the pilot and
  signature with that in mind. One way is to send each pilot bit for two
  symbols, as the end-to-end testbench does.
* **Pilot signature.** It is registered from an input. The shift register
  resets to zero, so a signature of zero would match right after reset. Bob
  ignores the detector outside ARMED.
* **Phase-step controller.** Its request/busy interface and signed phase
  count are this design's own.
* **Address range.** `log_bps` must not exceed 27. Address bits above the
  35-bit value read as zero.
* **Crossover length.** XOVR lasts until the time base wraps. That is at most
  2^35 slots (3.44 s), measured from the pilot start for Alice and from the
  detection for Bob. A shorter crossover means a narrower counter or an extra
  timer. Neither is provided.

## What is not in this RTL

* **GTX transceivers.** They serialize the 64-bit words at 10 Gb/s. Connect
  `a_gtx_data` and `b_gtx_data` to the transmit data ports. Lane 0 must go
  out first.
* **Clock manager (MMCM/PLL).** It derives the word clocks from the seed
  oscillator and performs the phase steps. `b_psen`, `b_psincdec` and
  `b_psdone` connect to its dynamic phase-shift port.
* **Optical path and photodetector.** The detected sideband arrives on
  `b_cin`, already sampled into the receiver's clock domain.
* **Host software.** It runs the three-step search (judging amplitude, short
  pulses and the square wave), the classical channel, sifting and
  post-processing. The `b_*` command inputs and `sync_achieved` /
  `sync_request` are its interface.
* **Debug cores.** Registers that a virtual I/O core would drive are plain
  inputs here.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_step_counter` | step of 64, hold, reset, wrap of a 10-bit instance |
| `tb_pattern_ram` | all addresses over random contents; MSB-first order |
| `tb_waveform_modulator` | known words (0xCCCC... carrier, first BPSK word, one-slot shift); every lane of 3200 words against a bit-level model over random `log_fd`, `log_bps`, ShiftVal and patterns; one whole 16384-word pattern period at 2.441 Msymbol/s |
| `tb_pilot_detector` | 20 000 clocks against a model; every single-bit corruption rejected |
| `tb_alice_fsm`, `tb_bob_fsm` | each transition on the exact word; pattern selected per state; pilot length |
| `tb_shift_val_reg` | load, steps of 4/32/random, wrap |
| `tb_phase_shift_ctrl` | handshake with a clock-manager model (`mmcm_ps_model`); requests while busy ignored; net phase |
| `tb_qkd_sync_top` | the whole procedure end to end with a 16-bit time base |
| `tb_qkd_sync_long` | the same with a 28-bit time base |
| `tb_qkd_sync_default` | the top with no parameter list: the three alignment steps, then 20 000 clocks in ARMED with no false pilot detection |

The end-to-end testbenches share `qkd_sync_tb_body.svh`. They use two
behavioural models:

* `mmcm_ps_model` stands in for the clock manager's phase-shift port.
* `interferometer_model` delays Alice's stream by 148 slots of fiber. It XNORs
  the delayed stream with Bob's stream slot by slot, and scrambles the result
  while a clock-phase error remains.

The testbench acts as the host and runs all three alignment steps:

* Phase matching ends after 8 steps up and 1 step back.
* Symbol alignment takes 3 shifts of one RF cycle.
* Frame alignment takes 251 shifts of one symbol. It ends at ShiftVal = 8044,
  which is −148 modulo the 8192-slot pattern period.

It then checks:

* the pilot and the crossover, with both ends entering Q on the same word;
* every detected slot over a full qubit period, including the leading 0x5500;
* the return to SYNC.

It also counts each mechanism and fails if any never occurred: phase up and
down steps, glitch detection, RF-cycle and symbol shifts, the signature,
pilot detection, both crossovers, a counter wrap and the resynchronization.

The whole procedure, crossover included, was not simulated at the default
35-bit time base. Each crossover wait is 2^29 clocks, and a whole pass is
about 2^30 clocks, which would take close to half an hour in this testbench.
The largest time base simulated through crossover is 28 bits
(`tb_qkd_sync_long`). Every other size was at its default in those runs.
At the default sizes, `tb_qkd_sync_default` runs the three alignment steps
and the arming; they end with the same ShiftVal as the smaller runs. The generator itself is tested at
full size by `tb_waveform_modulator`.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/qkd_pkg.sv tb/tb_qkd_sync_top.sv --top-module tb_qkd_sync_top
./obj_dir/Vtb_qkd_sync_top
```

## Sizing against the intended use

* **2.5 GHz carrier, 312.5 Msymbol/s, 256-bit sync pattern.** Fits:
  `log_fd = 1`, `log_bps = 5`.
* **2.441 Msymbol/s for long fiber.** Fits: `log_bps = 12`. The pattern period
  is 104.9 µs, which covers about 21 km of fiber at 2×10^8 m/s. The
  modulator testbench runs one whole period at this rate.
* **Crossover of at least 3.2 s.** Fits: one wrap is 3.44 s.
* **A 511-bit PRBS as modulation data.** Does not fit: the pattern memory
  holds 256 bits.
* **Qubit frames longer than 256 bits** (e.g. 1018 qubits). The qubit register
  repeats every 256 symbols. Distinct random bits for a longer frame would
  need a larger `PAT_LEN` (a power of two, with `PAT_AW` address bits) or
  reloading of the register.
* **Size on the FPGA.** The generator holds one 35-bit register; the rest is
  combinational, 64 lanes each with a 35-bit adder, a 35-bit shifter and a
  256-to-1 bit multiplexer. That is where almost all the logic goes. The pilot
  detector is two 16-bit registers and a 16-bit compare. LUT counts depend on
  the vendor's mapping and are not given here.
