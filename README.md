# Multi-channel bioimpedance spectroscopy on an FPGA

This design measures a complex impedance Zx over frequency on several biosensors at once. It uses the
**digital automatic balance bridge** (DABB). For each sensor, two DACs drive the bridge:

- DAC 1 drives a sinusoid Vo of known amplitude through the sensor Zx.
- DAC 2 drives a second sinusoid Vf through a known reference resistor Rf.

An ADC reads the bridge error Ve. The logic adjusts the phase and amplitude of Vf until Ve is zero.
At that balance point the unknown impedance follows from numbers the logic already holds:

    Zx  = Vo * Rf / Vf                     (as phasors)
    ZxR = Vo * Rf * VfR / (VfR^2 + VfI^2)
    ZxI = Vo * Rf * VfI / (VfR^2 + VfI^2),   VfR = |Vf| cos(theta), VfI = |Vf| sin(theta)

The balancing is therefore a digital search, not an analog control loop. Each sensor has its own BIS
channel that performs this search at every point of a 1001-step frequency sweep from 40 Hz to 100 kHz.
Each channel yields one raw record per frequency: |Vf| and theta.

One shared system control unit does three jobs:

- it collects the raw records from all channels and stores them in flash;
- it passes them to a single shared processor that evaluates the formulas above;
- it writes the impedances back next to the raw data.

The default build has three channels and a 50 MHz clock.

```
            +--------------------- bis_system -----------------------------+
 bridge 0 <-|- bis_module 0 --+                                            |
 bridge 1 <-|- bis_module 1 --+-- bis_mux --> system_control_unit <-> processor
 bridge 2 <-|- bis_module 2 --+        (rdy/operate per channel)  |       |
            +-----------------------------------------------------|-------+
                                                   flash memory controller (mem_*)
```

The flash memory, its controller and the analog bridge (DACs, ADC, Rf, sensor) are outside the RTL.
The controller's command interface and each channel's DAC/ADC pins are ports of `bis_system`.

## One BIS channel (`bis_module`)

| block | job |
|---|---|
| `clock_divider` | emits a one-clock sample strobe every `50e6 / (f * 510)` clocks. A sine cycle is 510 samples. The strobe rate is at most one per clock, so frequencies above about 98 kHz are capped there. |
| `dac1_driver` | 8-bit offset-binary sine `128 + A*sin/256` for DAC 1. It owns the 0..509 sample counter that is the channel's time base. |
| `dac2_driver` | the same sine, shifted by a phase of whole degrees, for DAC 2. It also produces in-phase and quadrature reference samples for the detectors. It raises `no_fluctuate` once its output has been unchanged from the start of a cycle. |
| `phase_detector` | one-cycle correlation of the error with the quadrature reference. The sign says whether Vf leads or lags the target: `add` or `sub`. |
| `amplitude_detector` | one-cycle correlation of the error with the in-phase reference. The sign says whether Vf is too small. It also reports the peak error. |
| `bis_control` | sequences the sweep and the two searches. It offers the raw record (`rdy`) and waits to be released. |

### The balance search

At each frequency index, `bis_control` runs the following steps:

1. **Restart.** It gives the new frequency to the divider and restarts both sine generators at sample 0. DAC 2 returns to 180°. The frequency of index i is `40 + i*99960/1000` Hz.
2. **Phase search.** Vf is held at mid amplitude (128). There are eight decisions. Each one moves the phase of DAC 2 by 90, 45, 23, 11, 6, 3, 2 and 1 degrees, up or down as the phase detector says. From the 180° start this reaches any angle, and it converges to about ±1°.
   - The detector's correlation with cos(x − φ) is proportional to `b·sin(φ − ψ)`, where ψ is the phase of the bridge target. This is independent of the amplitude of Vf, so the phase can be found before the amplitude.
3. **Amplitude search.** An 8-bit successive approximation, most significant bit first. A trial bit is kept while the amplitude detector still says Vf is too small.
4. **Ready.** The unit raises `rdy_out` with the 24-bit raw record. It waits for the control unit to pause it (`operate_in` = 0) and release it (`operate_in` = 1). Then it moves to the next frequency.

Every decision measures one whole excitation cycle, after DAC 2 has been stable since the cycle start. The following cycle is skipped so that the correction takes effect first. Each decision therefore costs two excitation cycles. A frequency point takes about 32 cycles plus the hand-over:

- 2.8 s for the whole 40 Hz–100 kHz sweep;
- about 140,000 clocks per point, averaged over the sweep.

This is the main departure from the original description, which budgets 4 excitation cycles per point (about 0.4 s per sweep) but does not say how the detectors work. The detectors here are the simplest ones that give a reliable direction from a sampled error signal.

## Records and flash layout

A raw record is 24 bits, and the processed record is 88 bits:

| bits | field |
|---|---|
| 23..18 | channel id (6 bits, up to 64 channels) |
| 17 | processed flag |
| 16..8 | theta, whole degrees (lag of Vf behind Vo) |
| 7..0 | \|Vf\| (DAC 2 amplitude code) |

The 88-bit processed record is `{raw record with flag = 1, ZxR[31:0], ZxI[31:0]}`. ZxR and ZxI are signed, with 8 fraction bits, in units of Rf: ohms when `rf_in` is in ohms. Vo and |Vf| are both DAC amplitude codes, so their ratio needs no scaling.

The flash is byte wide. Each (frequency, channel) pair owns an 11-byte slot at byte address `(f * NUM_BIS + c) * 11`. The slot's position therefore encodes the frequency, and the record is not tagged with it. Bytes are stored most significant first:

- the raw data fills the first 3 bytes when it arrives;
- the complete 11-byte processed record is written over the slot later.

Every byte write is preceded by an erase of that byte. This follows the erase-then-write rule of the memory.

## Scheduling (`system_control_unit`)

A single state machine owns the flash port. Each time it returns to polling, it picks work in this order:

1. **Processor result waiting.** It erases and writes 11 bytes, then releases the processor.
2. **Polled channel `check_count` is ready.**
   - It clears that channel's `bis_operate_out` bit, which pauses the channel.
   - It erases and writes 3 bytes and queues the slot address as unprocessed.
   - It sets the bit again, which releases the channel to its next frequency.
   - If the queue (`PEND_DEPTH`, default 16) is full, the channel is not served. It keeps waiting in its ready state and `stall_count_out` counts the cycles.
3. **Processor idle and the queue not empty.** It reads the 3 raw bytes back from flash and starts the processor.
4. **Otherwise** it moves `check_count` to the next channel (round robin). `check_count` also selects the channel in `bis_mux`.

`done_out` goes high when every channel has finished its sweep, the queue is empty and the processor is idle.

The unprocessed records are tracked in a small address queue rather than found by scanning the flash. The processed flag is still set in every stored record.

### Memory controller interface (assumed)

The flash controller is an external core. This design assumes a simple command port:

- `mem_erase_out`, `mem_write_out` and `mem_read_out` are one-clock pulses, issued with `mem_address_out` (22-bit byte address) and, for writes, `mem_data_out`.
- The controller answers each command with a one-clock `mem_done_in`. For a read, `mem_data_in` is valid with it.
- `mem_reset_out` pulses for one clock when a run starts.

The command issue and the `C_*_W` wait states of `system_control_unit` are the place to adapt it to a real controller core.

## Processor

The processor has a small control unit and three shared units:

- a sine/cosine table (`sincos_lut`): 0..90° in 1° steps, 14 fraction bits, extended to 0..359° with the quadrant identities;
- a registered 32×32 signed multiplier (`multiplier`);
- a 64-bit restoring divider (`divider`), one quotient bit per clock.

The sequence is:

```
cos, sin <- table(theta)
VfR = |Vf|*cos      VfI = |Vf|*sin          (14 fraction bits)
K   = Vo*Rf
D   = VfR^2 + VfI^2                          (28 fraction bits)
L   = K*VfR         M   = K*VfI
ZxR = sign(L) * (|L| << 22) / D              -> 8 fraction bits
ZxI = sign(M) * (|M| << 22) / D
```

A record takes 151 clocks (3.0 µs) from `enable_in` to `data_ready_out`:

- 1 clock to latch the inputs;
- 2 clocks for the table;
- 7 multiplications of 2 clocks;
- 2 divisions of 66 clocks.

The original description quotes 1930 clocks (38.6 µs). Either way, one processor serves many channels.

`error_out` is raised for |Vf| = 0 and for theta ≥ 360.

The table entries are computed at elaboration from a rational sine approximation (Bhaskara's formula), with no data file. Its error is below 0.2 % of full scale.

## Where this design departs from or adds to the description

- **Search speed:** about 32 excitation cycles per frequency point, not 4 (see above).
- **Processor latency:** 151 clocks instead of 1930. The processor uses one multiplier and one divider, shared, as described.
- **Frequency input:** a 10-bit sweep index (0..1000) is used, plus a 17-bit Hz value inside each channel. The description lists a 7-bit frequency input for the clock divider, which cannot hold this range.
- **Phase steps:** the step list 90, 45, 23, 11, 6, 3, 2, 1 is a constant table. Halving 45 in binary would give 22, not 23, so the listed values are used. The search starts at 180°. Once all steps are used, further requests move by 1°.
- **ADC:** an 8-bit offset-binary ADC is assumed, with mid-scale 128 meaning zero error. The description does not give the ADC format.
- **DAC codes:** both DAC drivers output 8-bit codes, as described for the drivers, though the external DAC is said to resolve 9 bits.
- **Detectors:** the correlation detectors, the reference outputs of `dac2_driver` and `dac_strobe_out` (a load strobe for the external converters) are this design's own.
- **Pause code:** one operate bit per channel, where 0 pauses the channel. For example, `110` pauses channel 0 of three.
- **No polar output:** the processor converts the polar balance result to ZxR and ZxI and does no conversion back to polar form. Magnitude and angle of Zx are `Vo*Rf/|Vf|` and theta, both already in the stored raw record.
- **Processor record:** a single 88-bit record port; there is no three-way split.
- **Unprocessed records:** the queue of unprocessed slots replaces a flash scan.
- **Reset:** all state uses an asynchronous active-low reset `rst_n`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bis_system`, `system_control_unit` | `NUM_BIS` | 3 | channels (the id field allows up to 64) |
| `bis_system`, `system_control_unit` | `PEND_DEPTH` | 16 | unprocessed-record queue |
| `clock_divider` | `CLK_FREQ` | 50,000,000 | system clock in Hz |
| `clock_divider`, `dac*_driver`, `bis_module` | `SEG` | 510 | samples per sine cycle |
| `dac2_driver` | `INIT_PHASE` | 180 | start phase of each search |
| `phase_detector`, `amplitude_detector` | `ACC_W` | 28 | correlation accumulator width |

Shared widths and the record types (`raw_t`, `rec_t`) are defined in `rtl/bis_pkg.sv`.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints `TB_RESULT checks=N failures=M`. Each one stops itself with a watchdog. Two behavioural models stand in for the parts outside the FPGA:

- `tb/bridge_model.sv` models the bridge as a gain and a sample delay for Zx, and feeds back half the error around code 128;
- `tb/flash_model.sv` models a byte-wide flash with erase-to-FF and AND-on-write. It counts writes to bytes that were not erased.

The commands to build and run a testbench, for example the system test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bis_pkg.sv tb/tb_bis_system.sv --top-module tb_bis_system
./obj_dir/Vtb_bis_system
```

What the two system-level testbenches do:

- **`tb_bis_system`** runs three channels over three frequency points near 10 kHz. The queue is cut to one entry, so channels must wait. Each channel sees its own impedance angle and gain.
  - It checks every stored record: phase within 2°, |Vf|, id, flags, and ZxR/ZxI against the bridge values.
  - It checks that no byte was written without an erase.
  - It counts each mechanism and fails if one never occurs: polling of every channel, pauses, erases, writes, reads, processor dispatches, add and sub decisions, kept and cleared amplitude bits, frequency restarts and queue-full stalls.
- **`tb_bis_system_scaled`** builds the system with one and with five channels, side by side, and checks every record of a two-point sweep. The test rig for one system is `tb/bis_system_rig.sv`.
- **`tb_bis_system_full`** runs the top at its default parameters through the complete 1001-point sweep on three channels and checks all 3003 records.
  - It simulates 140 million clocks, about 2.8 s of system time, and takes around 4 minutes with Verilator.
