# ADC-sampled RC true random number generator

This is a true random number generator (TRNG) that needs no special analog
block. All it uses is a resistor-capacitor circuit, an ordinary ADC and a
small controller. The controller keeps charging and discharging the RC node,
so the ADC input is always moving. It samples that node after random
delays, and the delays are taken from numbers the generator made earlier.
Circuit noise, ADC nonlinearity and the random sampling instants combine
into a feedback loop that acts like a chaotic map: a tiny change in one
code changes the next delay, which changes the next code. Each code gives
4 random bits, and four codes make one 16-bit number.

The RTL follows the generator described in "A Novel TRNG Based on
Traditional ADC Nonlinear Effect and Chaotic Map for IoT Security and
Anticollision" (2021). That article runs the algorithm in software on a
microcontroller. Here the controller is a hardware state machine, and the
article's two example uses are built as hardware:

- a TRN front end for a cipher;
- the Q-slot anticollision counter of an RFID tag.

## The generation loop

`trngc` runs the loop below. `D^k` is the last ADC code; it is 0 at the
start of a run. `mem` is the pool of 256 stored 16-bit numbers, and `ptr`
points to the next free word.

1. **Start.** Set `vpower` high (charge). Read the most recent number,
   `TRN0 = mem[ptr-1]`, and wait `t0 = TRN0 & 63` cycles.
2. **Turning points, once per word.** Read `RN = mem[ptr-1]` and derive the
   two thresholds `D_HT` and `D_LT` from it. If `D^k > D_HT`, discharge
   (`vpower = 0`). If `D^k < D_LT`, charge (`vpower = 1`). Otherwise keep
   the present state.
3. **Random interval, once per sample.** Read `mem[D^k[7:0]]` and wait
   `tr = value & 63` cycles.
4. **Sample and post-process.**
   - Convert, giving `D^(k+1)`.
   - Read `mem[D+0]`, `mem[D+1]` and `mem[D+2]`, where D stands for
     `D^(k+1)[7:0]`. Their three LSBs form the rotate amount `SBS` (0..7).
   - Rotate the 12-bit code right by `SBS` and shift its low 4 bits into
     the word.
5. **Store.** After 4 samples, write the word to `mem[ptr]` and advance
   `ptr`. The word also goes out on `trn_valid`/`trn_data`.
6. **Repeat.** Go back to step 2 until `rn_bits` bits have been made, then
   pulse `done`.

The feedback is what matters. The ADC code chooses which stored number sets
the next delay, and it chooses the rotation. Each new word then becomes
part of the pool that later delays and thresholds are read from. Because
the thresholds change from word to word, the RC node never settles into a
fixed swing, and the ADC sees a different part of the exponential curve
each time.

### Timing

Memory reads take one cycle, and the ADC takes `CONV_CYCLES` cycles (20 by
default: a 3 MHz converter with a 60 MHz clock). In RC mode, the gaps are:

| interval                                                 | cycles      |
|----------------------------------------------------------|-------------|
| `start` to first `adc_start`                             | 8 + t0 + tr |
| `adc_done` to next `adc_start`, same word                | 9 + tr      |
| `adc_done` to next `adc_start`, across a word boundary   | 12 + tr     |
| `adc_start` to `adc_done`                                | 20          |
| last `adc_done` of a word to `trn_valid`                 | 6           |

On average one sample takes about 61 cycles for 4 bits. That is about
3.9 Mbit/s at 60 MHz, and 2.6 Mbit/s in the worst case (every tr = 63).
The end-to-end test measures 3.88 Mbit/s. The article's software version
needs about 60 cycles of processing per sample and reaches about
1.68 Mbit/s; this state machine needs 9.

### Thresholds

The rule for turning a random number into thresholds is this design's own
choice. The low byte sets `D_LT` and the high byte sets `D_HT`:

    D_LT = 2^(N-4)           + rn[7:0]  * 2^(N-2) / 256    (256 .. 1276 for N = 12)
    D_HT = 2^N - 1 - 2^(N-4) - rn[15:8] * 2^(N-2) / 256    (2819 .. 3839)

The two ranges never overlap, so the thresholds cannot cross. They also
stay away from 0 and full scale, which an exponential RC curve only
approaches. With the default 2 µs time constant, one leg between the
thresholds spans a few samples. In the 256-word end-to-end test the circuit
switched direction 186 times.

### Sensor mode

With `sensor_mode = 1`, each sample keeps one bit of the raw code,
`D[bit_sel]` (LSB to 4th LSB). 16 samples make a word, and there is no SBS
rotation. This mode is for a sensor-tag variant, where a sensor circuit
with a small adjustable range is the entropy source. The random delays and
the charge/discharge control work as in RC mode. The gaps are 5 + tr and
8 + tr cycles.

## Blocks

| module              | role |
|---------------------|------|
| `trng_pkg`          | widths, `lop_e` (logical operations), `ac_cmd_e` (tag commands), UpDn codes |
| `trngc`             | the controller above |
| `delay_counter`     | `t = (TRN & CONST)` cycle delay, used for t0 and tr |
| `threshold_gen`     | `D_HT` and `D_LT` from a stored number |
| `cyclic_extract`    | rotate by SBS and take 4 bits, or take one bit in sensor mode |
| `trn_memory`        | 256 × 16 pool: one synchronous read port, one write port, the `ptr` register |
| `trng_core`         | `trngc` + `trn_memory`, plus a host write port for the pool; the synthesizable generator |
| `rc_entropy_source` | behavioural RC circuit with noise (`real` output) |
| `adc_model`         | behavioural 12-bit rounding-down ADC with differential nonlinearity |
| `trn_logic_op`      | cipher front end: raw data combined with the latest TRN |
| `anticollision_q`   | tag slot counter for Query / QueryAdjust / QueryRep |
| `trng_system`       | top: everything above, wired together |

### Pool of stored numbers

The word array has no reset. It stands for processor memory that keeps its
numbers across power cycles, so a run can start from the numbers saved last
time. A host loads it through `host_wr_*` while the core is idle;
`host_wr_ready` shows when it can. `ptr` does reset to 0. After a reset
with an unloaded pool, the first delays come from whatever the array
holds, so load it before relying on the first words.

### Cipher front end (`trn_logic_op`)

Every delivered TRN becomes the key. Raw data is combined with the key by
XOR, XNOR, AND or OR, selected by `func_sel`, and comes out one cycle
later for the cipher's F operation. The F operation itself is not part of
this RTL, because its sub-functions are not specified. The key resets to 0,
so XOR with no key yet passes the data through unchanged, and the cipher
then behaves as it would without the front end.

### Tag anticollision (`anticollision_q`)

This unit implements the ISO/IEC 18000-6 Type C Q algorithm.

- **Query** sets Q. **QueryAdjust** moves Q up (UpDn 110) or down (011),
  within 0..15. Either command then waits for a fresh word from the
  generator and loads the slot counter with that word's low Q bits.
- **QueryRep** decrements the slot counter. A counter already at 0 wraps to
  7FFFh.
- The tag pulses `reply`, with the word on `reply_rn`, whenever the counter
  becomes 0.
- While it waits for a word, `cmd_ready` is low.
- If the tag asks for a word while the core is idle, the top starts a
  one-word run for it. A host run has priority.

## Analog parts and their models

`rc_entropy_source` and `adc_model` are simulation models; they are not
hardware.

**RC model.** Each clock applies the exact exponential step of the RC
response towards VCC (charging) or 0 V (discharging). It then adds ±1 mV of
uniform noise from a seeded xorshift generator.

**ADC model.** It returns `floor(4096 * V / 3.3)`, with each code
transition moved by a fixed ±0.3 LSB, a pattern derived from a hash of the
code. This gives the converter a repeatable nonlinearity.

VCC = 3.3 V, RC = 2 µs, the noise shape and the size of the nonlinearity
are assumptions; real hardware replaces them. The top, `trng_system`,
contains these models, so it simulates but does not synthesize; use
`trng_core` for synthesis. In real hardware:

- `vpower` drives a pin that feeds the RC network;
- `adc_start`, `adc_done` and `adc_data` connect to the on-chip ADC. That
  ADC must report `done` a fixed number of cycles after `start`, or the
  timing table above changes.

## How far to trust it

Each testbench checks its block against values it computes itself.

- **`tb_trngc`** plays the pool and an ADC with random codes and latencies,
  as a reference model of the whole loop. It predicts:
  - every delay, with exact cycle counts;
  - every `vpower` decision;
  - every rotate amount, word, write address and `done` pulse.
- **`tb_trng_system`** runs the full default-size design with the analog
  models. It checks the same predictions from outside, using only the
  observed ADC codes and a mirror of the pool. It also checks:
  - the 1.68 Mbit/s rate;
  - the cipher front end, with each operation;
  - the tag: an immediate reply at Q = 0, countdown replies, QueryAdjust
    in both directions, stalls, and runs started automatically for the tag.

  It requires each of these mechanisms to occur.

`tb_workload_streams` runs two generators side by side. They have the
same settings and identically filled pools, but different noise seeds.

- **Repeatability.** Their first 16 words all differ. Noise feeds the
  loop, so a sequence cannot be repeated from the same starting state.
- **Long streams.** Generator A produces 131 072 bits in RC mode and
  8 192 bits for each sensor-mode bit position. The test checks their
  length and that no stream is stuck or grossly biased.
- **Statistics.** It prints the NIST SP 800-22 frequency and runs
  statistics for each stream, but does not count them as checks.

On the simulated source, the RC-mode stream was within both limits (for
example, frequency 0.33 and runs 0.09, against limits of 2.58 and 1.82).
The one-bit sensor-mode streams landed near the limits and sometimes
outside them, most often for the 3rd and 4th LSB; higher code bits carry
less noise.

These statistics describe the assumed noise and ADC models at least as
much as the logic. The article's NIST results come from real silicon, and
the far longer runs it uses (4·10^6 and 3·10^7 bits) were not simulated
here. A physical implementation has to be evaluated on its own.

## Where this design chooses for itself

The article leaves the following open; each choice here is marked in the
file headers:

- the threshold formula;
- the addresses of the three SBS reads (D, D+1, D+2) and their bit order
  (the first read gives the MSB);
- the rotation direction (right);
- `TRN0` and the threshold number both read at `ptr-1`;
- the thresholds compared once per word;
- sensor mode without rotation, with the charge/discharge control left
  running;
- the set of logical operations;
- the host and tag arbitration;
- fresh words for the tag;
- rounding `rn_bits` up to whole words, with at least one word per run.

The constants `const1 = const2 = 63`, the 12-bit ADC, the 4-bit extraction,
4 samples per word, the 256-entry pool addressed by `D[7:0]`, and the
20-cycle conversion (3 MHz at 60 MHz) all follow the article.

## Simulating

Each file holds one module or package, and the package must be read first.
With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/trng_pkg.sv tb/tb_trng_system.sv --top-module tb_trng_system
    ./obj_dir/Vtb_trng_system

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. The unit testbenches are `tb_trngc`, `tb_delay_counter`,
`tb_threshold_gen`, `tb_cyclic_extract`, `tb_trn_memory`, `tb_adc_model`,
`tb_rc_entropy_source`, `tb_trn_logic_op` and `tb_anticollision_q`.
`tb_trng_system` runs everything at the default parameters in a few
seconds, and `tb_workload_streams` (about 10 s) makes the long streams.

To change the design:

- **`CONST1`/`CONST2`**: the mask width, and so the longest delay.
- **`RN_M`**: samples per word; it must divide 16.
- **`ADC_BITS`**: the threshold formula scales with it.
- **`CONV_CYCLES`**: the converter's speed.
- **Model parameters** (`RC_NS`, `NOISE_V`, `DNL_LSB`, `SEED`): they
  change the simulated entropy source only.

The cycle counts in `tb_trngc` and `tb_trng_system` assume the default
masks of 63.
