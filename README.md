# Dyadic digital PWM controller for a synchronous buck converter

A digitally controlled DC-DC converter quantizes twice: the ADC measures the
output voltage in bins of `V_FS / 2^N_ADC`, and a counter-comparator DPWM can
only set the output to `V_IN * n / 2^N`. When the DPWM step is coarser than the
ADC bin, no duty value may put the output inside the bin where the error is
zero. The integrator then never rests, and the output keeps moving between two
or more levels: a quantization-induced limit cycle. The usual fix is a finer
DPWM, but each extra bit doubles the clock frequency.

This design adds `M` bits of duty resolution without a faster clock. It keeps
an `N`-bit DPWM, and in each switching period it runs at duty `n` or `n + 1`.
Over a frame of `2^M` periods it chooses `n + 1` in exactly `m` periods, so the
average duty is `(n * 2^M + m) / 2^(N+M)`. The periods that get the `+1` are
not the first `m` of the frame, as in thermometric dithering. They follow a
dyadic pattern that spreads them as evenly as possible. Most of the dither
energy then lies at high frequencies, where the output LC filter removes it.
The result is a fine average duty with very little low-frequency ripple.

The RTL is the FPGA part of a complete buck controller:

```
             +-------------+  v_s[k]  +-----+  u (N+M bits) +---------------------------+
 ADC chip -->|adc_interface|--------->| PID |-------------->| ddpwm_modulator           |--> c_hs, c_ls
             +-------------+          +-----+   (or open-   |  input reg -> n | m       |    (gates)
                   ^                     ^       loop word) |  DDPM / thermo / none -> +|
                   |  period tick        |                  |  N-bit DPWM (count < duty)|
                   +---------------------+------------------+---------------------------+
     hps_bridge: processor registers, gains, modes      sample_memory x6: monitor records
```

The dithering-mode multiplexer can also select plain `N`-bit DPWM or
thermometric dithering. Both are there for comparison with the dyadic mode.

## The dyadic pulse pattern (`ddpm_modulator`)

Take an `M`-bit number `m = sum b_i 2^i`. The dyadic basis signal `S_i` is a
stream of `2^M` bits that holds exactly `2^i` ones, evenly spaced. The basis
signals never overlap, so their sum over the set bits of `m` holds exactly `m`
ones. It is produced by an `M`-bit counter `c` and a priority multiplexer:

| counter pattern (LSB right) | passes      | one every        |
|-----------------------------|-------------|------------------|
| `...1`                      | `b_(M-1)`   | 2 steps          |
| `..10`                      | `b_(M-2)`   | 4 steps          |
| `.100`                      | `b_(M-3)`   | 8 steps          |
| `1 followed by M-1 zeros`   | `b_0`       | `2^M` steps      |
| `all zeros`                 | nothing     |                  |

The lowest set bit of the counter, at position `p`, selects bit `M-1-p` of
`m`. The MSB of `m` therefore toggles at the highest rate, and the LSB appears
once per frame. Example with `M = 4` and `m = 5` (`0101`): `b_2` gives the
`+1` at counts 2, 6, 10 and 14, and `b_0` gives it at count 8. That is 5 of 16
periods. The counter advances once per switching period, on the DPWM terminal
count.

Why this pattern beats thermometric dithering (the `+1` in the first `m`
periods of the frame) shows in its spectrum. `S_i` is a comb of `2^i` evenly
spaced ones, so it has energy only at frame harmonics that are multiples of
`2^i`. Over all `m`, the largest component at frame harmonic `j` is therefore
`2^z / 2^M` of full scale, where `2^z` is the largest power of two dividing
`j`. At the first harmonic that is only `1/2^M`: -72 dB for `M = 12`, 6 dB
more per octave at `j = 2, 4, 8, ...`. The energy sits at high frequencies,
where the LC output filter removes it. Thermometric dithering puts its largest
component at the first harmonic, about `1/pi` of the dither step.

## Modulator timing (`ddpwm_modulator`, `dpwm`)

The `N`-bit DPWM counter runs at `f_clk`. A switching period lasts `2^N`
clocks, and the output is high while `count < duty`. The terminal count (all
ones) does three things:

1. The input register takes the new `N+M`-bit word `u`.
2. The DPWM duty register takes `n + dither`. This value is computed from the
   previous input-register contents and the current dither counter.
3. The DDPM counter and the thermometric counter advance.

A word therefore drives the output one full period after it is captured. The
compensator may change `u` every switching period; it does not have to wait
for a whole frame. The adder and the duty register are `N+1` bits wide, so the
word `n = 2^N - 1` with a `+1` gives a fully-on period instead of wrapping to
zero.

The number of active dither bits `k` (0..`M`) is a run-time setting. The top
`k` bits of the `M`-bit field are kept and the rest are ignored (truncation).
For the dyadic mode this is exactly a `k`-bit DDPM with a `2^k`-period frame,
and `k = 0` is plain DPWM. Thermometric dithering uses the same `k` bits over a
frame of `2^k` periods.

## The control loop

- **Sampling (`adc_interface`).** On each period tick it asks the external
  12-bit ADC for the output voltage and then the input voltage. The handshake
  is `adc_start` with `adc_ch` held until `adc_done` (a one-cycle pulse with
  `adc_data`). To emulate an `N_ADC`-bit converter, the low `12 - N_ADC` bits
  of the output sample are cleared. `N_ADC` is a run-time register.
- **Reference.** The digital reference is masked in the same way. A zero-error
  bin therefore always exists. With a 12-bit reference and a coarse ADC, the
  error could never be zero, and the loop would limit-cycle whatever the DPWM
  resolution.
- **PID (`pid_controller`).** The compensator uses the parallel form:
  `u = kP e + I + kD (e - e_prev)`, with `I += kI e`.
  - The gains are signed 24-bit numbers with 16 fraction bits, in units of
    modulator LSB per 12-bit ADC LSB.
  - The integrator is clamped to the output range (anti-windup).
  - The sum is truncated and saturated to `0 .. 2^(N+M) - 1`.
  - `u` follows the sample by two clocks.
- **Gain scaling.** The reset gains come from a design with normalised units
  (duty fraction per fraction of ADC full scale): kP = 2.6781, kI = 0.0408,
  kD = 6.5019. They assume that the ADC full scale equals `V_IN` (10 V). The
  register value is `k * 2^(G_FRAC + N + M - 12)`. Recompute the gains if you
  change `N`, `M` or `G_FRAC`.
- **Latency.** The loop delay is two switching periods: the sample is taken at
  the start of period `j`, the PID output is captured at its end, and the duty
  applies in period `j+2`.
- **Gates.** `c_hs` is the PWM output registered once. `c_ls` is its
  complement. No dead time is inserted, so add it outside if your power stage
  needs it. Both gates are low during reset.

## Processor interface (`hps_bridge`) and monitor memories

The bus is a plain word-addressed slave. A write takes effect at the clock
edge. A read returns data with `bus_rdvalid` one clock after `bus_read`.
Address bits `[15:12]` select the region: 0 is the registers, and 1..6 are the
monitor memories.

| offset | register | meaning                                               | reset            |
|--------|----------|-------------------------------------------------------|------------------|
| 0x000  | CTRL     | `[1:0]` mode (0 plain, 1 DDPM, 2 thermometric), `[2]` loop closed, `[3]` clear integrator (pulse) | DDPM, open |
| 0x001  | MBITS    | active dither bits `k`, clamped to `M`                | 4                |
| 0x002  | NADC     | emulated ADC bits, clamped to 1..12                   | 8                |
| 0x003  | VREF     | reference, 12-bit code                                | 2097 (5.12 V of 10 V) |
| 0x004-6| KP KI KD | gains, signed, `G_FRAC` fraction bits                 | see above        |
| 0x007  | OLDUTY   | `N+M`-bit word used while the loop is open            | 0                |
| 0x008  | CAPTURE  | write `[0]` arm, `[1]` clear overrun; read `[0]` done, `[1]` ADC overrun | |
| 0x009  | DECIM    | record one sample every DECIM+1 periods               | 0                |
| 0x00A  | VIN      | last input-voltage sample (read only)                 |                  |
| 0x00B  | STATUS   | modulator input register (read only)                  |                  |

The controller starts with the loop open and zero duty. Program the settings,
then write CTRL with bit 2 set (and bit 3, to start from a clean integrator).

Arming starts a 1024-sample record in all six memories at once. The memories
hold:

1. the raw output sample
2. the P term (integer part)
3. the I term (integer part)
4. the D term (integer part)
5. the modulator input word
6. the duty sent to the DPWM for the next period

Each is sampled at the end of a period. The record stops when it is full, so
the processor reads a consistent snapshot.

## Parameters

| module / parameter   | default | meaning |
|----------------------|---------|---------|
| `N`                  | 5       | DPWM bits: 32 clocks per period, e.g. 3.2 MHz clock for 100 kHz switching |
| `M`                  | 6       | maximum dither bits; the run-time `k` selects 0..`M` (reset value 4) |
| `G_W`, `G_FRAC`      | 24, 16  | gain width and fraction bits |
| `MEM_DEPTH`          | 1024    | samples per monitor memory |
| `ddpwm_pkg::ADC_W`   | 12      | ADC word width |

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=... failures=...` line, and each has a watchdog.

- `ddpm_modulator_tb` checks every `m`, step by step, against the basis-signal
  definition. It also checks the number of ones per frame.
- `ddpwm_modulator_tb` follows the modulator with a period-accurate model, and
  checks that the on-time summed over a frame is `n*2^k + m`. This includes
  the worked example 293/512 for `N = 5`, `k = 4`.
- The PID, ADC interface, memory and bus testbenches compare against
  independent integer models.

The system-level testbenches close the loop around `tb/buck_model.sv`, a
switched behavioural model of the power stage. It has:

- 10 V in, L = 100 uH with 56 mOhm
- C = 220 uF with 90 mOhm
- 100 kHz switching
- an ADC with a 10 V full scale (`tb/adc_model.sv`)

The first four run the top at its default parameters. The last two run single
modules at the sizes of the spectral studies: a 9-bit modulator with
`N = 4`, `M = 5` and a 12-bit dyadic pulse modulator.

| testbench | what it shows (behavioural plant, default parameters) |
|-----------|--------------------------------------------------------|
| `ddpwm_controller_top_tb` | On-time per frame in all three modes, ripple comparison, and a closed loop with `N_ADC = 8`: one ADC bin with 9-bit DDPWM, four bins (limit cycle) with plain 5-bit DPWM. Also no limit cycle but a 185 mV error with `N_ADC = 4`, and memory read-back over the bus. |
| `lco_sweep_tb` | `k = 0..6` x `N_ADC = 4, 6, 8` x {0 A, 1 A}. With `N_ADC = 8` the loop limit-cycles (65..125 mV p-p) up to `k = 3` at no load and up to `k = 2` at 1 A, and settles from `k = 4` and `k = 3` respectively. The same thresholds were measured on hardware. One point is the exception: no load at `k = 2`, which happens to settle. With `N_ADC = 6` the model settles from `k = 2` (no load) and `k = 1` (1 A), one step earlier than the hardware measurements (`k = 3` and `k = 2`). With `N_ADC = 4` it never limit-cycles. |
| `vin_sweep_tb` | `V_IN` from 9.2 to 10.8 V. Static error reaches 246 mV with `N_ADC = 4` and plain DPWM, and stays below 29 mV with `N_ADC = 8` and 9-bit DDPWM. |
| `ripple_sweep_tb` | Open loop, `n = 16`, `m = 0..31`, `k = 5`. Worst-case low-frequency ripple is 55.6 mV with thermometric dithering and 8.7 mV with the DDPWM (6.4x). |
| `dither_n4_sweep_tb` | Two `ddpwm_modulator #(N = 4, M = 5)` instances, one per mode, each driving its own buck model (16 clocks per 100 kHz period), over all 512 duty words. The frame spectrum of the gate signal matches the formula above exactly. The lowest harmonic is 20.2 dB lower with the DDPWM, and this ratio survives any output filter, since both modes see the same filter gain there. Worst-case ripple is 110 mV (thermometric) against 16 mV (DDPWM), 6.8x. |
| `ddpm_spectrum_tb` | `ddpm_modulator #(M = 12)`: the twelve basis signals taken from the hardware, their non-overlap for random `m`, and the envelope over all 4096 values of `m` at every frame harmonic against `2^z / 4096`. After a first-order low-pass with its corner at the frame frequency divided by sqrt(3), the largest AC component is -77.0 dB: -78 dB at the first harmonic, slightly higher at the top harmonics. |

Each testbench runs in a few seconds. To run one with plain Verilator:

```
verilator --binary --timing --assert --top-module lco_sweep_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/ddpwm_pkg.sv tb/lco_sweep_tb.sv
./obj_dir/Vlco_sweep_tb
```

The same pattern works for any testbench: replace the top-module name and the
file name. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ddpwm_pkg.sv rtl/<module>.sv`.

## What follows the original design, and what is this implementation's own

The following are taken from the published design:

- the DDPM counter and priority-multiplexer rule
- the structure of the N+M bit modulator: input register, adder onto the
  MSBs, N-bit counter-comparator DPWM, terminal count pacing the dither
  counter and the compensator
- an update of the compensator output every switching period
- the three-way dithering multiplexer
- a parallel PID with programmable gains
- once-per-period sampling of output and input voltage
- periodic monitor memories readable by the processor
- the operating point: N = 5, k = 4, N_ADC = 8, 5.12 V from 10 V, the listed
  gains

Everything below was chosen here, because the source does not specify it:

- the `N+1`-bit duty path
- the run-time `k` implemented by truncating the LSB field
- emulating `N_ADC` by masking a 12-bit sample, and masking the reference the
  same way
- the ADC start/done handshake and the channel order
- fixed-point formats, integrator clamp, truncation, reset values
- the bus protocol and register map
- one-shot records, memory depth and decimation
- registered complementary gates without dead time
- synchronous active-low reset everywhere

The dyadic counter starts at zero after reset. A frame therefore begins with
the all-zero count, which carries no `+1`. This changes only the phase of the
pattern, not its content.

The processor software, the ADC chip, the power stage and the laboratory
instruments are not part of the RTL. The testbenches use behavioural models of
the ADC and the power stage.
