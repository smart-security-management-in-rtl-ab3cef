# Smart security management for a secure device

A smart card protects its secrets with many countermeasures at once. These include
sensors, redundant computation, dummy instructions and random power noise. Each one costs
speed, energy and availability. Running all of them at full strength all the time makes the
card slow, power-hungry, and quick to mute itself in a poor reader. This design manages them
dynamically instead:

* A separate **monitor** watches what the countermeasures report. The monitor shares no
  hardware with the **host** processor that runs the application.
* The monitor estimates how likely an attack (**misuse**) and a harmless malfunction
  (**anomaly**) are.
* From those two estimates it picks one of four countermeasure configurations, from
  cheap-but-weak to full protection and finally self-destruction.

The monitor never sees sensitive data. It receives only counters and a data-sensitivity
level, and it sends back only countermeasure settings.

The RTL here covers these parts:

* the monitor's decision logic, as a small fuzzy-logic inference unit;
* the host/monitor communication channels and the request protocol;
* the control registers for the host's hardware countermeasures;
* two of those countermeasures: dummy-instruction insertion and the random power generator.

The two 32-bit RISC processors, their memories, the UARTs and the analog sensors are not
included. The top module brings out their connections as ports.

This is an independent RTL rendering of the architecture described in *Smart Security
Management in Secure Devices*. In the original work, the decision is software running on the
monitor's processor. Here it is hardware.

## Structure

```
                host side                         |            monitor side
                                                  |
 host CPU ── h2m_push/h2m_data ──► sync_fifo (h2m) ──► icu ──► monitor_ctrl ──► security_strategy
          ◄── m2h_pop/m2h_data ─── sync_fifo (m2h) ◄──────────────┘   │  ▲          │
 light/voltage sensors ─ ls_trig/vs_trig ─► sensor_counters ─ events ─► icu        │
                                              ▲   └── values (DS, LS, VS, ... CO) ─┘
                                              └── software-updated values ◄── monitor_ctrl
 host core ◄── dummy ── idi_sequencer ◄── cm_ctrl_reg (core: D, N, mute/reset, kill) ◄─┤
 power      ◄── noise ─ rpg            ◄── cm_ctrl_reg (RNG: R)                        ◄─┘
                  └──────────┴── applied ─► icu (sources 3, 4)
```

The ICU has five sources: 0 host FIFO not empty, 1 light sensor, 2 voltage sensor, 3 core
countermeasures applied, 4 RNG countermeasure applied.

| file | role |
|---|---|
| `sm_pkg.sv` | shared types: fuzzy degrees, subsets, rules, levels, configurations, message opcodes; the default rule sets |
| `fuzzifier.sv` | membership degrees of one input in the 8 input fuzzy subsets |
| `fuzzy_inference.sv` | rule premises (min / max / 1−x) and aggregation into p_l, p_h |
| `fom_defuzzifier.sv` | first-of-max crisp level from p_l, p_h |
| `config_select.sv` | (misuse, anomaly) → Safe / Unsafe / Critical / Fatal |
| `cm_config_table.sv` | countermeasure settings of each configuration |
| `security_strategy.sv` | the whole decision, 2-cycle pipeline |
| `monitor_ctrl.sv` | request handling state machine (the monitor's side of the protocol) |
| `sync_fifo.sv` | one communication channel (two instances) |
| `icu.sv` | interrupt controller of the monitor |
| `sensor_counters.sv` | the nine analysis inputs; light/voltage triggers counted in hardware |
| `cm_ctrl_reg.sv` | monitor-written control register with a ready handshake |
| `rpg.sv` | random power generator: bank of 10 LFSRs, R of them running |
| `idi_sequencer.sv` | insertion of dummy instructions into the host's issue slots |
| `smart_security_top.sv` | everything wired together |

## The decision: fuzzy misuse and anomaly levels

The monitor analyses nine inputs. One is the **data sensitivity DS**, reported by the
application. The other eight are countermeasure outputs:

| input | meaning | range | updated by |
|---|---|---|---|
| LS | light sensor triggers | 0..5 | hardware |
| VS | voltage sensor triggers | 0..10 | hardware |
| EFE | corrupted execution flows | 0..10 | virtual machine |
| CE | corrupted (redundant) executions | 0..10 | virtual machine |
| PE | wrong PINs | 0..10 | application |
| NE | methods run without error | 0..1000 | virtual machine |
| ME | MAC check failures | 0..10⁴ | application |
| CO | cryptographic operations with one key | 0..10⁷ | application |

The range of DS is not fixed by the original work. It is 0..10 here.

### Fuzzification

Each input range [0, S_max] is cut into five fifths: [0, S/5], ]S/5, 2S/5], up to ]4S/5, S].
Each fifth is closed on the right. Eight fuzzy subsets have a constant degree within each
fifth:

| fifth | rather low | low | very low | very very low | very very high | very high | high | rather high |
|---|---|---|---|---|---|---|---|---|
| 1 | 1 | 1 | 1 | 1 | 0 | 0 | 0 | 0 |
| 2 | 3/4 | 2/3 | 1/2 | 0 | 0 | 0 | 0 | 1/4 |
| 3 | 1/2 | 1/3 | 0 | 0 | 0 | 0 | 1/3 | 1/2 |
| 4 | 1/4 | 0 | 0 | 0 | 0 | 1/2 | 2/3 | 3/4 |
| 5 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |

For example, VS = 3 lies in the second fifth. It is "rather high" to degree 1/4 and "very
low" to degree 1/2.

Finding the fifth needs no divider: `fuzzifier` compares 5·s against k·S_max with constant
multipliers.

### Why 3 bits are enough for a degree

Rules combine degrees only with min (AND), max (OR) and 1−x (NOT). None of these creates a new
value. So every premise is one of the seven values {0, 1/4, 1/3, 1/2, 2/3, 3/4, 1}. This set
is closed under 1−x. `degree_t` stores each value as its rank (0..6), so that:

* min and max are comparisons of ranks;
* NOT maps rank k to rank 6−k.

The result is exact and needs no arithmetic.

### Rules and aggregation

A rule reads: IF ⟨term⟩ [AND|OR ⟨term⟩] THEN ⟨level⟩ is LOW|HIGH. A term is
"input IS subset", optionally negated. Every conclusion is either LOW or HIGH, so after
Mamdani clipping and max-aggregation the output fuzzy set depends on just two numbers:

* p_l, the strongest premise among the LOW rules;
* p_h, the strongest premise among the HIGH rules.

`fuzzy_inference` computes these two degrees. The rule sets are parameters (`rule_set_t`,
six slots per output) with these defaults in `sm_pkg`:

| misuse rule | premise | conclusion | origin |
|---|---|---|---|
| R0 | NE very high | LOW | original strategy |
| R1 | VS rather high AND LS high | HIGH | original strategy |
| R2 | CE rather high | HIGH | original strategy |
| R3 | PE rather high OR VS high | HIGH | original strategy |
| R4 | LS high | HIGH | added: light triggers are treated as important attack evidence |
| R5 | ME rather high | HIGH | added: MAC errors raise the level quickly |

| anomaly rule | premise | conclusion |
|---|---|---|
| A0 | LS very very low AND CE very very low | HIGH |
| A1 | DS high | LOW |
| A2 | ME rather high | LOW |
| A3 | EFE rather high | LOW |
| A4 | LS rather high | LOW |

The original work shows only four misuse rules of a set of about a dozen, and no anomaly
rules. **The anomaly rules are this design's own.** They follow the orientation of the
configuration table below, where a *low* anomaly level selects the *stronger*
configurations.

### Defuzzification (first of max)

The output sets are:

* LOW(y) = 1 on [0, 0.2], then falls linearly to 0 at 0.8;
* HIGH(y) = 1 − LOW(y).

The first-of-max of max(min(p_l, LOW), min(p_h, HIGH)) has a closed form:

* If p_l ≥ p_h, the result is 0. The maximum is already reached at y = 0.
* Otherwise, the result is 0.2 + 0.6·p_h. For p_h = 1/4, 1/3, 1/2, 2/3, 3/4, 1 this gives
  0.35, 0.40, 0.50, 0.60, 0.65, 0.80.

Levels are stored in hundredths (`level_t`), so these values are exact. **The crisp level
never exceeds 0.8.** As a result, the last column of the configuration table cannot be reached
with first-of-max.

### Configuration choice

| AL \ ML | [0,0.2] | ]0.2,0.4] | ]0.4,0.6] | ]0.6,0.8] | ]0.8,1] |
|---|---|---|---|---|---|
| [0.8,1] | Safe | Safe | Unsafe | Critical | Fatal |
| [0.6,0.8[ | Safe | Unsafe | Unsafe | Critical | Fatal |
| [0.4,0.6[ | Unsafe | Unsafe | Unsafe | Critical | Fatal |
| [0.2,0.4[ | Unsafe | Unsafe | Critical | Critical | Fatal |
| [0,0.2[ | Unsafe | Critical | Critical | Fatal | Fatal |

A level that lies exactly on a threshold goes to the milder side. ML bins are closed at the top
and AL bins at the bottom. This matters, because 0.40, 0.60 and 0.80 are possible levels: an
anomaly level of exactly 0.80 selects the top row.

| configuration | redundancy RL | RPG generators R | IDI (D, N) | mute/reset | kill |
|---|---|---|---|---|---|
| Safe | ×1 | 0 | (2, 0) | no | no |
| Unsafe | ×2 | 3 | (3, 4) | no | no |
| Critical | ×3 | 10 | (4, 8) | yes | no |
| Fatal | (as Critical) | | | | yes |

In every configuration the sensors stay on. In the original work, Fatal defines only the kill
reaction. Keeping the other countermeasures at their Critical settings is this design's
choice.

These settings match the published cost figures. Assume a targeted instruction at position
m = 150 and a random generator costing α = 10 % of the core's power. The cost formulas of the
countermeasures then give:

| configuration | side-channel gain | time factor | energy factor |
|---|---|---|---|
| Unsafe | 122.5 | 4.0 | 5.2 |
| Critical | 1346.7 | 7.8 | 15.6 |

The formulas are:

* side-channel gain = (1+R²) · 2·√(m·N(N+2)/(6(D+1))) / RL
* time factor = RL · (1 + N/(D+1))
* energy factor = (1 + α·R) · time factor

The `cm_config_table` testbench checks this. It also confirms that the dummy-instruction time
factor is 1 + N/(D+1).

`security_strategy` registers p_l/p_h in the cycle of `start`, and registers the levels,
configuration and settings in the next cycle. `valid` pulses two cycles after `start`.

## Host ↔ monitor protocol

The host always starts a request, and then waits until the monitor lets it resume. The
`smart_security_top` channels carry 32-bit messages. This format is this design's own:

| direction | opcode [31:28] | payload |
|---|---|---|
| host → monitor | 1 `H_SET_INPUT` | [27:24] input index (DS=0, LS=1, VS=2, EFE=3, CE=4, PE=5, NE=6, ME=7, CO=8), [23:0] value |
| host → monitor | 2 `H_CFG_DONE` | software countermeasures reconfigured |
| monitor → host | 1 `M_CFG` | [16:0] `cm_cfg_t` {sensors_on, rl[2], rpg_r[4], idi_d[4], idi_n[4], mute_reset, kill} |
| monitor → host | 2 `M_RESUME` | host may continue |

A request is one of two things:

* an `H_SET_INPUT` message, when the software changes DS or one of its counters;
* a pulse on `ls_trig` / `vs_trig` from a physical sensor. The sensor counter increments,
  saturating at the maximum, and an interrupt is raised.

`monitor_ctrl` then goes through these steps:

1. **take the event:** pop the message and write the value into `sensor_counters`, clipped
   to the input's maximum, or acknowledge the sensor interrupt;
2. **decide:** run `security_strategy` on all nine current values;
3. **configure:** write both CM control registers, then push `M_CFG`:
   * the *core* register holds IDI D/N, mute/reset and kill;
   * the *RNG* register holds R;
4. **wait until ready:** both hardware countermeasures must have raised their "applied"
   interrupt (ICU sources 3 and 4), and the host must have answered `H_CFG_DONE`. During
   this step the controller masks the ICU so that only sources 3 and 4 can interrupt. New
   requests stay pending in the ICU until the next round. The host applies the redundancy
   level in software, because it repeats the computations and counts CE itself;
5. **resume:** push `M_RESUME`.

`host_hold` is high from step 1 to step 5. With an immediate host answer, a request takes
about 16 cycles from the host's push to `M_RESUME` (measured in the end-to-end test). The
original monitor software answers in under 100 cycles, and the testbenches enforce that
bound. While step 4 waits, messages other than `H_CFG_DONE` stay in the FIFO for the next
round. Unknown opcodes and stray `H_CFG_DONE` messages are dropped.

Only the monitor writes the CM control registers. The host cannot change its own protection
level. A register's `ready` falls at the write. It rises when the countermeasure acknowledges
with `applied`, and the same pulse is the ICU event. An assertion in the top checks that
`M_RESUME` is never sent while a register is still pending. Acknowledge timing:

* `idi_sequencer` acknowledges one cycle after the load;
* `rpg` acknowledges after a warm-up of `WARMUP` = 4 cycles.

## Host countermeasures

**Dummy instructions (`idi_sequencer`).** The instruction stream is a series of sequences.
Each sequence is a run of 1..D useful instructions followed by a run of 0..N dummy
instructions, with both lengths uniform. N = 0 disables the countermeasure. For each issue
slot (`issue`), the core is told whether it must issue a dummy (`dummy`). Run lengths come
from a 16-bit LFSR reduced modulo D and N+1, which is slightly non-uniform. A new (D, N)
takes effect at once and restarts the sequence. This is safe because the host is held while
the monitor reconfigures.

A dummy run may be empty, so two useful runs can meet. D therefore bounds a single run, not
every stretch of consecutive useful instructions. The long-run dummy/useful ratio is
N/(D+1), so the time factor is 1 + N/(D+1). `tb_idi_sequencer` measures it on two grids:
D ∈ {2, 3, 4} × N ∈ {0, 4, 8}, and D ∈ {0, 4, 8} × N ∈ {2, 3, 4}. Some measured points:

| D, N | 2, 4 | 2, 8 | 3, 4 | 4, 8 | 8, 2 | 8, 4 |
|---|---|---|---|---|---|---|
| measured | 2.24 | 3.55 | 1.99 | 2.57 | 1.22 | 1.44 |
| 1 + N/(D+1) | 2.33 | 3.67 | 2.00 | 2.60 | 1.22 | 1.44 |

The small shortfall at D = 2 comes from the modulo reduction of the LFSR. D = 0 runs as
D = 1.

**Random power generator (`rpg`).** `R_MAX` = 10 generators are present. Each is a 16-bit
maximal-length Galois LFSR (polynomial x¹⁶+x¹⁴+x¹³+x¹¹+1) with its own seed. Generator i runs
while i < R. Its switching is the added power noise, and its low bit is brought out on
`noise[i]`.

**Reactions.** `mute_reset` and `kill` come straight from the core register, for the host to
act on.

## Departures and limits

* **Decision in hardware.** The strategy and the request handling are software on the
  monitor's processor in the original work. Here they are `security_strategy` and
  `monitor_ctrl`. The monitor processor, its 32 kB code ROM and 4 kB data RAM, the timers,
  address decoders and UARTs of both sides are not built.
* **Host processor and its system are not built.** This covers the 5-stage 32-bit RISC, the
  640 kB ROM, 256 kB RAM and 128 kB EEPROM (emulated in off-chip RAM on the prototype), the
  AES engine, the fault injector, and the ISO 7816 / RS232 UARTs. The top's ports stand in
  for their connections.
* **Analog sensors are not built.** Light and voltage detectors appear only as trigger inputs.
* **ICU role.** The original text configures hardware countermeasures "via the ICU". Here the
  monitor writes the CM control registers directly. The ICU carries the requests and the
  countermeasures' "applied" acknowledgements back to the monitor.
* **Counters do not decay.** The values of LS and VS only grow, saturating at their maxima.
  The other values are whatever the host software last wrote. In the original scenario
  plots, the protection level falls again once the triggers stop. That falling needs a
  forgetting mechanism the original work does not describe. Here it happens only when the
  software rewrites a counter.
* **Conflicting IDI values.** One passage lists D ∈ {0, 4, 8}, N ∈ {2, 3, 4}, while the
  configuration table gives (2, 0), (3, 4), (4, 8). The table is used, and the cost figures
  above confirm it. D = 0 is treated as 1.
* **One first-of-max value.** The original tabulated first-of-max results give 0 for
  p_l = 2/3, p_h = 3/4. The first-of-max definition gives 0.65 there: the HIGH part reaches
  3/4 at y = 0.65, and the LOW part is capped at 2/3. `fom_defuzzifier` follows the
  definition, which agrees with every other cell of that table.
* **Widths and sizes are this design's choice.** These include the FIFO depth (8), the
  message layout, ICU priority, reset values, LFSR types and seeds, and the RPG warm-up time.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv` that ends with a
`TB_RESULT checks=… failures=…` line. `tb/tb_ref_pkg.sv` holds the reference models. They
use real arithmetic, tables re-entered from the specification, and a numerical first-of-max
scan, so they do not share the RTL's encodings. Example with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/sm_pkg.sv tb/tb_ref_pkg.sv tb/tb_smart_security_top.sv \
  --top-module tb_smart_security_top
./obj_dir/Vtb_smart_security_top
```

The same command, with `tb_smart_security_top` replaced, builds any other testbench. The
packages are named first, and Verilator finds the modules in `rtl/` by name.

`tb_smart_security_top` runs the whole design at its default parameters. The host model
answers every `M_CFG` and waits for every `M_RESUME`. The test plays these sequences:

* a quiet card;
* sensitive data;
* a poor reader that keeps firing the voltage sensor, followed by MAC errors;
* wrong PINs with voltage glitches;
* a laser attack, seen by the light sensor, during a long run of correct commands;
* a combined light-and-voltage attack.

After each request, it compares the levels, the configuration, the `M_CFG` settings, the
number of running generators and the reactions with the reference model. It checks that every
request ends within 100 cycles. It also checks that each of the following happened at least
once:

* every configuration;
* every misuse rule fired;
* both request kinds;
* dummy insertion;
* the random generators running;
* mute/reset;
* kill;
* the host being held.

It also checks that each resume follows exactly one "applied" interrupt from each hardware
countermeasure.

The run takes a few seconds.

## Changing it

* **Rules:** edit `ML_RULES` / `AL_RULES` in `sm_pkg`, or pass `ML_RULE_SET` /
  `AL_RULE_SET` to `security_strategy`. Raise `N_RULES` for more slots.
* **Input ranges:** edit `input_max` in `sm_pkg`. Each `fuzzifier` instance gets its S_max as
  a parameter.
* **Thresholds and configurations:** edit `config_select` and `cm_config_table`. The settings
  struct `cm_cfg_t` has 4-bit fields for R, D and N, so values up to 15 work without width
  changes. `rpg` clips R to `R_MAX`.
