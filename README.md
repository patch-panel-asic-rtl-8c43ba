# Patch-Panel ASIC: delay alignment and bunch-crossing identification for 32 hit channels

This chip sits between the wire and strip front-end boards of a muon trigger system and the trigger logic. It handles two front-end boards of 16 channels each (port A and port B). For every channel it:

- receives the discriminator output over LVDS;
- corrects the polarity (anode wires or cathode strips);
- delays the hit by a programmable amount in steps of under a nanosecond, to cancel differences in time of flight and cable length;
- assigns the hit to a 25 ns bunch crossing of the 40 MHz machine clock (bunch-crossing identification, BCID).

All programmable delays use one kind of voltage-controlled delay unit. A PLL holds the units' control voltage at the value that makes their delay a fixed fraction of the clock period, so a delay setting means the same time whatever the supply or temperature. For calibration, each port can also send a test pulse of programmable amplitude and timing to its front-end board. The whole chip is configured through JTAG, and every configuration register is triple-redundant against single-event upsets.

This RTL covers the logic of the chip in synthesizable SystemVerilog. The analog parts have behavioural models: LVDS receivers, delay lines, and the oscillator, charge pump and filter of the PLL. The test pulse current output stage is not modelled; its control signals are brought out as ports.

## Signal path of one port

```
 LVDS pair ─► lvds_rx ─► XOR POL ─┬──────────────────────────────────────────┐ BYPASS=1
                                  │                                          ▼
                                  ├─► variable_delay(SIGNAL_DEL) ─► bcid_channel ─► OUTx[i]
                                  │                 (mask bit)  ▲   ▲
                                  ├─► Ox0 / Ox15 (channels 0, 15)│   │
                                  └─► ORx (OR of 16)             │   │
 CLK ─► variable_delay(BCID_DEL) ─► BCID clock ──────────────────┘   │
                                    └─► variable_delay(BCID_GATE) ─► gate clock
```

- **Polarity.** With POL low (anode board) the receiver output passes unchanged. With POL high (strip board) it is inverted. From this point on, a hit is high.
- **Bypass.** With BYPASS high, OUT carries the polarity-corrected hits directly. No delay and no BCID are applied, so the output is asynchronous.
- **Monitors.** Ox0, Ox15 and ORx carry channel 0, channel 15 and the OR of all 16 channels. They are never bunch-identified. Here they are taken before the signal delay.
- **Shared settings.** The signal delay, the BCID clock delay and the gate delay are common to the 16 channels of a port. The mask is per channel.

## Bunch-crossing identification and the widened gate

This is the least obvious part of the design (`bcid_channel`). Each channel has the following flip-flops:

1. **Capture flip-flop.** The rising edge of the delayed hit clocks it, with the channel's mask bit as data, so a masked channel never captures.
2. **BCID chain.** Two flip-flops on the BCID clock. The BCID clock is the 40 MHz clock delayed by BCID_DEL, which sets the phase of the crossing boundaries.
3. **Gate chain.** Two flip-flops on the gate clock. The gate clock is the BCID clock delayed again by BCID_GATE.
4. **Output flip-flop.** It runs on the BCID clock. It goes high for one clock period when either chain sees the capture flip-flop set for the first time, meaning its first flip-flop is set and its second is not yet.

The second flip-flop of the BCID chain clears the capture flip-flop. Because the clear goes away only after that chain has seen the capture go low, a channel is blind for about two clocks after each hit.

The timing rule, which the testbenches use as their reference model, works as follows. Call the BCID clock edges `E_k` and the gate clock edges `F_k = E_k + g`, where `g` is the gate delay. For a hit that reaches the BCID logic at time `t`:

- Let `E_k` be the first BCID edge after `t`. OUT is then high in the clock after `E_(k+1)`.
- Let `F_j` be the first gate edge after `t`. OUT is then high in the clock after `E_(j+1)`.

If the hit falls between `E_(k-1)` and `E_(k-1) + g`, then `j = k - 1`, and the hit is reported in two consecutive crossings. Otherwise both rules give the same crossing. So the set of hit times assigned to one crossing is `25 ns + g` wide: this is the effective gate width. With the gate delay at 0 to 31 taps of about 0.78 ns, the gate is 25 to 49 ns wide. The chip is specified for about 26 to 48 ns. The latency from the hit to OUT is between one and two BCID clocks, plus the signal delay.

## Delay lines and the PLL

`variable_delay` is a chain of 32 identical delay units with a 5-bit tap selector. Tap 0 adds no delay and tap 31 adds 31 units. The PLL (`pll`) builds a ring oscillator out of 20, 24, 28 or 32 of the same units plus an inverter; pins STEP1..0 = 0, 1, 2, 3 select 32, 28, 24 or 20 units.

The PLL works like this:

- The phase detector compares the ring with a 20 MHz reference, which is CLK divided by two (`clk_div2`).
- The charge pump moves the control voltage VCON until one pass around the ring takes 25 ns.
- Every delay unit in the chip receives the same VCON, so once the loop is locked one tap is worth 25 ns / units:

| STEP | units in ring | tap (model) | full range, 31 taps |
|------|---------------|-------------|---------------------|
| 0    | 32            | 0.781 ns    | 24.2 ns             |
| 1    | 28            | 0.893 ns    | 27.7 ns             |
| 2    | 24            | 1.042 ns    | 32.3 ns             |
| 3    | 20            | 1.250 ns    | 38.8 ns             |

On silicon the measured taps are 0.74, 0.84, 0.98 and 1.2 ns. The model leaves out the inverter in the ring and the buffer delays.

What is modelled and how:

- **VCON.** It is an analog voltage. Throughout the RTL it is an `int` in millivolts.
- **Delay unit.** A unit delays by `375 ps + 1 ps x (3300 mV - VCON)`, from `pp_pkg::unit_delay_ps`. At 3.3 V, 32 units give 12 ns, the fastest the real line achieves. The slope is a modelling choice.
- **Phase detector.** `phase_detector` is synthesizable: a two-flip-flop phase-frequency detector with UP and DOWN outputs.
- **Pump, filter and ring.** These are modelled in 50 ps time steps. A 50 µA pump charges the 100 pF off-chip capacitor, and a 200 mV resistive kick is applied while a pump pulse lasts. Starting from VDD, the loop locks within a few microseconds at all four ring lengths.
- **Control pins.** ENV low disables the detector. ENB low disconnects the pump, and VCON then follows `vcon_ext_mv`. ENP high forces VCON to VDD. SLENP high starts VCON from VDD at RESET_ and overrides ENP. With SLENP low the model starts from VDD/2; on the chip the starting voltage is undefined.

## Test pulse generator

Each port has its own test pulse generator. When TPTRIG rises, `tpg_coarse` produces the pulse:

- **Trigger edge.** TPTRIG is sampled on the rising clock edge (TPG_COARSE[4] = 1) or on the falling edge (TPG_COARSE[4] = 0). A falling-edge sample is re-timed to the next rising edge.
- **Coarse delay.** The pulse starts `1 + min(TPG_COARSE[3:0], 8)` clocks after the sampling edge. Codes above 8 give 8 clocks (200 ns). The chip specifies both a 4-bit field with default 15 and a range of 8 clocks, and this is how the two are reconciled here.
- **Width.** The pulse lasts 120 clocks, which is 3 µs.
- **Retrigger.** A trigger that arrives during a pulse is ignored.

The pulse then goes through the port's fine delay line (TPG_FINE, 0 to 31 taps) into `tpg_steer`. There, the 4-bit amplitude switches on that many of the 15 equal current sources (thermometer code on `tpg_src_en_x`). The steering signals `tpulsex` / `tpulsex_n` say which of the two open-drain pins carries the current. With POL low, TPULSE carries the positive pulse; POL high swaps the pins. With amplitude 0 there is no output. The current sources themselves are analog and are not part of this RTL.

## JTAG and the configuration registers

`pp_jtag` contains the following:

- **TAP controller.** The standard IEEE 1149.1 controller (`jtag_tap`). There is no TRST_ pin, so the TAP resets either by five TCK cycles with TMS high or by RESET_.
- **Shifting.** The instruction register is 8 bits. Instructions and data are shifted LSB first.
- **Instruction decode.** Bits [7:1] of the instruction select a register. Bit 0 = 1 writes the shifted-in value at Update-DR; bit 0 = 0 only reads it out. Capture-DR always loads the register's present value, so a write also returns the old contents.
- **BYPASS.** Any code not in the table selects the 1-bit BYPASS register, and so does the state after Test-Logic-Reset.
- **TDO** changes on the falling TCK edge.

| register     | code (bit 0 = x) | bits | meaning                                         | default |
|--------------|------------------|------|-------------------------------------------------|---------|
| BCID_MASKA/B | 0000_010x / 0000_011x | 16 | 1 = channel enabled, LSB = channel 0       | all 1   |
| TPG_AMPA/B   | 0000_101x / 0000_110x | 4  | test pulse amplitude, 0 = off              | 15      |
| TPG_FINEA/B  | 0001_000x / 0001_001x | 5  | test pulse fine delay tap                  | 31      |
| TPG_COARSEA/B| 0001_011x / 0001_100x | 5  | [4] 1 = rising edge; [3:0] clocks          | 1_1111  |
| SIGNAL_DELA/B| 0001_110x / 0001_111x | 5  | hit signal delay tap                       | 31      |
| BCID_DELA/B  | 0010_001x / 0010_010x | 5  | BCID clock delay tap                       | 31      |
| BCID_GATEA/B | 0010_100x / 0010_101x | 5  | gate delay tap                             | 31      |
| DEBUG_DEL    | 0010_111x        | 5    | DELIN -> DELOUT delay tap                       | 31      |
| SEU          | 0011_0000        | 1    | read only: 1 = a register upset was seen        | 0       |
| BYPASS       | anything else    | 1    | standard bypass                                 | –       |

**Upset protection.** Every register, the instruction register included, is a `tmr_reg`: three copies written together, with the bit-wise majority as output. A single upset copy therefore never changes the chip's behaviour. The copies are not scrubbed. While any two copies of any register disagree, the SEU flag is set and held. Any register write through JTAG clears the flag and rewrites all three copies of that register. If another register still disagrees, the flag is set again on the next TCK edge.

## Top level (`pp_asic`)

The ports follow the chip's pin list, with these changes:

- Each LVDS pair is split into `inx_p` / `inx_n` vectors.
- The analog VCON pin becomes `vcon_mv` (its value) and `vcon_ext_mv` (a voltage applied from outside when ENB is low).
- The test pulse pins become the steering outputs plus the 15 source enables per port.

POL, BYPASS, CLK, TPTRIG and the PLL pins are shared by both ports. The top has no parameters: the channel count (16) and the other sizes live in `pp_pkg`.

## How far to trust it, and where it departs from the chip

Taken from the chip's description:

- the block structure;
- the register map, widths and defaults;
- the BCID flip-flop arrangement and the way its two clocks are derived;
- ring lengths, the 25 ns lock condition, the 3 µs pulse, the 0–8 clock coarse range and the 15 current sources;
- the PLL control pin functions.

This design's own choices:

- how the BCID chain outputs are combined (first-sample detection, then OR);
- the phase-frequency detector structure;
- the tap point of the monitor outputs;
- limiting coarse codes above 8;
- ignoring retriggers;
- the SEU flag's clear rule;
- resetting the TAP with RESET_;
- every number in the analog models: receiver delay 2 ns, delay-unit slope, pump current, filter kick, time step.

Everything inside `lvds_rx`, `variable_delay` and `pll` other than `phase_detector` and `clk_div2` is a behavioural model, not a circuit.

`pp_asic`, `pp_port` and `pll` contain behavioural models, so the synthesis flow treats them as simulation views. The logic blocks (`pp_jtag`, `jtag_tap`, `tmr_reg`, `bcid_channel`, `tpg_coarse`, `tpg_steer`, `phase_detector`, `clk_div2`) are plain synthesizable RTL.

## Simulating

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. The models use delays, so build with timing support. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl +libext+.sv rtl/pp_pkg.sv tb/tb_pp_asic.sv --top-module tb_pp_asic
./obj_dir/Vtb_pp_asic
```

`tb_pp_asic` runs the whole chip at its default sizes in about 110 µs of simulated time, which takes a few seconds:

1. PLL lock.
2. JTAG set-up and read-back.
3. 120 rounds of random hits on both ports, checked crossing by crossing against the timing rule above.
4. Bypass and polarity.
5. Both test pulses, including the falling-edge trigger and the coarse limit.
6. The debug delay.
7. An injected register upset.

It counts each of these mechanisms and fails if one never occurred. Two testbenches repeat the chip's characterisation measurements. `tb_gate_width` sweeps the hit time in 250 ps steps across two clock periods and measures the effective BCID gate for several gate settings. `tb_delay_range` measures the debug delay line at every ring length through JTAG and checks the tap size and the 31-tap range. The block testbenches (`tb_bcid_channel`, `tb_pp_port`, `tb_pll`, `tb_pp_jtag`, …) go deeper on each part. The simulator has only two states, so every flip-flop is reset by RESET_, and the testbenches pulse the reset rather than starting with it low.
