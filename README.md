# Electromagnetic IP-identity transmitter

A piece of intellectual property (IP) inside an FPGA or ASIC can announce
who it belongs to over the electromagnetic side channel. A tiny ring
oscillator sits next to the protected logic. While an outside ID checker
raises its enable, the ring oscillates and radiates. A shift register feeds
the identity bits to the ring one at a time, and each bit changes the
carrier's frequency, or turns the carrier on and off. A near-field probe held
over the chip picks up the carrier. A spectrum analyser then reads the bits
back without any electrical contact. The transmitter costs a handful of LUTs
(17 LUT4 in the largest prototype, 6 in the smallest). It changes no datapath of the protected IP. Unless you know the
frequency to look at, its emission is lost in the spectrum.

This repository holds SystemVerilog for that scheme at its prototype sizes:

* `id_shift_register`: the identity source (synthesizable).
* `bfsk_transmitter`: the first, two-frequency transmitter (behavioural model).
* `ook_transmitter`: the second, on-off transmitter (behavioural model).
* `em_ip_id_top`: one channel for each transmitter, side by side.

It also holds self-checking testbenches, including one that plays the ID
checker from end to end.

## How an identity gets out

```
            enable (from the ID checker)
               |             |
   clk --> id_shift_register |      ring oscillator
            (16-bit ID,      +--> enable
             rotates)   data ---> data   ---> ro_out ~~~> near-field probe
```

* The checker raises `enable`. From then on, the shift register puts one
  identity bit on `data` per clock, MSB first. It repeats the word for as
  long as `enable` stays high.
* The ring turns each bit into a carrier:
  * **BFSK version**: f0 for a 0 and f1 for a 1.
  * **On-off version**: f0 for a 1 and no carrier for a 0.
* When `enable` falls, the ring stops and the register reloads the ID. The
  next request then starts again at the first bit.
* The prototype ran the register at 1 MHz, which gives 1 Mbps. The on-off
  version was also read at 2, 4 and 16 Mbps. A 16-bit identity therefore takes
  16 us at 1 Mbps, far inside the 500 us budget of a supply-chain check.

The demonstration identity is `0101000111110011`.

## The BFSK ring (`bfsk_transmitter`)

The ring has three parts:

* a NAND gate;
* a chain of N+K delay elements (one LUT each);
* a 2:1 multiplexer that feeds the NAND.

The multiplexer's select is the data bit:

| data | loop closes after | carrier |
|------|-------------------|---------|
| 0    | N elements        | f0 (higher) |
| 1    | N+K elements      | f1 (lower)  |

The NAND's second input is `enable`. While `enable` is 0, the NAND output is
held at 1 and the whole ring settles at 1. It then draws no dynamic power and
radiates nothing. The NAND is the only inversion in the loop, so one half
period is one trip round the selected loop:

    half(data) = T_NAND + T_MUX + (data ? N+K : N) * T_DELAY

The defaults are the Cyclone III prototype's sizes, N = 6 and K = 10. That
prototype measured 289 MHz and 119 MHz. Solving the formula for both
frequencies gives 247 ps per delay element and 247 ps for the NAND and the
multiplexer together. These delays are the defaults (`em_tx_pkg`), and the
model then runs at 289.2 and 119.1 MHz. In silicon the delays depend on
placement and routing.

Resources grow with N and K:

* FPGA: N+K+1 LUT4, i.e. 17 for the prototype. The NAND and the
  multiplexer share one LUT.
* Flash FPGA: N+K+2 tiles.
* ASIC: the delay elements become inverters. The ring is then about the
  size of a single flip-flop.

A characterisation sweep measured N = 0..4 and K = 1..5 on a flash FPGA:
f0 ranged from 385 to 119 MHz, and f1 from 280 to 70 MHz.

### Why the BFSK ring is modelled behaviourally

A ring oscillator is a deliberate combinational loop. No synthesis flow
produces it from RTL. It is built from LUT primitives and held in place with
keep and placement constraints, so both transmitters here are simulation
models. They have the real part's ports and timing.

The BFSK model does not simulate the ring gate by gate. With ideal gate
delays, a switch from the short loop to the long loop leaves several
wavefronts circulating in the long loop. Switching back does the same in the
short loop. The model would then run at a multiple of f1 or f0 (357 MHz
instead of 119 MHz, for example). A real ring loses these extra wavefronts
through noise and gate non-idealities, and the prototype shows a clean f1.

The model therefore reproduces the ring's fundamental mode at its output
node. While enabled, it toggles once per trip round the loop selected by
`data`. It reads `data` at the start of each half cycle, so a new bit moves
the carrier within one trip, as the loop length does in silicon. When
`enable` falls, the output returns to 1 at the end of the current half cycle
and stays there.

## The on-off ring (`ook_transmitter`)

The second version uses a single carrier. It keeps one multiplexer, K delay
elements and two NAND gates. The wiring here is this design's reading of
that parts list:

* NAND #1, `NAND(enable, mux_out)`, is the ring's inverting stage and drives
  the K delay elements.
* NAND #2, `NAND(enable, data)`, drives the multiplexer select. When
  `enable` and `data` are both 1, the multiplexer closes the ring from the
  chain end and the ring oscillates. Otherwise it passes a constant 0: NAND #1
  goes to 1, the chain settles at 1 and the carrier stops within one trip.

The default K = 6 gives a 309 MHz carrier, as in the prototype. The model
keeps the 247 ps element delay fitted above and gives the remaining 136 ps
to the two gates in the loop. This ring always restarts from rest with a
single wavefront, so it is modelled gate by gate with inertial delays, and
its output node rests at 0 while the carrier is off.

In the prototype this transmitter cost 6 LUT4. It was also tested between
an AES cipher and an AES decipher of 1772 LUT4. Those IPs are not part of
this repository.

## The identity register (`id_shift_register`)

This is a circular shift register, `ID_W` bits wide (16 by default), loaded
with `ID`. Its behaviour:

* **Reset**: asynchronous, active-low (`rst_n`). Loads `ID`.
* **`enable` = 0**: reloads `ID`.
* **`enable` = 1**: rotates left by one bit on each rising edge of `clk`.
* **`data`**: the register's MSB.
* **`first_bit`**: marks the clock in which the first bit of the word is on
  `data`, so a receiver can frame the word.

An assertion checks that the word is intact after every full rotation.

`enable` is expected to change just after a rising clock edge. The first bit
then lasts exactly one clock. There is no bit-rate divider: the bit rate is
the clock rate. The register takes 16 flip-flops. In an FPGA with shift-LUTs
it fits in one LUT.

## The top (`em_ip_id_top`)

The top holds both published transmitter versions. Each has its own
`id_shift_register` and its own `enable`, so the two channels can run alone
or together.

| Port | Direction | Meaning |
|------|-----------|---------|
| `clk`, `rst_n` | in | shift-register clock (1 MHz for 1 Mbps), asynchronous active-low reset |
| `enable_bfsk`, `enable_ook` | in | checker requests, one per channel |
| `em_bfsk`, `em_ook` | out | radiating ring nodes |
| `id_bit_*`, `id_first_*` | out | bit being sent and word framing, for observation |

The parameters `ID_W`, `ID`, `N`, `K_BFSK` and `K_OOK` default to the
prototype values.

## Reading the identity back

The real checker works in the frequency domain. It takes a sliding-window
FFT of the probe signal (16384-point frames, stepped by 100 samples) and
compares the amplitude at f0 with the amplitude at f1. That receiver is
laboratory equipment and software, not part of the device.

The testbenches use `tb/em_edge_demod.sv` in its place. It counts the
carrier's rising edges in each bit window and records the last carrier
period. A BFSK bit is read as 1 when its window holds fewer edges than the
midpoint between the f0 and f1 counts: about 289 and 119 edges per
microsecond at the defaults. An on-off bit is read as 1 when its window holds
at least half the edges of a full carrier bit.

## Where this RTL departs from the published design

These choices are this design's own:

* **Gate and element delays**: all of them are fitted to the published
  frequencies. Only the frequencies were published.
* **BFSK ring**: modelled at the level of its fundamental mode, not gate by
  gate. See the BFSK section above.
* **On-off ring wiring**: the exact wiring of the two NANDs and the
  multiplexer is a reading of the published parts list.
* **Data polarity**: one sentence of the original description pairs f0 with
  a 1. Its detailed description, and its receiver rule, pair f0 with a 0
  (the short ring). This design follows the second: data 0 gives f0.
* **Identity register**: sends MSB first; reloads while disabled; has an
  asynchronous reset and a `first_bit` output.
* **Two channels in one top**: the prototypes carried one transmitter at
  a time.

These parts of the scheme are not built:

* a PUF or feedback-shift-register identity source, which was suggested as
  an alternative;
* the internal trigger that would drive `enable` in the hardware-Trojan use
  of the same transmitter;
* the AES host IPs.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|-----------|---------------|
| `id_shift_register_tb` | 16-bit and 8-bit words over three rotations: bit order, `first_bit`, reload on disable, asynchronous reset |
| `bfsk_transmitter_tb` | silence while disabled; exact f0 and f1 periods (within 1 % of 289 and 119 MHz); start and stop latency; edge counts per bit at 1 Mbps; for N=6/K=10 and N=4/K=5 |
| `ook_transmitter_tb` | silence while disabled and for data 0; exact 309 MHz period; start and stop; edge counts per bit at 1, 2, 4 and 16 Mbps; for K=6 and K=3 |
| `bfsk_table1_tb` | all 25 sizes of the N = 0..4, K = 1..5 sweep, with delays fitted to the flash FPGA (1299 ps gates, 700 ps per element): exact periods, f0 and f1 trends, each frequency within 15 % of the measured one |
| `em_ip_id_top_tb` | full-size design, ID checker's view: idle silence; two BFSK words at 1 Mbps; one on-off word at each of 1, 2, 4 and 16 Mbps; both channels at once. The first word is checked to take exactly 16 us. Each mechanism is counted (silence, f0 and f1 bits, carrier on and off, wrap-around, restart, rate change), and one that never happens is a failure |

Run any of them with Verilator 5. For example, from the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      --top-module em_ip_id_top_tb -y rtl -y tb +libext+.sv \
      rtl/em_tx_pkg.sv tb/em_ip_id_top_tb.sv
    ./obj_dir/Vem_ip_id_top_tb

Replace the top-module name and the testbench file to run another one. The
end-to-end test simulates about 110 us of device time in well under a second.

## Changing the design

* **Another identity**: set `ID_W` and `ID` on the top.
* **Other ring sizes**: set `N`, `K_BFSK` and `K_OOK`. `K` must be at
  least 1.
* **Another FPGA or layout**: override the transmitters' `T_*_PS`
  parameters with delays measured there. The formula above then gives the
  carriers.
* **Another bit rate**: change the clock period. Keep at least a few
  carrier cycles per bit; 16 Mbps leaves 19 cycles of the 309 MHz carrier.
* **Hardware build**: only `id_shift_register` is synthesizable as it
  stands. Each ring must be instantiated from the target's LUT or gate
  primitives, with keep and placement constraints so that synthesis neither
  removes nor merges the delay elements.
