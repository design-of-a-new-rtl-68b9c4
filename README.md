# Chaos-based image stream cipher

This design encrypts an image with a one-time-pad-style stream cipher. Each
pixel is XORed with a key word. The same operation with the same key stream
decrypts it. The key stream comes from chaos: four classic three-dimensional
chaotic flows (Lorenz, Rössler, Chen and Lü) are integrated in fixed point, one
Euler step per clock. A tree of multiplexers picks one of their twelve state
variables, and that value drives one iteration of the logistic map. The
logistic map's output is the key.

The key stream is fully deterministic. It depends only on the initial
conditions, the coefficients and the four 2-bit selections. So a receiver with
the same settings regenerates it exactly and recovers the image bit for bit.

The RTL follows a published FPGA architecture built from HLS blocks (a pre-key
generator, a logistic-map block, a 32-bit register between them, and ROM, RAM,
control and clock-divider blocks around them). The equations, coefficients,
initial conditions, block structure, port names and memory widths are the
published ones. The number format, the Euler step, the logistic parameter `r`,
the handshakes and all timing are this design's own, because the source does
not give them. These choices are listed in
[Choices made here](#choices-made-here-and-departures).

## Block structure

```
                       pre_key_generator
  lorenz_euler  --x1,y1,z1--+
  rossler_euler --x2,y2,z2--+--> mixing_rule --x_n--> [x_V reg] --> pre_key_reg --> logistic_map --> key
  chen_euler    --x3,y3,z3--+    (MUX1..MUX4,          (RTL_REG, 32 bit)          x(n+1)=r x(1-x)
  lu_euler      --x4,y4,z4--+     sw1..sw4)
                \________________ key_generator ______________________________________________/

  encryption_process:  image_rom --pixel--> otp_xor(^key) --> frame_ram (cipher)
                       ctrl_module, div_clk, key_generator
  decryption_process:  cipher source --> otp_xor(^key) --> frame_ram (recovered)
                       ctrl_module, div_clk, key_generator
  chaos_cryptosystem:  encryption_process -> decryption_process (reads the cipher RAM)
```

| File | Role |
|---|---|
| `rtl/chaos_pkg.sv` | Q8.24 type, constants, fixed-point multiply and Euler update, selection enums |
| `rtl/lorenz_euler.sv`, `rossler_euler.sv`, `chen_euler.sv`, `lu_euler.sv` | the four chaotic systems, one Euler step per enabled clock |
| `rtl/mixing_rule.sv` | MUX1..MUX3 (one system per variable) and MUX4 (one variable) |
| `rtl/pre_key_generator.sv` | four systems and the mixing rule, registered pre-key `x_V` |
| `rtl/pre_key_reg.sv` | 32-bit clock-enabled register between pre-key and logistic map |
| `rtl/logistic_map.sv` | one logistic-map iteration, Q0.32 |
| `rtl/key_generator.sv` | pre-key generator, register and logistic map: the key stream |
| `rtl/otp_xor.sv` | the encryption / decryption unit, `c = m ^ K` |
| `rtl/image_rom.sv` | plain-image ROM (synthetic test image, see below) |
| `rtl/frame_ram.sv` | dual-port frame memory for the cipher or recovered image |
| `rtl/ctrl_module.sv` | sequencer of one pass over the image |
| `rtl/div_clk.sv` | clock divider, made as a clock enable |
| `rtl/encryption_process.sv`, `decryption_process.sv` | the two halves of the cryptosystem |
| `rtl/chaos_cryptosystem.sv` | top level: encryption, then decryption |

## The chaotic systems in fixed point

Each system is three coupled ODEs. Here `A`, `B`, `C` stand for each
system's published coefficients.

| System | dx/dt | dy/dt | dz/dt | A, B, C | x(0), y(0), z(0) |
|---|---|---|---|---|---|
| Lorenz | A(y−x) | Bx − y − xz | xy − Cz | 10, 28, 8/3 | 0, 5, 25 |
| Rössler | −(y+z) | x + Ay | B + z(x−C) | 0.2, 0.2, 5.7 | 0.1, 0.1, 0.1 |
| Chen | A(y−x) | (C−A)x − xz + Cy | xy − Bz | 35, 3, 28 | 1, 1, 1 |
| Lü | A(y−x) | −xz + Cy | xy − Bz | 36, 3, 20 | 1, 1, 1 |

The forward Euler method advances the state: `v(n+1) = v(n) + H·f(v(n))`, with
all three variables updated together from the old state.

**Number format.** Every state variable is a 32-bit signed Q8.24 number, with
24 fraction bits and a range of ±128. A double-precision run of all four
systems shows their largest excursion is about 70, from the Chen `z`
variable, so 8 integer bits are enough. Derivatives can be much larger than
the states (the product `xz` reaches about 1500). They are therefore computed
at 64 bits, still with 24 fraction bits. Only `v + H·f` is cut back to 32
bits. Every product is truncated by an arithmetic right shift of 24, which
rounds toward minus infinity. Constants are rounded to the nearest Q8.24 value
(for example 8/3 → 44739243 / 2^24). Integer coefficients are exact.

**Step size.** `H = 0.001`, stored as 16777 / 2^24. The step has to be small
because explicit Euler on the Chen system (A = 35) diverges for `H` ≥ 0.003.
With `H = 0.001` all four systems stay on their attractors. The testbenches
check this: each state matches a double-precision Euler run to within 0.01
over the first 200 steps and stays bounded over 15,000 steps.

**Hardware cost.** Each Euler step is one clock of purely combinational
multiply-add logic: 2 (Rössler) to 5 (Lorenz, Chen) 64-bit products plus three
products by `H`. This is the long path of the design. Pipelining it would
change when each state is available, so a faster clock would need a different
schedule, not just extra registers.

## From pre-key to key

`mixing_rule` implements the selection tables:

| code | sw1 → MUX1 | sw2 → MUX2 | sw3 → MUX3 | sw4 → MUX4 |
|---|---|---|---|---|
| 00 | x of Lorenz | y of Lorenz | z of Lorenz | MUX1 (x_i) |
| 01 | x of Rössler | y of Rössler | z of Rössler | MUX2 (y_i) |
| 10 | x of Chen | y of Chen | z of Chen | MUX3 (z_i) |
| 11 | x of Lü | y of Lü | z of Lü | MUX1 (this design's choice) |

The selected value `x_n` is the *pre-key*. The logistic map block reads its 32
bits, unchanged, as an unsigned fraction in [0, 1) (Q0.32). It computes
`x(n+1) = r·x_n·(1 − x_n)` with `r = 3.99` (Q4.28). `x(1−x)` is formed exactly
at 65 bits and truncated to Q0.32 before the multiply by `r`. Because
`r/4 < 1`, the result always fits in Q0.32. The result is the 32-bit key word
`K`.

Reading the pre-key bits as a fraction has a visible side effect. A Q8.24
value near zero has either almost all-zero or almost all-one upper bits, so
the logistic input often sits near 0 or 1. The upper key bits are therefore
far from uniform: the top byte has about 5.9 bits of entropy. The low 16 bits
are statistically clean (see [Results](#results)), so `otp_xor` uses bits
15:0. Change the slice in `otp_xor.sv` or the input scaling in
`logistic_map.sv` together with the reference model if you want another
mapping.

### Timing of the key generator

All key-generator registers advance only on clocks with `ce` high.

| enabled clock | event |
|---|---|
| t | `start` high: every system takes one step; the mix of the *pre-step* states is registered in `x_V`, `x_V_ap_vld` set |
| t+1 | `pre_key_reg` (RTL_REG) captures `x_V` (CE = `ce & x_V_ap_vld`) |
| t+2 | logistic map registers `K`; `key_vld` is high during t+3 |

Key k is the mix of the states after k Euler steps. It appears three enabled
clocks after its request. With `start` held high, one 32-bit key follows per
enabled clock. A reset loads every initial condition again and restarts the
stream from key 0. The HLS-style handshake outputs (`ap_done`, `ap_ready`,
`ap_idle`) are simple: done and ready mirror the valid bit, and idle is
`!ap_start`.

## The image path

`ctrl_module` runs a pass over `n_pixels` pixels as a fixed schedule on the
enabled clocks. It counts steps `t` from 0 after `start`:

| step | action |
|---|---|
| t = k | request key k (`key_req`) |
| t = k+2 | read pixel k from the source memory (one-clock read) |
| t = k+3 | key k and pixel k meet at `otp_xor`, which registers `pixel ^ K[15:0]` |
| t = k+4 | write the result to `frame_ram` at address k |

`done` pulses one clock after the last write. A pass takes `n_pixels + 4`
enabled clocks, plus up to one divider period of phase.

`start` also resets the key generator, in the same clock. Every pass therefore
begins at key 0. This is what lets the decryption side, which has its own
key generator, produce the identical stream.

`div_clk` makes a one-clock enable pulse every `DIV` clocks (`DIV = 2`). Every
register of the cipher path uses it as its clock enable. This behaves like
running the path on a divided clock, but stays in a single clock domain.

`chaos_cryptosystem` chains the two halves:

1. `start` (taken only when `busy` is low) runs `encryption_process`. It reads
   the plain image from `image_rom`, encrypts it, and writes it to its
   `frame_ram`.
2. Its `enc_done` starts `decryption_process`. While decryption runs, it owns
   the read port of the cipher RAM. It decrypts with a regenerated key stream
   and writes the recovered image to its own `frame_ram`.
3. `dec_done` ends the run. The cipher RAM's read port returns to
   `cipher_disp_*`. `plain_disp_*` reads the recovered image at any time.
   Read data appears one clock after the address.

A full run of `N_PIXELS` pixels takes `2·(N_PIXELS + 4)·DIV` clocks, which is
262,160 clocks at the default size. The selections `sw1..sw4` must stay
constant during a run. They and the system parameters are the shared secret.

### Top-level ports (`chaos_cryptosystem`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `start` | in | 1 | start a run (ignored while `busy`) |
| `sw1`..`sw4` | in | 2 each | mixing-rule selections (codes as in the table above) |
| `cipher_disp_en`, `cipher_disp_addr` | in | 1, AW | read the cipher image (when no decryption runs) |
| `cipher_disp_data` | out | DW | cipher pixel |
| `plain_disp_en`, `plain_disp_addr` | in | 1, AW | read the recovered image |
| `plain_disp_data` | out | DW | recovered pixel |
| `busy`, `enc_done`, `dec_done` | out | 1 | status; the done outputs are one-clock pulses |

Parameters: `AW = 16` (address bits, so 65,536 pixels), `DW = 16` (pixel
bits), `DIV = 2`, `N_PIXELS = 2**AW`.

The display ports stand for the display that would show the images. A display
controller is not part of this RTL.

### The test image

The real photographs are not part of this design, so `image_rom` is filled at
start-up from a formula. For address `a`, let `row = a / 256` and
`col = a % 256`. Then:

- `pixel[15:8] = (row + col) mod 256`
- `pixel[7:0] = row ^ (0x40 if bit 5 of row and bit 5 of col differ)`

This gives a smooth, strongly correlated image, which makes the decorrelation
of the cipher visible. To use a real picture, replace `image_pixel()` or the
`initial` block in `image_rom.sv` (for example with `$readmemh`).

## Choices made here, and departures

- **Number format Q8.24, step H = 0.001, logistic r = 3.99:** none is given by the source architecture.
- **Rössler form:** the system is used in its standard form, `dy/dt = x + Ay`.
- **Selections:** the published HLS block takes two 16-bit selection inputs,
  while its mixing-rule description uses four 2-bit selections. This design
  follows the four-selection description. The code `sw4 = 11` is not defined
  there; here it selects MUX1.
- **Logistic input:** the pre-key bits are used unchanged as a Q0.32
  fraction. The logistic map block has no state of its own: each key is one
  iteration from the current pre-key.
- **Which key bits:** a pixel is 16 bits and a key 32. The low 16 key bits are
  used.
- **Handshakes and latencies:** HLS port names are kept, but the timing
  between blocks is reduced to valid bits and clock enables.
- **Controller:** only the controller's ports and a few operators
  (an adder, a comparator, an address register) are known. The schedule above
  is this design's own.
- **Clock divider:** made as a clock enable with `DIV = 2`. The real ratio is
  unknown.
- **Decryption source:** the published decryption design reads the cipher
  image from a ROM. Here it reads the encryption side's frame RAM, so that
  encryption and decryption run end to end in one top.
- **Key material:** the coefficients and initial conditions are module
  parameters (constants), not run-time inputs.
- **Not included:** the VGA display and the FPGA output buffers.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. The reference models live in
`tb/chaos_ref_pkg.sv`. They are written separately from the RTL: plain
integer arithmetic for the systems, the mixing table, the logistic map, the
test-image formula, and a `key_model` class that produces the expected key
stream.

| Testbench | What it shows |
|---|---|
| `*_euler_tb` | bit-exact trajectory under a random enable pattern, holding, match to a double-precision Euler run, bounded motion, reset |
| `mixing_rule_tb` | all 256 selection codes |
| `pre_key_generator_tb` | pre-key stream, one-enabled-clock latency, handshake |
| `pre_key_reg_tb`, `otp_xor_tb`, `div_clk_tb`, `frame_ram_tb`, `image_rom_tb` | register, XOR round trip, enable pattern, memory behaviour, the whole ROM image |
| `logistic_map_tb` | bit-exact result and agreement with `3.99·x(1−x)` to 2^-28 |
| `key_generator_tb` | key stream for four settings, three-clock latency, one key per clock at full rate |
| `ctrl_module_tb` | the schedule above, including a 65,536-pixel pass |
| `encryption_process_tb`, `decryption_process_tb` | 256-pixel passes, pass length, repeatability, wrong selections do not decrypt |
| `chaos_cryptosystem_tb` | end to end at 256 pixels for five settings; counts and requires every system feeding `x_n`, every `sw4` code, the port hand-over, divider stalls and an ignored `start` |
| `chaos_cryptosystem_full_tb` | one full run at the default parameters (65,536 pixels): every cipher and recovered pixel, run length, image statistics |
| `key_stream_stats_tb` | 262,144 keys: ENT-style statistics and the NIST frequency and runs tests on the key bits the cipher uses |

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module chaos_cryptosystem_full_tb \
    -Irtl -y rtl -y tb +libext+.sv rtl/chaos_pkg.sv tb/chaos_ref_pkg.sv \
    tb/chaos_cryptosystem_full_tb.sv -o sim
./obj_dir/sim
```

Testbenches without the reference package (for example `div_clk_tb`) need only
`rtl/chaos_pkg.sv` and their own file. Every testbench finishes in seconds.

## Results

From the full-size run, using the synthetic 256 × 256 image:

- The run takes 262,160 clocks, and all 65,536 pixels decrypt exactly.
- Cipher bytes have a mean of 127.56 and a chi-square of 248 (255 degrees of
  freedom).
- The correlation between horizontally adjacent pixels (upper byte) is 0.977
  in the plain image and 0.007 in the cipher image.

From 4 Mbit of key bits 15:0, with `sw1 = 00`, `sw4 = 00` (the pre-key is Lorenz x):

- Entropy is 7.9997 bits per byte, chi-square 216, and mean 127.71.
- The Monte Carlo estimate of π is off by 0.04 %.
- The serial correlation is 0.003.
- The NIST frequency test gives P = 0.75 and the runs test P = 0.68.

These are simulation statistics. They do not replace the full NIST or DIEHARD
batteries, and nothing here is a security claim. In particular, restarting
the key stream from the same state at every pass reuses the pad for every
image encrypted with the same settings.
