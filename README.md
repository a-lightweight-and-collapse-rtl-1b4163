# OFSR-PUF: a strong PUF from a handful of weak cells, without collapse responses

A *strong* physical unclonable function (PUF) answers a huge number of challenges, which
normally forces the verifier to store on the order of a million challenge-response pairs per
device. The OFSR-PUF (obfuscation-feedback-shift-register PUF) avoids that by building the
strong PUF out of a few *weak* entropy-source (ES) cells placed in the feedback of a shift
register. The verifier only needs to know which cell/challenge combinations are reliable — a
table that grows linearly with the number of cells — and the device itself hides the
unreliable ones.

A plain LFSR-style construction has a flaw: the response bits are simply the next challenge
bits, so one recorded challenge-response pair gives away the answers to every challenge that is
a window of it (a *collapse response*). This design adds a nonlinear obfuscation layer that
flips a data-dependent set of register bits each loop, so the register contents stop being a
copy of the response.

This repository holds synthesizable SystemVerilog for the whole PUF datapath and its control,
with the ES cells emulated as look-up tables, plus self-checking testbenches.

## How one evaluation works

The challenge register holds n bits (default n = 32). There are m = n/4 ES cells (default 8).
An evaluation is one *init loop* that loads the challenge, then K *feedback loops* (default
K = 32), one clock cycle each. In loop k:

1. **ES layer.** Cell l reads register bits 4l .. 4l+3 (four consecutive bits, first bit as
   the most significant) and outputs O[l] = its table entry for that 4-bit value.
2. **Reliability mask (ESS).** The same four bits pick one bit S[l] of the cell's 16-bit
   mask row. S[l] = 0 marks that cell/challenge pair as unreliable.
3. **AND layer.** t[l] = O[l] & S[l]: unreliable outputs are forced to 0.
4. **XOR layer.** FB = t[1] ^ ... ^ t[m]. FB is response bit Re[k] and the bit shifted into
   the register.
5. **Obfuscation layer.** From t it forms H index numbers of log2(n) bits (default H = 8,
   5-bit indices). Index h is the cyclic window t[h], t[h+1], ... (positions modulo m). The
   indices are decoded into an n-bit vector sel; every selected register bit is XORed with
   FB.
6. **Input layer.** The register takes `{FB, (q ^ (sel & FB))[n-1:1]}`: obfuscate, then
   shift one place with FB entering as the newest bit.

Because ES outputs are forced to zero where masked, the parity is slightly biased toward 0,
but XORing many cells keeps the bias negligible (the piling-up lemma).

### Why obfuscation removes the collapse response

With H = 0 the register after loop j holds challenge positions j+1 .. j+n, and those are
exactly the last n response bits: a response is just a continuation of the challenge, and the
attacker can predict the PUF's answer to any of its windows. Each loop of obfuscation flips
about half of the H selected bits (each is flipped when FB = 1), so the register no longer
matches the response sequence. For n = 32, the fraction of bits in which the register window
differs from the corresponding response bits, measured by `tb/obfuscation_hd_tb.sv`
(60 instances × 5 challenges × 32 offsets):

| H  | measured distance | estimate H/(2(H+1)) |
|----|-------------------|---------------------|
| 0  | 0.000 (exactly)   | 0                   |
| 6  | 0.378             | 0.43                |
| 8  | 0.407             | 0.44                |
| 16 | 0.407             | 0.47                |

The measured values sit below the estimate because indices often coincide (several windows
decode to the same bit) and masked cells bias t toward zero. With 8 cells there are only 8
distinct cyclic windows, so H = 16 decodes the same indices as H = 8; see *Departures*.

## Reliability: mask plus voting

The mask is produced at enrollment by characterising each cell over temperature and voltage
(outside this design) and written row by row through the mask port. After that the device
screens its own challenges: no verifier has to compute reliable challenges.

Cells that survive the mask still flip occasionally, and one wrong FB corrupts every later
bit of the response because it enters the register. The optional triple-majority-vote stage
(`tmv`) evaluates the same challenge three times and takes the bitwise majority.
`tb/puf_quality_tb.sv` inverts each cell output at random with probability 0.26 % per loop and
measures, for 24 instances × 6 challenges × 20 repetitions:

| response bits | bit error rate, single | bit error rate, voted |
|---------------|------------------------|-----------------------|
| 1             | 2.1 %                  | 0.07 %                |
| 8             | 4.7 %                  | 0.80 %                |
| 16            | 8.0 %                  | 2.0 %                 |
| 32            | 13.2 %                 | 5.6 %                 |

The same run gives uniformity 0.509 and uniqueness 0.499 (ideal 0.5 for both). Note the
noise model: 0.26 % per *cell* per loop, so an 8-cell parity sees roughly eight times that per
feedback bit.

## Modules

| module | role |
|---|---|
| `ofsr_pkg` | default sizes, `lut_row_t`, `maj3` |
| `input_layer` | n-bit challenge register: load, obfuscation XOR, shift |
| `es_cell` | one ES cell as a 16-entry table, with a noise-flip input |
| `es_layer` | m cells, each reading four consecutive register bits |
| `mask_matrix` | m × 16 reliability mask with row write port; selects S[l] |
| `and_layer` | t = O & S |
| `xor_layer` | FB = parity of t |
| `obfuscation_layer` | H cyclic windows → decoder → sel; R per loop |
| `ofsr_ctrl` | init loop + K loops, collects the response |
| `ofsr_puf` | the PUF core: all of the above |
| `tmv` | issues 1 or 3 evaluations and votes |
| `ofsr_top` | `tmv` in front of `ofsr_puf` |

Parameters (top and core): `N` challenge length (32, must be a multiple of 4), `H` number of
obfuscation indices (8; 0 gives the linear PUF), `K` response length (32). M = N/4 follows. The
32-cell variant is `N = 128, H = 32`.

## Interface and timing of `ofsr_top`

- `start` (one cycle) with `chal` and `tmv_en` valid. The challenge is latched.
- `done` pulses when `resp` is ready; `resp[k-1]` is response bit k. `resp` holds until the
  next request.
- Latency: K+4 cycles from `start` to `done` for a single evaluation (36 by default),
  3(K+3)+1 cycles with voting (106 by default). `busy` is high in between; `evals` counts
  the core evaluations of the current request.
- `es_lut[l]` is cell l's 16-entry table; `lut[c]` answers 4-bit challenge c. This is the
  device's fingerprint. In silicon it comes from process variation; in an FPGA emulation it
  is a random constant per instance.
- `es_flip[l]` inverts cell l's output. Tie it to 0 in a real build; it exists to inject
  noise in simulation.
- `mask_we`, `mask_addr`, `mask_wdata` write mask row `mask_addr` (bit c = 1 means challenge
  c of that cell is reliable). Reset sets every bit to 1. Do not write during an evaluation.
- Reset is synchronous and active low.

## Departures and own choices

What is fixed by the design description: the five layers and their order, four challenge bits
per cell, the mask indexed by the same four bits, FB as the parity of masked outputs, FB as
both response bit and shift-in bit, indices as cyclic log2(n)-bit windows of t, the decoder,
the init loop followed by K loops, and majority voting to improve reliability.

This implementation's own choices:

- **One loop per clock**, with the obfuscation XOR and the shift in the same edge. The
  description sequences them (obfuscate, then shift); the result is the same.
- **Bit orders:** a cell's first challenge bit is the MSB of its table index; t[h] is the MSB
  of index h; index value v selects register bit v (challenge position v+1).
- **H larger than m:** windows repeat, so H = 16 on 8 cells equals H = 8. The evaluation of
  the original design reports a distinct, larger effect for H = 16 on 8 cells, so it must form
  the extra indices in a way not specified; that behaviour is not reproduced.
- **Mask size:** 16 bits per cell (128 bits for 8 cells). A storage figure of 256 bits for 8
  cells is also quoted for the design, twice this; the per-cell 16-bit row was followed.
- **Voting** is over three complete responses, sequenced on chip by `tmv`. How the original
  votes is not specified.
- **Cells are tables.** The silicon ES cell (a configurable cross-coupled inverter pair) is
  analog and not part of this RTL; `es_cell` reproduces its logic function as in an FPGA
  emulation. Enrollment (finding the unreliable entries) is also outside the design.
- Handshake, latencies, reset values (mask all ones) and the write port are this design's.

## Testbenches

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog. `tb/ofsr_model_pkg.sv` is an
independent reference model (1-based arrays, written from the algorithm) used by the core and
top tests.

- `ofsr_puf_tb`: 40 instances × 10 challenges against the model, response, final register
  window and K+2 latency.
- `ofsr_top_tb`: end-to-end at default parameters. Single, noisy and voted evaluations; counts
  mask shielding, obfuscation flips, noise corrupting a response, the vote repairing it, and
  response ≠ final window, and fails if any never happened.
- `ofsr_puf_32cell_tb`: the 32-cell core (N = 128, H = 32) against the model.
- `obfuscation_hd_tb`: the table above (four cores with H = 0, 6, 8, 16, K = 63).
- `puf_quality_tb`: uniformity, uniqueness and bit error rates above.

Run one with Verilator, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/ofsr_pkg.sv tb/ofsr_model_pkg.sv tb/ofsr_top_tb.sv --top-module ofsr_top_tb
./obj_dir/Vofsr_top_tb
```

All testbenches finish in seconds.
