# Multidimensional reconciliation sender for CV-QKD

In continuous-variable quantum key distribution the two parties end the
quantum phase holding correlated Gaussian numbers. Alice has X and Bob has
Y = X + noise. Reconciliation turns these into identical bit strings.

In eight-dimensional multidimensional reconciliation:
- Bob draws random bits u.
- For every block of eight Gaussian values he sends Alice a set of rotation coefficients alpha. The coefficients rotate Bob's normalized vector onto the ±1/√8 pattern of u.
- For the whole frame he also sends the syndrome S = H·u of a low-rate LDPC code.

Alice applies the same rotation to her own normalized vector. This gives a noisy copy of u. She then runs a syndrome decoder that finds the string X̂ with H·X̂ᵀ = S closest to that copy.

This repository is the Alice side ("sender") of that scheme as synthesizable SystemVerilog. It has four stages in series:

| stage | module | arithmetic | latency |
|---|---|---|---|
| raw-key normalization x' = X'/‖X'‖ | `rk_norm` | fp32 | 6 clocks |
| data mapping v = M'(alpha)·x' | `data_map` | fp32 | 4 clocks |
| LLR initialization | `llr_init` | fp32 → 8-bit fixed | 3 clocks |
| layered sum-product syndrome decoding, key output | `ldpc_decoder` (+ `node_proc`, `syn_check`) | 8-bit fixed | 3·N_E+1 clocks per iteration |

`mdr_sender` is the top level.

The default sizes are one concrete configuration:
- 160,000-bit frames.
- A quasi-cyclic (QC) MET-LDPC code of rate 0.1.
- A 9,000 × 10,000 base matrix with N_E = 33,375 nonzeros, expanded by Q = 16.
- 16 node processors working in parallel.

## Front end: floating point without IP cores

The front end uses IEEE single precision. The arithmetic is written as plain combinational functions in `fp32_pkg`: multiply, add/subtract, divide, square root and conversion to fixed point. Each pipeline stage is one of these functions between registers.
- Rounding is by truncation.
- Subnormals are flushed to zero.
- NaN is not handled, because the data never produces it.

These functions are far from the fastest form. A real FPGA build would swap them for vendor floating-point cores with the same latencies. The tests compare every result with `real` arithmetic to a relative error of about 1e-5.

`rk_norm` works in six steps:
1. Squares the eight inputs.
2. Sums them in a three-level adder tree (three clocks).
3. Takes the square root.
4. Divides each input, delayed alongside, by that root.

It is one register per operator level, six clocks in all, and it accepts one vector per clock.

## Data mapping: one matrix instead of eight

The rotation is M' = Σ_k alpha_k·A_k, where A_1…A_8 is a fixed family of signed permutation matrices (orthogonal, entries 0 and ±1). Two properties make it cheap:
- At every position (r, c) exactly one member of the family is nonzero.
- That member is A_{(r xor c)+1}.

So M' never needs an addition. Its entry (r, c) is ±alpha_{r⊕c}, with the sign taken from one combined 8×8 sign matrix, `A8_NEG` in `mdr_pkg`. Forming M' is wiring plus sign-bit flips.

The product M'·x' then takes 64 multipliers and eight adder trees: one clock to multiply and three to add. The four-dimensional family (`A4_NEG`) is also provided, for D = 4.

The XOR rule is this design's reading of the family. With it the four-dimensional members come out as the familiar quaternion matrices, and the eight vectors A_k·y' are orthonormal for any unit y', which the rotation needs. `tb_data_map` checks the round trip: with alpha computed on the receiver side as alpha_k = ⟨A_k·y', u'⟩, feeding x' = y' returns v = u'.

## LLR initialization without exp or log

The noisy bit estimate for lane i is v_i·‖X‖. It is seen through the channel noise σ and the known norm ‖Y‖. The log-likelihood ratio ln P(0)/P(1) of two Gaussians centered at ±t·‖Y‖/√d reduces exactly to

    LLR_i = (2t / (√d·σ²)) · ‖X‖ · ‖Y‖ · v_i

so no exponential is needed.

The constant 2t/(√d·σ²) changes only with the channel estimate. It is a run-time input, `llr_scale`, given in fp32. `llr_init` forms ‖X‖·‖Y‖ once per vector, multiplies it into every lane, and converts the result to W = 8 bits with 3 fraction bits (range ±15.875, saturating).

## The decoder

### Code storage and parallelism

Every nonzero of the base matrix is a Q × Q cyclically shifted identity. Base entry (row j, column c, shift s) joins check j·Q+l to bit c·Q+((l+s) mod Q). The Q checks of one base row never share a bit, so Q lanes update them together. One memory word holds the Q values of one base column, so one access per clock feeds all lanes. A barrel rotation by s lines the word up with the lanes, and the reverse rotation puts it back.

`MEM_Matrix` holds only a column number and a shift per nonzero, row by row. There are no row numbers and no row lengths. Within a row the columns are stored in increasing order, so a row ends where the next stored column is smaller than the current one. The loader must keep that property: the first column of a row must be below the last column of the row before.

The other memories are:
- `MEM_LLR`: NB words of Q LLRs.
- `MEM_Mji`: N_E words of Q check-to-bit messages E_ji, kept between iterations.
- `MEM_Syn`: MB words of Q syndrome bits.
- A row buffer: DMAX words holding the M_ji of the row in progress.

### Layered schedule

For each base row the decoder makes two passes, one entry per clock:

- **Pass A.** M_ji = LLR_i − E_ji(old) goes into the row buffer. Each lane adds Ψ(|M_ji|) to a row sum and XORs the sign into a sign product.
- **Pass B.** For each entry the lane removes its own contribution from the sum and the sign and forms E_ji = (−1)^(s_j ⊕ signs)·Ψ(sum − Ψ(|M_ji|)). It writes E_ji to `MEM_Mji` and LLR_i = M_ji + E_ji back to `MEM_LLR`.

Here Ψ(x) = −ln tanh(x/2), and s_j is the syndrome bit of the check. A 1 flips the sign of every message the check sends, which turns ordinary decoding into decoding to the coset H·x = S.

The LLRs are updated row by row (layered decoding). So later rows of the same iteration already see the improved values, and far fewer iterations are needed than with flooding.

After all rows, a **check sweep** (`syn_check`) goes over every entry once more. It slices the LLRs (negative → 1) and compares each row's parity with S. Decoding stops when every row matches or after MAX_ITER = 100 iterations. Then **Gen_Key** streams the hard decisions out, Q bits per clock, one base column per clock.

Cycle count per frame:

    load  NB·Q/D           = 20,000 clocks
    iter  3·N_E + 1        = 100,126 clocks each
    out   NB               = 10,000 clocks

The front end is held (`in_ready` low) from the end of a frame's load until its key is out, because there is one `MEM_LLR`. At 100 MHz and 50 iterations this gives about 3.2 Mbit/s of key per frame.

### Ψ in eight bits

Ψ is done by two tables computed at elaboration from the formula, using `$exp`/`$ln` in constant functions. No data files are involved.
- **Forward table**: 128 entries, message magnitude → Ψ.
- **Reverse table**: 2048 entries, Ψ sum → message.

Two details matter; without them the quantized decoder diverges:

1. **Extra fraction bits.** The Ψ domain carries PXF = 4 more fraction bits than the messages. Ψ of a large message is tiny. Rounded to the message grid it becomes 0, and a row sum of 0 would send back a message of full certainty.
2. **Reverse Ψ(0).** An index of 0 in the reverse table only says "all other messages are large". It is evaluated at half a step (≈ 6.2), not at the saturation value.

`tb_code_pkg` holds a bit-exact model of the same arithmetic. `tb_ldpc_decoder` compares every LLR and key bit of the RTL against it.

## Interface (`mdr_sender`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `llr_scale` | in | fp32 2t/(√d·σ²) |
| `in_valid`, `in_ready` | in/out | one vector per clock; exactly NB·Q/D vectors make a frame |
| `in_x[D]`, `in_alpha[D]`, `in_ynorm` | in | Alice's raw values; Bob's alpha and ‖Y‖ (fp32) |
| `mat_we`, `mat_addr`, `mat_col`, `mat_shift` | in | write port of `MEM_Matrix` (entry index, base column, circulant shift) |
| `syn_we`, `syn_addr`, `syn_data` | in | write port of `MEM_Syn` (base row, Q syndrome bits; bit l is check row·Q+l) |
| `key_valid`, `key_addr`, `key_data`, `key_last` | out | corrected key: base column and its Q bits (bit l is code bit col·Q+l) |
| `key_ok`, `key_iters` | out | syndrome matched; iterations used (valid while `key_valid`) |

How to use it:
- Load the matrix once.
- Write a frame's syndrome before the frame's last vector is accepted.
- Keep `llr_scale` constant while a frame's vectors are in the front end (about 13 clocks after the last one).
- Leave `MEM_Mji` as it is; it needs no clearing, because the first iteration reads its messages as zero.
- Each base row must hold at most DMAX = 64 entries. An assertion flags a longer one.

Parameters:
- `D`, `Q`, `NB`, `MB`, `NE`, `MAX_ITER`.
- `DMAX`, the largest base-row degree.
- `W` and `FRAC`, the LLR format.
- `PXF`, inside `node_proc`.

## Where the design stops short, and own choices

- **Throughput.** One iteration costs 3·N_E + 1 clocks. The two passes of a row and the check sweep are not overlapped. A schedule near N_E clocks per iteration is needed for about 9.6 Mbit/s at 100 MHz and 50 iterations.
- **Pipelining.** There is no second `MEM_LLR` to load frame n+1 while frame n decodes, so the front end idles during decoding.
- **LLR initialization.** The Gaussian densities are never evaluated; the closed-form product above replaces them. This uses two multipliers per lane instead of a density calculation with divisions and an exponential, and it gives the same value up to fp32 rounding.
- **Memories.** Memories are plain arrays with asynchronous reads. On an FPGA they map to distributed RAM, or need a registered-read version of the schedule.
- **Choices of this design:**
  - The 8-bit LLR format and the Ψ tables.
  - MAX_ITER = 100 and DMAX = 64.
  - The decision polarity: LLR < 0 → 1, consistent with LLR = ln P(0)/P(1).
  - The syndrome sign factor (1 − 2s_j).
  - The valid/ready handshake and the key stream format.
- **Not in the hardware:**
  - The check matrix itself, which is loaded through the port.
  - Bob's side (random bits, alpha, syndrome), which the testbenches model in `real` arithmetic.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. All of them use verilator 5. The packages must come first on the command line:

    RTL="rtl/fp32_pkg.sv rtl/mdr_pkg.sv rtl/rk_norm.sv rtl/data_map.sv rtl/llr_init.sv \
         rtl/node_proc.sv rtl/syn_check.sv rtl/ldpc_decoder.sv rtl/mdr_sender.sv"
    verilator --binary -j 0 --timing -Wno-fatal --top-module tb_mdr_sender \
         $RTL tb/tb_fp_pkg.sv tb/tb_code_pkg.sv tb/tb_mdr_sender.sv
    ./obj_dir/Vtb_mdr_sender

| testbench | what it checks | checks |
|---|---|---|
| `tb_rk_norm` | 2000 random vectors vs `real`, latency 6 | 2001 |
| `tb_data_map` | receiver round trip v = u'; v vs `real` for random inputs, latency 4 | 1801 |
| `tb_llr_init` | LLR vs the Gaussian log-ratio, saturation, latency 3 | 2702 |
| `tb_node_proc` | random rows vs a direct evaluation of the update | 8655 |
| `tb_syn_check` | random rows and syndromes, sticky flag | 300 |
| `tb_ldpc_decoder` | every LLR and key bit vs the bit-exact model, 3·N_E+1 clocks per iteration; frames that stop after one iteration, after several, and at MAX_ITER | 24439 |
| `tb_mdr_sender` | whole chain at Q=8, 40×36 base matrix: 8 frames over four noise levels; counts stalls, one-iteration, multi-iteration and MAX_ITER frames | 2579 |
| `tb_mdr_sender_full` | default sizes, no parameter overrides: two 160,000-bit frames (σ 0.3 decodes in 2 iterations; σ 0.9 runs to 100) | 320008 |

The full-size run takes about a minute of simulation. Its base matrix is random, so the decoding figures say nothing about a designed MET-LDPC code near capacity. They show only that the hardware handles a frame of that size correctly.
