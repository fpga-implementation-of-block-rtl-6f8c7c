# BP-DF-MPIC: block parallel decision-feedback interference cancellation for DS-CDMA

In a direct-sequence CDMA uplink, the spreading codes of different users are not
orthogonal. A plain correlating receiver (the Rake detector) therefore sees the
other users' signals as noise: the multiple-access interference. A parallel
interference cancellation (PIC) detector removes that interference in stages.
Each stage estimates the interference from the bit decisions of the previous
stage, subtracts it, and decides again. With decision feedback (DF-MPIC), users
go one at a time. A user then cancels the users before it with decisions
already refined in the same stage. This gives a lower bit error rate. The cost
is a serial dependency, and in hardware a long chain of pipeline registers.

The block parallel variant (BP-DF-MPIC) puts the users in blocks of `U`:

* Users in the same block are processed in parallel.
* Decision feedback is applied only between blocks.
* `U = 1` is DF-MPIC, and `U = K` is plain multistage PIC (MPIC).

The arithmetic is the same for every `U`. Only the registers change, so `U`
trades detection quality against area.

This repository holds synthesizable SystemVerilog for the whole detector. By
default it is sized for 10 users, spreading codes of 32 complex chips, 4
cancellation stages and 16-bit data, with 5 users per block (BP5-DF-MPIC).

## Signal model and what each part computes

For one symbol interval the receiver gets `NC` complex chips:

    r = C H b + n

* `C` (NC x K) holds the users' spreading codes.
* `H` is the diagonal matrix of flat-fading channel coefficients `h_k`.
* `b` holds the users' BPSK bits (+1 or -1).

The detector has three parts (`rtl/bp_df_mpic.sv`):

| part | module | computes |
|---|---|---|
| Rake bank | `rake_bank` | `y_k = conj(h_k) * sum_i conj(c_k(i)) r(i)`, i.e. `y = (CH)^H r` |
| correlation matrix | `corr_matrix` | `R = H^H (C^H C) H`, so that `y = R b + noise` |
| cancellation stages | `ic_stages` | stage 0: `b0 = sign(Re y)`; stage m: `z = y - R0 b`, `b_m = sign(Re z)` |

`R0` is `R` with its diagonal set to zero. The bits are real, so only `Re(y)`
and `Re(R)` affect a decision. The cancellation stages receive only those
real parts. The imaginary parts are still computed, because they are part of
`y` and `R`.

The channel is taken as perfectly known. The coefficients `h_k` are inputs of
the detector, and a channel estimator is not part of this design.

## The cancellation stage: primary and secondary interference

This is the heart of the design (`rtl/mai_stage.sv`). Take stage `m` and user
`k` in block `p` (blocks numbered from 0). The user cancels every other user
`j`:

* If `j` is in an **earlier block** (`j/U < p`), the stage uses `j`'s decision
  from *this* stage, `b_m(j)`. This is the **secondary interference**. It can
  be cancelled only after block `j/U` has been decided.
* If `j` is in the **same or a later block**, the stage uses `b_{m-1}(j)` from
  the previous stage. This is the **primary interference**. It is known as soon
  as the stage starts.

The two kinds are cancelled at different times. This follows directly from the
dependency. One stage is `NB = ceil(K/U)` register steps long:

    step 0:  for all users:     z_k = y_k - sum_{j in blocks >= p, j != k} R_kj b_{m-1}(j)
             block 0 decided:   b_m(k) = sign(z_k)
    step p:  for users of block p:
                                z_k -= sum_{j in blocks < p} R_kj b_m(j)
                                b_m(k) = sign(z_k)

Each step is one clock cycle with a register at its end. A stage therefore
has a latency of `NB` cycles and still accepts a new symbol every cycle. The
pipeline registers carry the partial sums and decisions of all users from step
to step. Their number grows with `NB`, and that is the area price of decision
feedback:

* For `U = K` there is a single step, and there is no secondary interference
  at all.
* For `U = 1` there are `K` steps.

A user's partners in its own block are cancelled with previous-stage decisions
(primary), because their new decisions come from the same step.

Two encodings matter when reading the code:

* A decision bit of 1 means `b = -1`. It is simply the sign bit of `z`, and
  `sign(0) = +1`.
* Multiplying `R_kj` by `b_j` is a conditional negation, so the cancellation
  stages contain no multipliers.

### Stages block

`ic_stages` chains stage 0 and `M` cancellation stages:

* Stage 0 is the registered Rake decision.
* `align_interface` is a shift register with one tap per stage. It gives stage
  `m` the Rake outputs of the symbol it is working on: `1 + (m-1)*NB` cycles
  after they arrived.
* `output_interface` is a registered multiplexer. Its `sel` input picks the
  stage whose estimates leave the detector: 0 for the Rake decisions, up to `M`
  for the last stage. A value above `M` selects stage `M`.

## Number formats

| signal | width | format |
|---|---|---|
| received chips `r`, channel `h` | `DW` = 16 | signed integers on one common scale |
| spreading chip | 2 bits (`mpic_pkg::chip_t`) | `(+-1) + j(+-1)`; a set bit means -1 |
| Rake despread sum | `DW + 2 + log2(NC)` | exact |
| `y`, `R` entries | `QW` = 16 | `floor(full_precision / 2^QSHIFT)`, saturated |
| `z` | `ZW` = 21 | exact, `QW + clog2(K) + 1` |

`y` and `R` leave their full-precision products through the same
shift-and-saturate quantiser (`rtl/quantize.sv`, `QSHIFT = 12`). This keeps
`y` and `R b` on the same scale, so the subtraction stays meaningful.

Pick `QSHIFT` for your signal levels. The testbenches use channel components
of up to ±2^9 and noise of up to ±2^13. With 32-chip codes the
largest diagonal entry `|h|^2 * 64` then stays below about 2^13 after the
shift.

The 2-bit chips keep despreading and the code correlation free of multipliers.
Complex multipliers appear in two places:

* one `conj(h) * s` per user in the Rake bank;
* one `conj(h_k) h_j`, followed by the product with the code correlation, in
  the correlation matrix block.

## Interface and timing of the top (`bp_df_mpic`)

1. **Load.** Drive `code`, `h_re` and `h_im` and pulse `load` for one cycle.
   `corr_matrix` walks through the K*K entries one per cycle in a two-step
   pipeline. `r_ready` drops, then rises `K*K + 2` cycles after the edge that
   samples `load`: 102 cycles for 10 users. Keep the inputs stable until then.
   The channel is block-fading, so reload whenever `h` changes, between bursts
   of symbols.
2. **Stream.** Present one chip per cycle on `r_re`/`r_im` with `chip_valid`.
   Gaps are allowed. A chip counter, cleared by reset, groups every `NC` valid
   chips into one symbol.
3. **Results.** `out_valid` pulses once per symbol, `4 + sel*NB` cycles after
   the symbol's last chip:
   * 2 cycles in the Rake bank (end of accumulation, then the multiply);
   * 1 cycle for stage 0;
   * `NB` cycles per cancellation stage;
   * 1 cycle for the output register.

   `z_out` holds `Re(z)` of the selected stage and `b_out` its decisions. With
   the defaults (`NB = 2`, `sel = 4`) this is 12 cycles.

Throughput is one symbol per `NC` clock cycles, limited by the chip-serial
Rake bank. The stages could take one symbol per cycle.

An assertion flags a symbol that reaches the stages while the correlation
matrix is not ready. A second assertion, in `corr_matrix`, flags a `load`
while a computation is running. Change `sel` only between bursts. A change
while symbols are in flight can drop or repeat results.

## Choosing the block size

`U` is an elaboration-time parameter of `bp_df_mpic`, `ic_stages` and
`mai_stage`. `K` need not be a multiple of `U`: the last block is then smaller.

Generic synthesis of the whole detector (yosys, coarse, register arrays mapped
to flip-flops) gives these register counts:

| users per block `U` | blocks `NB` | flip-flop bits, this RTL | flip-flops, published FPGA design |
|---|---|---|---|
| 10 (MPIC) | 1 | 4706 | 30379 |
| 5 (BP5) | 2 | 6050 | 42644 |
| 2 (BP2) | 5 | 10082 | 60151 |
| 1 (DF-MPIC) | 10 | 16802 | 66767 |

Two things match the published FPGA figures for this architecture:

* The arithmetic stays constant and only registers grow.
* BP5 costs little more than MPIC, while DF-MPIC costs much more.

The growth toward `U = 1` is steeper here, for two reasons:

* This pipeline carries every user's partial sum through every step.
* The published counts include a large fixed part (Rake and correlation
  hardware built differently), which makes their relative growth smaller.

## Where this design makes its own choices

The division into Rake bank, correlation matrix and cancellation stages
follows the published architecture. So do the equations, the
primary/secondary split, the alignment and output interfaces, and the sizes
(10 users, 32 chips, 4 stages, 16-bit words, 5 users per block).

The following are choices of this implementation:

* **Rake detector insides.** A one-finger correlator per user, chip-serial,
  followed by one complex multiply. A flat channel needs only one finger.
* **Code alphabet.** Chips are `±1 ± j`. The architecture asks only for
  complex-valued sequences.
* **Quantisation.** A shared right shift plus saturation. The architecture
  fixes only the 16-bit word size.
* **Correlation matrix organisation.** One entry per cycle. All K*K entries
  are computed, although `R` is Hermitian and its diagonal is unused.
* **Stage pipeline.** Exactly one clock cycle per block, with primary
  cancellation of all users in the first cycle.
* **Handshakes.** Reset, the load/ready handshake, symbol framing by a chip
  counter, and the sign convention for `sign(0)`.

Not included:

* Transmitters, channel and noise. The testbenches generate them.
* A channel estimator.
* The multipath extension mentioned as future work: several Rake fingers,
  with past and present decisions in the cancellation.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs bit for bit with integer models in `tb/tb_ref_pkg.sv`. The
models are written straight from the equations above. For example, the stage
model processes users one by one and picks `b_m(j)` or `b_{m-1}(j)` by block
index, rather than reproducing the pipeline.

| testbench | what it exercises |
|---|---|
| `tb_rake_bank` | random codes, channels and chips, with and without gaps; output saturation; 2-cycle latency |
| `tb_corr_matrix` | five loads, including two identical codes and full-scale coefficients; `K*K+2` latency; busy/ready |
| `tb_mai_stage` | U = 1, 2, 5, 10 side by side; latency `NB`; counts how often a fed-back decision differed from the previous stage |
| `tb_align_interface` | tap delays for NB = 2 and 3 |
| `tb_output_interface` | every `sel` value, including out-of-range ones |
| `tb_ic_stages` | U = 5 and 2 on `y = R b + noise`; every `sel`; latency `2 + sel*NB`; counts Rake errors corrected |
| `tb_bp_df_mpic` | whole detector at default parameters: 10 fading blocks of 40 symbols, every `sel`, channel reloads, latency `4 + sel*NB`, decision feedback and error correction counted |
| `tb_bp_configs` | four full-size detectors (U = 10, 5, 2, 1) on the same chips, Eb/N0 from 0 to 16 dB, 20000 bits per point |

All of them pass. In `tb_bp_df_mpic`, the cancellation stages reduce the bit
errors from 584 (Rake) to 184 (stage 4) out of 4000 bits.

`tb_bp_configs` runs all four configurations on the same received chips. It
uses Rayleigh block fading (complex Gaussian `h_k` of equal mean power, a new
draw every 50 symbols), complex Gaussian noise and 16-bit saturated chips. It
prints bit errors out of 20000 bits per configuration:

| Eb/N0 | Rake | MPIC (U=10) | BP5 | BP2 | DF-MPIC (U=1) |
|---|---|---|---|---|---|
| 0 dB | 3442 | 3073 | 3067 | 3057 | 3055 |
| 4 dB | 2508 | 1642 | 1613 | 1625 | 1625 |
| 8 dB | 1626 | 743 | 740 | 744 | 746 |
| 12 dB | 1522 | 171 | 173 | 177 | 177 |
| 16 dB | 2091 | 101 | 102 | 100 | 100 |

Every configuration removes most of the Rake detector's errors. Without power
control, the Rake detector is MAI-limited: its errors do not fall with Eb/N0,
and the noise level moves them around. The four cancelling configurations stay
within a few percent of one another in this setting.

This testbench does not reproduce the published BER gaps between MPIC, BP5,
BP2 and DF-MPIC (up to 4 dB at a BER of 1e-3). Those gaps come from a
Monte-Carlo study whose channel, code set and power profile are not known
here. The testbench was built to check the hardware bit-exactly across the
four configurations, and it does that for every output bit.

## Simulating

Verilator 5 is enough. From the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/mpic_pkg.sv tb/tb_ref_pkg.sv tb/tb_bp_df_mpic.sv \
        --top-module tb_bp_df_mpic -o sim
    ./obj_dir/sim

Replace `tb_bp_df_mpic` with any other testbench name. Each testbench ends by
printing `TB_RESULT checks=N failures=F`. Lint a module with:

    verilator --lint-only -Wall -Irtl -y rtl rtl/mpic_pkg.sv rtl/bp_df_mpic.sv

The remaining lint warnings are expected:

* Unused package constants.
* The imaginary parts of `y` and `R`, which the stages do not need.
* `rst_n` used both as an asynchronous reset and in `disable iff` of the
  assertions.

## Files

* `rtl/mpic_pkg.sv`: default sizes, the chip type and the block-count function.
* `rtl/bp_df_mpic.sv`: top level.
* `rtl/rake_bank.sv`, `rtl/corr_matrix.sv`, `rtl/quantize.sv`: front end.
* `rtl/ic_stages.sv`, `rtl/mai_stage.sv`, `rtl/align_interface.sv`,
  `rtl/output_interface.sv`: cancellation.
* `tb/`: the testbenches and the reference package.
