# Non-binary LDPC decoder (FFT-SPA) with replicated cores

This is a decoder for non-binary LDPC codes over GF(2^m). Each code symbol is one of q = 2^m
field elements, so every message on the Tanner graph is a probability mass function (pmf) of
q entries, not a single LLR. The decoder uses the FFT-based sum-product algorithm (FFT-SPA):

- Variable nodes multiply pmfs element by element.
- Edges permute each pmf by the edge's GF coefficient.
- Check nodes work in the Walsh-Hadamard domain. There the convolution of d_c − 1 pmfs over
  GF(2^m) becomes an element-wise product.

The design idea is to keep one decoder small and simple, then replicate it. Each decoder core
keeps every message of one codeword in its own on-chip arrays. It copies a frame in from DRAM
with one burst, runs all iterations locally, and copies the result out with one burst. DRAM is
therefore busy only at the start and end of a job. Many cores (14 for GF(4)) can share the two
memory channels in turn while the others compute. Inside a core, each array is split into q
dual-port banks, one bank per field element. A kernel can then read and write a whole pmf
every clock, and every kernel is a pipeline that handles one pmf (one edge) per clock.

The default build is the main configuration:

| Item | Value |
|---|---|
| Field | GF(4) |
| Code | rate 1/3, N = 384 symbols, regular with d_v = 2, d_c = 3 (E = 768 edges, 256 check nodes) |
| Iterations | 10 |
| Cores | K = 14 |

## One iteration, kernel by kernel

A core holds three arrays of pmfs:

| Array | Rows | Holds |
|---|---|---|
| `l_mv` | N | Channel pmfs p(c_v = x \| y_v). After decoding, the a-posteriori pmfs m_v*. |
| `l_mvc` | E | Variable-to-check messages. |
| `l_mcv` | E | Check-to-variable messages. |

Edge rows are in *variable-node order*: edges `DV*v .. DV*v+DV-1` belong to variable node v.
Check nodes reach their edges through a socket table (see "The parity-check matrix").

One iteration runs six kernels, one after another:

| Phase | Kernel | Reads → writes | What it computes |
|---|---|---|---|
| VN | `vn_proc` | l_mv, l_mcv → l_mvc | m_vc(e) = m_v · ∏ m_cv over the node's *other* edges, normalised to sum 1 |
| PERM | `permute` | l_mvc → l_mvc | out[h·x] = in[x], h = coefficient of the edge |
| FWHT_VC | `fwht` (forward) | l_mvc → l_mvc | Walsh-Hadamard transform |
| CN | `cn_proc` | l_mvc → l_mcv | for each socket: ∏ of the other d_c − 1 transformed messages, divided by its z = 0 term |
| FWHT_CV | `fwht` (inverse) | l_mcv → l_mcv | inverse transform, scaled by 1/q |
| DEPERM | `depermute` | l_mcv → l_mcv | out[x] = in[h·x] |

After the last iteration an APP phase runs `vn_proc` once more in a-posteriori mode. It forms
m_v* = m_v · ∏ of all d_v messages, normalised, and writes it over `l_mv`. The epilogue then
streams `l_mv` to the output memory. Hard decisions (the argmax of each m_v*) are left to the
consumer. There is no early stop on a satisfied syndrome: the core always runs `ITERS`
iterations.

Permute, the transforms and depermute work in place. Each reads a row on port 0 and writes
it three clocks later on port 1 of the same array. The port multiplexers in `decoder_core`
give both ports of every array to the kernel of the current phase. An assertion checks that
only one kernel is busy at a time.

### Arithmetic

Messages are signed Q8.7 (8 bits, range −1 … 127/128). Products, sums and transform
butterflies are formed in signed Q16.13. Every conversion rounds half away from zero and
saturates. The helpers are in `nbldpc_pkg` (`acc_mul`, `acc_to_msg`, `fx_ratio`).

Probabilities in 8 bits underflow quickly when multiplied, so the kernels renormalise:

- **vn_proc** divides each output pmf by its sum, so that the entries sum to 1 (128 in Q8.7).
  - Negative entries, left by rounding in the inverse transform, count as 0.
  - A pmf whose sum is 0 becomes uniform (q entries of 1/q).
- **cn_proc** divides every product by its z = 0 term.
  - That term is the sum of the pmf, so the result has DC component 1.0. This saturates to
    127/128.
  - If the z = 0 term is not positive, the output is the transform of a uniform pmf
    (1.0, 0, …, 0).
- **Forward fwht** saturates after each butterfly stage.
- **Inverse fwht** halves after each stage (an arithmetic shift with rounding), giving the
  1/q factor without a divider.

`vn_proc` excludes the target edge by multiplying the *other* messages. It does not divide
the a-posteriori product by m_cv. This is equivalent for nonzero messages and avoids dividing
by a message that rounded to zero.

### GF(2^m) and the permutation convention

Field elements are bit vectors in the polynomial basis. Index x of a pmf is the element
whose bit i is the coefficient of α^i. With this basis, addition in the field is XOR, which is
exactly the index structure the Walsh-Hadamard butterflies use. No log/antilog reordering is
needed between permutation and transform.

The primitive polynomials are x²+x+1, x³+x+1 and x⁴+x+1, for m = 2, 3, 4 (`gf_poly`). The
permute kernel moves the probability of x to position h·x: it gives the pmf of the product
h·c. Depermute reverses this. Both are crossbars built at elaboration time. They switch on
h, which is looked up per edge.

## Local arrays and banking

`pmf_ram` partitions a flat array of pmf entries cyclically by q. Entry i goes to bank
i mod q, address ⌊i/q⌋. Since a pmf is q consecutive entries, row r of the array is address r
in every bank. A whole pmf is one read or write of all banks at once.

Each bank (`bram_bank`) is a true dual-port RAM with these properties:

- synchronous read, 1-cycle latency;
- read-first: a read and a write of the same address return the old data;
- on a write–write collision, port 1 wins.

So each array offers two pmf-wide ports, 2·q element ports in all. At the defaults a core
stores 1920 pmfs of 32 bits:

| Array | Size |
|---|---|
| `l_mv` | 384 × 32 |
| `l_mvc` | 768 × 32 |
| `l_mcv` | 768 × 32 |

## Timing

Every streaming kernel accepts one row per clock, and its pipeline is 3 clocks deep. A kernel over E
rows is done E + 3 clocks after its start pulse (N + 3 for the a-posteriori pass). `decoder_ctrl` adds one clock per phase
change.

`cn_proc` reads the d_c messages of a check node two per clock (two ports of `l_mvc`), and it
writes the d_c results two per clock. So it starts a new check node every ⌈d_c/2⌉ clocks, and it is done (E/d_c)·⌈d_c/2⌉ + ⌈d_c/2⌉ + 2 clocks after its start.

| Quantity | Formula | Defaults |
|---|---|---|
| Iteration | 5·(E + 4) + (E/d_c)·⌈d_c/2⌉ + 5 clocks | 4,377 |
| Decoding, first VN to epilogue start | ITERS·iteration + N + 4 | 44,158 |
| Job, one core alone | decoding + 2E + N (prologue) + N (epilogue) + handshakes | ≈ 46.5 k |

At 250 MHz, 256 information bits in about 46.5 k clocks is about 1.4 Mbit/s per core.

## System: replicated cores and two DRAM channels

`nbldpc_system` instantiates K `decoder_core`s and two `burst_arbiter`s.

| Channel | Carries | Frame layout, one pmf per word |
|---|---|---|
| Input (read) | Each core's frame, at `rd_base[i]` | m_cv (E words), m_vc (E words), m_v (N words) |
| Output (write) | m_v*, at `wr_base[i]` | N words |

A word is q·8 bits, with element x in bits [8x+7:8x].

Channel signalling:

- **Read**: a valid/ready request carries address and length. The data beats then arrive with
  `rd_data_valid`. The core always accepts them; there is no back-pressure.
- **Write**: a valid/ready request, then the data beats with `wr_data_valid`/`wr_data_ready`.
  The core keeps a two-entry buffer so that `wr_data_ready` can stall the stream at any beat.

Each arbiter grants the channel round-robin and holds it for a whole burst. It counts beats
against the granted length, then releases the channel. A core that has to wait simply stalls
in its prologue or epilogue. The memory controllers are not part of this RTL. Connect their
user-side ports to the top's `rd_*`/`wr_*` ports.

Per-core control:

- `start[i]` (a one-clock pulse) begins a job.
- `busy[i]` is high while the job runs.
- `done[i]` pulses once the last m_v* word has been accepted.

## The parity-check matrix

`code_rom` describes H. It has two lookups, each with two ports:

- **Socket → edge**: check node c owns sockets `DC*c .. DC*c+DC-1`. Each socket names the
  edge (VN-order row) it connects to.
- **Edge → coefficient**: the GF element h of the edge.

Two codes can be selected with `CODE`:

- **`CODE_GEN`** (default): a regular (d_v, d_c) code with these tables:
  - socket (A·e) mod E holds edge e, where A is the smallest integer ≥ d_c + 2 that is
    coprime to E;
  - edge e has coefficient α^(e mod (q−1)).

  The tables are built by constant functions at elaboration, so N, d_v and d_c can be
  changed freely. This is a stand-in for a designed code of the same size and degrees; the
  decoder does not depend on the choice. For a specific code, replace the two constant
  functions.
- **`CODE_EQ1`**: a small 3 × 6 example over GF(4) with d_v = 2 and d_c = 4 (N = 6). The
  decoder-level tests use it.

## Where this differs from the reference HLS design

The structure follows the HLS decoder it is modelled on:

- the six kernels and their order;
- the arrays partitioned by 2^m;
- one burst in and one burst out per job;
- two DRAMs;
- K = 14 / 6 / 3 cores for m = 2 / 3 / 4.

The following points are this design's own:

- **Permute/depermute at one pmf per clock.** In the reference, these loops have an
  initiation interval that grows with m. Here they are crossbars at II = 1.
- **Decode latency.** The reference's best configuration reports about 16 k clocks for the
  kernels at GF(4). This RTL takes about 44 k clocks for 10 iterations, because its kernels
  run strictly one after another over all E edges. Overlapping the kernels would need a
  dependency analysis that is not attempted here.
- **Additions.** The APP phase, the normalisation in `vn_proc` and the guard for a
  non-positive z = 0 term are additions.
- **Own choices of details the reference leaves open:**
  - the rounding mode and the inverse-transform scaling;
  - the DRAM word format and frame layout;
  - the channel handshakes and the arbitration policy;
  - synchronous active-low reset;
  - the generated code.
- **Out of scope.** The memory controllers, the host that prepares the channel pmfs, and the
  clock/reset circuitry are not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The models the testbenches compare
against are written independently of the RTL:

- `tb_ref_pkg`: GF arithmetic built from an LFSR log table, and a real-number model of the
  Q formats;
- `dram_model`: a behavioural two-channel memory with random request latency, gaps between
  read beats and write stalls.

| Testbench | What it shows |
|---|---|
| `tb_bram_bank`, `tb_pmf_ram` | read-first behaviour, collisions, bank mapping |
| `tb_code_rom` | the example matrix entry by entry; for the generated code: sockets map one-to-one to edges, no check node joins two edges of one variable node, all coefficients nonzero |
| `tb_vn_proc`, `tb_cn_proc`, `tb_fwht`, `tb_permute`, `tb_depermute` | every output row against the reference model; the exact clock count of each pass (E + 3, N + 3 for the a-posteriori pass, (E/d_c)·2 + 4 for `cn_proc`) |
| `tb_decoder_ctrl` | phase order, iteration count, one kernel start per phase |
| `tb_burst_dma` | frame layout, prologue and epilogue under random gaps and stalls |
| `tb_burst_arbiter` | round-robin order, whole-burst lock, no lost or duplicated beats |
| `tb_decoder_core` | noisy codewords of the example code decoded; each m_v* and final m_cv sums to about 1; the clock count of every phase |
| `tb_nbldpc_system` | K = 3 cores, 6 jobs on the example code. It counts read waits, write waits, read gaps, write stalls and corrected frames, and fails if any of these never happened. |
| `tb_nbldpc_full` | the top at its default parameters: 14 cores, each decoding one noisy frame of the N = 384 GF(4) code (about 190 symbol errors in all); all symbols decoded correctly; core 0 decoding time checked to be exactly 44,158 clocks |

| `tb_nbldpc_fields` | the same code and iteration count over GF(8) (2 cores) and GF(16) (1 core), through `tb_nbldpc_field_run`: all symbols decoded correctly, same 44,158-clock decoding time |

The full-size test and the larger-field test each run in well under a minute with Verilator.

## Simulating and changing it

Compile the packages first, then the RTL, the memory model and one testbench, for example:

```
verilator --binary --timing --assert --top-module tb_nbldpc_full \
  rtl/nbldpc_pkg.sv tb/tb_ref_pkg.sv rtl/bram_bank.sv rtl/pmf_ram.sv rtl/code_rom.sv \
  rtl/vn_proc.sv rtl/cn_proc.sv rtl/fwht.sv rtl/permute.sv rtl/depermute.sv \
  rtl/decoder_ctrl.sv rtl/burst_dma.sv rtl/burst_arbiter.sv rtl/decoder_core.sv \
  rtl/nbldpc_system.sv tb/dram_model.sv tb/tb_nbldpc_full.sv
./obj_dir/Vtb_nbldpc_full
```

Block testbenches need only the files of their block. `tb_nbldpc_fields` also needs
`tb/tb_nbldpc_field_run.sv`.

Top parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `GF_M` | 2 | field GF(2^m); 3 and 4 give 64- and 128-bit pmf words |
| `N`, `DV`, `DC` | 384, 2, 3 | code size and degrees. `vn_proc` supports DV ≤ 2, because it reads all of a node's messages in one clock from the two ports of `l_mcv`. |
| `ITERS` | 10 | iterations per job |
| `K` | 14 | number of cores |
| `CODE` | `CODE_GEN` | parity-check description |
| `DRAM_AW`, `LEN_W` | 32, 16 | address and burst-length widths |

To use another code, edit the two constant functions in `code_rom`. To add early
termination, `decoder_ctrl` would need a syndrome flag from an extra pass over the hard
decisions.
