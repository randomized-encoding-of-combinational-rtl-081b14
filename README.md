# Randomized dual-rail encoding against data-leaking hardware Trojans

A chip built at an untrusted foundry may carry a hidden circuit that copies
secret values (a key, plaintext) off the chip. The defence in this RTL does
not try to find such a circuit. It makes sure that nothing the untrusted
part of the chip ever sees is the real data.

Each secret bit `x` is replaced by `t = x ^ r`, where `r` is a random bit.
Only `t` enters the untrusted logic. `r` stays in a small trusted part of the
chip. An observer of the untrusted logic therefore sees values that are
independent of `x`. The logic still has to compute `f(x)` from `t` alone. The
trick is to build several copies of `f`, one per possible value of the random
bits, each with the right inputs and outputs inverted. The trusted part then
picks the copy that matches the current random bits and removes `r` from the
result.

The repository holds four variants of this idea:

| Scheme | Protected circuit | Random bits | Copies of the logic | Latency |
|---|---|---|---|---|
| Combinational (`record_sbox`) | AES S-box | 1, `r` | 2 | combinational |
| Sequential (`seq_record_des`) | DES, 16 rounds | 2, `r1` and `r2`, new every clock | 4 | 17 clocks, as unprotected |
| Time-division (`tdm_record_des`) | DES | 2, new every 5 clocks (optionally 3, every 9) | 1, used 4 (or 8) times | 90 (or 162) clocks |
| Off-the-shelf chip (`cots_record_ctrl`) | external DES chip | 2 per operation (Trivium) | the chip, run 4 times | 4(L+1)+2 clocks |

`record_top` instantiates all four side by side.

## Encoding arithmetic

A dual-rail pair `(t, r)` holds the value `x = t ^ r`. So 0 is `00` or
`11`, and 1 is `01` or `10`. Only the `t` rail leaves the trusted part.

**One random bit.** Suppose `f` is evaluated on `t` instead of `x`:

* If `r = 0`, then `t = x` and `f(t) = f(x)`.
* If `r = 1`, then `t = ~x`, so `f(~t)` gives `f(x)`.

Either way, the trusted part must know `r` to choose, and it must not send
`f(x)` back in the clear. The untrusted core computes

* `F  = f(t)`
* `F' = ~f(t ^ M)`, where `M` marks the inputs that are encoded.

The trusted part selects `g = r ? F' : F`, which equals `f(x) ^ r`, and
outputs `y = g ^ r = f(x)`. Inputs outside `M` pass unencoded. An 8-input
function therefore has 256 possible choices of `M`.

**Two random bits.** Each input bit is tied to either `r1` or `r2`
(parameter `REF2`: bit set means `r2`). Then `t_i = x_i ^ r1` or
`x_i ^ r2`. The untrusted logic holds four copies. Copy `v = {v1, v0}`:

* inverts the `r1`-tied inputs when `v1 = 1`;
* inverts the `r2`-tied inputs when `v0 = 1`;
* inverts its outputs when `v1 = 1`.

| `{r1,r2}` | copy | inputs inverted | output inverted | copy output equals |
|---|---|---|---|---|
| 00 | 1 | none | no | `f(x)` |
| 01 | 2 | `r2`-tied | no | `f(x)` |
| 10 | 3 | `r1`-tied | yes | `~f(x)` |
| 11 | 4 | all | yes | `~f(x)` |

In every row the selected copy gives `f(x) ^ r1`. The result is therefore
"referred to `r1`". A 4:1 mux with select `{r1, r2}` (r1 the MSB) picks the
copy. Each copy computes on the true `x` only in its own row; in the other
rows its input is partly inverted. Someone watching the untrusted logic
sees four results and does not know which one the mux takes.

## Sequential scheme: keeping registers encoded while the random bits move

This is the subtle part. In a sequential circuit the registers hold values
from one clock to the next. If the random bit were held constant, an
attacker could watch many clocks and infer it. Here `r1` and `r2` are
redrawn on **every** clock, which means a stored value must be re-encoded
before it is used again.

The design is split into two tiers (`seq_record_upper` and
`seq_record_lower`), intended to be joined face to face by through-silicon
vias:

* **Lower, untrusted tier.** Four copies of the circuit's combinational
  logic (`des_logic`). It contains no registers and never sees `r1` or `r2`.
* **Upper, trusted tier.** Both random generators, the input XORs, and one
  *register block* (`seq_record_regblock`) per state bit. It also holds the
  output mux and the decode.

One register block, per clock:

```
             f[0..3]  (bit from each lower-tier copy)
                |
      4:1 mux, select {r1(t), r2(t)}   -> DIN = next_state ^ r1(t)
                |
           flip-flop q
                |
   g = q ^ r1(t-1) ^ rk(t)       rk = r1, or r2 when USE_R2 = 1
                |
        g and ~g to the lower tier
```

Why the re-index step is needed:

* The flip-flop stores the state bit referred to the **old** `r1`.
* XOR with `r1(t-1)` removes the old encoding.
* XOR with `rk(t)` applies the new encoding.
* Both XORs are folded into a single XOR with `r1(t-1) ^ rk(t)`. So the
  plain state bit never appears on any wire.

The re-indexed bit `g` goes back down together with `~g`. Copies that need
the inverted state bit take `~g`, so the lower tier needs no inverters on
those paths. Each state bit can be re-indexed to either random bit, chosen
by `REF2`; the default alternates (odd bit positions use `r2`).

A register block may also keep its stored bit referred to `r2` instead of
`r1` (per-bit parameter `OUTREF2`). It then XORs the mux output with
`r1 ^ r2` before the flip-flop and uses `r2(t-1)` in the update. Mixing the
two kinds across the upper tier changes what a probe on the lower tier would
have to assume, without touching the lower tier.

The upper tier only needs to know which random bit each position refers
to, not what the logic computes. Any circuit with the same widths can
therefore share one pre-built upper-tier design. `seq_record_upper` is
written generically in `S_W` (state bits), `I_W` (inputs) and `O_W`
(outputs).

Timing is the same as the unprotected circuit. `seq_record_des` takes a
start pulse, then one load clock and 16 rounds; `done` is high 17 clocks
after `start`. The cost is four copies of the logic, one mux and two XORs
per register, and two random generators.

## Time-division scheme

`tdm_record_upper` with `tdm_record_des` trades time for area. The lower
tier has a single copy of the logic. Each step of the protected circuit
takes five clocks:

| Phase | Action |
|---|---|
| 0 to 3 | Send variant `p` (entry k of the presentation order, k = phase) of `{g, t}` through the one copy; store the answer in holding register `p` |
| 4 | Pick holding register `{r1, r2}`. Invert it if `r1 = 1`. Load its state part into the round register and its decoded output part into `y`. Draw new `r1`, `r2` and `ord` |

Points to note:

* The output inversions of copies 3 and 4 are done in the upper tier at
  the pick. This keeps the lower tier an unmodified copy of the logic.
* `r1` and `r2` stay fixed for the whole five-clock step.
* The round register is re-indexed exactly as in the sequential scheme.
* A random order index `ord` (0..23) scrambles which variant is presented
  in which clock. All 24 orders are possible. The index is 8 random bits
  modulo 24; `record_pkg::order_variant` decodes it in the factorial number
  system.
* Primary inputs are sampled in phase 0, shown by `step = 1`.

A DES operation takes 18 steps, or 90 clocks, against 17 clocks unprotected
(5.3x). After a new `start` is accepted, `done` of the previous request
drops 10 clocks later.

**Three random rails.** With `RBITS = 3` a third rail `r3` joins `r1` and
`r2`. Bits marked in `REF3` (default: every third bit) are tied to `r3`.
There are then eight variants, eight holding registers and nine clocks per
step, and the pick uses `{r1, r2, r3}`. The selected answer is still
referred to `r1`, so the round register and decode are unchanged. A DES
operation then takes 162 clocks (9.5x). The presentation order is a random
3-bit XOR mask over the eight variants. `tb_tdm_record_des3` tests this
form.

## Off-the-shelf chip scheme

`cots_record_ctrl` is a separate control chip. It drives an unmodified DES
chip through the `bb_*` ports (bb = "black box"). The DES chip never learns
that its data is encoded.

* For each request `{dec, key, din}` the controller takes 16 bits from
  its Trivium generator: `r1`, `r2` and 14 bits that, modulo 24, pick the
  order of the four runs.
* It encodes all 129 input bits, including the mode bit `dec`.
* It runs the DES chip four times, once per variant.
* It picks result `{r1, r2}`, inverts it if `r1 = 1`, and XORs it with `r1`.

The whole DES operation is one function `f`, so only one pair of random bits
is used per request.

**Black-box handshake:**

* `bb_start` is a one-clock pulse; the `bb_*` inputs are valid with it and
  stay valid.
* The box must clear `bb_done` on the clock edge that takes `bb_start`.
* It raises `bb_done` when `bb_dout` is valid.

With a box of latency `L` a request takes `4(L+1)+2` clocks. That is 74 for
the 17-clock DES model used in the testbenches. For a slow part the
overhead tends to 4x.

**Seeding.** The Trivium generator (`trivium_rng`, 80-bit key and IV,
1152 warm-up steps at 16 steps per clock, so 72 clocks) is seeded once with
`seed_load`. Requests are accepted only once `rng_ready` is high.

## Building blocks

* `des_logic`: combinational next-state logic of a DES engine, one round
  per clock. All its registers live outside it, in the `des_state_t` struct
  of `des_pkg`. That struct is 127 bits: busy, done, dec, round counter,
  L, R, C, D.
  * Encryption rotates the key halves left before PC-2.
  * Decryption applies PC-2 first, then rotates right by the shift of the
    mirrored round.
  * `des_pkg` holds the permutation tables and S-boxes. IP and FP are
    computed from their closed form, E from its formula.
* `aes_sbox`: S-box as `x^254` in GF(2^8) (polynomial 0x11B), then the AES
  affine map with constant 0x63.
* `record_sbox_core`: the untrusted core (two S-boxes).
* `record_secure_io`: the trusted I/O with its LFSR.
* `record_sbox`: joins the two. `r` advances every clock.
* `lfsr_rng`: 32-bit Galois LFSR, polynomial x^32+x^22+x^2+x+1 (maximal
  length). Non-zero seed is asserted.
* `record_pkg`: seeds, taps, the default `REF2` and `REF3` patterns, and
  the decoding of a presentation-order index into variants.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example, the top-level end-to-end test:

```
verilator --binary --timing -y rtl -y tb \
  rtl/des_pkg.sv rtl/record_pkg.sv tb/tb_ref_pkg.sv tb/tb_record_top.sv \
  --top-module tb_record_top
./obj_dir/Vtb_record_top
```

Replace `tb_record_top` with any other `tb_*` module to run that block's
test.

* `tb/des_chip_model.sv` is a plain DES engine. It stands in for the
  external chip and serves as the reference.
* `tb/tb_ref_pkg.sv` computes the AES S-box independently, by search for
  the inverse.
* `tb_record_top` runs at default parameters and checks the following:
  * every S-box input;
  * DES known-answer vectors;
  * random encrypt/decrypt round trips in all three DES schemes;
  * the latencies 17, 90 and 74.

  It also counts that each mechanism happened: both values of `r`,
  re-indexing, all four selections in each scheme, all 24 TDM presentation
  orders, the Trivium warm-up and four box runs per request.

`tb_record_sbox_all_masks` builds the combinational scheme 256 times, once
for every choice of encoded S-box inputs, and checks each on every input
byte. It also checks that the core input changes only on the encoded bits,
and in about half of the clocks. Its C++ build takes about two minutes.

Some block testbenches peek at internal random bits through hierarchical
references, e.g. `dut.u_upper.r1`.

## Parameters worth changing

| Parameter | Where | Meaning |
|---|---|---|
| `DR_MASK` / `SBOX_DR_MASK` | combinational scheme | which S-box inputs are encoded; core and I/O must agree |
| `REF2` | sequential, TDM, COTS | per bit: 0 = tied to `r1`, 1 = tied to `r2`; both tiers must use the same value |
| `RANDOM_ORDER` | TDM, COTS | 0 presents the variants in fixed order |
| `OUTREF2` | sequential | per state bit: 1 = stored referred to `r2` |
| `RBITS`, `REF3` | TDM | 3 adds the third random rail; `REF3` marks the bits tied to it |
| `SEED*`, `TAPS` | LFSRs | any non-zero seed |

## Departures and limits

* **LFSRs are not secure sources of randomness.** They stand in for a
  proper true-random source in the ASIC schemes. The COTS controller uses
  Trivium.
* **The tier split is only a module boundary.** 3D bonding and
  chiplet packaging are physical matters. The upper/lower split is
  expressed only as the boundary between `*_upper` and `*_lower` (or
  `des_logic`).
* **Register-block variety.** Only the per-bit choices `REF2` (re-index
  rail) and `OUTREF2` (stored rail) are parameters. Other wirings of the
  register block are not offered.
* **Combinational scheme: `r` changes every clock.** Fresh randomness is
  used for each evaluation.
* **DES engine.** It is a straightforward FIPS 46 engine with a single
  `start/done` interface. The separate 64-bit input register of some DES
  designs is merged into L/R.
* **TDM scheme.**
  * The first five-clock step after reset uses `r1 = r2 = 0`.
  * With three rails the presentation order is a 3-bit XOR mask, so only 8
    of the 8! orders occur.
* **COTS scheme.**
  * The DES chip is reached through a simple parallel handshake rather
    than a real part's byte-wide bus. Adapting to a real chip means
    replacing the `bb_*` side with that chip's bus sequencer.
  * The mode bit is encoded like the data. This only works with a chip
    that does both directions.
* **No area, power or timing figures are claimed.** Area, power and timing
  depend on the cell library and layout.
