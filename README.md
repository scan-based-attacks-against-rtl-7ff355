# Secure scan paths for cryptographic cores

A scan path makes every flip-flop of a chip observable: switch to test mode,
clock the registers out one bit at a time, read them. That serves
manufacturing test well. It also hands an attacker the intermediate state
of a cipher. Run AES on a chosen plaintext for one clock, stop it, shift out
the round register, and a few hundred plaintexts recover the key. The same
works for an RSA exponentiator (the intermediate `m` reveals the exponent
bit by bit) and for an elliptic-curve point multiplier (the ladder registers
reveal the key bits).

The countermeasure built here is the **state-dependent scan flip-flop
(SDSFF)**. Some of the scan cells of a chain are replaced by cells that
invert the data passing through them on the scan path. Whether a cell
inverts depends on a value it captured itself the last time the chip left
test mode. The inversion pattern therefore changes with the circuit's own
data, and an attacker cannot learn it:

* it is not fixed, so one calibration run does not reveal it;
* a tester that knows where the SDSFFs are, and what they held, can undo it.

This makes scanned data useless to an attacker while keeping full
testability for the manufacturer. Nothing is added to the functional path,
and no controller or mode-change reset is needed.

The repository holds the SDSFF secure scan path and an AES-128 encryptor
protected by it. It also holds the two other attacked circuits, an RSA
exponentiator and a GF(2^163) elliptic-curve point multiplier, each with a
normal scan path that can be switched to SDSFF cells by a parameter. The
three sit side by side in `secure_scan_crypto_top`.

## The SDSFF cell

```
            se
            |
  d  ---->|mux|--->[ D FF ]---+---------------------> q  (to the logic)
  si ---->|   |      B        |
                              +--->[ latch ]-- A --+
                              |      ^ load         |
                              +--------------------(+)--> so (to next cell)
                                                 S = A ^ B
```

`rtl/sdsff.sv` is an ordinary mux-D scan FF (value B) plus a level-sensitive
latch (value A) and an XOR.

* In system mode (`se = 0`) the FF loads `d`.
* In test mode (`se = 1`) the FF loads `si`.
* The functional output `q` is always B, so the cell is a plain FF to the
  logic around it.
* Only the scan output changes: `so = A ^ B`.

The latch is open only while `load` is high. `load` is a pulse that rises
when `se` falls (test mode to system mode) and ends at the next rising clock
edge. The latch therefore takes the value B held at the end of the last
shift. `rtl/sdsff_load_gen.sv` makes the pulse from `se` and a registered
copy of it (`load = se_q & ~se`). One generator serves a whole chain.

Timing to be aware of in a real implementation:

* The pulse closes on the same edge on which B may change. The latch must
  close before the new B reaches it.
* In this RTL the order holds because the latch samples the pre-edge value.
* In silicon, either delay B into the latch slightly or end the pulse
  earlier.

Reset clears both B and A, so right after reset no SDSFF inverts.

## The secure scan path and how a tester decodes it

`rtl/secure_scan_chain.sv` holds the N register bits of a circuit. Cell i
holds bit i, and the shift order is `si -> cell 0 -> ... -> cell N-1 -> so`.
`SDSFF_COUNT` of the cells are SDSFFs; the rest are plain scan FFs
(`rtl/scan_ff.sv`).

Their positions come from a 32-bit LFSR seeded with `SEED`, evaluated at
elaboration time (`scan_pkg::sdsff_mask`). The positions are the secret the
manufacturer keeps. The chain exports the resulting `MASK` as a localparam
so that a test model can rebuild it.

While shifting, the latches are fixed. A bit that started in cell j and
leaves at `so` has passed through every SDSFF at positions j..N-1, so

```
observed(j) = B_j  xor  (xor of A_k over SDSFF positions k >= j)
```

Scan-in works the same way: a bit entering at `si` and coming to rest in
cell j has been XORed with A_k for every SDSFF k < j.

The tester knows:

* the mask;
* the latch contents. They are zero after reset. After each return to
  system mode they equal what the tester itself shifted in, or what it
  decoded on the way out.

So the tester can compute both corrections exactly. An attacker who doesn't
know the mask sees bits inverted in a data-dependent pattern. Capturing the
same state twice gives different scan-out data whenever the latches differ.

Test procedure (what the testbenches do):

1. Shift in a pattern, pre-scrambled so that the intended values land in
   the cells.
2. Drop `se` for one or more clocks. The latches load and the circuit runs.
3. Raise `se` and shift out.
4. Decode with the latch values loaded in step 2.

For AES, the chip's result is checked this way, and it matches a plain
reference model.

With `SDSFF_COUNT = 0` the chain is an ordinary scan path. That is the
default for the RSA and ECC cores, which model the unprotected targets.

A chain with SDSFFs is limited to 8,192 cells by the width of the mask
(`scan_pkg::MAX_CHAIN`); a chain without them has no limit.

## AES-128 core (`aes_core`)

This is an iterative encryptor that computes one round per clock.

* The secret key is written once (`key_we`).
* A `start` pulse samples the plaintext and performs the initial key
  addition into the 128-bit round register R.
* Each of the next 10 clocks computes the next round key and one round
  (`aes_round`: SubBytes, ShiftRows, MixColumns except in the last round,
  AddRoundKey).
* `done` rises after 11 rising edges in all. `ct` is R and stays valid
  until the next start.
* `start` is ignored while busy.

Round keys are derived on the fly (`aes_key_expansion`), one step per
round, from the previous key and a round constant that doubles in GF(2^8).
The S-box (`aes_sbox`) is a 256-entry constant table computed at
elaboration from its definition: the inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1, then the affine map.

Byte order follows the usual AES convention: byte 0 is bits [127:120], and
the bytes run down the columns.

All 398 registers sit in one secure scan path:

* key (128 bits);
* R (128 bits);
* current round key (128 bits);
* round constant (8 bits);
* round counter (4 bits);
* busy and done (1 bit each).

By default 199 of them, half, are SDSFFs (`SDSFF_COUNT`). The area/security
trade-off is set by this one parameter. Any count from 0 to 398 works.

The register after one round from a chosen plaintext is exactly what the
scan attack reads. The testbenches show that the raw scan-out of R differs
from the true value, and differs between two captures, while the decoded
data is exact.

## RSA exponentiator (`rsa_binary_exp`)

This core computes `m = c^d mod n` by the left-to-right binary method, one
iteration per clock:

```
m = 1
for i = L-1 downto 0:  m = m*m mod n;  if d_i: m = m*c mod n
```

* The exponent register rotates left once per iteration, so its MSB is
  always the current bit. After a run it is back to d.
* Latency is L+1 rising edges from start to done, which is L clocks of
  work.
* The modulus `n` is a public input, held stable during a run. The message
  must be below `n`.
* Each modular product is written as a full product followed by a
  remainder. This is simple and exact, but it is a large combinational
  block at L = 1024. A hardware-efficient version would use a Montgomery
  multiplier over several clocks, which changes the latency.

The scan path holds m, c, d, the iteration counter and two flags: 3,085
cells at L = 1024.

An attacker who stops the run after each iteration and shifts out m sees
whether a multiplication happened, which is the exponent bit. The RSA
testbench checks the per-iteration trace of m on a small example (n = 377,
d = 23, c = 156 gives 1, 1, 1, 156, 208, 130, 39, 143) and finds m in the
scan-out data midway through a run.

## Elliptic-curve point multiplier (`ecc_point_mult`)

This core computes `Q = kP` on a curve `y^2 + xy = x^3 + ax^2 + b` over
GF(2^163). The field polynomial is `z^163 + z^7 + z^6 + z^3 + 1` (the NIST
B-163 field).

The algorithm is the Montgomery ladder in López–Dahab projective
coordinates:

* The key's top bit must be 1.
* There are 162 iterations, each one point addition and one doubling.
* The operation sequence is the same for either key bit; only the register
  roles swap.

Afterwards the result is converted to affine coordinates with a single
field inversion, done by Itoh–Tsujii (squarings and multiplications only).
The point at infinity is not handled: a key that is a multiple of the point
order gives an undefined result.

The datapath has:

* a 13-entry register file of field elements;
* an adder (XOR);
* a squarer (`gf2m_sqr`, one squaring per clock);
* a digit-serial multiplier (`gf2m_mul_step`). It takes `DIGIT` bits of the
  second operand per clock, so a product takes 13 clocks at `DIGIT = 13`.

Only one unit works per clock.

The controller is a small microprogram (`ecc_pkg::program_rom`):

| Steps | Work |
|---|---|
| 0–4 | initialisation |
| 5–18 | ladder body |
| 19 | loop / key-bit step |
| 20–40 | inversion |
| 41–55 | affine x and y recovery |

Each instruction names an operation (move, load one, add, square n times,
multiply), a destination and two sources. A "swap" flag makes the ladder
instructions exchange (X1,Z1) with (X2,Z2) when the current key bit is 0.
This is how the ladder stays branch-free.

The key register rotates like the RSA exponent and is restored at the end.

A point multiplication takes 14,517 clocks. The scan path is 2,642 cells:
the register file, the accumulator and operand shift register of the
multiplier, the counters, the key and the flags.

## Top level (`secure_scan_crypto_top`)

The three cores are independent and share only clock and reset. Each core's
ports are brought out with a prefix (`aes_`, `rsa_`, `ecc_`), including its
own `se`/`si`/`so`. The SDSFF count and the sizes of every core are
top-level parameters.

## Where this design departs from the original description

* **AES register set.** The original AES circuit has 716 scan registers and
  evaluates 45 to 716 SDSFFs. Its other registers are not described, so
  this core has only the 398 it needs. SDSFF counts up to 398 are
  possible; 716 is not.
* **AES: encryption only.**
* **SDSFF placement.** Positions come from an LFSR at elaboration time. Any
  choice the manufacturer keeps secret serves equally.
* **Stitch order.** Cell i holds register bit i. A layout tool would
  reorder the chain; the decode only needs the final order.
* **Load pulse.** The pulse is derived from `se` by one FF. The original
  only says when Load must be high.
* **RSA.** The multiplier structure is not specified. A single-cycle
  product/remainder keeps the one-iteration-per-clock timing.
  * Key lengths of 2,048 and 4,096 bits are parameter changes (`L`, `NB`).
    `tb_rsa_key_sizes` runs the 2,048-bit core.
  * A 4,096-bit core elaborates, but Verilator cannot simulate it: its
    8,192-bit product exceeds the widest multiply and divide the simulator
    supports. Simulating it needs a multiplier that works over several
    clocks.
* **ECC.**
  * The field polynomial, the coordinate system, the inversion method and
    the digit size are choices of this design.
  * The original circuit runs its adder, squarer and multiplier in parallel
    and takes 15,137 clocks with 2,520 registers. This one runs them one at
    a time and takes 14,517 clocks with 2,642 registers.
* **Reset.** Reset is asynchronous, active low, and clears everything,
  including the SDSFF latches.
* **Baseline.** The scan-attack analysis itself (recovering keys from
  scan-out data) is software and is not part of the RTL. The earlier
  inverter-based secure scan scheme that the SDSFF is compared against is
  not built either.

## Files

| File | Contents |
|---|---|
| `rtl/scan_pkg.sv` | chain limit, LFSR and SDSFF mask functions |
| `rtl/scan_ff.sv` | plain scan FF |
| `rtl/sdsff.sv` | SDSFF cell |
| `rtl/sdsff_load_gen.sv` | Load pulse generator |
| `rtl/secure_scan_chain.sv` | register bank plus scan path with SDSFFs |
| `rtl/aes_pkg.sv` | AES types and GF(2^8) functions |
| `rtl/aes_sbox.sv` | AES S-box |
| `rtl/aes_round.sv` | AES round |
| `rtl/aes_key_expansion.sv` | AES key expansion step |
| `rtl/aes_core.sv` | AES core |
| `rtl/rsa_binary_exp.sv` | RSA core |
| `rtl/ecc_pkg.sv` | field type, register names, microprogram |
| `rtl/gf2m_mul_step.sv` | multiplier step |
| `rtl/gf2m_sqr.sv` | squarer |
| `rtl/ecc_point_mult.sv` | ECC core |
| `rtl/secure_scan_crypto_top.sv` | top |

`tb/` has one self-checking testbench per module (`tb_<module>.sv`).
`tb_gf2m_ops.sv` covers both field units. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs.

Reference values come from:

* the FIPS-197 AES examples;
* small hand-checkable RSA numbers and a 64-bit software model;
* an affine double-and-add ECC model written in the testbench;
* the worked four-SDSFF example.

`tb_secure_scan_crypto_top` runs the full-size top with default parameters:

* two AES encryptions with SDSFF capture and decode;
* a 1,024-bit RSA run with a scan dump;
* an ECC point multiplication with a scan unload/reload in the middle.

It counts each of these events.

`tb_aes_sdsff_counts` builds the AES core six times, with 0, 45, 60, 90, 179
and 358 SDSFFs. It takes each one through the capture/decode flow
(`tb/aes_scan_flow.sv`). With 0 SDSFFs the raw scan-out shows the round
register as is; with any other count it does not.

`tb_rsa_key_sizes` runs the RSA core at a 2,048-bit key: two
exponentiations against a right-to-left model, the L+1 latency, and the
scan path length. The build takes a few minutes because of the
4,096-bit product.

## Simulating

With Verilator 5, list the packages first and let `-y rtl` find the
modules:

```
verilator --binary --timing --assert -y rtl --top-module tb_aes_core \
    rtl/scan_pkg.sv rtl/aes_pkg.sv rtl/ecc_pkg.sv tb/tb_aes_core.sv
./obj_dir/Vtb_aes_core
```

Replace `tb_aes_core` with any testbench name. The full-size top testbench
takes about a minute to build and a few seconds to run. Every register is
reset, so the simulation does not depend on initial values.

Useful knobs:

* `SDSFF_COUNT` / `SCAN_SEED` (or `SEED`) on each core or chain;
* `L`, `NB` for the RSA key size;
* `DIGIT` for the ECC multiplier (a product takes ceil(163/DIGIT) clocks;
  only the default has been simulated).
