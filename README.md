# Hybrid FCSR keystream generator

A bit-serial stream-cipher keystream generator for small, real-time devices.
It takes a 128-bit key and a 128-bit IV. After a setup phase it gives out one
keystream bit per clock. Its core is four FCSRs (feedback-with-carry shift
registers). An FCSR is the carry-propagating relative of an LFSR: its taps
add with a carry instead of XORing, so the sequence it produces is nonlinear
in the register contents. Two nonlinear stages combine the four sequences:

```
 FCSR1 (96) --x1--+
 FCSR2 (128)--x2--+-- f --y--+
 FCSR3 (64) --x3--+          +-- DSG --z--> keystream
 FCSR4 (128)--x4-------------+    (carry flip-flop w)
```

* **f** is a Geffe-type function: `y = x1x2 ^ x2x3 ^ x3`, which is
  `x2 ? x1 : x3`. FCSR1..3 together with f form the *lp-Geffe generator*.
* **DSG** is a Dawson summation generator stage with a one-bit carry memory:
  `z = y ^ x4 ^ w` and `w' = x4 ^ (y ^ x4) & w`.

The main registers hold 416 bits of state. Each FCSR also has three carry
cells, and the DSG has one carry bit, for 429 state flip-flops in all. The
design intends the period of the output to be the lcm of the four register
periods, about 2^408 at full size.

## The Galois FCSR (`fcsr_galois`, `fcsr_addc`)

This is the part that needs the most care. An FCSR is defined by a
connection integer q. Here the register is described by its length N and by
`d = (|q| + 1) / 2`, and it realises q = 1 - 2d.

* The main register `m[N-1:0]` shifts right each clock. The output is `m[0]`.
* The output bit b = `m[0]` is fed back to every cell i where `d[i] = 1`.
* The top cell always has a tap (`d[N-1] = 1`): `m[N-1]' = b`.
* Every other tap cell has an adder with a one-bit carry register
  (`fcsr_addc`): `m[i]' = m[i+1] ^ b ^ c_i`, and `c_i' = maj(m[i+1], b, c_i)`.
* Cells without a tap just shift: `m[i]' = m[i+1]`.

A good way to think about it, and the way the testbenches model it: take the
integer `p = m + 2c`, where c is the carry vector placed at the tap
positions. One clock outputs `b = p mod 2` and makes `p' = (p - b)/2 + b*d`.
This is the 2-adic expansion of p/q. When |q| is prime and 2 is a primitive
root modulo |q|, the output is an *l-sequence* of period |q| - 1. Its two
half-periods are bitwise complements of each other.

The cipher uses these four registers (in `hfcsr_pkg`):

| register | N   | connection integer \|q\|         | taps d               |
|----------|-----|----------------------------------|----------------------|
| FCSR1    | 96  | 2^96 + 2^58 + 2^35 + 2^2 - 1     | 95, 57, 34, 1        |
| FCSR2    | 128 | 2^128 + 2^5 + 2^4 + 2^2 - 1      | 127, 4, 3, 1         |
| FCSR3    | 64  | 2^64 + 2^59 + 2^8 + 2^2 - 1      | 63, 58, 7, 1         |
| FCSR4    | 128 | 2^128 + 2^21 + 2^19 + 2^2 - 1    | 127, 20, 18, 1       |

`fcsr_galois` defaults to a small 8-cell example: |q| = 347, d = 174, with
carries at cells 5, 3, 2 and 1.

**Key-initialization input.** `inj` is XORed into the bit entering the top
cell (`m[N-1]' = b ^ inj`). The specification shows only that the injected
bit enters the register, not at which cell, so this injection point is a
choice made by this design. Any implementation meant to interoperate must
use the same point.

## Key/IV setup (`keyiv_ctrl`)

1. **Initial filling** (the clock on which `start` is high). FCSR1 gets
   k127..k32, FCSR2 gets k127..k0, FCSR3 gets k127..k64 and FCSR4 gets
   k127..k0. All carries and the DSG carry are cleared.
2. **Key initialization** (192 clocks, t = 0..191). Every register keeps
   running. Register i receives `seed_i[t] ^ z` on its `inj` input, so the
   keystream bit is fed back into the state. The seed sequences are:
   * FCSR1: `{32 zeros, iv, k[31:0]}`
   * FCSR2: `{64 zeros, iv}`
   * FCSR3: `{iv, k[63:0]}`
   * FCSR4: `{64 zeros, iv}`

   Bit t of each sequence is used at clock t. `busy` is high and `ks_valid`
   is low during this phase.
3. **Keystream.** `ks_valid` stays high and `ks` carries a new bit on every
   clock until the next `start`.

Timing: the first valid bit appears 193 clocks after the edge that samples
`start`. Throughput is one bit per clock. A `start` in any phase restarts
the setup.

`key` and `iv` are read directly during the 192 initialization clocks. Hold
them stable from `start` until `busy` falls. This saves a 192-bit copy
register.

## Interface of the top (`hfcsr_keystream_gen`)

| port       | dir | width | meaning                                        |
|------------|-----|-------|------------------------------------------------|
| `clk`      | in  | 1     | clock, everything on the rising edge           |
| `rst_n`    | in  | 1     | asynchronous active-low reset, clears all state |
| `start`    | in  | 1     | one-clock pulse: load key, begin setup         |
| `key`      | in  | 128   | secret key k127..k0                            |
| `iv`       | in  | 128   | IV iv127..iv0                                  |
| `ks`       | out | 1     | keystream bit (valid when `ks_valid`)          |
| `ks_valid` | out | 1     | setup finished, `ks` is keystream              |
| `busy`     | out | 1     | in the 192-clock key initialization            |

The parameters `N1..N4` and `D1..D4` select the register lengths and taps.
Their defaults are the cipher's values. Smaller values are for experiments;
the key filling then uses the top N bits of the key. Encryption itself
(XORing the keystream with data) is left to the user.

## Where this design departs from, or fills in, the specification

* **DSG carry.** The carry follows the cipher's own equation and truth
  tables: `w' = x4 ^ (y ^ x4) w`, which is `w ? y : x4`. This is *not* the
  majority carry of a binary adder. The specification uses it to get a 1/2
  carry/output correlation, and its algebraic expressions for the first
  keystream bits agree with it. A "textbook" summation generator would give
  a different keystream.
* **FCSR sign convention.** The connection integers are given as positive
  numbers, but the FCSRs are described with a negative prime q and
  `d = (1 + |q|)/2`. The RTL realises q = 1 - 2d. This reproduces the
  published algebraic expressions for the first outputs after key filling
  (x1 = k32, k33, k34^k32, k35^k33^k34k32, ...).
* **Choices made by this design:** the injection point; that carries start
  at zero after filling; the DSG carry being cleared only at `start`; the
  `start`/`ks_valid`/`busy` handshake; reset values; the requirement that
  key and IV stay stable during setup.
* The "416-bit internal state" counts main registers only; the carries are
  extra flip-flops.

## Verification

Every testbench checks its results itself and ends with
`TB_RESULT checks=N failures=M`.

| testbench                | what it shows                                                                |
|--------------------------|------------------------------------------------------------------------------|
| `tb_fcsr_addc`           | all sum/carry combinations, clear and hold                                   |
| `tb_fcsr_galois`         | 8-cell example and all four full-size registers against the integer model (with injection and stalls); least periods 18, 36, 106, 130 for \|q\| = 19, 37, 107, 131 and half-period complement; published first-output equations of FCSR1/FCSR2 |
| `tb_geffe_f`             | truth table of f and its 3/4, 1/2, 3/4 agreement with x1, x2, x3              |
| `tb_dsg`                 | every row of the DSG truth table and its 1/2 correlations, 2000 random steps, clear/hold |
| `tb_lp_geffe`            | y = f(x) each clock; periods 18, 52, 106 and T_y = 24804 for \|q\| = 19, 53, 107 |
| `tb_keyiv_ctrl`          | key filling, all 4 x 192 seed bits, 192-clock setup, restart                  |
| `tb_hfcsr_keystream_gen` | full-size, default parameters: every keystream bit against a reference model, latency 193, one bit per clock, re-keying during output, reproducibility, IV sensitivity |
| `tb_period_small`        | five small configurations through the complete generator with key setup: measured least periods T_y and T_z equal lcm(T1,T2,T3) and lcm(T_y,T4): 24804/124020, 62010/62010, 47970/47970, 82044/82044, 6660/86580 |
| `tb_fips140`             | full size, 100 random key/IV pairs x 20,000 bits: FIPS 140-1 monobit, poker, runs and long-run tests all pass for every sample; over the 2,000,000 bits z agrees with each of x1..x4, y and the DSG carry with frequency 0.5 +/- 0.01 |
| `tb_algebraic`           | full-size datapath right after key filling, without initialization: x1..x4 and z for t = 0..2 match the published algebraic expressions; z(2) depends on the DSG carry function, so this confirms it |

The NIST SP800-22 evaluation (100 streams of 10^6 to 10^7 bits) is not
reproduced. The linear-complexity figures are not reproduced either.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/hfcsr_pkg.sv tb/tb_hfcsr_keystream_gen.sv --top-module tb_hfcsr_keystream_gen
./obj_dir/Vtb_hfcsr_keystream_gen
```

Every testbench finishes in a few seconds.

## Files

* `rtl/hfcsr_pkg.sv`: sizes, tap constants, phase type
* `rtl/fcsr_addc.sv`: adder-with-carry cell
* `rtl/fcsr_galois.sv`: Galois FCSR
* `rtl/geffe_f.sv`: combining function f
* `rtl/lp_geffe.sv`: FCSR1..3 + f
* `rtl/dsg.sv`: summation stage with carry
* `rtl/keyiv_ctrl.sv`: setup sequencer
* `rtl/hfcsr_keystream_gen.sv`: top
* `tb/`: the testbenches above, plus the harnesses `tb_fcsr_unit` and `tb_period_unit`
