# RSA and dual-field ECC processors built on Vedic multipliers

A wireless sensor node needs public-key cryptography on very little silicon.
This design gives it two engines that share one idea: the multiplier at the centre
of each one uses an ancient Indian ("Vedic") mental-arithmetic method instead of a
shift-and-add array.

- An **RSA processor** covers the whole key life cycle.
  - Two LFSRs propose 8-bit candidates, and a primality tester keeps the primes p and q.
  - A *Nikhilam* (base-and-deviation) multiplier forms the 16-bit modulus n = p·q.
  - An extended-Euclid unit checks the public exponent e against φ(n) and computes the private exponent d.
  - Two modular exponentiators then encrypt with (e, n) and decrypt with (d, n).
- A **dual-field ECC processor** performs one elliptic-curve point addition or point doubling in projective coordinates.
  - It works over the binary field GF(2^163) or over the 192-bit prime field P-192.
  - An input, `sel_field`, selects the field at run time.
  - Every field multiplication uses an *Urdhva-Tiryagbhyam* ("vertically and crosswise") product.
  - The same array runs with carries for GF(p) and carry-free for GF(2^m).

The two engines sit side by side in `crypto_node_top`. They share only the clock and reset.

## The two Vedic multipliers

### Urdhva-Tiryagbhyam (`urdhva_mult`)

The operands are split into DIGIT-bit digits (DIGIT = 4 by default).
- Column k of the product is the sum of all digit products a_i·b_j with i + j = k. These are the "crosswise" products.
- Each column sum is added into the result at bit offset k·DIGIT.

For 8-bit operands this gives four 4×4 products:
- m1 = aL·bL and m4 = aH·bH are the two "vertical" products.
- m2 = aH·bL and m3 = aL·bH are the two crosswise products.
- The product is m1 + (m2 + m3)·16 + m4·256.

Example: 120 × 150 gives m1 = 48, m2 + m3 = 114 and m4 = 63, so the product is 18000.

When the `gf2` input is high, two things change:
- each digit product is carry-less (shift-and-XOR);
- the column sums are XORs.

The same structure then gives the polynomial product needed in GF(2^m).

The multiplier is written with generate loops so that every digit product is a separate piece of hardware. At W = 192 this is 48 × 48 digit multipliers. That is large, but it is what the method implies.

### Nikhilam (`nikhilam_mult`)

Nikhilam writes each operand as a base B plus a deviation:

    x·y = (x + (y − B))·B + (x − B)·(y − B)

When B is a power of two, the first term is only a shift. The second term is again a product, of two smaller numbers. The RTL applies the identity level after level.

At each level:
- order the operands so that x ≥ y;
- take B = 2^k, the largest power of two not above y;
- add (x + y − B) << k to the result;
- continue with the deviations x − B and y − B.

When y reaches 0, the remaining levels add nothing. W levels are always enough.

For 10 × 20, the levels are (20, 10), then (12, 2), then (10, 0). The result is 200.

The multiplier is purely combinational. In the RSA processor it forms n = p·q. It can also be selected for the exponentiators' modular multipliers (parameter `MULT`, default Nikhilam).

## RSA processor (`rsa_processor`)

```
 seed bits ──► prime_gen ──p,q──► nikhilam_mult ──n──┬─────────────► rsa_cypher (enc: e,n) ──► cypher
 (LFSR+primality)        │                           │                                 │
                         └──► φ = n−p−q+1 ──► extended_euclidean(e,φ) ──d──► rsa_cypher (dec: d,n) ──► outdata
```

- **Prime generation** (`prime_gen`, `primality_tester`).
  - Two 8-bit Galois LFSRs (taps x^8+x^6+x^5+x^4+1) are first seeded serially through `datain_p`/`datain_q`, with `fill_sel = 1` and `shift_en = 1`.
  - When `fill_sel` drops, each LFSR steps until its value, with the top and bottom bits forced to 1, passes the primality test.
  - q must also differ from p.
  - The tester uses trial division, one divisor per clock, while d·d ≤ candidate. This is exact at 8 bits.
- **Key derivation.**
  - φ(n) = (p−1)(q−1) is formed as n − p − q + 1, so no second multiplier is needed.
  - `extended_euclidean` runs one quotient/remainder step per clock. It returns the gcd, a `coprime` flag and e⁻¹ mod φ.
  - The Bezout coefficient is kept signed in W+2 bits and brought into range at the end.
  - `key_ok` is high when gcd(e, φ) = 1 and 1 < e < φ.
  - `keys_ready` rises when Euclid is done.
  - The strobes `ds` (encrypt) and `ds2` (decrypt) are ignored until `keys_ready` is high.
- **Exponentiation** (`rsa_cypher`, `mod_mult`, `mod_reducer`).
  - It uses right-to-left square-and-multiply.
  - Two modular multipliers run in parallel on every exponent bit: one squares the running base, the other multiplies it into the result.
  - Each `mod_mult` takes the full 2W-bit Vedic product and reduces it bit-serially: a shift-and-subtract over 2W clocks.
  - Latency is (1 + bit length of the exponent) × (2W + 5) clocks: 37 clocks per bit at W = 16.
  - Reference case: 10^11 mod 12 = 4.

## Dual-field ECC processor (`dual_field_processor`)

This is the harder half of the design.

### Organisation

```
 main control (ecc_main_ctrl) ──► EC arithmetic unit (ec_arith_unit: microcode ROM + field_alu)
        │ load                              │ read a/b, write
        ▼                                   ▼
                 register file (ec_regfile, 16 × W)  ──► out1/out2/out3 = X3, Y3, Z3
```

1. On `start`, `ecc_main_ctrl` latches `sel_field` (1 = prime, 0 = binary) and `op` (`EC_ADD` or `EC_DBL`).
2. It loads x1, y1, z1, x2, y2, a and b into registers 0–6.
3. It starts the arithmetic unit.
4. The arithmetic unit fetches micro-instructions `{op, d, s1, s2}` from a ROM in `ecc_pkg`.
   - Each instruction reads two registers, runs one field operation and writes the result back.
   - The instruction `F_END` finishes the program.
5. There are four programs, one per field and operation. Their entry points are `PC_BIN_ADD`, `PC_BIN_DBL`, `PC_PRI_ADD` and `PC_PRI_DBL`.

Only one field multiplier is instantiated, so the whole point operation is serial. This trades time for area, which suits a sensor node.

### Field ALU (`field_alu`)

| op | GF(2^m) | GF(p) | clocks |
|---|---|---|---|
| `F_ADD` | x ⊕ y | x + y mod p | 1 |
| `F_SUB` | x ⊕ y | x − y mod p | 1 |
| `F_HALF` | not used | x/2 mod p | 1 |
| `F_MUL` | carry-free Urdhva product, then reduction by the field polynomial | Urdhva product, then reduction mod p | 2W + 3 |

- Reduction is the same bit-serial Horner loop used in RSA.
  - For GF(p), it conditionally subtracts p.
  - For GF(2^m), it conditionally XORs the polynomial when bit m is set.
- Defaults:
  - W = 192;
  - BIN_M = 163;
  - BIN_POLY = x^163 + x^7 + x^6 + x^3 + 1;
  - PRIME_P = 2^192 − 2^64 − 1.
- All four are parameters, so the same RTL also runs as an 8-bit processor.

### Point formulas

In every formula below, Q = (x2, y2) is an affine point and P = (X1 : Y1 : Z1) is a projective point.

- **Binary addition** uses Lopez-Dahab mixed coordinates. The point (X : Y : Z) stands for (X/Z, Y/Z²). The program is

      A = Y1 + y2·Z1²,  B = X1 + x2·Z1,  C = Z1·B,  Z3 = C²,  D = x2·Z3,
      E = A + B² + a·C,  X3 = A² + C·E,  I = D + X3,  J = A·C + Z3,
      F = I·J,  K = Z3²,  Y3 = F + (x2 + y2)·K.

  It has 15 multiplications and 9 additions.
- **Binary doubling** (Lopez-Dahab) is

      Z4 = X1²·Z1²,  X4 = X1⁴ + b·Z1⁴,  Y4 = b·Z1⁴·Z4 + X4·(a·Z4 + Y1² + b·Z1⁴).

  It has 10 multiplications and 4 additions.
- **Prime addition** uses Jacobian mixed coordinates. The point (X : Y : Z) stands for (X/Z², Y/Z³). The program is

      A = X1,  B = x2·Z1²,  C = A − B,  D = Y1,  E = y2·Z1³,  F = D − E,
      G = A + B,  H = D + E,  Z3 = Z1·C,  X3 = F² − G·C²,
      I = G·C² − 2·X3,  Y3 = (I·F − H·C³)/2.

  It has 11 multiplications and 9 additions, subtractions or halvings.
- **Prime doubling** (Jacobian, any curve coefficient a) is

      A = 3·X1² + a·Z1⁴,  B = 4·X1·Y1²,  C = 8·Y1⁴,
      X4 = A² − 2B,  Y4 = A·(B − X4) − C,  Z4 = 2·Y1·Z1.

  It has 10 multiplications and 13 additions or subtractions.

### Timing

- Start to done takes 4 + 2·(linear ops) + (2W + 5)·(multiplications) clocks. At W = 192 this gives:

  | operation | clocks |
  |---|---|
  | binary addition | 5,857 |
  | binary doubling | 3,902 |
  | prime addition | 4,301 |
  | prime doubling | 3,920 |
- The register file's `out_x`, `out_y` and `out_z` ports drive `out1`, `out2` and `out3`. They are valid once `done` has pulsed, and they hold until the next `start`.

## Where this design departs from the document

- **Two printed formulas are corrected.**
  - The prime-field mixed addition prints Y3 = (I·F − H·C²)/2. That does not give the sum point. This design uses H·C³, the standard Jacobian term.
  - The binary doubling prints Y4 = (Y1² + a·Z1⁴)·X4 + Z4·b·Z1⁴. That does not give the doubled point either. This design uses the Lopez-Dahab Y4 shown above.
  - The other two formula sets are followed line by line.
- **The fields are reduced.**
  - The document's 8-bit demonstrations show integer results wider than the operands.
  - Here every ALU result is a reduced field element.
  - The field polynomial and the prime are NIST's B-163 and P-192. The document names NIST curves but prints neither modulus.
- **Basis.** The document mentions a normal basis. A vertically-and-crosswise product is a polynomial product, so GF(2^m) elements are in polynomial basis here.
- **Sequential rather than combinational ECC.** The document's 8-bit processor is a set of parallel blocks, one per field and operation, all with outputs. Here one microcoded unit computes the selected operation and brings out X, Y and Z.
- **The public exponent e is an input port.** The document says only that e is chosen.
- **Not handled:** the point at infinity, and addition of P to ±P. Scalar multiplication is not built either; the document leaves it to future work.
- **Timing is in clock cycles only.** The document's picosecond figures come from a behavioural simulator and an FPGA flow. They are not modelled.

## Files and simulation

- `rtl/vedic_pkg.sv` and `rtl/ecc_pkg.sv` hold the shared enums, the micro-instruction type and the microcode ROM. Compile them first.
- Every other file in `rtl/` holds one module, named after the file.
- Each module has a self-checking testbench `tb/tb_<module>.sv`.
  - `tb/ec_ref_pkg.sv` is an independent reference model. It provides affine point arithmetic, modular inverses, and curve and case generators.
  - Each testbench ends by printing `TB_RESULT checks=… failures=…`.
  - Each testbench has a watchdog.

Example:

```
verilator --binary --timing -Wno-fatal -y rtl \
    rtl/vedic_pkg.sv rtl/ecc_pkg.sv tb/ec_ref_pkg.sv tb/tb_crypto_node_top.sv \
    --top-module tb_crypto_node_top
./obj_dir/Vtb_crypto_node_top
```

The packages are listed explicitly; `-y rtl` lets the tool find each module in its file.
The full-size top builds in well under a minute and simulates in about two seconds.

`tb_crypto_node_top` runs the top at full size, with no parameter overrides. It covers:
- RSA key generation;
- encrypt/decrypt round trips;
- rejection of unusable exponents;
- 40 point operations over GF(2^163) and P-192, with every result checked against the affine reference.

It also counts that each mechanism (prime search, key check, both exponentiators, both fields, both operations) was exercised.

`tb_dual_field_processor` runs 400 random cases at 8 bits, with W = 8, x^8+x^4+x^3+x+1 and p = 251. It also checks the exact cycle count of every operation.
