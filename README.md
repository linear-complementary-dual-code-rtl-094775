# Encoded SIMON32/64: a co-processor whose every flip-flop is coded and masked

A hardware Trojan has to attach to a chip somewhere. It needs a *trigger*, which reads internal state to decide when to act, and a *payload*, which changes internal state to do damage. Flip-flops are the easiest place to attach either one, because they are large and easy to find in a layout. This design takes them away as a target. The circuit's k-bit state `x` never sits in registers as plain bits. Instead the registers hold an n-bit word

    z = x·G  ⊕  y·H

where `y` is n−k fresh random bits drawn every clock cycle. `G` and `H` generate two binary linear codes, C (for data) and D (for the mask). Together they form a *linear complementary pair* (LCP): every n-bit word splits in exactly one way into a C part and a D part, so `x` and `y` can always be recovered from `z`. Two numbers describe how strong the protection is:

* **d_Trigger**, the dual distance of D. Any d_Trigger − 1 bits of `z` are uniformly random, whatever `x` is. A Trojan trigger that taps fewer register bits than this learns nothing. A probing attacker with fewer probes learns nothing either.
* **d_Payload**, the minimum distance of C. Flipping between 1 and d_Payload − 1 bits of `z` always gives a word whose decoded mask differs from the mask that was actually used. The circuit sees this and raises `alarm`.

Unlike an LCD code (where D is the dual of C and the two distances are equal), an LCP lets the two distances be chosen separately. That costs fewer register bits and less logic for a given trigger resistance.

The circuit being protected is a SIMON32/64 block-cipher co-processor, with a 32-bit block, a 64-bit key and 32 rounds. Its state is 109 bits. The default code is **[n, k, d_Trigger, d_Payload] = [123, 109, 5, 3]**, so 14 random bits are drawn per cycle and the state register grows from 109 to 123 flip-flops.

## Data path of one clock cycle

```
            +-----------+   x    +------------------+  x'   +-----------+
  z_q ----->| decoder J |------->| SIMON next state |------>| encoder G |----+
   |        +-----------+        +------------------+       +-----------+    |
   |                               ^ start, plaintext, key                  XOR--> z_d
   |        +-----+  y'            +-------------------+                     |
   |        | RNG |---------+----->| random encoder H  |---------------------+
   |        +-----+         |      +-------------------+
   |                        v
   |                  +-----------------------------+
   |                  | encoded state reg (z, y)    |<--- z_d ; recover = alarm
   |                  +-----------------------------+
   |                     | z_q             | y_q
   |  +------------------v+                |
   +->| random decoder K  |--- y_dec --> [ != ] --> alarm
   |  +-------------------+
   |  +-----------+   +--------------+
   +->| decoder J |-->| SIMON output |--> ciphertext, busy, done
      +-----------+   +--------------+
```

* `lcp_decoder` (J) turns `z_q` back into the 109-bit state. The original SIMON next-state logic (`simon_next_state`) computes the next state from it.
* `lcp_encoder` (G) encodes that next state. `rng` draws a fresh 14-bit mask `y'`, and `lcp_rand_encoder` (H) encodes it. The two encoded words are XORed and stored.
* `y'` is also stored (`y_q`) next to `z`. In the following cycle `lcp_rand_decoder` (K) extracts the mask from `z_q`, and `alarm_check` compares it with `y_q`.
* A second decoder J feeds the output logic (`simon_output`), which is a Moore function of the state.

Decoding, encoding and the alarm comparison are all combinational. So `alarm` is high in the same cycle as the faulty register contents, before the next edge could pass the fault on. With `RECOVER = 1` (the default), an alarm makes that edge reload the encoded reset state. The encryption in progress is dropped and the co-processor goes back to idle. With `RECOVER = 0` the alarm is only reported. The corrupted state is then decoded, passed through the next-state logic and re-encoded with a fresh mask. From then on it is a valid word, so each fault gives a one-cycle alarm pulse.

Reset is asynchronous and active low. It loads `z = x0·G`, the encoding of the reset state with a zero mask, and sets `y_q = 0`. The co-processor therefore starts exactly like the unprotected one.

## How the codes are built (`lcp_pkg`)

All matrices are computed at elaboration by constant functions. No coefficient tables are stored, and the same RTL encodes any state width up to 128 bits. Vectors are row vectors over GF(2). Stored bit `i < k` is the systematic copy of state bit `i`. Stored bit `k + j` is redundancy bit `j`.

* **G = (I_k | M)** and **H = (N | I_r)**, with r = n − k.
* **D** (family `LCP_BCH2`) is the dual of a shortened double-error-correcting BCH code C′. Its generator polynomial is g(x) = m1(x)·m3(x) over GF(2^m), where m is the smallest field size with 2^m − 1 ≥ k + 2m, so r = 2m. Row i of Nᵀ is x^(r+i) mod g(x). C′ has minimum distance 5, so D has dual distance 5 = d_Trigger. For k = 109, m = 7 and g = 0x4377. For k = 37, m = 6 gives the [49,37,5,3] code.
* **M** uses distinct rows of weight ≥ 2: all weight-2 vectors in increasing order, then weight-3 ones. That makes the minimum distance of C at least 3 = d_Payload. The pair is complementary exactly when A = I_r ⊕ N·M is invertible. The package starts the candidate list at the smallest offset for which it is. For k = 109 that offset is 1.
* **Decoding.** Split `z` into `z1 = z[k-1:0]` and `z2 = z[n-1:k]`. Then `z2 ⊕ z1·M = y·A`, so
  `y = (z2 ⊕ z1·M)·A⁻¹` (random decoder K) and `x = z1 ⊕ y·N` (decoder J).
  These products are exactly z·K and z·J, the blocks of the inverse of (G; H). The factored form needs only the 14×14 inverse A⁻¹, not a 109×109 one.
* Family `LCP_PARITY` is the [k+1, k, 2, 1] code: N is all ones and M = 0. With it, every stored bit is masked, but only a flip of the mask bit itself is detected.

The codes are built to the published parameters [123,109,5,3], [49,37,5,3] and [110,109,2,1]. They are not necessarily the same codes as any particular published instance, and M is chosen by a deterministic rule, not at random. Codes with d_Trigger = 10 or 17 (such as [140,109,10,6] for SIMON, or [81,37,17,·] for a small 8-bit processor with a 37-bit state) have no construction here.

## The SIMON co-processor

The 109-bit state (`simon_pkg::simon_state_t`) is:

| field   | bits | meaning |
|---------|------|---------|
| `fsm`   | 3    | one-hot controller: idle, run, done |
| `round` | 5    | round counter |
| `zlfsr` | 5    | LFSR generating the constant sequence z0 (z[i+5] = z[i]⊕z[i+1]⊕z[i+2]⊕z[i+4], seed 11111) |
| `key`   | 64   | sliding window of four key-schedule words; `key[0]` is the current round key |
| `x`,`y` | 32   | cipher words |

The widths add up to 109, the flip-flop count of the unprotected co-processor; the split into fields is this design's own. One round runs per clock, together with one key-schedule step (`k[i+4] = ~k[i] ⊕ t ⊕ (t >>> 1) ⊕ z[i] ⊕ 3`, with `t = (k[i+3] >>> 3) ⊕ k[i+1]`). A controller code that is not one-hot can only come from a corrupted state. It sends the machine to the reset state.

### Interface of `encoded_simon`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `rng_en` | in | 1 | 1: fresh mask every cycle; 0: mask is zero (encoded but not masked) |
| `start` | in | 1 | one-cycle pulse while idle or done; samples `plaintext` and `key` |
| `plaintext` | in | 32 | `{x, y}` |
| `key` | in | 64 | `{k3, k2, k1, k0}` |
| `ciphertext` | out | 32 | `{x, y}` after 32 rounds, valid while `done`, zero otherwise |
| `busy`, `done` | out | 1 | rounds running; result valid (held until the next `start`) |
| `alarm` | out | 1 | stored word inconsistent with the stored mask |

Timing: `done` rises 33 cycles after the edge that samples `start` (1 load cycle, then 32 round cycles). `start` is ignored while busy. Example: key `1918 1110 0908 0100` with plaintext `6565 6877` gives `c69b e9bb`.

Parameters: `FAMILY` (`LCP_BCH2` or `LCP_PARITY`) and `RECOVER` (1 or 0). The code length follows from them and from the state width.

## What is guaranteed and what is not

* The two code properties are checked exhaustively in the testbenches at the default size:
  * every nonzero codeword of C built from data of weight 1 or 2 has weight ≥ 3 (words of higher data weight trivially do);
  * no set of 4 or fewer columns of H sums to zero;
  * every fault pattern of weight 1 or 2 on `z` changes the decoded mask.
* The masking is only as good as the random source. `rng` is a 64-bit xorshift pseudo-random generator: a stand-in with the right interface, not a true RNG. Its outputs are predictable to anyone who knows the seed. A real implementation must replace it with a true random source.
* With `rng_en = 0`, `z = x·G` is a fixed linear image of the state. A linear leakage model can see through it, and power and EM measurements of this kind of unmasked encoding have shown more first-order leakage than the unprotected circuit. Use this mode for evaluation only.
* Faults on `z` that happen to be codewords of C (weight ≥ d_Payload) are not detected. The testbench shows one of weight 3 going through.
* Faults that hit the combinational logic between decoder J and encoder G are not detected. They are re-encoded as valid words in the next cycle.
* Security against a Trojan also depends on the synthesis tool merging the coding logic with the original logic (flattening), so that the decoded state never appears on a named net. That is a matter of the implementation flow, not of this RTL.

## Files

`rtl/`
* `lcp_pkg.sv`: code construction (BCH generator, M search, GF(2) inverse, reset encoding)
* `simon_pkg.sv`: state struct and SIMON round and key-schedule functions
* `lcp_encoder.sv` (G), `lcp_rand_encoder.sv` (H), `lcp_decoder.sv` (J), `lcp_rand_decoder.sv` (K)
* `encoded_state_reg.sv`: n state flip-flops and the mask register, with reset and recover
* `alarm_check.sv`: mask comparator
* `rng.sv`: mask generator with enable
* `simon_next_state.sv`, `simon_output.sv`: the original co-processor's combinational logic
* `encoded_simon.sv`: top

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and `simon_ref_pkg.sv`, a reference model of the cipher written independently of the RTL. Also:
* `tb_encoded_simon.sv`: the top at its defaults. It covers the test vector, random encryptions with the RNG on and off, a masking check (every register bit takes both values over repeated runs of the same encryption), all 123 single-bit faults, 100 random double-bit faults and all mask-register faults, each followed by recovery.
* `tb_encoded_simon_codes.sv`: the [110,109,2,1] configuration and `RECOVER = 0`.
* `tb_lcp_codes.sv`: the code modules at k = 37, giving the [49,37,5,3] code.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/lcp_pkg.sv rtl/simon_pkg.sv tb/simon_ref_pkg.sv rtl/*.sv tb/tb_encoded_simon.sv \
  --top-module tb_encoded_simon
./obj_dir/Vtb_encoded_simon
```

(Verilator may warn that a package file appears twice on this command line; the warning is harmless.) The top-level testbench runs in well under a second. The fault-injection testbenches use `force`/`release` on `dut.u_state.z_q` and `dut.u_state.y_q` to flip register bits for one cycle.

To encode a different circuit, split it the same way as here:
1. Put its state in one packed struct.
2. Write its next-state and output logic as combinational modules.
3. Instantiate them in a copy of `encoded_simon`, whose `K` is the struct width.

The package derives n and all matrices from that width.
