# RS(255,239) Reed-Solomon decoder in SystemVerilog

This is a streaming Reed-Solomon decoder for the RS(255,239) code over GF(2^8). Each
codeword has 255 eight-bit symbols: 239 data symbols and 16 check symbols. The decoder
corrects up to t = 8 wrong symbols anywhere in the word. It flags words with more errors
than that, which it cannot correct. Symbols enter one per clock. The corrected word
streams out one symbol per clock after a fixed delay. Reception of the next word overlaps
correction of the current one.

The decoder follows a published design that was sized for small MAX-family CPLDs. That
design uses the classic textbook chain, and this RTL builds the same chain. Its
organisation and algorithms are the published ones. The handshakes, buffering, timing and
failure reporting are choices made for this RTL. Each one is listed below under
"Where this RTL departs from, or adds to, the published design".

## The decoding chain

```
 in_data ─┬─> rs_syndrome ──S1..S16──> rs_key_equation ──sigma, Omega──┬─> rs_chien_search ──root, odd part──> rs_forney ──Y_i──┐
          │                              (Berlekamp-Massey)               └───────────────────────────────────────> (Omega)      │
          └─> rs_codeword_buffer (delay path, 2 x 256 symbols) ──────── r_i ──────────────────────────────> rs_error_correction ─> out_data
```

| Module | Role |
|---|---|
| `rs_pkg` | GF(2^8) arithmetic (`gf_mul`, `gf_inv`, `gf_alpha`) and the field constants |
| `rs_syndrome` | 16 syndrome cells, S_j = r(alpha^j) |
| `rs_key_equation` | Berlekamp-Massey: error locator sigma(x), then the error magnitude polynomial Omega(x) |
| `rs_chien_search` | evaluates sigma at every position, flags roots (error positions) and counts them |
| `rs_forney` | error value at every root (Forney's formula) |
| `rs_codeword_buffer` | dual-port memory that delays the received word until its error vector exists |
| `rs_error_correction` | adds the error vector to the delayed word and gives the per-word verdict |
| `rs_decoder` | top level: wires the chain and sequences the codewords |

### Field and code conventions

- The field polynomial is p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D), with alpha = 0x02.
- The generator polynomial has the roots alpha^1 .. alpha^16.
- A word is the polynomial r(x) = r_0 + r_1 x + ... + r_254 x^254. Symbol `i` means the
  coefficient r_i.

These are the usual conventions for this code. The published description fixes the code
size and the first root alpha^1, but not the field polynomial. To use another polynomial,
change `PRIM_POLY` in `rs_pkg` and the reference model in `tb/rs_tb_pkg.sv`.

## Symbol order: in at the top, out at the bottom

This is the point most likely to surprise a user:

- **Input is highest degree first:** r_254, r_253, ..., r_0. That order is needed because
  each syndrome cell works by Horner's rule, S_j <- S_j * alpha^j + r. A
  systematic encoder sends its symbols in this order: the data first, then the 16 check
  symbols.
- **Output is lowest degree first:** position 0, 1, ..., 254. That is the reverse of the
  input order. The Chien search steps through the positions with multipliers by alpha^-j:
  during step i, stage j holds sigma_j * alpha^(-ij), so the stages sum to sigma(alpha^-i),
  which tests position i. The error vector therefore starts at r_0.
- The delay buffer absorbs this order reversal. Its write port stores the symbols in
  arrival order. Its read port is addressed by position, and reads address 254-i for
  position i.
- Every output symbol carries `out_pos`, its position i. Data symbol d (0 = the first data
  symbol sent) leaves at `out_pos = 254 - d`. Check symbols leave at `out_pos` 0..15.

## Key equation solver (Berlekamp-Massey)

The key equation ties the syndromes to the two polynomials the later stages need:

    sigma(x) [1 + S(x)] = Omega(x)  mod x^17,     S(x) = S_1 x + ... + S_16 x^16

`rs_key_equation` first finds sigma(x) with the Berlekamp-Massey iteration. It uses the
correction-polynomial form of the algorithm:

    k = 0, sigma = 1, L = 0, T(x) = x
    repeat for k = 1 .. 16:
        Delta = S_k + sum_{i=1..L} sigma_i S_{k-i}
        if Delta != 0:
            sigma_new = sigma + Delta * T(x)
            if 2L < k:  L = k - L;  T(x) = sigma_old / Delta
            sigma = sigma_new
        T(x) = x * T(x)

The hardware spends two clocks on each iteration:

- In the first clock, an adder tree over t multipliers forms Delta.
- In the second clock, t+1 multipliers update sigma and T. One inverter supplies 1/Delta.
  It computes Delta^254 as a chain of squarings and multiplications.
- T(x) is shifted in every iteration, also when Delta = 0.

After the 16 iterations, Omega_j = sum_{i<=j} sigma_i S'_{j-i} is formed one coefficient
per clock, with S'_0 = 1. Only Omega_0..Omega_8 are formed. For a correctable word,
deg Omega <= L <= 8. sigma and T are also held to 9 coefficients. Truncating sigma
and T this way is exact for every word with at most 8 errors. For worse words it can
change the result. The failure check below usually catches such words.

Latency is 5t + 1 = 41 clocks from `start` to `done`.

## Chien search and Forney

`rs_chien_search` has t+1 = 9 stages. Each stage is a register, a constant multiplier by
alpha^-j, and a mux:

- On the load clock, the mux puts sigma_j into the register.
- On each of the next 255 clocks, the register takes its own value times alpha^-j.

A zero detector on the sum of the stages flags an error at position i. The flags are
counted. The sum of the odd-degree stages is brought out as well. In characteristic 2, that
odd-degree sum equals x * sigma'(x).

`rs_forney` uses the same kind of stages to evaluate Omega(alpha^-i). It inverts the odd
sum from the Chien block and multiplies the two:

    Y_i = Omega(alpha^-i) / sigma_odd(alpha^-i)

This value is exact for the convention used here: syndromes from alpha^1, and the
`1 + S(x)` form of the key equation. For a single error of value v at position p,
Omega = 1 + (alpha^p + v * alpha^p) x, and sigma_odd(alpha^-p) = 1. That gives Y_p = v.
The testbench checks this formula against the injected error values.

## Failure detection

A word with at most t errors yields exactly L distinct roots among the 255 positions, where
L = deg sigma. After the search, `rs_error_correction` sets `out_fail` when L > t or when
the root count differs from L. `out_fail` is valid together with `out_last`. By then the
word has already been streamed out. When `out_fail` is set, take the word's symbols as
uncorrected and unreliable.

A word with more than t errors can, rarely, land within distance t of another codeword. The
decoder then "corrects" it to that codeword without a flag. No RS decoder can avoid this.

## Timing and throughput

| Quantity | Clocks |
|---|---|
| Receiving a word | N = 255 (one symbol per clock while `in_ready`) |
| Syndrome handoff to the key equation solver | 1 |
| Key equation solving | 5t + 1 = 41 |
| Chien search / Forney / correction | N, plus 3 pipeline clocks |
| Last input symbol to first corrected symbol (back end idle) | 5t + 5 = 45 |
| Sustained rate, back-to-back input | one word per N + 5t + 3 = 298 clocks |

The back end needs about 5t more clocks per word than reception does. With back-to-back
input, the syndrome stage finishes a word while the back end is still busy. It then holds
its syndromes and drops `in_ready` until the back end is free. This is the decoder's only
stall. The buffer has two banks, so the next word can be received while the current one is
corrected.

## Interface of `rs_decoder`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low (clears control state) |
| `in_valid` | in | 1 | `in_data` holds a symbol |
| `in_ready` | out | 1 | the symbol is taken at this rising edge |
| `in_data` | in | 8 | received symbol, r_254 first; 255 symbols per word, no framing signal |
| `out_valid` | out | 1 | corrected symbol present |
| `out_pos` | out | 8 | its position i, 0..254 in order |
| `out_data` | out | 8 | corrected symbol |
| `out_corrected` | out | 1 | the decoder changed this symbol |
| `out_last` | out | 1 | position 254, the end of the word |
| `out_fail` | out | 1 | with `out_last`: more than t errors detected |
| `out_nerr` | out | 8 | with `out_last`: number of symbols corrected |

Parameters are `N = 255` and `K = 239`, and t = (N-K)/2. A smaller `N` gives a shortened
code: the missing leading data symbols are taken as zero. All arrays follow t. The field
stays GF(2^8). The delay buffer holds two words of up to 256 symbols.

Assertions in `rs_decoder` and `rs_syndrome` check three rules:

- The key equation solver is only started when it is idle.
- The Chien search is only loaded when it is idle.
- Waiting syndromes stay unchanged until they are taken.

## Size against the CPLDs the design was aimed at

The published design reports 35 to 63 logic elements on MAX II, MAX V and MAX 3000A/7000
parts, with 25 to 29 pins. This RTL is far larger. A generic synthesis of `rs_decoder`
gives about 2,770 word-level cells, 731 flip-flops and a 4,096-bit memory. Here is how
that compares with the parts:

- Each logic element or macrocell in these parts has one flip-flop. The 731 flip-flops alone
  exceed the largest part listed (240 LEs).
- The MAX 3000A/7000 parts have no block memory for the delay buffer.
- This RTL also has 40 pins (clock and reset included), more than the 25 to 29 reported.

A full t = 8 decoder of this architecture needs at least the 16 syndrome registers, the 9+9
Chien/Forney stages and the 255-symbol delay. That is over 300 flip-flops before any
control logic. So this RTL does not reproduce the published area figures, and does not
fit the devices named. The timing and power figures are likewise not reproduced.

## Where this RTL departs from, or adds to, the published design

- **Chien stages:** t+1 = 9 stages, as the text of the design specifies. Its block diagram
  draws 16 (sigma 0..15).
- **Shift of T(x) when Delta = 0:** the algorithm requires it, and it is done here.
- **Delay path:** the design calls for a FIFO on either the codeword or the error vector to
  match their orders. Here it is a two-bank dual-port memory whose read port is addressed
  by position, which performs the reversal.
- **Alpha multiplier placement in Forney:** in the design's magnitude block, the alpha
  multiplier sits between the mux and the register. Here the register is loaded with the
  coefficient and multiplied afterwards. The mathematical result is the same, with the
  same alignment as the Chien stages.
- **Choices made here:**
  - the valid/ready input and the input stall;
  - overlapping reception with correction;
  - the position tag on the output;
  - the per-word fail flag and error count;
  - the field polynomial;
  - synchronous reset;
  - two clocks per Berlekamp-Massey iteration;
  - the 1/x inverter built as x^254.
- **Not built:** the Euclidean algorithm, which is named as an alternative key equation
  solver; erasure decoding; and the transmitter side (encoder, modulator, channel). A
  behavioural systematic encoder exists only in the testbench package.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model
(`tb/rs_tb_pkg.sv`) does GF arithmetic with log/antilog tables rather than the RTL's
shift-and-add logic. It encodes random messages with a systematic LFSR encoder and
injects random errors.

| Testbench | What it checks |
|---|---|
| `tb_rs_syndrome` | S_1..S_16 against r(alpha^j); zero for clean words; hold/stall behaviour |
| `tb_rs_key_equation` | sigma against prod(1 + alpha^p x) of the known error positions; L; Omega against sigma(1+S) mod x^9; 41-clock latency |
| `tb_rs_chien_search` | root flags exactly at the error positions; odd-part sum; root count; 255-clock duration |
| `tb_rs_forney` | error value equals the injected value at every error position and 0 elsewhere |
| `tb_rs_codeword_buffer` | position-addressed read-back while the other bank is written, N = 255 and N = 100 |
| `tb_rs_error_correction` | XOR correction, flags, and the fail verdict for consistent and inconsistent L/root counts |
| `tb_rs_decoder` | end to end, full size |

`tb_rs_decoder` runs the full-size decoder end to end on 60 words. The words carry 0 to 8
errors, plus some with 9 to 16. The input is mostly back to back, with idle gaps. The
testbench checks:

- every corrected word and every `out_corrected` flag;
- `out_nerr`;
- the fail flag on correctable words;
- that unflagged miscorrections are valid codewords;
- the 45-clock latency and the 298-clock word period.

It also counts how often these happened, and fails if any never did:

- an input stall;
- reception overlapping output;
- an error-free word;
- a word with the full 8 errors;
- a flagged uncorrectable word;
- each branch of the Berlekamp-Massey iteration: Delta = 0, a length change, and a sigma
  update without a length change.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rs_pkg.sv tb/rs_tb_pkg.sv tb/tb_rs_decoder.sv --top-module tb_rs_decoder
./obj_dir/Vtb_rs_decoder
```

To run another testbench, replace `tb_rs_decoder` with its name. The full-size end-to-end
run takes well under a second.
