# Medha: a microcoded RNS-CKKS accelerator

Homomorphic encryption lets a server compute on data it cannot read. In
RNS-CKKS a ciphertext is a pair of polynomials of degree N = 2^14 or 2^15
with huge coefficients (438 or 546 bits). The residue number system (RNS)
splits each coefficient into residues modulo a set of word-sized primes.
Almost all the work is then independent per prime. The exception is key
switching (relinearization), where every residue has to meet every other.

This design gives each prime its own processing element, the **residue
polynomial arithmetic unit (RPAU)**. Ten RPAUs sit in a ring. Inside an
RPAU there are:

- a 16-butterfly NTT unit;
- a 4-core dyadic (coefficient-wise) unit;
- a packed polynomial memory;
- a link to each neighbour;
- a small microcode sequencer that keeps these units busy at the same time.

Running the NTT and the dyadic unit in parallel during key switching is the
main performance idea. With ten moduli it removes about 30% of the
key-switching cycles (measured numbers below).

Everything is SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

## Parameter sets and the ring of RPAUs

| Set | log2(pQ) | N    | Moduli                                     |
|-----|----------|------|--------------------------------------------|
| A   | 438      | 2^14 | 7 × 54-bit + one 60-bit special prime p     |
| B   | 546      | 2^15 | 9 × 54-bit + p                              |

Set A uses 8 RPAUs. Set B uses all 10.

`medha_top` instantiates `NRPAU = 10` RPAUs:

- RPAUs 0..8 store 54-bit coefficients.
- RPAU 9 stores 60-bit coefficients because it holds p.
- The datapath is 60 bits wide everywhere. Only the storage width differs.

Each RPAU is wired only to its two neighbours:

- Its `tx` link goes to RPAU i+1.
- Its `rx` link comes from RPAU i−1.
- The last RPAU feeds the first, which closes the ring.

No wire crosses more than one hop. This keeps the layout friendly to a
multi-die FPGA and the clock fast. A residue meant for a distant RPAU is
stored and forwarded by every RPAU in between. The microcode does this with
SEND and RECV instructions.

### Multiplication and key switching, as the end-to-end tests run them

Each RPAU i holds residue i of two ciphertexts (c0, c1) and (c0', c1'), in
NTT form. The product has three parts, each formed coefficient by
coefficient:

    d0 = c0·c0'    d1 = c0·c1' + c1·c0'    d2 = c1·c1'

Relinearization folds d2 back into two parts. Every RPAU i needs the d2
residues of all moduli j:

    c0'' = d0 + Σ_j [d2 mod q_j] · KSK0_ij
    c1'' = d1 + Σ_j [d2 mod q_j] · KSK1_ij

The program, identical in every RPAU, runs in three phases.

1. **Tensor product.** Three MULs and one MAC on the dyadic unit. d0 and d1
   go straight into the two accumulators. The inputs sit in slots that are
   reused as NTT and receive buffers afterwards. The whole program
   therefore needs 7 + L slots for L moduli.
2. **Preparation.** Inverse NTT d2 in place, then multiply by 1/N (held in a
   scalar register) to get coefficient form. Send it to the next RPAU. Reduce
   the own copy, NTT it, and receive the neighbour's residue.
3. **One round per modulus.** Each round does four things:
   - forward the residue received last round and receive the next one;
   - reduce the new residue mod q_i (multiply by the scalar 1);
   - start its forward NTT;
   - while that NTT runs, do two accumulations on the previous residue:
     - **MACK** multiplies by the key part KSK0, generated on the fly;
     - **MAC** multiplies by the stored key part KSK1.

The transfers, the NTT and the dyadic work all overlap. The sequencer only
stalls an instruction whose unit is still busy.

## Microcode

`ucode_ctrl` holds `UDEPTH = 1024` words of 64 bits, written by the host. It
issues one instruction per cycle, in order. An instruction that needs a
busy unit stalls the sequencer until that unit is idle. Different units
therefore run concurrently until a WAIT joins them.

Word layout (`medha_pkg::instr_t`, MSB first):

| field | bits | meaning |
|-------|------|---------|
| op    | 4    | opcode |
| dyop  | 3    | dyadic operation |
| dst   | 6    | destination slot |
| a     | 6    | operand slot |
| b     | 6    | operand slot, or scalar register number for MULS |
| c     | 6    | accumulator slot (dyadic) or scratch slot (NTT) |
| imm   | 33   | WAIT mask or seed |

| op | name | action |
|----|------|--------|
| 0  | NOP  | — |
| 1  | NTT  | forward negacyclic NTT of slot a into dst, with c as scratch |
| 2  | INTT | inverse NTT, no 1/N scaling |
| 3  | DYA  | dyadic operation on a, b, c into dst |
| 4  | SEND | stream slot a to the next RPAU |
| 5  | RECV | store the stream from the previous RPAU into dst |
| 6  | WAIT | wait until the units in imm[2:0] are idle: 1 NTT, 2 dyadic, 4 link |
| 7  | SEED | reseed the key generator with imm |
| 15 | HALT | stop and pulse done |

Dyadic operations:

| dyop | name | result |
|------|------|--------|
| 0 | ADD  | a + b |
| 1 | SUB  | a − b |
| 2 | MUL  | a·b |
| 3 | MAC  | c + a·b |
| 4 | MULK | a·K0 |
| 5 | MACK | c + a·K0 |
| 6 | MULS | a·scalar[b] |

Three counters are brought out per RPAU:

- total cycles;
- stalled cycles;
- cycles in which the NTT and dyadic units were both busy.

## NTT unit: sixteen butterflies over rows of sixteen

Memory is organised in **rows of 16 coefficients**. A polynomial of N
coefficients is N/16 consecutive rows. Each cycle the unit reads two rows,
feeds 16 butterflies, and writes two rows.

Transform directions:

- **Forward** is Cooley-Tukey. Input is in natural order, output in
  bit-reversed order.
- **Inverse** is Gentleman-Sande. Input is bit-reversed, output natural. It
  does not scale by 1/N; a MULS does that afterwards.
- Both are negacyclic. The powers of ψ, a 2N-th root of unity, are folded
  into the twiddles. The twiddle for the butterfly on (j, j+t) is
  `table[N/(2t) + j/(2t)]`. The forward table holds ψ^bitrev(k) and the
  inverse table holds ψ^−bitrev(k). The host loads both into `twiddle_mem`.

How a stage with butterfly span t maps onto rows:

- **t ≥ 16.** Row r is paired lane by lane with row r + t/16. The 16
  butterflies all use one twiddle.
- **t < 16.** Both halves of each butterfly lie in the same row. The unit
  reads rows 2k and 2k+1 together and picks the 16 pairs from their 32
  coefficients, each pair with its own twiddle. The twiddle memory returns
  a whole row of 16 entries per read.

Each stage streams N/32 row pairs. It ping-pongs between `dst` and the
scratch slot, and the stage count decides which one it starts in, so the
result always ends in `dst`. `src = dst = scratch` gives an in-place
transform.

The pipeline drains between stages. One transform therefore takes
**log2(N)·(N/32 + 6) + 1 cycles**:

- 2,881 cycles at N = 2^14;
- 6,001 cycles at N = 2^15.

The testbench checks this number exactly.

`ntt_butterfly` contains a Barrett multiplier (`mod_mul`, 2 cycles) and has a
4-cycle latency. Each modulus needs three constants, which the host writes
as configuration registers:

- q;
- k, the bit length of q;
- mu = floor(2^(2k)/q).

## Dyadic unit and on-the-fly keys

`dyadic_unit` has four modular multiply/add cores. It reads up to three rows
(a, b, c) every four cycles and handles them as four groups of four
coefficients. It writes one row every four cycles. A full polynomial takes
**N/4 + 4 cycles**.

The key-switching key has two parts:

- **KSK0** is uniformly random. It is never stored. `ksk_prng` regenerates it
  from a seed whenever it is needed.
- **KSK1** depends on the secret key. It is loaded by the host into memory.

`ksk_prng` details:

- Four xorshift64* streams, one per core. Stream i is seeded with
  `seed ^ (i+1)·0x9E3779B97F4A7C15`.
- Each 64-bit output r maps to `(r·q) >> 64`, which lies in [0, q).
- The RPAU builds the seed as `{ID[15:0], 15'b0, imm}`. The same program
  therefore gives every RPAU its own key stream.

Not storing KSK0 frees one polynomial slot per modulus in every RPAU.

xorshift64* is not a cryptographic generator. A deployment needs one that is.
KSK0 is reached only through `ksk_prng`, so that module can be replaced
without touching the rest.

## Packed polynomial memory

FPGA UltraRAM words are 72 bits wide. Storing one 54-bit coefficient per
word wastes a quarter of the memory. `poly_mem` instead packs a whole row
(16 × COEF_W bits) into ceil(16·COEF_W/72) words:

- 54-bit coefficients: 12 words per row instead of 16;
- 60-bit coefficients: 14 words per row.

The array is declared as `WORDS·72` bits wide, so a synthesis tool maps it to
that many 72-bit memory columns.

Addressing:

- Slot s begins at row `s << (log2 N − 4)`.
- The memory holds `SLOTS = 40` polynomials of 2^14 coefficients, or 20 of
  2^15. Changing `log2 N` (configuration register 3) changes the slot size
  without any other change.

Ports and timing:

- Reads take one cycle.
- The RPAU wires 7 read ports and 5 write ports:
  - NTT: 2 reads, 2 writes;
  - dyadic unit: 3 reads, 1 write;
  - link unit: 1 read, 1 write;
  - host: 1 read, 1 write.
- Assertions check that a written coefficient fits COEF_W and that no two
  write ports hit the same row in the same cycle.

## Ring links

`ring_link_if` is a row-wide link: one valid, one ready, and 16 × 60 data bits.
It carries an assertion that valid and data hold while ready is low.

`link_unit` has two independent engines:

- **Send** streams the N/16 rows of a slot. A two-entry buffer absorbs the
  memory latency. With ready high a send takes **N/16 + 3 cycles**: 1,027 at
  N = 2^14.
- **Receive** writes each accepted row straight into its slot.

A receiver that has not yet issued RECV holds its sender back. The end-to-end
test makes this happen on purpose and counts it.

## Host interface of `medha_top`

| Port | Use |
|------|-----|
| `sel`, `bcast` | Choose the RPAU for a host access, or write to all RPAUs (typical for microcode). |
| `cfg_we/addr/data` | Registers: 0 q, 1 mu, 2 k, 3 log2 N (reset 14), 4–7 scalar[0..3]. |
| `tw_we/tab/idx/data` | One twiddle entry. `tab` 0 is the forward table, 1 the inverse. |
| `uc_we/addr/data` | One microcode word. |
| `h_we/h_re/h_slot/h_row/h_wdata/h_rdata` | Memory rows. `h_rdata` is valid one cycle after `h_re`. |
| `start` | Start every RPAU's program at address 0. |
| `running`, `done` | `running` is high while any RPAU runs. `done` pulses when the last one halts. |
| `cnt_cycles/cnt_stall/cnt_overlap` | Per-RPAU counters. |

The top's ports are plain signals. The PCIe or FPGA shell would connect to
them.

## Verification

Every block has a testbench. Each compares the block against a model written
independently in the testbench, and checks cycle counts where a latency is
defined.

| Testbench | What it checks |
|-----------|----------------|
| `tb_ntt_butterfly` | Random butterflies of both kinds, against 128-bit arithmetic. |
| `tb_ntt_unit` | N = 2^10 forward NTT against direct evaluation at the odd powers of ψ. Inverse round trip. Exact cycle count. (In-place transforms are exercised by the end-to-end tests.) |
| `tb_dyadic_unit` | All seven operations, including dst equal to a source. N/4 + 4 latency. |
| `tb_ksk_prng` | Against a software xorshift64* model (`prng_model_pkg`). |
| `tb_poly_mem` | All ports, both widths, random data. |
| `tb_link_unit` | Random back-pressure. Full-rate timing. |
| `tb_ucode_ctrl` | Stalls, WAIT masks, overlap and stall counters, with stand-in units. |
| `tb_rpau` | One RPAU with its link looped back, running a program. |
| `tb_medha_top` | Multiplication with relinearization across a 4-RPAU ring at N = 2^10, then again at N = 2^11 after changing the degree register. Every coefficient of c0'' and c1'' is checked in every RPAU. |
| `tb_medha_full` | The same workload on the default top: 10 RPAUs, N = 2^14. |
| `tb_medha_n15` | The same workload at N = 2^15, the larger parameter set. Default memory, twiddle and microcode sizes, with the ring cut to 4 RPAUs. |

The two end-to-end testbenches share `tb/medha_e2e.svh`. They count:

- NTT/dyadic overlap cycles;
- sequencer stalls;
- link back-pressure cycles;
- generated key coefficients;
- inverse NTTs;
- forward NTTs;
- degree changes.

A mechanism that never happens counts as a failure. Each testbench also
reruns the workload with a WAIT after every NTT, which removes the overlap,
and compares cycle counts. Key switching runs from the inverse NTT of d2 to
the end of the program. The tensor product in front of it takes the same
time in both schedules.

| Configuration | Key switching, overlapped | Key switching, serial | Saving | Whole multiplication, overlapped / serial |
|---------------|------------|--------|--------|------------|
| 10 RPAUs, N = 2^14 | 141,708 | 206,985 | 31.5% | 158,113 / 223,390 (29.2%) |
| 4 RPAUs, N = 2^15 | 137,492 | 183,845 | 25.2% | 170,281 / 216,634 (21.4%) |
| 4 RPAUs, N = 2^10 | 4,184 | 5,327 | 21.5% | 5,229 / 6,372 (17.9%) |

The saving grows with the number of moduli because each round's NTT hides
behind that round's two accumulations. It comes close to the roughly 40%
reduction reported for the original design.

### Running a testbench

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ntt_unit \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/medha_pkg.sv tb/tb_ntt_unit.sv
    ./obj_dir/Vtb_ntt_unit

Replace the testbench name as needed. Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

Run times:

- `tb_medha_full` simulates for about two minutes.
- `tb_medha_n15` simulates for about half a minute.
- The others take seconds.

The testbenches find their moduli and roots of unity in tables inside the
include file. These are NTT-friendly primes, q ≡ 1 mod 2^16:

- 54-bit: 0x3fffffffd60001, 0x3fffffffca0001, and so on;
- 60-bit: 0xffffffffffc0001.

## Where this design fills in detail

The overall structure is fixed:

- one RPAU per RNS modulus;
- ten RPAUs;
- 54/60-bit moduli;
- a 16-butterfly NTT unit and a 4-core dyadic unit per RPAU;
- on-the-fly KSK0;
- packing into 72-bit memory words;
- neighbour-only links along a chain;
- microcode control;
- running the NTT and the dyadic unit in parallel during key switching.

The following are this implementation's own choices:

- **Instruction set and encoding.** The opcodes, the 64-bit word, the WAIT
  mask and in-order issue with per-unit stalls.
- **NTT.** The CT/GS algorithm pair, the row mapping, draining the pipeline
  between stages, and host-loaded twiddle tables.
- **Arithmetic.** Barrett reduction and the pipeline depths: 2 cycles for the
  multiplier, 4 for the butterfly.
- **Dyadic operations.** The set of seven and the scalar registers.
- **Key generator.** xorshift64* streams and the seed format.
- **Memory.** Row-wide packing, 40 slots, the port split, and slots that
  halve when N doubles.
- **Links.** Row-wide valid/ready links with store and forward through
  memory, and the ring closure from the last RPAU back to the first.
- **Host.** The whole host bus.

The following are not provided:

- **Generation of KSK1 from KSK0 and the secret key.** This design expects
  KSK1 in memory.
- **FPGA macros and platform.** URAM/BRAM primitives, the platform shell,
  and placement across the dies.
- **Application programs.** Only multiplication with relinearization is
  written as microcode. The
  logistic-regression inference used to evaluate the original design is not.

Memory budget:

- At N = 2^14 a full application needs 49 polynomials per RPAU, counting
  ciphertext residues and keys. 10 of them are KSK0 polynomials, which are
  generated rather than stored. The 40 slots hold the remaining 39.
- At N = 2^15 there are 20 slots. The multiplication program needs 7 + L of
  them (17 for L = 10 moduli).
