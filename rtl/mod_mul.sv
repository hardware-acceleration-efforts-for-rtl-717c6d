// mod_mul: pipelined modular multiplier, r = a * b mod q, for one RNS modulus.
// Barrett reduction with a per-modulus bit length k (q < 2^k) and the
// precomputed constant mu = floor(2^(2k) / q): the quotient estimate
// floor(z * mu / 2^(2k)) is at most one short for any z < 2^(2k), so one
// conditional subtraction finishes the reduction. This covers the 54-bit and
// 60-bit moduli of the design and also reduces any single value below 2^(2k)
// (multiply by 1), which the key-switching flow uses to move a residue to
// another modulus.
// Timing: fully pipelined, one result per cycle, latency 2 cycles
// (stage 1 registers the product, stage 2 the reduced value). No stall input:
// callers shift their own side-band signals by the same 2 cycles.
// The document does not say how its modular multipliers reduce; Barrett is
// this design's choice.
module mod_mul
  import medha_pkg::*;
(
  input  logic     clk,
  input  modulus_t md,     // static while in use
  input  coef_t    a,
  input  coef_t    b,
  output coef_t    r
);
  localparam int unsigned ZW = 2 * QW;

  logic [ZW-1:0]        z_q;
  logic [ZW+QW:0]       zm;
  logic [ZW-1:0]        qhat;
  logic [QW+1:0]        rem;

  always_ff @(posedge clk) z_q <= ZW'(a) * ZW'(b);

  always_comb begin
    zm   = (ZW+QW+1)'(z_q) * (ZW+QW+1)'(md.mu);
    qhat = ZW'(zm >> {md.k, 1'b0});
    rem  = (QW+2)'(z_q) - (QW+2)'((QW+2)'(qhat) * (QW+2)'(md.q));
  end

  always_ff @(posedge clk)
    r <= (rem >= (QW+2)'(md.q)) ? coef_t'(rem - (QW+2)'(md.q)) : coef_t'(rem);

endmodule
