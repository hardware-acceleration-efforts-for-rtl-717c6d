// ntt_butterfly: one modular butterfly of the NTT unit.
// Forward (Cooley-Tukey):    x = a + w*b,  y = a - w*b        (mod q)
// Inverse (Gentleman-Sande): x = a + b,    y = (a - b) * w    (mod q)
// Both share one Barrett multiplier (mod_mul). Stage 1 forms a+b / a-b for
// the inverse form (or passes a, b through), stages 2-3 multiply, stage 4 does
// the final add/subtract of the forward form.
// Timing: one butterfly per cycle, fixed latency of 4 cycles, no stalls.
// The document gives the number of butterflies (16 per NTT unit); the
// butterfly forms and the pipeline split are this design's choices.
module ntt_butterfly
  import medha_pkg::*;
(
  input  logic     clk,
  input  modulus_t md,
  input  logic     inverse,   // 0: Cooley-Tukey, 1: Gentleman-Sande
  input  coef_t    a,
  input  coef_t    b,
  input  coef_t    w,
  output coef_t    x,
  output coef_t    y
);

  coef_t s1_u, s1_v, s1_w;
  logic  s1_inv;
  coef_t s2_u, s3_u;
  logic  s2_inv, s3_inv;
  coef_t prod;

  always_ff @(posedge clk) begin
    s1_inv <= inverse;
    s1_w   <= w;
    if (inverse) begin
      s1_u <= mod_add(a, b, md.q);
      s1_v <= mod_sub(a, b, md.q);
    end else begin
      s1_u <= a;
      s1_v <= b;
    end
  end

  mod_mul u_mul (.clk, .md, .a(s1_v), .b(s1_w), .r(prod));

  always_ff @(posedge clk) begin
    s2_u   <= s1_u;   s2_inv <= s1_inv;
    s3_u   <= s2_u;   s3_inv <= s2_inv;
  end

  always_ff @(posedge clk) begin
    if (s3_inv) begin
      x <= s3_u;
      y <= prod;
    end else begin
      x <= mod_add(s3_u, prod, md.q);
      y <= mod_sub(s3_u, prod, md.q);
    end
  end

endmodule
