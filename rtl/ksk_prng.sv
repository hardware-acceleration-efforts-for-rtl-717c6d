// ksk_prng: on-the-fly generator of the uniform key-switching key part KSK_0.
// Instead of storing KSK_0 (one polynomial per RNS base pair), the RPAU
// regenerates it from a seed each time key switching needs it, which frees
// memory for other polynomials. LANES_OUT independent xorshift64* streams
// each give one 64-bit word per step; a word r becomes a coefficient in
// [0, q) by the multiply-shift map (r * q) >> 64.
// Interface: load (one cycle) sets the streams from seed; lane i starts from
// seed XOR (i+1)*0x9E3779B97F4A7C15 (forced non-zero). The four outputs
// val[i] are valid at all times (combinational in the state); take advances
// every stream by one step at the clock edge. So the dyadic unit can consume
// four key coefficients per cycle.
// From the document: KSK_0 <- PRNG(seeds). The choice of generator, the
// mapping to [0, q) and the seeding are this design's own.
module ksk_prng
  import medha_pkg::*;
#(
  parameter int unsigned LANES_OUT = DCORES
)(
  input  logic          clk,
  input  logic          rst_n,
  input  coef_t         q,
  input  logic          load,
  input  logic [63:0]   seed,
  input  logic          take,
  output coef_t         val [LANES_OUT]
);
  localparam logic [63:0] GOLD = 64'h9E3779B97F4A7C15;
  localparam logic [63:0] MULT = 64'h2545F4914F6CDD1D;

  logic [63:0] st [LANES_OUT];

  function automatic logic [63:0] step(logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x >> 12);
    y = y ^ (y << 25);
    y = y ^ (y >> 27);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES_OUT; i++) st[i] <= GOLD ^ 64'(i + 1);
    end else if (load) begin
      for (int i = 0; i < LANES_OUT; i++) begin
        logic [63:0] s;
        s = seed ^ (64'(i + 1) * GOLD);
        st[i] <= (s == '0) ? GOLD : s;
      end
    end else if (take) begin
      for (int i = 0; i < LANES_OUT; i++) st[i] <= step(st[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < LANES_OUT; i++) begin
      logic [63:0]    r;
      logic [64+QW-1:0] p;
      r = st[i] * MULT;
      p = (64+QW)'(r) * (64+QW)'(q);
      val[i] = coef_t'(p >> 64);
    end
  end

endmodule
