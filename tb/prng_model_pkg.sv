// prng_model_pkg: reference model of the key PRNG used by the testbenches
// (xorshift64* streams mapped to [0, q) by (r * q) >> 64, lane i seeded with
// seed XOR (i+1)*0x9E3779B97F4A7C15).
package prng_model_pkg;
  localparam logic [63:0] GOLD = 64'h9E3779B97F4A7C15;
  localparam logic [63:0] MULT = 64'h2545F4914F6CDD1D;

  function automatic logic [63:0] seed_lane(logic [63:0] seed, int i);
    logic [63:0] s;
    s = seed ^ (64'(i + 1) * GOLD);
    return (s == 0) ? GOLD : s;
  endfunction

  function automatic logic [63:0] next(logic [63:0] x);
    x ^= x >> 12; x ^= x << 25; x ^= x >> 27;
    return x;
  endfunction

  function automatic logic [63:0] out(logic [63:0] x, logic [63:0] q);
    logic [127:0] p;
    logic [63:0]  r;
    r = x * MULT;
    p = 128'(r) * 128'(q);
    return p[127:64];
  endfunction
endpackage
