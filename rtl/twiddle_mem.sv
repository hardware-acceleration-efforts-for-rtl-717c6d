// twiddle_mem: twiddle-factor store of the NTT unit.
// Two tables of NMAX entries each: table 0 holds the powers of psi (a
// primitive 2N-th root of unity mod q) in bit-reversed order, psi_rev[k] =
// psi^bitrev(k), used by the forward NTT; table 1 holds the same for psi^-1,
// used by the inverse NTT. The host writes one entry per cycle. Reads return a
// whole row of LANES consecutive entries, one cycle after rd_en, which is all
// one NTT step needs (every butterfly of a step uses twiddles from a single
// aligned group of 16).
// The document does not say how twiddles are produced; a host-loaded table is
// this design's choice.
module twiddle_mem
  import medha_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_MAX
)(
  input  logic                    clk,
  input  logic                    wr_en,
  input  logic                    wr_tab,    // 0: forward, 1: inverse
  input  logic [LOGN-1:0]         wr_idx,
  input  coef_t                   wr_data,
  input  logic                    rd_en,
  input  logic                    rd_tab,
  input  logic [LOGN-5:0]         rd_row,
  output row_t                    rd_data
);
  row_t tab [2][1 << (LOGN - 4)];

  always_ff @(posedge clk)
    if (wr_en) tab[wr_tab][wr_idx[LOGN-1:4]][wr_idx[3:0]] <= wr_data;

  always_ff @(posedge clk)
    if (rd_en) rd_data <= tab[rd_tab][rd_row];

endmodule
