// ring_link_if: one hop of the neighbour-to-neighbour chain between RPAUs.
// Carries one row of LANES coefficients per cycle with a valid/ready
// handshake: a row moves in a cycle where valid and ready are both high.
// Rule (asserted): once valid is raised it stays high, with the row
// unchanged, until ready accepts it.
// The document says only that neighbouring RPAUs are connected and that data
// passes along the chain; the row width and the handshake are this design's
// choices.
interface ring_link_if
  import medha_pkg::*;
(
  input logic clk,
  input logic rst_n
);
  logic valid;
  logic ready;
  row_t data;

  modport tx (output valid, output data, input ready);
  modport rx (input valid, input data, output ready);

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
            valid && !ready |=> valid && $stable(data))
    else $error("ring_link_if: row dropped or changed before it was accepted");
endinterface
