// medha_top: the accelerator, NRPAU residue polynomial arithmetic units, one
// per RNS modulus, joined in a ring in which each RPAU talks only to its two
// neighbours (tx of RPAU i feeds rx of RPAU i+1, the last feeds the first).
// Key switching needs every residue of d2 in every RPAU; a program moves them
// round the ring by store and forward, so no wire crosses more than one hop.
// All RPAUs run their programs in parallel from one start pulse.
// Moduli: RPAUs 0 .. NRPAU-2 store 54-bit coefficients, the last RPAU, which
// holds the 60-bit special modulus p, stores 60-bit ones (438 = 7*54 + 60 and
// 546 = 9*54 + 60 bits for the two parameter sets).
// Host bus: every host access (configuration, twiddles, microcode, memory
// rows) goes to the RPAU chosen by sel, or to all of them when bcast is set
// (useful for microcode). h_rdata returns the row of the RPAU selected when
// h_re was given, one cycle later. running is high while any RPAU runs; done
// pulses once all have halted. The per-RPAU counters are brought out as arrays.
// From the document: 10 RPAUs, one per RNS base, neighbour-only connections
// along a chain, 54/60-bit moduli. This design's choices: closing the chain
// into a ring, the host bus and the start/done handshake.
module medha_top
  import medha_pkg::*;
#(
  parameter int unsigned NRPAU   = 10,
  parameter int unsigned SLOTS   = 40,
  parameter int unsigned LOGN_MX = 14,
  parameter int unsigned TW_LOGN = LOGN_MAX,
  parameter int unsigned UDEPTH  = 1024,
  parameter int unsigned COEF_W  = 54,    // storage width of the ordinary moduli
  parameter int unsigned COEF_WP = 60     // storage width of the special modulus p
)(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [3:0]                sel,
  input  logic                      bcast,
  input  logic                      cfg_we,
  input  logic [2:0]                cfg_addr,
  input  logic [63:0]               cfg_data,
  input  logic                      tw_we,
  input  logic                      tw_tab,
  input  logic [TW_LOGN-1:0]        tw_idx,
  input  coef_t                     tw_data,
  input  logic                      uc_we,
  input  logic [$clog2(UDEPTH)-1:0] uc_addr,
  input  instr_t                    uc_data,
  input  logic                      h_we,
  input  logic                      h_re,
  input  logic [SLOT_W-1:0]         h_slot,
  input  logic [LOGN_MAX-5:0]       h_row,
  input  row_t                      h_wdata,
  output row_t                      h_rdata,
  input  logic                      start,
  output logic                      running,
  output logic                      done,
  output logic [31:0]               cnt_cycles  [NRPAU],
  output logic [31:0]               cnt_stall   [NRPAU],
  output logic [31:0]               cnt_overlap [NRPAU]
);
  logic r_run [NRPAU], r_done [NRPAU];
  logic tx_valid [NRPAU], tx_ready [NRPAU];
  row_t tx_data [NRPAU];
  row_t rdata [NRPAU];
  logic [3:0] rsel;

  for (genvar i = 0; i < NRPAU; i++) begin : g_rpau
    localparam int unsigned PREV = (i + NRPAU - 1) % NRPAU;
    logic hit;
    assign hit = bcast || (sel == 4'(i));

    rpau #(
      .ID(i), .COEF_W(i == NRPAU - 1 ? COEF_WP : COEF_W), .SLOTS(SLOTS),
      .LOGN_MX(LOGN_MX), .TW_LOGN(TW_LOGN), .UDEPTH(UDEPTH)
    ) u_rpau (
      .clk, .rst_n,
      .cfg_we(cfg_we && hit), .cfg_addr, .cfg_data,
      .tw_we(tw_we && hit), .tw_tab, .tw_idx, .tw_data,
      .uc_we(uc_we && hit), .uc_addr, .uc_data,
      .h_we(h_we && hit), .h_re(h_re && hit), .h_slot, .h_row, .h_wdata, .h_rdata(rdata[i]),
      .start, .running(r_run[i]), .done(r_done[i]),
      .cnt_cycles(cnt_cycles[i]), .cnt_stall(cnt_stall[i]), .cnt_overlap(cnt_overlap[i]),
      .tx_valid(tx_valid[i]), .tx_ready(tx_ready[i]), .tx_data(tx_data[i]),
      .rx_valid(tx_valid[PREV]), .rx_ready(tx_ready[PREV]), .rx_data(tx_data[PREV]));
  end

  always_ff @(posedge clk) if (h_re) rsel <= sel;
  assign h_rdata = rdata[rsel];

  // running / done over all RPAUs
  logic any_run, was_run;
  always_comb begin
    any_run = 1'b0;
    for (int i = 0; i < NRPAU; i++) any_run |= r_run[i];
  end
  assign running = any_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      was_run <= 1'b0; done <= 1'b0;
    end else begin
      was_run <= any_run;
      done    <= was_run && !any_run;
    end
  end

endmodule
