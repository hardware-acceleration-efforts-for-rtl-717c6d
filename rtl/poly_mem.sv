// poly_mem: the polynomial store of one RPAU, organised as a "virtual memory"
// over 72-bit URAM words.
// A row holds LANES (16) coefficients. Instead of giving each coefficient its
// own 72-bit word (wasting 18 of 72 bits for a 54-bit coefficient), a row is
// packed densely: LANES*COEF_W bits are spread over COLS = ceil(LANES*COEF_W/72)
// URAM columns, so 16 x 54-bit coefficients take 12 columns instead of 16
// (16 x 60-bit ones take 14). The storage is one array of COLS*72-bit rows;
// each packed 72-bit slice stands for one physical URAM column.
// Addressing: a polynomial occupies N/LANES consecutive rows starting at
// slot * (N/LANES), N = 2^logn chosen at run time, so one memory holds
// SLOTS polynomials of 2^14 or SLOTS/2 of 2^15.
// Ports: NR read ports and NW write ports, each (slot, row). Reads return the
// row one cycle after rd_en (registered output, like a URAM). Coefficients
// are returned zero-extended to the QW-bit datapath word, so with COEF_W < QW
// the top QW-COEF_W bits of every read lane are constant zero. When two write
// ports hit the same address in one cycle the higher-numbered port wins; the
// microcode is expected never to do that, and an assertion flags it.
// Following the document: the packing of 54-bit coefficients into 72-bit
// URAM words. This design's choices: the row width, the port count, the slot
// addressing and the default of 40 slots (the document's 49 polynomials at
// N = 2^14 less the 10 key parts that are generated on the fly, plus one NTT
// scratch slot).
module poly_mem
  import medha_pkg::*;
#(
  parameter int unsigned COEF_W  = 54,          // stored bits per coefficient
  parameter int unsigned SLOTS   = 40,          // polynomials of 2^14
  parameter int unsigned LOGN_MX = 14,          // degree the slots are sized for
  parameter int unsigned NR      = 6,
  parameter int unsigned NW      = 5,
  parameter int unsigned URAM_W  = 72
)(
  input  logic                   clk,
  input  logic [3:0]             logn,          // log2 N, 10..15 (at most LOGN_MX+log2 slots)
  input  logic                   rd_en   [NR],
  input  logic [SLOT_W-1:0]      rd_slot [NR],
  input  logic [LOGN_MAX-5:0]    rd_row  [NR],
  output row_t                   rd_data [NR],
  input  logic                   wr_en   [NW],
  input  logic [SLOT_W-1:0]      wr_slot [NW],
  input  logic [LOGN_MAX-5:0]    wr_row  [NW],
  input  row_t                   wr_data [NW]
);
  localparam int unsigned DEPTH = SLOTS << (LOGN_MX - $clog2(LANES));
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned PBITS = LANES * COEF_W;
  localparam int unsigned COLS  = (PBITS + URAM_W - 1) / URAM_W;
  localparam int unsigned WBITS = COLS * URAM_W;

  logic [WBITS-1:0] mem [DEPTH];

  function automatic logic [AW-1:0] phys(logic [SLOT_W-1:0] slot,
                                         logic [LOGN_MAX-5:0] row,
                                         logic [3:0] ln);
    logic [AW+SLOT_W-1:0] base;
    base = (AW+SLOT_W)'(slot) << (ln - 4'd4);
    return AW'(base + (AW+SLOT_W)'(row));
  endfunction

  function automatic logic [WBITS-1:0] pack(row_t d);
    logic [WBITS-1:0] w;
    w = '0;
    for (int l = 0; l < LANES; l++)
      w[l*COEF_W +: COEF_W] = d[l][COEF_W-1:0];
    return w;
  endfunction

  function automatic row_t unpack(logic [WBITS-1:0] w);
    row_t d;
    for (int l = 0; l < LANES; l++)
      d[l] = coef_t'(w[l*COEF_W +: COEF_W]);
    return d;
  endfunction

  always_ff @(posedge clk) begin
    for (int p = 0; p < NW; p++)
      if (wr_en[p]) mem[phys(wr_slot[p], wr_row[p], logn)] <= pack(wr_data[p]);
  end

  for (genvar p = 0; p < NR; p++) begin : g_rd
    always_ff @(posedge clk)
      if (rd_en[p]) rd_data[p] <= unpack(mem[phys(rd_slot[p], rd_row[p], logn)]);
  end

  // A stored coefficient must fit the packed width of this RPAU.
  for (genvar p = 0; p < NW; p++) begin : g_chk
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      if (COEF_W < QW) begin : g_fit
        a_fits: assert property (@(posedge clk)
                  wr_en[p] |-> (wr_data[p][l][QW-1:COEF_W] == '0))
          else $error("poly_mem: coefficient wider than %0d bits on write port %0d", COEF_W, p);
      end
    end
  end

  // Two write ports must not target the same row in one cycle.
  for (genvar p = 0; p < NW; p++) begin : g_wa
    for (genvar r = p + 1; r < NW; r++) begin : g_wb
      a_no_clash: assert property (@(posedge clk)
                    !(wr_en[p] && wr_en[r] &&
                      phys(wr_slot[p], wr_row[p], logn) == phys(wr_slot[r], wr_row[r], logn)))
        else $error("poly_mem: write ports %0d and %0d hit the same row", p, r);
    end
  end

endmodule
