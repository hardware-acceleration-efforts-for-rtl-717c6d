// ntt_unit: negacyclic number-theoretic transform of one residue polynomial
// with LANES (16) butterflies working in parallel.
// Forward: iterative Cooley-Tukey, natural-order input, bit-reversed output,
// stage distances t = N/2 ... 1. Inverse: Gentleman-Sande, bit-reversed input,
// natural-order output, t = 1 ... N/2; the final 1/N scaling is left to the
// dyadic unit (scalar multiply). The twiddle of butterfly (j, j+t) in either
// direction is table[N/(2t) + j/(2t)] of twiddle_mem.
// Memory mapping: a polynomial is N/16 rows of 16 coefficients. Each step
// reads two rows and writes two rows: for t >= 16 the rows ra and ra + t/16
// are paired lane by lane (one twiddle for all 16 butterflies); for t < 16
// the rows 2k and 2k+1 each supply 8 butterflies internally. A stage takes
// N/32 steps, one per cycle.
// Ping-pong: stage 0 reads slot src, each stage writes either dst or tmp so
// that the last stage writes dst; src is left intact when it differs from both.
// Between stages the unit waits for its pipeline to drain (no read-after-write
// hazard), so a transform takes logn * (N/32 + 6) + 1 cycles.
// Interface: start pulses with the command while busy is low; done pulses in
// the cycle after the last write. Memory ports: two read ports (row one cycle
// after the request) and two write ports; twiddle read port likewise.
// From the document: 16 butterflies per NTT unit. This design's choices: the
// row mapping, the ping-pong scheme and the drain between stages.
module ntt_unit
  import medha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  modulus_t             md,
  input  logic [3:0]           logn,
  input  logic                 start,
  input  logic                 inverse,
  input  logic [SLOT_W-1:0]    src,
  input  logic [SLOT_W-1:0]    dst,
  input  logic [SLOT_W-1:0]    tmp,
  output logic                 busy,
  output logic                 done,
  // memory
  output logic                 rd_en   [2],
  output logic [SLOT_W-1:0]    rd_slot [2],
  output logic [LOGN_MAX-5:0]  rd_row  [2],
  input  row_t                 rd_data [2],
  output logic                 wr_en   [2],
  output logic [SLOT_W-1:0]    wr_slot [2],
  output logic [LOGN_MAX-5:0]  wr_row  [2],
  output row_t                 wr_data [2],
  // twiddles
  output logic                 tw_en,
  output logic                 tw_tab,
  output logic [LOGN_MAX-5:0]  tw_row,
  input  row_t                 tw_data
);
  localparam int unsigned RW   = LOGN_MAX - 4;  // row index width
  localparam int unsigned BLAT = 4;             // butterfly latency
  localparam int unsigned PL   = BLAT + 1;      // issue -> write

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e st;

  logic [3:0]        stage;     // 0 .. logn-1
  logic [RW-1:0]     step;      // 0 .. N/32-1
  logic [2:0]        dcnt;
  logic              inv_q;
  logic [SLOT_W-1:0] dst_q, tmp_q, rslot;

  // log2 of the butterfly distance in this stage
  logic [3:0] lt;
  assign lt = inv_q ? stage : 4'(logn - 4'd1 - stage);

  logic [RW-1:0] last_step;
  assign last_step = RW'((1 << (logn - 4'd5)) - 1);

  // slot written by stage s: dst when (logn-1-s) is even
  function automatic logic [SLOT_W-1:0] wslot_of(logic [3:0] s, logic [3:0] ln,
                                                 logic [SLOT_W-1:0] d, logic [SLOT_W-1:0] t);
    logic [3:0] r;
    r = 4'(ln - 4'd1 - s);
    return r[0] ? t : d;
  endfunction

  // row pair of a step
  logic [RW-1:0] ra, rb;
  always_comb begin
    if (lt >= 4'd4) begin
      ra = RW'(((step >> (lt - 4'd4)) << (lt - 4'd3)) | (step & RW'((1 << (lt - 4'd4)) - 1)));
      rb = RW'(ra + RW'(1 << (lt - 4'd4)));
    end else begin
      ra = RW'({step, 1'b0});
      rb = RW'({step, 1'b1});
    end
  end

  // twiddle indices: N/(2t) + j/(2t)
  logic [LOGN_MAX-1:0] tw_base;
  logic [3:0]          tw_lane [LANES];
  logic [LOGN_MAX:0]   jj;
  logic [LOGN_MAX-1:0] tw_idx0;   // index of lane 0; all lanes share its row
  always_comb begin
    tw_base = LOGN_MAX'((1 << logn) >> (lt + 4'd1));
    tw_idx0 = tw_base + LOGN_MAX'(((LOGN_MAX+1)'(ra) << 4) >> (lt + 4'd1));
    for (int p = 0; p < LANES; p++) begin
      if (lt >= 4'd4) begin
        jj = (LOGN_MAX+1)'(ra) << 4;
      end else begin
        jj = ((LOGN_MAX+1)'(p >= 8 ? rb : ra) << 4)
           + (LOGN_MAX+1)'((((p % 8) >> lt) << (lt + 4'd1)) | ((p % 8) & ((1 << lt) - 1)));
      end
      tw_lane[p] = 4'(tw_base + LOGN_MAX'(jj >> (lt + 4'd1)));
    end
  end

  // ---------------------------------------------------------------- control
  logic issue;
  assign issue = (st == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; stage <= '0; step <= '0; dcnt <= '0; done <= 1'b0;
      inv_q <= 1'b0; dst_q <= '0; tmp_q <= '0; rslot <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_RUN; stage <= '0; step <= '0;
          inv_q <= inverse; dst_q <= dst; tmp_q <= tmp; rslot <= src;
        end
        S_RUN: begin
          if (step == last_step) begin
            step <= '0; st <= S_DRAIN; dcnt <= 3'(PL);
          end else step <= step + 1'b1;
        end
        S_DRAIN: begin
          if (dcnt == 3'd0) begin
            if (stage == 4'(logn - 4'd1)) begin
              st <= S_IDLE; done <= 1'b1;
            end else begin
              rslot <= wslot_of(stage, logn, dst_q, tmp_q);
              stage <= stage + 1'b1;
              st <= S_RUN;
            end
          end else dcnt <= dcnt - 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = (st != S_IDLE);

  // ------------------------------------------------------------ read issue
  always_comb begin
    rd_en[0] = issue;  rd_slot[0] = rslot;  rd_row[0] = ra;
    rd_en[1] = issue;  rd_slot[1] = rslot;  rd_row[1] = rb;
    tw_en    = issue;  tw_tab     = inv_q;  tw_row    = RW'(tw_idx0 >> 4);
  end

  // ------------------------------------------------------ side-band pipeline
  typedef struct packed {
    logic              v;
    logic [3:0]        lt;
    logic [RW-1:0]     ra, rb;
    logic [SLOT_W-1:0] ws;
    logic [LANES*4-1:0] lanes;
  } sb_t;
  sb_t sb [PL];
  sb_t sb_in;

  always_comb begin
    sb_in.v  = issue;
    sb_in.lt = lt;
    sb_in.ra = ra;
    sb_in.rb = rb;
    sb_in.ws = wslot_of(stage, logn, dst_q, tmp_q);
    for (int p = 0; p < LANES; p++) sb_in.lanes[p*4 +: 4] = tw_lane[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PL; i++) sb[i] <= '0;
    end else begin
      sb[0] <= sb_in;
      for (int i = 1; i < PL; i++) sb[i] <= sb[i-1];
    end
  end

  // ---------------------------------------------------- butterfly operands
  coef_t bf_a [LANES], bf_b [LANES], bf_w [LANES], bf_x [LANES], bf_y [LANES];

  // in-row position of butterfly q (0..7) for distance 2^l < 16
  function automatic logic [3:0] pos_of(int q, logic [3:0] l);
    return 4'((((q >> l) << (l + 4'd1)) | (q & ((1 << l) - 1))));
  endfunction

  always_comb begin
    for (int p = 0; p < LANES; p++) begin
      bf_w[p] = tw_data[sb[0].lanes[p*4 +: 4]];
      if (sb[0].lt >= 4'd4) begin
        bf_a[p] = rd_data[0][p];
        bf_b[p] = rd_data[1][p];
      end else begin
        bf_a[p] = rd_data[p / 8][pos_of(p % 8, sb[0].lt)];
        bf_b[p] = rd_data[p / 8][4'(pos_of(p % 8, sb[0].lt) + 4'(1 << sb[0].lt))];
      end
    end
  end

  for (genvar p = 0; p < LANES; p++) begin : g_bf
    ntt_butterfly u_bf (.clk, .md, .inverse(inv_q), .a(bf_a[p]), .b(bf_b[p]), .w(bf_w[p]),
                        .x(bf_x[p]), .y(bf_y[p]));
  end

  // ------------------------------------------------------------- write back
  sb_t so;
  assign so = sb[PL-1];

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      wr_en[i]   = so.v;
      wr_slot[i] = so.ws;
      wr_data[i] = '0;
    end
    wr_row[0] = so.ra;
    wr_row[1] = so.rb;
    for (int p = 0; p < LANES; p++) begin
      if (so.lt >= 4'd4) begin
        wr_data[0][p] = bf_x[p];
        wr_data[1][p] = bf_y[p];
      end else begin
        wr_data[p / 8][pos_of(p % 8, so.lt)] = bf_x[p];
        wr_data[p / 8][4'(pos_of(p % 8, so.lt) + 4'(1 << so.lt))] = bf_y[p];
      end
    end
  end

endmodule
