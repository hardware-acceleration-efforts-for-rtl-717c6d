// dyadic_unit: coefficient-wise (dyadic) arithmetic on residue polynomials,
// with DCORES (4) modular cores working side by side.
// Operations (dyop_e): a+b, a-b, a*b, c+a*b, a*K0, c+a*K0 and a*scalar, all
// mod q. K0 is a coefficient of the key part KSK_0, taken from the key PRNG
// four at a time, so key switching never reads KSK_0 from memory. c+a*b
// covers the sums of products of ciphertext multiplication and
// relinearization.
// Streaming: the unit walks the N/4 groups of 4 coefficients; at the first
// group of each 16-coefficient row it reads rows a, b and c (one cycle
// latency) and keeps them; each core reads its lane, multiplies with a
// Barrett mod_mul (2 cycles) and adds or subtracts in a final stage; the
// fourth group of a row completes the output row, written in the same cycle.
// A row is read 3 cycles before it is written and the next row is read before
// that write, so dst may equal a, b or c.
// Timing: start with busy low; done pulses N/4 + 4 cycles after start.
// From the document: a dyadic unit of 4 cores that runs beside the NTT unit.
// This design's choices: the operation set, the operand streaming and the
// pipeline.
module dyadic_unit
  import medha_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  modulus_t             md,
  input  logic [3:0]           logn,
  input  logic                 start,
  input  ucmd_t                cmd,
  input  coef_t                scalar [4],
  output logic                 busy,
  output logic                 done,
  // memory: read ports a, b, c; one write port
  output logic                 rd_en   [3],
  output logic [SLOT_W-1:0]    rd_slot [3],
  output logic [LOGN_MAX-5:0]  rd_row  [3],
  input  row_t                 rd_data [3],
  output logic                 wr_en,
  output logic [SLOT_W-1:0]    wr_slot,
  output logic [LOGN_MAX-5:0]  wr_row,
  output row_t                 wr_data,
  // key PRNG
  output logic                 k_take,
  input  coef_t                k_val [DCORES]
);
  localparam int unsigned GW  = LOGN_MAX - 2;   // group index width
  localparam int unsigned RW  = LOGN_MAX - 4;
  localparam int unsigned GPR = LANES / DCORES; // groups per row (4)

  ucmd_t         cq;
  logic          run;
  logic [GW-1:0] grp;
  logic [GW-1:0] last_grp;
  assign last_grp = GW'((1 << (logn - 4'd2)) - 1);

  // stage 1 (cycle after issue), stage 2, stage 3 (write)
  logic          v1, v2, v3;
  logic [GW-1:0] g1, g2, g3;
  logic          fin1, fin2, fin3;
  row_t          ra_q, rb_q, rc_q;
  coef_t         xa [DCORES], xb [DCORES], xc [DCORES], mb [DCORES], prod [DCORES];
  coef_t         a2 [DCORES], b2 [DCORES], c2 [DCORES];
  coef_t         a3 [DCORES], b3 [DCORES], c3 [DCORES];
  coef_t         res [DCORES];
  row_t          obuf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; grp <= '0; cq <= '0; done <= 1'b0;
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; fin1 <= 1'b0; fin2 <= 1'b0; fin3 <= 1'b0;
      g1 <= '0; g2 <= '0; g3 <= '0;
    end else begin
      done <= fin3;
      if (!run && start && !busy) begin
        run <= 1'b1; grp <= '0; cq <= cmd;
      end else if (run) begin
        if (grp == last_grp) run <= 1'b0;
        grp <= grp + 1'b1;
      end
      v1 <= run;  g1 <= grp; fin1 <= run && (grp == last_grp);
      v2 <= v1;   g2 <= g1;  fin2 <= fin1;
      v3 <= v2;   g3 <= g2;  fin3 <= fin2;
    end
  end
  assign busy = run | v1 | v2 | v3 | done;

  // reads at the first group of each row
  always_comb begin
    rd_en[0] = run && (grp[1:0] == 2'd0); rd_slot[0] = cq.a; rd_row[0] = RW'(grp >> 2);
    rd_en[1] = run && (grp[1:0] == 2'd0); rd_slot[1] = cq.b; rd_row[1] = RW'(grp >> 2);
    rd_en[2] = run && (grp[1:0] == 2'd0); rd_slot[2] = cq.c; rd_row[2] = RW'(grp >> 2);
  end

  // stage 1: operand selection
  logic uses_k;
  assign uses_k = (cq.dyop == DY_MULK) || (cq.dyop == DY_MACK);
  assign k_take = v1 && uses_k;

  always_ff @(posedge clk)
    if (v1 && g1[1:0] == 2'd0) begin
      ra_q <= rd_data[0]; rb_q <= rd_data[1]; rc_q <= rd_data[2];
    end

  always_comb begin
    for (int i = 0; i < DCORES; i++) begin
      int l;
      l = int'(g1[1:0]) * DCORES + i;
      xa[i] = (g1[1:0] == 2'd0) ? rd_data[0][l] : ra_q[l];
      xb[i] = (g1[1:0] == 2'd0) ? rd_data[1][l] : rb_q[l];
      xc[i] = (g1[1:0] == 2'd0) ? rd_data[2][l] : rc_q[l];
      case (cq.dyop)
        DY_MULK, DY_MACK: mb[i] = k_val[i];
        DY_MULS:          mb[i] = scalar[cq.b[1:0]];
        default:          mb[i] = xb[i];
      endcase
    end
  end

  for (genvar i = 0; i < DCORES; i++) begin : g_core
    mod_mul u_mul (.clk, .md, .a(xa[i]), .b(mb[i]), .r(prod[i]));
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DCORES; i++) begin
      a2[i] <= xa[i]; b2[i] <= xb[i]; c2[i] <= xc[i];
      a3[i] <= a2[i]; b3[i] <= b2[i]; c3[i] <= c2[i];
    end
  end

  // stage 3: final add / subtract, row assembly and write
  always_comb begin
    for (int i = 0; i < DCORES; i++) begin
      case (cq.dyop)
        DY_ADD:           res[i] = mod_add(a3[i], b3[i], md.q);
        DY_SUB:           res[i] = mod_sub(a3[i], b3[i], md.q);
        DY_MAC, DY_MACK:  res[i] = mod_add(c3[i], prod[i], md.q);
        default:          res[i] = prod[i];
      endcase
    end
    wr_data = obuf;
    for (int i = 0; i < DCORES; i++) wr_data[int'(g3[1:0]) * DCORES + i] = res[i];
    wr_en   = v3 && (g3[1:0] == 2'(GPR - 1));
    wr_slot = cq.dst;
    wr_row  = RW'(g3 >> 2);
  end

  always_ff @(posedge clk)
    if (v3) obuf <= wr_data;

endmodule
