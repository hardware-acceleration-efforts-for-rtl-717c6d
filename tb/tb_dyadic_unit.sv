// tb_dyadic_unit: runs every dyadic operation on random polynomials of
// N = 2^10 coefficients modulo a 54-bit prime and compares each output
// coefficient with plain 128-bit modular arithmetic. The key operations
// draw their key coefficients from a real ksk_prng and are checked against the
// PRNG reference model. Also checked: dst equal to a source (in place), and
// the N/4 + 4 cycle latency from start to done.
module tb_dyadic_unit;
  import medha_pkg::*;
  import prng_model_pkg::*;

  localparam int LOGN = 10;
  localparam int N    = 1 << LOGN;
  localparam logic [127:0] Q = 128'h3fffffffd60001;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  modulus_t md;
  logic start = 0, busy, done;
  ucmd_t cmd;
  coef_t scalar [4];

  logic                rd_en [4], wr_en [2];
  logic [SLOT_W-1:0]   rd_slot [4], wr_slot [2];
  logic [LOGN_MAX-5:0] rd_row [4], wr_row [2];
  row_t                rd_data [4], wr_data [2];
  logic d_rd_en [3]; logic [SLOT_W-1:0] d_rd_slot [3]; logic [LOGN_MAX-5:0] d_rd_row [3]; row_t d_rd_data [3];
  logic d_wr_en; logic [SLOT_W-1:0] d_wr_slot; logic [LOGN_MAX-5:0] d_wr_row; row_t d_wr_data;
  logic h_we = 0, h_re = 0; logic [SLOT_W-1:0] h_slot = 0; logic [LOGN_MAX-5:0] h_row = 0; row_t h_wdata;
  logic k_take; coef_t k_val [DCORES];
  logic k_load = 0; logic [63:0] k_seed = 0;

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      rd_en[i] = d_rd_en[i]; rd_slot[i] = d_rd_slot[i]; rd_row[i] = d_rd_row[i]; d_rd_data[i] = rd_data[i];
    end
    rd_en[3] = h_re; rd_slot[3] = h_slot; rd_row[3] = h_row;
    wr_en[0] = d_wr_en; wr_slot[0] = d_wr_slot; wr_row[0] = d_wr_row; wr_data[0] = d_wr_data;
    wr_en[1] = h_we; wr_slot[1] = h_slot; wr_row[1] = h_row; wr_data[1] = h_wdata;
  end

  poly_mem #(.COEF_W(54), .SLOTS(6), .LOGN_MX(LOGN), .NR(4), .NW(2)) u_mem (
    .clk, .logn(4'(LOGN)), .rd_en, .rd_slot, .rd_row, .rd_data, .wr_en, .wr_slot, .wr_row, .wr_data);
  ksk_prng u_prng (.clk, .rst_n, .q(md.q), .load(k_load), .seed(k_seed), .take(k_take), .val(k_val));
  dyadic_unit dut (.clk, .rst_n, .md, .logn(4'(LOGN)), .start, .cmd, .scalar, .busy, .done,
    .rd_en(d_rd_en), .rd_slot(d_rd_slot), .rd_row(d_rd_row), .rd_data(d_rd_data),
    .wr_en(d_wr_en), .wr_slot(d_wr_slot), .wr_row(d_wr_row), .wr_data(d_wr_data), .k_take, .k_val);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] pa [N], pb [N], pc [N], got [N], exp_v [N];

  task automatic load(input logic [SLOT_W-1:0] s, input logic [127:0] v [N]);
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk);
      h_we = 1; h_slot = s; h_row = (LOGN_MAX-4)'(r);
      for (int l = 0; l < LANES; l++) h_wdata[l] = coef_t'(v[r*LANES + l]);
    end
    @(negedge clk); h_we = 0;
  endtask

  task automatic dump(input logic [SLOT_W-1:0] s, output logic [127:0] v [N]);
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk); h_re = 1; h_slot = s; h_row = (LOGN_MAX-4)'(r);
      @(negedge clk); h_re = 0;
      for (int l = 0; l < LANES; l++) v[r*LANES + l] = 128'(rd_data[3][l]);
    end
  endtask

  task automatic run(input dyop_e op, input int d, input int a, input int b, input int c);
    int t0;
    @(negedge clk);
    cmd = '0; cmd.dyop = op; cmd.dst = SLOT_W'(d); cmd.a = SLOT_W'(a); cmd.b = SLOT_W'(b); cmd.c = SLOT_W'(c);
    start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done);
    checks++;
    if (cyc - t0 != N / 4 + 4) begin failures++; $display("FAIL latency %0d", cyc - t0); end
    @(negedge clk);
  endtask

  task automatic verify(string what, input int s);
    int bad = 0;
    dump(SLOT_W'(s), got);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != exp_v[i]) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s [%0d] got %h exp %h", what, i, got[i], exp_v[i]);
      end
    end
  endtask

  initial begin
    logic [63:0] m [DCORES];
    md.q = coef_t'(Q); md.k = 7'd54; md.mu = (QW+1)'((128'd1 << 108) / Q);
    scalar[0] = 1; scalar[1] = coef_t'(Q - 2); scalar[2] = 12345; scalar[3] = coef_t'(Q - 1);
    for (int i = 0; i < N; i++) begin
      pa[i] = {$urandom, $urandom} % Q; pb[i] = {$urandom, $urandom} % Q; pc[i] = {$urandom, $urandom} % Q;
    end
    pa[0] = Q - 1; pb[0] = Q - 1; pa[1] = 0; pb[1] = Q - 1;
    repeat (2) @(negedge clk); rst_n = 1;
    load(0, pa); load(1, pb); load(2, pc);

    run(DY_ADD, 3, 0, 1, 2);
    for (int i = 0; i < N; i++) exp_v[i] = (pa[i] + pb[i]) % Q;
    verify("add", 3);
    run(DY_SUB, 3, 0, 1, 2);
    for (int i = 0; i < N; i++) exp_v[i] = (pa[i] + Q - pb[i]) % Q;
    verify("sub", 3);
    run(DY_MUL, 3, 0, 1, 2);
    for (int i = 0; i < N; i++) exp_v[i] = (pa[i] * pb[i]) % Q;
    verify("mul", 3);
    run(DY_MAC, 4, 0, 1, 2);
    for (int i = 0; i < N; i++) exp_v[i] = (pc[i] + pa[i] * pb[i]) % Q;
    verify("mac", 4);
    run(DY_MULS, 3, 0, 1, 2);
    for (int i = 0; i < N; i++) exp_v[i] = (pa[i] * (Q - 2)) % Q;
    verify("muls", 3);
    // in place: slot 4 = slot 4 + a*b
    run(DY_MAC, 4, 0, 1, 4);
    for (int i = 0; i < N; i++) exp_v[i] = (exp_v[i] * 0 + ((pc[i] + 2 * ((pa[i] * pb[i]) % Q)) % Q));
    verify("mac in place", 4);
    // generated key: c + a*K0
    k_seed = 64'hfeed_0000_0000_0042;
    @(negedge clk); k_load = 1; @(negedge clk); k_load = 0;
    for (int l = 0; l < DCORES; l++) m[l] = seed_lane(k_seed, l);
    run(DY_MACK, 5, 0, 1, 2);
    for (int i = 0; i < N; i += DCORES)
      for (int l = 0; l < DCORES; l++) begin
        exp_v[i + l] = (pc[i + l] + pa[i + l] * 128'(out(m[l], 64'(Q)))) % Q;
        m[l] = next(m[l]);
      end
    verify("mack", 5);
    run(DY_MULK, 5, 1, 1, 2);
    for (int i = 0; i < N; i += DCORES)
      for (int l = 0; l < DCORES; l++) begin
        exp_v[i + l] = (pb[i + l] * 128'(out(m[l], 64'(Q)))) % Q;
        m[l] = next(m[l]);
      end
    verify("mulk", 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
