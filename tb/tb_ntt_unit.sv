// tb_ntt_unit: self-checking test of the 16-butterfly NTT unit.
// A random polynomial of N = 2^10 coefficients modulo a 54-bit NTT-friendly
// prime is loaded into a poly_mem; the forward transform is compared, every
// coefficient, with the direct evaluation A[i] = a(psi^(2*bitrev(i)+1)),
// worked out here with plain 128-bit arithmetic. The inverse transform of the
// result must give N*a. Both transforms must take the documented
// logn*(N/32 + 6) + 1 cycles from start to done, and the source slot must be
// left intact.
module tb_ntt_unit;
  import medha_pkg::*;

  localparam int LOGN = 10;
  localparam int N    = 1 << LOGN;
  localparam logic [127:0] Q = 128'h3fffffffd60001;   // 54-bit prime, 1 mod 2^16
  localparam logic [127:0] G = 128'h3fd3a116d12c0c;   // element of order 2^16

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  modulus_t md;
  logic start = 0, inverse = 0, busy, done;
  logic [SLOT_W-1:0] src = 0, dst = 1, tmp = 2;

  logic                rd_en [3], wr_en [3];
  logic [SLOT_W-1:0]   rd_slot [3], wr_slot [3];
  logic [LOGN_MAX-5:0] rd_row [3], wr_row [3];
  row_t                rd_data [3], wr_data [3];
  logic n_rd_en [2], n_wr_en [2];
  logic [SLOT_W-1:0] n_rd_slot [2], n_wr_slot [2];
  logic [LOGN_MAX-5:0] n_rd_row [2], n_wr_row [2];
  row_t n_rd_data [2], n_wr_data [2];
  logic tw_en, tw_tab; logic [LOGN_MAX-5:0] tw_row; row_t tw_data;
  logic tw_we = 0, tw_wtab = 0; logic [LOGN-1:0] tw_widx = 0; coef_t tw_wdata = 0;
  logic h_we = 0, h_re = 0; logic [SLOT_W-1:0] h_slot = 0; logic [LOGN_MAX-5:0] h_row = 0; row_t h_wdata;

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      rd_en[i] = n_rd_en[i]; rd_slot[i] = n_rd_slot[i]; rd_row[i] = n_rd_row[i];
      wr_en[i] = n_wr_en[i]; wr_slot[i] = n_wr_slot[i]; wr_row[i] = n_wr_row[i]; wr_data[i] = n_wr_data[i];
      n_rd_data[i] = rd_data[i];
    end
    rd_en[2] = h_re; rd_slot[2] = h_slot; rd_row[2] = h_row;
    wr_en[2] = h_we; wr_slot[2] = h_slot; wr_row[2] = h_row; wr_data[2] = h_wdata;
  end

  poly_mem #(.COEF_W(54), .SLOTS(4), .LOGN_MX(LOGN), .NR(3), .NW(3)) u_mem (
    .clk, .logn(4'(LOGN)), .rd_en, .rd_slot, .rd_row, .rd_data, .wr_en, .wr_slot, .wr_row, .wr_data);
  twiddle_mem #(.LOGN(LOGN)) u_tw (.clk, .wr_en(tw_we), .wr_tab(tw_wtab), .wr_idx(tw_widx), .wr_data(tw_wdata),
    .rd_en(tw_en), .rd_tab(tw_tab), .rd_row(tw_row[LOGN-5:0]), .rd_data(tw_data));

  ntt_unit dut (.clk, .rst_n, .md, .logn(4'(LOGN)), .start, .inverse, .src, .dst, .tmp, .busy, .done,
    .rd_en(n_rd_en), .rd_slot(n_rd_slot), .rd_row(n_rd_row), .rd_data(n_rd_data),
    .wr_en(n_wr_en), .wr_slot(n_wr_slot), .wr_row(n_wr_row), .wr_data(n_wr_data),
    .tw_en, .tw_tab, .tw_row, .tw_data);

  function automatic logic [127:0] mulm(logic [127:0] a, logic [127:0] b);
    return (a * b) % Q;
  endfunction
  function automatic logic [127:0] powm(logic [127:0] b, longint unsigned e);
    logic [127:0] r = 1;
    while (e != 0) begin
      if (e[0]) r = mulm(r, b);
      b = mulm(b, b); e >>= 1;
    end
    return r;
  endfunction
  function automatic int brv(int x, int l);
    int r = 0;
    for (int i = 0; i < l; i++) r |= ((x >> i) & 1) << (l - 1 - i);
    return r;
  endfunction

  logic [127:0] a [N], A [N], got [N];
  logic [127:0] psi, ipsi;
  int t0, cyc;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  task automatic load(input logic [SLOT_W-1:0] s, input logic [127:0] v [N]);
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk);
      h_we = 1; h_slot = s; h_row = LOGN_MAX'(r) - 0;
      for (int l = 0; l < LANES; l++) h_wdata[l] = coef_t'(v[r*LANES + l]);
    end
    @(negedge clk); h_we = 0;
  endtask

  task automatic dump(input logic [SLOT_W-1:0] s, output logic [127:0] v [N]);
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk); h_re = 1; h_slot = s; h_row = (LOGN_MAX-4)'(r);
      @(negedge clk); h_re = 0;
      for (int l = 0; l < LANES; l++) v[r*LANES + l] = 128'(rd_data[2][l]);
    end
  endtask

  task automatic run(input logic inv, input logic [SLOT_W-1:0] s, input logic [SLOT_W-1:0] d);
    int expect_cyc;
    @(negedge clk); start = 1; inverse = inv; src = s; dst = d; tmp = 2;
    t0 = cyc;
    @(negedge clk); start = 0;
    wait (done);
    expect_cyc = LOGN * (N / 32 + 6) + 1;
    checks++;
    if (cyc - t0 != expect_cyc) begin
      failures++; $display("FAIL cycles %0d expected %0d", cyc - t0, expect_cyc);
    end
    @(negedge clk);
  endtask

  initial begin
    int bad;
    cyc = 0;
    md.q = coef_t'(Q); md.k = 7'd54; md.mu = (QW+1)'((128'd1 << 108) / Q);
    psi  = powm(G, (1 << 16) / (2 * N));
    ipsi = powm(psi, 2 * N - 1);
    checks++;
    if (mulm(psi, ipsi) != 1 || powm(psi, N) != Q - 1) begin failures++; $display("FAIL root"); end
    for (int i = 0; i < N; i++) a[i] = {$urandom, $urandom} % Q;
    a[0] = Q - 1; a[1] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // twiddle tables
    for (int tab = 0; tab < 2; tab++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        tw_we = 1; tw_wtab = tab[0]; tw_widx = LOGN'(k);
        tw_wdata = coef_t'(powm(tab == 0 ? psi : ipsi, longint'(brv(k, LOGN))));
      end
    @(negedge clk); tw_we = 0;
    load(0, a);
    // forward
    run(0, 0, 1);
    dump(1, got);
    bad = 0;
    for (int i = 0; i < N; i++) begin
      logic [127:0] e, x, xp;
      e = 0; xp = 1; x = powm(psi, longint'(2 * brv(i, LOGN) + 1));
      for (int j = 0; j < N; j++) begin
        e = (e + mulm(a[j], xp)) % Q; xp = mulm(xp, x);
      end
      A[i] = e;
      checks++;
      if (got[i] != e) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL fwd[%0d] got %h exp %h", i, got[i], e);
      end
    end
    dump(0, got);
    for (int i = 0; i < N; i++) begin
      checks++; if (got[i] != a[i]) failures++;
    end
    // inverse back into slot 3
    run(1, 1, 3);
    dump(3, got);
    bad = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != mulm(a[i], N)) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL inv[%0d] got %h exp %h", i, got[i], mulm(a[i], N));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
