// tb_rpau: one RPAU (ID 5, 54-bit modulus, degree 2^10) with its outgoing
// link looped back to its incoming link, running a small microcode program:
//   SEND slot 0 / RECV into slot 1        (copy through the link)
//   NTT slot 1 in place, while the dyadic unit adds slots 3 and 4 into 2
//   INTT slot 1 in place, scale by 1/N    (slot 1 must equal slot 0 again)
//   SEED 7, slot 5 = slot 0 * K0          (key stream of seed {5, 7})
//   HALT
// Checked against values computed here: every coefficient of slots 1, 2 and
// 5, the done pulse, and that the NTT and dyadic units overlapped.
module tb_rpau;
  import medha_pkg::*;
  import prng_model_pkg::*;

  localparam int LOGN = 10;
  localparam int N    = 1 << LOGN;
  localparam logic [127:0] Q = 128'h3fffffffd60001;
  localparam logic [127:0] G = 128'h3fd3a116d12c0c;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [2:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic tw_we = 0, tw_tab = 0; logic [LOGN-1:0] tw_idx = 0; coef_t tw_data = 0;
  logic uc_we = 0; logic [9:0] uc_addr = 0; instr_t uc_data;
  logic h_we = 0, h_re = 0; logic [SLOT_W-1:0] h_slot = 0; logic [LOGN_MAX-5:0] h_row = 0;
  row_t h_wdata, h_rdata;
  logic start = 0, running, done;
  logic [31:0] cnt_cycles, cnt_stall, cnt_overlap;
  logic lv, lr; row_t ld;

  rpau #(.ID(5), .COEF_W(54), .SLOTS(8), .LOGN_MX(LOGN), .TW_LOGN(LOGN)) dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .tw_we, .tw_tab, .tw_idx, .tw_data,
    .uc_we, .uc_addr, .uc_data, .h_we, .h_re, .h_slot, .h_row, .h_wdata, .h_rdata,
    .start, .running, .done, .cnt_cycles, .cnt_stall, .cnt_overlap,
    .tx_valid(lv), .tx_ready(lr), .tx_data(ld), .rx_valid(lv), .rx_ready(lr), .rx_data(ld));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  function automatic instr_t mk(opcode_e op, dyop_e dy, int d, int a, int b, int c, int imm);
    instr_t i;
    i.op = op; i.dyop = dy; i.dst = SLOT_W'(d); i.a = SLOT_W'(a); i.b = SLOT_W'(b); i.c = SLOT_W'(c);
    i.imm = 33'(imm);
    return i;
  endfunction

  logic [127:0] p [8][N];

  task automatic put(int s);
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk); h_we = 1; h_slot = SLOT_W'(s); h_row = (LOGN_MAX-4)'(r);
      for (int l = 0; l < LANES; l++) h_wdata[l] = coef_t'(p[s][r * LANES + l]);
    end
    @(negedge clk); h_we = 0;
  endtask

  task automatic check(int s, logic [127:0] e [N], string what);
    int bad = 0;
    for (int r = 0; r < N / LANES; r++) begin
      @(negedge clk); h_re = 1; h_slot = SLOT_W'(s); h_row = (LOGN_MAX-4)'(r);
      @(negedge clk); h_re = 0;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (128'(h_rdata[l]) != e[r * LANES + l]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL %s [%0d] got %h exp %h", what, r * LANES + l, h_rdata[l], e[r * LANES + l]);
        end
      end
    end
  endtask

  initial begin
    instr_t prog [$];
    logic [127:0] psi, ipsi, e [N];
    logic [63:0] st [DCORES];
    psi = powm(G, (1 << 16) / (2 * N)); ipsi = powm(psi, 2 * N - 1);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 5; a++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = 3'(a);
      case (a)
        0: cfg_data = 64'(Q);
        1: cfg_data = 64'((128'd1 << 108) / Q);
        2: cfg_data = 54;
        3: cfg_data = LOGN;
        default: cfg_data = 64'(powm(N, longint'(Q - 2)));
      endcase
    end
    @(negedge clk); cfg_we = 0;
    for (int tab = 0; tab < 2; tab++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk); tw_we = 1; tw_tab = tab[0]; tw_idx = LOGN'(k);
        tw_data = coef_t'(powm(tab == 0 ? psi : ipsi, longint'(brv(k, LOGN))));
      end
    @(negedge clk); tw_we = 0;
    for (int s = 0; s < 5; s++)
      for (int c = 0; c < N; c++) p[s][c] = {$urandom, $urandom} % Q;
    put(0); put(3); put(4);
    prog.push_back(mk(OP_SEND, DY_ADD, 0, 0, 0, 0, 0));
    prog.push_back(mk(OP_RECV, DY_ADD, 1, 0, 0, 0, 0));
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 4));
    prog.push_back(mk(OP_NTT,  DY_ADD, 1, 1, 0, 1, 0));
    prog.push_back(mk(OP_DYA,  DY_ADD, 2, 3, 4, 0, 0));
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 3));
    prog.push_back(mk(OP_INTT, DY_ADD, 1, 1, 0, 1, 0));
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 1));
    prog.push_back(mk(OP_DYA,  DY_MULS, 1, 1, 0, 0, 0));
    prog.push_back(mk(OP_SEED, DY_ADD, 0, 0, 0, 0, 7));
    prog.push_back(mk(OP_DYA,  DY_MULK, 5, 0, 0, 0, 0));
    prog.push_back(mk(OP_HALT, DY_ADD, 0, 0, 0, 0, 0));
    foreach (prog[i]) begin
      @(negedge clk); uc_we = 1; uc_addr = 10'(i); uc_data = prog[i];
    end
    @(negedge clk); uc_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    check(1, p[0], "link + NTT + INTT round trip");
    for (int c = 0; c < N; c++) e[c] = (p[3][c] + p[4][c]) % Q;
    check(2, e, "add");
    for (int l = 0; l < DCORES; l++) st[l] = seed_lane({16'd5, 15'd0, 33'd7}, l);
    for (int c = 0; c < N; c += DCORES)
      for (int l = 0; l < DCORES; l++) begin
        e[c + l] = mulm(p[0][c + l], 128'(out(st[l], 64'(Q))));
        st[l] = next(st[l]);
      end
    check(5, e, "key multiply");
    checks++;
    if (cnt_overlap == 0) begin failures++; $display("FAIL no NTT/dyadic overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
