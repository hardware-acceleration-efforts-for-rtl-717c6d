// medha_e2e.svh: body of the end-to-end key-switching test, included by
// tb_medha_top (reduced size) and tb_medha_full (default size). The including
// module defines NR (RPAUs), TWL (twiddle table log size), LOGNS[] (the ring
// degrees to run), MIN_SAVING (least saving of key-switching cycles, in percent, that the
// overlap of NTT and dyadic work must bring over a serial schedule) and instantiates medha_top as dut after this file.
//
// Workload: homomorphic multiplication of two ciphertexts (c0, c1) and
// (c0', c1') with relinearisation, every RPAU j holding modulus q_j:
//   d0 = c0*c0',  d1 = c0*c1' + c1*c0',  d2 = c1*c1'   (in the NTT domain)
//   c0''_j = sum_i d2_i * KSK0_ij,  c1''_j = sum_i d2_i * KSK1_ij  (mod q_j)
//   result (d0 + c0'', d1 + c1'').
// The last RPAU holds the special modulus p and has no ciphertext residue of
// its own (its inputs are zero, so it sends a zero d2).
// One microcode program, the same in every RPAU:
//   the tensor product d0, d1, d2 with dyadic MUL and MAC;
//   INTT of the own residue in place, scale by 1/N -> coefficient form
//   send it to the next RPAU while receiving the previous RPAU's one;
//   for every round r: reduce the received residue mod q_j (multiply by 1),
//   NTT it (in the background, overlapped with the dyadic work of the
//   previous round), then c0 += x * K0 (key generated from seed {j, r}) and
//   c1 += x * KSK1 (stored in slot 7 + r), forwarding residues round the
//   ring as it goes; the accumulators start as d0 and d1.
// The expected accumulators are computed here with a reference NTT written
// differently (twist by psi^j, bit-reverse, radix-2 cyclic transform) and
// 128-bit modular arithmetic, and the key streams with the PRNG model.
// Counted mechanisms (each must occur): NTT/dyadic overlap cycles,
// sequencer stalls, link back-pressure, generated key coefficients, inverse
// NTTs, forward NTTs, and (when LOGNS has two entries) a change of degree.

  import medha_pkg::*;
  import prng_model_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] sel = 0; logic bcast = 0;
  logic cfg_we = 0; logic [2:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic tw_we = 0, tw_tab = 0; logic [TWL-1:0] tw_idx = 0; coef_t tw_data = 0;
  logic uc_we = 0; logic [9:0] uc_addr = 0; instr_t uc_data;
  logic h_we = 0, h_re = 0; logic [SLOT_W-1:0] h_slot = 0; logic [LOGN_MAX-5:0] h_row = 0;
  row_t h_wdata, h_rdata;
  logic start = 0, running, done;
  logic [31:0] cnt_cycles [NR], cnt_stall [NR], cnt_overlap [NR];

  // mechanism counters
  longint n_overlap = 0, n_stall = 0, n_backpressure = 0, n_keys = 0, n_intt = 0, n_ntt = 0, n_degree = 0;

  function automatic logic [127:0] mod_of(int m);
    case (m)
      0: return 128'h3fffffffd60001;  1: return 128'h3fffffffca0001;
      2: return 128'h3fffffff6d0001;  3: return 128'h3fffffff5d0001;
      4: return 128'h3fffffff550001;  5: return 128'h3fffffff390001;
      6: return 128'h3fffffff360001;  7: return 128'h3fffffff2a0001;
      8: return 128'h3fffffff000001;  default: return 128'hffffffffffc0001;
    endcase
  endfunction
  // an element of multiplicative order 2^16 for each modulus
  function automatic logic [127:0] gen_of(int m);
    case (m)
      0: return 128'h3fd3a116d12c0c;  1: return 128'h2c513235eada19;
      2: return 128'h1155c087950e0e;  3: return 128'h099516c03727a8;
      4: return 128'h2c0d9759b7eac7;  5: return 128'h095f1d8eaed123;
      6: return 128'h37b34fa30e81c9;  7: return 128'h3b4a9f96bf5b46;
      8: return 128'h383d517e4708b4;  default: return 128'hf47705035bd5bb3;
    endcase
  endfunction
  // RPAU j uses modulus j, the last RPAU the 60-bit one
  function automatic int midx(int j);
    return (j == NR - 1) ? 9 : j;
  endfunction

  function automatic logic [127:0] mulm(logic [127:0] a, logic [127:0] b, logic [127:0] q);
    return (a * b) % q;
  endfunction
  function automatic logic [127:0] powm(logic [127:0] b, longint unsigned e, logic [127:0] q);
    logic [127:0] r = 1;
    while (e != 0) begin
      if (e[0]) r = mulm(r, b, q);
      b = mulm(b, b, q); e >>= 1;
    end
    return r;
  endfunction
  function automatic int brv(int x, int l);
    int r = 0;
    for (int i = 0; i < l; i++) r |= ((x >> i) & 1) << (l - 1 - i);
    return r;
  endfunction

  // reference negacyclic NTT, output in the unit's bit-reversed order
  task automatic ref_ntt(ref logic [127:0] v [], input logic [127:0] q, input logic [127:0] psi, input int ln);
    int n = 1 << ln;
    logic [127:0] w [];
    logic [127:0] p, om;
    w = new[n];
    p = 1;
    for (int j = 0; j < n; j++) begin w[brv(j, ln)] = mulm(v[j], p, q); p = mulm(p, psi, q); end
    for (int len = 2; len <= n; len <<= 1) begin
      logic [127:0] wl;
      wl = powm(psi, longint'(2 * (n / len)), q);
      for (int s = 0; s < n; s += len) begin
        om = 1;
        for (int k = 0; k < len / 2; k++) begin
          logic [127:0] u, t;
          u = w[s + k]; t = mulm(w[s + k + len / 2], om, q);
          w[s + k] = (u + t) % q; w[s + k + len / 2] = (u + q - t) % q;
          om = mulm(om, wl, q);
        end
      end
    end
    // w[k] = sum v_j psi^j omega^(jk); the unit puts a(psi^(2 brv(i)+1)) at i
    for (int i = 0; i < n; i++) v[i] = w[brv(i, ln)];
  endtask

  // reference inverse: input in the unit's bit-reversed order is already the
  // bit-reversed input of a radix-2 cyclic transform with omega^-1; then
  // untwist by psi^-j and scale by 1/N
  task automatic ref_intt(ref logic [127:0] v [], input logic [127:0] q, input logic [127:0] psi, input int ln);
    int n = 1 << ln;
    logic [127:0] ipsi, om, p, ninv;
    ipsi = powm(psi, longint'(2 * n - 1), q);
    for (int len = 2; len <= n; len <<= 1) begin
      logic [127:0] wl;
      wl = powm(ipsi, longint'(2 * (n / len)), q);
      for (int s = 0; s < n; s += len) begin
        om = 1;
        for (int k = 0; k < len / 2; k++) begin
          logic [127:0] u, t;
          u = v[s + k]; t = mulm(v[s + k + len / 2], om, q);
          v[s + k] = (u + t) % q; v[s + k + len / 2] = (u + q - t) % q;
          om = mulm(om, wl, q);
        end
      end
    end
    ninv = powm(128'(n), longint'(q - 2), q);
    p = ninv;
    for (int j = 0; j < n; j++) begin v[j] = mulm(v[j], p, q); p = mulm(p, ipsi, q); end
  endtask

  // ------------------------------------------------------------ host access
  task automatic cfg(int j, int a, logic [63:0] d);
    @(negedge clk); sel = 4'(j); bcast = 0; cfg_we = 1; cfg_addr = 3'(a); cfg_data = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic put_row(int j, int s, int r, row_t d);
    @(negedge clk); sel = 4'(j); bcast = 0; h_we = 1; h_slot = SLOT_W'(s); h_row = (LOGN_MAX-4)'(r); h_wdata = d;
  endtask

  task automatic put_poly(int j, int s, ref logic [127:0] v [], input int ln);
    row_t d;
    for (int r = 0; r < (1 << ln) / LANES; r++) begin
      for (int l = 0; l < LANES; l++) d[l] = coef_t'(v[r * LANES + l]);
      put_row(j, s, r, d);
    end
    @(negedge clk); h_we = 0;
  endtask

  task automatic get_poly(int j, int s, ref logic [127:0] v [], input int ln);
    for (int r = 0; r < (1 << ln) / LANES; r++) begin
      @(negedge clk); sel = 4'(j); bcast = 0; h_re = 1; h_slot = SLOT_W'(s); h_row = (LOGN_MAX-4)'(r);
      @(negedge clk); h_re = 0;
      for (int l = 0; l < LANES; l++) v[r * LANES + l] = 128'(h_rdata[l]);
    end
  endtask

  // ---------------------------------------------------------------- program
  instr_t prog [$];
  function automatic instr_t mk(opcode_e op, dyop_e dy, int d, int a, int b, int c, int imm);
    instr_t i;
    i.op = op; i.dyop = dy; i.dst = SLOT_W'(d); i.a = SLOT_W'(a); i.b = SLOT_W'(b); i.c = SLOT_W'(c);
    i.imm = 33'(imm);
    return i;
  endfunction

  // slot map (7 + NR slots): 0 own d2 (transformed in place), 1 c0'' (starts
  // as d0), 2 c1'' (starts as d1), 3/4 NTT buffers, 5/6 receive buffers,
  // 7.. KSK1 of each round. The input ciphertexts c0, c1, c0', c1' arrive in
  // slots 3..6, which are free again once the tensor product is formed.
  localparam int S_C0 = 3, S_C1 = 4, S_C0P = 5, S_C1P = 6;
  function automatic int xbuf(int k);     // slot holding residue X_k
    return (k == 0) ? 0 : 5 + (k % 2);
  endfunction

  task automatic build_program(bit serial);
    prog.delete();
    prog.push_back(mk(OP_DYA,  DY_MUL, 0, S_C1, S_C1P, 0, 0));      // d2
    prog.push_back(mk(OP_DYA,  DY_MUL, 2, S_C0, S_C1P, 0, 0));      // d1 = c0 c1'
    prog.push_back(mk(OP_DYA,  DY_MAC, 2, S_C1, S_C0P, 2, 0));      //    + c1 c0'
    prog.push_back(mk(OP_DYA,  DY_MUL, 1, S_C0, S_C0P, 0, 0));      // d0
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 2));
    prog.push_back(mk(OP_INTT, DY_ADD, 0, 0, 0, 0, 0));            // in place
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 1));
    prog.push_back(mk(OP_DYA,  DY_MULS, 0, 0, 0, 0, 0));           // * 1/N
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 2));
    // the receive is issued only after the reduce has finished, so every
    // sender is held by its receiver for a while (link back-pressure); the
    // transfer still hides behind the NTT that follows
    if (NR > 1) prog.push_back(mk(OP_SEND, DY_ADD, 0, 0, 0, 0, 0));
    prog.push_back(mk(OP_DYA,  DY_MULS, 3, 0, 1, 0, 0));           // reduce (* 1)
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 2));
    if (NR > 1) prog.push_back(mk(OP_RECV, DY_ADD, xbuf(1), 0, 0, 0, 0));
    prog.push_back(mk(OP_NTT,  DY_ADD, 3, 3, 0, 3, 0));
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 1));
    for (int r = 0; r < NR; r++) begin
      int a, an;
      a  = 3 + (r % 2);
      an = 3 + ((r + 1) % 2);
      if (r < NR - 1) begin
        prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 4));
        if (r + 2 <= NR - 1) begin
          prog.push_back(mk(OP_SEND, DY_ADD, 0, xbuf(r + 1), 0, 0, 0));
          prog.push_back(mk(OP_RECV, DY_ADD, xbuf(r + 2), 0, 0, 0, 0));
        end
        prog.push_back(mk(OP_DYA,  DY_MULS, an, xbuf(r + 1), 1, 0, 0));
        prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 2));
        prog.push_back(mk(OP_NTT,  DY_ADD, an, an, 0, an, 0));    // overlaps the MACs below
        if (serial) prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 1));  // no overlap
      end
      prog.push_back(mk(OP_SEED, DY_ADD, 0, 0, 0, 0, r));
      prog.push_back(mk(OP_DYA,  DY_MACK, 1, a, 0, 1, 0));
      prog.push_back(mk(OP_DYA,  DY_MAC,  2, a, 7 + r, 2, 0));
      prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 3));
    end
    prog.push_back(mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 7));
    prog.push_back(mk(OP_HALT, DY_ADD, 0, 0, 0, 0, 0));
  endtask

  // ------------------------------------------------------------- monitors
  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < NR; j++) begin
      if (dut.tx_valid[j] && !dut.tx_ready[j]) n_backpressure++;
    end
  end

  // ------------------------------------------------------------ one run
  task automatic run_workload(int ln, bit serial, output int cycles, output int ks_cycles);
    int n = 1 << ln;
    logic [127:0] d2 [NR][];
    logic [127:0] ct [NR][4][];        // c0, c1, c0', c1' per RPAU, NTT domain
    logic [127:0] v [], x [], c0 [], c1 [];
    logic [127:0] ksk1 [][];
    logic [127:0] q, psi, ipsi;
    logic [63:0]  st [DCORES];
    int bad;
    for (int i = 0; i < NR; i++) begin
      d2[i] = new[n];
      q = mod_of(midx(i));
      psi = powm(gen_of(midx(i)), longint'((1 << 16) / (2 * n)), q);
      for (int k = 0; k < 4; k++) begin
        ct[i][k] = new[n];
        for (int c = 0; c < n; c++) ct[i][k][c] = (i == NR - 1) ? 0 : ({$urandom, $urandom} % q);
      end
      for (int c = 0; c < n; c++) d2[i][c] = mulm(ct[i][1][c], ct[i][3][c], q);
      ref_intt(d2[i], q, psi, ln);     // d2 in coefficient form
    end
    // configure and load every RPAU
    for (int j = 0; j < NR; j++) begin
      int m = midx(j);
      logic [127:0] kk;
      q = mod_of(m);
      kk = (m == 9) ? 60 : 54;
      psi  = powm(gen_of(m), longint'((1 << 16) / (2 * n)), q);
      ipsi = powm(psi, longint'(2 * n - 1), q);
      cfg(j, 0, 64'(q));
      cfg(j, 1, 64'((128'd1 << (2 * kk)) / q));
      cfg(j, 2, 64'(kk));
      cfg(j, 3, 64'(ln));
      cfg(j, 4, 64'(powm(128'(n), longint'(q - 2), q)));   // 1/N
      cfg(j, 5, 64'd1);
      for (int tab = 0; tab < 2; tab++) begin
        logic [127:0] base, pw [];
        base = (tab == 0) ? psi : ipsi;
        pw = new[n];
        pw[0] = 1;
        for (int k = 1; k < n; k++) pw[k] = mulm(pw[k - 1], base, q);
        for (int k = 0; k < n; k++) begin
          @(negedge clk); sel = 4'(j); bcast = 0; tw_we = 1; tw_tab = tab[0];
          tw_idx = TWL'(k); tw_data = coef_t'(pw[brv(k, ln)]);
        end
        @(negedge clk); tw_we = 0;
      end
      // the two input ciphertexts, NTT domain
      for (int k = 0; k < 4; k++) begin
        v = ct[j][k];
        put_poly(j, S_C0 + k, v, ln);
      end
      // KSK1 for every round
      for (int r = 0; r < NR; r++) begin
        for (int c = 0; c < n; c++) v[c] = {$urandom, $urandom} % q;
        put_poly(j, 7 + r, v, ln);
      end
    end
    // one program for all RPAUs
    build_program(serial);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); bcast = 1; uc_we = 1; uc_addr = 10'(i); uc_data = prog[i];
    end
    @(negedge clk); uc_we = 0; bcast = 0;
    start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int j = 0; j < NR; j++) begin
      n_overlap += cnt_overlap[j];
      n_stall   += cnt_stall[j];
    end
    cycles = int'(cnt_cycles[0]);
    ks_cycles = int'(ks_t1 - ks_t0);
    $display("degree 2^%0d, %0d RPAUs, %s schedule: %0d cycles (key switching %0d), NTT/dyadic overlap %0d cycles in RPAU 0",
             ln, NR, serial ? "serial" : "overlapped", cnt_cycles[0], ks_cycles, cnt_overlap[0]);
    // expected results and comparison
    for (int j = 0; j < NR; j++) begin
      int m = midx(j);
      q = mod_of(m);
      psi = powm(gen_of(m), longint'((1 << 16) / (2 * n)), q);
      c0 = new[n]; c1 = new[n]; x = new[n];
      for (int c = 0; c < n; c++) begin c0[c] = 0; c1[c] = 0; end
      for (int r = 0; r < NR; r++) begin
        int i = (j - r + NR) % NR;
        for (int c = 0; c < n; c++) x[c] = d2[i][c] % q;
        ref_ntt(x, q, psi, ln);
        for (int l = 0; l < DCORES; l++) st[l] = seed_lane({16'(j), 15'd0, 33'(r)}, l);
        for (int c = 0; c < n; c += DCORES)
          for (int l = 0; l < DCORES; l++) begin
            c0[c + l] = (c0[c + l] + mulm(x[c + l], 128'(out(st[l], 64'(q))), q)) % q;
            st[l] = next(st[l]);
          end
        // c1 uses the stored KSK1 polynomial: read it back from the RPAU
        v = new[n];
        get_poly(j, 7 + r, v, ln);
        for (int c = 0; c < n; c++) c1[c] = (c1[c] + mulm(x[c], v[c], q)) % q;
      end
      for (int c = 0; c < n; c++) begin
        c0[c] = (c0[c] + mulm(ct[j][0][c], ct[j][2][c], q)) % q;
        c1[c] = (c1[c] + mulm(ct[j][0][c], ct[j][3][c], q) + mulm(ct[j][1][c], ct[j][2][c], q)) % q;
      end
      v = new[n];
      get_poly(j, 1, v, ln);
      bad = 0;
      for (int c = 0; c < n; c++) begin
        checks++;
        if (v[c] != c0[c]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL RPAU %0d c0[%0d] got %h exp %h", j, c, v[c], c0[c]);
        end
      end
      get_poly(j, 2, v, ln);
      for (int c = 0; c < n; c++) begin
        checks++;
        if (v[c] != c1[c]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL RPAU %0d c1[%0d] got %h exp %h", j, c, v[c], c1[c]);
        end
      end
    end
  endtask

  // key-switching span in RPAU 0: from the inverse NTT of d2 to the end of
  // the program, the part the NTT/dyadic overlap speeds up
  longint cyc = 0, ks_t0 = 0, ks_t1 = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.g_rpau[0].u_rpau.ntt_start && dut.g_rpau[0].u_rpau.cmd.inverse) ks_t0 = cyc;
    if (dut.g_rpau[0].u_rpau.done) ks_t1 = cyc;
  end

  for (genvar j = 0; j < NR; j++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_rpau[j].u_rpau.k_take) n_keys += DCORES;
      if (dut.g_rpau[j].u_rpau.ntt_start && dut.g_rpau[j].u_rpau.cmd.inverse) n_intt++;
      if (dut.g_rpau[j].u_rpau.ntt_start && !dut.g_rpau[j].u_rpau.cmd.inverse) n_ntt++;
    end
  end

  task automatic mech(string what, longint n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    int cyc_par [$size(LOGNS)], cyc_ser, ks_par [$size(LOGNS)], ks_ser;
    real saving, ks_saving;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < $size(LOGNS); k++) begin
      if (k > 0) n_degree++;
      run_workload(LOGNS[k], 1'b0, cyc_par[k], ks_par[k]);
    end
    // the same key switching with every NTT waited for before the dyadic
    // work: the overlap of the two cores must save a large share of cycles
    run_workload(LOGNS[0], 1'b1, cyc_ser, ks_ser);
    saving = 100.0 * real'(cyc_ser - cyc_par[0]) / real'(cyc_ser);
    ks_saving = 100.0 * real'(ks_ser - ks_par[0]) / real'(ks_ser);
    $display("overlapping NTT and dyadic work saves %0.1f%% of the key-switching cycles (%0d against %0d), %0.1f%% of the whole multiplication (%0d against %0d)",
             ks_saving, ks_par[0], ks_ser, saving, cyc_par[0], cyc_ser);
    checks++;
    if (ks_saving < MIN_SAVING) begin failures++; $display("FAIL saving below %0.1f%%", MIN_SAVING); end
    mech("NTT/dyadic overlap cycles", n_overlap);
    mech("sequencer stall cycles", n_stall);
    mech("link back-pressure cycles", n_backpressure);
    mech("generated key coefficients", n_keys);
    mech("inverse NTTs", n_intt);
    mech("forward NTTs", n_ntt);
    if ($size(LOGNS) > 1) mech("degree changes", n_degree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
