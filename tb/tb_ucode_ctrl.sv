// tb_ucode_ctrl: runs a short microcode program against model execution units
// that stay busy for a fixed number of cycles after each start.
// Checked: each instruction reaches the right unit with its fields; an NTT and
// a dyadic operation issue back to back and overlap; a second dyadic
// operation waits for the first; WAIT holds until the named units are idle;
// SEND and RECV go out together; SEED passes its immediate; HALT waits for
// all units and pulses done; and the cycle, stall and overlap counters
// match the cycle numbers worked out below.
module tb_ucode_ctrl;
  import medha_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic uc_we = 0; logic [9:0] uc_addr = 0; instr_t uc_data;
  logic start = 0, running, done;
  logic ntt_busy, dya_busy, tx_busy, rx_busy;
  logic ntt_start, dya_start, tx_start, rx_start, seed_load;
  ucmd_t cmd; logic [32:0] seed;
  logic [31:0] cnt_cycles, cnt_stall, cnt_overlap;

  ucode_ctrl dut (.*);

  // model units: busy for D cycles from the cycle after start
  localparam int DN = 20, DD = 12, DT = 7, DR = 9;
  int rn = 0, rd = 0, rt = 0, rr = 0;
  always_ff @(posedge clk) begin
    rn <= ntt_start ? DN : (rn > 0 ? rn - 1 : 0);
    rd <= dya_start ? DD : (rd > 0 ? rd - 1 : 0);
    rt <= tx_start  ? DT : (rt > 0 ? rt - 1 : 0);
    rr <= rx_start  ? DR : (rr > 0 ? rr - 1 : 0);
  end
  assign ntt_busy = rn > 0, dya_busy = rd > 0, tx_busy = rt > 0, rx_busy = rr > 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(opcode_e op, dyop_e dy, int d, int a, int b, int c, int imm);
    instr_t i;
    i.op = op; i.dyop = dy; i.dst = SLOT_W'(d); i.a = SLOT_W'(a); i.b = SLOT_W'(b); i.c = SLOT_W'(c);
    i.imm = 33'(imm);
    return i;
  endfunction

  instr_t prog [9];
  int t_start, n_ntt = 0, n_dya = 0, n_tx = 0, n_rx = 0, n_seed = 0;
  int c_ntt, c_dya [2], c_tx, c_rx, c_seed, c_done;

  always @(posedge clk) if (rst_n) begin
    if (ntt_start) begin
      c_ntt = cyc; n_ntt++;
      checks++;
      if (!cmd.inverse || cmd.a != 3 || cmd.dst != 4 || cmd.c != 5) begin failures++; $display("FAIL ntt fields"); end
    end
    if (dya_start) begin
      c_dya[n_dya] = cyc;
      checks++;
      if (cmd.dyop != (n_dya == 0 ? DY_MAC : DY_ADD) || cmd.dst != SLOT_W'(6 + n_dya)) begin
        failures++; $display("FAIL dyadic fields");
      end
      n_dya++;
    end
    if (tx_start) begin c_tx = cyc; n_tx++; checks++; if (cmd.a != 8) begin failures++; $display("FAIL send slot"); end end
    if (rx_start) begin c_rx = cyc; n_rx++; checks++; if (cmd.dst != 9) begin failures++; $display("FAIL recv slot"); end end
    if (seed_load) begin c_seed = cyc; n_seed++; checks++; if (seed != 33'h1_2345_6789) begin failures++; $display("FAIL seed"); end end
    if (done) c_done = cyc;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    prog[0] = mk(OP_INTT, DY_ADD, 4, 3, 0, 5, 0);
    prog[1] = mk(OP_DYA,  DY_MAC, 6, 1, 2, 3, 0);
    prog[2] = mk(OP_DYA,  DY_ADD, 7, 1, 2, 3, 0);
    prog[3] = mk(OP_WAIT, DY_ADD, 0, 0, 0, 0, 3);
    prog[4] = mk(OP_SEND, DY_ADD, 0, 8, 0, 0, 0);
    prog[5] = mk(OP_RECV, DY_ADD, 9, 0, 0, 0, 0);
    prog[6] = mk(OP_SEED, DY_ADD, 0, 0, 0, 0, 0);
    prog[6].imm = 33'h1_2345_6789;
    prog[7] = mk(OP_NOP,  DY_ADD, 0, 0, 0, 0, 0);
    prog[8] = mk(OP_HALT, DY_ADD, 0, 0, 0, 0, 0);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk); uc_we = 1; uc_addr = 10'(i); uc_data = prog[i];
    end
    @(negedge clk); uc_we = 0;
    start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    wait (done); @(posedge clk); #1;
    // s = first running cycle
    // INTT at s, DYA at s+1, second DYA waits for dyadic idle: s+1+DD+1,
    // WAIT until NTT (busy s+1..s+DN) and dyadic idle: second DYA busy to
    // s+DD+2+DD; SEND the cycle after, RECV the next, SEED, NOP, HALT waits.
    expect_eq("ntt issue",   c_ntt - t_start,     1);
    expect_eq("dya0 issue",  c_dya[0] - t_start,  2);
    expect_eq("dya1 issue",  c_dya[1] - t_start,  2 + DD + 1);
    expect_eq("send issue",  c_tx - t_start,      2 + DD + 1 + DD + 2);
    expect_eq("recv issue",  c_rx - c_tx,         1);
    expect_eq("seed issue",  c_seed - c_rx,       1);
    expect_eq("done",        c_done - c_rx,       DR + 2);
    expect_eq("counts", n_ntt * 1000 + n_dya * 100 + n_tx * 10 + n_rx, 1211);
    expect_eq("seed count", n_seed, 1);
    expect_eq("overlap cycles", int'(cnt_overlap), DD + (DN - DD - 2));
    expect_eq("cycle counter", int'(cnt_cycles), c_done - t_start - 1);
    // stalls: DD on the second DYA, DD on WAIT (dyadic busy longest), DR - 2 on HALT
    expect_eq("stall counter", int'(cnt_stall), DD + DD + (DR - 2));
    checks++;
    if (running) begin failures++; $display("FAIL still running"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
