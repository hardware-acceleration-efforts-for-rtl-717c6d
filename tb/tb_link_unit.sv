// tb_link_unit: checks both engines of the link unit.
// Send: a polynomial in slot 1 goes out on the link; the test's sink takes
// rows with a random ready and compares each with the stored row, in order.
// A second send with ready held high must reach one row per cycle
// (N/16 + 3 cycles from start to done). Receive: the test drives rows with a
// random valid, and the rows must land in slot 2 in order. Send and receive
// run at the same time, as they do in the ring.
module tb_link_unit;
  import medha_pkg::*;

  localparam int LOGN = 10;
  localparam int N    = 1 << LOGN;
  localparam int R    = N / LANES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ring_link_if lo (.clk, .rst_n);
  ring_link_if li (.clk, .rst_n);

  logic tx_start = 0, rx_start = 0, tx_busy, rx_busy, tx_done, rx_done;
  logic [SLOT_W-1:0] tx_slot = 1, rx_slot = 2;
  logic                rd_en [2], wr_en [2];
  logic [SLOT_W-1:0]   rd_slot [2], wr_slot [2];
  logic [LOGN_MAX-5:0] rd_row [2], wr_row [2];
  row_t                rd_data [2], wr_data [2];
  logic h_we = 0, h_re = 0; logic [SLOT_W-1:0] h_slot = 0; logic [LOGN_MAX-5:0] h_row = 0; row_t h_wdata;
  logic l_rd_en, l_wr_en; logic [SLOT_W-1:0] l_rd_slot, l_wr_slot; logic [LOGN_MAX-5:0] l_rd_row, l_wr_row;
  row_t l_wr_data;

  always_comb begin
    rd_en[0] = l_rd_en; rd_slot[0] = l_rd_slot; rd_row[0] = l_rd_row;
    rd_en[1] = h_re; rd_slot[1] = h_slot; rd_row[1] = h_row;
    wr_en[0] = l_wr_en; wr_slot[0] = l_wr_slot; wr_row[0] = l_wr_row; wr_data[0] = l_wr_data;
    wr_en[1] = h_we; wr_slot[1] = h_slot; wr_row[1] = h_row; wr_data[1] = h_wdata;
  end

  poly_mem #(.COEF_W(60), .SLOTS(4), .LOGN_MX(LOGN), .NR(2), .NW(2)) u_mem (
    .clk, .logn(4'(LOGN)), .rd_en, .rd_slot, .rd_row, .rd_data, .wr_en, .wr_slot, .wr_row, .wr_data);

  link_unit dut (.clk, .rst_n, .logn(4'(LOGN)), .tx_start, .tx_slot, .tx_busy, .tx_done,
    .rx_start, .rx_slot, .rx_busy, .rx_done,
    .rd_en(l_rd_en), .rd_slot(l_rd_slot), .rd_row(l_rd_row), .rd_data(rd_data[0]),
    .wr_en(l_wr_en), .wr_slot(l_wr_slot), .wr_row(l_wr_row), .wr_data(l_wr_data),
    .out(lo.tx), .in(li.rx));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  row_t src_rows [R], in_rows [R];
  int   got_n = 0;
  bit   rand_ready = 1, rand_valid = 1;

  // sink on the outgoing link
  always @(posedge clk) begin
    if (lo.valid && lo.ready) begin
      checks++;
      if (got_n >= R || lo.data != src_rows[got_n]) begin
        failures++; $display("FAIL tx row %0d", got_n);
      end
      got_n++;
    end
  end
  always @(negedge clk) lo.ready = rand_ready ? ($urandom % 3 != 0) : 1'b1;

  // source on the incoming link
  task automatic drive_in();
    for (int r = 0; r < R; r++) begin
      while (rand_valid && ($urandom % 4 == 0)) begin
        li.valid = 0; @(negedge clk);
      end
      li.valid = 1; li.data = in_rows[r];
      @(posedge clk);
      while (!li.ready) @(posedge clk);
      @(negedge clk);
    end
    li.valid = 0;
  endtask

  initial begin
    int t0;
    li.valid = 0; li.data = '0;
    for (int r = 0; r < R; r++)
      for (int l = 0; l < LANES; l++) begin
        src_rows[r][l] = coef_t'({$urandom, $urandom});
        in_rows[r][l]  = coef_t'({$urandom, $urandom});
      end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < R; r++) begin
      @(negedge clk); h_we = 1; h_slot = 1; h_row = (LOGN_MAX-4)'(r); h_wdata = src_rows[r];
    end
    @(negedge clk); h_we = 0;
    // send with random back-pressure while receiving with random gaps
    tx_start = 1; rx_start = 1;
    @(negedge clk); tx_start = 0; rx_start = 0;
    drive_in();
    wait (!tx_busy && !rx_busy);
    checks++;
    if (got_n != R) begin failures++; $display("FAIL sent %0d rows", got_n); end
    for (int r = 0; r < R; r++) begin
      @(negedge clk); h_re = 1; h_slot = 2; h_row = (LOGN_MAX-4)'(r);
      @(negedge clk); h_re = 0;
      checks++;
      if (rd_data[1] != in_rows[r]) begin failures++; $display("FAIL rx row %0d", r); end
    end
    // full-rate send
    got_n = 0; rand_ready = 0;
    @(negedge clk); tx_start = 1; t0 = cyc;
    @(negedge clk); tx_start = 0;
    wait (tx_done);
    checks++;
    if (cyc - t0 != R + 3 || got_n != R) begin
      failures++; $display("FAIL full-rate send took %0d cycles, %0d rows", cyc - t0, got_n);
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
