// tb_poly_mem: checks the packed polynomial memory. Random rows are written
// through two write ports at once and read back through four read ports with
// one cycle of latency; coefficients use the full 54-bit width. The stored
// row must be 12 URAM words of 72 bits (16 x 54 bits packed) rather than 16.
// Slot addressing follows the ring degree: at N = 2^11 slot 1 is the same
// storage as slots 2 and 3 at N = 2^10. A read without rd_en keeps its output.
module tb_poly_mem;
  import medha_pkg::*;

  localparam int LOGN = 10;
  localparam int R    = (1 << LOGN) / LANES;
  localparam int SL   = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] logn = 4'(LOGN);
  logic                rd_en [4], wr_en [2] = '{1'b0, 1'b0};
  logic [SLOT_W-1:0]   rd_slot [4], wr_slot [2];
  logic [LOGN_MAX-5:0] rd_row [4], wr_row [2];
  row_t                rd_data [4], wr_data [2];

  poly_mem #(.COEF_W(54), .SLOTS(SL), .LOGN_MX(LOGN), .NR(4), .NW(2)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  row_t ref_m [SL][R];

  function automatic row_t rnd_row();
    row_t r;
    for (int l = 0; l < LANES; l++) r[l] = coef_t'({$urandom, $urandom} & 64'h003f_ffff_ffff_ffff);
    return r;
  endfunction

  initial begin
    checks++;
    if ($bits(dut.mem[0]) != 12 * 72) begin failures++; $display("FAIL row is %0d bits", $bits(dut.mem[0])); end
    for (int p = 0; p < 4; p++) rd_en[p] = 0;
    // fill: two rows per cycle
    for (int s = 0; s < SL; s++)
      for (int r = 0; r < R; r += 2) begin
        @(negedge clk);
        for (int p = 0; p < 2; p++) begin
          ref_m[s][r + p] = rnd_row();
          wr_en[p] = 1; wr_slot[p] = SLOT_W'(s); wr_row[p] = (LOGN_MAX-4)'(r + p); wr_data[p] = ref_m[s][r + p];
        end
      end
    @(negedge clk); wr_en[0] = 0; wr_en[1] = 0;
    // four reads per cycle
    for (int i = 0; i < 400; i++) begin
      int s [4], r [4];
      for (int p = 0; p < 4; p++) begin
        s[p] = $urandom % SL; r[p] = $urandom % R;
        rd_en[p] = 1; rd_slot[p] = SLOT_W'(s[p]); rd_row[p] = (LOGN_MAX-4)'(r[p]);
      end
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rd_data[p] != ref_m[s[p]][r[p]]) begin failures++; $display("FAIL read %0d/%0d", s[p], r[p]); end
        rd_en[p] = 0;
      end
      rd_slot[0] = 0; rd_row[0] = 0;
      @(negedge clk);
      checks++;
      if (rd_data[0] != ref_m[s[0]][r[0]]) begin failures++; $display("FAIL hold"); end
    end
    // degree 2^11: slot 1 = old slots 2 and 3
    logn = 4'(LOGN + 1);
    for (int r = 0; r < 2 * R; r++) begin
      rd_en[0] = 1; rd_slot[0] = 1; rd_row[0] = (LOGN_MAX-4)'(r);
      @(negedge clk);
      checks++;
      if (rd_data[0] != ref_m[2 + r / R][r % R]) begin failures++; $display("FAIL 2^11 row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
