// tb_ntt_butterfly: streams random operands through the butterfly, one per
// cycle, for a 54-bit and a 60-bit modulus and both butterfly forms, and
// compares each result, 4 cycles later, with 128-bit modular arithmetic.
// Edge operands (0, q-1) are included.
module tb_ntt_butterfly;
  import medha_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  modulus_t md;
  logic inverse;
  coef_t a, b, w, x, y;
  ntt_butterfly dut (.clk, .md, .inverse, .a, .b, .w, .x, .y);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NV = 3000;
  logic [127:0] ex [NV], ey [NV];

  initial begin
    logic [127:0] q, aa, bb, ww;
    for (int t = 0; t < 4; t++) begin
      q = (t % 2 == 0) ? 128'h3fffffffd60001 : 128'hffffffffffc0001;
      md.q = coef_t'(q); md.k = (t % 2 == 0) ? 7'd54 : 7'd60;
      md.mu = (QW+1)'((128'd1 << (2 * md.k)) / q);
      inverse = t[1];
      for (int i = 0; i < NV + 4; i++) begin
        @(negedge clk);
        if (i < NV) begin
          aa = {$urandom, $urandom} % q; bb = {$urandom, $urandom} % q; ww = {$urandom, $urandom} % q;
          if (i == 0) begin aa = q - 1; bb = q - 1; ww = q - 1; end
          if (i == 1) begin aa = 0; bb = q - 1; ww = 1; end
          a = coef_t'(aa); b = coef_t'(bb); w = coef_t'(ww);
          if (inverse) begin
            ex[i] = (aa + bb) % q; ey[i] = ((aa + q - bb) * ww) % q;
          end else begin
            ex[i] = (aa + bb * ww) % q; ey[i] = (aa + q - (bb * ww) % q) % q;
          end
        end
        if (i >= 4) begin
          checks++;
          if (128'(x) != ex[i-4] || 128'(y) != ey[i-4]) begin
            failures++;
            if (failures < 5) $display("FAIL t=%0d i=%0d x=%h/%h y=%h/%h", t, i-4, x, ex[i-4], y, ey[i-4]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
