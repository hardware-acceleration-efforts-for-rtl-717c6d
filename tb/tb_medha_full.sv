// tb_medha_full: end-to-end homomorphic multiplication with relinearisation
// on the accelerator at its default size: 10 RPAUs (nine 54-bit moduli and
// the 60-bit special modulus), ring degree 2^14, 40 polynomial slots per
// RPAU. See medha_e2e.svh.
module tb_medha_full;
  localparam int NR  = 10;
  localparam real MIN_SAVING = 30.0;
  localparam int TWL = 15;
  localparam int LOGNS [1] = '{14};

  `include "medha_e2e.svh"

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  medha_top dut (.*);
endmodule
