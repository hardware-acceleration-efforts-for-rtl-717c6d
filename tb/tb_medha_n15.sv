// tb_medha_n15: end-to-end homomorphic multiplication with relinearisation
// at the larger ring degree 2^15. The top keeps its default memory, twiddle
// and microcode sizes, so the 40 slots of 2^14 coefficients become 20 slots
// of 2^15 and the twiddle tables are used in full; only the ring is cut to
// 4 RPAUs (three 54-bit moduli and the 60-bit special modulus) to keep the
// simulation short. See medha_e2e.svh.
module tb_medha_n15;
  localparam int NR  = 4;
  localparam real MIN_SAVING = 15.0;
  localparam int TWL = 15;
  localparam int LOGNS [1] = '{15};

  `include "medha_e2e.svh"

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  medha_top #(.NRPAU(NR)) dut (.*);
endmodule
