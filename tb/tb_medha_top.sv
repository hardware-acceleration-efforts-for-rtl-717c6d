// tb_medha_top: end-to-end homomorphic multiplication with relinearisation
// on a reduced accelerator of 4 RPAUs (three 54-bit moduli and the 60-bit
// special modulus), run at ring degree 2^10 and then, with the same
// hardware, at 2^11. See medha_e2e.svh.
module tb_medha_top;
  localparam int NR  = 4;
  localparam real MIN_SAVING = 15.0;
  localparam int TWL = 11;
  localparam int LOGNS [2] = '{10, 11};

  `include "medha_e2e.svh"

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  medha_top #(.NRPAU(NR), .SLOTS(40), .LOGN_MX(10), .TW_LOGN(TWL)) dut (.*);
endmodule
