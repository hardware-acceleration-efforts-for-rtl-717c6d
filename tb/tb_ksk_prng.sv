// tb_ksk_prng: checks the key PRNG against an independent model of its
// streams for two seeds and two moduli, that every value is below q, that
// the streams hold still without take, that a reload restarts the sequence,
// and that the values spread over [0, q) (mean within 2% of q/2).
module tb_ksk_prng;
  import medha_pkg::*;
  import prng_model_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  coef_t q;
  logic load = 0, take = 0;
  logic [63:0] seed;
  coef_t val [DCORES];
  logic [63:0] m [DCORES];

  ksk_prng dut (.clk, .rst_n, .q, .load, .seed, .take, .val);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int i = 0; i < DCORES; i++) begin
      checks++;
      if (val[i] != coef_t'(out(m[i], 64'(q))) || val[i] >= q) begin
        failures++;
        if (failures < 6) $display("FAIL %s lane %0d got %h exp %h", what, i, val[i], out(m[i], 64'(q)));
      end
    end
  endtask

  initial begin
    real sum;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      q = (t == 0) ? coef_t'(60'h3fffffffd60001) : coef_t'(60'hffffffffffc0001);
      seed = (t == 0) ? 64'h0123_4567_89ab_cdef : 64'(t);
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int i = 0; i < DCORES; i++) m[i] = seed_lane(seed, i);
      compare("after load");
      sum = 0.0;
      for (int s = 0; s < 2000; s++) begin
        @(negedge clk); take = 1;
        @(posedge clk); #1 take = 0;
        for (int i = 0; i < DCORES; i++) begin
          m[i] = next(m[i]);
          sum += real'(val[i]) / real'(q);
        end
        compare("step");
        if (s % 500 == 0) begin
          @(negedge clk); @(negedge clk);
          compare("hold");
        end
      end
      checks++;
      sum = sum / (2000.0 * DCORES);
      if (sum < 0.49 || sum > 0.51) begin failures++; $display("FAIL mean %f", sum); end
    end
    // reload with the first seed restarts the stream
    q = coef_t'(60'h3fffffffd60001); seed = 64'h0123_4567_89ab_cdef;
    @(negedge clk); load = 1;
    @(negedge clk); load = 0;
    for (int i = 0; i < DCORES; i++) m[i] = seed_lane(seed, i);
    compare("reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
