// tb_lfsr_rng -- self-checking test of the replacement random number
// generator.
//
// Checks the reset state, then follows the LFSR for a whole period
// against a software model of the x^16+x^14+x^13+x^11+1 Galois LFSR, checks
// that the output is state mod N and in 0..N-1 (N = 4 and N = 3), that the
// state returns to the seed after exactly 65535 steps and that every
// output value occurs.
module tb_lfsr_rng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0]  v4, v3;
  logic [15:0] s4, s3;

  lfsr_rng #(.N(4)) u4 (.clk, .rst_n, .value(v4), .state(s4));
  lfsr_rng #(.N(3), .SEED(16'h0001)) u3 (.clk, .rst_n, .value(v3), .state(s3));

  initial begin
    logic [15:0] m;
    int cnt4 [4];
    int cnt3 [3];
    int bad = 0;
    int period = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++; if (s4 !== 16'hACE1 || s3 !== 16'h0001) begin failures++; $display("FAIL reset state"); end
    m = 16'hACE1;
    foreach (cnt4[i]) cnt4[i] = 0;
    foreach (cnt3[i]) cnt3[i] = 0;
    for (int n = 0; n < 65535; n++) begin
      if (s4 !== m) bad++;
      if (v4 !== 2'(m % 4)) bad++;
      if (v3 > 2 || v3 !== 2'(s3 % 3)) bad++;
      cnt4[v4]++;
      if (v3 <= 2) cnt3[v3]++;
      m = m[0] ? ((m >> 1) ^ 16'hB400) : (m >> 1);
      @(posedge clk); #1;
      period++;
      if (s4 == 16'hACE1) break;
    end
    checks++; if (bad != 0) begin failures++; $display("FAIL %0d sequence mismatches", bad); end
    checks++; if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    foreach (cnt4[i]) begin checks++; if (cnt4[i] < 16000) begin failures++; $display("FAIL value %0d seen %0d times", i, cnt4[i]); end end
    foreach (cnt3[i]) begin checks++; if (cnt3[i] < 20000) begin failures++; $display("FAIL N=3 value %0d seen %0d times", i, cnt3[i]); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
