// tb_miss_ratio -- miss ratio of the flow cache across the configurations
// the design is meant to be evaluated in.
//
// The same synthetic trace (top_harness: 17016 flows, protocol mix of the
// evaluated IPv6 trace, strong temporal locality) is replayed through
//   * 256 and 1024 entries, each direct-mapped, 2-way, 4-way (LRU), and
//     fully associative at 256 entries (LRU),
//   * 1024 entries 4-way with LFU and with random replacement.
// Every response is checked (rule number, and hit flag against a cache
// model for LRU/LFU); the miss ratio and the misclassification ratio (from
// the monitor that keeps full flow IDs) of each configuration are printed. The
// absolute ratios belong to the synthetic trace, not to a real one. Also
// checked: at equal associativity the larger cache misses no more often,
// the fully associative 256-entry cache misses no more often than the
// direct-mapped one, and every configuration's monitor flags the near-twin
// flows of the trace.
module tb_miss_ratio;
  import flowcache_pkg::*;

  localparam int N = 9;
  localparam int NP = 30000;
  logic clk = 0;
  always #5 clk = ~clk;

  logic done [N];
  int c [N], f [N], mi [N], mc [N];
  string name [N] = '{"256 direct", "256 2-way", "256 4-way", "256 full",
                      "1024 direct", "1024 2-way", "1024 4-way", "1024 4-way LFU", "1024 4-way random"};

  top_harness #(.ENTRIES(256),  .WAYS(1),   .NPKTS(NP)) h0 (clk, done[0], c[0], f[0], mi[0], mc[0]);
  top_harness #(.ENTRIES(256),  .WAYS(2),   .NPKTS(NP)) h1 (clk, done[1], c[1], f[1], mi[1], mc[1]);
  top_harness #(.ENTRIES(256),  .WAYS(4),   .NPKTS(NP)) h2 (clk, done[2], c[2], f[2], mi[2], mc[2]);
  top_harness #(.ENTRIES(256),  .WAYS(256), .NPKTS(NP)) h3 (clk, done[3], c[3], f[3], mi[3], mc[3]);
  top_harness #(.ENTRIES(1024), .WAYS(1),   .NPKTS(NP)) h4 (clk, done[4], c[4], f[4], mi[4], mc[4]);
  top_harness #(.ENTRIES(1024), .WAYS(2),   .NPKTS(NP)) h5 (clk, done[5], c[5], f[5], mi[5], mc[5]);
  top_harness #(.ENTRIES(1024), .WAYS(4),   .NPKTS(NP)) h6 (clk, done[6], c[6], f[6], mi[6], mc[6]);
  top_harness #(.ENTRIES(1024), .WAYS(4), .POLICY(POL_LFU),    .NPKTS(NP)) h7 (clk, done[7], c[7], f[7], mi[7], mc[7]);
  top_harness #(.ENTRIES(1024), .WAYS(4), .POLICY(POL_RANDOM), .NPKTS(NP)) h8 (clk, done[8], c[8], f[8], mi[8], mc[8]);

  int checks, failures;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit all;
    #20;
    all = 0;
    while (!all) begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) if (!done[i]) all = 0;
    end
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += c[i]; failures += f[i];
      $display("%-18s miss ratio %0d.%0d%% (%0d)  misclassified %0d.%0d%% (%0d)  checks %0d failures %0d",
               name[i], mi[i] * 100 / NP, (mi[i] * 1000 / NP) % 10, mi[i],
               mc[i] * 100 / NP, (mc[i] * 1000 / NP) % 10, mc[i], c[i], f[i]);
    end
    check("1024 direct <= 256 direct", mi[4] <= mi[0]);
    check("1024 2-way <= 256 2-way", mi[5] <= mi[1]);
    check("1024 4-way <= 256 4-way", mi[6] <= mi[2]);
    check("256 full <= 256 direct", mi[3] <= mi[0]);
    for (int i = 0; i < N; i++) check($sformatf("%s: near twins flagged as misclassified", name[i]), mc[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
