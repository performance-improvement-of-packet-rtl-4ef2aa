// tb_flow_cache -- self-checking test of the cache memory.
//
// Runs four small configurations side by side, each through cache_harness
// against a software cache model: 4-way LRU, 4-way LFU, 4-way random
// replacement (32 entries each), a direct-mapped cache (16 entries, which
// keeps no age field whatever the policy) and
// a fully associative LRU cache (8 entries, one set). Hits, rule numbers,
// fill ways, evictions, serial numbers and the sweep length after reset and
// after every rule clear are checked.
module tb_flow_cache;
  import flowcache_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 5;
  logic done [N];
  int c [N], f [N], h [N], e [N], k [N];

  cache_harness #(.ENTRIES(32), .WAYS(4), .POLICY(POL_LRU))    h0 (clk, done[0], c[0], f[0], h[0], e[0], k[0]);
  cache_harness #(.ENTRIES(32), .WAYS(4), .POLICY(POL_LFU))    h1 (clk, done[1], c[1], f[1], h[1], e[1], k[1]);
  cache_harness #(.ENTRIES(32), .WAYS(4), .POLICY(POL_RANDOM)) h2 (clk, done[2], c[2], f[2], h[2], e[2], k[2]);
  cache_harness #(.ENTRIES(16), .WAYS(1), .POLICY(POL_LRU))    h3 (clk, done[3], c[3], f[3], h[3], e[3], k[3]);
  cache_harness #(.ENTRIES(8),  .WAYS(8), .POLICY(POL_LRU))    h4 (clk, done[4], c[4], f[4], h[4], e[4], k[4]);

  int checks, failures;

  initial begin
    #20;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += c[i]; failures += f[i];
      $display("config %0d: checks=%0d failures=%0d hits=%0d evictions=%0d clears=%0d",
               i, c[i], f[i], h[i], e[i], k[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < N; i++) begin checks += c[i]; failures += f[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
