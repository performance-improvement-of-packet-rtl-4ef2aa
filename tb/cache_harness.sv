// cache_harness -- drives one flow_cache configuration against
// flowref_pkg::cache_model and counts checks and failures.
//
// After reset it checks that the cache stays busy for exactly one sweep
// (one cycle per set) and then runs OPS random operations: lookups of tags
// from a small pool (so that hits, misses and evictions all occur), fills
// after misses and occasional rule clears. Every lookup's hit flag and rule
// number, every fill's way and eviction flag, and the length of every clear
// sweep are compared with the model. For the random policy the fill way is
// taken from the cache and only checked to be a legal way. The optional
// flow-ID field is enabled (32 bits) and must return the value written by
// the fill of the hit entry.
module cache_harness
  import flowcache_pkg::*;
  import flowref_pkg::*;
#(
  parameter int      ENTRIES = 32,
  parameter int      WAYS    = 4,
  parameter policy_e POLICY  = POL_LRU,
  parameter int      OPS     = 3000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_hit,
  output int   n_evict,
  output int   n_clear
);
  localparam int SETS  = ENTRIES / WAYS;
  localparam int IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic rst_n = 0;
  logic lk_valid = 0, fill_valid = 0, clr_valid = 0;
  logic [IDX_W-1:0] lk_index = '0, fill_index = '0;
  logic [31:0] lk_tag = '0, fill_tag = '0;
  logic [15:0] fill_result = '0, clr_rule = '0, lk_result;
  logic lk_hit, fill_evict, clr_match, busy;
  logic [WAY_W-1:0] lk_way, fill_way;
  logic [31:0] serial;
  logic [31:0] fill_fid = '0, lk_fid;
  logic [31:0] fid_m [ENTRIES];

  flow_cache #(.ENTRIES(ENTRIES), .WAYS(WAYS), .RESULT_W(16), .POLICY(POLICY), .FID_W(32)) dut (
    .clk, .rst_n, .lk_valid, .lk_index, .lk_tag, .lk_hit, .lk_way, .lk_result, .lk_fid,
    .fill_valid, .fill_index, .fill_tag, .fill_result, .fill_fid, .fill_way, .fill_evict,
    .clr_valid, .clr_rule, .clr_match, .busy, .serial);

  cache_model m;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL [%0d-way/%0d %s] %s: got %0d expected %0d", WAYS, ENTRIES, POLICY.name(), what, got, exp);
    end
  endtask

  task automatic wait_sweep();
    int n = 0;
    while (busy) begin @(negedge clk); n++; end
    check("sweep length", n, SETS);
  endtask

  initial begin
    // a direct-mapped cache keeps no age field
    int pol = (WAYS == 1) ? 2 : (POLICY == POL_LRU) ? 0 : (POLICY == POL_LFU) ? 1 : 2;
    done = 0; checks = 0; failures = 0; n_hit = 0; n_evict = 0; n_clear = 0;
    m = new(SETS, WAYS, pol);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_sweep();
    for (int op = 0; op < OPS; op++) begin
      int s, way, rule, r;
      bit hit, ev;
      logic [31:0] t;
      r = $urandom_range(0, 99);
      if (r < 3) begin
        // clear one rule
        rule = $urandom_range(1, 7);
        clr_valid = 1; clr_rule = 16'(rule);
        @(negedge clk);
        clr_valid = 0;
        void'(m.clear_rule(rule));
        n_clear++;
        wait_sweep();
        continue;
      end
      s = (SETS > 1) ? $urandom_range(0, SETS - 1) : 0;
      t = 32'($urandom_range(0, 3 * WAYS)) * 32'h01010101;
      lk_valid = 1; lk_index = IDX_W'(s); lk_tag = t;
      #1;
      hit = m.lookup(s, t, way, rule);
      check("hit", lk_hit, hit);
      if (hit) begin
        check("way", lk_way, way);
        check("rule", lk_result, rule);
        check("flow-ID field", lk_fid, fid_m[s * WAYS + way]);
        n_hit++;
      end
      @(negedge clk);
      lk_valid = 0;
      check("serial", serial, m.serial);
      if (!hit && $urandom_range(0, 9) < 8) begin
        rule = $urandom_range(0, 7);
        fill_valid = 1; fill_index = IDX_W'(s); fill_tag = t; fill_result = 16'(rule);
        fill_fid = $urandom;
        #1;
        fid_m[s * WAYS + int'(fill_way)] = fill_fid;
        if (pol == 2) begin
          int v;
          v = int'(fill_way);
          check("random way legal", v < WAYS, 1);
          ev = m.full(s, v);
          check("evict", fill_evict, ev);
          m.tag[s][v] = t; m.res[s][v] = rule; m.age[s][v] = 0;
        end else begin
          way = m.fill(s, t, rule, '0, ev);
          check("fill way", fill_way, way);
          check("evict", fill_evict, ev);
        end
        if (ev) n_evict++;
        @(negedge clk);
        fill_valid = 0;
      end
    end
    check("hits seen", n_hit > 0, 1);
    check("evictions seen", n_evict > 0, 1);
    done = 1;
  end
endmodule
