// tb_flowcache_top -- end-to-end test of the flow cache at its default size
// (1024 entries, 4-way, LRU, hash function I, range type 1).
//
// A pool of flows (TCP, UDP, ICMPv6 and other protocols) is replayed as a
// packet stream with locality: most packets come from a small, drifting
// set of recent flows, the rest from the whole pool, so hits, misses and
// evictions all occur. A behavioural classifier answers misses after a few
// cycles. Rule updates shrink a rule's port band and are sent to the cache
// every few thousand packets.
//
// Every response is checked against a software model (flowref_pkg): the
// tag and index are recomputed from the flow ID, a cache model decides hit
// or miss and the rule number, and for flows that do not alias another
// cached flow the rule number must also equal what the current rule table
// gives, which shows that the rule-update clear keeps the cache
// consistent. Timing checks: the cache is busy for 256 cycles after reset,
// a hit answers one cycle after the packet is taken, and a rule-update
// clear takes 256 cycles. Mechanisms counted, each of which must occur:
// hit, miss, eviction, stall of the input while a miss is classified,
// rule-update clear that empties entries, reclassification after an
// update, two distinct flows aliasing one entry, and flows without ports
// (ports replaced in the hash).
module tb_flowcache_top;
  import flowcache_pkg::*;
  import flowref_pkg::*;

  localparam int SETS    = 256;
  localparam int WAYS    = 4;
  localparam int IDX_W   = 8;
  localparam int NFLOWS  = 4000;
  localparam int NPKTS   = 40000;
  localparam int HOT     = 150;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid = 0, req_ready;
  flow_id_t    req_flow = '0;
  logic        resp_valid, resp_hit, resp_misclass;
  logic [15:0] resp_rule;
  logic        cls_req_valid, cls_resp_valid;
  flow_id_t    cls_req_flow;
  logic [15:0] cls_resp_rule;
  logic        upd_valid = 0, upd_ready;
  logic [15:0] upd_rule = '0;
  int unsigned shrink = 0;
  int          n_cls;

  flowcache_top dut (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_flow,
    .resp_valid, .resp_hit, .resp_rule, .resp_misclass,
    .cls_req_valid, .cls_req_flow, .cls_resp_valid, .cls_resp_rule,
    .upd_valid, .upd_ready, .upd_rule);

  classifier_model #(.LAT(6)) u_cls (
    .clk, .rst_n, .req_valid(cls_req_valid), .req_flow(cls_req_flow), .shrink,
    .resp_valid(cls_resp_valid), .resp_rule(cls_resp_rule), .n_requests(n_cls));

  cache_model m;
  flow_id_t pool [NFLOWS];
  flow_id_t pend [$];
  longint   pend_cyc [$];
  longint   cyc = 0;
  bit       stale [NFLOWS];

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_evict = 0, n_stall = 0, n_clear_entries = 0,
      n_reclass = 0, n_alias = 0, n_noport = 0, n_resp = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // response checker, runs at the falling edge after the response edge
  task automatic take_response();
    flow_id_t f;
    int s, way, rule, exp_rule;
    bit hit, ev;
    logic [31:0] t;
    longint acc;
    f = pend.pop_front();
    acc = pend_cyc.pop_front();
    n_resp++;
    s = int'(ref_index(f, 1, IDX_W));
    t = ref_tag(f, 0);
    hit = m.lookup(s, t, way, rule);
    check("hit flag", resp_hit, hit);
    check("no misclassification monitor at the defaults", resp_misclass, 0);
    if (hit) begin
      n_hit++;
      check("hit latency", cyc - acc, 1);
      check("hit rule", resp_rule, rule);
      if (m.flw[s][way] != f) n_alias++;
      else check("cached rule consistent", resp_rule, ref_classify(f, shrink));
    end else begin
      n_miss++;
      exp_rule = ref_classify(f, shrink);
      check("miss rule", resp_rule, exp_rule);
      void'(m.fill(s, t, exp_rule, f, ev));
      if (ev) n_evict++;
    end
    if (!(f.proto inside {8'd6, 8'd17})) n_noport++;
  endtask

  function automatic flow_id_t alias_of(flow_id_t f);
    // flip one SA-prefix bit that random bit-selection does not use
    for (int j = 0; j < 64; j++) begin
      bit used = 0;
      for (int k = 0; k < IDX_W; k++) if (ref_rbs_pos(168, k) == 104 + j) used = 1;
      if (!used) begin
        f.sa[64 + j] = ~f.sa[64 + j];
        return f;
      end
    end
    return f;
  endfunction

  initial begin
    int busy_cycles, sent, hot_base, upd_count;
    m = new(SETS, WAYS, 0);
    for (int i = 0; i < NFLOWS; i++) pool[i] = rand_flow();
    // flows 1, 3, 5, ...: aliases of flows 0, 2, 4, ... among the first 20
    for (int i = 1; i < 20; i += 2) pool[i] = alias_of(pool[i - 1]);

    repeat (3) @(negedge clk);
    rst_n = 1;
    busy_cycles = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; busy_cycles++; end
    check("reset clear sweep cycles", busy_cycles, SETS);

    sent = 0; hot_base = 0; upd_count = 0;
    while (sent < NPKTS || pend.size() > 0) begin
      int idx;
      bit do_upd;
      // drive inputs for the next edge
      do_upd = (sent > 0 && sent % 8000 == 0 && upd_count < sent / 8000 && pend.size() == 0);
      if (do_upd) begin
        upd_valid = 1;
        upd_rule  = 16'($urandom_range(1, 8));
        req_valid = 0;
      end else if (sent < NPKTS) begin
        if (sent < 40) idx = sent % 20;
        else if ($urandom_range(0, 99) < 85) idx = (hot_base + $urandom_range(0, HOT - 1)) % NFLOWS;
        else idx = $urandom_range(0, NFLOWS - 1);
        if (sent % 50 == 0) hot_base = (hot_base + 7) % NFLOWS;
        req_valid = 1;
        req_flow  = pool[idx];
      end else begin
        req_valid = 0;
      end
      #1;
      if (do_upd) begin
        int n0, nclr, r;
        while (!upd_ready) begin @(negedge clk); if (resp_valid) take_response(); #1; end
        @(negedge clk);
        upd_valid = 0;
        r = int'(upd_rule);
        // the rule's band shrinks now; cached entries of the rule must go
        shrink += 32'(1) << (4 * (r - 1));
        nclr = m.clear_rule(r);
        n_clear_entries += nclr;
        upd_count++;
        busy_cycles = 0;
        #1;
        while (!req_ready) begin @(negedge clk); #1; busy_cycles++; end
        check("rule clear sweep cycles", busy_cycles, SETS);
        // count flows of that rule that will be reclassified
        foreach (pool[i]) stale[i] = (ref_classify(pool[i], shrink) != ref_classify(pool[i], shrink - (32'(1) << (4 * (r - 1)))));
        continue;
      end
      if (req_valid && !req_ready) n_stall++;
      if (req_valid && req_ready) begin
        pend.push_back(req_flow);
        pend_cyc.push_back(cyc + 1);   // edge that takes the packet
        sent++;
      end
      @(negedge clk);
      if (resp_valid) begin
        // count a hit/miss on a flow whose rule changed: it was reclassified
        if (!resp_hit && pend.size() > 0) begin
          foreach (pool[i]) if (stale[i] && pool[i] == pend[0]) begin n_reclass++; stale[i] = 0; end
        end
        take_response();
      end
    end

    check("responses", n_resp, NPKTS);
    check("classifier requests = misses", n_cls, n_miss);
    $display("mechanisms: hit=%0d miss=%0d evict=%0d stall=%0d cleared_entries=%0d reclassified=%0d alias=%0d no_port=%0d",
             n_hit, n_miss, n_evict, n_stall, n_clear_entries, n_reclass, n_alias, n_noport);
    $display("miss ratio %0d.%0d%%", n_miss * 100 / NPKTS, (n_miss * 1000 / NPKTS) % 10);
    check("hit occurred", n_hit > 0, 1);
    check("miss occurred", n_miss > 0, 1);
    check("eviction occurred", n_evict > 0, 1);
    check("stall occurred", n_stall > 0, 1);
    check("rule clear emptied entries", n_clear_entries > 0, 1);
    check("reclassification occurred", n_reclass > 0, 1);
    check("alias occurred", n_alias > 0, 1);
    check("port-less flow occurred", n_noport > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
