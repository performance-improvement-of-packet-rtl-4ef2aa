// top_harness -- replays one synthetic packet trace through a flowcache_top
// configuration and measures its miss ratio.
//
// The trace is generated by a private xorshift32 generator with a fixed
// seed, so every harness instance sees exactly the same packets. NFLOWS
// flows, drawing their routing prefixes from 512 per direction, are mixed by protocol like the evaluated IPv6 trace (about 7% ICMPv6,
// 35% TCP, 58% UDP flows); each packet repeats one of the 32 most recently
// used flows with probability 3/4 (temporal locality), and otherwise picks
// a flow from the whole population, skewed toward low flow numbers. One
// packet in 32 is sent instead by the flow's near twin, a flow that differs
// in one prefix bit that the index does not use, so that the two collide.
//
// The misclassification monitor is enabled (each entry keeps the full flow
// ID) and its flags are counted. Checks per response: unless flagged as
// misclassified, the rule number equals the behavioural classifier's rule
// for the flow; for LRU and LFU the hit flag and the misclassification flag
// also equal those of the software cache model. Outputs: checks, failures,
// misses, misclass, done.
module top_harness
  import flowcache_pkg::*;
  import flowref_pkg::*;
#(
  parameter int      ENTRIES = 1024,
  parameter int      WAYS    = 4,
  parameter policy_e POLICY  = POL_LRU,
  parameter int      NPKTS   = 50000,
  parameter int      NFLOWS  = 17016
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   misses,
  output int   misclass
);
  localparam int SETS  = ENTRIES / WAYS;
  localparam int IDX_W = (SETS > 1) ? $clog2(SETS) : 1;

  logic        rst_n = 0;
  logic        req_valid = 0, req_ready;
  flow_id_t    req_flow = '0;
  logic        resp_valid, resp_hit, resp_misclass;
  logic [15:0] resp_rule;
  logic        cls_req_valid, cls_resp_valid;
  flow_id_t    cls_req_flow;
  logic [15:0] cls_resp_rule;
  logic        upd_ready;
  int          n_cls;

  flowcache_top #(.ENTRIES(ENTRIES), .WAYS(WAYS), .POLICY(POLICY), .MISCLASS_CHECK(1'b1)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_flow,
    .resp_valid, .resp_hit, .resp_rule, .resp_misclass,
    .cls_req_valid, .cls_req_flow, .cls_resp_valid, .cls_resp_rule,
    .upd_valid(1'b0), .upd_ready, .upd_rule(16'd0));

  classifier_model #(.LAT(4)) u_cls (
    .clk, .rst_n, .req_valid(cls_req_valid), .req_flow(cls_req_flow), .shrink(0),
    .resp_valid(cls_resp_valid), .resp_rule(cls_resp_rule), .n_requests(n_cls));

  int unsigned x = 32'h2545f491;
  function automatic int unsigned nxt();
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  // Flow numbers with bit 20 set are "near twins": the flow without that
  // bit, with SA bit 64 (a prefix bit the index does not sample at up to 8
  // index bits) inverted. A twin has the same index and tag as its flow.
  function automatic flow_id_t make_flow(int i);
    flow_id_t f;
    int unsigned h;
    int unsigned w [10];
    if (i >= (1 << 20)) begin
      f = make_flow(i - (1 << 20));
      f.sa[64] = ~f.sa[64];
      return f;
    end
    h = 32'(i) * 32'h9e3779b9 + 32'h7f4a7c15;
    for (int k = 0; k < 10; k++) begin
      h ^= h << 13; h ^= h >> 17; h ^= h << 5;
      w[k] = h;
    end
    // 512 distinct routing prefixes per direction, one node ID per flow
    f.sa = {32'h2001_0000 | (w[0] % 512) * 32'h0000_9e37, (w[0] % 512) * 32'h85eb_ca6b, w[1], w[2]};
    f.da = {32'h2400_0000 | (w[3] % 512) * 32'h0001_c2b3, (w[3] % 512) * 32'hc2b2_ae35, w[4], w[5]};
    f.sp = 16'(w[6]);
    f.dp = 16'(w[7]);
    case (w[8] % 100) inside
      [0:6]:   f.proto = 8'd58;
      [7:41]:  f.proto = 8'd6;
      default: f.proto = 8'd17;
    endcase
    return f;
  endfunction

  cache_model m;
  flow_id_t pend [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d/%0d-way %s] %s: got %0d expected %0d",
                                  ENTRIES, WAYS, POLICY.name(), what, got, exp);
    end
  endtask

  initial begin
    int recent [32];
    int sent, nresp;
    bit taken;
    done = 0; checks = 0; failures = 0; misses = 0; misclass = 0;
    m = new(SETS, WAYS, (POLICY == POL_LRU) ? 0 : 1);
    foreach (recent[i]) recent[i] = i;
    repeat (3) @(negedge clk);
    rst_n = 1;
    sent = 0; nresp = 0;
    while (nresp < NPKTS) begin
      if (sent < NPKTS && !req_valid) begin
        int fi;
        if (nxt() % 4 != 0) fi = recent[nxt() % 32];
        else begin
          fi = int'(nxt() % NFLOWS);
          if (nxt() % 2 == 0) fi = fi % (NFLOWS / 8);
          recent[nxt() % 32] = fi;
        end
        if (nxt() % 32 == 0) fi += (1 << 20);
        req_flow  = make_flow(fi);
        req_valid = 1;
      end
      #1;
      taken = req_valid && req_ready;
      if (taken) begin
        pend.push_back(req_flow);
        sent++;
      end
      @(negedge clk);
      if (taken) req_valid = 0;
      if (resp_valid) begin
        flow_id_t f;
        int way, rule;
        bit hit, ev;
        f = pend.pop_front();
        nresp++;
        if (!resp_hit) misses++;
        if (resp_misclass) misclass++;
        if (!resp_misclass) check("rule", resp_rule, ref_classify(f, 0));
        if (POLICY != POL_RANDOM) begin
          int s;
          logic [31:0] t;
          s = int'(ref_index(f, 1, IDX_W));
          t = ref_tag(f, 0);
          if (SETS == 1) s = 0;
          hit = m.lookup(s, t, way, rule);
          check("hit", resp_hit, hit);
          check("misclassification flag", resp_misclass, hit && m.flw[s][way] != f);
          if (!hit) void'(m.fill(s, t, ref_classify(f, 0), f, ev));
        end
      end
    end
    check("classifier requests = misses", n_cls, misses);
    done = 1;
  end
endmodule
