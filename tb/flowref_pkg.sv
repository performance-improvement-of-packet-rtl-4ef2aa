// flowref_pkg -- reference models for the flow-cache testbenches.
//
// Written independently of the RTL, from the bit-level description of the
// design:
//   * ref_tag: hash functions I/II/III computed bit by bit, numbering bits
//     1..n from the MSB of each field as the design description does.
//   * ref_rbs_pos / ref_index: the random bit-selection positions (xorshift32
//     from seed 32'h1badb002, candidate = x mod width, repeats skipped) and
//     the range vectors of the five range types.
//   * cache_model: a set-associative cache with LRU or LFU replacement, the
//     all-zero empty entry, packet serial numbers and rule clearing. It also
//     keeps the full flow ID of each entry so that a test can see when two
//     different flows alias to one entry.
//   * ref_classify: the rule table used by the behavioural classifier.
package flowref_pkg;
  import flowcache_pkg::*;

  // bit i (1 = MSB) of an n-bit value
  function automatic bit fb(logic [127:0] v, int n, int i);
    return v[n - i];
  endfunction

  function automatic logic [31:0] ref_tag(flow_id_t f, int kind);
    bit x [1:64];
    bit y [1:32];
    bit c [1:32];
    bit non_l4, inv;
    logic [15:0] sp, dp;
    logic [31:0] t;
    inv = (kind == 2);
    non_l4 = !(f.proto == 8'd6 || f.proto == 8'd17);
    sp = non_l4 ? ((kind == 0) ? 16'h0000 : 16'hffff) : f.sp;
    dp = non_l4 ? ((kind == 0) ? 16'h0000 : 16'hffff) : f.dp;
    for (int i = 1; i <= 64; i++)
      x[i] = fb(128'(f.sa[63:0]), 64, i) ^ fb(128'(f.da[63:0]), 64, 65 - i) ^ inv;
    for (int j = 1; j <= 32; j++) y[j] = x[j] ^ x[65 - j] ^ inv;
    for (int j = 1; j <= 16; j++) begin
      c[j]      = fb(128'(sp), 16, j);
      c[16 + j] = fb(128'(dp), 16, j);
    end
    for (int j = 1; j <= 32; j++) t[32 - j] = y[j] ^ c[j] ^ inv;
    return t;
  endfunction

  function automatic int ref_width(int rtype);
    case (rtype)
      1: return 168;
      2: return 296;
      3: return 288;
      4: return 160;
      default: return 162;
    endcase
  endfunction

  function automatic int ref_rbs_pos(int width, int k);
    int unsigned x = 32'h1badb002;
    int q[$];
    while (q.size() <= k) begin
      int c;
      x ^= x << 13;
      x ^= x >> 17;
      x ^= x << 5;
      c = int'(x % width);
      if (!(c inside {q})) q.push_back(c);
    end
    return q[k];
  endfunction

  function automatic logic [295:0] ref_range(flow_id_t f, int rtype);
    logic [1:0] sp2;
    case (f.proto)
      8'd58: sp2 = 0;
      8'd6:  sp2 = 1;
      8'd17: sp2 = 2;
      default: sp2 = 3;
    endcase
    case (rtype)
      1: return 296'({f.sa[127:64], f.da[127:64], f.sp, f.dp, f.proto});
      2: return 296'({f.sa, f.da, f.sp, f.dp, f.proto});
      3: return 296'({f.sa, f.da, f.sp, f.dp});
      4: return 296'({f.sa[127:64], f.da[127:64], f.sp, f.dp});
      default: return 296'({f.sa[63:0], f.da[63:0], f.sp, f.dp, sp2});
    endcase
  endfunction

  function automatic logic [63:0] ref_index(flow_id_t f, int rtype, int bits);
    logic [295:0] r = ref_range(f, rtype);
    logic [63:0] idx = '0;
    for (int k = 0; k < bits; k++) idx[k] = r[ref_rbs_pos(ref_width(rtype), k)];
    return idx;
  endfunction

  function automatic flow_id_t rand_flow();
    flow_id_t f;
    f.sa = {$urandom, $urandom, $urandom, $urandom};
    f.da = {$urandom, $urandom, $urandom, $urandom};
    f.sp = 16'($urandom);
    f.dp = 16'($urandom);
    case ($urandom_range(0, 3))
      0: f.proto = 8'd6;
      1: f.proto = 8'd17;
      2: f.proto = 8'd58;
      default: f.proto = 8'($urandom);
    endcase
    return f;
  endfunction

  // Rule table of the behavioural classifier: rule r (1..8) matches protocol
  // TCP (odd r) or UDP (even r) and a destination-port band of 8192 ports
  // starting at (r-1)*8192. Each rule update of rule r (counted in
  // upd[r]) shrinks its band by 1024 ports from the top; flows that leave
  // a band fall to the default rule 0. Bands never overlap, so the order of
  // the rules does not matter.
  function automatic int ref_classify(flow_id_t f, int unsigned shrink);
    for (int r = 1; r <= 8; r++) begin
      int lo = (r - 1) * 8192;
      int hi = lo + 8191 - 1024 * int'((shrink >> (4 * (r - 1))) & 4'hf);
      bit pm = (r % 2 == 1) ? (f.proto == 8'd6) : (f.proto == 8'd17);
      if (pm && int'(f.dp) >= lo && int'(f.dp) <= hi) return r;
    end
    return 0;
  endfunction

  class cache_model;
    int sets, ways, policy, limit;
    longint unsigned serial;
    logic [31:0]   tag [][];
    int            res [][];
    longint        age [][];
    flow_id_t      flw [][];

    function new(int sets, int ways, int policy, int limit = 4);
      this.sets = sets; this.ways = ways; this.policy = policy; this.limit = limit;
      tag = new[sets]; res = new[sets]; age = new[sets]; flw = new[sets];
      foreach (tag[s]) begin
        tag[s] = new[ways]; res[s] = new[ways]; age[s] = new[ways]; flw[s] = new[ways];
      end
      clear_all();
    endfunction

    function void clear_all();
      serial = 0;
      foreach (tag[s, w]) begin tag[s][w] = 0; res[s][w] = 0; age[s][w] = 0; end
    endfunction

    function bit full(int s, int w);
      return tag[s][w] != 0 || res[s][w] != 0 || age[s][w] != 0;
    endfunction

    // policy: 0 LRU, 1 LFU, 2 random (no age field)
  // returns hit; way and rule through refs
    function bit lookup(int s, logic [31:0] t, output int way, output int rule);
      serial++;
      way = -1; rule = 0;
      for (int w = 0; w < ways; w++)
        if (way < 0 && full(s, w) && tag[s][w] == t) way = w;
      if (way >= 0) begin
        rule = res[s][way];
        if (policy == 0) age[s][way] = serial & 64'hffffffff;
        else if (policy == 1 && age[s][way] < limit) age[s][way]++;
        return 1;
      end
      if (policy == 1)
        for (int w = 0; w < ways; w++) if (age[s][w] > 0) age[s][w]--;
      return 0;
    endfunction

    function int fill(int s, logic [31:0] t, int rule, flow_id_t f, output bit evict);
      int v = 0;
      for (int w = 1; w < ways; w++) if (age[s][w] < age[s][v]) v = w;
      evict = full(s, v);
      tag[s][v] = t; res[s][v] = rule; flw[s][v] = f;
      age[s][v] = (policy == 0) ? (serial & 64'hffffffff) : 1;
      return v;
    endfunction

    function int clear_rule(int rule);
      int n = 0;
      foreach (tag[s, w]) if (res[s][w] == rule) begin
        if (full(s, w)) n++;
        tag[s][w] = 0; res[s][w] = 0; age[s][w] = 0;
      end
      return n;
    endfunction
  endclass

endpackage
