// tb_collision -- collision counts of the tag hashes and of random
// bit-selection over a set of distinct IPv6 flows.
//
// A flow "collides" under a function when at least one other distinct flow
// gets the same value from it. The test builds 17016 distinct flows with the
// protocol mix of a backbone trace (1166 ICMPv6, 6000 TCP, 9841 UDP and 9
// other flows) between 2518 addresses. Addresses are made of a few hundred
// /64 prefixes under common /32s and EUI-64 style node IDs; TCP and UDP
// flows pair a well-known port with an ephemeral one. Each flow is applied
// to flow_hash (I, II and III) and to rbs_index for range types 1-5 at
// 8, 16, 24 and 32 index bits. It prints the number and ratio of colliding
// flows for each function.
//
// Checks: every output equals the reference model's value for every flow;
// hash III collides exactly as hash II (its tag is the same); hashes I and
// II agree on every TCP/UDP flow; and, because a wider index of one range
// type starts with the positions of the narrower one, a wider index never
// has more colliding flows than a narrower one. The counts themselves
// depend on the synthetic trace and are reported, not checked.
module tb_collision;
  import flowcache_pkg::*;
  import flowref_pkg::*;

  localparam int NFLOWS = 17016;
  localparam int NADDR  = 2518;
  localparam int NTYPES = 5;
  localparam int NBITS  = 4;   // index widths 8, 16, 24, 32

  int checks = 0, failures = 0;

  flow_id_t          flow = '0;
  logic [TAG_W-1:0]  tag [3];
  logic [63:0]       idx [NTYPES][NBITS];

  flow_hash #(.KIND(HASH_I))   u_h1 (.flow, .tag(tag[0]));
  flow_hash #(.KIND(HASH_II))  u_h2 (.flow, .tag(tag[1]));
  flow_hash #(.KIND(HASH_III)) u_h3 (.flow, .tag(tag[2]));

  for (genvar t = 0; t < NTYPES; t++) begin : g_type
    for (genvar b = 0; b < NBITS; b++) begin : g_bits
      localparam int W = 8 * (b + 1);
      logic [W-1:0] v;
      rbs_index #(.IDX_W(W), .RANGE(range_kind_e'(t + 1))) u_rbs (.flow, .idx(v));
      assign idx[t][b] = 64'(v);
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // deterministic pseudo-random stream
  int unsigned rs = 32'h2545f491;
  function automatic int unsigned rnd();
    rs ^= rs << 13; rs ^= rs >> 17; rs ^= rs << 5;
    return rs;
  endfunction

  logic [127:0] addr [NADDR];
  flow_id_t     flows [NFLOWS];

  function automatic logic [127:0] make_addr();
    logic [63:0] pfx, iid;
    int unsigned site;
    site = rnd() % 300;
    pfx  = {(site < 150) ? 32'h2001_0db8 : 32'h3ffe_8000 + 32'(site % 7), 16'(site * 40503), 16'(rnd() % 4)};
    iid  = {8'(rnd()) & 8'hfd, 16'(rnd()), 16'hfffe, 24'(rnd())};
    return {pfx, iid};
  endfunction

  function automatic logic [15:0] well_known();
    logic [15:0] wk [8] = '{16'd80, 16'd22, 16'd25, 16'd53, 16'd443, 16'd110, 16'd123, 16'd21};
    return wk[rnd() % 8];
  endfunction

  initial begin
    bit seen [flow_id_t];
    int n;
    int tag_col [3];
    int idx_col [NTYPES][NBITS];

    for (int i = 0; i < NADDR; i++) addr[i] = make_addr();

    // distinct flows with the protocol mix of the trace
    n = 0;
    while (n < NFLOWS) begin
      flow_id_t f;
      f.sa = addr[rnd() % NADDR];
      f.da = addr[rnd() % NADDR];
      if (n < 1166) begin
        f.proto = 8'd58;
        f.sp = '0;
        f.dp = 16'(128 + rnd() % 8);   // ICMPv6 type in place of a port
      end else if (n < 1166 + 6000 + 9841) begin
        f.proto = (n < 1166 + 6000) ? 8'd6 : 8'd17;
        if (rnd() % 2) begin f.sp = well_known(); f.dp = 16'(1024 + rnd() % 64512); end
        else           begin f.dp = well_known(); f.sp = 16'(1024 + rnd() % 64512); end
      end else begin
        f.proto = (rnd() % 2) ? 8'd41 : 8'd103;   // IP-in-IP, PIM
        f.sp = '0;
        f.dp = '0;
      end
      if (!seen.exists(f)) begin
        seen[f] = 1;
        flows[n] = f;
        n++;
      end
    end

    // tags: values of every function for every flow, checked against the model
    begin
      int cnt_t [3][logic [31:0]];
      int cnt_i [NTYPES][NBITS][logic [63:0]];
      for (int i = 0; i < NFLOWS; i++) begin
        flow = flows[i];
        #1;
        for (int k = 0; k < 3; k++) begin
          check($sformatf("tag kind %0d flow %0d", k, i), tag[k], ref_tag(flow, k));
          cnt_t[k][tag[k]]++;
        end
        if (flow.proto inside {8'd6, 8'd17}) check("hash I = II on TCP/UDP", tag[0], tag[1]);
        for (int t = 0; t < NTYPES; t++)
          for (int b = 0; b < NBITS; b++) begin
            logic [63:0] e;
            e = ref_index(flow, t + 1, 8 * (b + 1));
            check($sformatf("index type %0d bits %0d flow %0d", t + 1, 8 * (b + 1), i), idx[t][b], e);
            cnt_i[t][b][idx[t][b]]++;
          end
      end
      // colliding flows: flows whose value is shared by another flow
      for (int k = 0; k < 3; k++) begin
        tag_col[k] = 0;
        foreach (cnt_t[k][v]) if (cnt_t[k][v] > 1) tag_col[k] += cnt_t[k][v];
      end
      for (int t = 0; t < NTYPES; t++)
        for (int b = 0; b < NBITS; b++) begin
          idx_col[t][b] = 0;
          foreach (cnt_i[t][b][v]) if (cnt_i[t][b][v] > 1) idx_col[t][b] += cnt_i[t][b][v];
        end
    end

    $display("tag collisions over %0d flows:", NFLOWS);
    for (int k = 0; k < 3; k++)
      $display("  hash function %s  %5d flows  %0d.%0d%%", (k == 0) ? "I  " : (k == 1) ? "II " : "III",
               tag_col[k], tag_col[k] * 100 / NFLOWS, (tag_col[k] * 1000 / NFLOWS) % 10);
    $display("random bit-selection, colliding flows (ratio):");
    $display("  type       8 bits          16 bits         24 bits         32 bits");
    for (int t = 0; t < NTYPES; t++) begin
      string line;
      line = $sformatf("  type %0d", t + 1);
      for (int b = 0; b < NBITS; b++)
        line = {line, $sformatf("  %6d (%3d.%0d%%)", idx_col[t][b], idx_col[t][b] * 100 / NFLOWS,
                                (idx_col[t][b] * 1000 / NFLOWS) % 10)};
      $display("%s", line);
    end

    check("hash III collisions = hash II collisions", tag_col[2], tag_col[1]);
    for (int t = 0; t < NTYPES; t++)
      for (int b = 1; b < NBITS; b++)
        check($sformatf("type %0d: %0d bits collide no more than %0d bits", t + 1, 8 * (b + 1), 8 * b),
              idx_col[t][b] <= idx_col[t][b - 1], 1);
    check("8-bit index over 17016 flows collides", idx_col[0][0] > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
