// flow_cache -- set-associative cache memory of classified IPv6 flows.
//
// ENTRIES entries are arranged as SETS = ENTRIES/WAYS sets of WAYS entries.
// Every entry holds three fields: Tag (TAG_W bits), TS/Counter ("age",
// meaning set by the replacement policy) and Result (the rule number of the
// flow, RESULT_W bits). There is no valid bit: an entry whose fields are all
// zero is empty, and the whole memory is cleared after reset. WAYS = ENTRIES
// gives a fully associative cache (one set, the index is ignored); WAYS = 1
// a direct-mapped one.
//
// Operations, at most one per cycle (the caller keeps them exclusive):
//   * lookup (lk_valid): the set lk_index is read and every way's tag is
//     compared with lk_tag in the same cycle; lk_hit, lk_way and lk_result
//     are combinational. At the clock edge the packet serial number counter
//     advances and the set's ages are updated by repl_policy.
//   * fill (fill_valid): writes {fill_tag, age, fill_result} into the way
//     that repl_policy picks in set fill_index. fill_way and fill_evict
//     (victim was not empty) are combinational. The age written uses the
//     serial number of the last lookup, i.e. of the packet that missed.
//   * clear (clr_valid while !busy): a sweep over all sets, one set per
//     cycle, that empties every entry whose Result equals clr_rule. This is
//     how a change to a rule's prefixes or ports is kept consistent. After
//     reset the same sweep runs with every entry emptied. busy is high
//     during a sweep (SETS cycles); lookups and fills must wait.
//
// The fields, the all-zero empty entry, the 32-bit tag and serial-number
// timestamp, and clearing entries by rule number follow the document. The
// register-file organisation (same-cycle read), the one-set-per-cycle
// sweep and the interface are this design's choices.
//
// A direct-mapped cache (WAYS = 1) has a single candidate, so it keeps no
// TS/Counter field whatever POLICY says, as the document allows.
//
// FID_W > 0 adds a field holding the uncompressed flow ID (fill_fid), read
// out with a hit on lk_fid. It is not needed for operation: it measures
// misclassification, as in the document's evaluation. With FID_W = 0 (the
// default) there is no such field and lk_fid is 0.
//
// Parameters: ENTRIES (1024), WAYS (4), RESULT_W (16), POLICY (LRU),
// LFU_LIMIT (4), TS_W (32), RNG_SEED, FID_W (0).
module flow_cache
  import flowcache_pkg::*;
#(
  parameter int          ENTRIES   = 1024,
  parameter int          WAYS      = 4,
  parameter int          RESULT_W  = 16,
  parameter policy_e     POLICY    = POL_LRU,
  parameter int          LFU_LIMIT = 4,
  parameter int          TS_W      = 32,
  parameter logic [15:0] RNG_SEED  = 16'hACE1,
  parameter int          FID_W     = 0,
  localparam int         SETS      = ENTRIES / WAYS,
  localparam int         IDX_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int         WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1,
  // a direct-mapped cache has one candidate: no TS/Counter field is needed
  localparam policy_e    EFF_POL   = (WAYS == 1) ? POL_RANDOM : POLICY,
  localparam int         AGE_W     = (EFF_POL == POL_LRU) ? TS_W :
                                     (EFF_POL == POL_LFU) ? $clog2(LFU_LIMIT + 1) : 1,
  localparam int         FW        = (FID_W > 0) ? FID_W : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // lookup
  input  logic                lk_valid,
  input  logic [IDX_W-1:0]    lk_index,
  input  logic [TAG_W-1:0]    lk_tag,
  output logic                lk_hit,
  output logic [WAY_W-1:0]    lk_way,
  output logic [RESULT_W-1:0] lk_result,
  output logic [FW-1:0]       lk_fid,
  // fill after a miss
  input  logic                fill_valid,
  input  logic [IDX_W-1:0]    fill_index,
  input  logic [TAG_W-1:0]    fill_tag,
  input  logic [RESULT_W-1:0] fill_result,
  input  logic [FW-1:0]       fill_fid,
  output logic [WAY_W-1:0]    fill_way,
  output logic                fill_evict,
  // clear entries of one rule
  input  logic                clr_valid,
  input  logic [RESULT_W-1:0] clr_rule,
  output logic                clr_match,
  output logic                busy,
  // packet serial number of the last lookup
  output logic [TS_W-1:0]     serial
);

  logic [TAG_W-1:0]    tag_q [SETS][WAYS];
  logic [RESULT_W-1:0] res_q [SETS][WAYS];
  logic [AGE_W-1:0]    age_q [SETS][WAYS];

  // sweep state
  logic                sw_active, sw_all;
  logic [RESULT_W-1:0] sw_rule;
  logic [IDX_W-1:0]    sw_set;

  logic [IDX_W-1:0]            set_sel;
  logic [WAYS-1:0][AGE_W-1:0]  set_ages, age_upd;
  logic [WAYS-1:0]             way_full, way_hit, way_clr;
  logic [AGE_W-1:0]            stamp, fill_age;
  logic [WAY_W-1:0]            victim, rnd;
  logic [15:0]                 rng_state;

  assign busy = sw_active;

  // fully associative: one set, index ignored
  assign set_sel = (SETS == 1) ? '0 : (fill_valid ? fill_index : lk_index);

  always_comb begin
    lk_hit    = 1'b0;
    lk_way    = '0;
    lk_result = '0;
    for (int w = 0; w < WAYS; w++) begin
      set_ages[w] = age_q[set_sel][w];
      way_full[w] = (tag_q[set_sel][w] != '0) || (res_q[set_sel][w] != '0) ||
                    (age_q[set_sel][w] != '0);
      way_hit[w]  = way_full[w] && (tag_q[set_sel][w] == lk_tag);
    end
    for (int w = WAYS - 1; w >= 0; w--)
      if (way_hit[w]) begin
        lk_hit    = 1'b1;
        lk_way    = WAY_W'(w);
        lk_result = res_q[set_sel][w];
      end
    // sweep: which ways of the swept set are emptied
    for (int w = 0; w < WAYS; w++)
      way_clr[w] = sw_active && (sw_all || res_q[sw_set][w] == sw_rule);
    clr_match = sw_active && !sw_all && (|way_clr);
  end

  // LRU stamp: serial number of the packet being looked up, or of the
  // packet that missed when filling
  assign stamp = fill_valid ? AGE_W'(serial) : AGE_W'(serial + 1'b1);

  lfsr_rng #(.N(WAYS), .SEED(RNG_SEED)) u_rng (
    .clk   (clk),
    .rst_n (rst_n),
    .value (rnd),
    .state (rng_state)
  );

  repl_policy #(
    .WAYS(WAYS), .POLICY(EFF_POL), .AGE_W(AGE_W), .LFU_LIMIT(LFU_LIMIT)
  ) u_repl (
    .ages     (set_ages),
    .hit      (lk_hit),
    .hit_way  (lk_way),
    .stamp    (stamp),
    .rnd      (rnd),
    .age_upd  (age_upd),
    .victim   (victim),
    .fill_age (fill_age)
  );

  assign fill_way   = victim;
  assign fill_evict = way_full[victim];

  // sweep control and serial number
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_active <= 1'b1;        // clear the whole memory after reset
      sw_all    <= 1'b1;
      sw_rule   <= '0;
      sw_set    <= '0;
      serial    <= '0;
    end else begin
      if (sw_active) begin
        if (sw_set == IDX_W'(SETS - 1)) begin
          sw_active <= 1'b0;
          sw_set    <= '0;
        end else begin
          sw_set <= sw_set + 1'b1;
        end
      end else if (clr_valid) begin
        sw_active <= 1'b1;
        sw_all    <= 1'b0;
        sw_rule   <= clr_rule;
        sw_set    <= '0;
      end
      if (lk_valid && !sw_active) serial <= serial + 1'b1;
    end
  end

  // memory write port
  always_ff @(posedge clk) begin
    if (sw_active) begin
      for (int w = 0; w < WAYS; w++)
        if (way_clr[w]) begin
          tag_q[sw_set][w] <= '0;
          res_q[sw_set][w] <= '0;
          age_q[sw_set][w] <= '0;
        end
    end else if (fill_valid) begin
      tag_q[set_sel][victim] <= fill_tag;
      res_q[set_sel][victim] <= fill_result;
      age_q[set_sel][victim] <= fill_age;
    end else if (lk_valid) begin
      for (int w = 0; w < WAYS; w++) age_q[set_sel][w] <= age_upd[w];
    end
  end

  // optional uncompressed flow ID per entry, written by fills and read with
  // the hit way; used only to measure misclassification
  if (FID_W > 0) begin : g_fid
    logic [FID_W-1:0] fid_q [SETS][WAYS];
    always_ff @(posedge clk)
      if (!sw_active && fill_valid) fid_q[set_sel][victim] <= fill_fid;
    assign lk_fid = fid_q[set_sel][lk_way];
  end else begin : g_nofid
    assign lk_fid = '0;
  end

  // operations are exclusive and wait for a sweep to end
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(lk_valid && fill_valid))
    else $error("flow_cache: lookup and fill in the same cycle");
  a_idle: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(lk_valid || fill_valid))
    else $error("flow_cache: access during a sweep");

  initial assert (ENTRIES % WAYS == 0 && (SETS & (SETS - 1)) == 0)
    else $error("flow_cache: ENTRIES/WAYS must be a power of two");

endmodule
