// flowcache_top -- flow-ID cache in front of an IPv6 packet classifier.
//
// Full packet classification of a 296-bit IPv6 flow ID is slow, but packets
// of one flow arrive close together. This block remembers the rule number
// of recently classified flows: a packet whose flow is in the cache gets its
// rule number at once, and only a miss is sent to the (external, slower)
// classifier, whose answer is then written into the cache.
//
// Datapath: the incoming flow ID is hashed in the cycle it is accepted into
// a 32-bit tag (flow_hash, hash function I by default) and an index of
// log2(ENTRIES/WAYS) bits (rbs_index, random bit-selection over range type
// 1 by default), and both are registered with the flow (stage 1). In the
// next cycle flow_cache looks the set up.
//   hit  -> resp_valid one cycle after acceptance, resp_hit = 1; the next
//           request may be accepted in the same cycle (one packet per cycle).
//   miss -> req_ready drops; cls_req_valid is raised with the flow ID and
//           held until the classifier answers with cls_resp_valid and a rule
//           number; that cycle the entry is filled and the response (hit = 0)
//           is registered.
// Two different flows with the same index and tag are taken to be the same
// flow: that misclassification is inherent in compressing the flow ID and
// is accepted, as in the document.
//
// Misclassification monitor: with MISCLASS_CHECK = 1 every entry also keeps
// the uncompressed 296-bit flow ID, and resp_misclass flags a hit whose
// entry was filled by a different flow. This is a measurement aid, as in
// the document's evaluation, and costs 296 bits per entry; by default it is
// absent and resp_misclass is always 0.
//
// Rule updates: upd_valid with upd_rule (a change to the prefixes or ports
// of that rule) is taken (upd_ready) once stage 1 is empty; new requests are
// held off while it waits. flow_cache then empties every entry holding that
// rule number, one set per cycle. A change to a rule's action alone needs
// no update, because entries store rule numbers, not actions. After reset
// the cache is emptied the same way; req_ready stays low meanwhile.
//
// Handshakes: req_valid/req_ready and upd_valid/upd_ready transfer on a
// cycle where both are high; resp_valid is a one-cycle pulse; cls_req_valid
// stays high, with cls_req_flow stable, until a cycle with cls_resp_valid.
// Reset is synchronous and active low.
//
// Defaults are the configuration the document settles on: 1024 entries,
// 4-way set associative, LRU replacement, hash function I, range type 1.
// The handshakes, the two-stage timing and the 16-bit rule number are this
// design's choices.
module flowcache_top
  import flowcache_pkg::*;
#(
  parameter int          ENTRIES   = 1024,
  parameter int          WAYS      = 4,
  parameter int          RESULT_W  = 16,
  parameter policy_e     POLICY    = POL_LRU,
  parameter int          LFU_LIMIT = 4,
  parameter hash_kind_e  HASH      = HASH_I,
  parameter range_kind_e RANGE     = RANGE_T1,
  parameter bit          MISCLASS_CHECK = 1'b0,
  localparam int         SETS      = ENTRIES / WAYS,
  localparam int         IDX_W     = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // packets to classify
  input  logic                req_valid,
  output logic                req_ready,
  input  flow_id_t            req_flow,
  // classification results
  output logic                resp_valid,
  output logic                resp_hit,
  output logic [RESULT_W-1:0] resp_rule,
  output logic                resp_misclass,
  // external packet classifier, used on a miss
  output logic                cls_req_valid,
  output flow_id_t            cls_req_flow,
  input  logic                cls_resp_valid,
  input  logic [RESULT_W-1:0] cls_resp_rule,
  // rule updates
  input  logic                upd_valid,
  output logic                upd_ready,
  input  logic [RESULT_W-1:0] upd_rule
);

  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int FID_W = MISCLASS_CHECK ? $bits(flow_id_t) : 0;
  localparam int FW    = (FID_W > 0) ? FID_W : 1;

  typedef enum logic {ST_LOOKUP, ST_CLASSIFY} state_e;
  state_e state;

  logic [TAG_W-1:0] in_tag;
  logic [IDX_W-1:0] in_idx;

  // stage 1
  logic             s1_valid;
  flow_id_t         s1_flow;
  logic [TAG_W-1:0] s1_tag;
  logic [IDX_W-1:0] s1_idx;

  logic                lk_valid, lk_hit, fill_valid, fill_evict, clr_match, busy;
  logic [WAY_W-1:0]    lk_way, fill_way;
  logic [RESULT_W-1:0] lk_result;
  logic [FW-1:0]       lk_fid;
  logic                lk_alias;
  logic [31:0]         serial;
  logic                req_take;

  flow_hash #(.KIND(HASH)) u_hash (
    .flow (req_flow),
    .tag  (in_tag)
  );

  if (SETS > 1) begin : g_idx
    rbs_index #(.IDX_W(IDX_W), .RANGE(RANGE)) u_rbs (
      .flow (req_flow),
      .idx  (in_idx)
    );
  end else begin : g_noidx
    assign in_idx = '0;   // fully associative: no index
  end

  assign lk_valid   = s1_valid && state == ST_LOOKUP && !busy;
  assign fill_valid = state == ST_CLASSIFY && cls_resp_valid;

  flow_cache #(
    .ENTRIES(ENTRIES), .WAYS(WAYS), .RESULT_W(RESULT_W),
    .POLICY(POLICY), .LFU_LIMIT(LFU_LIMIT), .TS_W(32), .FID_W(FID_W)
  ) u_cache (
    .clk         (clk),
    .rst_n       (rst_n),
    .lk_valid    (lk_valid),
    .lk_index    (s1_idx),
    .lk_tag      (s1_tag),
    .lk_hit      (lk_hit),
    .lk_way      (lk_way),
    .lk_result   (lk_result),
    .lk_fid      (lk_fid),
    .fill_valid  (fill_valid),
    .fill_index  (s1_idx),
    .fill_tag    (s1_tag),
    .fill_result (cls_resp_rule),
    .fill_fid    (FW'(s1_flow)),
    .fill_way    (fill_way),
    .fill_evict  (fill_evict),
    .clr_valid   (upd_valid && upd_ready),
    .clr_rule    (upd_rule),
    .clr_match   (clr_match),
    .busy        (busy),
    .serial      (serial)
  );

  // a hit on an entry filled by a different flow: misclassified packet
  assign lk_alias = MISCLASS_CHECK && (lk_fid != FW'(s1_flow));

  assign upd_ready = !busy && state == ST_LOOKUP && !s1_valid;
  assign req_ready = !busy && state == ST_LOOKUP && !upd_valid &&
                     (!s1_valid || lk_hit);
  assign req_take  = req_valid && req_ready;

  assign cls_req_valid = state == ST_CLASSIFY;
  assign cls_req_flow  = s1_flow;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= ST_LOOKUP;
      s1_valid   <= 1'b0;
      resp_valid <= 1'b0;
      resp_hit   <= 1'b0;
      resp_rule  <= '0;
      resp_misclass <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      case (state)
        ST_LOOKUP: begin
          if (lk_valid) begin
            if (lk_hit) begin
              resp_valid <= 1'b1;
              resp_hit   <= 1'b1;
              resp_rule  <= lk_result;
              resp_misclass <= lk_alias;
              s1_valid   <= 1'b0;
            end else begin
              state <= ST_CLASSIFY;
            end
          end
          if (req_take) s1_valid <= 1'b1;
        end
        default: begin
          if (cls_resp_valid) begin
            resp_valid <= 1'b1;
            resp_hit   <= 1'b0;
            resp_rule  <= cls_resp_rule;
            resp_misclass <= 1'b0;
            s1_valid   <= 1'b0;
            state      <= ST_LOOKUP;
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (req_take) begin
      s1_flow <= req_flow;
      s1_tag  <= in_tag;
      s1_idx  <= in_idx;
    end
  end

  a_cls_stable: assert property (@(posedge clk) disable iff (!rst_n)
      cls_req_valid && !cls_resp_valid |=> cls_req_valid && $stable(cls_req_flow))
    else $error("flowcache_top: classifier request dropped before its answer");
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
      !(req_take && upd_valid && upd_ready))
    else $error("flowcache_top: request and rule update taken together");

endmodule
