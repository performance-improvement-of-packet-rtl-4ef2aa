// repl_policy -- replacement policy of one cache set: LRU, LFU or random.
//
// Each cache entry carries a TS/Counter field ("age") whose meaning depends
// on the policy. This block holds the policy's rules for one set of WAYS
// entries, combinationally:
//
//   * age_upd: the set's ages after a lookup (applied by the cache when a
//     lookup happens).
//       LRU     a hit stamps the hit entry with 'stamp', the packet serial
//               number of the lookup; a miss changes nothing.
//       LFU     a hit increments the hit entry's counter, saturating at
//               LFU_LIMIT; a miss decrements every counter of the set that
//               is above zero.
//       RANDOM  no age field; ages stay zero.
//   * victim: the way a fill replaces.
//       LRU     the oldest stamp; LFU the smallest counter (lowest way wins a
//               tie); RANDOM the way given by the random number 'rnd'.
//   * fill_age: the age written with a new entry: 'stamp' for LRU, 1 for
//     LFU, 0 for RANDOM.
//
// The policies, the 32-bit packet serial number as LRU timestamp and the
// LFU limit of 4 are the document's. That a miss decrements the counters of
// the whole indexed set, that a new LFU entry starts at 1 and that ties go
// to the lowest way are this design's choices. An empty entry has age 0, so
// LRU and LFU pick empty entries first without a valid bit.
//
// Parameters: WAYS associativity, POLICY, AGE_W width of the age field
// (32 for LRU, enough for LFU_LIMIT for LFU, 1 for RANDOM), LFU_LIMIT.
// Ports: ages (set's ages before the operation), hit, hit_way, stamp, rnd
// in; age_upd, victim, fill_age out.
module repl_policy
  import flowcache_pkg::*;
#(
  parameter int      WAYS      = 4,
  parameter policy_e POLICY    = POL_LRU,
  parameter int      AGE_W     = 32,
  parameter int      LFU_LIMIT = 4,
  localparam int     WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0][AGE_W-1:0] ages,
  input  logic                       hit,
  input  logic [WAY_W-1:0]           hit_way,
  input  logic [AGE_W-1:0]           stamp,
  input  logic [WAY_W-1:0]           rnd,
  output logic [WAYS-1:0][AGE_W-1:0] age_upd,
  output logic [WAY_W-1:0]           victim,
  output logic [AGE_W-1:0]           fill_age
);

  logic [AGE_W-1:0] min_age;

  always_comb begin
    // ages after a lookup
    age_upd = ages;
    case (POLICY)
      POL_LRU: begin
        if (hit) age_upd[hit_way] = stamp;
      end
      POL_LFU: begin
        if (hit) begin
          if (ages[hit_way] < AGE_W'(LFU_LIMIT)) age_upd[hit_way] = ages[hit_way] + 1'b1;
        end else begin
          for (int w = 0; w < WAYS; w++)
            if (ages[w] != '0) age_upd[w] = ages[w] - 1'b1;
        end
      end
      default: age_upd = '0;
    endcase

    // victim of a fill
    victim  = '0;
    min_age = ages[0];
    if (POLICY == POL_RANDOM) begin
      victim = rnd;
    end else begin
      for (int w = 1; w < WAYS; w++)
        if (ages[w] < min_age) begin
          min_age = ages[w];
          victim  = WAY_W'(w);
        end
    end

    case (POLICY)
      POL_LRU: fill_age = stamp;
      POL_LFU: fill_age = AGE_W'(1);
      default: fill_age = '0;
    endcase
  end

endmodule
