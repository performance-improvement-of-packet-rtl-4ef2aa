// flowcache_pkg -- types and constants shared by the IPv6 flow-ID cache.
//
// A flow is identified by its 5-tuple <SA, DA, SP, DP, protocol>: two
// 128-bit IPv6 addresses, two 16-bit ports and the 8-bit protocol number,
// 296 bits in all. The cache compresses that flow ID into an index (random
// bit-selection, rbs_index) and a 32-bit tag (hash functions I/II/III,
// flow_hash).
//
// Bit order: every field is stored MSB first, so bit 1 of a field in network
// (transmission) order is the field's MSB. An IPv6 address is split into its
// upper 64 bits, the routing prefix, and its lower 64 bits, the node
// identification (interface ID) part.
//
// The selection positions used by random bit-selection are fixed at
// elaboration time by rbs_position(): a 32-bit xorshift generator
// (x ^= x<<13; x ^= x>>17; x ^= x<<5) started from RBS_SEED draws
// candidates "x mod width"; a candidate already drawn is skipped, so the
// first K distinct draws are the K selected bit positions (position 0 is
// the LSB of the range vector). The generator and seed are this design's
// choice: the selection only has to be fixed and spread over the range.
package flowcache_pkg;

  localparam int ADDR_W  = 128;
  localparam int PFX_W   = 64;   // routing prefix part of an address
  localparam int IID_W   = 64;   // node identification part of an address
  localparam int PORT_W  = 16;
  localparam int PROTO_W = 8;
  localparam int TAG_W   = 32;   // tag length

  // IANA protocol numbers of the three layer-4 protocols handled
  localparam logic [PROTO_W-1:0] PROTO_TCP    = 8'd6;
  localparam logic [PROTO_W-1:0] PROTO_UDP    = 8'd17;
  localparam logic [PROTO_W-1:0] PROTO_ICMPV6 = 8'd58;

  typedef struct packed {
    logic [ADDR_W-1:0]  sa;
    logic [ADDR_W-1:0]  da;
    logic [PORT_W-1:0]  sp;
    logic [PORT_W-1:0]  dp;
    logic [PROTO_W-1:0] proto;
  } flow_id_t;

  // Tag hash function variants
  typedef enum logic [1:0] {
    HASH_I   = 2'd0,   // XOR tree, ports zeroed for non-TCP/UDP
    HASH_II  = 2'd1,   // XOR tree, ports forced to 65535 for non-TCP/UDP
    HASH_III = 2'd2    // XNOR tree, ports forced to 65535 for non-TCP/UDP
  } hash_kind_e;

  // Range of the flow ID that random bit-selection chooses from
  typedef enum logic [2:0] {
    RANGE_T1 = 3'd1,   // prefixes of SA/DA, SP, DP, protocol          168 bits
    RANGE_T2 = 3'd2,   // full SA/DA, SP, DP, protocol                 296 bits
    RANGE_T3 = 3'd3,   // full SA/DA, SP, DP                           288 bits
    RANGE_T4 = 3'd4,   // prefixes of SA/DA, SP, DP                    160 bits
    RANGE_T5 = 3'd5    // node-ID parts of SA/DA, SP, DP, short proto  162 bits
  } range_kind_e;

  // Replacement policy
  typedef enum logic [1:0] {
    POL_LRU    = 2'd0,
    POL_LFU    = 2'd1,
    POL_RANDOM = 2'd2
  } policy_e;

  localparam int unsigned RBS_SEED = 32'h1badb002;
  localparam int          RBS_MAX_BITS = 64;
  localparam int          SPROTO_W = 2;   // shortened protocol number

  function automatic int range_width(range_kind_e t);
    case (t)
      RANGE_T1: return 2*PFX_W + 2*PORT_W + PROTO_W;
      RANGE_T2: return 2*ADDR_W + 2*PORT_W + PROTO_W;
      RANGE_T3: return 2*ADDR_W + 2*PORT_W;
      RANGE_T4: return 2*PFX_W + 2*PORT_W;
      default:  return 2*IID_W + 2*PORT_W + SPROTO_W;
    endcase
  endfunction

  // Shortened protocol number: ICMPv6 = 0, TCP = 1, UDP = 2, anything else 3
  function automatic logic [SPROTO_W-1:0] short_proto(logic [PROTO_W-1:0] p);
    case (p)
      PROTO_ICMPV6: return 2'd0;
      PROTO_TCP:    return 2'd1;
      PROTO_UDP:    return 2'd2;
      default:      return 2'd3;
    endcase
  endfunction

  // Position (within a range vector of 'width' bits) of the k-th selected bit
  function automatic int rbs_position(int width, int k);
    int unsigned x;
    int          picked [RBS_MAX_BITS];
    int          n;
    int          cand;
    bit          dup;
    x = RBS_SEED;
    n = 0;
    for (int i = 0; i < RBS_MAX_BITS; i++) picked[i] = 0;
    while (n <= k) begin
      x = x ^ (x << 13);
      x = x ^ (x >> 17);
      x = x ^ (x << 5);
      cand = int'(x % width);
      dup = 1'b0;
      for (int j = 0; j < RBS_MAX_BITS; j++)
        if (j < n && picked[j] == cand) dup = 1'b1;
      if (!dup) begin
        picked[n] = cand;
        n++;
      end
    end
    return picked[k];
  endfunction

endpackage
