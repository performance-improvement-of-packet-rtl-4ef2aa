// rbs_index -- random bit-selection: the cache index of an IPv6 flow ID.
//
// The index is IDX_W bits picked from fixed, pseudo-randomly chosen
// positions of a "range" vector built from the flow ID. Because the
// positions are fixed at elaboration the block is pure wiring: no gates and
// constant delay. RANGE chooses which fields make up the range vector
// (concatenated in the order listed, first field in the MSBs):
//
//   RANGE_T1  {SA prefix, DA prefix, SP, DP, protocol}          168 bits
//   RANGE_T2  {SA, DA, SP, DP, protocol}                        296 bits
//   RANGE_T3  {SA, DA, SP, DP}                                  288 bits
//   RANGE_T4  {SA prefix, DA prefix, SP, DP}                    160 bits
//   RANGE_T5  {SA node ID, DA node ID, SP, DP, short protocol}  162 bits
//
// The five ranges and their widths, and the 2-bit shortened protocol number
// (ICMPv6 0, TCP 1, UDP 2), are the document's; the field order, the code 3
// for other protocols and the position generator (rbs_position in
// flowcache_pkg) are this design's choices. Index bit k is range bit
// rbs_position(width, k).
//
// Parameters: IDX_W index length (1..64), RANGE (default RANGE_T1, the
// range used with the cache).
// Ports: flow in, idx out. Combinational.
module rbs_index
  import flowcache_pkg::*;
#(
  parameter int          IDX_W = 8,
  parameter range_kind_e RANGE = RANGE_T1
) (
  input  flow_id_t           flow,
  output logic [IDX_W-1:0]   idx
);

  localparam int RW = range_width(RANGE);

  logic [RW-1:0] range_vec;

  always_comb begin
    case (RANGE)
      RANGE_T1: range_vec = RW'({flow.sa[ADDR_W-1 -: PFX_W], flow.da[ADDR_W-1 -: PFX_W],
                                 flow.sp, flow.dp, flow.proto});
      RANGE_T2: range_vec = RW'({flow.sa, flow.da, flow.sp, flow.dp, flow.proto});
      RANGE_T3: range_vec = RW'({flow.sa, flow.da, flow.sp, flow.dp});
      RANGE_T4: range_vec = RW'({flow.sa[ADDR_W-1 -: PFX_W], flow.da[ADDR_W-1 -: PFX_W],
                                 flow.sp, flow.dp});
      default:  range_vec = RW'({flow.sa[IID_W-1:0], flow.da[IID_W-1:0],
                                 flow.sp, flow.dp, short_proto(flow.proto)});
    endcase
  end

  for (genvar k = 0; k < IDX_W; k++) begin : g_sel
    localparam int POS = rbs_position(RW, k);
    assign idx[k] = range_vec[POS];
  end

  initial assert (IDX_W >= 1 && IDX_W <= RBS_MAX_BITS)
    else $error("rbs_index: IDX_W must be 1..%0d", RBS_MAX_BITS);

endmodule
