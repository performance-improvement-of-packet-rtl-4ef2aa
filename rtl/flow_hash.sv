// flow_hash -- 32-bit tag hash of an IPv6 flow ID (hash functions I, II, III).
//
// The tag is what tells two flows that share a cache index apart. It is
// computed from the node identification parts (low 64 bits) of the source
// and destination addresses and from the two ports; the protocol field and
// the address prefixes are left out (random bit-selection over the prefixes
// and protocol supplies the index instead). The datapath is three gate
// levels deep and otherwise only wiring:
//
//   x   = SA_iid  op  reverse64(DA_iid)               64 bits
//   y   = x[bits 1..32]  op  reverse32(x[bits 33..64]) 32 bits (split)
//   tag = y  op  {SP, DP}                               32 bits (combine)
//
// where "op" is XOR for hash functions I and II and XNOR for hash function
// III, and bit 1 is the MSB of a field. When the protocol is neither TCP nor
// UDP the ports are replaced before the last stage: by 0 for hash function I
// and by 65535 for II and III. This follows the document; which half of the
// split is reversed, and that SP is the upper half of the combined word,
// are read from its drawings. The block is purely combinational.
//
// Two consequences of this structure are worth knowing. First, because the
// split stage folds bit j onto bit 65-j, the first "Reverse" cancels out:
// the tag is the same with or without it, and is symmetric in SA and DA.
// Second, the three inversions of hash function III cancel in pairs, so as
// drawn it yields exactly the tag of hash function II. The document reports
// different collision counts for II and III, so its evaluation must have
// differed from the drawing in some way it does not describe; this RTL
// follows the drawing and the text.
//
// Parameters: KIND selects the variant (default HASH_I, the one the
// document recommends).
// Ports: flow in, tag out.
module flow_hash
  import flowcache_pkg::*;
#(
  parameter hash_kind_e KIND = HASH_I
) (
  input  flow_id_t          flow,
  output logic [TAG_W-1:0]  tag
);

  logic [IID_W-1:0]   sa_iid, da_iid, da_rev, x;
  logic [TAG_W-1:0]   x_hi, x_lo, x_lo_rev, y, ports;
  logic [PORT_W-1:0]  sp_eff, dp_eff;
  logic               l4_port_proto;

  always_comb begin
    sa_iid = flow.sa[IID_W-1:0];
    da_iid = flow.da[IID_W-1:0];
    for (int i = 0; i < IID_W; i++) da_rev[i] = da_iid[IID_W-1-i];

    x = (KIND == HASH_III) ? ~(sa_iid ^ da_rev) : (sa_iid ^ da_rev);

    x_hi = x[IID_W-1:TAG_W];
    x_lo = x[TAG_W-1:0];
    for (int i = 0; i < TAG_W; i++) x_lo_rev[i] = x_lo[TAG_W-1-i];

    y = (KIND == HASH_III) ? ~(x_hi ^ x_lo_rev) : (x_hi ^ x_lo_rev);

    l4_port_proto = (flow.proto == PROTO_TCP) || (flow.proto == PROTO_UDP);
    if (l4_port_proto) begin
      sp_eff = flow.sp;
      dp_eff = flow.dp;
    end else if (KIND == HASH_I) begin
      sp_eff = '0;
      dp_eff = '0;
    end else begin
      sp_eff = '1;
      dp_eff = '1;
    end
    ports = {sp_eff, dp_eff};

    tag = (KIND == HASH_III) ? ~(y ^ ports) : (y ^ ports);
  end

endmodule
