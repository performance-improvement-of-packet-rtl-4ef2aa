// tb_flow_hash -- self-checking test of the three tag hash functions.
//
// Drives random flow IDs (TCP, UDP, ICMPv6 and other protocols) and a few
// corner cases into three flow_hash instances (I, II, III) and compares each
// tag with flowref_pkg::ref_tag, a bit-by-bit model of the hash datapath.
// Also checks directly that a non-TCP/UDP flow ignores its port fields and
// that hash I and hash II differ only through the port substitution, and
// two structural properties of the drawn datapath: the tag is symmetric in
// SA and DA, and hash III gives the same tag as hash II.
module tb_flow_hash;
  import flowcache_pkg::*;
  import flowref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  flow_id_t f;
  logic [31:0] t1, t2, t3;

  flow_hash #(.KIND(HASH_I))   u1 (.flow(f), .tag(t1));
  flow_hash #(.KIND(HASH_II))  u2 (.flow(f), .tag(t2));
  flow_hash #(.KIND(HASH_III)) u3 (.flow(f), .tag(t3));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] a;
    for (int n = 0; n < 2000; n++) begin
      f = rand_flow();
      #1;
      check("hash I",   t1, ref_tag(f, 0));
      check("hash II",  t2, ref_tag(f, 1));
      check("hash III", t3, ref_tag(f, 2));
    end
    // all-zero flow, TCP: hash I is 0, hash III is all ones ^ ... per model
    f = '0; f.proto = PROTO_TCP; #1;
    check("zero flow hash I", t1, 32'h0);
    check("zero flow hash III", t3, ref_tag(f, 2));
    // single SA node-ID bit: MSB of SA node ID reaches tag bit 1 (MSB)
    f = '0; f.proto = PROTO_UDP; f.sa[63] = 1'b1; #1;
    check("SA iid bit 1 -> tag bit 1", t1, 32'h8000_0000);
    // DA node-ID LSB is reversed onto bit 1 too
    f = '0; f.proto = PROTO_UDP; f.da[0] = 1'b1; #1;
    check("DA iid bit 64 -> tag bit 1", t1, 32'h8000_0000);
    // SA node-ID LSB: bit 64 -> split right half bit 32 -> reversed to bit 1
    f = '0; f.proto = PROTO_UDP; f.sa[0] = 1'b1; #1;
    check("SA iid bit 64 -> tag bit 1", t1, 32'h8000_0000);
    // ports combine SP into the upper half
    f = '0; f.proto = PROTO_TCP; f.sp = 16'h1234; f.dp = 16'habcd; #1;
    check("combine", t1, 32'h1234abcd);
    // non-TCP/UDP: ports ignored; I uses 0, II uses 65535
    f = rand_flow(); f.proto = PROTO_ICMPV6; #1;
    a = t1;
    f.sp = ~f.sp; f.dp = f.dp + 1; #1;
    check("ICMPv6 ports ignored", t1, a);
    check("hash II = hash I ^ ffffffff for ICMPv6", t2, a ^ 32'hffff_ffff);
    // prefixes and protocol (among TCP/UDP) do not enter the tag
    f = rand_flow(); f.proto = PROTO_TCP; #1;
    a = t1;
    f.sa[127:64] = ~f.sa[127:64]; f.da[100] = ~f.da[100]; f.proto = PROTO_UDP; #1;
    check("prefix/protocol independent", t1, a);
    // structural properties: SA/DA symmetry, and III equals II as drawn
    for (int n = 0; n < 200; n++) begin
      flow_id_t g;
      f = rand_flow(); #1;
      a = t1;
      check("III equals II", t3, t2);
      g = f; g.sa = f.da; g.da = f.sa; f = g; #1;
      check("SA/DA symmetric", t1, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
