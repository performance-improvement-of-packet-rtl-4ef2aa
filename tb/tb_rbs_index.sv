// tb_rbs_index -- self-checking test of random bit-selection.
//
// Instantiates rbs_index for all five range types (8, 16, 24 and 32-bit
// indices for type 1) and compares the index of random flow IDs with
// flowref_pkg::ref_index. It also flips single flow-ID bits and checks the
// structure directly: every index bit follows exactly one flow-ID bit, no
// two index bits follow the same one, and bits outside the range (for
// example the node-ID part under type 1) never change the index.
module tb_rbs_index;
  import flowcache_pkg::*;
  import flowref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  flow_id_t f;
  logic [7:0]  i1_8;
  logic [15:0] i1_16;
  logic [23:0] i1_24;
  logic [31:0] i1_32, i2, i3, i4, i5;

  rbs_index #(.IDX_W(8),  .RANGE(RANGE_T1)) u1a (.flow(f), .idx(i1_8));
  rbs_index #(.IDX_W(16), .RANGE(RANGE_T1)) u1b (.flow(f), .idx(i1_16));
  rbs_index #(.IDX_W(24), .RANGE(RANGE_T1)) u1c (.flow(f), .idx(i1_24));
  rbs_index #(.IDX_W(32), .RANGE(RANGE_T1)) u1d (.flow(f), .idx(i1_32));
  rbs_index #(.IDX_W(32), .RANGE(RANGE_T2)) u2  (.flow(f), .idx(i2));
  rbs_index #(.IDX_W(32), .RANGE(RANGE_T3)) u3  (.flow(f), .idx(i3));
  rbs_index #(.IDX_W(32), .RANGE(RANGE_T4)) u4  (.flow(f), .idx(i4));
  rbs_index #(.IDX_W(32), .RANGE(RANGE_T5)) u5  (.flow(f), .idx(i5));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    flow_id_t base;
    int hits [32];
    for (int n = 0; n < 500; n++) begin
      f = rand_flow();
      #1;
      check("T1/8",  64'(i1_8),  ref_index(f, 1, 8));
      check("T1/16", 64'(i1_16), ref_index(f, 1, 16));
      check("T1/24", 64'(i1_24), ref_index(f, 1, 24));
      check("T1/32", 64'(i1_32), ref_index(f, 1, 32));
      check("T2/32", 64'(i2), ref_index(f, 2, 32));
      check("T3/32", 64'(i3), ref_index(f, 3, 32));
      check("T4/32", 64'(i4), ref_index(f, 4, 32));
      check("T5/32", 64'(i5), ref_index(f, 5, 32));
    end
    // structure of type 1 / 32 bits: one-hot sensitivity
    base = rand_flow();
    foreach (hits[k]) hits[k] = 0;
    for (int b = 0; b < 296; b++) begin
      logic [31:0] i0;
      f = base; #1; i0 = i1_32;
      f = base ^ (296'(1) << b); #1;
      checks++;
      if (b >= 8 + 32 && b < 8 + 32 + 64 || b >= 8 + 32 + 128 && b < 8 + 32 + 192) begin
        // node-ID parts of DA and SA: outside range type 1
        if (i1_32 != i0) begin failures++; $display("FAIL node-ID bit %0d changed the index", b); end
      end else begin
        if ($countones(i1_32 ^ i0) > 1) begin failures++; $display("FAIL bit %0d drives >1 index bits", b); end
        for (int k = 0; k < 32; k++) if ((i1_32 ^ i0) >> k & 1) hits[k]++;
      end
    end
    foreach (hits[k]) check($sformatf("index bit %0d has one source", k), 64'(hits[k]), 64'd1);
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
