// tb_repl_policy -- self-checking test of the LRU, LFU and random
// replacement rules.
//
// Three repl_policy instances (4 ways) receive random ages, hit flags and
// hit ways. The expected victim and updated ages are computed in the test:
// LRU stamps the hit way and evicts the oldest stamp, LFU counts hits up to
// the limit 4, decrements every nonzero counter on a miss and evicts the
// smallest counter, random evicts the way given by the random input. Ties
// go to the lowest way.
module tb_repl_policy;
  import flowcache_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0][31:0] ages_l, upd_l;
  logic [3:0][2:0]  ages_f, upd_f;
  logic [3:0][0:0]  ages_r, upd_r;
  logic hit;
  logic [1:0] hw, rnd, vic_l, vic_f, vic_r;
  logic [31:0] stamp, fa_l;
  logic [2:0] fa_f;
  logic [0:0] fa_r;

  repl_policy #(.WAYS(4), .POLICY(POL_LRU), .AGE_W(32)) ul (
    .ages(ages_l), .hit, .hit_way(hw), .stamp, .rnd, .age_upd(upd_l), .victim(vic_l), .fill_age(fa_l));
  repl_policy #(.WAYS(4), .POLICY(POL_LFU), .AGE_W(3), .LFU_LIMIT(4)) uf (
    .ages(ages_f), .hit, .hit_way(hw), .stamp(stamp[2:0]), .rnd, .age_upd(upd_f), .victim(vic_f), .fill_age(fa_f));
  repl_policy #(.WAYS(4), .POLICY(POL_RANDOM), .AGE_W(1)) ur (
    .ages(ages_r), .hit, .hit_way(hw), .stamp(stamp[0:0]), .rnd, .age_upd(upd_r), .victim(vic_r), .fill_age(fa_r));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0][31:0] el;
      logic [3:0][2:0]  ef;
      int vl, vf;
      for (int w = 0; w < 4; w++) begin
        ages_l[w] = (n % 3 == 0) ? 32'($urandom_range(0, 3)) : $urandom;
        ages_f[w] = 3'($urandom_range(0, 4));
      end
      ages_r = '0;
      hit = 1'($urandom); hw = 2'($urandom); rnd = 2'($urandom); stamp = $urandom;
      #1;
      el = ages_l; if (hit) el[hw] = stamp;
      ef = ages_f;
      if (hit) begin if (ef[hw] < 4) ef[hw]++; end
      else for (int w = 0; w < 4; w++) if (ef[w] > 0) ef[w]--;
      vl = 0; vf = 0;
      for (int w = 1; w < 4; w++) begin
        if (ages_l[w] < ages_l[vl]) vl = w;
        if (ages_f[w] < ages_f[vf]) vf = w;
      end
      check("LRU ages", 128'(upd_l), 128'(el));
      check("LFU ages", 128'(upd_f), 128'(ef));
      check("LRU victim", 128'(vic_l), 128'(vl));
      check("LFU victim", 128'(vic_f), 128'(vf));
      check("RAND victim", 128'(vic_r), 128'(rnd));
      check("RAND ages", 128'(upd_r), 128'(0));
      check("LRU fill age", 128'(fa_l), 128'(stamp));
      check("LFU fill age", 128'(fa_f), 128'(1));
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
