// classifier_model -- behavioural stand-in for the full packet classifier
// that the flow cache consults on a miss. Not synthesizable design content:
// the real classifier (a TCAM or a classification algorithm) lies outside
// the cache.
//
// When req_valid is seen while idle it waits LAT cycles and then pulses
// resp_valid for one cycle with the rule number that
// flowref_pkg::ref_classify gives for the flow under the current rule
// table state 'shrink' (4 bits per rule: how many updates the rule has had).
module classifier_model
  import flowcache_pkg::*;
  import flowref_pkg::*;
#(
  parameter int LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  flow_id_t    req_flow,
  input  int unsigned shrink,
  output logic        resp_valid,
  output logic [15:0] resp_rule,
  output int          n_requests
);
  int cnt;

  always @(posedge clk) begin
    if (!rst_n) begin
      cnt <= 0;
      resp_valid <= 1'b0;
      resp_rule <= '0;
      n_requests <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) begin
          resp_valid <= 1'b1;
          resp_rule  <= 16'(ref_classify(req_flow, shrink));
        end
      end else if (req_valid && !resp_valid) begin
        cnt <= LAT;
        n_requests <= n_requests + 1;
      end
    end
  end
endmodule
