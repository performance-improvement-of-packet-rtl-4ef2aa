// lfsr_rng -- random number generator for random replacement.
//
// A 16-bit maximal-length Galois LFSR (polynomial x^16+x^14+x^13+x^11+1,
// feedback mask 16'hB400) that advances every clock, and a reduction of its
// state to an integer 0..N-1. The document only asks for a generator of an
// integer between 0 and N-1; the LFSR, its polynomial and seed, and the
// reduction (state mod N) are this design's choices.
//
// Parameters: N range of the output (number of ways), SEED nonzero reset
// state.
// Ports: clk, rst_n (active-low synchronous reset), value (0..N-1, changes
// every cycle), state (raw LFSR state, for observation).
module lfsr_rng #(
  parameter int          N    = 4,
  parameter logic [15:0] SEED = 16'hACE1,
  localparam int         VW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [VW-1:0] value,
  output logic [15:0]   state
);

  localparam logic [15:0] TAPS = 16'hB400;

  always_ff @(posedge clk) begin
    if (!rst_n)       state <= SEED;
    else if (state[0]) state <= (state >> 1) ^ TAPS;
    else              state <= state >> 1;
  end

  assign value = VW'(32'(state) % N);

  initial assert (SEED != 16'h0) else $error("lfsr_rng: SEED must be nonzero");

endmodule
