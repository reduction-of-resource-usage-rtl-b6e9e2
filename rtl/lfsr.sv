// lfsr: Fibonacci linear-feedback shift register used as the random number
// source for the initial synaptic weights.
//
// Each clock with en high the register shifts left by one and the XOR of the
// tap bits enters at bit 0. The default taps (16,14,13,11) give a
// maximal-length sequence of 2**16-1 states. seed_load loads a new state in
// place of a shift; an all-zero seed, which would lock the register, is
// replaced by 1. q is the registered state and changes one clock after en.
// The use of an LFSR follows the source description; length, taps and seed
// are this design's choice.
module lfsr #(
  parameter int          N    = 16,
  parameter logic [N-1:0] TAPS = 16'hB400,   // bits 15,13,12,10 = x^16+x^14+x^13+x^11+1
  parameter logic [N-1:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         seed_load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         q <= (SEED == '0) ? N'(1) : SEED;
    else if (seed_load) q <= (seed == '0) ? N'(1) : seed;
    else if (en)        q <= {q[N-2:0], fb};
  end

endmodule
