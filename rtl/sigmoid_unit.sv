// sigmoid_unit: neuron activation f(x) = 1/(1+exp(-x)) and its derivative.
//
// The logistic function is approximated, for x >= 0, by the lowest of four
// straight lines, which needs only shifts, adds and compares:
//   |x|/4 + 0.5,  |x|/8 + 0.625,  |x|/32 + 0.84375,  1
// and f(-x) = 1 - f(x). The lines are those of the well-known "PLAN"
// approximation; taking their minimum puts the breakpoints at 1, 7/3 and 5
// (PLAN's table uses 2.375 for the middle one, which leaves a small downward
// step there), so the curve is continuous and never decreases, as an
// activation for back-propagation must. Largest error against the logistic
// function: about 0.02.
// The derivative used by back-propagation is dy = f(x)*(1-f(x)), rounded to
// nearest. Purely combinational.
// Signals are signed fixed point with W bits, F of them fractional (F >= 5).
// The source names a sigmoid but not how it is computed; the line
// approximation is this design's choice.
module sigmoid_unit #(
  parameter int W = bp_pkg::NET_W,
  parameter int F = bp_pkg::NET_F
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] dy
);

  localparam logic signed [W-1:0] ONE  = W'(1) <<< F;
  localparam logic signed [W-1:0] HALF = W'(1) <<< (F - 1);
  localparam logic signed [W-1:0] C2   = W'(5) <<< (F - 3);    // 0.625
  localparam logic signed [W-1:0] C3   = W'(27) <<< (F - 5);   // 0.84375

  logic signed [W-1:0]   ax, p, l2, l3;
  logic signed [2*W-1:0] prod;

  always_comb begin
    // |x|, with the most negative value clamped to the most positive one
    if (x[W-1]) ax = (x == {1'b1, {(W-1){1'b0}}}) ? {1'b0, {(W-1){1'b1}}} : -x;
    else        ax = x;

    p  = (ax >>> 2) + HALF;
    l2 = (ax >>> 3) + C2;
    l3 = (ax >>> 5) + C3;
    if (l2 < p)  p = l2;
    if (l3 < p)  p = l3;
    if (ONE < p) p = ONE;

    y    = x[W-1] ? ONE - p : p;
    prod = (2*W)'(y) * (2*W)'(ONE - y);
    dy   = W'((prod + ((2*W)'(1) <<< (F - 1))) >>> F);
  end

endmodule
