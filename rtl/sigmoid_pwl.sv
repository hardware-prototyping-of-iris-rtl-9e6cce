// sigmoid_pwl: piecewise linear approximation of the logistic sigmoid.
//
// Input x is the neuron's weighted sum in Q.8 (256 = 1.0). With a = |x| the
// approximation, with power-of-two slopes only, is
//   a >= 5       : 1
//   2.375 <= a   : a/32 + 0.84375
//   1 <= a       : a/8  + 0.625
//   0 <= a < 1   : a/4  + 0.5
// and 1 - y(a) for negative x. It is evaluated with 12 fraction bits and
// then reduced to OUT_W bits (1.0 = 2^OUT_W, saturated to 2^OUT_W - 1).
// The document names a piecewise linear sigmoid; these segments are this
// design's choice. Purely combinational.
module sigmoid_pwl #(
  parameter int IN_W  = 18,
  parameter int OUT_W = 8
) (
  input  logic signed [IN_W-1:0] x,
  output logic [OUT_W-1:0]       y
);

  logic [IN_W-1:0] a;
  logic [12:0]     ya;    // y(|x|) in Q.12, 2048..4096
  logic [12:0]     yq;    // y(x)   in Q.12, 0..4096
  logic [12:0]     ys;

  always_comb begin
    a = x[IN_W-1] ? IN_W'(-x) : IN_W'(x);
    if (a >= IN_W'(1280))      ya = 13'd4096;
    else if (a >= IN_W'(608))  ya = 13'(a[10:0] >> 1) + 13'd3456;
    else if (a >= IN_W'(256))  ya = 13'({a[9:0], 1'b0}) + 13'd2560;
    else                       ya = 13'({a[7:0], 2'b0}) + 13'd2048;
    yq = x[IN_W-1] ? 13'd4096 - ya : ya;
    ys = yq >> (12 - OUT_W);
    y  = (ys >= 13'(1 << OUT_W)) ? OUT_W'((1 << OUT_W) - 1) : ys[OUT_W-1:0];
  end

endmodule
