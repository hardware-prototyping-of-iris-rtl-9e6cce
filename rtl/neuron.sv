// neuron: one perceptron node, O = f(sum of o_j * W_j).
//
// Inputs are N_IN normalized Q.15 values and N_IN+1 Q.10 weights; the last
// weight is the neuron's threshold and multiplies a constant 1.0 input. The
// Q.25 weighted sum A is shifted right by 17 to the Q.8 sigmoid argument,
// saturated to +-8.0, and passed through the piecewise linear sigmoid, giving
// an OUT_W-bit activation (1.0 = 2^OUT_W). All N_IN+1 products are formed in
// parallel. Purely combinational; the layer that owns the neuron registers
// its output. The threshold input is this design's choice.
module neuron
  import iris_pkg::*;
#(
  parameter int N_IN  = 3,
  parameter int OUT_W = 8
) (
  input  norm_t   n [N_IN],
  input  weight_t w [N_IN+1],
  output acc_t    a,                 // weighted sum, Q.25
  output logic [OUT_W-1:0] y         // activation
);

  logic signed [17:0] xs;            // sigmoid argument, Q.8, saturated

  always_comb begin
    a = acc_t'(BIAS_IN) * acc_t'(w[N_IN]);
    for (int i = 0; i < N_IN; i++) a += acc_t'(n[i]) * acc_t'(w[i]);
    if ((a >>> 17) > acc_t'(2047))        xs = 18'sd2047;
    else if ((a >>> 17) < -acc_t'(2048))  xs = -18'sd2048;
    else                                  xs = 18'(a >>> 17);
  end

  sigmoid_pwl #(.IN_W(18), .OUT_W(OUT_W)) u_sig (.x(xs), .y(y));

endmodule
