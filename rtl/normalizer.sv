// normalizer: normalization circuit in front of every neuron input.
//
// Maps an unsigned 8-bit value v (a feature or a hidden-neuron output) to the
// signed Q.15 neuron input  n = (v - OFFSET) * SCALE. With the defaults
// (134, 240) the 0..255 range lands in -32160..29040, filling a 16-bit word.
// The two constants are fitted to the normalized values of the published
// simulation trace (e.g. 92 -> -10080, 136 -> 480); the document itself only
// says that a normalization circuit brings inputs to a suitable range.
// Purely combinational.
module normalizer
  import iris_pkg::*;
#(
  parameter int OFFSET = NORM_OFFSET,
  parameter int SCALE  = NORM_SCALE
) (
  input  pix_t  v,
  output norm_t n
);

  logic signed [31:0] prod;

  always_comb begin
    prod = (signed'({24'b0, v}) - 32'(OFFSET)) * 32'(SCALE);
    if (prod > 32'sd32767)       n = 16'sh7fff;
    else if (prod < -32'sd32768) n = 16'sh8000;
    else                         n = prod[N_W-1:0];
  end

endmodule
