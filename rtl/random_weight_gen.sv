// random_weight_gen: random initial weight generator.
//
// A 10-bit maximal-length LFSR (x^10 + x^7 + 1) produces a number R in
// 1..1023 that advances on every cycle `step` is high. The weight offered is
//   X = -1024 + 2*R
// i.e. the interval [-1024, 1024] scaled from a 0..1024 random source by a
// power-of-two division, as the documented generator does; with the Q.10
// weight format this is a weight in [-1, 1). The LFSR type, polynomial and
// seed are this design's choice (the seed default is the first random value
// of the published trace). R and X are combinational from the state register;
// the state is loaded with SEED on reset.
module random_weight_gen
  import iris_pkg::*;
#(
  parameter logic [9:0] SEED = 10'd356
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,    // advance to the next random number
  output logic [9:0] r,    // R, 1..1023
  output weight_t  x       // X = -1024 + 2R
);

  logic [9:0] lfsr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lfsr_q <= (SEED == 10'd0) ? 10'd1 : SEED;
    else if (step) lfsr_q <= {lfsr_q[8:0], lfsr_q[9] ^ lfsr_q[6]};
  end

  assign r = lfsr_q;
  assign x = weight_t'(-16'sd1024 + signed'({5'b0, lfsr_q, 1'b0}));

endmodule
