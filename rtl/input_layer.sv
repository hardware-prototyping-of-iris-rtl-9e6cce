// input_layer: the INPUT entity, the input nodes buffering a feature vector.
//
// N_IN input nodes (three by default) hold the iris feature vector that the
// hidden neurons work on, together with the desired output that goes with it. On `load` they
// capture either a training vector and its signature from the data bank
// (sel_test = 0) or a test vector from the external port (sel_test = 1, the
// desired output is then cleared, as testing computes no error). The values
// are held until the next load. Taking both sources through one buffer is
// this design's choice.
module input_layer
  import iris_pkg::*;
#(
  parameter int N_IN = N_INPUTS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic sel_test,
  input  pix_t bank_pix [N_IN],
  input  sig_t bank_sig,
  input  pix_t test_pix [N_IN],
  output pix_t pix      [N_IN],
  output sig_t desired
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IN; i++) pix[i] <= '0;
      desired <= '0;
    end else if (load) begin
      pix     <= sel_test ? test_pix : bank_pix;
      desired <= sel_test ? '0 : bank_sig;
    end
  end

endmodule
