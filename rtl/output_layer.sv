// output_layer: the OUTPUT LAYER entity, one sigmoid neuron with its weights.
//
// The N_HID hidden activations (two by default) are normalized with the same
// circuit as the features, multiplied by the output neuron's weights, added
// to its threshold (slot N_HID) and passed through the piecewise linear
// sigmoid. The activation is SIG_W = 10 bits wide (1.0 = 1024), the unit of
// the iris signatures, so that the error against a desired signature is a
// plain difference. Weight register controls as in the hidden layer:
// init_we loads slot init_i, upd loads all adjusted weights, cap registers
// the activation o. The 10-bit output width is this design's choice.
module output_layer
  import iris_pkg::*;
#(
  parameter int N_HID = N_HIDDEN,
  localparam int OW   = $clog2(N_HID + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  hid_t    h       [N_HID],
  input  logic    init_we,
  input  logic [OW-1:0] init_i,
  input  weight_t init_w,
  input  logic    upd,
  input  weight_t w_new   [N_HID+1],
  input  logic    cap,
  output sig_t    o,                     // registered network output
  output norm_t   n_h     [N_HID],       // normalized hidden activations
  output weight_t w       [N_HID+1]
);

  sig_t y;
  acc_t a;                               // weighted sum, kept for debug

  for (genvar j = 0; j < N_HID; j++) begin : g_norm
    normalizer u_norm (.v(h[j]), .n(n_h[j]));
  end

  neuron #(.N_IN(N_HID), .OUT_W(SIG_W)) u_neuron (.n(n_h), .w(w), .a(a), .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o <= '0;
      for (int i = 0; i <= N_HID; i++) w[i] <= '0;
    end else begin
      if (init_we)  w[init_i] <= init_w;
      else if (upd) w <= w_new;
      if (cap) o <= y;
    end
  end

endmodule
