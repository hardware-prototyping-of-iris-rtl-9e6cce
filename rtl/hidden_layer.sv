// hidden_layer: the HIDDEN LAYER entity, N_HID sigmoid neurons with their weights.
//
// Each hidden neuron (two by default) normalizes the N_IN buffered features
// (three by default) with its own normalization circuits, multiplies them by
// its own weights, adds its threshold and applies the piecewise linear
// sigmoid. The layer holds the N_HID x (N_IN+1) weight registers; slot N_IN
// of each neuron is its threshold.
//   init_we  loads weight init_w into neuron init_j, slot init_i (random
//            weight generation mode, one weight per cycle);
//   upd      loads all adjusted weights from the backpropagation layer
//            (init_we has priority);
//   cap      registers all neuron outputs; h is valid the cycle after.
// Weights reset to zero; they are meant to be set by the init mode first.
// The register organisation and reset value are this design's choice.
module hidden_layer
  import iris_pkg::*;
#(
  parameter int N_IN  = N_INPUTS,
  parameter int N_HID = N_HIDDEN,
  localparam int JW   = (N_HID > 1) ? $clog2(N_HID) : 1,
  localparam int IW   = $clog2(N_IN + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  pix_t    pix     [N_IN],
  input  logic    init_we,
  input  logic [JW-1:0] init_j,
  input  logic [IW-1:0] init_i,
  input  weight_t init_w,
  input  logic    upd,
  input  weight_t w_new   [N_HID][N_IN+1],
  input  logic    cap,
  output hid_t    h       [N_HID],            // registered activations
  output norm_t   n_in    [N_HID][N_IN],      // normalized features per neuron
  output weight_t w       [N_HID][N_IN+1]
);

  hid_t y [N_HID];

  for (genvar j = 0; j < N_HID; j++) begin : g_neuron
    acc_t a;                                  // weighted sum, kept for debug
    for (genvar i = 0; i < N_IN; i++) begin : g_norm
      normalizer u_norm (.v(pix[i]), .n(n_in[j][i]));
    end
    neuron #(.N_IN(N_IN), .OUT_W(HID_W)) u_neuron (
      .n(n_in[j]), .w(w[j]), .a(a), .y(y[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_HID; j++) begin
        h[j] <= '0;
        for (int i = 0; i <= N_IN; i++) w[j][i] <= '0;
      end
    end else begin
      if (init_we)  w[init_j][init_i] <= init_w;
      else if (upd) w <= w_new;
      if (cap) h <= y;
    end
  end

endmodule
