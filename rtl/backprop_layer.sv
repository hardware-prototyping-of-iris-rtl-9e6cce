// backprop_layer: the BACKPROPAGATION LAYER entity.
//
// Sits after the output neuron. From the registered network output o and the
// desired output d it computes the error e = o - d and, by gradient
// descent on E = e^2/2 with dW = -eta dE/dW, the adjusted weights W(t+1) = W(t) + dW(t)
// of both layers, which are fed back to the weight registers. Fixed-point
// form (all shifts arithmetic, i.e. rounding towards minus infinity):
//   do      = o*(1024-o) >> 10                       sigmoid slope, Q.10
//   delta_o = (e * do) >>> 10                        Q.10
//   dh_j    = h_j*(256-h_j) >> 6                     Q.10
//   delta_h_j = (((delta_o * Wo_j) >>> 10) * dh_j) >>> 10     Q.10
//   Wo_j'   = Wo_j   - (delta_o   * nh_j) >>> (15 + ETA_SHIFT_O)
//   Wh_j,i' = Wh_j,i - (delta_h_j * n_i ) >>> (15 + ETA_SHIFT_H)
// where nh_j and n_i are the normalized neuron inputs (Q.15) and the
// threshold weights see the constant input 1.0. Each layer has its own
// learning rate, as the document's eta_jk "for weights between the layers":
// 2^-ETA_SHIFT_O for the output weights and 2^-ETA_SHIFT_H for the hidden
// weights, both 0.5 by default. Results saturate to 16 bits. There
// are N_IN features (three by default) and N_HID hidden neurons (two). The
// delta_h_j use the output weights before their update. The fixed-point
// scaling and the learning-rate values are this design's choice. Purely
// combinational; the weights change when the layers see `upd`.
module backprop_layer
  import iris_pkg::*;
#(
  parameter int ETA_SHIFT_H = 1,   // hidden-layer learning rate 2^-ETA_SHIFT_H
  parameter int ETA_SHIFT_O = 1,   // output-layer learning rate 2^-ETA_SHIFT_O
  parameter int N_IN      = N_INPUTS,
  parameter int N_HID     = N_HIDDEN
) (
  input  sig_t    o,
  input  sig_t    d,
  input  hid_t    h       [N_HID],
  input  norm_t   n_in    [N_HID][N_IN],
  input  norm_t   n_h     [N_HID],
  input  weight_t w_h     [N_HID][N_IN+1],
  input  weight_t w_o     [N_HID+1],
  output logic signed [SIG_W:0] e,                       // output error o - d
  output delta_t  delta_o,
  output delta_t  delta_h [N_HID],                     // hidden errors
  output weight_t w_h_new [N_HID][N_IN+1],
  output weight_t w_o_new [N_HID+1]
);

  localparam int SH_H = 15 + ETA_SHIFT_H;
  localparam int SH_O = 15 + ETA_SHIFT_O;

  logic signed [47:0] dov, d_o, t, dh;
  logic signed [47:0] din [N_HID+1];

  always_comb begin
    e   = signed'({1'b0, o}) - signed'({1'b0, d});
    dov = signed'((48'(o) * (48'd1024 - 48'(o))) >> 10);
    d_o = (48'(e) * dov) >>> 10;
    delta_o = delta_t'(d_o);

    for (int j = 0; j <= N_HID; j++)
      din[j] = (j < N_HID) ? 48'(n_h[j]) : 48'(BIAS_IN);
    for (int j = 0; j <= N_HID; j++)
      w_o_new[j] = sat_weight(48'(w_o[j]) - ((d_o * din[j]) >>> SH_O));

    for (int j = 0; j < N_HID; j++) begin
      dh = (48'(h[j]) * (48'd256 - 48'(h[j]))) >>> 6;
      t  = ((d_o * 48'(w_o[j])) >>> 10) * dh >>> 10;
      delta_h[j] = delta_t'(t);
      for (int i = 0; i <= N_IN; i++)
        w_h_new[j][i] = sat_weight(48'(w_h[j][i]) -
                        ((t * ((i < N_IN) ? 48'(n_in[j][i]) : 48'(BIAS_IN))) >>> SH_H));
    end
  end

endmodule
