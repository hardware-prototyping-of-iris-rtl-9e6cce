// iris_matching_top: the MATCHING top entity, a multilayer-perceptron iris
// recognizer trained on chip by backpropagation.
//
// An iris is presented as a vector of N_IN (default three) 8-bit features,
// taken off chip from the normalized amplitude spectrum of the unrolled iris
// image, and is identified by a signature, a number up to 1023. The data
// bank holds the trained irises. The network (N_IN input nodes -> N_HID
// hidden sigmoid neurons, two by default -> one output sigmoid neuron) is
// first given random weights (mode 01), then trained on the bank entries
// (mode 10), where the backpropagation layer adjusts all weights after every
// presentation so that the output approaches the signature, and finally
// used for recognition (mode 11), where the output result block turns the
// network output into the number of the nearest trained iris, or 0 when
// none is close enough.
//
// Interface: bank write port (bank_we, bank_waddr, bank_wpix, bank_wsig);
// train_count selects how many bank entries are trained on and matched
// against; test vectors enter through test_valid/test_ready/test_pix;
// results leave on match_valid/match_id. Monitors show the network output,
// desired output, output error and delta, hidden outputs, hidden errors,
// the normalized inputs of every hidden neuron and of the output neuron, and
// the random number, the signals a simulation of the network is read by.
// Timing: N_HID*(N_IN+1) + N_HID+1 cycles of weight init (11 for 3-2-1),
// 4 cycles per training presentation, 4 cycles from an accepted test vector
// to match_valid. The 3-2-1 default, the modes and the layer structure
// follow the document; widths, timing and the matching rule are this
// design's own.
module iris_matching_top
  import iris_pkg::*;
#(
  parameter int          DEPTH     = 8,
  parameter int          N_IN      = N_INPUTS,
  parameter int          N_HID     = N_HIDDEN,
  parameter int          ETA_SHIFT_H = 1,
  parameter int          ETA_SHIFT_O = 1,
  parameter int          MATCH_TOL = 20,
  parameter logic [9:0]  SEED      = 10'd356,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = $clog2(DEPTH + 1),
  localparam int JW = (N_HID > 1) ? $clog2(N_HID) : 1,
  localparam int IW = $clog2(N_IN + 1),
  localparam int OW = $clog2(N_HID + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mode_e         mode,
  // data bank write port
  input  logic          bank_we,
  input  logic [AW-1:0] bank_waddr,
  input  pix_t          bank_wpix   [N_IN],
  input  sig_t          bank_wsig,
  input  logic [CW-1:0] train_count,
  // test vectors
  input  logic          test_valid,
  output logic          test_ready,
  input  pix_t          test_pix    [N_IN],
  // recognition result
  output logic          match_valid,
  output sig_t          match_id,
  // status and monitors
  output logic          init_done,
  output logic [15:0]   epochs,
  output logic          weight_update,
  output sig_t          nn_output,
  output sig_t          desired_output,
  output logic signed [SIG_W:0] output_error,
  output delta_t        output_delta,
  output logic [9:0]    random_value,
  output hid_t          hidden_output [N_HID],
  output delta_t        hidden_error  [N_HID],
  output norm_t         norm_input_monitor  [N_HID][N_IN],
  output norm_t         norm_hidden_monitor [N_HID]
);

  // controller strobes
  logic          rng_step, init_we_h, init_we_o, init_done_c;
  logic [JW-1:0] init_j;
  logic [IW-1:0] init_i;
  logic [OW-1:0] init_oi;
  logic [AW-1:0] bank_raddr;
  logic          il_load, il_sel_test, h_cap, o_cap, w_upd, res_en;

  // datapath
  logic [9:0]    rng_r;
  weight_t       rng_x;
  pix_t          bank_rpix [N_IN];
  sig_t          bank_rsig;
  sig_t          sig_all   [DEPTH];
  pix_t          pix       [N_IN];
  sig_t          desired;
  hid_t          h         [N_HID];
  norm_t         n_in      [N_HID][N_IN];
  weight_t       w_h       [N_HID][N_IN+1];
  weight_t       w_h_new   [N_HID][N_IN+1];
  sig_t          o;
  norm_t         n_h       [N_HID];
  weight_t       w_o       [N_HID+1];
  weight_t       w_o_new   [N_HID+1];
  delta_t        delta_o;
  delta_t        delta_h   [N_HID];
  logic signed [SIG_W:0] err;

  nn_controller #(.DEPTH(DEPTH), .N_IN(N_IN), .N_HID(N_HID)) u_ctrl (
    .clk, .rst_n, .mode, .count(train_count), .test_valid, .test_ready,
    .rng_step, .init_we_h, .init_j, .init_i, .init_we_o, .init_oi, .init_done(init_done_c),
    .bank_raddr, .il_load, .il_sel_test, .h_cap, .o_cap, .w_upd, .res_en, .epochs
  );

  random_weight_gen #(.SEED(SEED)) u_rng (
    .clk, .rst_n, .step(rng_step), .r(rng_r), .x(rng_x)
  );

  data_bank #(.DEPTH(DEPTH), .N_IN(N_IN)) u_bank (
    .clk, .rst_n, .we(bank_we), .waddr(bank_waddr), .wpix(bank_wpix), .wsig(bank_wsig),
    .raddr(bank_raddr), .rpix(bank_rpix), .rsig(bank_rsig), .sig_all
  );

  input_layer #(.N_IN(N_IN)) u_input (
    .clk, .rst_n, .load(il_load), .sel_test(il_sel_test),
    .bank_pix(bank_rpix), .bank_sig(bank_rsig), .test_pix, .pix, .desired
  );

  hidden_layer #(.N_IN(N_IN), .N_HID(N_HID)) u_hidden (
    .clk, .rst_n, .pix, .init_we(init_we_h), .init_j, .init_i, .init_w(rng_x),
    .upd(w_upd), .w_new(w_h_new), .cap(h_cap), .h, .n_in, .w(w_h)
  );

  output_layer #(.N_HID(N_HID)) u_output (
    .clk, .rst_n, .h, .init_we(init_we_o), .init_i(init_oi), .init_w(rng_x),
    .upd(w_upd), .w_new(w_o_new), .cap(o_cap), .o, .n_h, .w(w_o)
  );

  backprop_layer #(.ETA_SHIFT_H(ETA_SHIFT_H), .ETA_SHIFT_O(ETA_SHIFT_O), .N_IN(N_IN), .N_HID(N_HID)) u_bp (
    .o, .d(desired), .h, .n_in, .n_h, .w_h, .w_o,
    .e(err), .delta_o, .delta_h, .w_h_new, .w_o_new
  );

  output_result #(.DEPTH(DEPTH), .TOL(MATCH_TOL)) u_result (
    .clk, .rst_n, .en(res_en), .o, .sig_all, .count(train_count),
    .match_valid, .match_id
  );

  assign init_done      = init_done_c;
  assign weight_update  = w_upd;
  assign nn_output      = o;
  assign desired_output = desired;
  assign output_error   = err;
  assign output_delta   = delta_o;
  assign random_value   = rng_r;
  assign hidden_output  = h;
  assign hidden_error   = delta_h;
  assign norm_input_monitor  = n_in;
  assign norm_hidden_monitor = n_h;

endmodule
