// tb_backprop_layer: random operating points (outputs, targets, hidden
// activations, features and weights) checked against the reference
// backpropagation step: the error o - d, the output and hidden deltas and
// every adjusted weight, including saturation at the weight limits. Also
// checks that a zero error leaves all weights unchanged. A second instance
// with separate learning rates for the two layers (hidden 2^-3, output
// 2^-0) is checked on the same points.
module tb_backprop_layer;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  localparam int ETA = 1, ETA2_H = 3, ETA2_O = 0;
  sig_t o, d;
  hid_t h [2];
  norm_t n_in [2][3];
  norm_t n_h [2];
  weight_t w_h [2][4], w_o [3], w_h_new [2][4], w_o_new [3];
  logic signed [10:0] e;
  delta_t delta_o;
  delta_t delta_h [2];
  weight_t w_h_new2 [2][4], w_o_new2 [3];
  logic signed [10:0] e2;
  delta_t delta_o2;
  delta_t delta_h2 [2];
  int checks = 0, failures = 0;

  backprop_layer dut (.o, .d, .h, .n_in, .n_h, .w_h, .w_o, .e, .delta_o, .delta_h, .w_h_new, .w_o_new);
  backprop_layer #(.ETA_SHIFT_H(ETA2_H), .ETA_SHIFT_O(ETA2_O)) dut2 (
    .o, .d, .h, .n_in, .n_h, .w_h, .w_o, .e(e2), .delta_o(delta_o2), .delta_h(delta_h2),
    .w_h_new(w_h_new2), .w_o_new(w_o_new2));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d (o=%0d d=%0d)", what, got, exp, o, d);
    end
  endtask

  task automatic run(int wmag);
    longint rh[2], rn[2][3], rwh[2][4], rwo[3], re, rdo, rdh[2];
    longint qwh[2][4], qwo[3];
    o = sig_t'($urandom); d = sig_t'($urandom);
    if ($urandom_range(3) == 0) d = o;
    for (int j = 0; j < 2; j++) begin
      h[j] = hid_t'($urandom); rh[j] = h[j];
      n_h[j] = norm_t'(ref_norm(h[j]));
      for (int i = 0; i < 3; i++) begin
        rn[j][i] = ref_norm($urandom_range(255));
        n_in[j][i] = norm_t'(rn[j][i]);
      end
      for (int i = 0; i < 4; i++) begin
        rwh[j][i] = longint'($urandom_range(2 * wmag)) - wmag;
        w_h[j][i] = weight_t'(rwh[j][i]);
      end
    end
    for (int i = 0; i < 3; i++) begin
      rwo[i] = longint'($urandom_range(2 * wmag)) - wmag;
      w_o[i] = weight_t'(rwo[i]);
    end
    #1;
    qwh = rwh; qwo = rwo;
    ref_backprop(o, d, rh, rn, ETA2_H, ETA2_O, qwh, qwo, re, rdo, rdh);
    check(e2, re, "e (2)");
    check(delta_o2, rdo, "delta_o (2)");
    for (int j = 0; j < 2; j++) check(delta_h2[j], rdh[j], "delta_h (2)");
    for (int i = 0; i < 3; i++) check(w_o_new2[i], qwo[i], "w_o_new (2)");
    for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) check(w_h_new2[j][i], qwh[j][i], "w_h_new (2)");
    ref_backprop(o, d, rh, rn, ETA, ETA, rwh, rwo, re, rdo, rdh);
    check(e, re, "e");
    check(delta_o, rdo, "delta_o");
    for (int j = 0; j < 2; j++) check(delta_h[j], rdh[j], "delta_h");
    for (int i = 0; i < 3; i++) check(w_o_new[i], rwo[i], "w_o_new");
    for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) check(w_h_new[j][i], rwh[j][i], "w_h_new");
    if (o == d) begin
      for (int i = 0; i < 3; i++) check(w_o_new[i], w_o[i], "no change w_o");
      for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) check(w_h_new[j][i], w_h[j][i], "no change w_h");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a worked point: o = 512 (0.5), d = 256, all weights 1.0
    o = 10'd512; d = 10'd256;
    for (int j = 0; j < 2; j++) begin
      h[j] = 8'd128; n_h[j] = norm_t'(ref_norm(128));
      for (int i = 0; i < 3; i++) n_in[j][i] = 16'sd16384;
      for (int i = 0; i < 4; i++) w_h[j][i] = 16'sd1024;
    end
    for (int i = 0; i < 3; i++) w_o[i] = 16'sd1024;
    #1;
    check(e, 256, "worked e");
    check(delta_o, 64, "worked delta_o");           // 0.25 * 0.25
    check(delta_h[0], 16, "worked delta_h");        // 0.0625 * 1 * 0.25
    check(w_o_new[2], 1024 - 31, "worked threshold");  // eta 0.5: 64*32767 >> 16 = 31
    for (int k = 0; k < 3000; k++) run(1024);
    for (int k = 0; k < 3000; k++) run(32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
