// tb_iris_config: end-to-end run of the recognizer in a non-default network
// configuration, 4 input nodes and 3 hidden neurons with a 4-entry data bank,
// to show that the layer sizes are free parameters. A reference model with
// its own generator, forward pass and backpropagation, written for any
// layer size, predicts every weight. Checked: the 19-cycle initialisation
// (3*5 + 4 weights), every training output, hidden output and error, the
// 4-cycle presentation, and every recognition result and its latency.
module tb_iris_config;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  localparam int NI = 4, NH = 3, NB = 4, EPOCHS = 30, ETA_H = 2, ETA_O = 1;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_IDLE;
  logic bank_we = 0;
  logic [1:0] bank_waddr = 0;
  pix_t bank_wpix [NI], test_pix [NI];
  sig_t bank_wsig = 0;
  logic [2:0] train_count = 0;
  logic test_valid = 0, test_ready, match_valid, init_done, weight_update;
  sig_t match_id, nn_output, desired_output;
  logic [15:0] epochs;
  logic signed [10:0] output_error;
  delta_t output_delta;
  logic [9:0] random_value;
  hid_t hidden_output [NH];
  delta_t hidden_error [NH];
  norm_t norm_input_monitor [NH][NI];
  norm_t norm_hidden_monitor [NH];

  iris_matching_top #(.DEPTH(NB), .N_IN(NI), .N_HID(NH), .ETA_SHIFT_H(ETA_H), .ETA_SHIFT_O(ETA_O)) dut (
    .clk, .rst_n, .mode, .bank_we, .bank_waddr, .bank_wpix, .bank_wsig, .train_count,
    .test_valid, .test_ready, .test_pix, .match_valid, .match_id, .init_done, .epochs,
    .weight_update, .nn_output, .desired_output, .output_error, .output_delta, .random_value,
    .hidden_output, .hidden_error, .norm_input_monitor, .norm_hidden_monitor);

  int fx [NB][NI];
  int fs [NB] = '{40, 300, 600, 900};
  longint wh [NH][NI+1];
  longint wo [NH+1];
  longint rh [NH];
  longint ro;
  int ref_idx = 0, checks = 0, failures = 0, cyc = 0, n_update = 0, n_match = 0, n_reject = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic longint act(longint sum, int outw);
    return ref_sigmoid(clamp(fdiv(sum, 17), -2048, 2047), outw);
  endfunction

  task automatic forward(input int px[NI]);
    longint s;
    for (int j = 0; j < NH; j++) begin
      s = 32767 * wh[j][NI];
      for (int i = 0; i < NI; i++) s += ref_norm(px[i]) * wh[j][i];
      rh[j] = act(s, 8);
    end
    s = 32767 * wo[NH];
    for (int j = 0; j < NH; j++) s += ref_norm(rh[j]) * wo[j];
    ro = act(s, 10);
  endtask

  task automatic backward(input int px[NI], input longint d);
    longint e, dlt_o, dlt_h, in_v, wo_old[NH+1];
    e = ro - d;
    dlt_o = fdiv(e * ((ro * (1024 - ro)) / 1024), 10);
    check(output_error == 11'(e), "output error");
    wo_old = wo;
    for (int j = 0; j <= NH; j++) begin
      in_v = (j < NH) ? ref_norm(rh[j]) : 32767;
      wo[j] = sat16(wo[j] - fdiv(dlt_o * in_v, 15 + ETA_O));
    end
    for (int j = 0; j < NH; j++) begin
      dlt_h = fdiv(fdiv(dlt_o * wo_old[j], 10) * ((rh[j] * (256 - rh[j])) / 64), 10);
      check(hidden_error[j] == delta_t'(dlt_h), "hidden error");
      for (int i = 0; i <= NI; i++) begin
        in_v = (i < NI) ? ref_norm(px[i]) : 32767;
        wh[j][i] = sat16(wh[j][i] - fdiv(dlt_h * in_v, 15 + ETA_H));
      end
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && weight_update) begin
      forward(fx[ref_idx]);
      check(nn_output == sig_t'(ro), "training output");
      for (int j = 0; j < NH; j++) check(hidden_output[j] == hid_t'(rh[j]), "hidden output");
      backward(fx[ref_idx], fs[ref_idx]);
      n_update++;
      ref_idx = (ref_idx + 1) % NB;
    end
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] lfsr;
    int t0, k, tv[NI];
    for (int b = 0; b < NB; b++) for (int i = 0; i < NI; i++) fx[b][i] = 20 + 60 * b + int'($urandom_range(20));
    for (int i = 0; i < NI; i++) begin bank_wpix[i] = 0; test_pix[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      bank_we = 1; bank_waddr = 2'(b); bank_wsig = sig_t'(fs[b]);
      for (int i = 0; i < NI; i++) bank_wpix[i] = pix_t'(fx[b][i]);
      @(negedge clk);
    end
    bank_we = 0;
    train_count = 3'(NB);
    lfsr = 10'd356;
    k = 0;
    for (int j = 0; j < NH; j++) for (int i = 0; i <= NI; i++) begin
      wh[j][i] = -1024 + 2 * longint'(lfsr); lfsr = {lfsr[8:0], lfsr[9] ^ lfsr[6]}; k++;
    end
    for (int j = 0; j <= NH; j++) begin
      wo[j] = -1024 + 2 * longint'(lfsr); lfsr = {lfsr[8:0], lfsr[9] ^ lfsr[6]}; k++;
    end
    mode = MODE_INIT;
    t0 = cyc;
    wait (init_done);
    @(negedge clk);
    check(cyc - t0 == k + 1, "init takes one cycle per weight");
    check(random_value == lfsr, "generator advanced once per weight");
    mode = MODE_TRAIN;
    t0 = cyc;
    wait (int'(epochs) == EPOCHS);
    mode = MODE_IDLE;
    @(negedge clk);
    check(cyc - t0 == 4 * NB * EPOCHS, "4 cycles per presentation");
    check(n_update == NB * EPOCHS, "presentation count");
    mode = MODE_TEST;
    for (int t = 0; t < 20; t++) begin
      int lat, best, bd, dd, expect_id;
      for (int i = 0; i < NI; i++) tv[i] = (t < NB) ? fx[t][i] : int'($urandom_range(255));
      forward(tv);
      best = 0; bd = 1 << 20;
      for (int b = 0; b < NB; b++) begin
        dd = int'(ro) - fs[b]; if (dd < 0) dd = -dd;
        if (dd < bd) begin bd = dd; best = b; end
      end
      expect_id = (bd <= 20) ? fs[best] : 0;
      wait (test_ready);
      @(negedge clk);
      test_valid = 1;
      for (int i = 0; i < NI; i++) test_pix[i] = pix_t'(tv[i]);
      @(negedge clk);
      test_valid = 0;
      lat = 0;
      while (!match_valid) begin @(negedge clk); lat++; end
      check(lat == 3, "test latency");
      check(nn_output == sig_t'(ro), "test output");
      check(int'(match_id) == expect_id, "recognition result");
      if (expect_id != 0) n_match++; else n_reject++;
    end
    $display("updates=%0d recognized=%0d rejected=%0d", n_update, n_match, n_reject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
