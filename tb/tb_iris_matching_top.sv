// tb_iris_matching_top: end-to-end run of the iris recognizer at its default
// parameters. The data bank is loaded with the eight iris feature vectors
// and signatures (10, 50, 100 ... 350) of the published training trace; the
// network is initialised (mode 01), trained for EPOCHS passes (mode 10),
// then tested (mode 11) on the trained vectors and on unrelated vectors.
// A reference model (own LFSR, own fixed-point network and backpropagation)
// predicts every weight; the testbench checks the network output, output
// error, hidden outputs, hidden errors and normalized neuron inputs of
// every training presentation, every recognition result, the 11-cycle
// initialisation, the 4-cycle training presentation and the 4-cycle test
// latency and rate. It counts how often each mechanism happened (weight
// init, weight update, epoch wrap, recognized iris, rejected iris, mode
// switch) and fails if one never did;
// weight saturation, and how many weight changes the first and the last
// pass made, are reported only. After the eight-iris run
// the seven test vectors of the trace are streamed back to back, one
// result every 4 cycles. Then the network is trained further on a two-iris
// subset (train_count = 2), which exercises a return to mode 10 and
// matching against fewer entries.
module tb_iris_matching_top;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  localparam int EPOCHS = 45;     // 360 presentations, as in the published run
  localparam int NB = 8;
  localparam int EPOCHS2 = 300;   // second run on two irises

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_IDLE;
  logic bank_we = 0;
  logic [2:0] bank_waddr = 0;
  pix_t bank_wpix [3], test_pix [3];
  sig_t bank_wsig = 0;
  logic [3:0] train_count = 0;
  logic test_valid = 0, test_ready, match_valid, init_done, weight_update;
  sig_t match_id, nn_output, desired_output;
  logic [15:0] epochs;
  logic signed [10:0] output_error;
  delta_t output_delta;
  logic [9:0] random_value;
  hid_t hidden_output [2];
  delta_t hidden_error [2];
  norm_t norm_input_monitor [2][3];
  norm_t norm_hidden_monitor [2];

  iris_matching_top dut (
    .clk, .rst_n, .mode, .bank_we, .bank_waddr, .bank_wpix, .bank_wsig, .train_count,
    .test_valid, .test_ready, .test_pix, .match_valid, .match_id, .init_done, .epochs,
    .weight_update, .nn_output, .desired_output, .output_error, .output_delta, .random_value,
    .hidden_output, .hidden_error, .norm_input_monitor, .norm_hidden_monitor);

  // training set: features and signatures of the eight irises of the trace
  int fx [NB][3] = '{'{92, 95, 94}, '{38, 37, 39}, '{104, 103, 90}, '{99, 108, 102},
                     '{43, 42, 38}, '{78, 90, 74}, '{51, 55, 49}, '{59, 62, 64}};
  int fs [NB] = '{10, 50, 100, 150, 200, 250, 300, 350};

  // reference state
  longint wh [2][4];
  longint wo [3];
  longint wh_prev [2][4];
  longint wo_prev [3];
  int ref_idx = 0;
  int n_chg_first = 0, n_chg_last = 0;   // weight changes in the first and last pass
  int checks = 0, failures = 0, cyc = 0;
  int n_init = 0, n_update = 0, n_epoch = 0, n_sat = 0, n_match = 0, n_reject = 0, n_modesw = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic set_mode(mode_e m);
    if (m != mode) n_modesw++;
    mode = m;
  endtask

  // reference forward pass
  task automatic ref_forward(input int px[3], output longint h[2], output longint o,
                             output longint nin[2][3]);
    longint rn[4], rw[4];
    for (int j = 0; j < 2; j++) begin
      for (int i = 0; i < 3; i++) begin rn[i] = ref_norm(px[i]); nin[j][i] = rn[i]; end
      rn[3] = 0;
      for (int i = 0; i < 4; i++) rw[i] = wh[j][i];
      h[j] = ref_neuron(rn, rw, 3, 8);
    end
    for (int i = 0; i < 4; i++) begin rn[i] = 0; rw[i] = 0; end
    for (int j = 0; j < 2; j++) rn[j] = ref_norm(h[j]);
    for (int i = 0; i < 3; i++) rw[i] = wo[i];
    o = ref_neuron(rn, rw, 2, 10);
  endtask

  function automatic int ref_match(longint o, int cnt);
    int best = -1, bd = 1 << 20;
    for (int k = 0; k < cnt; k++) begin
      int dd = int'(o) - fs[k];
      if (dd < 0) dd = -dd;
      if (dd < bd) begin bd = dd; best = k; end
    end
    return (bd <= 20) ? fs[best] : 0;
  endfunction

  // every training presentation: compare with the model, then update it
  always @(negedge clk) begin
    if (rst_n && weight_update) begin
      longint h[2], o, nin[2][3], e, dlt_o, dlt_h[2];
      int px[3];
      px = fx[ref_idx];
      ref_forward(px, h, o, nin);
      check(nn_output == sig_t'(o), "training output");
      check(desired_output == sig_t'(fs[ref_idx]), "desired output");
      for (int j = 0; j < 2; j++) check(hidden_output[j] == hid_t'(h[j]), "hidden output");
      for (int j = 0; j < 2; j++) begin
        check(norm_hidden_monitor[j] == norm_t'(ref_norm(h[j])), "normalized hidden output");
        for (int i = 0; i < 3; i++)
          check(norm_input_monitor[j][i] == norm_t'(nin[j][i]), "normalized input");
      end
      wh_prev = wh; wo_prev = wo;
      ref_backprop(o, fs[ref_idx], h, nin, 1, 1, wh, wo, e, dlt_o, dlt_h);
      for (int k = 0; k < 11; k++) begin
        bit chg;
        chg = (k < 8) ? (wh[k / 4][k % 4] != wh_prev[k / 4][k % 4]) : (wo[k - 8] != wo_prev[k - 8]);
        if (chg && n_epoch == 0) n_chg_first++;
        if (chg && n_epoch == EPOCHS - 1) n_chg_last++;
      end
      check(output_error == 11'(e), "output error");
      check(output_delta == delta_t'(dlt_o), "output delta");
      for (int j = 0; j < 2; j++) check(hidden_error[j] == delta_t'(dlt_h[j]), "hidden error");
      for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++)
        if (wh[j][i] == 32767 || wh[j][i] == -32768) n_sat++;
      for (int i = 0; i < 3; i++) if (wo[i] == 32767 || wo[i] == -32768) n_sat++;
      n_update++;
      ref_idx = (ref_idx + 1) % int'(train_count);
      if (ref_idx == 0) n_epoch++;
    end
  end

  // present the eight trained vectors, noisy copies and random vectors;
  // `cnt` bank entries take part in matching
  task automatic run_tests(int cnt);
    int tvec[3];
    longint h[2], o, nin[2][3];
    set_mode(MODE_TEST);
    for (int t = 0; t < NB + 24; t++) begin
      int expect_id, lat;
      lat = 0;
      if (t < NB) tvec = fx[t];
      else if (t < NB + 8) for (int i = 0; i < 3; i++) tvec[i] = fx[t - NB][i] + int'($urandom_range(6)) - 3;
      else for (int i = 0; i < 3; i++) tvec[i] = int'($urandom_range(255));
      ref_forward(tvec, h, o, nin);
      expect_id = ref_match(o, cnt);
      wait (test_ready);
      @(negedge clk);
      test_valid = 1;
      for (int i = 0; i < 3; i++) test_pix[i] = pix_t'(tvec[i]);
      @(negedge clk);
      test_valid = 0;
      while (!match_valid) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("result 4 cycles after acceptance (lat %0d)", lat));
      check(nn_output == sig_t'(o), "test output");
      check(int'(match_id) == expect_id, "recognition result");
      if (expect_id != 0) n_match++; else n_reject++;
      if (t < NB) $display("iris %0d (signature %0d): output %0d -> shown %0d", t, fs[t], nn_output, match_id);
    end
    set_mode(MODE_IDLE);
    @(negedge clk);
  endtask

  // testing phase of the published trace: its seven test vectors (the
  // trained irises with signatures 10..300) streamed with test_valid held
  // high; a result must come out every 4 cycles, 28 cycles in all
  task automatic run_stream();
    int t0, sent, got;
    bit acc;
    longint h[2], o[7], nin[2][3];
    set_mode(MODE_TEST);
    for (int k = 0; k < 7; k++) ref_forward(fx[k], h, o[k], nin);
    wait (test_ready);
    @(negedge clk);
    t0 = cyc; sent = 0; got = 0;
    test_valid = 1;
    for (int i = 0; i < 3; i++) test_pix[i] = pix_t'(fx[0][i]);
    while (got < 7) begin
      acc = test_valid && test_ready;
      @(negedge clk);
      if (acc) begin
        sent++;
        if (sent < 7) for (int i = 0; i < 3; i++) test_pix[i] = pix_t'(fx[sent][i]);
        else test_valid = 0;
      end
      if (match_valid) begin
        check(nn_output == sig_t'(o[got]), "streamed test output");
        check(int'(match_id) == ref_match(o[got], NB), "streamed recognition result");
        got++;
      end
    end
    check(cyc - t0 == 28, $sformatf("7 streamed tests in 28 cycles (took %0d)", cyc - t0));
    set_mode(MODE_IDLE);
    @(negedge clk);
  endtask

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] lfsr;
    int t0;
    for (int i = 0; i < 3; i++) begin bank_wpix[i] = 0; test_pix[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- load the data bank ----
    for (int k = 0; k < NB; k++) begin
      bank_we = 1; bank_waddr = 3'(k); bank_wsig = sig_t'(fs[k]);
      for (int i = 0; i < 3; i++) bank_wpix[i] = pix_t'(fx[k][i]);
      @(negedge clk);
    end
    bank_we = 0;
    train_count = 4'(NB);
    // ---- mode 01: random weight generation ----
    lfsr = 10'd356;
    for (int k = 0; k < 11; k++) begin
      longint x;
      x = -1024 + 2 * longint'(lfsr);
      if (k < 8) wh[k / 4][k % 4] = x; else wo[k - 8] = x;
      lfsr = {lfsr[8:0], lfsr[9] ^ lfsr[6]};
    end
    set_mode(MODE_INIT);
    t0 = cyc;
    wait (init_done);
    @(negedge clk);
    check(cyc - t0 == 12, "init takes 11 cycles after the mode is seen");
    check(random_value == lfsr, "generator advanced by 11");
    n_init++;
    // ---- mode 10: training ----
    set_mode(MODE_TRAIN);
    t0 = cyc;
    wait (int'(epochs) == EPOCHS);
    set_mode(MODE_IDLE);
    @(negedge clk);
    check(cyc - t0 == 4 * NB * EPOCHS, "4 cycles per presentation");
    check(n_update == NB * EPOCHS && n_epoch == EPOCHS, "presentation count");
    repeat (5) @(negedge clk);
    check(n_update == NB * EPOCHS, "idle stops training");
    // ---- mode 11: testing on all eight irises ----
    run_tests(NB);
    run_stream();
    check(n_update == NB * EPOCHS, "testing changes no weight");
    // ---- back to mode 10 on a two-iris subset, then test again ----
    train_count = 4'd2;
    set_mode(MODE_TRAIN);
    t0 = cyc;
    wait (int'(epochs) == EPOCHS + EPOCHS2);
    set_mode(MODE_IDLE);
    @(negedge clk);
    check(cyc - t0 == 4 * 2 * EPOCHS2, "4 cycles per presentation, subset");
    run_tests(2);
    check(n_update == NB * EPOCHS + 2 * EPOCHS2, "testing changes no weight");
    // ---- coverage of the mechanisms ----
    $display("weights changed: %0d of %0d in the first pass, %0d of %0d in pass %0d",
             n_chg_first, 11 * NB, n_chg_last, 11 * NB, EPOCHS);
    $display("init=%0d updates=%0d epochs=%0d saturations=%0d recognized=%0d rejected=%0d mode switches=%0d",
             n_init, n_update, n_epoch, n_sat, n_match, n_reject, n_modesw);
    checks++; if (n_init == 0)   begin failures++; $display("FAIL no weight init");   end
    checks++; if (n_update == 0) begin failures++; $display("FAIL no weight update"); end
    checks++; if (n_epoch == 0)  begin failures++; $display("FAIL no epoch wrap");    end
    checks++; if (n_match == 0)  begin failures++; $display("FAIL no iris recognized"); end
    checks++; if (n_reject == 0) begin failures++; $display("FAIL no iris rejected");   end
    checks++; if (n_modesw < 3)  begin failures++; $display("FAIL modes not all used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
