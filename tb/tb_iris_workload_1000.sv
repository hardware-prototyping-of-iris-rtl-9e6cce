// tb_iris_workload_1000: the 1000-sample evaluation run at the default
// parameters. 1000 training and 1000 test samples are generated as noisy
// copies (each feature +-3) of the eight irises of the original training
// trace, cycling through the eight. The data bank holds 8 entries, so
// training goes in 125 batches: the bank is rewritten with 8 samples and
// trained for one pass each time. The 1000 test samples are then streamed
// in mode 11. Every training output and every recognition is checked
// against a reference model, as is the 4-cycle presentation. The testbench
// reports, without judging them, the fraction of test samples shown with
// their own signature and the accuracy figure
//   100 - (sum over samples of 100 * (X - Y) / X) / N
// with X the true signature and Y the network output.
module tb_iris_workload_1000;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  localparam int NB = 8, NS = 1000;

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

  int fx [NB][3] = '{'{92, 95, 94}, '{38, 37, 39}, '{104, 103, 90}, '{99, 108, 102},
                     '{43, 42, 38}, '{78, 90, 74}, '{51, 55, 49}, '{59, 62, 64}};
  int fs [NB] = '{10, 50, 100, 150, 200, 250, 300, 350};

  int bx [NB][3];           // current bank contents (model)
  int bs [NB];
  longint wh [2][4];
  longint wo [3];
  int ref_idx = 0, checks = 0, failures = 0, cyc = 0, n_update = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int noisy(int v);
    int r = v + int'($urandom_range(6)) - 3;
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

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

  always @(negedge clk) begin
    if (rst_n && weight_update) begin
      longint h[2], o, nin[2][3], e, dlt_o, dlt_h[2];
      ref_forward(bx[ref_idx], h, o, nin);
      check(nn_output == sig_t'(o) && desired_output == sig_t'(bs[ref_idx]), "training output");
      ref_backprop(o, bs[ref_idx], h, nin, 1, 1, wh, wo, e, dlt_o, dlt_h);
      n_update++;
      ref_idx = (ref_idx + 1) % NB;
    end
  end

  initial begin
    wait (cyc == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] lfsr;
    int t0, correct, rejected, omin, omax;
    real acc_sum, acc_id_sum;
    longint h[2], o, nin[2][3];
    for (int i = 0; i < 3; i++) begin bank_wpix[i] = 0; test_pix[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    lfsr = 10'd356;
    for (int k = 0; k < 11; k++) begin
      if (k < 8) wh[k / 4][k % 4] = -1024 + 2 * longint'(lfsr);
      else       wo[k - 8]        = -1024 + 2 * longint'(lfsr);
      lfsr = {lfsr[8:0], lfsr[9] ^ lfsr[6]};
    end
    mode = MODE_INIT;
    wait (init_done);
    @(negedge clk);
    mode = MODE_IDLE;
    train_count = 4'(NB);
    // ---- training, 125 batches of 8 ----
    for (int b = 0; b < NS / NB; b++) begin
      for (int k = 0; k < NB; k++) begin
        int s;
        s = b * NB + k;
        bs[k] = fs[s % NB];
        for (int i = 0; i < 3; i++) bx[k][i] = noisy(fx[s % NB][i]);
        bank_we = 1; bank_waddr = 3'(k); bank_wsig = sig_t'(bs[k]);
        for (int i = 0; i < 3; i++) bank_wpix[i] = pix_t'(bx[k][i]);
        @(negedge clk);
      end
      bank_we = 0;
      mode = MODE_TRAIN;
      t0 = cyc;
      wait (int'(epochs) == b + 1);
      mode = MODE_IDLE;
      @(negedge clk);
      check(cyc - t0 == 4 * NB, "one pass of 8 takes 32 cycles");
    end
    check(n_update == NS, "1000 training presentations");
    // ---- testing, 1000 samples ----
    omin = 1023; omax = 0;
    correct = 0; rejected = 0; acc_sum = 0.0; acc_id_sum = 0.0;
    mode = MODE_TEST;
    for (int s = 0; s < NS; s++) begin
      int tv[3], x, expect_id, best, bd, dd;
      x = fs[s % NB];
      for (int i = 0; i < 3; i++) tv[i] = noisy(fx[s % NB][i]);
      ref_forward(tv, h, o, nin);
      best = 0; bd = 1 << 20;
      for (int k = 0; k < NB; k++) begin
        dd = int'(o) - bs[k]; if (dd < 0) dd = -dd;
        if (dd < bd) begin bd = dd; best = k; end
      end
      expect_id = (bd <= 20) ? bs[best] : 0;
      wait (test_ready);
      @(negedge clk);
      test_valid = 1;
      for (int i = 0; i < 3; i++) test_pix[i] = pix_t'(tv[i]);
      @(negedge clk);
      test_valid = 0;
      wait (match_valid);
      check(nn_output == sig_t'(o), "test output");
      check(int'(match_id) == expect_id, "recognition result");
      if (int'(match_id) == x) correct++;
      if (match_id == 0) rejected++;
      if (int'(nn_output) < omin) omin = int'(nn_output);
      if (int'(nn_output) > omax) omax = int'(nn_output);
      acc_sum    += 100.0 * real'(x - int'(nn_output)) / real'(x);
      acc_id_sum += 100.0 * real'(x - int'(match_id)) / real'(x);
      @(negedge clk);
    end
    $display("test samples shown with their own signature: %0d of %0d, rejected: %0d", correct, NS, rejected);
    $display("network output range over the test set: %0d..%0d", omin, omax);
    $display("accuracy figure with Y = network output: %0.2f %%", 100.0 - acc_sum / NS);
    $display("accuracy figure with Y = shown signature: %0.2f %%", 100.0 - acc_id_sum / NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
