// tb_hidden_layer: loads random weights one slot at a time, presents random
// feature vectors and checks the registered activations and the per-neuron
// normalized features against the reference arithmetic; checks that `upd`
// loads all weights at once, that init has priority over upd, and that the
// activations hold while `cap` is low.
module tb_hidden_layer;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  logic clk = 0, rst_n = 0, init_we = 0, upd = 0, cap = 0;
  logic [0:0] init_j = 0;
  logic [1:0] init_i = 0;
  weight_t init_w = 0;
  pix_t pix [3];
  weight_t w_new [2][4], w [2][4];
  hid_t h [2];
  norm_t n_in [2][3];
  longint mw [2][4];
  longint eh [2];
  int checks = 0, failures = 0, cyc = 0;

  hidden_layer dut (.clk, .rst_n, .pix, .init_we, .init_j, .init_i, .init_w, .upd, .w_new, .cap, .h, .n_in, .w);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic compute_expect();
    longint rn[4], rw[4];
    for (int j = 0; j < 2; j++) begin
      for (int i = 0; i < 3; i++) rn[i] = ref_norm(pix[i]);
      rn[3] = 0;
      for (int i = 0; i < 4; i++) rw[i] = mw[j][i];
      eh[j] = ref_neuron(rn, rw, 3, 8);
    end
  endtask

  task automatic check_weights(string what);
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < 4; i++) check(w[j][i], mw[j][i], what);
  endtask

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) pix[i] = 0;
    for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) begin w_new[j][i] = 0; mw[j][i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_weights("reset");
    for (int round = 0; round < 300; round++) begin
      // random weight generation: one slot per cycle
      init_we = 1;
      for (int k = 0; k < 8; k++) begin
        init_j = 1'(k / 4); init_i = 2'(k % 4);
        init_w = weight_t'(int'($urandom_range(2047)) - 1024);
        upd = (k == 3);                 // init must win over upd
        for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) w_new[j][i] = weight_t'($urandom);
        mw[k / 4][k % 4] = init_w;
        @(negedge clk);
      end
      init_we = 0; upd = 0;
      check_weights("init");
      // forward passes
      for (int t = 0; t < 4; t++) begin
        for (int i = 0; i < 3; i++) pix[i] = pix_t'($urandom);
        cap = 1; #1;
        for (int j = 0; j < 2; j++) for (int i = 0; i < 3; i++) check(n_in[j][i], ref_norm(pix[i]), "n_in");
        compute_expect();
        @(negedge clk);
        cap = 0;
        for (int j = 0; j < 2; j++) check(h[j], eh[j], "h");
        for (int i = 0; i < 3; i++) pix[i] = pix_t'($urandom);
        @(negedge clk);
        for (int j = 0; j < 2; j++) check(h[j], eh[j], "h hold");
      end
      // weight update from the backpropagation layer
      for (int j = 0; j < 2; j++) for (int i = 0; i < 4; i++) begin
        w_new[j][i] = weight_t'($urandom);
        mw[j][i] = w_new[j][i];
      end
      upd = 1;
      @(negedge clk);
      upd = 0;
      check_weights("upd");
      cap = 1; #1;
      compute_expect();
      @(negedge clk);
      cap = 0;
      for (int j = 0; j < 2; j++) check(h[j], eh[j], "h after upd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
