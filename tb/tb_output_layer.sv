// tb_output_layer: loads random weights slot by slot, presents random hidden
// activations and checks the normalized activations and the registered
// 10-bit network output against the reference arithmetic; checks `upd` and
// that the output holds while `cap` is low.
module tb_output_layer;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  logic clk = 0, rst_n = 0, init_we = 0, upd = 0, cap = 0;
  logic [1:0] init_i = 0;
  weight_t init_w = 0;
  hid_t h [2];
  weight_t w_new [3], w [3];
  sig_t o;
  norm_t n_h [2];
  longint mw [3];
  longint eo;
  int checks = 0, failures = 0, cyc = 0;

  output_layer dut (.clk, .rst_n, .h, .init_we, .init_i, .init_w, .upd, .w_new, .cap, .o, .n_h, .w);

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
    for (int i = 0; i < 4; i++) begin rn[i] = 0; rw[i] = 0; end
    for (int j = 0; j < 2; j++) rn[j] = ref_norm(h[j]);
    for (int i = 0; i < 3; i++) rw[i] = mw[i];
    eo = ref_neuron(rn, rw, 2, 10);
  endtask

  initial begin
    wait (cyc == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 2; j++) h[j] = 0;
    for (int i = 0; i < 3; i++) begin w_new[i] = 0; mw[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 300; round++) begin
      init_we = 1;
      for (int k = 0; k < 3; k++) begin
        init_i = 2'(k);
        init_w = weight_t'(int'($urandom_range(2047)) - 1024);
        mw[k] = init_w;
        @(negedge clk);
      end
      init_we = 0;
      for (int i = 0; i < 3; i++) check(w[i], mw[i], "init");
      for (int t = 0; t < 4; t++) begin
        // hidden activations near the trace's 134..138 and anywhere
        for (int j = 0; j < 2; j++) h[j] = (t < 2) ? hid_t'(130 + $urandom_range(10)) : hid_t'($urandom);
        cap = 1; #1;
        for (int j = 0; j < 2; j++) check(n_h[j], ref_norm(h[j]), "n_h");
        compute_expect();
        @(negedge clk);
        cap = 0;
        check(o, eo, "o");
        for (int j = 0; j < 2; j++) h[j] = hid_t'($urandom);
        @(negedge clk);
        check(o, eo, "o hold");
      end
      for (int i = 0; i < 3; i++) begin
        w_new[i] = weight_t'($urandom);
        mw[i] = w_new[i];
      end
      upd = 1;
      @(negedge clk);
      upd = 0;
      for (int i = 0; i < 3; i++) check(w[i], mw[i], "upd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
