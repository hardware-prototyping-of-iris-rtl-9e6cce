// tb_neuron: random and corner-case checks of the neuron's weighted sum and
// activation against the reference arithmetic, for a 3-input 8-bit-output
// (hidden) and a 2-input 10-bit-output (output) neuron.
module tb_neuron;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  norm_t   n3 [3];
  weight_t w3 [4];
  acc_t    a3;
  logic [7:0] y3;
  norm_t   n2 [2];
  weight_t w2 [3];
  acc_t    a2;
  logic [9:0] y2;
  int checks = 0, failures = 0;

  neuron #(.N_IN(3), .OUT_W(8))  dut3 (.n(n3), .w(w3), .a(a3), .y(y3));
  neuron #(.N_IN(2), .OUT_W(10)) dut2 (.n(n2), .w(w2), .a(a2), .y(y2));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  function automatic int rnd16(int mag);
    return int'($urandom_range(2 * mag)) - mag;
  endfunction

  task automatic run(int wmag);
    longint rn[4], rw[4];
    for (int i = 0; i < 4; i++) begin rn[i] = 0; rw[i] = 0; end
    for (int i = 0; i < 3; i++) begin rn[i] = rnd16(32768 - 1); n3[i] = norm_t'(rn[i]); end
    for (int i = 0; i < 4; i++) begin rw[i] = rnd16(wmag); w3[i] = weight_t'(rw[i]); end
    #1;
    check(a3, ref_sum(rn, rw, 3), "sum3");
    check(y3, ref_neuron(rn, rw, 3, 8), "y3");
    for (int i = 0; i < 4; i++) begin rn[i] = 0; rw[i] = 0; end
    for (int i = 0; i < 2; i++) begin rn[i] = rnd16(32767); n2[i] = norm_t'(rn[i]); end
    for (int i = 0; i < 3; i++) begin rw[i] = rnd16(wmag); w2[i] = weight_t'(rw[i]); end
    #1;
    check(a2, ref_sum(rn, rw, 2), "sum2");
    check(y2, ref_neuron(rn, rw, 2, 10), "y2");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // zero weights: output 0.5
    for (int i = 0; i < 3; i++) n3[i] = 16'sd1000;
    for (int i = 0; i < 4; i++) w3[i] = '0;
    for (int i = 0; i < 2; i++) n2[i] = 16'sd1000;
    for (int i = 0; i < 3; i++) w2[i] = '0;
    #1;
    check(y3, 128, "zero w y3");
    check(y2, 512, "zero w y2");
    // threshold only: +1.0 on the constant input -> x = 32767*1024 >> 17 = 255
    w3[3] = 16'sd1024; #1;
    check(y3, ref_sigmoid(255, 8), "threshold");
    for (int k = 0; k < 2000; k++) run(64);     // small weights: linear region
    for (int k = 0; k < 2000; k++) run(1024);   // init range
    for (int k = 0; k < 2000; k++) run(32767);  // full range, saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
