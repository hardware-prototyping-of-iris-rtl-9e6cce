// tb_random_weight_gen: checks the LFSR sequence against a bit-level model of
// x^10 + x^7 + 1, the weight mapping X = -1024 + 2R, hold without `step`,
// the full period of 1023 and that every R lies in 1..1023.
module tb_random_weight_gen;
  import iris_pkg::*;

  logic clk = 0, rst_n = 0, step = 0;
  logic [9:0] r;
  weight_t x;
  logic [9:0] model;
  int checks = 0, failures = 0;
  int cyc = 0;

  random_weight_gen #(.SEED(10'd356)) dut (.clk, .rst_n, .step, .r, .x);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s r=%0d x=%0d model=%0d", what, r, x, model);
    end
  endtask

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 10'd356;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(r == 10'd356, "seed");
    check(int'(x) == -1024 + 2 * 356, "x of seed");
    // hold
    repeat (3) @(negedge clk);
    check(r == 10'd356, "hold");
    step = 1;
    for (int k = 1; k <= 1023; k++) begin
      @(negedge clk);
      model = {model[8:0], model[9] ^ model[6]};
      check(r == model, "sequence");
      check(int'(x) == -1024 + 2 * int'(r), "mapping");
      check(r != 0 && int'(x) >= -1024 && int'(x) <= 1022, "range");
      if (k < 1023) check(r != 10'd356, "no early repeat");
    end
    check(r == 10'd356, "period 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
