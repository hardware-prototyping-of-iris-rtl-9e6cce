// tb_sigmoid_pwl: exhaustive check of the piecewise linear sigmoid over the
// Q.8 argument range -8..8 at 8- and 10-bit output widths, plus symmetry and
// fixed points (y(0) = 0.5, y(+-5) = 1 / 0 saturated).
module tb_sigmoid_pwl;
  import iris_ref_pkg::*;

  logic signed [17:0] x;
  logic [7:0]  y8;
  logic [9:0]  y10;
  int checks = 0, failures = 0;

  sigmoid_pwl #(.IN_W(18), .OUT_W(8))  dut8  (.x, .y(y8));
  sigmoid_pwl #(.IN_W(18), .OUT_W(10)) dut10 (.x, .y(y10));

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -2048; k <= 2047; k++) begin
      x = 18'(k); #1;
      check(y8,  ref_sigmoid(k, 8),  "y8");
      check(y10, ref_sigmoid(k, 10), "y10");
    end
    x = 0;        #1; check(y8, 128, "mid8");  check(y10, 512, "mid10");
    x = 18'sd1280; #1; check(y8, 255, "sat+"); check(y10, 1023, "sat+10");
    x = -18'sd1280; #1; check(y8, 0, "sat-");  check(y10, 0, "sat-10");
    x = 18'sd256;  #1; check(y10, 768, "one");     // 0.75
    x = -18'sd256; #1; check(y10, 256, "minus_one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
