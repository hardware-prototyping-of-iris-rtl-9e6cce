// tb_normalizer: exhaustive check of the normalization circuit against
// n = (v - 134) * 240, plus values read off the published simulation trace.
module tb_normalizer;
  import iris_pkg::*;
  import iris_ref_pkg::*;

  pix_t  v;
  norm_t n;
  int checks = 0, failures = 0;

  normalizer dut (.v, .n);

  task automatic check(longint exp);
    checks++;
    if (longint'(n) != exp) begin
      failures++;
      $display("FAIL v=%0d n=%0d exp=%0d", v, n, exp);
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
    for (int k = 0; k < 256; k++) begin
      v = pix_t'(k); #1;
      check(ref_norm(k));
    end
    // trace values: features 92, 59, 38 and hidden outputs 136, 134, 137
    v = 8'd92;  #1; check(-10080);
    v = 8'd59;  #1; check(-18000);
    v = 8'd38;  #1; check(-23040);
    v = 8'd136; #1; check(480);
    v = 8'd134; #1; check(0);
    v = 8'd137; #1; check(720);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
