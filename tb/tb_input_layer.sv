// tb_input_layer: checks that the input nodes load a bank vector with its
// signature, a test vector with a cleared desired output, and hold their
// contents while `load` is low.
module tb_input_layer;
  import iris_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, sel_test = 0;
  pix_t bank_pix [3], test_pix [3], pix [3];
  sig_t bank_sig, desired;
  int checks = 0, failures = 0, cyc = 0;
  pix_t ep [3];
  sig_t ed;

  input_layer dut (.clk, .rst_n, .load, .sel_test, .bank_pix, .bank_sig, .test_pix, .pix, .desired);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check_out(string what);
    checks++;
    if (pix != ep || desired != ed) begin
      failures++;
      $display("FAIL %s pix=%0d,%0d,%0d d=%0d exp %0d,%0d,%0d d=%0d", what,
               pix[0], pix[1], pix[2], desired, ep[0], ep[1], ep[2], ed);
    end
  endtask

  initial begin
    wait (cyc == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin bank_pix[i] = 0; test_pix[i] = 0; ep[i] = 0; end
    bank_sig = 0; ed = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_out("reset");
    for (int k = 0; k < 500; k++) begin
      for (int i = 0; i < 3; i++) begin
        bank_pix[i] = pix_t'($urandom);
        test_pix[i] = pix_t'($urandom);
      end
      bank_sig = sig_t'($urandom);
      load     = ($urandom_range(2) != 0);
      sel_test = $urandom_range(1);
      if (load) begin
        ep = sel_test ? test_pix : bank_pix;
        ed = sel_test ? '0 : bank_sig;
      end
      @(negedge clk);
      check_out(load ? (sel_test ? "test load" : "bank load") : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
