// tb_output_result: checks the registered recognition result (nearest
// trained signature within the tolerance, else 0) against a direct search,
// with random outputs near and far from random signatures, a varying number
// of trained entries, the one-cycle latency and the match_valid strobe.
module tb_output_result;
  import iris_pkg::*;

  localparam int DEPTH = 8, TOL = 20;
  logic clk = 0, rst_n = 0, en = 0;
  sig_t o, match_id;
  sig_t sig_all [DEPTH];
  logic [3:0] count;
  logic match_valid;
  int checks = 0, failures = 0, cyc = 0, n_match = 0, n_nomatch = 0;

  output_result #(.DEPTH(DEPTH), .TOL(TOL)) dut (.clk, .rst_n, .en, .o, .sig_all, .count, .match_valid, .match_id);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic int expect_id();
    int best = -1, bd = 1 << 20;
    for (int k = 0; k < int'(count); k++) begin
      int dd = int'(o) - int'(sig_all[k]);
      if (dd < 0) dd = -dd;
      if (sig_all[k] != 0 && dd < bd) begin bd = dd; best = k; end
    end
    return (best >= 0 && bd <= TOL) ? int'(sig_all[best]) : 0;
  endfunction

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    o = 0; count = 0;
    for (int k = 0; k < DEPTH; k++) sig_all[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // the trace's signatures 10, 50, 100 ... 350 in random order, or random ones
      for (int k = 0; k < DEPTH; k++)
        sig_all[k] = (t % 2 == 0) ? sig_t'(k == 0 ? 10 : 50 * k) : sig_t'($urandom_range(1023));
      count = 4'($urandom_range(DEPTH));
      o = ($urandom_range(1) == 1) ? sig_t'(int'(sig_all[$urandom_range(DEPTH-1)]) +
                                            int'($urandom_range(60)) - 30)
                                   : sig_t'($urandom_range(1023));
      en = 1;
      e = expect_id();
      @(negedge clk);
      en = 0;
      checks++;
      if (!match_valid || int'(match_id) != e) begin
        failures++;
        $display("FAIL o=%0d count=%0d id=%0d exp=%0d valid=%0d", o, count, match_id, e, match_valid);
      end
      if (e != 0) n_match++; else n_nomatch++;
      o = sig_t'($urandom_range(1023));
      @(negedge clk);
      checks++;
      if (match_valid || int'(match_id) != e) begin
        failures++;
        $display("FAIL hold: valid=%0d id=%0d exp=%0d", match_valid, match_id, e);
      end
    end
    checks++;
    if (n_match == 0 || n_nomatch == 0) begin
      failures++;
      $display("FAIL coverage match=%0d nomatch=%0d", n_match, n_nomatch);
    end
    $display("matches=%0d no-matches=%0d", n_match, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
