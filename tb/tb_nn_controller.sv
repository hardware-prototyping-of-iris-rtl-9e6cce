// tb_nn_controller: checks the mode sequencing cycle by cycle:
// weight init loads slots 0..10 in order in 11 cycles and only once per stay
// in mode 01; training presents bank entries 0..count-1 cyclically with the
// LOAD/HID/OUT/UPD pattern (4 cycles per entry) and counts epochs; testing
// accepts a vector only with test_valid, never updates weights and enables
// the result block 3 cycles after acceptance; idle does nothing.
module tb_nn_controller;
  import iris_pkg::*;

  logic clk = 0, rst_n = 0, test_valid = 0, test_ready;
  mode_e mode = MODE_IDLE;
  logic [3:0] count = 0;
  logic rng_step, init_we_h, init_we_o, init_done;
  logic [0:0] init_j;
  logic [1:0] init_i, init_oi;
  logic [2:0] bank_raddr;
  logic il_load, il_sel_test, h_cap, o_cap, w_upd, res_en;
  logic [15:0] epochs;
  int checks = 0, failures = 0, cyc = 0;

  nn_controller #(.DEPTH(8)) dut (.clk, .rst_n, .mode, .count, .test_valid, .test_ready,
    .rng_step, .init_we_h, .init_j, .init_i, .init_we_o, .init_oi, .init_done,
    .bank_raddr, .il_load, .il_sel_test, .h_cap, .o_cap, .w_upd, .res_en, .epochs);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // strobe vector: {il_load, h_cap, o_cap, w_upd, res_en, init_we_h|init_we_o}
  function automatic logic [5:0] strobes();
    return {il_load, h_cap, o_cap, w_upd, res_en, init_we_h | init_we_o};
  endfunction

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(strobes() == 0 && !init_done, "idle after reset");
    // ---- weight init ----
    mode = MODE_INIT;
    @(negedge clk);                       // IDLE has seen the mode
    for (int k = 0; k < 11; k++) begin
      check(rng_step, "rng_step during init");
      if (k < 8) check(init_we_h && !init_we_o && init_j == 1'(k / 4) && init_i == 2'(k % 4), "hidden slot");
      else       check(init_we_o && !init_we_h && init_oi == 2'(k - 8), "output slot");
      @(negedge clk);
    end
    check(init_done && !init_we_h && !init_we_o && !rng_step, "init done");
    repeat (20) begin
      @(negedge clk);
      check(!init_we_h && !init_we_o, "init only once");
    end
    // ---- training ----
    for (int cnt = 1; cnt <= 8; cnt += 3) begin
      int e0;
      mode = MODE_IDLE; count = 4'(cnt);
      repeat (8) @(negedge clk);
      e0 = int'(epochs);
      mode = MODE_TRAIN; #1;
      for (int p = 0; p < 3 * cnt; p++) begin
        check(il_load && !il_sel_test && int'(bank_raddr) == p % cnt && strobes() == 6'b100000, "train load");
        @(negedge clk); check(strobes() == 6'b010000, "train hid");
        @(negedge clk); check(strobes() == 6'b001000, "train out");
        @(negedge clk); check(strobes() == 6'b000100, "train upd");
        @(negedge clk);
      end
      check(int'(epochs) == e0 + 3, "three epochs");
      mode = MODE_IDLE;
      repeat (4) @(negedge clk);
    end
    // ---- testing ----
    mode = MODE_TEST;
    @(negedge clk);
    repeat (5) begin
      check(test_ready && !il_load, "ready, nothing without valid");
      @(negedge clk);
    end
    for (int t = 0; t < 10; t++) begin
      int gap;
      gap = $urandom_range(3);
      repeat (gap) @(negedge clk);
      test_valid = 1; #1;
      check(test_ready && il_load && il_sel_test, "test accept");
      @(negedge clk); test_valid = 0;
      check(strobes() == 6'b010000 && !test_ready, "test hid");
      @(negedge clk); check(strobes() == 6'b001000, "test out");
      @(negedge clk); check(strobes() == 6'b000010, "test match, no update");
      @(negedge clk); check(test_ready, "ready again");
    end
    // re-entering mode 01 runs the initialisation again
    mode = MODE_INIT;
    @(negedge clk);
    check(init_we_h && init_i == 0, "re-init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
