// tb_data_bank: writes random entries and checks the asynchronous read port
// and the parallel signature outputs against a model array, including
// writes that must not disturb other entries.
module tb_data_bank;
  import iris_pkg::*;

  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0;
  pix_t wpix [3], rpix [3];
  sig_t wsig, rsig;
  sig_t sig_all [DEPTH];
  pix_t mp [DEPTH][3];
  sig_t ms [DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  data_bank #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .waddr, .wpix, .wsig, .raddr, .rpix, .rsig, .sig_all);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check_all(string what);
    for (int k = 0; k < DEPTH; k++) begin
      raddr = 3'(k); #1;
      checks++;
      if (rpix != mp[k] || rsig != ms[k] || sig_all[k] != ms[k]) begin
        failures++;
        $display("FAIL %s entry %0d: %0d,%0d,%0d/%0d exp %0d,%0d,%0d/%0d", what, k,
                 rpix[0], rpix[1], rpix[2], rsig, mp[k][0], mp[k][1], mp[k][2], ms[k]);
      end
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
    for (int k = 0; k < DEPTH; k++) begin
      ms[k] = 0;
      for (int i = 0; i < 3; i++) mp[k][i] = 0;
    end
    for (int i = 0; i < 3; i++) wpix[i] = 0;
    wsig = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all("reset");
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = 3'($urandom);
      for (int i = 0; i < 3; i++) wpix[i] = pix_t'($urandom);
      wsig  = sig_t'($urandom);
      @(posedge clk);
      if (we) begin
        mp[waddr] = wpix;
        ms[waddr] = wsig;
      end
      #1;
      we = 0;
      check_all("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
