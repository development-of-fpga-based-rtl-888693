// can_bit_timing_tb: measures the bit period and the sample-point offset of
// the prescaler at its default (50 MHz clock, 1 Mbit/s: 50 cycles, sample
// at cycle 37) and at 125 kbit/s with an 80 % sample point (400 cycles,
// sample at cycle 320).
module can_bit_timing_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  logic tx0, sp0, tx1, sp1;
  can_bit_timing u_def (.clk, .rst_n, .tx_pt_o(tx0), .sample_pt_o(sp0));
  can_bit_timing #(.BIT_RATE(125_000), .SAMPLE_PCT(80)) u_slow (.clk, .rst_n, .tx_pt_o(tx1), .sample_pt_o(sp1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int cyc = 0, last_tx0 = -1, last_tx1 = -1, n0 = 0, n1 = 0;
  always @(negedge clk) if (rst_n) begin
    if (tx0) begin
      if (last_tx0 >= 0) check(cyc - last_tx0 == 50, $sformatf("period %0d", cyc - last_tx0));
      last_tx0 = cyc; n0++;
    end
    if (sp0) check(last_tx0 >= 0 && cyc - last_tx0 == 37, $sformatf("sample at %0d", cyc - last_tx0));
    if (tx1) begin
      if (last_tx1 >= 0) check(cyc - last_tx1 == 400, "slow period");
      last_tx1 = cyc; n1++;
    end
    if (sp1) check(last_tx1 >= 0 && cyc - last_tx1 == 320, "slow sample point");
    check(!(tx0 && sp0), "strobes overlap");
    cyc++;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4005) @(posedge clk);
    check(n0 >= 80 && n1 >= 10, $sformatf("bit count %0d %0d", n0, n1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
