// can_eedc_node_tb: two controllers on a wired-AND bus (10 clock cycles per
// bit). Node A sends frames of every length to node B and B answers; both
// then request at the same time, so that bitwise arbitration lets the lower
// identifier through first and the loser sends after it. Finally a bit seen
// by B is inverted in the data field: B must correct it and deliver the
// original frame without a repeat.
module can_eedc_node_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  localparam int CPB = 10, SP = 7;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] txb, rv, rdy, done, rcd, rcc, arb, berr, aerr, stb, serr, ferr, eerr, req;
  logic [1:0] noise = 0;
  can_frame_t reqf [2];
  can_frame_t rxf [2];
  logic [6:0] epos [2];
  wire bus = &txb;

  for (genvar n = 0; n < 2; n++) begin : g
    can_eedc_node #(.CLK_HZ(10), .BIT_RATE(1)) u_node (
      .clk, .rst_n, .can_rx_i(bus ^ noise[n]), .can_tx_o(txb[n]),
      .req_valid_i(req[n]), .req_frame_i(reqf[n]), .req_ready_o(rdy[n]), .tx_done_o(done[n]),
      .rx_valid_o(rv[n]), .rx_frame_o(rxf[n]), .rx_corr_data_o(rcd[n]), .rx_corr_check_o(rcc[n]),
      .rx_err_pos_o(epos[n]), .arb_lost_o(arb[n]), .bit_err_o(berr[n]), .ack_err_o(aerr[n]),
      .stuff_bit_o(stb[n]), .stuff_err_o(serr[n]), .form_err_o(ferr[n]), .eedc_err_o(eerr[n])
    );
  end

  can_frame_t got [2][$];
  int n_arb = 0, n_corr = 0, n_err = 0, n_done [2] = '{0, 0};
  always @(negedge clk) begin
    for (int n = 0; n < 2; n++) begin
      if (rv[n]) got[n].push_back(rxf[n]);
      if (rv[n] && rcd[n]) n_corr++;
      if (done[n]) n_done[n]++;
    end
    if (|arb) n_arb++;
    if (|{berr, aerr, serr, ferr, eerr}) n_err++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(int n, can_frame_t f);
    @(negedge clk);
    reqf[n] = f; req[n] = 1;
    #1;
    while (!rdy[n]) @(negedge clk);
    @(negedge clk);
    req[n] = 0;
  endtask

  task automatic wait_idle(int bits);
    repeat (bits * CPB) @(negedge clk);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    can_frame_t f, g2, e;
    stream_t s;
    int i, t0;
    req = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_idle(12);

    for (int dlc = 0; dlc <= 8; dlc++) begin
      f = rand_frame(dlc);
      send(0, f);
      wait_idle(130);
      check(got[1].size() == 1 && got[1][0] == f, $sformatf("A->B dlc %0d", dlc));
      got[1].delete();
      f = rand_frame(8 - dlc);
      send(1, f);
      wait_idle(130);
      check(got[0].size() == 1 && got[0][0] == f, $sformatf("B->A dlc %0d", 8 - dlc));
      got[0].delete();
    end
    check(n_err == 0 && n_done[0] == 9 && n_done[1] == 9, "clean exchange");

    // Simultaneous requests: lower identifier wins.
    f  = rand_frame(4); f.id = 11'h123;
    g2 = rand_frame(2); g2.id = 11'h121;
    fork
      send(0, f);
      send(1, g2);
    join
    wait_idle(260);
    check(n_arb == 1, "one arbitration loss");
    check(got[0].size() == 1 && got[0][0] == g2, "winner delivered");
    check(got[1].size() == 1 && got[1][0] == f, "loser delivered after");
    got[0].delete(); got[1].delete();

    // Disturbed data bit at node B, corrected without repeat.
    f = rand_frame(6); f.id = 11'h2AA; f.data = 64'h5555_5555_5555_0000;
    ref_stream(f, s);
    i = 30;
    while (!flip_ok(s, i, -1)) i++;
    t0 = n_done[0];
    send(0, f);
    // wait for SOF, then invert bit i as seen by B at its sample point
    while (bus) @(negedge clk);
    repeat (i * CPB) @(negedge clk);
    repeat (SP - 1) @(negedge clk);
    noise[1] = 1;
    repeat (3) @(negedge clk);
    noise[1] = 0;
    wait_idle(130);
    check(got[1].size() == 1 && got[1][0] == f, "disturbed frame delivered intact");
    check(n_corr == 1, "correction reported");
    check(n_done[0] == t0 + 1, "sent once, no repeat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
