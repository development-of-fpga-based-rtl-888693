// can_tx_tb: drives the transmitter with its own bit-timing strobes and a
// wired-AND bus it can pull dominant. For frames of 0..8 data bytes it
// compares every bit on the bus with the reference stream (stuffing and
// EEDC field included), acknowledges the frame and checks that done_o
// comes on the last EOF bit. It then checks a missing acknowledgement
// (error flag, automatic retry), a lost arbitration (silence, retry) and a
// bit error outside arbitration (six-bit error flag, retry).
module can_tx_tb;
  import eedc_pkg::*;
  import can_ref_pkg::*;

  localparam int CPB = 10, SP = 7;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   pcnt = 0;
  logic tx_pt, sample_pt;
  always_ff @(posedge clk) pcnt <= (pcnt == CPB - 1) ? 0 : pcnt + 1;
  assign tx_pt     = (pcnt == 0);
  assign sample_pt = (pcnt == SP);

  logic       tx_o, tb_drv = 1;
  wire        bus = tx_o & tb_drv;
  logic       req_valid = 0, req_ready, done, active, arb_lost, bit_err, ack_err, stuff;
  can_frame_t req_frame;

  can_tx u_dut (
    .clk, .rst_n, .tx_pt_i(tx_pt), .sample_pt_i(sample_pt), .bus_i(bus), .tx_o,
    .req_valid_i(req_valid), .req_frame_i(req_frame), .req_ready_o(req_ready),
    .done_o(done), .active_o(active), .arb_lost_o(arb_lost), .bit_err_o(bit_err),
    .ack_err_o(ack_err), .stuff_o(stuff)
  );

  // Bus monitor: records the bits of each frame from SOF.
  bit   cap [512];
  int   capn = 0, rec = 0;
  bit   in_frame = 0;
  int   force_idx = -1;
  bit   ack_on = 0;
  int   ack_idx = -1;
  int   n_done = 0, n_arb = 0, n_bit = 0, n_ack = 0, n_stuff = 0;

  always @(negedge clk) begin
    if (done) n_done++;
    if (arb_lost) n_arb++;
    if (bit_err) n_bit++;
    if (ack_err) n_ack++;
    if (stuff) n_stuff++;
    if (sample_pt) begin
      if (!in_frame) begin
        if (!bus && rec >= 11) begin
          in_frame = 1; capn = 0; cap[capn++] = bus;
        end
      end else if (capn < 512) cap[capn++] = bus;
      rec = bus ? rec + 1 : 0;
      if (in_frame && rec >= 11) in_frame = 0;
    end
    if (tx_pt)
      tb_drv = !(in_frame && ((capn == force_idx) || (ack_on && capn == ack_idx)));
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Event selector for wait_pulse: 0 ready, 1 done, 2 arb_lost, 3 bit_err,
  // 4 ack_err.
  function automatic logic ev(int which);
    case (which)
      0: return req_ready;
      1: return done;
      2: return arb_lost;
      3: return bit_err;
      default: return ack_err;
    endcase
  endfunction

  task automatic wait_pulse(int which, int max_cycles, string what);
    int c = 0;
    @(negedge clk);
    while (!ev(which) && c < max_cycles) begin
      @(negedge clk);
      c++;
    end
    check(ev(which), {"timeout waiting for ", what});
    @(posedge clk);
  endtask

  task automatic offer(can_frame_t f);
    @(negedge clk);
    req_frame = f;
    req_valid = 1;
    #1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic compare(stream_t s, string what);
    int bad = 0;
    for (int i = 0; i < s.n; i++) begin
      bit e = (i == s.ack_idx) ? 1'b0 : s.b[i];
      if (cap[i] != e) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d bits differ from reference", what, bad));
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stream_t s;
    can_frame_t f;
    int st0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (15 * CPB) @(posedge clk);

    // Plain frames of every length.
    for (int dlc = 0; dlc <= 8; dlc++) begin
      f = rand_frame(dlc);
      if (dlc == 3) f.data[63:40] = 24'h000000;   // long runs: many stuff bits
      ref_stream(f, s);
      ack_idx = s.ack_idx; ack_on = 1; force_idx = -1;
      st0 = n_stuff;
      offer(f);
      wait_pulse(1, 400 * CPB, "done");
      check(capn == s.n, $sformatf("dlc %0d: done after %0d bits, expected %0d", dlc, capn, s.n));
      compare(s, $sformatf("dlc %0d", dlc));
      check(n_stuff - st0 == s.nstuff, $sformatf("dlc %0d: %0d stuff bits vs %0d", dlc, n_stuff - st0, s.nstuff));
      repeat (4 * CPB) @(posedge clk);
    end

    // Missing acknowledgement: error flag, then an acknowledged retry.
    f = rand_frame(2);
    ref_stream(f, s);
    ack_idx = s.ack_idx; ack_on = 0; force_idx = -1;
    offer(f);
    wait_pulse(4, 400 * CPB, "ack_err");
    repeat (CPB * 4) @(posedge clk);
    check(cap[s.ack_idx + 1] == 0 && cap[s.ack_idx + 6] == 0, "error flag after missing ACK");
    ack_on = 1;
    wait_pulse(1, 800 * CPB, "done after ACK error");
    compare(s, "retry after ACK error");

    // Lost arbitration at the first recessive identifier bit.
    f = rand_frame(1);
    f.id = 11'h5A5;
    ref_stream(f, s);
    force_idx = 1;
    while (s.b[force_idx] == 0) force_idx++;
    ack_idx = s.ack_idx; ack_on = 1;
    offer(f);
    wait_pulse(2, 400 * CPB, "arb_lost");
    check(capn == force_idx + 1, "arbitration lost on the forced bit");
    repeat (CPB) @(posedge clk);
    check(tx_o == 1, "silent after losing arbitration");
    force_idx = -1;
    wait_pulse(1, 800 * CPB, "done after lost arbitration");
    compare(s, "retry after lost arbitration");

    // Bit error in the data field.
    f = rand_frame(4);
    ref_stream(f, s);
    ack_idx = s.ack_idx;
    force_idx = 25;
    while (s.b[force_idx] == 0) force_idx++;
    offer(f);
    wait_pulse(3, 400 * CPB, "bit_err");
    repeat (7 * CPB) @(posedge clk);
    for (int i = 1; i <= 6; i++)
      check(cap[force_idx + i] == 0, "six-bit error flag");
    force_idx = -1;
    wait_pulse(1, 800 * CPB, "done after bit error");
    compare(s, "retry after bit error");

    check(n_done == 12 && n_arb == 1 && n_bit == 1 && n_ack == 1,
          $sformatf("event counts done %0d arb %0d bit %0d ack %0d", n_done, n_arb, n_bit, n_ack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
